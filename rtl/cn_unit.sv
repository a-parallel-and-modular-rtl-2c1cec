// cn_unit: check node processing unit, normalized min-sum.
//
// Takes the bit-to-check messages v of one check node, one per lane (lanes whose mask bit is
// clear are ignored), and returns on each active lane the check-to-bit message
//   w_i = prod_{j != i} sign(v_j) * min_{j != i} |v_j| / alpha,
// the simplified check node rule the document uses. The smallest and second-smallest
// magnitudes and the index of the smallest are found in one combinational pass and the
// result is registered. alpha is not given by the document; this design uses 4/3, so that
// the division is floor(3m/4). Messages are two's complement, saturated to +/-(2^(Q-1)-1);
// a zero message counts as positive.
// Timing: v and mask sampled at edge t, w valid after edge t (one-cycle latency), one check
// node per cycle.
module cn_unit
  import ldpc_pkg::*;
#(
  parameter int unsigned NL = 20
) (
  input  logic           clk,
  input  msg_t           v    [NL],
  input  logic [NL-1:0]  mask,
  output msg_t           w    [NL]
);
  localparam int unsigned MAGW = Q - 1;

  logic [MAGW-1:0] mag [NL];
  logic [MAGW-1:0] min1, min2;
  int unsigned     idx1;
  logic            sprod;
  msg_t            w_d  [NL];

  always_comb begin
    min1  = '1;
    min2  = '1;
    idx1  = 0;
    sprod = 1'b0;
    for (int i = 0; i < NL; i++) begin
      mag[i] = v[i][Q-1] ? MAGW'(-v[i]) : MAGW'(v[i]);
      if (mask[i]) begin
        sprod = sprod ^ v[i][Q-1];
        if (mag[i] < min1) begin
          min2 = min1;
          min1 = mag[i];
          idx1 = i;
        end else if (mag[i] < min2) begin
          min2 = mag[i];
        end
      end
    end
    for (int i = 0; i < NL; i++) begin
      logic [MAGW-1:0] m;
      logic [MAGW+1:0] m3;
      logic [MAGW-1:0] mn;
      m  = (idx1 == i) ? min2 : min1;
      m3 = (MAGW+2)'(m) + ((MAGW+2)'(m) << 1);
      mn = MAGW'(m3 >> 2);
      w_d[i] = (sprod ^ v[i][Q-1]) ? -msg_t'({1'b0, mn}) : msg_t'({1'b0, mn});
    end
  end

  always_ff @(posedge clk) w <= w_d;
endmodule
