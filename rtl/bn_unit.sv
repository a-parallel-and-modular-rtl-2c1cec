// bn_unit: bit node processing unit.
//
// Takes the channel LLR u of one bit node and the check-to-bit messages w of its edges, one
// per lane (lanes whose mask bit is clear are ignored), forms the total
//   s = u + sum_j w_j
// and returns on each active lane the extrinsic message v_i = s - w_i, saturated to Q bits,
// together with the hard decision (1 when s < 0), as the document's bit node rule and
// decision rule give. When 'first' is set all w are taken as zero, which starts decoding
// with v = u. The total is kept at full width; only the outgoing messages saturate.
// Timing: inputs sampled at edge t, outputs valid after edge t (one-cycle latency), one bit
// node per cycle.
module bn_unit
  import ldpc_pkg::*;
#(
  parameter int unsigned NL = 20
) (
  input  logic           clk,
  input  logic           first,
  input  msg_t           u,
  input  msg_t           w    [NL],
  input  logic [NL-1:0]  mask,
  output msg_t           v    [NL],
  output logic           dec
);
  localparam int unsigned SUMW = Q + $clog2(NL + 1) + 1;
  typedef logic signed [SUMW-1:0] sum_t;

  sum_t sum;
  msg_t w_eff [NL];
  msg_t v_d   [NL];

  always_comb begin
    sum = sum_t'(u);
    for (int i = 0; i < NL; i++) begin
      w_eff[i] = (mask[i] && !first) ? w[i] : '0;
      sum      = sum + sum_t'(w_eff[i]);
    end
    for (int i = 0; i < NL; i++) begin
      sum_t x;
      x = sum - sum_t'(w_eff[i]);
      if (x > sum_t'(MSG_MAX))       v_d[i] = msg_t'(MSG_MAX);
      else if (x < sum_t'(-MSG_MAX)) v_d[i] = msg_t'(-MSG_MAX);
      else                           v_d[i] = msg_t'(x);
    end
  end

  always_ff @(posedge clk) begin
    v   <= v_d;
    dec <= sum[SUMW-1];
  end
endmodule
