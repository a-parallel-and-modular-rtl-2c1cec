// tb_bn_unit: self-checking test of the bit node unit.
// Random channel LLR, messages and lane masks (bit-node degrees 1..20), with and without the
// 'first' flag; each active lane must carry the saturated total minus its own message, and
// the decision must be the sign of the unsaturated total.
module tb_bn_unit;
  import ldpc_pkg::*;
  localparam int NL = 20;
  logic clk = 0, first = 0, dec;
  msg_t u;
  msg_t w [NL];
  logic [NL-1:0] mask;
  msg_t v [NL];
  bn_unit #(.NL(NL)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_sat = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int deg, s;
      @(negedge clk);
      deg   = $urandom_range(1, (t % 2) ? 6 : NL);
      first = ($urandom_range(7) == 0);
      mask  = '0;
      while ($countones(mask) < deg) mask[$urandom_range(NL - 1)] = 1'b1;
      u = msg_t'($urandom_range(2 * MSG_MAX) - MSG_MAX);
      for (int i = 0; i < NL; i++) w[i] = msg_t'($urandom_range(2 * MSG_MAX) - MSG_MAX);
      s = int'(u);
      if (!first) for (int i = 0; i < NL; i++) if (mask[i]) s += int'(w[i]);
      @(negedge clk);
      for (int i = 0; i < NL; i++)
        if (mask[i]) begin
          int e;
          e = s - ((first) ? 0 : int'(w[i]));
          if (e > MSG_MAX) begin e = MSG_MAX; n_sat++; end
          if (e < -MSG_MAX) begin e = -MSG_MAX; n_sat++; end
          checks++;
          if (int'(v[i]) != e) begin
            failures++;
            $display("lane %0d: got %0d expected %0d", i, v[i], e);
          end
        end
      checks++;
      if (dec != (s < 0)) begin
        failures++;
        $display("decision %0b for total %0d", dec, s);
      end
    end
    checks++;
    if (n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
