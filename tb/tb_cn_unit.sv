// tb_cn_unit: self-checking test of the check node unit.
// Random messages and lane masks (check-node degrees 2..20); the expected output of each
// active lane is computed directly as the product of the other lanes' signs times 3/4 of the
// smallest of the other lanes' magnitudes (floor), with a zero message counted as positive.
module tb_cn_unit;
  import ldpc_pkg::*;
  localparam int NL = 20;
  logic clk = 0;
  msg_t v [NL];
  logic [NL-1:0] mask;
  msg_t w [NL];
  cn_unit #(.NL(NL)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int deg;
      @(negedge clk);
      deg = $urandom_range(2, NL);
      mask = '0;
      while ($countones(mask) < deg) mask[$urandom_range(NL - 1)] = 1'b1;
      for (int i = 0; i < NL; i++) begin
        int x;
        x = $urandom_range(2 * MSG_MAX) - MSG_MAX;
        if (t % 7 == 0) x = $urandom_range(6) - 3;   // many ties and zeros
        v[i] = msg_t'(x);
      end
      @(negedge clk);
      for (int i = 0; i < NL; i++)
        if (mask[i]) begin
          int m, s, e;
          m = 1000; s = 0;
          for (int j = 0; j < NL; j++)
            if (mask[j] && j != i) begin
              int a;
              a = (v[j] < 0) ? -int'(v[j]) : int'(v[j]);
              if (a < m) m = a;
              if (v[j] < 0) s ^= 1;
            end
          e = (3 * m) / 4;
          if (s) e = -e;
          checks++;
          if (int'(w[i]) != e) begin
            failures++;
            $display("lane %0d: got %0d expected %0d", i, w[i], e);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
