// tb_addr_gen: self-checking test of the circular address generator.
// For random base, start offset and block size z it checks that the z addresses following a
// start pulse are base + ((init + j) mod z), that offset counts j, and that active lasts
// exactly z cycles.
module tb_addr_gen;
  localparam int AW = 9, ZW = 7;
  logic clk = 0, rst_n = 0, start = 0;
  logic [AW-1:0] base = '0, addr;
  logic [ZW-1:0] init = '0, z = 7'd24, offset;
  logic active;
  addr_gen #(.AW(AW), .ZW(ZW)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int zz, ii, bb;
      zz = 4 * $urandom_range(6, 24);
      ii = $urandom_range(zz - 1);
      bb = 96 * $urandom_range(2);
      @(negedge clk);
      z = ZW'(zz); init = ZW'(ii); base = AW'(bb); start = 1;
      @(negedge clk);
      start = 0;
      for (int j = 0; j < zz; j++) begin
        checks++;
        if (!active || addr != AW'(bb + (ii + j) % zz) || offset != ZW'(j)) begin
          failures++;
          $display("z=%0d init=%0d j=%0d: active=%0b addr=%0d offset=%0d", zz, ii, j, active,
                   addr, offset);
        end
        @(negedge clk);
      end
      checks++;
      if (active) begin failures++; $display("active longer than z=%0d", zz); end
      repeat ($urandom_range(3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
