// tb_ldpc_ctrl: self-checking test of the pass sequencer.
// For several z and iteration counts it records the (phase, pass, first, final) of every
// pass at its rd_start and compares the list with the expected order: per iteration the six
// bit-node scenarios then the three check-node sets, 'first' only in the first iteration's
// scenarios, then six final scenarios. It also checks that wr_start follows each rd_start by
// LAT cycles, that passes are z + LAT + 2 cycles apart, and the start-to-done cycle count.
module tb_ldpc_ctrl;
  import ldpc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [ZW-1:0] z = 7'd24;
  logic [5:0] n_iter = 6'd1;
  logic phase_cn, first, final_pass, rd_start, wr_start, busy, done;
  logic [2:0] pass;
  ldpc_ctrl dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  int cyc = 0, last_rd = -1, rd_cycle_q [$];
  typedef struct { bit cn; int p; bit f; bit fin; } rec_t;
  rec_t seen [$];

  always @(negedge clk) begin
    cyc++;
    if (rd_start) begin
      seen.push_back('{phase_cn, int'(pass), first, final_pass});
      if (last_rd >= 0) begin
        checks++;
        if (cyc - last_rd != int'(z) + LAT + 2) begin
          failures++; $display("pass spacing %0d", cyc - last_rd);
        end
      end
      last_rd = cyc;
      rd_cycle_q.push_back(cyc);
    end
    if (wr_start) begin
      checks++;
      if (rd_cycle_q.size() == 0 || cyc - rd_cycle_q.pop_front() != LAT) begin
        failures++; $display("wr_start not LAT after rd_start");
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 5; t++) begin
      int zz, it, c0, n;
      zz = (t == 0) ? 24 : 4 * $urandom_range(6, 24);
      it = (t == 0) ? 1 : $urandom_range(1, 8);
      seen.delete(); last_rd = -1;
      @(negedge clk);
      z = ZW'(zz); n_iter = 6'(it); start = 1;
      c0 = cyc;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      checks++;
      if (cyc - c0 != (9 * it + 6) * (zz + LAT + 2) + 1) begin
        failures++; $display("decode took %0d cycles", cyc - c0);
      end
      n = 0;
      for (int i = 0; i <= it; i++) begin
        for (int s = 0; s < 6; s++) begin
          checks++;
          if (n >= seen.size() || seen[n].cn || seen[n].p != s || seen[n].f != (i == 0)
              || seen[n].fin != (i == it)) begin
            failures++; $display("pass %0d: expected scenario %0d of iteration %0d", n, s, i);
          end
          n++;
        end
        if (i < it)
          for (int s = 0; s < 3; s++) begin
            checks++;
            if (n >= seen.size() || !seen[n].cn || seen[n].p != s || seen[n].f || seen[n].fin) begin
              failures++; $display("pass %0d: expected check set %0d", n, s);
            end
            n++;
          end
      end
      checks++;
      if (seen.size() != n) begin failures++; $display("%0d passes, expected %0d", seen.size(), n); end
      checks++;
      if (busy) failures++;
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
