// tb_proc_module: self-checking test of one processing module.
// The module's buses are looped back to itself (bus_rd = bank_rd, bus_wr = bn_v), except on
// the lanes of the two banks marked local, which carry random garbage; so the module decodes
// on its own, through both the local path and the bus path, a small code: one check-node set in bank slot 1 whose z check nodes each
// join five banks, bank b carrying a z x z block with shift p_b, all blocks landing on one
// bit-node set whose channel LLRs sit in LLR slot 2. The test loads random LLRs and runs
// bit-node pass (first), check-node pass, bit-node pass, check-node pass, bit-node pass,
// driving rd_start / wr_start and the bank configuration as the controller would. After every
// bit-node pass the hard decisions and their indices are compared with a reference computed
// here from the same small code (normalized min-sum, alpha = 4/3, 6-bit saturation); the
// decision stream must start LAT cycles after the first read.
module tb_proc_module;
  import ldpc_pkg::*;
  localparam int ZZ = 12;
  localparam int NE = 5;
  int bnk [NE] = '{0, 3, 7, 12, 19};
  int shf [NE] = '{0, 1, 5, 6, 3};

  logic clk = 0, rst_n = 0, phase_cn = 0, first = 0, rd_start = 0, wr_start = 0;
  logic [ZW-1:0] z = ZW'(ZZ);
  bank_cfg_t bank_cfg [NB];
  logic [NB-1:0] own_mask = '0;
  logic [2:0] llr_slot = 3'd2;
  msg_t bank_rd [NB], bus_rd [NB], bn_v [NB], bus_wr [NB];
  logic llr_we = 0;
  logic [LAW-1:0] llr_waddr = '0;
  msg_t llr_wdata = '0;
  logic dec_valid, dec_bit;
  logic [ZW-1:0] dec_idx;

  // Buses loop back to the module; the lanes of local banks carry garbage instead, which the
  // module must ignore.
  logic [NB-1:0] is_local = '0;
  msg_t garbage [NB];
  always_comb
    for (int b = 0; b < NB; b++) begin
      bus_rd[b] = is_local[b] ? garbage[b] : bank_rd[b];
      bus_wr[b] = is_local[b] ? garbage[b] : bn_v[b];
    end
  always @(negedge clk)
    for (int b = 0; b < NB; b++) garbage[b] = msg_t'($urandom);

  proc_module dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  int u [ZZ];
  int v [NE][ZZ];
  int w [NE][ZZ];
  bit dref [ZZ];
  bit got [ZZ];
  bit gval [ZZ];
  int ndec = 0, cyc = 0, first_dec_cyc = -1, rd_cyc = 0;

  function automatic int sat(int x);
    return (x > MSG_MAX) ? MSG_MAX : (x < -MSG_MAX) ? -MSG_MAX : x;
  endfunction

  always @(negedge clk) begin
    cyc++;
    if (rd_start) rd_cyc = cyc;
    if (dec_valid) begin
      if (first_dec_cyc < 0) first_dec_cyc = cyc;
      ndec++;
      got[dec_idx] = 1;
      gval[dec_idx] = dec_bit;
    end
  end

  task automatic model_bn(bit f);
    for (int j = 0; j < ZZ; j++) begin
      int s;
      s = u[j];
      for (int e = 0; e < NE; e++) if (!f) s += w[e][(j - shf[e] + ZZ) % ZZ];
      for (int e = 0; e < NE; e++) begin
        int i;
        i = (j - shf[e] + ZZ) % ZZ;
        v[e][i] = sat(s - (f ? 0 : w[e][i]));
      end
      dref[j] = (s < 0);
    end
  endtask

  task automatic model_cn();
    for (int i = 0; i < ZZ; i++)
      for (int e = 0; e < NE; e++) begin
        int m, sg;
        m = 1000; sg = 0;
        for (int e2 = 0; e2 < NE; e2++)
          if (e2 != e) begin
            int a;
            a = (v[e2][i] < 0) ? -v[e2][i] : v[e2][i];
            if (a < m) m = a;
            if (v[e2][i] < 0) sg ^= 1;
          end
        m = (3 * m) / 4;
        w[e][i] = sg ? -m : m;
      end
  endtask

  task automatic run_pass(bit cn, bit f);
    for (int b = 0; b < NB; b++) bank_cfg[b] = '0;
    own_mask = '0;
    for (int e = 0; e < NE; e++) begin
      bank_cfg[bnk[e]].en    = 1'b1;
      bank_cfg[bnk[e]].slot  = 2'd1;
      bank_cfg[bnk[e]].start = cn ? '0 : ZW'((ZZ - shf[e]) % ZZ);
      // edges 1 and 3 are local (read by the module's own bit node unit without a bus)
      bank_cfg[bnk[e]].local_bn = !cn && (e == 1 || e == 3);
      is_local[bnk[e]] = (e == 1 || e == 3);
      if (!cn && !(e == 1 || e == 3)) own_mask[bnk[e]] = 1'b1;
    end
    phase_cn = cn; first = f;
    for (int j = 0; j < ZZ; j++) got[j] = 0;
    ndec = 0; first_dec_cyc = -1;
    @(negedge clk);
    rd_start = 1;
    @(negedge clk);
    rd_start = 0;
    repeat (LAT - 1) @(negedge clk);
    wr_start = 1;
    @(negedge clk);
    wr_start = 0;
    repeat (ZZ + 2) @(negedge clk);
    if (!cn) begin
      model_bn(f);
      checks++;
      if (ndec != ZZ || first_dec_cyc - rd_cyc != LAT + 1) begin
        failures++;
        $display("%0d decisions, first %0d cycles after rd_start", ndec, first_dec_cyc - rd_cyc);
      end
      for (int j = 0; j < ZZ; j++) begin
        checks++;
        if (!got[j] || gval[j] != dref[j]) begin
          failures++;
          $display("pass first=%0b bit %0d: got %0b/%0b expected %0b u=%0d", f, j, got[j], gval[j], dref[j], u[j]);
        end
      end
    end else model_cn();
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < NB; b++) bank_cfg[b] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < ZZ; j++) begin
      u[j] = int'($urandom_range(40)) - 14;
      u[j] = sat(u[j]);
      @(negedge clk);
      llr_we = 1; llr_waddr = LAW'(2 * ZMAX + j); llr_wdata = msg_t'(u[j]);
    end
    @(negedge clk);
    llr_we = 0;
    run_pass(0, 1);
    run_pass(1, 0);
    run_pass(0, 0);
    run_pass(1, 0);
    run_pass(0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
