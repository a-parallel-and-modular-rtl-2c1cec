// tb_ldpc_decoder: end-to-end test of the decoder at its default (and only) configuration.
//
// Sends noisy all-zero codewords through the decoder and compares every hard decision with a
// bit-exact reference decoder written here directly from the code definition: a flooding
// normalized min-sum over the expanded parity-check matrix (6-bit saturated messages,
// alpha = 4/3, decisions from the sign of the full bit-node total). The reference knows
// nothing of banks, buses, scenarios or address generators, so it checks the whole data
// placement and routing. Runs cover z = 24 and z = 96 (n = 576 and 2304), a low-noise
// codeword that must decode to all zeros, and a full 20-iteration decode at n = 2304.
// Also checked: the cycle count from start to done, one decision per bit, that buses carry
// only messages between two different modules and only buses 0..9 are used, and that each
// mechanism of the design (bit-node scenarios, check-node passes, bus transfers, local reads
// that bypass the buses, the start-from-LLR first pass, code length switching) occurred.
module tb_ldpc_decoder;
  import ldpc_pkg::*;

  localparam int NMAX = NCOL * ZMAX;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          start = 1'b0;
  logic [ZW-1:0] z = 7'd24;
  logic [5:0]    n_iter = 6'd1;
  logic          llr_we = 1'b0;
  logic [4:0]    llr_col = '0;
  logic [ZW-1:0] llr_idx = '0;
  msg_t          llr_data = '0;
  logic          busy, done;
  logic [NM-1:0] dec_valid, dec_bit;
  logic [4:0]    dec_col [NM];
  logic [ZW-1:0] dec_idx [NM];

  ldpc_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---- watchdog ---------------------------------------------------------------------------
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference decoder -------------------------------------------------------------------
  int u_ref [NMAX];
  int w_ref [NROW][NCOL][ZMAX];
  int v_ref [NROW][NCOL][ZMAX];
  bit dec_ref [NMAX];
  int sat_events;

  function automatic int satq(int x);
    if (x > MSG_MAX) begin sat_events++; return MSG_MAX; end
    if (x < -MSG_MAX) begin sat_events++; return -MSG_MAX; end
    return x;
  endfunction

  function automatic int shift_of(int r, int c, int zz);
    return (HB[r][c] * zz) / 96;
  endfunction

  task automatic ref_bit_nodes(int zz, bit decide);
    for (int c = 0; c < NCOL; c++)
      for (int j = 0; j < zz; j++) begin
        int s;
        s = u_ref[c*zz + j];
        for (int r = 0; r < NROW; r++)
          if (HB[r][c] >= 0) s += w_ref[r][c][(j - shift_of(r, c, zz) + zz) % zz];
        for (int r = 0; r < NROW; r++)
          if (HB[r][c] >= 0) begin
            int i;
            i = (j - shift_of(r, c, zz) + zz) % zz;
            v_ref[r][c][i] = satq(s - w_ref[r][c][i]);
          end
        if (decide) dec_ref[c*zz + j] = (s < 0);
      end
  endtask

  task automatic ref_check_nodes(int zz);
    for (int r = 0; r < NROW; r++)
      for (int i = 0; i < zz; i++) begin
        int m1, m2, i1, sg;
        m1 = 1000; m2 = 1000; i1 = -1; sg = 0;
        for (int c = 0; c < NCOL; c++)
          if (HB[r][c] >= 0) begin
            int a;
            a = (v_ref[r][c][i] < 0) ? -v_ref[r][c][i] : v_ref[r][c][i];
            if (v_ref[r][c][i] < 0) sg ^= 1;
            if (a < m1) begin m2 = m1; m1 = a; i1 = c; end
            else if (a < m2) m2 = a;
          end
        for (int c = 0; c < NCOL; c++)
          if (HB[r][c] >= 0) begin
            int m, s;
            m = (c == i1) ? m2 : m1;
            m = (3 * m) / 4;
            s = sg ^ ((v_ref[r][c][i] < 0) ? 1 : 0);
            w_ref[r][c][i] = s ? -m : m;
          end
      end
  endtask

  task automatic ref_decode(int zz, int iters);
    for (int r = 0; r < NROW; r++)
      for (int c = 0; c < NCOL; c++)
        for (int i = 0; i < ZMAX; i++) w_ref[r][c][i] = 0;
    for (int it = 0; it < iters; it++) begin
      ref_bit_nodes(zz, 1'b0);
      ref_check_nodes(zz);
    end
    ref_bit_nodes(zz, 1'b1);
  endtask

  // ---- mechanism counters ------------------------------------------------------------------
  int n_bn_pass = 0, n_cn_pass = 0, n_first = 0, n_remote = 0, n_local = 0, n_zswitch = 0;
  int n_bad_bus = 0;
  int last_z = 0;

  always @(negedge clk) begin
    if (dut.rd_start) begin
      if (dut.phase_cn) n_cn_pass++;
      else begin
        n_bn_pass++;
        if (dut.first) n_first++;
        for (int b = 0; b < NB; b++) begin
          if (dut.bus_cfg[b].en) begin
            n_remote++;
            if (dut.bus_cfg[b].src == dut.bus_cfg[b].owner) n_bad_bus++;
            if (b >= 10) n_bad_bus++;
          end
          for (int k = 0; k < NM; k++)
            if (dut.bank_cfg[k][b].en && dut.bank_cfg[k][b].local_bn) n_local++;
        end
      end
    end
  end

  // ---- decision capture --------------------------------------------------------------------
  bit got     [NMAX];
  bit got_val [NMAX];
  int dup = 0;

  always @(negedge clk)
    for (int k = 0; k < NM; k++)
      if (dec_valid[k]) begin
        int n;
        n = int'(dec_col[k]) * int'(z) + int'(dec_idx[k]);
        if (got[n]) dup++;
        got[n]     = 1'b1;
        got_val[n] = dec_bit[k];
      end

  // ---- one decode ------------------------------------------------------------------------
  int expect_zero_errors;

  task automatic run(int zz, int iters, int noise_div, bit must_be_zero);
    int n, cycles, mism, miss, ones;
    n = NCOL * zz;
    sat_events = 0;
    // channel LLRs of the all-zero codeword (BPSK +1) plus noise
    for (int b = 0; b < n; b++) begin
      int g;
      g = 0;
      for (int k = 0; k < 6; k++) g += int'($urandom_range(16)) - 8;
      u_ref[b] = satq(8 + g / noise_div);
    end
    for (int b = 0; b < NMAX; b++) got[b] = 1'b0;
    dup = 0;
    // load
    for (int b = 0; b < n; b++) begin
      @(negedge clk);
      llr_we   = 1'b1;
      llr_col  = 5'(b / zz);
      llr_idx  = ZW'(b % zz);
      llr_data = msg_t'(u_ref[b]);
    end
    @(negedge clk);
    llr_we = 1'b0;
    z      = ZW'(zz);
    n_iter = 6'(iters);
    if (last_z != 0 && last_z != zz) n_zswitch++;
    last_z = zz;
    start  = 1'b1;
    @(negedge clk);
    start  = 1'b0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    ref_decode(zz, iters);
    mism = 0; miss = 0; ones = 0;
    for (int b = 0; b < n; b++) begin
      if (!got[b]) miss++;
      else if (got_val[b] != dec_ref[b]) mism++;
      if (got[b] && got_val[b]) ones++;
    end
    checks++;
    if (mism != 0 || miss != 0 || dup != 0) begin
      failures++;
      $display("z=%0d iters=%0d: %0d decisions differ from reference, %0d missing, %0d duplicate",
               zz, iters, mism, miss, dup);
    end
    checks++;
    if (cycles != (9 * iters + 6) * (zz + LAT + 2) + 1) begin
      failures++;
      $display("z=%0d iters=%0d: %0d cycles, expected %0d", zz, iters, cycles,
               (9 * iters + 6) * (zz + LAT + 2) + 1);
    end
    if (must_be_zero) begin
      checks++;
      if (ones != 0) begin
        failures++;
        $display("z=%0d iters=%0d: %0d bit errors after decoding", zz, iters, ones);
      end
    end
    $display("run z=%0d iters=%0d noise_div=%0d: %0d cycles, %0d bit errors, %0d saturations",
             zz, iters, noise_div, cycles, ones, sat_events);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run(24, 3, 1, 1'b0);   // noisy, short
    run(24, 10, 2, 1'b1);  // moderate noise, must decode
    run(96, 20, 2, 1'b1);  // full length, 20 iterations, must decode
    run(48, 5, 1, 1'b0);   // another length, heavy noise
    begin
      int need [6];
      string nm [6];
      need = '{n_bn_pass, n_cn_pass, n_first, n_remote, n_local, n_zswitch};
      nm   = '{"bit-node scenario", "check-node pass", "first pass", "bus transfer",
               "local read without bus", "code length switch"};
      for (int i = 0; i < 6; i++) begin
        checks++;
        $display("mechanism %s: %0d", nm[i], need[i]);
        if (need[i] == 0) failures++;
      end
    end
    // the rate-1/2 schedule needs only buses 0..9, each between two different modules
    checks++;
    if (n_bad_bus != 0) begin
      failures++;
      $display("%0d bus uses outside buses 0..9 or within one module", n_bad_bus);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
