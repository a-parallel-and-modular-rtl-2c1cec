// ldpc_decoder: parallel, modular decoder for the rate-1/2 IEEE 802.16e LDPC code.
//
// Four processing modules, each owning three check-node sets (block rows of H) and the
// messages of their edges in 20 local banks, are joined by a 20-bus interconnect in which
// bus i reaches bank i of every module. A controller steps through the passes of each
// iteration: six bit-node scenarios (four bit-node sets in parallel, one per module, their
// messages read from the module's own banks or fetched over the buses from the module that
// holds them) and three check-node passes (each module updating one of its sets from its own
// banks). A configuration memory
// supplies the bank enables, address offsets and bus routing of every pass. The decoder
// runs normalized min-sum with 6-bit messages for n_iter iterations, then emits hard
// decisions.
// Interface:
//  * Load: while idle, write the channel LLR of bit idx (0..z-1) of bit-node set col (0..23)
//    with llr_we/llr_col/llr_idx/llr_data; codeword bit n is col = n / z, idx = n % z.
//    A positive LLR favours bit 0.
//  * Decode: pulse start with z (24..96, a multiple of 4) and n_iter (1..63) held stable;
//    busy stays high until the one-cycle done pulse, (9*n_iter + 6)*(z + 5) + 1 cycles after
//    the cycle in which start is sampled.
//  * Output: during the final scenarios each module k streams decisions on dec_valid[k],
//    with the bit position given by dec_col[k] and dec_idx[k]; every bit appears once.
// The module count, bus and bank counts, bank size, message width, check-set placement and
// rate-1/2 memory organization follow the document; the remaining scenarios, the LLR
// memory, the interface and the pass timing are this design's own.
module ldpc_decoder
  import ldpc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [ZW-1:0]   z,
  input  logic [5:0]      n_iter,
  input  logic            llr_we,
  input  logic [4:0]      llr_col,
  input  logic [ZW-1:0]   llr_idx,
  input  msg_t            llr_data,
  output logic            busy,
  output logic            done,
  output logic [NM-1:0]   dec_valid,
  output logic [4:0]      dec_col  [NM],
  output logic [ZW-1:0]   dec_idx  [NM],
  output logic [NM-1:0]   dec_bit
);
  logic        phase_cn, first, final_pass, rd_start, wr_start;
  logic [2:0]  pass;

  bank_cfg_t     bank_cfg [NM][NB];
  bus_cfg_t      bus_cfg  [NB];
  msg_t          bank_rd  [NM][NB];
  msg_t          bn_v     [NM][NB];
  msg_t          bus_rd   [NB];
  msg_t          bus_wr   [NB];
  logic [NB-1:0] own_mask [NM];

  ldpc_ctrl u_ctrl (
    .clk, .rst_n, .start, .z, .n_iter,
    .phase_cn, .pass, .first, .final_pass, .rd_start, .wr_start, .busy, .done);

  config_mem u_cfg (.clk, .phase_cn, .pass, .z, .bank_cfg, .bus_cfg);

  ldpc_interconnect u_ic (.bus_cfg, .bank_rd, .bn_wr(bn_v), .bus_rd, .bus_wr, .own_mask);

  // Channel LLRs of bit-node set c live in the module that processes it, at the slot of its
  // scenario.
  logic [2:0] load_mod, load_scen;
  always_comb begin
    load_mod  = COL_OWNER[0];
    load_scen = COL_SCEN[0];
    for (int c = 0; c < NCOL; c++)
      if (int'(llr_col) == c) begin
        load_mod  = COL_OWNER[c];
        load_scen = COL_SCEN[c];
      end
  end

  for (genvar k = 0; k < NM; k++) begin : g_mod
    logic [LAW-1:0] waddr;
    logic           we;
    logic           dv;

    assign we    = llr_we && (load_mod == 3'(k));
    assign waddr = LAW'(load_scen) * LAW'(ZMAX) + LAW'(llr_idx);

    proc_module u_pm (
      .clk, .rst_n, .phase_cn, .first, .rd_start, .wr_start, .z,
      .bank_cfg (bank_cfg[k]),
      .own_mask (own_mask[k]),
      .llr_slot (pass),
      .bank_rd  (bank_rd[k]),
      .bus_rd,
      .bn_v     (bn_v[k]),
      .bus_wr,
      .llr_we   (we),
      .llr_waddr(waddr),
      .llr_wdata(llr_data),
      .dec_valid(dv),
      .dec_idx  (dec_idx[k]),
      .dec_bit  (dec_bit[k]));

    assign dec_valid[k] = dv && final_pass && !phase_cn;
    always_comb begin
      dec_col[k] = '0;
      for (int s = 0; s < NSCEN; s++)
        if (int'(pass) == s) dec_col[k] = 5'(COL_OF[s][k]);
    end
  end

  // Channel LLRs may only be loaded between decodes.
  a_load_idle: assert property (@(posedge clk) disable iff (!rst_n) llr_we |-> !busy);
endmodule
