// proc_module: one processing module of the decoder.
//
// Holds a check node unit, a bit node unit, NB dual-port message banks (each with a read and
// a write address generator) and a memory for the channel LLRs of the bit-node sets the
// module processes, as in the document's module organization.
//  * Check-node pass: the module's banks are read in check-node order (one check node per
//    cycle, all its edges in distinct banks, so one cycle reads them all); the check node
//    unit's results are written back to the same addresses LAT cycles later.
//  * Bit-node pass: the enabled banks are read in the rotated order of their block. A word
//    for this module's own bit node unit (bank marked local_bn) goes to it directly; other
//    words leave on the buses (bank_rd). The bit node unit takes its local banks, the buses
//    it owns (bus_rd, own_mask) and the channel LLR; its results (bn_v) go back to the local
//    banks directly and over the buses (bus_wr) to the other modules' banks, LAT cycles
//    after the read. Only non-local messages use the interconnect.
// Message words are stored in place: a bank word holds v (bit to check) after a bit-node
// pass and w (check to bit) after a check-node pass. Address of a word: slot*ZMAX + row
// offset within the z x z block.
// Interface: rd_start starts the read address generators of a pass, wr_start (LAT cycles
// later) the write address generators; configuration inputs must be stable during a pass.
// Hard decisions leave on dec_valid/dec_idx/dec_bit, LAT cycles after their reads.
module proc_module
  import ldpc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            phase_cn,
  input  logic            first,
  input  logic            rd_start,
  input  logic            wr_start,
  input  logic [ZW-1:0]   z,
  input  bank_cfg_t       bank_cfg [NB],
  input  logic [NB-1:0]   own_mask,
  input  logic [2:0]      llr_slot,
  output msg_t            bank_rd  [NB],
  input  msg_t            bus_rd   [NB],
  output msg_t            bn_v     [NB],
  input  msg_t            bus_wr   [NB],
  input  logic            llr_we,
  input  logic [LAW-1:0]  llr_waddr,
  input  msg_t            llr_wdata,
  output logic            dec_valid,
  output logic [ZW-1:0]   dec_idx,
  output logic            dec_bit
);
  msg_t cn_w [NB];
  msg_t u;

  // ---- message banks -------------------------------------------------------------------
  for (genvar b = 0; b < NB; b++) begin : g_bank
    logic [BAW-1:0] rd_addr, wr_addr, base;
    logic [ZW-1:0]    rd_off, wr_off;
    logic             rd_act, wr_act;

    assign base = BAW'(bank_cfg[b].slot) * BAW'(ZMAX);

    addr_gen #(.AW(BAW), .ZW(ZW)) u_rd_ag (
      .clk, .rst_n, .start(rd_start), .base, .init(bank_cfg[b].start), .z,
      .addr(rd_addr), .offset(rd_off), .active(rd_act));

    addr_gen #(.AW(BAW), .ZW(ZW)) u_wr_ag (
      .clk, .rst_n, .start(wr_start), .base, .init(bank_cfg[b].start), .z,
      .addr(wr_addr), .offset(wr_off), .active(wr_act));

    msg_bank #(.W(Q), .DEPTH(BANK_DEPTH)) u_bank (
      .clk,
      .rd_en   (rd_act && bank_cfg[b].en),
      .rd_addr (rd_addr),
      .rd_data (bank_rd[b]),
      .wr_en   (wr_act && bank_cfg[b].en),
      .wr_addr (wr_addr),
      .wr_data (phase_cn ? cn_w[b] : (bank_cfg[b].local_bn ? bn_v[b] : bus_wr[b])));

    logic unused_off;
    assign unused_off = ^{rd_off, wr_off};
  end

  // ---- channel LLR memory ----------------------------------------------------------------
  logic [LAW-1:0] llr_raddr;
  logic [ZW-1:0]  llr_off;
  logic           llr_act;

  addr_gen #(.AW(LAW), .ZW(ZW)) u_llr_ag (
    .clk, .rst_n, .start(rd_start && !phase_cn),
    .base(LAW'(llr_slot) * LAW'(ZMAX)), .init('0), .z,
    .addr(llr_raddr), .offset(llr_off), .active(llr_act));

  msg_bank #(.W(Q), .DEPTH(LLR_DEPTH)) u_llr (
    .clk,
    .rd_en(llr_act), .rd_addr(llr_raddr), .rd_data(u),
    .wr_en(llr_we), .wr_addr(llr_waddr), .wr_data(llr_wdata));

  // ---- node units --------------------------------------------------------------------------
  // Bit node unit lane b takes this module's own bank b for a local edge and bus b for an
  // edge held by another module (the two never coincide in a scenario).
  logic [NB-1:0] cn_mask, bn_mask;
  msg_t          bn_in [NB];
  always_comb
    for (int b = 0; b < NB; b++) begin
      cn_mask[b] = bank_cfg[b].en;
      bn_mask[b] = own_mask[b] || (bank_cfg[b].en && bank_cfg[b].local_bn);
      bn_in[b]   = (bank_cfg[b].en && bank_cfg[b].local_bn) ? bank_rd[b] : bus_rd[b];
    end

  cn_unit #(.NL(NB)) u_cn (.clk, .v(bank_rd), .mask(cn_mask), .w(cn_w));

  bn_unit #(.NL(NB)) u_bn (
    .clk, .first, .u, .w(bn_in), .mask(bn_mask), .v(bn_v), .dec(dec_bit));

  // ---- decision index pipeline (matches LAT) -----------------------------------------------
  logic [LAT-1:0]  act_q;
  logic [ZW-1:0]   off_q [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act_q <= '0;
      for (int i = 0; i < LAT; i++) off_q[i] <= '0;
    end else begin
      act_q <= {act_q[LAT-2:0], llr_act};
      off_q[0] <= llr_off;
      for (int i = 1; i < LAT; i++) off_q[i] <= off_q[i-1];
    end
  end

  assign dec_valid = act_q[LAT-1];
  assign dec_idx   = off_q[LAT-1];
endmodule
