// config_mem: configuration memory of the decoder.
//
// For each pass of an iteration it supplies what the banks, address generators and buses
// must do. A check-node pass t lets every module process its t-th check-node set: the banks
// that hold an edge of that block row are enabled with start offset 0. A bit-node pass s
// (a "scenario") processes the four bit-node sets COL_OF[s][0..3], set COL_OF[s][k] on
// module k. For each edge (r,c) of those sets the bank BANK_MAP(r,c) of the module holding
// row r is enabled with start offset (z - shift) mod z. If that module is also the one
// processing column c, the bank is marked local and feeds its own bit node unit directly;
// otherwise the bus with the bank's index is routed from the holding module to the
// processing module. Contents follow from the base matrix, check-set placement, memory
// layout and schedule in ldpc_pkg; block shifts are scaled to the run-time expansion factor
// z as floor(p*z/96). The configuration memory's existence is published, its format is
// this design's own: it is built as logic over constants with a registered output.
// Timing: phase_cn, pass and z sampled at edge t, bank_cfg/bus_cfg valid after edge t.
module config_mem
  import ldpc_pkg::*;
(
  input  logic            clk,
  input  logic            phase_cn,   // 1: check-node pass, 0: bit-node pass
  input  logic [2:0]      pass,       // check-node slot 0..2 or scenario 0..5
  input  logic [ZW-1:0]   z,
  output bank_cfg_t       bank_cfg [NM][NB],
  output bus_cfg_t        bus_cfg  [NB]
);
  bank_cfg_t bank_d [NM][NB];
  bus_cfg_t  bus_d  [NB];

  always_comb begin
    logic [4:0]    b;
    logic [MW-1:0] m;
    logic [ZW-1:0] sh;
    b  = '0;
    m  = '0;
    sh = '0;
    for (int k = 0; k < NM; k++)
      for (int i = 0; i < NB; i++) bank_d[k][i] = '0;
    for (int i = 0; i < NB; i++) bus_d[i] = '0;
    for (int r = 0; r < NROW; r++)
      for (int c = 0; c < NCOL; c++)
        if (HB[r][c] >= 0) begin
          b  = 5'(BANK_MAP[r*NCOL+c]);
          m  = MW'(ROW_MOD[r]);
          sh = scaled_shift(HB[r][c], z);
          if (phase_cn) begin
            if (ROW_SLOT[r] == pass[1:0] && !pass[2]) begin
              bank_d[m][b].en    = 1'b1;
              bank_d[m][b].slot  = ROW_SLOT[r];
              bank_d[m][b].start = '0;
            end
          end else if (COL_SCEN[c] == pass) begin
            bank_d[m][b].en       = 1'b1;
            bank_d[m][b].slot     = ROW_SLOT[r];
            bank_d[m][b].start    = (sh == '0) ? '0 : z - sh;
            bank_d[m][b].local_bn = (COL_OWNER[c] == 3'(m));
            if (COL_OWNER[c] != 3'(m)) begin
              bus_d[b].en    = 1'b1;
              bus_d[b].src   = m;
              bus_d[b].owner = MW'(COL_OWNER[c]);
            end
          end
        end
  end

  always_ff @(posedge clk) begin
    bank_cfg <= bank_d;
    bus_cfg  <= bus_d;
  end

  // The memory layout and the scenario schedule must be conflict-free.
  if (!LAYOUT_OK) begin : g_layout_chk
    $error("ldpc_pkg: bank layout or scenario schedule has a conflict");
  end
endmodule
