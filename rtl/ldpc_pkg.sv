// ldpc_pkg: constants, types and code tables shared by the 802.16e LDPC decoder.
//
// The decoder splits the parity-check matrix H into check-node sets CS_j (one block row of
// the base matrix, z check nodes each) and bit-node sets BS_j (one block column, z bit nodes).
// Each processing module owns SETS_PER_MOD check-node sets and keeps the messages of their
// edges in NB local banks; bus i of the interconnect reaches bank i of every module.
//
// What follows the published design: 6-bit messages, 4 modules, 20 buses / 20 banks per module,
// banks of 3 x 96 words, 24-column base matrix with block size z (24..96), the assignment of
// check-node sets to modules (M0: CS0,CS11,CS10; M1: CS4,CS3,CS6; M2: CS2,CS1,CS8;
// M3: CS7,CS9,CS5), and six scenarios of four bit-node sets each.
// The bank of every edge block for the rate-1/2 code (FIG5_MAP) is the published data
// memory organization, which uses ten of the banks and buses. Design choices of this
// implementation: the rate-1/2 base matrix is the one of the IEEE 802.16e standard (the
// published text shows only its first two block rows); the scenario schedule COL_OF keeps
// the published scenario {BS23, BS3, BS2, BS21} and completes it with five more found under
// the same rules (no bank read twice, no bus used twice, local reads need no bus).
package ldpc_pkg;

  localparam int unsigned Q            = 6;    // message / LLR width
  localparam int unsigned ZMAX         = 96;   // largest expansion factor
  localparam int unsigned ZW           = 7;    // width of an offset 0..ZMAX-1 and of z
  localparam int unsigned NM           = 4;    // processing modules
  localparam int unsigned NB           = 20;   // buses = banks per module
  localparam int unsigned NROW         = 12;   // block rows (check-node sets), rate 1/2
  localparam int unsigned NCOL         = 24;   // block columns (bit-node sets)
  localparam int unsigned SETS_PER_MOD = NROW / NM;  // 3
  localparam int unsigned NSCEN        = NCOL / NM;  // 6 scenarios
  localparam int unsigned BANK_DEPTH   = SETS_PER_MOD * ZMAX;  // 288 words
  localparam int unsigned BAW          = $clog2(BANK_DEPTH);
  localparam int unsigned LLR_DEPTH    = NSCEN * ZMAX;         // 576 words
  localparam int unsigned LAW          = $clog2(LLR_DEPTH);
  localparam int unsigned MW           = $clog2(NM);
  localparam int unsigned LAT          = 3;    // read (2 cycles) + node unit (1 cycle)
  localparam int signed   MSG_MAX      = (1 <<< (Q - 1)) - 1;   // symmetric saturation

  typedef logic signed [Q-1:0] msg_t;

  // Per-bank configuration of one pass.
  typedef struct packed {
    logic            en;     // bank takes part in this pass
    logic [1:0]      slot;   // which of the module's check-node sets (address base slot*ZMAX)
    logic [ZW-1:0]   start;  // first circular offset, (z - shift) mod z; 0 for check passes
    logic            local_bn; // bit-node pass: edge used by this module's own bit node unit
  } bank_cfg_t;

  // Per-bus configuration of a bit-node pass.
  typedef struct packed {
    logic            en;     // bus carries an edge between two modules in this pass
    logic [MW-1:0]   src;    // module whose bank i is read and written back
    logic [MW-1:0]   owner;  // module whose bit node unit consumes the bus
  } bus_cfg_t;

  typedef int base_matrix_t [NROW][NCOL];
  typedef logic [NROW*NCOL-1:0][7:0] bank_map_t;
  localparam logic [7:0] NO_BANK   = 8'hFF;

  // IEEE 802.16e rate-1/2 base matrix, shifts for z = 96, -1 = zero block.
  localparam base_matrix_t HB = '{
    '{-1,94,73,-1,-1,-1,-1,-1,55,83,-1,-1, 7, 0,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1},
    '{-1,27,-1,-1,-1,22,79, 9,-1,-1,-1,12,-1, 0, 0,-1,-1,-1,-1,-1,-1,-1,-1,-1},
    '{-1,-1,-1,24,22,81,-1,33,-1,-1,-1, 0,-1,-1, 0, 0,-1,-1,-1,-1,-1,-1,-1,-1},
    '{61,-1,47,-1,-1,-1,-1,-1,65,25,-1,-1,-1,-1,-1, 0, 0,-1,-1,-1,-1,-1,-1,-1},
    '{-1,-1,39,-1,-1,-1,84,-1,-1,41,72,-1,-1,-1,-1,-1, 0, 0,-1,-1,-1,-1,-1,-1},
    '{-1,-1,-1,-1,46,40,-1,82,-1,-1,-1,79, 0,-1,-1,-1,-1, 0, 0,-1,-1,-1,-1,-1},
    '{-1,-1,95,53,-1,-1,-1,-1,-1,14,18,-1,-1,-1,-1,-1,-1,-1, 0, 0,-1,-1,-1,-1},
    '{-1,11,73,-1,-1,-1, 2,-1,-1,47,-1,-1,-1,-1,-1,-1,-1,-1,-1, 0, 0,-1,-1,-1},
    '{12,-1,-1,-1,83,24,-1,43,-1,-1,-1,51,-1,-1,-1,-1,-1,-1,-1,-1, 0, 0,-1,-1},
    '{-1,-1,-1,-1,-1,94,-1,59,-1,-1,70,72,-1,-1,-1,-1,-1,-1,-1,-1,-1, 0, 0,-1},
    '{-1,-1, 7,65,-1,-1,-1,-1,39,49,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1, 0, 0},
    '{43,-1,-1,-1,-1,66,-1,41,-1,-1,-1,26, 7,-1,-1,-1,-1,-1,-1,-1,-1,-1,-1, 0}
  };

  // Check-node sets handled by each module, in slot order.
  typedef int cs_map_t [NM][SETS_PER_MOD];
  localparam cs_map_t CS_OF = '{'{0, 11, 10}, '{4, 3, 6}, '{2, 1, 8}, '{7, 9, 5}};

  function automatic int mod_of_row(int r);
    for (int k = 0; k < NM; k++)
      for (int t = 0; t < SETS_PER_MOD; t++)
        if (CS_OF[k][t] == r) return k;
    return 0;
  endfunction

  function automatic int slot_of_row(int r);
    for (int k = 0; k < NM; k++)
      for (int t = 0; t < SETS_PER_MOD; t++)
        if (CS_OF[k][t] == r) return t;
    return 0;
  endfunction

  // Module and slot of every block row, as look-up tables.
  typedef logic [NROW-1:0][1:0] row_tab_t;

  function automatic row_tab_t row_table(bit want_slot);
    row_tab_t tab;
    for (int r = 0; r < NROW; r++)
      tab[r] = want_slot ? 2'(slot_of_row(r)) : 2'(mod_of_row(r));
    return tab;
  endfunction

  localparam row_tab_t ROW_MOD  = row_table(1'b0);
  localparam row_tab_t ROW_SLOT = row_table(1'b1);

  // Data memory organization of the rate-1/2 code (four modules, ten banks in use):
  // FIG5_MAP[k][b][t] is the bit-node set whose edge block with check-node set CS_OF[k][t]
  // is stored in bank b of module k (-1: none). Each block row has its edges in distinct
  // banks, and each block column has its edges at distinct bank indices.
  localparam int unsigned NB_USED = 10;
  typedef int layout_t [NM][NB_USED][SETS_PER_MOD];
  localparam layout_t FIG5_MAP = '{
    '{'{-1,-1,23}, '{-1, 5,-1}, '{-1,11,22}, '{ 1,23, 9}, '{13,12,-1},
      '{ 9,-1,-1}, '{-1,-1, 2}, '{ 8, 7,-1}, '{12,-1, 3}, '{ 2, 0, 8}},
    '{'{-1,-1,19}, '{-1, 9, 2}, '{ 6, 2, 9}, '{-1,16, 3}, '{-1,-1,-1},
      '{16, 0,18}, '{ 9, 8,-1}, '{ 2,15,10}, '{10,-1,-1}, '{17,-1,-1}},
    '{'{ 3,13,-1}, '{ 7,14,-1}, '{-1, 5, 4}, '{ 4,-1, 5}, '{-1, 6,20},
      '{14, 7,21}, '{11,-1, 0}, '{-1,-1,11}, '{15,11, 7}, '{ 5, 1,-1}},
    '{'{20,-1,-1}, '{ 6,-1,17}, '{ 1, 7,-1}, '{-1,21,11}, '{ 2,-1, 4},
      '{-1,11,-1}, '{-1,22,18}, '{-1, 5,12}, '{19,-1, 5}, '{ 9,10, 7}}
  };

  // Bit-node schedule: COL_OF[s][k] is the bit-node set processed by module k in scenario s.
  // Scenario 0 is {BS23, BS3, BS2, BS21} with BS3 on module 1. In every scenario the edges
  // read from another module's bank use distinct buses, and no bank is read twice.
  typedef int sched_t [NSCEN][NM];
  localparam sched_t COL_OF = '{
    '{23,  3,  2, 21},
    '{ 5, 17, 13, 18},
    '{ 7, 16,  4, 19},
    '{20,  9, 14, 11},
    '{ 0,  1, 15, 12},
    '{ 8,  6, 10, 22}
  };

  // Scenario and module that process bit-node set c.
  function automatic int scen_of_col(int c);
    for (int s = 0; s < NSCEN; s++)
      for (int k = 0; k < NM; k++)
        if (COL_OF[s][k] == c) return s;
    return 0;
  endfunction
  function automatic int owner_of_col(int c);
    for (int s = 0; s < NSCEN; s++)
      for (int k = 0; k < NM; k++)
        if (COL_OF[s][k] == c) return k;
    return 0;
  endfunction

  typedef logic [NCOL-1:0][2:0] col_tab_t;
  function automatic col_tab_t col_table(bit want_owner);
    col_tab_t tab;
    for (int c = 0; c < NCOL; c++)
      tab[c] = want_owner ? 3'(owner_of_col(c)) : 3'(scen_of_col(c));
    return tab;
  endfunction
  localparam col_tab_t COL_SCEN  = col_table(1'b0);
  localparam col_tab_t COL_OWNER = col_table(1'b1);

  // Bank of every edge block, entry r*NCOL+c, read from FIG5_MAP; NO_BANK for zero blocks.
  function automatic bank_map_t layout_bank_map();
    bank_map_t bm;
    for (int e = 0; e < NROW * NCOL; e++) bm[e] = NO_BANK;
    for (int k = 0; k < NM; k++)
      for (int b = 0; b < NB_USED; b++)
        for (int t = 0; t < SETS_PER_MOD; t++)
          if (FIG5_MAP[k][b][t] >= 0)
            bm[CS_OF[k][t] * NCOL + FIG5_MAP[k][b][t]] = 8'(b);
    return bm;
  endfunction

  localparam bank_map_t BANK_MAP = layout_bank_map();

  // Consistency of layout and schedule: every non-zero block has a bank and every bank entry
  // is a non-zero block; a row's edges are in distinct banks; within a scenario every bank is
  // read at most once and every bus carries at most one edge. Returns 1 when all hold.
  function automatic bit layout_ok();
    logic [NB-1:0] row_used, bus_used;
    logic [NM-1:0][NB-1:0] port_used;
    int b, m, c;
    for (int r = 0; r < NROW; r++)
      for (int c2 = 0; c2 < NCOL; c2++)
        if ((HB[r][c2] >= 0) != (BANK_MAP[r*NCOL+c2] != NO_BANK)) return 1'b0;
    for (int r = 0; r < NROW; r++) begin
      row_used = '0;
      for (int c2 = 0; c2 < NCOL; c2++)
        if (HB[r][c2] >= 0) begin
          b = int'(BANK_MAP[r*NCOL+c2]);
          if (row_used[b]) return 1'b0;
          row_used = row_used | (NB'(1) << b);
        end
    end
    for (int s = 0; s < NSCEN; s++) begin
      bus_used  = '0;
      port_used = '0;
      for (int k = 0; k < NM; k++)
        for (int r = 0; r < NROW; r++) begin
          c = COL_OF[s][k];
          if (HB[r][c] >= 0) begin
            b = int'(BANK_MAP[r*NCOL+c]);
            m = mod_of_row(r);
            if (port_used[m][b]) return 1'b0;
            port_used[m] = port_used[m] | (NB'(1) << b);
            if (m != k) begin
              if (bus_used[b]) return 1'b0;
              bus_used = bus_used | (NB'(1) << b);
            end
          end
        end
    end
    return 1'b1;
  endfunction

  localparam bit LAYOUT_OK = layout_ok();

  // Shift of a block for expansion factor z (802.16e rule for rate 1/2: floor(p*z/96)).
  function automatic logic [ZW-1:0] scaled_shift(int p96, logic [ZW-1:0] z);
    int unsigned prod;
    prod = p96 * int'(z);
    return ZW'(prod / ZMAX);
  endfunction

  function automatic msg_t sat_msg(int x);
    if (x > MSG_MAX) return msg_t'(MSG_MAX);
    if (x < -MSG_MAX) return msg_t'(-MSG_MAX);
    return msg_t'(x);
  endfunction

endpackage
