// tb_config_mem: self-checking test of the configuration memory.
// For every pass and several block sizes z it checks, from the base matrix, the check-set
// placement and the scenario schedule restated here:
//  * a check-node pass enables, in each module, exactly as many banks as the block row of
//    that slot has edges, with offset 0 and the right slot, and no bus;
//  * in a bit-node pass every edge (r,c) of the scenario's four sets has an enabled bank in
//    the module holding row r, with the slot of r and start offset (z - floor(p*z/96)) mod z;
//    it is marked local when that module processes c, and otherwise a bus of the bank's
//    index runs from the holding module to the processing one; there are exactly as many
//    buses as non-local edges and only buses 0..9 are used;
//  * three bank positions of the published memory organization: BS3-2 in bank 0 of M2,
//    BS3-6 in bank 3 of M1, BS3-10 in bank 8 of M0 (scenario 0, BS3 processed on M1).
module tb_config_mem;
  import ldpc_pkg::*;
  logic clk = 0, phase_cn = 0;
  logic [2:0] pass = '0;
  logic [ZW-1:0] z = 7'd96;
  bank_cfg_t bank_cfg [NM][NB];
  bus_cfg_t  bus_cfg  [NB];
  config_mem dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // placement from the figure, restated here
  int cs [NM][3] = '{'{0, 11, 10}, '{4, 3, 6}, '{2, 1, 8}, '{7, 9, 5}};
  // bit-node schedule of this design: sched[s][k] = set processed by module k in scenario s
  int sched [6][NM] = '{'{23, 3, 2, 21}, '{5, 17, 13, 18}, '{7, 16, 4, 19},
                        '{20, 9, 14, 11}, '{0, 1, 15, 12}, '{8, 6, 10, 22}};

  function automatic int row_mod(int r);
    foreach (cs[k, t]) if (cs[k][t] == r) return k;
    return -1;
  endfunction
  function automatic int row_slot(int r);
    foreach (cs[k, t]) if (cs[k][t] == r) return t;
    return -1;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("z=%0d cn=%0b pass=%0d: %s", z, phase_cn, pass, what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int zi = 0; zi < 4; zi++) begin
      int zz;
      zz = (zi == 0) ? 24 : (zi == 1) ? 96 : (zi == 2) ? 52 : 76;
      for (int ph = 0; ph < 2; ph++)
        for (int p = 0; p < ((ph == 1) ? 3 : 6); p++) begin
          @(negedge clk);
          z = ZW'(zz); phase_cn = ph[0]; pass = 3'(p);
          @(negedge clk);
          if (ph == 1) begin
            for (int k = 0; k < NM; k++) begin
              int deg, en;
              deg = 0; en = 0;
              for (int c = 0; c < NCOL; c++) if (HB[cs[k][p]][c] >= 0) deg++;
              for (int b = 0; b < NB; b++)
                if (bank_cfg[k][b].en) begin
                  en++;
                  chk(bank_cfg[k][b].slot == 2'(p) && bank_cfg[k][b].start == 0, "bank slot/offset");
                end
              chk(en == deg, $sformatf("module %0d enables %0d banks for degree %0d", k, en, deg));
            end
            for (int b = 0; b < NB; b++) chk(!bus_cfg[b].en, "bus enabled in check pass");
          end else begin
            int nedge, nbus;
            nedge = 0; nbus = 0;
            for (int b = 0; b < NB; b++) if (bus_cfg[b].en) begin
              nbus++;
              chk(b < 10, "bus above 9 used");
            end
            for (int k = 0; k < NM; k++)
              for (int r = 0; r < NROW; r++) begin
                int c;
                c = sched[p][k];
                if (HB[r][c] >= 0) begin
                  bit found;
                  int m, st;
                  m  = row_mod(r);
                  st = (zz - (HB[r][c] * zz) / 96) % zz;
                  if (m != k) nedge++;
                  found = 0;
                  for (int b = 0; b < NB; b++)
                    if (bank_cfg[m][b].en && bank_cfg[m][b].slot == 2'(row_slot(r))
                        && int'(bank_cfg[m][b].start) == st && bank_cfg[m][b].local_bn == (m == k)
                        && (m == k || (bus_cfg[b].en && bus_cfg[b].src == 2'(m)
                                       && bus_cfg[b].owner == 2'(k)))) found = 1;
                  chk(found, $sformatf("no bank/bus for edge (%0d,%0d)", r, c));
                end
              end
            if (p == 0) begin
              chk(bank_cfg[2][0].en && bus_cfg[0].en && bus_cfg[0].src == 2'd2 && bus_cfg[0].owner == 2'd1,
                  "BS3-2 not in bank 0 of M2");
              chk(bank_cfg[1][3].en && bank_cfg[1][3].local_bn, "BS3-6 not in bank 3 of M1");
              chk(bank_cfg[0][8].en && bus_cfg[8].en && bus_cfg[8].src == 2'd0 && bus_cfg[8].owner == 2'd1,
                  "BS3-10 not in bank 8 of M0");
            end
            chk(nedge == nbus, $sformatf("%0d buses for %0d remote edges", nbus, nedge));
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
