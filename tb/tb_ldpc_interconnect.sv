// tb_ldpc_interconnect: self-checking test of the bus interconnect.
// Random bus routings and random bank / bit-node-unit words; every enabled bus must carry the
// word of bank i of its source module on its read lane and the word of lane i of its owner's
// bit node unit on its write lane, disabled buses carry zero, and the owner masks must mark
// exactly the enabled buses of each module.
module tb_ldpc_interconnect;
  import ldpc_pkg::*;
  bus_cfg_t bus_cfg [NB];
  msg_t bank_rd [NM][NB];
  msg_t bn_wr [NM][NB];
  msg_t bus_rd [NB];
  msg_t bus_wr [NB];
  logic [NB-1:0] own_mask [NM];
  ldpc_interconnect dut (.*);
  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int b = 0; b < NB; b++) begin
        bus_cfg[b].en    = $urandom_range(1);
        bus_cfg[b].src   = MW'($urandom_range(NM - 1));
        bus_cfg[b].owner = MW'($urandom_range(NM - 1));
        for (int k = 0; k < NM; k++) begin
          bank_rd[k][b] = msg_t'($urandom);
          bn_wr[k][b]   = msg_t'($urandom);
        end
      end
      #1;
      for (int b = 0; b < NB; b++) begin
        msg_t er, ew;
        er = bus_cfg[b].en ? bank_rd[bus_cfg[b].src][b] : '0;
        ew = bus_cfg[b].en ? bn_wr[bus_cfg[b].owner][b] : '0;
        checks++;
        if (bus_rd[b] != er || bus_wr[b] != ew) begin
          failures++;
          $display("bus %0d: rd %0d/%0d wr %0d/%0d", b, bus_rd[b], er, bus_wr[b], ew);
        end
        for (int k = 0; k < NM; k++) begin
          checks++;
          if (own_mask[k][b] != (bus_cfg[b].en && bus_cfg[b].owner == MW'(k))) failures++;
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
