// ldpc_interconnect: the bus structure joining the processing modules.
//
// Bus i reaches bank i of every module, as in the document: in a bit-node pass it carries the
// word read from bank i of module src(i) to the bit node unit of module owner(i), and carries
// that unit's updated message back to the same bank. Each bus is therefore a read
// multiplexer over the modules' bank outputs and a write multiplexer over the modules' bit
// node unit outputs; the bank write enables stay with the modules' own configuration. The
// routing comes from the configuration memory and changes only between passes. Purely
// combinational. Unused buses carry zero and have a clear mask bit.
module ldpc_interconnect
  import ldpc_pkg::*;
(
  input  bus_cfg_t  bus_cfg   [NB],
  input  msg_t      bank_rd   [NM][NB],   // bank i read data of module k
  input  msg_t      bn_wr     [NM][NB],   // bit node unit lane i output of module k
  output msg_t      bus_rd    [NB],       // read lane of bus i
  output msg_t      bus_wr    [NB],       // write lane of bus i
  output logic [NB-1:0] own_mask [NM]     // buses consumed by module k's bit node unit
);
  always_comb begin
    for (int b = 0; b < NB; b++) begin
      bus_rd[b] = '0;
      bus_wr[b] = '0;
      for (int k = 0; k < NM; k++) begin
        if (bus_cfg[b].en && int'(bus_cfg[b].src) == k)   bus_rd[b] = bank_rd[k][b];
        if (bus_cfg[b].en && int'(bus_cfg[b].owner) == k) bus_wr[b] = bn_wr[k][b];
      end
    end
    for (int k = 0; k < NM; k++)
      for (int b = 0; b < NB; b++)
        own_mask[k][b] = bus_cfg[b].en && int'(bus_cfg[b].owner) == k;
  end
endmodule
