// msg_bank: dual-port memory bank holding edge messages of one processing module.
//
// One read port and one write port, each driven by its own address generator, so a
// check-node or bit-node pass can read one word and write back another in the same cycle.
// Reads have a two-cycle latency (the array output and a second output register), which
// follows the document's choice of two-cycle memories to raise the clock rate. Default size
// 3 x 96 six-bit words, the per-bank size the document gives for the four-module decoder.
// The same module, deeper, stores the channel LLRs of a module. A read of the address being
// written in the same cycle returns the old word (this design never does it).
// Timing: rd_en/rd_addr sampled at edge t, rd_data valid after edge t+1.
module msg_bank #(
  parameter int unsigned W     = 6,
  parameter int unsigned DEPTH = 288,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [W-1:0]  rd_data,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [W-1:0]  wr_data
);
  logic [W-1:0] mem [DEPTH];
  logic [W-1:0] rd_q;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_q <= mem[rd_addr];
    rd_data <= rd_q;
  end
endmodule
