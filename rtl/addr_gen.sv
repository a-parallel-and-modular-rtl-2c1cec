// addr_gen: address generator of one memory port.
//
// A message block of the parity-check matrix is a z x z circulant; storing its messages in
// check-node order makes the check-node pass read addresses base, base+1, ... and the
// bit-node pass read the same block rotated by the block's shift. This generator produces
// base + ((start + j) mod z) for j = 0 .. z-1, one address per cycle, after a start pulse.
// The document gives each dual-port memory two separate address generators; the circular
// counter is this design's choice of how one works.
// Timing: start sampled at edge t; addr/active valid for the z cycles after edge t. offset
// is the count j (0 .. z-1) of the address being output.
module addr_gen #(
  parameter int unsigned AW = 9,
  parameter int unsigned ZW = 7
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW-1:0] base,
  input  logic [ZW-1:0] init,
  input  logic [ZW-1:0] z,
  output logic [AW-1:0] addr,
  output logic [ZW-1:0] offset,
  output logic          active
);
  logic [ZW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      offset <= '0;
      active <= 1'b0;
    end else if (start) begin
      cnt    <= init;
      offset <= '0;
      active <= 1'b1;
    end else if (active) begin
      cnt    <= (cnt == z - ZW'(1)) ? '0 : cnt + ZW'(1);
      offset <= offset + ZW'(1);
      if (offset == z - ZW'(1)) active <= 1'b0;
    end
  end

  assign addr = base + AW'(cnt);
endmodule
