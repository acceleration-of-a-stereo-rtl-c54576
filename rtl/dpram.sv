// dpram -- true dual-port RAM, one port for the bus and one for an engine.
//
// Each engine's matrices sit in memories of this kind: port 1 is wired to
// the processor bus and port 2 to a convolution engine, so each side sees a
// plain single-port RAM and neither has to be multiplexed with the other.
// The original design uses 16384 x 32-bit memories for the U and Y/H data
// and 16- and 8-word memories for the ConvConst control arrays; AW sets the
// depth. Port names follow the original memory (ADDRn, DINn, ENn, WRn, DOUTn).
//
// Timing (this design's choice where the original is silent): both ports
// run on one clock. With EN high, WR high writes DIN at the clock edge and
// WR low reads: DOUT holds the word one cycle after the address, which is
// the one-cycle read latency the engines expect. A write also updates DOUT
// with the old contents (read-first). If both ports write the same word in
// the same cycle, port 2 wins. DOUT keeps its value while EN is low.
module dpram #(
  parameter int unsigned AW = 14,
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  // port 1 (bus side)
  input  logic          en1,
  input  logic          wr1,
  input  logic [AW-1:0] addr1,
  input  logic [DW-1:0] din1,
  output logic [DW-1:0] dout1,
  // port 2 (engine side)
  input  logic          en2,
  input  logic          wr2,
  input  logic [AW-1:0] addr2,
  input  logic [DW-1:0] din2,
  output logic [DW-1:0] dout2
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (en1) begin
      dout1 <= mem[addr1];
      if (wr1) mem[addr1] <= din1;
    end
    if (en2) begin
      dout2 <= mem[addr2];
      if (wr2) mem[addr2] <= din2;
    end
  end

endmodule
