// hy_port_mux -- shares one DPRAM port between an engine's H reads and Y writes.
//
// Each engine reads its coefficient vector H and writes its result matrix Y
// in different clock cycles, so both live in the same DPRAM: Y at words
// 0..9215 and H from word 14336 (11100000000000b) up. The engine issues H
// addresses of only four bits starting at 0; this block widens them with
// three fixed ones and seven fixed zeros and selects them onto the RAM
// address while h_re is high, otherwise the Y address passes. That mux and
// its select come from the original design. Also this design's: the RAM
// port is enabled by h_re or y_we and writes when y_we is high.
// Combinational; the engine must never raise h_re and y_we together.
module hy_port_mux
  import conv_pkg::*;
(
  input  logic                clk,        // only for the assertion
  // engine side
  input  logic [3:0]          h_addr,
  input  logic                h_re,
  input  logic [RAM_AW-1:0]   y_addr,
  input  logic [31:0]         y_data_in,
  input  logic                y_we,
  output logic [31:0]         h_data_out,
  // DPRAM port 2
  output logic                ram_en,
  output logic                ram_wr,
  output logic [RAM_AW-1:0]   ram_addr,
  output logic [31:0]         ram_din,
  input  logic [31:0]         ram_dout
);

  always_comb begin
    ram_addr   = h_re ? {H_BASE[RAM_AW-1:4], h_addr} : y_addr;
    ram_en     = h_re | y_we;
    ram_wr     = y_we & ~h_re;
    ram_din    = y_data_in;
    h_data_out = ram_dout;
  end

  // the port can serve only one of the two in a cycle
  a_no_collision: assert property (@(posedge clk) !(h_re && y_we));

endmodule
