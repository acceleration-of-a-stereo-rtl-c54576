// user_logic -- stereo-navigation convolution core (top level).
//
// Three convolution engines take over the hot loops of a Harris corner
// detector running on an embedded processor: ConvConst (3x3 integer
// gradient mask on a 96x96 tile of 8-bit pixels), ConvRepl1 (11-tap
// single-precision filter along rows) and ConvRepl2 (the same along
// columns). Each engine owns two 16K x 32-bit dual-port RAMs: port 1 of
// every RAM hangs on the processor bus, port 2 on its engine. The first RAM
// holds U; the second holds Y at words 0..9215 and the H vector at word
// 14336, its port shared between H reads and Y writes by hy_port_mux. Six
// small RAMs (16 or 8 words) hold the ConvConst control arrays; they overlay
// RAM2 in the bus address space.
//
// Bus map (17-bit word address; see plb_slave_if):
//   0      RAM1 U of ConvConst     16384  RAM2 Y / H(+14336) of ConvConst
//   32768  RAM3 U of ConvRepl1     49152  RAM4 Y / H(+14336) of ConvRepl1
//   65536  RAM5 U of ConvRepl2     81920  RAM6 Y / H(+14336) of ConvRepl2
//   25600 bSStart, 26624 bSEnd, 27648 bSPreEdges, 28672 bSPostEdges,
//   29696 bSNumPreEdges, 31744 bSNumPostEdges
//   registers 0/1/2: start of ConvConst/ConvRepl1/ConvRepl2 (LSB)
//   registers 4/5/6: done of the same engines (LSB)
// Software loads U and H, sets start, waits for done to fall, clears start,
// waits for done to rise and reads Y. The engines are independent and may
// run at the same time. The architecture, memory map and register map follow
// the original core; the engines' inner schedule is this design's own.
//
// The engine-side ports of the six control RAMs are brought out (bs_*):
// the original ConvConst reads them to treat the tile margins, but how it
// uses them is not known, so this ConvConst clamps at the borders instead and
// the arrays are left readable for such logic. Everything runs on Bus2IP_Clk
// and is reset synchronously by Bus2IP_Reset (RAM contents are not reset).
module user_logic
  import conv_pkg::*;
(
  input  logic               Bus2IP_Clk,
  input  logic               Bus2IP_Reset,
  input  logic [0:31]        Bus2IP_Addr,
  input  logic [0:3]         Bus2IP_BE,
  input  logic [0:0]         Bus2IP_CS,
  input  logic [0:31]        Bus2IP_Data,
  input  logic [0:7]         Bus2IP_RdCE,
  input  logic [0:7]         Bus2IP_WrCE,
  input  logic               Bus2IP_RNW,
  output logic [0:31]        IP2Bus_Data,
  output logic               IP2Bus_Error,
  output logic               IP2Bus_RdAck,
  output logic               IP2Bus_WrAck,

  // engine-side read port of the six ConvConst control RAMs
  input  logic               bs_re,
  input  logic [3:0]         bs_addr,
  output logic [31:0]        bs_dout [NUM_SMALL]
);

  logic [NUM_ENG-1:0]   start, done;
  logic [RAM_AW-1:0]    bus_addr;
  logic [31:0]          bus_din;
  logic                 bus_wr;
  logic [NUM_BIG-1:0]   big_en;
  logic [NUM_SMALL-1:0] small_en;
  logic [31:0]          big_dout   [NUM_BIG];
  logic [31:0]          small_dout [NUM_SMALL];

  plb_slave_if u_bus (
    .Bus2IP_Clk, .Bus2IP_Reset, .Bus2IP_Addr, .Bus2IP_BE, .Bus2IP_CS,
    .Bus2IP_Data, .Bus2IP_RdCE, .Bus2IP_WrCE, .Bus2IP_RNW,
    .IP2Bus_Data, .IP2Bus_Error, .IP2Bus_RdAck, .IP2Bus_WrAck,
    .start, .done,
    .ram_addr(bus_addr), .ram_din(bus_din), .ram_wr(bus_wr),
    .big_en, .small_en, .big_dout, .small_dout
  );

  // ---- engine-side signals, one set per engine ------------------------
  logic [31:0]        h_dout [NUM_ENG], u_dout [NUM_ENG];
  logic [3:0]         h_addr [NUM_ENG];
  logic [RAM_AW-1:0]  u_addr [NUM_ENG], y_addr [NUM_ENG];
  logic [31:0]        y_din  [NUM_ENG];
  logic               h_re [NUM_ENG], u_re [NUM_ENG], y_we [NUM_ENG];
  logic               yh_en [NUM_ENG], yh_wr [NUM_ENG];
  logic [RAM_AW-1:0]  yh_addr [NUM_ENG];
  logic [31:0]        yh_din [NUM_ENG], yh_dout [NUM_ENG];
  // engine ports the original leaves unconnected
  logic [31:0]        nc_h_din [NUM_ENG], nc_u_din [NUM_ENG];
  logic               nc_h_we [NUM_ENG], nc_u_we [NUM_ENG], nc_y_re [NUM_ENG];

  conv_const u_conv_const (
    .clk(Bus2IP_Clk), .rst(Bus2IP_Reset), .start(start[0]), .done(done[0]),
    .h_rsc_singleport_data_out(h_dout[0]), .h_rsc_singleport_addr(h_addr[0]),
    .h_rsc_singleport_data_in(nc_h_din[0]), .h_rsc_singleport_re(h_re[0]),
    .h_rsc_singleport_we(nc_h_we[0]),
    .u_rsc_singleport_data_out(u_dout[0]), .u_rsc_singleport_addr(u_addr[0]),
    .u_rsc_singleport_data_in(nc_u_din[0]), .u_rsc_singleport_re(u_re[0]),
    .u_rsc_singleport_we(nc_u_we[0]),
    .y_rsc_singleport_data_out(32'd0), .y_rsc_singleport_addr(y_addr[0]),
    .y_rsc_singleport_data_in(y_din[0]), .y_rsc_singleport_re(nc_y_re[0]),
    .y_rsc_singleport_we(y_we[0])
  );

  for (genvar e = 1; e < NUM_ENG; e++) begin : g_repl
    conv_repl #(.VERTICAL(e == 2)) u_conv_repl (
      .clk(Bus2IP_Clk), .rst(Bus2IP_Reset), .start(start[e]), .done(done[e]),
      .h_rsc_singleport_data_out(h_dout[e]), .h_rsc_singleport_addr(h_addr[e]),
      .h_rsc_singleport_data_in(nc_h_din[e]), .h_rsc_singleport_re(h_re[e]),
      .h_rsc_singleport_we(nc_h_we[e]),
      .u_rsc_singleport_data_out(u_dout[e]), .u_rsc_singleport_addr(u_addr[e]),
      .u_rsc_singleport_data_in(nc_u_din[e]), .u_rsc_singleport_re(u_re[e]),
      .u_rsc_singleport_we(nc_u_we[e]),
      .y_rsc_singleport_data_out(32'd0), .y_rsc_singleport_addr(y_addr[e]),
      .y_rsc_singleport_data_in(y_din[e]), .y_rsc_singleport_re(nc_y_re[e]),
      .y_rsc_singleport_we(y_we[e])
    );
  end

  // ---- per engine: U RAM and shared Y/H RAM ----------------------------
  for (genvar e = 0; e < NUM_ENG; e++) begin : g_mem
    dpram #(.AW(RAM_AW)) u_ram_u (
      .clk(Bus2IP_Clk),
      .en1(big_en[2*e]), .wr1(bus_wr), .addr1(bus_addr), .din1(bus_din),
      .dout1(big_dout[2*e]),
      .en2(u_re[e]), .wr2(1'b0), .addr2(u_addr[e]), .din2(32'd0),
      .dout2(u_dout[e])
    );

    hy_port_mux u_hy_mux (
      .clk(Bus2IP_Clk),
      .h_addr(h_addr[e]), .h_re(h_re[e]), .y_addr(y_addr[e]),
      .y_data_in(y_din[e]), .y_we(y_we[e]), .h_data_out(h_dout[e]),
      .ram_en(yh_en[e]), .ram_wr(yh_wr[e]), .ram_addr(yh_addr[e]),
      .ram_din(yh_din[e]), .ram_dout(yh_dout[e])
    );

    dpram #(.AW(RAM_AW)) u_ram_yh (
      .clk(Bus2IP_Clk),
      .en1(big_en[2*e+1]), .wr1(bus_wr), .addr1(bus_addr), .din1(bus_din),
      .dout1(big_dout[2*e+1]),
      .en2(yh_en[e]), .wr2(yh_wr[e]), .addr2(yh_addr[e]), .din2(yh_din[e]),
      .dout2(yh_dout[e])
    );
  end

  // ---- ConvConst control RAMs -----------------------------------------
  for (genvar s = 0; s < NUM_SMALL; s++) begin : g_bs
    localparam int unsigned AW = SMALL_AW[s];
    dpram #(.AW(AW)) u_ram_bs (
      .clk(Bus2IP_Clk),
      .en1(small_en[s]), .wr1(bus_wr), .addr1(bus_addr[AW-1:0]), .din1(bus_din),
      .dout1(small_dout[s]),
      .en2(bs_re), .wr2(1'b0), .addr2(bs_addr[AW-1:0]), .din2(32'd0),
      .dout2(bs_dout[s])
    );
  end

endmodule
