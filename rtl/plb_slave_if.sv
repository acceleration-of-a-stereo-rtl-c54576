// plb_slave_if -- bus side of the core: RAM decoding, start/done registers.
//
// The processor reaches the core through the IPIF signals of its local bus
// (Bus2IP_* in, IP2Bus_* out, bit 0 = MSB as on that bus). Two kinds of
// access are served:
//  * Memory, qualified by Bus2IP_CS. The low 17 bits of Bus2IP_Addr are a
//    word address. Bits 16..14 pick one of the six 16K-word RAMs (RAM1 = 000
//    ... RAM6 = 101); each enable is the AND of Bus2IP_CS with a match of
//    those bits. Bits 16..10 additionally pick one of the six small ConvConst
//    control RAMs, which overlay RAM2 (0011001 bSStart ... 0011111
//    bSNumPostEdges). Bits 13..0 address the word, Bus2IP_RNW = 0 writes.
//  * Registers, selected one-hot by Bus2IP_WrCE / Bus2IP_RdCE. Registers
//    0..2 are write-only; their LSB drives start of ConvConst, ConvRepl1 and
//    ConvRepl2 (register 3 unused). Registers 4..6 are read-only and return
//    done of the same engines in the LSB (register 7 reads 0).
// This map is the original one. This design's own choices: write-only
// registers read back 0; a register read returns its value in the same cycle
// with IP2Bus_RdAck; a memory read is acknowledged one cycle after
// Bus2IP_CS rises, when the RAM output is valid, and returns the small RAM
// when the address hits one, else the large RAM; writes are acknowledged in
// the cycle they are presented. Bus2IP_BE is ignored (whole words only) and
// IP2Bus_Error is always 0, as in the original.
module plb_slave_if
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

  // engine handshakes
  output logic [NUM_ENG-1:0] start,
  input  logic [NUM_ENG-1:0] done,

  // bus-side (port 1) signals shared by all RAMs
  output logic [RAM_AW-1:0]  ram_addr,
  output logic [31:0]        ram_din,
  output logic               ram_wr,
  output logic [NUM_BIG-1:0]   big_en,
  output logic [NUM_SMALL-1:0] small_en,
  input  logic [31:0]        big_dout   [NUM_BIG],
  input  logic [31:0]        small_dout [NUM_SMALL]
);

  logic [BUS_AW-1:0]     waddr;
  logic [31:0]           wdata;
  logic [31:0]           slv_reg [4];
  logic [2:0]            rd_big_q;      // which RAM the last cycle read
  logic                  rd_small_hit_q;
  logic [2:0]            rd_small_q;
  logic                  mem_rd_ack_q;
  logic [31:0]           reg_rdata, mem_rdata, rdata;
  logic                  mem_cs;

  assign waddr = Bus2IP_Addr[32-BUS_AW:31];
  assign wdata = Bus2IP_Data;                    // bit 31 of the bus = LSB
  assign mem_cs = Bus2IP_CS[0];

  // RAM enables: AND of chip select and address match
  always_comb begin
    for (int r = 0; r < NUM_BIG; r++)
      big_en[r] = mem_cs && (waddr[16:14] == 3'(r));
    for (int s = 0; s < NUM_SMALL; s++)
      small_en[s] = mem_cs && (waddr[16:10] == SMALL_SEL[s]);
    ram_addr = waddr[RAM_AW-1:0];
    ram_din  = wdata;
    ram_wr   = ~Bus2IP_RNW;
  end

  // slave registers 0..3 (written by the bus)
  always_ff @(posedge Bus2IP_Clk) begin
    if (Bus2IP_Reset) begin
      for (int k = 0; k < 4; k++) slv_reg[k] <= '0;
    end else begin
      for (int k = 0; k < 4; k++)
        if (Bus2IP_WrCE[k]) slv_reg[k] <= wdata;
    end
  end

  always_comb
    for (int e = 0; e < NUM_ENG; e++) start[e] = slv_reg[e][0];

  // register read: registers 4..6 return done
  always_comb begin
    reg_rdata = '0;
    for (int e = 0; e < NUM_ENG; e++)
      if (Bus2IP_RdCE[4 + e]) reg_rdata = {31'd0, done[e]};
  end

  // memory read: remember which RAM answers next cycle
  always_ff @(posedge Bus2IP_Clk) begin
    if (Bus2IP_Reset) begin
      rd_big_q       <= '0;
      rd_small_hit_q <= 1'b0;
      rd_small_q     <= '0;
      mem_rd_ack_q   <= 1'b0;
    end else begin
      mem_rd_ack_q <= mem_cs && Bus2IP_RNW && !mem_rd_ack_q;
      if (mem_cs) begin
        rd_big_q       <= waddr[16:14];
        rd_small_hit_q <= |small_en;
        for (int s = 0; s < NUM_SMALL; s++)
          if (small_en[s]) rd_small_q <= 3'(s);
      end
    end
  end

  always_comb begin
    mem_rdata = '0;
    if (rd_small_hit_q) begin
      for (int s = 0; s < NUM_SMALL; s++)
        if (rd_small_q == 3'(s)) mem_rdata = small_dout[s];
    end else begin
      for (int r = 0; r < NUM_BIG; r++)
        if (rd_big_q == 3'(r)) mem_rdata = big_dout[r];
    end
    rdata = (|Bus2IP_RdCE) ? reg_rdata : mem_rdata;
  end

  assign IP2Bus_Data  = rdata;
  assign IP2Bus_RdAck = (|Bus2IP_RdCE) | mem_rd_ack_q;
  assign IP2Bus_WrAck = (|Bus2IP_WrCE) | (mem_cs & ~Bus2IP_RNW);
  assign IP2Bus_Error = 1'b0;

  // register accesses are one-hot
  a_rdce_onehot: assert property (@(posedge Bus2IP_Clk) disable iff (Bus2IP_Reset)
                                  $onehot0(Bus2IP_RdCE));
  a_wrce_onehot: assert property (@(posedge Bus2IP_Clk) disable iff (Bus2IP_Reset)
                                  $onehot0(Bus2IP_WrCE));

endmodule
