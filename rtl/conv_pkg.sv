// conv_pkg -- constants shared by the stereo-navigation convolution core.
//
// The core accelerates the three convolution kernels of a Harris corner
// detector that works on 96x96-pixel image tiles. Every matrix is kept
// row-major in a 16K-word DPRAM (element (column i, row j) at word j*96+i),
// so one 14-bit word address covers a matrix. The bus sees the twelve RAMs
// of the core as a single 17-bit word address space: bits 16..14 pick one
// of the six large RAMs, and seven bits 16..10 pick one of the six small
// control RAMs that are overlaid on RAM2. All of these numbers, the H offset
// 11100000000000b and the register numbering come from the original design;
// only the enum names are this implementation's own.
package conv_pkg;

  localparam int unsigned TILE_N    = 96;              // tile is TILE_N x TILE_N
  localparam int unsigned RAM_AW    = 14;              // 16384-word large DPRAMs
  localparam int unsigned DATA_W    = 32;
  localparam int unsigned BUS_AW    = 17;              // word address seen by the bus
  localparam int unsigned NUM_BIG   = 6;               // RAM1..RAM6
  localparam int unsigned NUM_SMALL = 6;               // bS control RAMs
  localparam int unsigned NUM_ENG   = 3;               // ConvConst, ConvRepl1, ConvRepl2

  // H vectors live at this offset inside the Y/H RAM of each engine.
  localparam logic [RAM_AW-1:0] H_BASE = 14'b11100000000000;   // 14336

  // Address bits 16..14 of each large RAM (RAM1 = 000 ... RAM6 = 101).
  typedef enum logic [2:0] {
    SEL_CONST_U = 3'b000,   // RAM1: U of ConvConst
    SEL_CONST_Y = 3'b001,   // RAM2: Y and H of ConvConst
    SEL_REPL1_U = 3'b010,   // RAM3: U of ConvRepl1
    SEL_REPL1_Y = 3'b011,   // RAM4: Y and H of ConvRepl1
    SEL_REPL2_U = 3'b100,   // RAM5: U of ConvRepl2
    SEL_REPL2_Y = 3'b101    // RAM6: Y and H of ConvRepl2
  } big_sel_e;

  // Address bits 16..10 of each small control RAM (all inside RAM2's range).
  localparam logic [6:0] SMALL_SEL [NUM_SMALL] = '{
    7'b0011001,   // bSStart        (word 25600)
    7'b0011010,   // bSEnd          (word 26624)
    7'b0011011,   // bSPreEdges     (word 27648)
    7'b0011100,   // bSPostEdges    (word 28672)
    7'b0011101,   // bSNumPreEdges  (word 29696)
    7'b0011111    // bSNumPostEdges (word 31744)
  };
  // Words in each small RAM: 16 for the first four, 8 for the last two.
  localparam int unsigned SMALL_AW [NUM_SMALL] = '{4, 4, 4, 4, 3, 3};

endpackage
