// testchip_pkg: types and constants shared by the ring-oscillator main cores,
// the digital core and the litho monitor block.
//
// Main core: the 15-bit configuration word held by each core's scan chain,
// the layout of the 16 hierarchically decoded address lines (4 x 4 x 8) and
// the kinds of first gate a ring oscillator can have.
// Digital core: the end-to-end function of each of the 16 paths, written as
// 16-entry truth tables. Entry index of path k (0-based) is
// {in[4g+3], in[4g+2], in[4g+1], in[4g]} with g = k/4, i.e. bit 0 of the index
// is the lowest-numbered input of the path's group of four.
package testchip_pkg;
  timeunit 1ps; timeprecision 1fs;

  // ---------------- ring-oscillator main core ----------------
  localparam int unsigned N_RINGO     = 128;  // RingOs per array
  localparam int unsigned ADD_W       = 7;    // address bits per array
  localparam int unsigned N_SEL       = 256;  // selector lines per C-block
  localparam int unsigned N_HIER      = 16;   // 4 LSG + 4 MDG + 8 MSG lines
  localparam int unsigned DEPTH_SHORT = 7;    // logic depth of the fast array
  localparam int unsigned DEPTH_LONG  = 11;   // logic depth of the slow array
  localparam int unsigned N_CBLOCK    = 4;    // C-blocks per C2-block

  // Position of each group inside the 16 hierarchical lines.
  localparam int unsigned MSG_LO = 0;   // ADD<6:4>, 8 lines
  localparam int unsigned MDG_LO = 8;   // ADD<3:2>, 4 lines
  localparam int unsigned LSG_LO = 12;  // ADD<1:0>, 4 lines

  // First gate of a ring oscillator: a NAND starts it with a high select,
  // a NOR with a low one.
  typedef enum logic {FIRST_NAND = 1'b0, FIRST_NOR = 1'b1} first_gate_e;

  // Block-select code (active low, thermometer): normal mode is all ones.
  localparam logic [3:0] BSB_NORMAL = 4'b1111;
  localparam logic [3:0] BSB_25     = 4'b1110;
  localparam logic [3:0] BSB_50     = 4'b1100;
  localparam logic [3:0] BSB_75     = 4'b1000;
  localparam logic [3:0] BSB_100    = 4'b0000;

  // Configuration word of one main core, as held by its scan chain.
  // add[6:0] addresses a RingO, add[9:7] codes which C-block is enabled
  // (0..3 enables that block, 4..7 disables all four).
  typedef struct packed {
    logic       en11;  // 1: 11-deep array, 0: 7-deep array
    logic [3:0] bsb;   // block-select (special modes), active low
    logic [9:0] add;   // 7 address bits + 3 coded disable bits
  } core_cfg_t;
  localparam int unsigned CFG_W = $bits(core_cfg_t);  // 15

  // ---------------- digital core ----------------
  localparam int unsigned DC_PATHS  = 16;
  localparam int unsigned DC_CHAINS = 4;
  localparam int unsigned DC_BLOCKS = 20;  // FF-Comb blocks per chain

  typedef logic [15:0] lut4_t;            // truth table of a 4-input function
  typedef lut4_t [3:0] lut4x4_t;          // one table per output of a block

  // End-to-end functions of paths OUT<1>..OUT<16>, index 0..15.
  localparam lut4_t PATH_LUT [DC_PATHS] = '{
    16'h1944, 16'h4904, 16'h0409, 16'h4804,
    16'h0e4b, 16'h4924, 16'h0429, 16'h4824,
    16'h066b, 16'h5d04, 16'h1409, 16'h5824,
    16'h4f66, 16'h1742, 16'h1744, 16'h1022
  };

  // Identity tables: output j of a block repeats input j.
  localparam lut4x4_t LUT_IDENTITY = '{16'hff00, 16'hf0f0, 16'hcccc, 16'haaaa};

  function automatic lut4x4_t chain_luts(input int unsigned chain);
    lut4x4_t l;
    for (int j = 0; j < 4; j++) l[j] = PATH_LUT[4*chain + j];
    return l;
  endfunction

  // ---------------- litho monitor ----------------
  localparam int unsigned MON_ELEMS = 400;  // basic elements, 2 monitors each
endpackage
