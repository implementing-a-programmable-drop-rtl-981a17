// fpvlsi_pkg: types, encodings and helper functions shared by the
// field-programmable array of bit-serial, LEDR-coded, power-gated cells.
//
// LEDR (level-encoded 2-phase dual-rail) puts one bit on two wires, V and R.
// V carries the data value; R is chosen so that the phase V^R flips with
// every new token:
//     phase 0: data 0 -> (V,R)=(0,0), data 1 -> (1,1)
//     phase 1: data 0 -> (0,1),       data 1 -> (1,0)
// A receiver sees a new token when the phase differs from the phase it last
// consumed, so no spacer is needed between tokens.  This table follows the
// document; the configuration word layout below is this design's own.
package fpvlsi_pkg;

  // Forward wires of one cell-to-cell link: the LEDR pair plus the
  // early wake-up wire of the power-gating scheme.  The fourth wire of the
  // link, the acknowledge, travels the other way and is kept separate.
  typedef struct packed {
    logic v;     // value rail
    logic r;     // redundant (phase) rail
    logic wake;  // wake-up request towards the receiving cell
  } link_fwd_t;

  // Neighbour directions of the mesh.
  typedef enum logic [1:0] {
    DIR_N = 2'd0,
    DIR_E = 2'd1,
    DIR_S = 2'd2,
    DIR_W = 2'd3
  } dir_e;

  localparam int unsigned NDIR = 4;

  // Function of the logic block.
  typedef enum logic [1:0] {
    MODE_LOGIC = 2'd0,  // arbitrary 2-input function from the LUT
    MODE_ARITH = 2'd1,  // bit-serial add: LUT gives a^b, carry kept in the block
    MODE_STORE = 2'd2,  // 1-bit storage: emits the stored bit, stores the input
    MODE_OFF   = 2'd3   // unused cell, held powered off
  } mode_e;

  // Configuration word of one cell (shifted in through the config chain).
  typedef struct packed {
    logic [3:0] lut;     // memory bits M11,M10,M01,M00 (index = {a,b})
    mode_e      mode;
    dir_e       sel_a;   // neighbour that feeds input A
    dir_e       sel_b;   // neighbour that feeds input B
    logic       use_b;   // input B takes part in the handshake
    logic [3:0] out_en;  // neighbours the output is sent to (bit = dir_e)
    logic       init;    // initial content of the 1-bit storage
  } cell_cfg_t;

  localparam int unsigned CFG_BITS = $bits(cell_cfg_t);

  function automatic logic ledr_phase(input logic v, input logic r);
    return v ^ r;
  endfunction

  // (V,R) pair for data value d sent in phase p.
  function automatic logic [1:0] ledr_encode(input logic d, input logic p);
    return {d, d ^ p};
  endfunction

endpackage
