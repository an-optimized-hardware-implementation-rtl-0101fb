// grain_pkg: constants and types shared by the Grain-128AEAD modules.
//
// The cipher has a 128-bit key, a 96-bit IV, two 128-bit feedback shift
// registers (NFSR b and LFSR s), 256 initialisation clocks with the
// pre-output y fed back, 128 clocks that fill the authentication registers
// while the key is added a second time into the LFSR feedback, and then the
// normal phase in which even y bits are keystream and odd y bits feed the
// 64-bit MAC.  The controller state names follow the five states
// reset/loading/initialization/accumloading/normal of the architecture.
// The ctrl_t struct is this design's own bundling of the mux controls.
package grain_pkg;

  localparam int unsigned KEY_BITS   = 128;
  localparam int unsigned IV_BITS    = 96;
  localparam int unsigned REG_BITS   = 128;  // LFSR and NFSR length
  localparam int unsigned INIT_CLKS  = 256;  // y fed back for 256 clocks
  localparam int unsigned ACC_CLKS   = 128;  // accumulator + register loading
  localparam int unsigned AUTH_BITS  = 64;   // accumulator / shift register
  localparam int unsigned WIN        = 97;   // highest tap is index 96
  // Clocks (at one bit per clock) from the start of loading to normal state
  localparam int unsigned TOTAL_CLKS = KEY_BITS + INIT_CLKS + ACC_CLKS;  // 512

  typedef enum logic [2:0] {
    ST_RESET   = 3'd0,
    ST_LOAD    = 3'd1,
    ST_INIT    = 3'd2,
    ST_ACCLOAD = 3'd3,
    ST_NORMAL  = 3'd4
  } state_e;

  // Decoded controls driven by either controller.
  typedef struct packed {
    logic load;      // key -> NFSR, padded IV -> LFSR
    logic init;      // y fed back into f and g
    logic accload;   // y -> auth shift register, key re-added to LFSR
    logic normal;    // keystream / MAC generation
    logic acc_copy;  // message bit forced to 1: shift register -> accumulator
  } ctrl_t;

endpackage
