// Shared types and constants of the MHP composition and scaling accelerators.
//
// Both accelerators are PLB peripherals whose user logic sits behind an
// IPIF slave. They share one register layout for the first control word
// (start byte, busy and done flags, a 10-bit width field), one pixel format
// (32-bit A,R,G,B, alpha in the most significant byte, two pixels per 64-bit
// buffer word, the first pixel in the upper half as on the big-endian
// PowerPC) and one data-buffer geometry (2048 words of 64 bits).
//
// The start code 0x0A, the flag positions, the 10-bit width, the 8-bit x 2k
// lanes and the buffer split of the composer (512 words graphics, 512 words
// video, the rest results) follow the design description. The byte/bit
// placement of the second and later scaler registers, the scaler's buffer
// split and the 8-bit fraction of the ratios' fixed point are this design's
// choices unless noted otherwise in the modules that use them.
package mhp_pkg;

  // Buffer geometry: eight 8-bit lanes side by side, 2k deep.
  localparam int unsigned BUF_LANES  = 8;
  localparam int unsigned BUF_DEPTH  = 2048;
  localparam int unsigned BUF_AW     = $clog2(BUF_DEPTH);
  localparam int unsigned BUS_DW     = 64;

  // Writing this value into the start byte launches one row operation.
  localparam logic [7:0] START_CODE  = 8'h0A;

  // Fixed-point fraction of the scaling ratios (ratio * 2^8).
  localparam int unsigned RATIO_FRAC = 8;

  // Output behaviour of a block RAM port during a write.
  typedef enum logic [1:0] {
    WRITE_FIRST,   // output shows the data being written (the default)
    READ_FIRST,    // output shows the data previously stored there
    NO_CHANGE      // output keeps its value
  } bram_mode_e;

  typedef logic [BUF_AW-1:0]   buf_addr_t;
  typedef logic [BUS_DW-1:0]   buf_word_t;
  typedef logic [BUF_LANES-1:0] buf_be_t;

  // One pixel, alpha first.
  typedef struct packed {
    logic [7:0] a;
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } argb_t;

  // Control word 0, written MSB first as in the PowerPC bit numbering:
  // bits 0..7 start, bit 8 busy, bit 9 done, bits 10..21 reserved,
  // bits 22..31 width.
  typedef struct packed {
    logic [7:0]  start;
    logic        busy;
    logic        done;
    logic [11:0] rsvd;
    logic [9:0]  width;
  } ctrl_reg_t;

  // Byte enables selecting one pixel of a 64-bit word: pixel 0 is the
  // upper half.
  function automatic buf_be_t pixel_be(input logic odd);
    return odd ? 8'h0F : 8'hF0;
  endfunction

  function automatic argb_t pixel_of(input buf_word_t w, input logic odd);
    return odd ? argb_t'(w[31:0]) : argb_t'(w[63:32]);
  endfunction

endpackage
