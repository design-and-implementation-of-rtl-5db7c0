// Data buffer of the composition and scaling accelerators: LANES block RAM
// lanes of 8 bits x DEPTH words set side by side, so that one buffer word is as
// wide as the 64-bit PLB data bus and bus byte lane k maps to RAM lane k.
//
// Each of the two ports takes a word address, an enable and one write-enable
// bit per byte lane; a write stores only the enabled bytes. Reads return the
// whole word one clock after the address (see bram_lane; WRITE_MODE sets
// what a written port's output shows, WRITE_FIRST by default). Byte lane 7, bits
// 63:56, is the byte at the lowest address of a word (big-endian, as the
// PowerPC and PLB number them).
//
// The eight 8-bit x 2k lanes follow the design description; port roles are
// decided by the modules using the buffer.
module data_buffer
  import mhp_pkg::*;
#(
  parameter bram_mode_e  WRITE_MODE = WRITE_FIRST,
  parameter int unsigned LANES = 8,
  parameter int unsigned DEPTH = 2048,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned DW   = 8 * LANES
) (
  input  logic             clk,
  input  logic             en_a,
  input  logic [LANES-1:0] we_a,
  input  logic [AW-1:0]    addr_a,
  input  logic [DW-1:0]    din_a,
  output logic [DW-1:0]    dout_a,
  input  logic             en_b,
  input  logic [LANES-1:0] we_b,
  input  logic [AW-1:0]    addr_b,
  input  logic [DW-1:0]    din_b,
  output logic [DW-1:0]    dout_b
);

  for (genvar k = 0; k < LANES; k++) begin : g_lane
    bram_lane #(.WRITE_MODE(WRITE_MODE), .DATA_W(8), .DEPTH(DEPTH)) u_lane (
      .clk    (clk),
      .en_a   (en_a),
      .we_a   (we_a[k]),
      .addr_a (addr_a),
      .din_a  (din_a[8*k +: 8]),
      .dout_a (dout_a[8*k +: 8]),
      .en_b   (en_b),
      .we_b   (we_b[k]),
      .addr_b (addr_b),
      .din_b  (din_b[8*k +: 8]),
      .dout_b (dout_b[8*k +: 8])
    );
  end

endmodule
