// One lane of the accelerators' data buffer: a true dual-port block RAM,
// DATA_W bits by DEPTH words (default 8 x 2048, one Virtex-4 18 Kb block
// configured 8-bit x 2k as in the design description).
//
// Both ports are synchronous and independent and share only the stored data.
// A port with en high registers its address on the rising clock edge; with we
// also high it stores din there. The output register then holds the word at
// that address, one cycle after the address. What the output shows after a
// write is set by WRITE_MODE, the three modes of the Virtex-4 block RAM:
// WRITE_FIRST (the default, as on the device) the data just written,
// READ_FIRST the data previously stored at the address, NO_CHANGE the
// output's previous value. With en low the output keeps its previous value,
// as a block RAM port does.
//
// The buffer runs on the single IPIC clock, so both ports share clk. When both
// ports write the same address in one cycle, port B's data is stored; the users
// of this buffer never do that. Parity bits, set/reset, cascade pins and the
// optional output register of the real primitive are not modelled.
module bram_lane
  import mhp_pkg::*;
#(
  parameter bram_mode_e  WRITE_MODE = WRITE_FIRST,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned DEPTH  = 2048,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  // port A
  input  logic              en_a,
  input  logic              we_a,
  input  logic [AW-1:0]     addr_a,
  input  logic [DATA_W-1:0] din_a,
  output logic [DATA_W-1:0] dout_a,
  // port B
  input  logic              en_b,
  input  logic              we_b,
  input  logic [AW-1:0]     addr_b,
  input  logic [DATA_W-1:0] din_b,
  output logic [DATA_W-1:0] dout_b
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en_a) begin
      if (we_a) begin
        mem[addr_a] <= din_a;
        unique case (WRITE_MODE)
          WRITE_FIRST: dout_a <= din_a;
          READ_FIRST:  dout_a <= mem[addr_a];
          default:     ;
        endcase
      end else begin
        dout_a      <= mem[addr_a];
      end
    end
    if (en_b) begin
      if (we_b) begin
        mem[addr_b] <= din_b;
        unique case (WRITE_MODE)
          WRITE_FIRST: dout_b <= din_b;
          READ_FIRST:  dout_b <= mem[addr_b];
          default:     ;
        endcase
      end else begin
        dout_b      <= mem[addr_b];
      end
    end
  end

endmodule
