// Composition FSMD: composes one screen row of graphics over one row of video
// inside the data buffer, pixel by pixel, and writes the results back into
// the buffer.
//
// Buffer layout (word addresses, two pixels per word, pixel 0 in the upper
// half): graphics from GFX_BASE, video from VID_BASE, results from RES_BASE.
// With the defaults 0, 512 and 1024 this is the split of the design
// description: the first 512 words graphics, the next 512 video, the rest
// results, enough for a 640-pixel row of each.
//
// States follow the description's state diagram:
//   IDLE     waits for go (a one-cycle pulse from the start register). On go:
//            busy=1, done=0, the pixel counter is loaded with width.
//   GET_DATA two cycles. In the first the graphics word address goes to
//            port A and the video word address to port B, both read at once
//            thanks to the dual-port RAM; in the second the two words arrive
//            and are registered.
//   COM      one cycle: alpha_blend3 composes the pixel and the result is
//            written through port B with the byte enables of its half word.
//            Then the next pixel, or IDLE with busy=0, done=1.
// A row of W pixels therefore takes 3*W cycles from the go pulse to the
// cycle done rises (width 0 finishes one cycle after go). The exact cycle
// split between GET_DATA and COM is this design's reading of the
// description ("in the next two cycles we get ... the data"); go pulses
// that arrive while busy are ignored (the start register holds them).
module compose_core
  import mhp_pkg::*;
#(
  parameter int unsigned GFX_BASE = 0,
  parameter int unsigned VID_BASE = 512,
  parameter int unsigned RES_BASE = 1024
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      go,
  input  logic [9:0] width,
  output logic      busy,
  output logic      done,
  // buffer port A: graphics reads
  output logic      a_en,
  output buf_be_t   a_we,
  output buf_addr_t a_addr,
  output buf_word_t a_din,
  input  buf_word_t a_dout,
  // buffer port B: video reads, result writes
  output logic      b_en,
  output buf_be_t   b_we,
  output buf_addr_t b_addr,
  output buf_word_t b_din,
  input  buf_word_t b_dout
);

  typedef enum logic [1:0] {S_IDLE, S_GET_ADDR, S_GET_WAIT, S_COM} state_t;

  state_t     state;
  logic [9:0] com_count;   // pixels still to compose
  logic [9:0] pix;         // index of the current pixel
  argb_t      gfx_q, vid_q, res;

  alpha_blend3 u_blend (.gfx(gfx_q), .vid(vid_q), .res(res));

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      busy      <= 1'b0;
      done      <= 1'b0;
      com_count <= '0;
      pix       <= '0;
      gfx_q     <= '0;
      vid_q     <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (go) begin
          done      <= 1'b0;
          com_count <= width;
          pix       <= '0;
          if (width == '0) begin
            done <= 1'b1;
          end else begin
            busy  <= 1'b1;
            state <= S_GET_ADDR;
          end
        end
        S_GET_ADDR: state <= S_GET_WAIT;
        S_GET_WAIT: begin
          gfx_q <= pixel_of(a_dout, pix[0]);
          vid_q <= pixel_of(b_dout, pix[0]);
          state <= S_COM;
        end
        S_COM: begin
          com_count <= com_count - 10'd1;
          pix       <= pix + 10'd1;
          if (com_count == 10'd1) begin
            busy  <= 1'b0;
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            state <= S_GET_ADDR;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Buffer port drive.
  always_comb begin
    a_en   = 1'b0;
    a_we   = '0;
    a_addr = buf_addr_t'(GFX_BASE + 32'(pix[9:1]));
    a_din  = '0;
    b_en   = 1'b0;
    b_we   = '0;
    b_addr = buf_addr_t'(VID_BASE + 32'(pix[9:1]));
    b_din  = {res, res};
    unique case (state)
      S_GET_ADDR: begin
        a_en = 1'b1;
        b_en = 1'b1;
      end
      S_COM: begin
        b_en   = 1'b1;
        b_we   = pixel_be(pix[0]);
        b_addr = buf_addr_t'(RES_BASE + 32'(pix[9:1]));
      end
      default: ;
    endcase
  end

endmodule
