// Scaling FSMD: scales one row of source pixels to the destination width by
// pixel replication (nearest neighbour), inside the data buffer.
//
// The ratio dst_W/src_W is computed by software and written as
// w_ratio = ratio * 2^8. For source pixel src_x the last destination index
// it covers is d_x_max = ((src_x+1) * w_ratio) >> 8; the pixel is copied to
// every destination index from d_x_min (the previous pixel's d_x_max, 0 for
// the first) up to d_x_max-1. Downscaling works too: a source pixel whose
// interval is empty is dropped.
//
// States follow the description's state diagram:
//   IDLE      waits for go; then busy=1, done=0, src_x=0, d_x_min=0.
//   COM_ADDR  one cycle: computes d_x_max and reads the source word (port A).
//   MOVE_DATA one cycle per destination pixel (at least one): writes the
//             source pixel through port B to d_x, d_x+1, ... d_x_max-1 with
//             the byte enables of the destination half word. Then
//             d_x_min <= d_x_max and back to COM_ADDR, or IDLE with done=1
//             after the last source pixel.
// A row takes src_W + sum(max(1, n_i)) cycles, n_i being the copies of
// pixel i; for upscaling that is src_W + dst_W cycles.
//
// The y dimension is "done similarly": at go the core also latches the
// destination row range of source row src_y, [d_y_min, d_y_max) with
// d_y = (src_y * h_ratio) >> 8, for the software to copy the scaled row to.
// The h_ratio/src_y inputs and that read-back are this design's choices;
// the [min, max) interval and clamping destination indices to the
// destination region are as well.
//
// Buffer layout (this design's choice): source row from SRC_BASE, scaled row
// from DST_BASE, two pixels per word, pixel 0 in the upper half.
module scale_core
  import mhp_pkg::*;
#(
  parameter int unsigned SRC_BASE = 0,
  parameter int unsigned DST_BASE = 1024,
  parameter int unsigned DST_PIX  = 2048   // capacity of the destination region
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        go,
  input  logic [9:0]  src_w,
  input  logic [15:0] w_ratio,
  input  logic [15:0] h_ratio,
  input  logic [9:0]  src_y,
  output logic        busy,
  output logic        done,
  output logic [11:0] d_y_min,
  output logic [11:0] d_y_max,
  // buffer port A: source reads
  output logic        a_en,
  output buf_be_t     a_we,
  output buf_addr_t   a_addr,
  output buf_word_t   a_din,
  input  buf_word_t   a_dout,
  // buffer port B: destination writes
  output logic        b_en,
  output buf_be_t     b_we,
  output buf_addr_t   b_addr,
  output buf_word_t   b_din,
  input  buf_word_t   b_dout
);

  typedef enum logic [1:0] {S_IDLE, S_COM_ADDR, S_MOVE_DATA} state_t;

  localparam int unsigned DW = 12;   // destination index/bound width

  state_t      state;
  logic [9:0]  src_x;
  logic [9:0]  src_w_q;
  logic [15:0] w_ratio_q;
  logic [DW-1:0] d_x_min, d_x_max, d_x;
  logic [DW-1:0] d_x_max_next;
  argb_t       pix;

  // Fixed-point destination bound (n * ratio) >> 8.
  function automatic logic [26:0] scaled(input logic [10:0] n, input logic [15:0] ratio);
    return (27'(n) * 27'(ratio)) >> RATIO_FRAC;
  endfunction

  // The same, clamped to the destination region.
  function automatic logic [DW-1:0] bound(input logic [10:0] n, input logic [15:0] ratio);
    logic [26:0] p;
    p = scaled(n, ratio);
    return (p > 27'(DST_PIX)) ? DW'(DST_PIX) : p[DW-1:0];
  endfunction

  assign d_x_max_next = bound(11'(src_x) + 11'd1, w_ratio_q);
  assign pix          = pixel_of(a_dout, src_x[0]);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      busy      <= 1'b0;
      done      <= 1'b0;
      src_x     <= '0;
      src_w_q   <= '0;
      w_ratio_q <= '0;
      d_x_min   <= '0;
      d_x_max   <= '0;
      d_x       <= '0;
      d_y_min   <= '0;
      d_y_max   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (go) begin
          done      <= 1'b0;
          src_x     <= '0;
          src_w_q   <= src_w;
          w_ratio_q <= w_ratio;
          d_x_min   <= '0;
          d_y_min   <= 12'(scaled(11'(src_y), h_ratio));
          d_y_max   <= 12'(scaled(11'(src_y) + 11'd1, h_ratio));
          if (src_w == '0) begin
            done <= 1'b1;
          end else begin
            busy  <= 1'b1;
            state <= S_COM_ADDR;
          end
        end
        S_COM_ADDR: begin
          d_x_max <= d_x_max_next;
          d_x     <= d_x_min;
          state   <= S_MOVE_DATA;
        end
        S_MOVE_DATA: begin
          if (d_x < d_x_max) d_x <= d_x + DW'(1);
          if (d_x + DW'(1) >= d_x_max) begin
            d_x_min <= d_x_max;
            src_x   <= src_x + 10'd1;
            if (src_x + 10'd1 == src_w_q) begin
              busy  <= 1'b0;
              done  <= 1'b1;
              state <= S_IDLE;
            end else begin
              state <= S_COM_ADDR;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    a_en   = (state == S_COM_ADDR);
    a_we   = '0;
    a_addr = buf_addr_t'(SRC_BASE + 32'(src_x[9:1]));
    a_din  = '0;
    b_en   = (state == S_MOVE_DATA) && (d_x < d_x_max);
    b_we   = b_en ? pixel_be(d_x[0]) : '0;
    b_addr = buf_addr_t'(DST_BASE + 32'(d_x[DW-1:1]));
    b_din  = {pix, pix};
  end

  // b_dout is not needed: the scaler only writes through port B.
  logic unused_b;
  assign unused_b = ^b_dout;

endmodule
