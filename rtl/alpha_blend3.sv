// Three-level SRC_OVER composition of one graphics pixel over one video pixel.
//
// SRC_OVER gives result = ga * g + (1 - ga) * v per channel. Only three
// transparency levels are implemented, the minimum an MHP terminal must
// offer: graphics alpha 255 (opaque) passes the graphics pixel, alpha 0
// (transparent) passes the video pixel, and every other alpha is treated as
// about 30 % so the product becomes shifts and adds:
//   0.3 ~ 2^-2 + 2^-5 + 2^-6      (0.296875)
//   0.7 ~ 2^-1 + 2^-3 + 2^-4 + 2^-6 (0.703125)
//   result = g>>2 + g>>5 + g>>6 + v>>1 + v>>3 + v>>4 + v>>6
// Each shifted term is truncated on its own, so the sum never exceeds 255.
//
// The levels and the shift formula follow the design description. Applying
// the same per-byte rule to the alpha byte as to R, G and B is this design's
// choice (the result alpha is not used for display).
//
// Purely combinational; the composer registers the result when it writes it
// back to the buffer.
module alpha_blend3
  import mhp_pkg::*;
(
  input  argb_t gfx,
  input  argb_t vid,
  output argb_t res
);

  function automatic logic [7:0] mix30(input logic [7:0] g, input logic [7:0] v);
    // The weights add up to exactly 1, so the sum of the truncated terms
    // fits in 8 bits.
    return (g >> 2) + (g >> 5) + (g >> 6)
         + (v >> 1) + (v >> 3) + (v >> 4) + (v >> 6);
  endfunction

  always_comb begin
    if (gfx.a == 8'hFF) begin
      res = gfx;
    end else if (gfx.a == 8'h00) begin
      res = vid;
    end else begin
      res.a = mix30(gfx.a, vid.a);
      res.r = mix30(gfx.r, vid.r);
      res.g = mix30(gfx.g, vid.g);
      res.b = mix30(gfx.b, vid.b);
    end
  end

endmodule
