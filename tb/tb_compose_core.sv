// Self-checking test of compose_core against a model buffer held in the
// testbench. Fills a graphics row (alphas 0, 255 and intermediate values)
// and a video row, pulses go, and checks: busy during the row, done at the
// end, 3 cycles per pixel, every result pixel against an independently
// written SRC_OVER three-level formula, and that the graphics, video and
// the untouched neighbour of an odd-width row keep their contents.
module tb_compose_core;
  import mhp_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, go, busy, done;
  logic [9:0] width;
  logic a_en, b_en;
  buf_be_t a_we, b_we;
  buf_addr_t a_addr, b_addr;
  buf_word_t a_din, b_din, a_dout, b_dout;
  logic [63:0] mem [2048];
  int checks = 0, failures = 0;

  compose_core dut (.*);

  // model of the dual-port buffer: one-cycle registered reads
  always @(posedge clk) begin
    if (a_en) begin
      for (int k = 0; k < 8; k++) if (a_we[k]) mem[a_addr][8*k +: 8] <= a_din[8*k +: 8];
      a_dout <= mem[a_addr];
    end
    if (b_en) begin
      for (int k = 0; k < 8; k++) if (b_we[k]) mem[b_addr][8*k +: 8] <= b_din[8*k +: 8];
      b_dout <= mem[b_addr];
    end
  end

  function automatic logic [31:0] gpix(int i);
    logic [7:0] a;
    case (i % 4) 0: a = 8'h00; 1: a = 8'hFF; 2: a = 8'h4D; default: a = 8'(i * 37 + 1);
    endcase
    if (a == 0 && i % 4 != 0) a = 1;
    return {a, 8'(i * 3), 8'(255 - i), 8'(i * 11)};
  endfunction
  function automatic logic [31:0] vpix(int i);
    return {8'hFF, 8'(i * 5 + 7), 8'(i ^ 8'h5A), 8'(200 - i)};
  endfunction
  // exact reference: each shifted term truncated on its own
  function automatic logic [31:0] expect_pix(logic [31:0] g, logic [31:0] v);
    logic [31:0] r;
    for (int c = 0; c < 4; c++) begin
      int gi = int'(g[8*c +: 8]), vi = int'(v[8*c +: 8]);
      if (g[31:24] == 8'hFF) r[8*c +: 8] = 8'(gi);
      else if (g[31:24] == 8'h00) r[8*c +: 8] = 8'(vi);
      else r[8*c +: 8] = 8'(gi/4 + gi/32 + gi/64 + vi/2 + vi/8 + vi/16 + vi/64);
    end
    return r;
  endfunction

  task automatic run_row(int w);
    int cyc;
    logic [31:0] got, exp;
    for (int i = 0; i < 2048; i++) mem[i] = 64'hDEAD_BEEF_0BAD_F00D;
    for (int i = 0; i < w; i++) begin
      if (i % 2 == 0) begin mem[i/2][63:32] = gpix(i); mem[512 + i/2][63:32] = vpix(i); end
      else            begin mem[i/2][31:0]  = gpix(i); mem[512 + i/2][31:0]  = vpix(i); end
    end
    @(negedge clk); width = 10'(w); go = 1;
    @(negedge clk); go = 0;
    cyc = 0;
    checks++;
    if (w > 0 && !busy) begin failures++; $display("busy not set"); end
    while (!done) begin @(negedge clk); cyc++; if (cyc > 4000) break; end
    checks++;
    if (cyc != 3 * w) begin
      failures++; $display("w=%0d: %0d cycles, expected %0d", w, cyc, 3 * w);
    end
    checks++;
    if (busy) begin failures++; $display("busy still set"); end
    for (int i = 0; i < w; i++) begin
      got = (i % 2 == 0) ? mem[1024 + i/2][63:32] : mem[1024 + i/2][31:0];
      exp = expect_pix(gpix(i), vpix(i));
      checks++;
      if (got !== exp) begin failures++; $display("w=%0d pix %0d got %h exp %h", w, i, got, exp); end
      checks++;
      if (((i % 2 == 0) ? mem[i/2][63:32] : mem[i/2][31:0]) !== gpix(i)) begin
        failures++; $display("graphics pixel %0d overwritten", i);
      end
    end
    if (w % 2 == 1) begin
      checks++;
      if (mem[1024 + w/2][31:0] !== 32'h0BAD_F00D) begin failures++; $display("odd neighbour written"); end
    end
    checks++;
    if (mem[1024 + (w + 1)/2] !== 64'hDEAD_BEEF_0BAD_F00D) begin failures++; $display("wrote past row"); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; go = 0; width = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    checks++;
    if (busy || done) begin failures++; $display("flags not 00 after reset"); end
    run_row(8);
    run_row(7);
    run_row(640);
    run_row(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
