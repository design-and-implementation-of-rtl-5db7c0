// Self-checking test of scale_core against a model buffer held in the
// testbench. Scales rows up (QCIF 176 -> 640, 2x) and down (640 -> 320,
// 176 -> 100) and checks every destination pixel against the nearest-
// neighbour rule computed independently (destination j takes the source
// pixel i with floor(i*r/256) <= j < floor((i+1)*r/256)), that nothing past
// the row is written, the cycle count src_W + sum(max(1, copies)), and the
// destination row range for a source row.
module tb_scale_core;
  import mhp_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, go, busy, done;
  logic [9:0] src_w, src_y;
  logic [15:0] w_ratio, h_ratio;
  logic [11:0] d_y_min, d_y_max;
  logic a_en, b_en;
  buf_be_t a_we, b_we;
  buf_addr_t a_addr, b_addr;
  buf_word_t a_din, b_din, a_dout, b_dout;
  logic [63:0] mem [2048];
  int checks = 0, failures = 0;
  int drops = 0, copies_gt1 = 0;

  scale_core dut (.*);

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

  function automatic logic [31:0] spix(int i);
    return {8'(i), 8'(i * 3 + 1), 8'(255 - i), 8'(i * 7)};
  endfunction

  task automatic run_row(int sw, int dw, int sy, int sh, int dh);
    int r, hr, cyc, exp_cyc, dtot, src;
    logic [31:0] got;
    r  = (dw * 256) / sw;
    hr = (dh * 256) / sh;
    for (int i = 0; i < 2048; i++) mem[i] = 64'h5555_5555_5555_5555;
    for (int i = 0; i < sw; i++)
      if (i % 2 == 0) mem[i/2][63:32] = spix(i); else mem[i/2][31:0] = spix(i);
    exp_cyc = 0;
    for (int i = 0; i < sw; i++) begin
      int n = ((i + 1) * r) / 256 - (i * r) / 256;
      exp_cyc += 1 + (n > 1 ? n : 1);
      if (n == 0) drops++;
      if (n > 1) copies_gt1++;
    end
    dtot = (sw * r) / 256;
    @(negedge clk);
    src_w = 10'(sw); w_ratio = 16'(r); h_ratio = 16'(hr); src_y = 10'(sy); go = 1;
    @(negedge clk); go = 0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; if (cyc > 10000) break; end
    checks++;
    if (cyc != exp_cyc) begin failures++; $display("%0d->%0d: %0d cycles, expected %0d", sw, dw, cyc, exp_cyc); end
    for (int j = 0; j < dtot; j++) begin
      src = -1;
      for (int i = 0; i < sw; i++) if ((i * r) / 256 <= j && j < ((i + 1) * r) / 256) src = i;
      got = (j % 2 == 0) ? mem[1024 + j/2][63:32] : mem[1024 + j/2][31:0];
      checks++;
      if (src < 0 || got !== spix(src)) begin
        failures++; $display("%0d->%0d dst %0d got %h exp src %0d", sw, dw, j, got, src);
      end
    end
    checks++;
    got = (dtot % 2 == 0) ? mem[1024 + dtot/2][63:32] : mem[1024 + dtot/2][31:0];
    if (got !== 32'h5555_5555) begin failures++; $display("wrote past row end"); end
    checks += 2;
    if (d_y_min != 12'((sy * hr) / 256) || d_y_max != 12'(((sy + 1) * hr) / 256)) begin
      failures++; $display("row range %0d..%0d", d_y_min, d_y_max);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; go = 0; src_w = 0; w_ratio = 0; h_ratio = 0; src_y = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    run_row(176, 640, 10, 144, 480);
    run_row(176, 352, 143, 144, 288);
    run_row(640, 320, 5, 480, 240);
    run_row(176, 100, 0, 144, 72);
    run_row(3, 9, 1, 3, 9);
    checks++;
    if (drops == 0 || copies_gt1 == 0) begin failures++; $display("drop/replicate not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
