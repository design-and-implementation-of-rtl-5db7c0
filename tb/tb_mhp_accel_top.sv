// End-to-end test of the two accelerators at their default sizes, playing
// the software side of one complete frame of the electronic-programme-guide
// scenario: a QCIF (176 x 144) decoded video frame is scaled to the
// 640 x 480 screen by the scaling device, row by row, each scaled row copied
// to the destination rows the device reports; then a full-screen graphics
// plane (transparent background, a translucent panel, opaque menu items and
// an unscaled QCIF "component video" window) is composed over the scaled
// video by the composition device, row by row. While the composer works, the
// scaler concurrently makes a 1/2 x 1/2 downscaled copy of the video frame.
//
// The scaled frame, the downscaled frame and the composed screen are all
// checked pixel by pixel against references computed here. The ratios are
// rounded up, as software would do so that the scaled row covers the screen.
// The test counts each mechanism of the design and fails if one never
// happened: wrong start code ignored, bus stall while a device is busy,
// pixel replication, pixel dropping (downscale), row replication, and the
// three composition levels (transparent, opaque, translucent).
module tb_mhp_accel_top;
  import mhp_pkg::*;
  logic clk = 0, rst;
  always #5 clk = ~clk;

  localparam int QW = 176, QH = 144, SW = 640, SH = 480;

  ipic_bfm #(.NUM_REGS(1)) cb (.clk(clk));
  ipic_bfm #(.NUM_REGS(4)) sb (.clk(clk));
  logic cmp_busy, cmp_done, cmp_ar_stall, scl_busy, scl_done, scl_ar_stall;

  mhp_accel_top dut (
    .Bus2IP_Clk(clk), .Bus2IP_Reset(rst),
    .cmp_Bus2IP_Addr(cb.Addr), .cmp_Bus2IP_Data(cb.Data), .cmp_Bus2IP_BE(cb.BE),
    .cmp_Bus2IP_RdCE(cb.RdCE), .cmp_Bus2IP_WrCE(cb.WrCE), .cmp_Bus2IP_RNW(cb.RNW),
    .cmp_Bus2IP_ArCS(cb.ArCS), .cmp_Bus2IP_ArData(cb.ArData), .cmp_Bus2IP_ArBE(cb.ArBE),
    .cmp_IP2Bus_Data(cb.IP_Data), .cmp_IP2Bus_ArData(cb.IP_ArData),
    .cmp_IP2Bus_RdAck(cb.RdAck), .cmp_IP2Bus_WrAck(cb.WrAck),
    .cmp_busy(cmp_busy), .cmp_done(cmp_done), .cmp_ar_stall(cmp_ar_stall),
    .scl_Bus2IP_Addr(sb.Addr), .scl_Bus2IP_Data(sb.Data), .scl_Bus2IP_BE(sb.BE),
    .scl_Bus2IP_RdCE(sb.RdCE), .scl_Bus2IP_WrCE(sb.WrCE), .scl_Bus2IP_RNW(sb.RNW),
    .scl_Bus2IP_ArCS(sb.ArCS), .scl_Bus2IP_ArData(sb.ArData), .scl_Bus2IP_ArBE(sb.ArBE),
    .scl_IP2Bus_Data(sb.IP_Data), .scl_IP2Bus_ArData(sb.IP_ArData),
    .scl_IP2Bus_RdAck(sb.RdAck), .scl_IP2Bus_WrAck(sb.WrAck),
    .scl_busy(scl_busy), .scl_done(scl_done), .scl_ar_stall(scl_ar_stall)
  );

  logic [31:0] qcif   [QH][QW];
  logic [31:0] scaled [SH][SW];
  logic [31:0] gfx    [SH][SW];
  logic [31:0] screen [SH][SW];
  logic [31:0] half   [QH/2][QW/2];

  int checks = 0, failures = 0;
  int n_badstart = 0, n_stall_c = 0, n_stall_s = 0, n_repl = 0, n_drop = 0;
  int n_rowrep = 0, n_transp = 0, n_opaque = 0, n_transl = 0;

  always @(posedge clk) begin
    if (cmp_ar_stall) n_stall_c++;
    if (scl_ar_stall) n_stall_s++;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  function automatic int ceil_ratio(int dst, int src);
    return (dst * 256 + src - 1) / src;
  endfunction

  // Source index that feeds destination index j for ratio r (x 2^8).
  function automatic int src_of(int j, int r, int n);
    for (int i = 0; i < n; i++) if (((i + 1) * r) / 256 > j) return i;
    return n - 1;
  endfunction

  function automatic logic [31:0] blend(logic [31:0] g, logic [31:0] v);
    logic [31:0] res;
    if (g[31:24] == 8'hFF) return g;
    if (g[31:24] == 8'h00) return v;
    for (int c = 0; c < 4; c++) begin
      int gi = int'(g[8*c +: 8]), vi = int'(v[8*c +: 8]);
      res[8*c +: 8] = 8'(gi/4 + gi/32 + gi/64 + vi/2 + vi/8 + vi/16 + vi/64);
    end
    return res;
  endfunction

  task automatic wait_done_c();
    logic [31:0] r;
    do cb.reg_read(0, r); while (r[23:22] != 2'b01);
  endtask
  task automatic wait_done_s();
    logic [31:0] r;
    do sb.reg_read(0, r); while (r[23:22] != 2'b01);
  endtask

  // Scale source row y of width w with ratios wr/hr; returns the scaled
  // pixels in row_out and the destination row range.
  task automatic scale_row(input int w, input int dw, input int y, input int wr, input int hr,
                           input bit poke, output logic [31:0] row_out [SW],
                           output int y0, output int y1, input bit from_half = 0);
    logic [31:0] r;
    logic [63:0] d;
    for (int i = 0; i < w; i += 2) sb.ar_write(i/2, {qcif[y][i], qcif[y][i+1]});
    sb.reg_write(1, {16'(hr), 16'(wr)});
    sb.reg_write(2, 32'(y));
    sb.reg_write(0, {START_CODE, 14'h0, 10'(w)});
    if (poke) sb.ar_read(0, d);   // stalls until the row is done
    wait_done_s();
    sb.reg_read(3, r);
    y0 = int'(r[27:16]);
    y1 = int'(r[11:0]);
    for (int j = 0; j < dw; j += 2) begin
      sb.ar_read(1024 + j/2, d);
      row_out[j] = d[63:32];
      row_out[j+1] = d[31:0];
    end
  endtask

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wr, hr, y0, y1, ref_src;
    logic [31:0] row [SW];
    logic [31:0] r;
    logic [63:0] d;
    cb.idle();
    sb.idle();
    rst = 1;
    repeat (4) @(negedge clk);
    rst = 0;

    // decoded video frame and graphics plane
    for (int y = 0; y < QH; y++)
      for (int x = 0; x < QW; x++)
        qcif[y][x] = {8'hFF, 8'(x + y), 8'(x * 3 ^ y), 8'(255 - x + 2 * y)};
    for (int y = 0; y < SH; y++)
      for (int x = 0; x < SW; x++) begin
        if (x >= 400 && x < 400 + QW && y >= 40 && y < 40 + QH)
          gfx[y][x] = qcif[y - 40][x - 400];                       // component video
        else if (y >= 300 && y < 340 && x >= 40 && x < 360)
          gfx[y][x] = {8'hFF, 8'h20, 8'h40, 8'(x)};                // menu item
        else if (y >= 260 && y < 440 && x >= 20 && x < 380)
          gfx[y][x] = {8'h4D, 8'h10, 8'h10, 8'h80};                // translucent panel
        else
          gfx[y][x] = {8'h00, 8'(x), 8'(y), 8'h00};                // transparent
      end

    // a wrong start code is kept and ignored
    sb.reg_write(0, {8'h0C, 14'h0, 10'(QW)});
    repeat (4) @(negedge clk);
    sb.reg_read(0, r);
    if (r[31:24] == 8'h0C && r[23:22] == 2'b00 && !scl_busy) n_badstart++;
    cb.reg_write(0, {8'hA0, 14'h0, 10'(SW)});
    repeat (4) @(negedge clk);
    cb.reg_read(0, r);
    if (r[31:24] == 8'hA0 && r[23:22] == 2'b00 && !cmp_busy) n_badstart++;

    // stage 1: scale the video frame to the full screen
    wr = ceil_ratio(SW, QW);
    hr = ceil_ratio(SH, QH);
    for (int y = 0; y < QH; y++) begin
      scale_row(QW, SW, y, wr, hr, y == 0, row, y0, y1);
      if (y1 - y0 > 1) n_rowrep++;
      check(y0 == (y * hr) / 256 && y1 == ((y + 1) * hr) / 256, $sformatf("row range of %0d", y));
      if (y1 > SH) y1 = SH;
      for (int dy = y0; dy < y1; dy++)
        for (int x = 0; x < SW; x++) scaled[dy][x] = row[x];
    end
    for (int j = 0; j < SW; j++)
      if (((src_of(j, wr, QW) + 1) * wr) / 256 - (src_of(j, wr, QW) * wr) / 256 > 1) n_repl++;
    for (int y = 0; y < SH; y++)
      for (int x = 0; x < SW; x++) begin
        ref_src = src_of(x, wr, QW);
        check(scaled[y][x] == qcif[src_of(y, hr, QH)][ref_src], $sformatf("scaled (%0d,%0d)", x, y));
      end

    // stage 2: compose graphics over video; meanwhile the scaler halves the frame
    fork
      begin : compose
        for (int y = 0; y < SH; y++) begin
          for (int x = 0; x < SW; x += 2) begin
            cb.ar_write(x/2, {gfx[y][x], gfx[y][x+1]});
            cb.ar_write(512 + x/2, {scaled[y][x], scaled[y][x+1]});
          end
          cb.reg_write(0, {START_CODE, 14'h0, 10'(SW)});
          if (y == 0) cb.ar_read(0, d);
          wait_done_c();
          for (int x = 0; x < SW; x += 2) begin
            cb.ar_read(1024 + x/2, d);
            screen[y][x] = d[63:32];
            screen[y][x+1] = d[31:0];
          end
        end
      end
      begin : downscale
        int hw, hh;
        hw = 128; hh = 128;                    // ratio 1/2
        for (int y = 0; y < QH; y++) begin
          scale_row(QW, QW/2, y, hw, hh, 1'b0, row, y0, y1);
          for (int dy = y0; dy < y1; dy++)
            for (int x = 0; x < QW/2; x++) half[dy][x] = row[x];
        end
        for (int i = 0; i < QW; i++) if (((i + 1) * hw) / 256 == (i * hw) / 256) n_drop++;
        for (int y = 0; y < QH/2; y++)
          for (int x = 0; x < QW/2; x++)
            check(half[y][x] == qcif[2*y + 1][2*x + 1], $sformatf("half (%0d,%0d)", x, y));
      end
    join

    for (int y = 0; y < SH; y++)
      for (int x = 0; x < SW; x++) begin
        case (gfx[y][x][31:24]) 8'h00: n_transp++; 8'hFF: n_opaque++; default: n_transl++; endcase
        check(screen[y][x] == blend(gfx[y][x], scaled[y][x]), $sformatf("screen (%0d,%0d)", x, y));
      end

    $display("mechanisms: bad_start=%0d stall_cmp=%0d stall_scl=%0d replicate=%0d drop=%0d row_repeat=%0d",
             n_badstart, n_stall_c, n_stall_s, n_repl, n_drop, n_rowrep);
    $display("composition levels: transparent=%0d opaque=%0d translucent=%0d", n_transp, n_opaque, n_transl);
    check(n_badstart == 2, "wrong start code not ignored by both devices");
    check(n_stall_c > 0, "composer never stalled a bus access");
    check(n_stall_s > 0, "scaler never stalled a bus access");
    check(n_repl > 0, "no pixel replication");
    check(n_drop > 0, "no pixel dropping");
    check(n_rowrep > 0, "no row replication");
    check(n_transp > 0 && n_opaque > 0 && n_transl > 0, "a composition level never used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
