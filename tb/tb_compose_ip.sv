// Self-checking test of the composition peripheral through its IPIC port
// set. Loads a 640-pixel graphics row (opaque, transparent and translucent
// pixels) and a video row through the address range, checks that a start
// value other than 0x0A is kept and starts nothing, starts the row with 0x0A,
// checks that a buffer access during the operation is stalled and still
// correct, the busy/done flags (00, 10, 01), the start byte clearing to 0x00,
// the row latency (3 cycles per pixel plus one for the start register), the
// 32-bit byte-enabled buffer writes, and every composed pixel.
module tb_compose_ip;
  import mhp_pkg::*;
  logic clk = 0, rst;
  always #5 clk = ~clk;

  ipic_bfm #(.NUM_REGS(1)) bus (.clk(clk));
  logic busy, done, ar_stall;
  int checks = 0, failures = 0;

  compose_ip dut (
    .Bus2IP_Clk(clk), .Bus2IP_Reset(rst),
    .Bus2IP_Addr(bus.Addr), .Bus2IP_Data(bus.Data), .Bus2IP_BE(bus.BE),
    .Bus2IP_RdCE(bus.RdCE), .Bus2IP_WrCE(bus.WrCE), .Bus2IP_RNW(bus.RNW),
    .Bus2IP_ArCS(bus.ArCS), .Bus2IP_ArData(bus.ArData), .Bus2IP_ArBE(bus.ArBE),
    .IP2Bus_Data(bus.IP_Data), .IP2Bus_ArData(bus.IP_ArData),
    .IP2Bus_RdAck(bus.RdAck), .IP2Bus_WrAck(bus.WrAck),
    .busy(busy), .done(done), .ar_stall(ar_stall)
  );

  function automatic logic [31:0] gpix(int i);
    logic [7:0] a;
    case (i % 3) 0: a = 8'h00; 1: a = 8'hFF; default: a = 8'h4C;
    endcase
    return {a, 8'(i), 8'(i * 5), 8'(255 - i)};
  endfunction
  function automatic logic [31:0] vpix(int i);
    return {8'hFF, 8'(i * 9), 8'(i + 100), 8'(i * 2)};
  endfunction
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

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    localparam int W = 640;
    logic [31:0] r;
    logic [63:0] d;
    int cyc;
    bus.idle();
    rst = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    bus.reg_read(0, r);
    check(r == 32'h0, "control register not zero after reset");

    // graphics row: pixel pairs as 64-bit words; video row as two 32-bit writes
    for (int i = 0; i < W; i += 2) begin
      bus.ar_write(i/2, {gpix(i), gpix(i+1)});
      bus.ar_write(512 + i/2, {vpix(i), 32'hFFFF_FFFF}, 8'hF0);
      bus.ar_write(512 + i/2, {32'hFFFF_FFFF, vpix(i+1)}, 8'h0F);
    end
    bus.ar_read(512 + 3, d);
    check(d == {vpix(6), vpix(7)}, "byte-enabled write read-back");

    // any start value but 0x0A is kept and does nothing
    bus.reg_write(0, {8'h55, 14'h0, 10'(W)});
    repeat (10) @(negedge clk);
    bus.reg_read(0, r);
    check(r == {8'h55, 2'b00, 12'h0, 10'(W)}, $sformatf("non-start value: reg=%h", r));
    check(!busy, "started on a wrong code");

    // start
    bus.reg_write(0, {START_CODE, 14'h0, 10'(W)});
    bus.reg_read(0, r);
    check(r[31:24] == 8'h00 && r[23:22] == 2'b10, $sformatf("running: reg=%h", r));
    bus.wait_cycles = 0;
    bus.ar_read(5, d);
    check(bus.wait_cycles > 0, "buffer access during operation was not stalled");
    check(d == {gpix(10), gpix(11)}, "stalled read returned wrong data");
    check(!busy, "stalled access completed while busy");
    // latency, measured separately on a second start
    bus.reg_write(0, {START_CODE, 14'h0, 10'(W)});
    cyc = 0;
    do begin
      @(negedge clk); cyc++;
      if (cyc == 2) check(busy && !done, "flags not 10 during operation");
    end while ((!done || busy) && cyc < 5000);
    check(cyc == 3 * W + 1, $sformatf("row latency %0d, expected %0d", cyc, 3 * W + 1));
    bus.reg_read(0, r);
    check(r == {8'h00, 2'b01, 12'h0, 10'(W)}, $sformatf("finished: reg=%h", r));

    for (int i = 0; i < W; i += 2) begin
      bus.ar_read(1024 + i/2, d);
      check(d[63:32] == expect_pix(gpix(i), vpix(i)),
            $sformatf("pixel %0d: %h exp %h", i, d[63:32], expect_pix(gpix(i), vpix(i))));
      check(d[31:0] == expect_pix(gpix(i+1), vpix(i+1)),
            $sformatf("pixel %0d: %h exp %h", i+1, d[31:0], expect_pix(gpix(i+1), vpix(i+1))));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
