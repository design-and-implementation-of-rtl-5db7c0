// Self-checking test of the scaling peripheral through its IPIC port set.
// Loads a QCIF row (176 pixels), programs src_W, the ratios (640/176 and
// 480/144 times 2^8, computed here as software would) and a source row
// number, checks that a wrong start code is kept and ignored, starts with
// 0x0A, checks the stall of a buffer access while busy, the flags, the row
// latency (src_W + dst_W + 1 cycles for an upscale), the destination row
// range read back from register 3, every scaled pixel, and the register
// read-back of registers 1 and 2.
module tb_scale_ip;
  import mhp_pkg::*;
  logic clk = 0, rst;
  always #5 clk = ~clk;

  ipic_bfm #(.NUM_REGS(4)) bus (.clk(clk));
  logic busy, done, ar_stall;
  int checks = 0, failures = 0;

  scale_ip dut (
    .Bus2IP_Clk(clk), .Bus2IP_Reset(rst),
    .Bus2IP_Addr(bus.Addr), .Bus2IP_Data(bus.Data), .Bus2IP_BE(bus.BE),
    .Bus2IP_RdCE(bus.RdCE), .Bus2IP_WrCE(bus.WrCE), .Bus2IP_RNW(bus.RNW),
    .Bus2IP_ArCS(bus.ArCS), .Bus2IP_ArData(bus.ArData), .Bus2IP_ArBE(bus.ArBE),
    .IP2Bus_Data(bus.IP_Data), .IP2Bus_ArData(bus.IP_ArData),
    .IP2Bus_RdAck(bus.RdAck), .IP2Bus_WrAck(bus.WrAck),
    .busy(busy), .done(done), .ar_stall(ar_stall)
  );

  function automatic logic [31:0] spix(int i);
    return {8'hFF, 8'(i * 3), 8'(i + 17), 8'(250 - i)};
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
    localparam int SW = 176, DW = 640, SH = 144, DH = 480, SY = 77;
    int wr, hr, cyc, dtot, j0, j1;
    logic [31:0] r;
    logic [63:0] d;
    bus.idle();
    rst = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    wr = (DW * 256) / SW;
    hr = (DH * 256) / SH;
    dtot = (SW * wr) / 256;

    for (int i = 0; i < SW; i += 2) bus.ar_write(i/2, {spix(i), spix(i+1)});
    bus.reg_write(1, {16'(hr), 16'(wr)});
    bus.reg_write(2, 32'(SY));
    bus.reg_read(1, r);
    check(r == {16'(hr), 16'(wr)}, "ratio register read-back");
    bus.reg_read(2, r);
    check(r == 32'(SY), "src_y register read-back");

    bus.reg_write(0, {8'h0B, 14'h0, 10'(SW)});
    repeat (5) @(negedge clk);
    bus.reg_read(0, r);
    check(r == {8'h0B, 2'b00, 12'h0, 10'(SW)} && !busy, $sformatf("wrong code: reg=%h", r));

    bus.reg_write(0, {START_CODE, 14'h0, 10'(SW)});
    cyc = 0;
    do begin
      @(negedge clk); cyc++;
      if (cyc == 2) check(busy && !done, "flags not 10 during operation");
    end while ((!done || busy) && cyc < 5000);
    check(cyc == SW + dtot + 1, $sformatf("row latency %0d, expected %0d", cyc, SW + dtot + 1));
    bus.reg_read(0, r);
    check(r == {8'h00, 2'b01, 12'h0, 10'(SW)}, $sformatf("finished: reg=%h", r));
    bus.reg_read(3, r);
    check(r[27:16] == 12'((SY * hr) / 256) && r[11:0] == 12'(((SY + 1) * hr) / 256),
          $sformatf("row range reg=%h", r));

    for (int j = 0; j < dtot; j += 2) begin
      bus.ar_read(1024 + j/2, d);
      for (int h = 0; h < 2; h++) begin
        automatic int src = -1;
        for (int i = 0; i < SW; i++)
          if ((i * wr) / 256 <= j + h && j + h < ((i + 1) * wr) / 256) src = i;
        if (j + h < dtot) check(src >= 0 && (h == 0 ? d[63:32] : d[31:0]) == spix(src),
              $sformatf("dst %0d wrong", j + h));
      end
    end

    // a buffer access during an operation waits for it to end
    bus.reg_write(0, {START_CODE, 14'h0, 10'(SW)});
    bus.wait_cycles = 0;
    bus.ar_read(1024, d);
    check(bus.wait_cycles > 0 && !busy, "buffer access during operation was not stalled");
    check(d[63:32] == spix(0), "stalled read data");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
