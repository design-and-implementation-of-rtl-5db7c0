// Self-checking test of bram_lane in its three write modes. Three instances
// (WRITE_FIRST, READ_FIRST, NO_CHANGE) get the same random traffic on both
// ports; each is compared with a reference array for one-cycle read latency,
// the output after a write in its mode, and an output that holds while the
// port is disabled.
module tb_bram_lane;
  import mhp_pkg::*;
  localparam int DEPTH = 2048;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        en_a, we_a, en_b, we_b;
  logic [10:0] addr_a, addr_b;
  logic [7:0]  din_a, din_b;
  logic [7:0]  dout_a [3], dout_b [3];
  logic [7:0]  ref_mem [DEPTH];
  logic [7:0]  exp_a [3], exp_b [3];
  int checks = 0, failures = 0;

  bram_lane dut_wf (.clk, .en_a, .we_a, .addr_a, .din_a, .dout_a(dout_a[0]),
                    .en_b, .we_b, .addr_b, .din_b, .dout_b(dout_b[0]));
  bram_lane #(.WRITE_MODE(READ_FIRST)) dut_rf (.clk, .en_a, .we_a, .addr_a, .din_a,
                    .dout_a(dout_a[1]), .en_b, .we_b, .addr_b, .din_b, .dout_b(dout_b[1]));
  bram_lane #(.WRITE_MODE(NO_CHANGE)) dut_nc (.clk, .en_a, .we_a, .addr_a, .din_a,
                    .dout_a(dout_a[2]), .en_b, .we_b, .addr_b, .din_b, .dout_b(dout_b[2]));

  function automatic logic [7:0] expect_out(int mode, logic en, logic we, logic [7:0] din,
                                            logic [7:0] stored, logic [7:0] prev);
    if (!en) return prev;
    if (!we) return stored;
    case (mode) 0: return din; 1: return stored; default: return prev; endcase
  endfunction

  task automatic step_and_check(string what);
    for (int m = 0; m < 3; m++) begin
      exp_a[m] = expect_out(m, en_a, we_a, din_a, ref_mem[addr_a], dout_a[m]);
      exp_b[m] = expect_out(m, en_b, we_b, din_b, ref_mem[addr_b], dout_b[m]);
    end
    if (en_a && we_a) ref_mem[addr_a] = din_a;
    if (en_b && we_b) ref_mem[addr_b] = din_b;
    @(posedge clk); #1;
    for (int m = 0; m < 3; m++) begin
      checks += 2;
      if (dout_a[m] !== exp_a[m]) begin failures++; $display("%s: mode %0d port A got %h exp %h", what, m, dout_a[m], exp_a[m]); end
      if (dout_b[m] !== exp_b[m]) begin failures++; $display("%s: mode %0d port B got %h exp %h", what, m, dout_b[m], exp_b[m]); end
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en_a = 0; we_a = 0; en_b = 0; we_b = 0; addr_a = 0; addr_b = 0; din_a = 0; din_b = 0;
    // clear through both ports, then read once so every output is known
    for (int i = 0; i < DEPTH; i += 2) begin
      @(negedge clk);
      en_a = 1; we_a = 1; addr_a = 11'(i);   din_a = 8'(i * 7 + 3);
      en_b = 1; we_b = 1; addr_b = 11'(i+1); din_b = 8'((i + 1) * 7 + 3);
      ref_mem[i] = din_a; ref_mem[i+1] = din_b;
      @(posedge clk);
    end
    @(negedge clk); we_a = 0; we_b = 0;
    step_and_check("init read");
    // random mixed traffic, never both ports writing one address
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      en_a = 1'($urandom); we_a = 1'($urandom); addr_a = 11'($urandom); din_a = 8'($urandom);
      en_b = 1'($urandom); we_b = 1'($urandom); addr_b = 11'($urandom); din_b = 8'($urandom);
      if (en_a && we_a && en_b && we_b && addr_a == addr_b) we_b = 0;
      if (en_a && !we_a && en_b && we_b && addr_a == addr_b) en_a = 0;
      if (en_b && !we_b && en_a && we_a && addr_a == addr_b) en_b = 0;
      step_and_check($sformatf("n=%0d", n));
    end
    // final read-back of the whole array through port A
    en_b = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); en_a = 1; we_a = 0; addr_a = 11'(i);
      step_and_check("readback");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
