// Self-checking test of data_buffer: random 64-bit accesses with random byte
// enables on both ports against a reference array; checks that only enabled
// byte lanes change and that reads arrive one cycle after the address.
module tb_data_buffer;
  localparam int DEPTH = 2048;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        en_a, en_b;
  logic [7:0]  we_a, we_b;
  logic [10:0] addr_a, addr_b;
  logic [63:0] din_a, din_b, dout_a, dout_b;
  logic [63:0] ref_mem [DEPTH];
  logic [63:0] exp_a, exp_b;
  int checks = 0, failures = 0;

  data_buffer #(.LANES(8), .DEPTH(DEPTH)) dut (.*);

  function automatic logic [63:0] merge(logic [63:0] old, logic [63:0] nw, logic [7:0] be);
    logic [63:0] r = old;
    for (int k = 0; k < 8; k++) if (be[k]) r[8*k +: 8] = nw[8*k +: 8];
    return r;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en_a = 0; en_b = 0; we_a = 0; we_b = 0; addr_a = 0; addr_b = 0; din_a = 0; din_b = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      en_a = 1; we_a = 8'hFF; addr_a = 11'(i); din_a = {32'(i), ~32'(i)};
      ref_mem[i] = din_a;
    end
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      en_a = 1'($urandom); we_a = 8'($urandom); addr_a = 11'($urandom); din_a = {$urandom, $urandom};
      en_b = 1'($urandom); we_b = 8'($urandom); addr_b = 11'($urandom); din_b = {$urandom, $urandom};
      if (n % 3 == 0) begin we_a = 0; we_b = 0; end
      if (addr_a == addr_b) addr_b = addr_b + 1;
      exp_a = en_a ? merge(ref_mem[addr_a], din_a, we_a) : dout_a;
      exp_b = en_b ? merge(ref_mem[addr_b], din_b, we_b) : dout_b;
      // WRITE_FIRST per lane: a written lane shows new data, others the stored byte
      if (en_a) ref_mem[addr_a] = exp_a;
      if (en_b) ref_mem[addr_b] = exp_b;
      @(posedge clk); #1;
      checks += 2;
      if (dout_a !== exp_a) begin failures++; $display("A n=%0d got %h exp %h", n, dout_a, exp_a); end
      if (dout_b !== exp_b) begin failures++; $display("B n=%0d got %h exp %h", n, dout_b, exp_b); end
    end
    en_a = 0; en_b = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); en_b = 1; we_b = 0; addr_b = 11'(i);
      @(posedge clk); #1;
      checks++;
      if (dout_b !== ref_mem[i]) begin failures++; $display("readback %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
