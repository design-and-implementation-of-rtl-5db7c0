// User logic of the composition peripheral: the part of the PLB device
// behind the IPIF. It holds the control register, the data buffer and the
// composition FSMD.
//
// Software writes one row of graphics (buffer words 0..511) and one row of
// video (words 512..1023) through the address range, then writes the width
// and the start code 0x0A into the control register, polls busy/done, and
// reads the composed row from words 1024 and up.
//
// Control register (register 0, PLB bit numbering, bit 0 = MSB):
//   bits 0..7   start: keeps any value written except 0x0A; 0x0A launches
//               the row as soon as the composer is idle and is then cleared
//               to 0x00.
//   bit 8 busy, bit 9 done (read only): 00 after reset, 10 while composing,
//               01 when the row is finished.
//   bits 10..21 reserved, read as 0.
//   bits 22..31 width: number of pixels in the row (read/write).
// The register layout and start behaviour follow the design description
// (whose text gives the finished state as "10"; 01 is used, as "busy low,
// done high" is the only reading consistent with a busy and a done flag).
//
// Buffer ports: port A belongs to the bus while the composer is idle and to
// the composer's graphics reads while it is busy (bus accesses to the range
// then wait); port B belongs to the composer. Timing: the row takes 3 cycles
// per pixel after the cycle in which the start code is seen (see
// compose_core), one more cycle for the start register.
module compose_ip
  import mhp_pkg::*;
#(
  parameter int unsigned AR_ADDR_LSB = 4,
  parameter int unsigned GFX_BASE    = 0,
  parameter int unsigned VID_BASE    = 512,
  parameter int unsigned RES_BASE    = 1024
) (
  input  logic              Bus2IP_Clk,
  input  logic              Bus2IP_Reset,
  input  logic [31:0]       Bus2IP_Addr,
  input  logic [BUS_DW-1:0] Bus2IP_Data,
  input  logic [7:0]        Bus2IP_BE,
  input  logic [0:0]        Bus2IP_RdCE,
  input  logic [0:0]        Bus2IP_WrCE,
  input  logic              Bus2IP_RNW,
  input  logic              Bus2IP_ArCS,
  input  logic [BUS_DW-1:0] Bus2IP_ArData,
  input  logic [7:0]        Bus2IP_ArBE,
  output logic [BUS_DW-1:0] IP2Bus_Data,
  output logic [BUS_DW-1:0] IP2Bus_ArData,
  output logic              IP2Bus_RdAck,
  output logic              IP2Bus_WrAck,
  output logic              busy,
  output logic              done,
  output logic              ar_stall
);

  logic clk, rst;
  assign clk = Bus2IP_Clk;
  assign rst = Bus2IP_Reset;

  logic [0:0]        reg_we;
  logic [31:0]       reg_wdata;
  logic [3:0]        reg_wbe;
  logic [0:0][31:0]  reg_rdata;
  ctrl_reg_t         ctrl;
  logic [7:0]        start_q;
  logic [9:0]        width_q;
  logic              go;

  // bus-side buffer port
  logic      bus_en;
  buf_be_t   bus_we;
  buf_addr_t bus_addr;
  buf_word_t bus_din;
  // composer ports
  logic      ca_en, cb_en;
  buf_be_t   ca_we, cb_we;
  buf_addr_t ca_addr, cb_addr;
  buf_word_t ca_din, cb_din;
  // buffer ports
  logic      pa_en;
  buf_be_t   pa_we;
  buf_addr_t pa_addr;
  buf_word_t pa_din, pa_dout, pb_dout;

  ipic_slave #(.NUM_REGS(1), .AR_ADDR_LSB(AR_ADDR_LSB)) u_ipic (
    .clk(clk), .rst(rst),
    .Bus2IP_Addr(Bus2IP_Addr), .Bus2IP_Data(Bus2IP_Data), .Bus2IP_BE(Bus2IP_BE),
    .Bus2IP_RdCE(Bus2IP_RdCE), .Bus2IP_WrCE(Bus2IP_WrCE), .Bus2IP_RNW(Bus2IP_RNW),
    .Bus2IP_ArCS(Bus2IP_ArCS), .Bus2IP_ArData(Bus2IP_ArData), .Bus2IP_ArBE(Bus2IP_ArBE),
    .IP2Bus_Data(IP2Bus_Data), .IP2Bus_ArData(IP2Bus_ArData),
    .IP2Bus_RdAck(IP2Bus_RdAck), .IP2Bus_WrAck(IP2Bus_WrAck),
    .reg_we(reg_we), .reg_wdata(reg_wdata), .reg_wbe(reg_wbe), .reg_rdata(reg_rdata),
    .buf_busy(busy), .buf_en(bus_en), .buf_we(bus_we), .buf_addr(bus_addr),
    .buf_din(bus_din), .buf_dout(pa_dout), .ar_stall(ar_stall)
  );

  // Control register.
  assign go = (start_q == START_CODE) && !busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      start_q <= '0;
      width_q <= '0;
    end else begin
      if (go) start_q <= 8'h00;
      if (reg_we[0]) begin
        if (reg_wbe[3]) start_q       <= reg_wdata[31:24];
        if (reg_wbe[1]) width_q[9:8]  <= reg_wdata[9:8];
        if (reg_wbe[0]) width_q[7:0]  <= reg_wdata[7:0];
      end
    end
  end

  always_comb begin
    ctrl       = '0;
    ctrl.start = start_q;
    ctrl.busy  = busy;
    ctrl.done  = done;
    ctrl.width = width_q;
  end
  assign reg_rdata[0] = ctrl;

  compose_core #(.GFX_BASE(GFX_BASE), .VID_BASE(VID_BASE), .RES_BASE(RES_BASE)) u_core (
    .clk(clk), .rst(rst), .go(go), .width(width_q), .busy(busy), .done(done),
    .a_en(ca_en), .a_we(ca_we), .a_addr(ca_addr), .a_din(ca_din), .a_dout(pa_dout),
    .b_en(cb_en), .b_we(cb_we), .b_addr(cb_addr), .b_din(cb_din), .b_dout(pb_dout)
  );

  // Port A: bus when idle, composer when busy.
  always_comb begin
    if (busy) begin
      pa_en = ca_en; pa_we = ca_we; pa_addr = ca_addr; pa_din = ca_din;
    end else begin
      pa_en = bus_en; pa_we = bus_we; pa_addr = bus_addr; pa_din = bus_din;
    end
  end

  data_buffer #(.LANES(BUF_LANES), .DEPTH(BUF_DEPTH)) u_buf (
    .clk(clk),
    .en_a(pa_en), .we_a(pa_we), .addr_a(pa_addr), .din_a(pa_din), .dout_a(pa_dout),
    .en_b(cb_en), .we_b(cb_we), .addr_b(cb_addr), .din_b(cb_din), .dout_b(pb_dout)
  );

endmodule
