// User logic of the scaling peripheral: the part of the PLB device behind
// the IPIF. It holds the control registers, the data buffer and the scaling
// FSMD, and is built like the composition peripheral.
//
// Software writes one source row into buffer words 0..1023 through the
// address range, sets src_W, the ratios and the source row number, writes the
// start code 0x0A, polls busy/done and reads the scaled row from words 1024
// and up, plus the destination row range the row is to be copied to.
//
// Registers (PLB bit numbering, bit 0 = MSB):
//   reg 0  bits 0..7 start, bit 8 busy, bit 9 done, bits 22..31 src_W;
//          the same layout and start/busy/done behaviour as the composer.
//   reg 1  bits 0..15 H_ratio, bits 16..31 W_ratio: dst/src ratios times 2^8,
//          computed by software.
//   reg 2  bits 22..31 src_y, the number of the source row.
//   reg 3  read only: bits 4..15 d_y_min, bits 20..31 d_y_max, the first and
//          one past the last destination row of source row src_y, valid once
//          done is set.
// start/busy/done, src_W and W_ratio come from the design description; the
// field positions in registers 1 to 3, H_ratio, src_y and register 3 are this
// design's choices (the description only says the y dimension is scaled
// "similarly").
//
// Buffer ports: port A belongs to the bus while the scaler is idle and to the
// scaler's source reads while it is busy (bus accesses to the range then
// wait); port B belongs to the scaler. Timing: see scale_core, plus one cycle
// for the start register.
module scale_ip
  import mhp_pkg::*;
#(
  parameter int unsigned AR_ADDR_LSB = 4,
  parameter int unsigned SRC_BASE    = 0,
  parameter int unsigned DST_BASE    = 1024,
  parameter int unsigned DST_PIX     = 2048
) (
  input  logic              Bus2IP_Clk,
  input  logic              Bus2IP_Reset,
  input  logic [31:0]       Bus2IP_Addr,
  input  logic [BUS_DW-1:0] Bus2IP_Data,
  input  logic [7:0]        Bus2IP_BE,
  input  logic [3:0]        Bus2IP_RdCE,
  input  logic [3:0]        Bus2IP_WrCE,
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

  logic [3:0]        reg_we;
  logic [31:0]       reg_wdata;
  logic [3:0]        reg_wbe;
  logic [3:0][31:0]  reg_rdata;
  ctrl_reg_t         ctrl;
  logic [7:0]        start_q;
  logic [9:0]        src_w_q;
  logic [15:0]       w_ratio_q, h_ratio_q;
  logic [9:0]        src_y_q;
  logic [11:0]       d_y_min, d_y_max;
  logic              go;

  logic      bus_en;
  buf_be_t   bus_we;
  buf_addr_t bus_addr;
  buf_word_t bus_din;
  logic      ca_en, cb_en;
  buf_be_t   ca_we, cb_we;
  buf_addr_t ca_addr, cb_addr;
  buf_word_t ca_din, cb_din;
  logic      pa_en;
  buf_be_t   pa_we;
  buf_addr_t pa_addr;
  buf_word_t pa_din, pa_dout, pb_dout;

  ipic_slave #(.NUM_REGS(4), .AR_ADDR_LSB(AR_ADDR_LSB)) u_ipic (
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

  assign go = (start_q == START_CODE) && !busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      start_q   <= '0;
      src_w_q   <= '0;
      w_ratio_q <= '0;
      h_ratio_q <= '0;
      src_y_q   <= '0;
    end else begin
      if (go) start_q <= 8'h00;
      if (reg_we[0]) begin
        if (reg_wbe[3]) start_q      <= reg_wdata[31:24];
        if (reg_wbe[1]) src_w_q[9:8] <= reg_wdata[9:8];
        if (reg_wbe[0]) src_w_q[7:0] <= reg_wdata[7:0];
      end
      if (reg_we[1]) begin
        if (reg_wbe[3]) h_ratio_q[15:8] <= reg_wdata[31:24];
        if (reg_wbe[2]) h_ratio_q[7:0]  <= reg_wdata[23:16];
        if (reg_wbe[1]) w_ratio_q[15:8] <= reg_wdata[15:8];
        if (reg_wbe[0]) w_ratio_q[7:0]  <= reg_wdata[7:0];
      end
      if (reg_we[2]) begin
        if (reg_wbe[1]) src_y_q[9:8] <= reg_wdata[9:8];
        if (reg_wbe[0]) src_y_q[7:0] <= reg_wdata[7:0];
      end
    end
  end

  always_comb begin
    ctrl       = '0;
    ctrl.start = start_q;
    ctrl.busy  = busy;
    ctrl.done  = done;
    ctrl.width = src_w_q;
  end
  assign reg_rdata[0] = ctrl;
  assign reg_rdata[1] = {h_ratio_q, w_ratio_q};
  assign reg_rdata[2] = {22'h0, src_y_q};
  assign reg_rdata[3] = {4'h0, d_y_min, 4'h0, d_y_max};

  scale_core #(.SRC_BASE(SRC_BASE), .DST_BASE(DST_BASE), .DST_PIX(DST_PIX)) u_core (
    .clk(clk), .rst(rst), .go(go), .src_w(src_w_q), .w_ratio(w_ratio_q),
    .h_ratio(h_ratio_q), .src_y(src_y_q), .busy(busy), .done(done),
    .d_y_min(d_y_min), .d_y_max(d_y_max),
    .a_en(ca_en), .a_we(ca_we), .a_addr(ca_addr), .a_din(ca_din), .a_dout(pa_dout),
    .b_en(cb_en), .b_we(cb_we), .b_addr(cb_addr), .b_din(cb_din), .b_dout(pb_dout)
  );

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
