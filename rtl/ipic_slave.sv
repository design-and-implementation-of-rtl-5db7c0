// User-logic side of the IPIF interconnect (IPIC) shared by both
// accelerators: software-register access through the chip enables and
// data-buffer access through the address-range service.
//
// Registers. Bus2IP_WrCE/Bus2IP_RdCE carry one bit per 32-bit register,
// numbered as on the PLB, bit 0 leftmost: register k is selected by bit
// NUM_REGS-1-k of the SystemVerilog vector (with four registers, the third is
// selected by "0010"). A register occupies the upper half of the 64-bit bus,
// Bus2IP_Data[63:32] with byte enables Bus2IP_BE[7:4], which is where a 32-bit
// PowerPC access to the register's base address lands. A write is passed to
// the user logic as a one-cycle reg_we pulse with data and byte enables; a
// read returns reg_rdata on IP2Bus_Data[63:32].
//
// Address range. With Bus2IP_ArCS high the access goes to the data buffer.
// The buffer word address is Bus2IP_Addr[AR_ADDR_LSB+10:AR_ADDR_LSB]; the
// default 4 takes PowerPC address bits 17..27, so that 0x..10 to 0x..1F
// address word 1 and 0x..110 word 0x11 as in the design description.
// Bus2IP_ArBE selects the bytes written; Bus2IP_RNW tells reads from writes.
// While the user logic owns the buffer (buf_busy) an address-range access
// is stalled: no acknowledge is given until the operation has ended.
//
// Handshake (this design's choice, the IPIF's exact timing is not modelled):
// the master holds a request (a CE bit, or ArCS) until it sees the
// acknowledge, a one-cycle pulse on IP2Bus_WrAck or IP2Bus_RdAck in the
// cycle after the access is taken, and drops it in the following cycle. Read
// data is valid in the acknowledge cycle.
module ipic_slave
  import mhp_pkg::*;
#(
  parameter int unsigned NUM_REGS    = 1,
  parameter int unsigned AR_ADDR_LSB = 4
) (
  input  logic                  clk,
  input  logic                  rst,
  // IPIC from the IPIF
  input  logic [31:0]           Bus2IP_Addr,
  input  logic [BUS_DW-1:0]     Bus2IP_Data,
  input  logic [7:0]            Bus2IP_BE,
  input  logic [NUM_REGS-1:0]   Bus2IP_RdCE,
  input  logic [NUM_REGS-1:0]   Bus2IP_WrCE,
  input  logic                  Bus2IP_RNW,
  input  logic                  Bus2IP_ArCS,
  input  logic [BUS_DW-1:0]     Bus2IP_ArData,
  input  logic [7:0]            Bus2IP_ArBE,
  output logic [BUS_DW-1:0]     IP2Bus_Data,
  output logic [BUS_DW-1:0]     IP2Bus_ArData,
  output logic                  IP2Bus_RdAck,
  output logic                  IP2Bus_WrAck,
  // software registers
  output logic [NUM_REGS-1:0]   reg_we,
  output logic [31:0]           reg_wdata,
  output logic [3:0]            reg_wbe,
  input  logic [NUM_REGS-1:0][31:0] reg_rdata,
  // data-buffer port owned by the bus while buf_busy is low
  input  logic                  buf_busy,
  output logic                  buf_en,
  output buf_be_t               buf_we,
  output buf_addr_t             buf_addr,
  output buf_word_t             buf_din,
  input  buf_word_t             buf_dout,
  output logic                  ar_stall
);

  logic        wrack_q, rdack_q;
  logic [31:0] rdata_q;
  logic        reg_wr, reg_rd, ar_wr, ar_rd;
  logic [31:0] rsel;

  assign reg_wr   = (|Bus2IP_WrCE) && !wrack_q;
  assign reg_rd   = (|Bus2IP_RdCE) && !rdack_q;
  assign ar_wr    = Bus2IP_ArCS && !Bus2IP_RNW && !wrack_q && !buf_busy;
  assign ar_rd    = Bus2IP_ArCS &&  Bus2IP_RNW && !rdack_q && !buf_busy;
  assign ar_stall = Bus2IP_ArCS && buf_busy;

  // Register strobes, PLB bit order.
  always_comb begin
    reg_we = '0;
    rsel   = '0;
    for (int k = 0; k < NUM_REGS; k++) begin
      if (reg_wr && Bus2IP_WrCE[NUM_REGS-1-k]) reg_we[k] = 1'b1;
      if (Bus2IP_RdCE[NUM_REGS-1-k])           rsel     = rsel | reg_rdata[k];
    end
  end
  assign reg_wdata = Bus2IP_Data[63:32];
  assign reg_wbe   = Bus2IP_BE[7:4];

  always_ff @(posedge clk) begin
    if (rst) begin
      wrack_q <= 1'b0;
      rdack_q <= 1'b0;
      rdata_q <= '0;
    end else begin
      wrack_q <= reg_wr || ar_wr;
      rdack_q <= reg_rd || ar_rd;
      if (reg_rd) rdata_q <= rsel;
    end
  end

  assign IP2Bus_WrAck  = wrack_q;
  assign IP2Bus_RdAck  = rdack_q;
  assign IP2Bus_Data   = {rdata_q, 32'h0};
  assign IP2Bus_ArData = buf_dout;

  assign buf_en   = ar_wr || ar_rd;
  assign buf_we   = ar_wr ? Bus2IP_ArBE : '0;
  assign buf_addr = Bus2IP_Addr[AR_ADDR_LSB +: BUF_AW];
  assign buf_din  = Bus2IP_ArData;

  // Bus rules: at most one register selected, reads and writes not mixed,
  // register and address-range accesses not at once.
  a_rdce_onehot: assert property (@(posedge clk) disable iff (rst) $onehot0(Bus2IP_RdCE));
  a_wrce_onehot: assert property (@(posedge clk) disable iff (rst) $onehot0(Bus2IP_WrCE));
  a_rd_xor_wr:   assert property (@(posedge clk) disable iff (rst)
                                  !((|Bus2IP_RdCE) && (|Bus2IP_WrCE)));
  a_ar_xor_reg:  assert property (@(posedge clk) disable iff (rst)
                                  !(Bus2IP_ArCS && ((|Bus2IP_RdCE) || (|Bus2IP_WrCE))));

endmodule
