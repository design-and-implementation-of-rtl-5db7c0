// Bus-functional master for the IPIC (IPIF-to-user-logic) port set of the
// accelerators, used by the testbenches. It plays the IPIF side: drives a
// register access on one chip-enable bit or an address-range access with
// ArCS, holds it until the acknowledge and releases it on the falling edge
// after it. Drives change on falling clock edges to stay clear of the
// design's rising-edge sampling. wait_cycles counts, per access, the cycles
// spent waiting beyond the minimum (address-range stalls while the device
// is busy).
interface ipic_bfm #(
  parameter int unsigned NUM_REGS = 1,
  parameter logic [31:0] AR_BASE  = 32'h1001_0000,
  parameter int unsigned AR_LSB   = 4
) (
  input logic clk
);
  logic [31:0]         Addr;
  logic [63:0]         Data;
  logic [7:0]          BE;
  logic [NUM_REGS-1:0] RdCE;
  logic [NUM_REGS-1:0] WrCE;
  logic                RNW;
  logic                ArCS;
  logic [63:0]         ArData;
  logic [7:0]          ArBE;
  logic [63:0]         IP_Data;
  logic [63:0]         IP_ArData;
  logic                RdAck;
  logic                WrAck;
  int unsigned         wait_cycles;

  task automatic idle();
    Addr = '0; Data = '0; BE = '0; RdCE = '0; WrCE = '0;
    RNW = 1'b1; ArCS = 1'b0; ArData = '0; ArBE = '0;
    wait_cycles = 0;
  endtask

  task automatic wait_ack(input logic rd);
    int n = 0;
    forever begin
      @(negedge clk);
      if (rd ? RdAck : WrAck) break;
      n++;
    end
    if (n > 0) wait_cycles += n;
  endtask

  task automatic reg_write(input int k, input logic [31:0] d, input logic [3:0] be = 4'hF);
    @(negedge clk);
    WrCE = '0; WrCE[NUM_REGS-1-k] = 1'b1;
    Data = {d, 32'h0}; BE = {be, 4'h0}; RNW = 1'b0;
    wait_ack(1'b0);
    WrCE = '0; RNW = 1'b1;
  endtask

  task automatic reg_read(input int k, output logic [31:0] d);
    @(negedge clk);
    RdCE = '0; RdCE[NUM_REGS-1-k] = 1'b1; RNW = 1'b1;
    wait_ack(1'b1);
    d = IP_Data[63:32];
    RdCE = '0;
  endtask

  task automatic ar_write(input int unsigned word, input logic [63:0] d,
                          input logic [7:0] be = 8'hFF);
    @(negedge clk);
    Addr = AR_BASE + (word << AR_LSB); ArCS = 1'b1; RNW = 1'b0;
    ArData = d; ArBE = be;
    wait_ack(1'b0);
    ArCS = 1'b0; RNW = 1'b1;
  endtask

  task automatic ar_read(input int unsigned word, output logic [63:0] d);
    @(negedge clk);
    Addr = AR_BASE + (word << AR_LSB); ArCS = 1'b1; RNW = 1'b1;
    wait_ack(1'b1);
    d = IP_ArData;
    ArCS = 1'b0;
  endtask
endinterface
