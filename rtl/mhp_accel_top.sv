// The two MHP video/graphics accelerators of one FPGA design, side by side:
// the composition peripheral (graphics plane SRC_OVER video plane, one row at
// a time) and the scaling peripheral (nearest-neighbour scaling of one video
// row at a time). Each is the user logic of its own PLB device; the IPIF
// that attaches it to the PLB is not part of this RTL, so each device's IPIC
// signal set is brought out with a cmp_ or scl_ prefix. Both share the PLB
// clock and reset, as in a single-clock EDK system.
//
// Port meanings and timing are those of compose_ip and scale_ip. busy, done
// and ar_stall of each device are brought out for observation (in the full
// system software reads busy and done from the control register).
module mhp_accel_top
  import mhp_pkg::*;
(
  input  logic              Bus2IP_Clk,
  input  logic              Bus2IP_Reset,
  // composition device
  input  logic [31:0]       cmp_Bus2IP_Addr,
  input  logic [63:0]       cmp_Bus2IP_Data,
  input  logic [7:0]        cmp_Bus2IP_BE,
  input  logic [0:0]        cmp_Bus2IP_RdCE,
  input  logic [0:0]        cmp_Bus2IP_WrCE,
  input  logic              cmp_Bus2IP_RNW,
  input  logic              cmp_Bus2IP_ArCS,
  input  logic [63:0]       cmp_Bus2IP_ArData,
  input  logic [7:0]        cmp_Bus2IP_ArBE,
  output logic [63:0]       cmp_IP2Bus_Data,
  output logic [63:0]       cmp_IP2Bus_ArData,
  output logic              cmp_IP2Bus_RdAck,
  output logic              cmp_IP2Bus_WrAck,
  output logic              cmp_busy,
  output logic              cmp_done,
  output logic              cmp_ar_stall,
  // scaling device
  input  logic [31:0]       scl_Bus2IP_Addr,
  input  logic [63:0]       scl_Bus2IP_Data,
  input  logic [7:0]        scl_Bus2IP_BE,
  input  logic [3:0]        scl_Bus2IP_RdCE,
  input  logic [3:0]        scl_Bus2IP_WrCE,
  input  logic              scl_Bus2IP_RNW,
  input  logic              scl_Bus2IP_ArCS,
  input  logic [63:0]       scl_Bus2IP_ArData,
  input  logic [7:0]        scl_Bus2IP_ArBE,
  output logic [63:0]       scl_IP2Bus_Data,
  output logic [63:0]       scl_IP2Bus_ArData,
  output logic              scl_IP2Bus_RdAck,
  output logic              scl_IP2Bus_WrAck,
  output logic              scl_busy,
  output logic              scl_done,
  output logic              scl_ar_stall
);

  compose_ip u_compose (
    .Bus2IP_Clk(Bus2IP_Clk), .Bus2IP_Reset(Bus2IP_Reset),
    .Bus2IP_Addr(cmp_Bus2IP_Addr), .Bus2IP_Data(cmp_Bus2IP_Data), .Bus2IP_BE(cmp_Bus2IP_BE),
    .Bus2IP_RdCE(cmp_Bus2IP_RdCE), .Bus2IP_WrCE(cmp_Bus2IP_WrCE), .Bus2IP_RNW(cmp_Bus2IP_RNW),
    .Bus2IP_ArCS(cmp_Bus2IP_ArCS), .Bus2IP_ArData(cmp_Bus2IP_ArData), .Bus2IP_ArBE(cmp_Bus2IP_ArBE),
    .IP2Bus_Data(cmp_IP2Bus_Data), .IP2Bus_ArData(cmp_IP2Bus_ArData),
    .IP2Bus_RdAck(cmp_IP2Bus_RdAck), .IP2Bus_WrAck(cmp_IP2Bus_WrAck),
    .busy(cmp_busy), .done(cmp_done), .ar_stall(cmp_ar_stall)
  );

  scale_ip u_scale (
    .Bus2IP_Clk(Bus2IP_Clk), .Bus2IP_Reset(Bus2IP_Reset),
    .Bus2IP_Addr(scl_Bus2IP_Addr), .Bus2IP_Data(scl_Bus2IP_Data), .Bus2IP_BE(scl_Bus2IP_BE),
    .Bus2IP_RdCE(scl_Bus2IP_RdCE), .Bus2IP_WrCE(scl_Bus2IP_WrCE), .Bus2IP_RNW(scl_Bus2IP_RNW),
    .Bus2IP_ArCS(scl_Bus2IP_ArCS), .Bus2IP_ArData(scl_Bus2IP_ArData), .Bus2IP_ArBE(scl_Bus2IP_ArBE),
    .IP2Bus_Data(scl_IP2Bus_Data), .IP2Bus_ArData(scl_IP2Bus_ArData),
    .IP2Bus_RdAck(scl_IP2Bus_RdAck), .IP2Bus_WrAck(scl_IP2Bus_WrAck),
    .busy(scl_busy), .done(scl_done), .ar_stall(scl_ar_stall)
  );

endmodule
