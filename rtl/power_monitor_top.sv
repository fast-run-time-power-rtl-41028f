// power_monitor_top: counter-based run-time power monitor for a DSP core.
//
// Dynamic power of a functional unit is estimated off-chip as
//   P = N_acc * AvgP_acc + N_bs * AvgP_bs
// from two counts per unit: how often the unit was accessed (N_acc) and how
// many bits of its inputs switched (N_bs). This module holds the hardware
// that produces those counts while the core runs at full speed: one
// monitor_unit each for the DSP's ALU, instruction decoder and barrel
// shifter, which tap the unit's data input and control signal, and an AHB
// slave through which the host processor reads the counts and a cycle count,
// and starts, stops and clears the monitor. The three monitored units and the
// per-unit pair of counters follow the monitoring scheme; the signal widths
// tapped per unit and the register map are this design's own choices.
//
// Interface: AHB-Lite slave (see ahb_counter_regs and pm_pkg for the register
// map); for each unit a data tap and a control tap, sampled on HCLK (the DSP
// core is assumed to run on the AHB clock).
// Timing: at each clock edge with RUN set, the taps are compared with their
// values at the previous edge and the counts updated; an AHB read whose data
// phase follows that edge returns the updated count.
module power_monitor_top #(
  parameter int unsigned CNT_W      = pm_pkg::CNT_W_DEFAULT,
  parameter int unsigned ALU_DATA_W = 80,  // two 40-bit operands
  parameter int unsigned ALU_CTRL_W = 8,   // ALU operation select
  parameter int unsigned DEC_DATA_W = 16,  // instruction word
  parameter int unsigned DEC_CTRL_W = 2,   // decode enable, pipeline stall
  parameter int unsigned BS_DATA_W  = 40,  // shifter operand
  parameter int unsigned BS_CTRL_W  = 6    // signed shift count
) (
  input  logic                  HCLK,
  input  logic                  HRESETn,
  // AHB-Lite slave port
  input  logic                  HSEL,
  input  logic [31:0]           HADDR,
  input  logic [1:0]            HTRANS,
  input  logic                  HWRITE,
  input  logic [2:0]            HSIZE,
  input  logic [31:0]           HWDATA,
  input  logic                  HREADY,
  output logic [31:0]           HRDATA,
  output logic                  HREADYOUT,
  output logic                  HRESP,
  // Taps on the monitored units of the DSP core
  input  logic [ALU_DATA_W-1:0] alu_data,
  input  logic [ALU_CTRL_W-1:0] alu_ctrl,
  input  logic [DEC_DATA_W-1:0] dec_data,
  input  logic [DEC_CTRL_W-1:0] dec_ctrl,
  input  logic [BS_DATA_W-1:0]  bs_data,
  input  logic [BS_CTRL_W-1:0]  bs_ctrl
);
  import pm_pkg::*;

  logic             run;
  logic             clr;
  logic [CNT_W-1:0] acc_count    [NUM_UNITS];
  logic [CNT_W-1:0] sw_count     [NUM_UNITS];
  logic             acc_overflow [NUM_UNITS];
  logic             sw_overflow  [NUM_UNITS];

  monitor_unit #(.DATA_W(ALU_DATA_W), .CTRL_W(ALU_CTRL_W), .CNT_W(CNT_W)) u_mon_alu (
    .clk          (HCLK),
    .rst_n        (HRESETn),
    .clr          (clr),
    .run          (run),
    .data_in      (alu_data),
    .ctrl_in      (alu_ctrl),
    .acc_count    (acc_count[UNIT_ALU]),
    .sw_count     (sw_count[UNIT_ALU]),
    .acc_overflow (acc_overflow[UNIT_ALU]),
    .sw_overflow  (sw_overflow[UNIT_ALU])
  );

  monitor_unit #(.DATA_W(DEC_DATA_W), .CTRL_W(DEC_CTRL_W), .CNT_W(CNT_W)) u_mon_dec (
    .clk          (HCLK),
    .rst_n        (HRESETn),
    .clr          (clr),
    .run          (run),
    .data_in      (dec_data),
    .ctrl_in      (dec_ctrl),
    .acc_count    (acc_count[UNIT_DECODER]),
    .sw_count     (sw_count[UNIT_DECODER]),
    .acc_overflow (acc_overflow[UNIT_DECODER]),
    .sw_overflow  (sw_overflow[UNIT_DECODER])
  );

  monitor_unit #(.DATA_W(BS_DATA_W), .CTRL_W(BS_CTRL_W), .CNT_W(CNT_W)) u_mon_bs (
    .clk          (HCLK),
    .rst_n        (HRESETn),
    .clr          (clr),
    .run          (run),
    .data_in      (bs_data),
    .ctrl_in      (bs_ctrl),
    .acc_count    (acc_count[UNIT_BSHIFT]),
    .sw_count     (sw_count[UNIT_BSHIFT]),
    .acc_overflow (acc_overflow[UNIT_BSHIFT]),
    .sw_overflow  (sw_overflow[UNIT_BSHIFT])
  );

  ahb_counter_regs #(.N_UNITS(NUM_UNITS), .CNT_W(CNT_W)) u_regs (
    .HCLK         (HCLK),
    .HRESETn      (HRESETn),
    .HSEL         (HSEL),
    .HADDR        (HADDR),
    .HTRANS       (HTRANS),
    .HWRITE       (HWRITE),
    .HSIZE        (HSIZE),
    .HWDATA       (HWDATA),
    .HREADY       (HREADY),
    .HRDATA       (HRDATA),
    .HREADYOUT    (HREADYOUT),
    .HRESP        (HRESP),
    .run          (run),
    .clr          (clr),
    .acc_count    (acc_count),
    .sw_count     (sw_count),
    .acc_overflow (acc_overflow),
    .sw_overflow  (sw_overflow)
  );

endmodule
