// pm_pkg: types and constants shared by the run-time power monitor.
//
// The monitor watches the functional units of a DSP core and keeps, for each
// unit, an access counter and a bit-switch counter. The host processor reads
// them through an AHB slave. This package holds the unit numbering (the order
// ALU, decoder, barrel shifter follows the unit table of the monitoring tool),
// the default counter width and the register map of that slave. The register
// map and the AHB encodings used here are this design's own choices.
package pm_pkg;

  // Counter width. 32 bits hold every count the monitoring results report
  // (largest: 3,930,033,152 bit switches of the ALU, below 2^32).
  localparam int unsigned CNT_W_DEFAULT = 32;

  // Monitored units of the DSP core.
  localparam int unsigned NUM_UNITS = 3;
  typedef enum logic [1:0] {
    UNIT_ALU     = 2'd0,
    UNIT_DECODER = 2'd1,
    UNIT_BSHIFT  = 2'd2
  } unit_e;

  // AHB transfer types (HTRANS) and responses (HRESP).
  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;
  localparam logic HRESP_OKAY = 1'b0;
  localparam logic [2:0] HSIZE_WORD = 3'b010;

  // Register map (byte offsets, 32-bit registers).
  //   0x00 CTRL    bit0 RUN (read/write), bit1 CLEAR (write 1: clear all counters, reads 0)
  //   0x04 STATUS  bit i: access counter i saturated, bit 8+i: switch counter i
  //                saturated, bit 31: cycle counter saturated (all sticky until CLEAR)
  //   0x08 CYCLES  cycles counted while RUN was set
  //   0x0C CONFIG  [7:0] number of units, [15:8] counter width
  //   0x10+8*i     ACCESS count of unit i
  //   0x14+8*i     SWITCH count of unit i
  localparam logic [11:0] REG_CTRL   = 12'h000;
  localparam logic [11:0] REG_STATUS = 12'h004;
  localparam logic [11:0] REG_CYCLES = 12'h008;
  localparam logic [11:0] REG_CONFIG = 12'h00C;
  localparam logic [11:0] REG_UNIT0  = 12'h010;
  localparam int unsigned CTRL_RUN_BIT   = 0;
  localparam int unsigned CTRL_CLEAR_BIT = 1;
  localparam int unsigned STATUS_SW_BASE  = 8;
  localparam int unsigned STATUS_CYC_BIT  = 31;

endpackage
