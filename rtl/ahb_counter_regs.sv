// ahb_counter_regs: AHB slave through which the host processor reads the
// monitor's counters, and the monitor's control and cycle counter.
//
// The host processor (the on-chip ARM running the counter collector) polls
// the counters over AHB and forwards them to the analysis tool. That the
// counters are read over AHB and that a cycle count is reported beside them
// follows the monitoring scheme; the register map (see pm_pkg), the RUN and
// CLEAR controls, the sticky saturation flags and the zero-wait-state
// AHB-Lite protocol are this design's own choices.
//
// Interface: an AHB-Lite slave (HSEL, HADDR, HTRANS, HWRITE, HSIZE, HWDATA,
// HREADY in; HRDATA, HREADYOUT, HRESP out) with 32-bit word registers.
// Toward the monitor units it drives run and a one-cycle clr pulse, and it
// takes their counts and overflow flags.
// Timing: every transfer completes with zero wait states; HRDATA is valid in
// the data phase. A write of CLEAR raises clr in the cycle after the data
// phase, and the counters read zero from the cycle after that. Unmapped
// addresses read as zero and ignore writes, with an OKAY response.
module ahb_counter_regs #(
  parameter int unsigned N_UNITS = pm_pkg::NUM_UNITS,
  parameter int unsigned CNT_W   = pm_pkg::CNT_W_DEFAULT
) (
  input  logic             HCLK,
  input  logic             HRESETn,
  // AHB-Lite slave port
  input  logic             HSEL,
  input  logic [31:0]      HADDR,
  input  logic [1:0]       HTRANS,
  input  logic             HWRITE,
  input  logic [2:0]       HSIZE,
  input  logic [31:0]      HWDATA,
  input  logic             HREADY,
  output logic [31:0]      HRDATA,
  output logic             HREADYOUT,
  output logic             HRESP,
  // Monitor side
  output logic             run,
  output logic             clr,
  input  logic [CNT_W-1:0] acc_count    [N_UNITS],
  input  logic [CNT_W-1:0] sw_count     [N_UNITS],
  input  logic             acc_overflow [N_UNITS],
  input  logic             sw_overflow  [N_UNITS]
);
  import pm_pkg::*;

  // Data-phase state of the current transfer.
  logic        d_valid;
  logic        d_write;
  logic [11:0] d_addr;

  logic [CNT_W-1:0] cycles;
  logic             cyc_overflow;

  logic addr_phase;
  assign addr_phase = HSEL && HREADY && HTRANS[1];

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      d_valid <= 1'b0;
      d_write <= 1'b0;
      d_addr  <= '0;
    end else if (HREADY) begin
      d_valid <= addr_phase;
      d_write <= HWRITE;
      d_addr  <= {HADDR[11:2], 2'b00};
    end
  end

  // Control register: RUN is kept, CLEAR is a one-cycle pulse.
  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      run <= 1'b0;
      clr <= 1'b0;
    end else begin
      clr <= 1'b0;
      if (d_valid && d_write && d_addr == REG_CTRL) begin
        run <= HWDATA[CTRL_RUN_BIT];
        clr <= HWDATA[CTRL_CLEAR_BIT];
      end
    end
  end

  // Cycle counter: cycles during which the monitor runs.
  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      cycles       <= '0;
      cyc_overflow <= 1'b0;
    end else if (clr) begin
      cycles       <= '0;
      cyc_overflow <= 1'b0;
    end else if (run) begin
      if (&cycles) cyc_overflow <= 1'b1;
      else         cycles       <= cycles + 1'b1;
    end
  end

  // Read multiplexer.
  logic [31:0] status;
  logic [31:0] rdata;
  logic [11:0] unit_off;
  logic [8:0]  unit_idx;

  always_comb begin
    status = '0;
    for (int unsigned i = 0; i < N_UNITS; i++) begin
      status[i]                  = acc_overflow[i];
      status[STATUS_SW_BASE + i] = sw_overflow[i];
    end
    status[STATUS_CYC_BIT] = cyc_overflow;
  end

  assign unit_off = d_addr - REG_UNIT0;
  assign unit_idx = unit_off[11:3];

  always_comb begin
    rdata = '0;
    case (d_addr)
      REG_CTRL:   rdata[CTRL_RUN_BIT] = run;
      REG_STATUS: rdata = status;
      REG_CYCLES: rdata = 32'(cycles);
      REG_CONFIG: rdata = {16'd0, 8'(CNT_W), 8'(N_UNITS)};
      default: begin
        if (d_addr >= REG_UNIT0 && 32'(unit_idx) < N_UNITS) begin
          for (int unsigned i = 0; i < N_UNITS; i++) begin
            if (32'(unit_idx) == i) begin
              rdata = unit_off[2] ? 32'(sw_count[i]) : 32'(acc_count[i]);
            end
          end
        end
      end
    endcase
  end

  assign HRDATA    = (d_valid && !d_write) ? rdata : '0;
  assign HREADYOUT = 1'b1;
  assign HRESP     = HRESP_OKAY;

  // Registers are 32-bit words: only aligned word transfers are supported.
  a_word_access : assert property (@(posedge HCLK) disable iff (!HRESETn)
    addr_phase |-> (HSIZE == HSIZE_WORD && HADDR[1:0] == 2'b00))
    else $error("ahb_counter_regs: only aligned word transfers are supported");

  // The register fields hold at most 32 bits and 8 status bits per kind.
  initial begin
    assert (CNT_W >= 1 && CNT_W <= 32) else $fatal(1, "CNT_W must be 1..32");
    assert (N_UNITS >= 1 && N_UNITS <= 8) else $fatal(1, "N_UNITS must be 1..8");
  end

endmodule
