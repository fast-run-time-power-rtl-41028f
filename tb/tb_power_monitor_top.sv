// tb_power_monitor_top: end-to-end test of the power monitor, with 16-bit
// counters so that saturation can be reached in a short run.
//
// A behavioural activity source stands in for the DSP core: the decoder tap
// sees a new instruction word on most cycles, the ALU tap new operands on
// about a third of the cycles and the barrel-shifter tap on a few. The AHB
// master plays the role of the counter collector on the host processor:
// clear, run, stop, read every register. A reference model keeps its own
// previous values of the taps and counts accesses (any change) and bit
// switches (popcount of the XOR) on every clock edge of the measurement
// window; the taps are held still outside that window.
//
// Mechanisms that must occur, each counted: accesses and bit switches in
// every unit, a clear, activity while the monitor is stopped (must not be
// counted), saturation of a counter with its STATUS flag, and a pipelined
// pair of reads.
module tb_power_monitor_top;
  import pm_pkg::*;
  localparam int unsigned CNT_W = 16;
  localparam int unsigned ALU_W = 80 + 8;
  localparam int unsigned DEC_W = 16 + 2;
  localparam int unsigned BS_W  = 40 + 6;
  localparam longint MAXC = (64'd1 << CNT_W) - 1;

  logic clk = 0;
  always #5 clk = ~clk;

  ahb_lite_master_if bus (.HCLK(clk));

  logic [79:0] alu_data = '0;
  logic [7:0]  alu_ctrl = '0;
  logic [15:0] dec_data = '0;
  logic [1:0]  dec_ctrl = '0;
  logic [39:0] bs_data  = '0;
  logic [5:0]  bs_ctrl  = '0;

  power_monitor_top #(.CNT_W(CNT_W)) dut (
    .HCLK(clk), .HRESETn(bus.HRESETn), .HSEL(bus.HSEL), .HADDR(bus.HADDR),
    .HTRANS(bus.HTRANS), .HWRITE(bus.HWRITE), .HSIZE(bus.HSIZE),
    .HWDATA(bus.HWDATA), .HREADY(bus.HREADY), .HRDATA(bus.HRDATA),
    .HREADYOUT(bus.HREADYOUT), .HRESP(bus.HRESP),
    .alu_data, .alu_ctrl, .dec_data, .dec_ctrl, .bs_data, .bs_ctrl);

  int checks = 0, failures = 0;

  // Reference model
  logic [ALU_W-1:0] p_alu;
  logic [DEC_W-1:0] p_dec;
  logic [BS_W-1:0]  p_bs;
  longint m_acc [NUM_UNITS];
  longint m_sw  [NUM_UNITS];
  bit     m_aovf [NUM_UNITS];
  bit     m_sovf [NUM_UNITS];
  bit     window = 0;
  bit     activity = 0;

  // mechanism counters
  int n_clear = 0, n_stopped_activity = 0, n_saturation = 0, n_pipelined = 0;

  task automatic model_reset();
    for (int u = 0; u < NUM_UNITS; u++) begin
      m_acc[u] = 0; m_sw[u] = 0; m_aovf[u] = 0; m_sovf[u] = 0;
    end
  endtask

  task automatic model_add(int u, int changed, int nbits);
    if (changed != 0) begin
      if (m_acc[u] == MAXC) m_aovf[u] = 1; else m_acc[u]++;
    end
    m_sw[u] += nbits;
    if (m_sw[u] > MAXC) begin m_sw[u] = MAXC; m_sovf[u] = 1; end
  endtask

  always @(posedge clk) begin
    if (window) begin
      model_add(UNIT_ALU,     int'({alu_ctrl, alu_data} != p_alu), $countones({alu_ctrl, alu_data} ^ p_alu));
      model_add(UNIT_DECODER, int'({dec_ctrl, dec_data} != p_dec), $countones({dec_ctrl, dec_data} ^ p_dec));
      model_add(UNIT_BSHIFT,  int'({bs_ctrl, bs_data} != p_bs),    $countones({bs_ctrl, bs_data} ^ p_bs));
    end
    p_alu <= {alu_ctrl, alu_data};
    p_dec <= {dec_ctrl, dec_data};
    p_bs  <= {bs_ctrl, bs_data};
  end

  // Activity source standing in for the DSP core.
  logic [15:0] program_mem [8];
  int pc = 0;
  always @(negedge clk) begin
    if (activity) begin
      pc = (pc + 1) % 8;
      dec_data <= ($urandom % 8 == 0) ? dec_data : program_mem[pc];
      dec_ctrl <= 2'b01;
      if ($urandom % 3 == 0) begin
        alu_data <= {$urandom, $urandom, 16'($urandom)};
        alu_ctrl <= 8'($urandom % 12);
      end
      if ($urandom % 20 == 0) begin
        bs_data <= {8'($urandom), $urandom};
        bs_ctrl <= 6'($urandom);
      end
    end
  end

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic check_all(string tag, longint exp_cycles);
    logic [31:0] d;
    logic [31:0] st_exp;
    st_exp = '0;
    for (int u = 0; u < NUM_UNITS; u++) begin
      bus.read(32'(REG_UNIT0) + 8*u, d);     expect_eq($sformatf("%s ACCESS[%0d]", tag, u), d, m_acc[u]);
      bus.read(32'(REG_UNIT0) + 8*u + 4, d); expect_eq($sformatf("%s SWITCH[%0d]", tag, u), d, m_sw[u]);
      st_exp[u] = m_aovf[u];
      st_exp[STATUS_SW_BASE + u] = m_sovf[u];
    end
    bus.read(32'(REG_CYCLES), d);
    st_exp[STATUS_CYC_BIT] = (exp_cycles > MAXC);
    expect_eq({tag, " CYCLES"}, d, (exp_cycles > MAXC) ? MAXC : exp_cycles);
    bus.read(32'(REG_STATUS), d); expect_eq({tag, " STATUS"}, d, st_exp);
  endtask

  // One measurement: clear, run, n cycles of activity, stop.
  task automatic measure(int n);
    bus.write(32'(REG_CTRL), 32'h2);          // CLEAR
    n_clear++;
    model_reset();
    bus.write(32'(REG_CTRL), 32'h1);          // RUN
    window = 1; activity = 1;
    repeat (n) @(negedge clk);
    activity = 0;
    @(negedge clk);                           // last change reaches the counters
    bus.write(32'(REG_CTRL), 32'h0);          // STOP
    window = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, d2;
    longint acc_total;
    for (int i = 0; i < 8; i++) program_mem[i] = 16'(i * 16'h1357 + 16'h0F0F);
    bus.idle();
    bus.HRESETn = 0;
    repeat (3) @(negedge clk);
    bus.HRESETn = 1;
    bus.read(32'(REG_CONFIG), d);
    expect_eq("CONFIG", d, {16'd0, 8'(CNT_W), 8'(NUM_UNITS)});

    // Measurement 1: short run, no saturation. RUN is sampled high from the
    // edge ending its write through the edge ending the STOP write:
    // 1 + n + 1 + 2 edges.
    measure(300);
    check_all("run1", 300 + 4);
    acc_total = m_acc[0] + m_acc[1] + m_acc[2];
    for (int u = 0; u < NUM_UNITS; u++) begin
      checks++;
      if (m_acc[u] == 0 || m_sw[u] == 0) begin failures++; $display("FAIL unit %0d idle", u); end
      $display("unit %0d: accesses %0d (%0d%%), bit switches %0d", u, m_acc[u],
               (100 * m_acc[u]) / acc_total, m_sw[u]);
    end

    // Activity while stopped must not be counted.
    activity = 1;
    repeat (50) @(negedge clk);
    activity = 0;
    n_stopped_activity++;
    check_all("stopped", 300 + 4);

    // Pipelined reads.
    bus.read_pair(32'(REG_UNIT0), 32'(REG_UNIT0) + 4, d, d2);
    expect_eq("pipelined ACCESS[0]", d, m_acc[0]);
    expect_eq("pipelined SWITCH[0]", d2, m_sw[0]);
    n_pipelined++;

    // Measurement 2: long enough for the ALU switch counter to saturate.
    measure(7000);
    check_all("run2", 7000 + 4);
    if (m_sovf[UNIT_ALU]) n_saturation++;

    // Clear on its own.
    bus.write(32'(REG_CTRL), 32'h2);
    n_clear++;
    model_reset();
    check_all("cleared", 0);

    checks++;
    if (n_clear == 0 || n_stopped_activity == 0 || n_saturation == 0 || n_pipelined == 0) begin
      failures++;
      $display("FAIL mechanism missing: clear=%0d stopped=%0d saturation=%0d pipelined=%0d",
               n_clear, n_stopped_activity, n_saturation, n_pipelined);
    end
    $display("mechanisms: clear=%0d stopped-activity=%0d saturation=%0d pipelined-read=%0d",
             n_clear, n_stopped_activity, n_saturation, n_pipelined);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
