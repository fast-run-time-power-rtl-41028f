// tb_ahb_counter_regs: exercises the monitor's AHB slave. The counts and
// flags of two units are driven from the testbench; it checks the RUN bit,
// the one-cycle clear pulse, the cycle counter (cycles counted while RUN is
// set, cleared by CLEAR), the CONFIG and STATUS registers, the readback of
// every counter in single and pipelined reads, unmapped addresses, and the
// zero-wait-state OKAY response.
module tb_ahb_counter_regs;
  import pm_pkg::*;
  localparam int unsigned N = 2;
  localparam int unsigned CNT_W = 32;

  logic clk = 0;
  always #5 clk = ~clk;

  ahb_lite_master_if bus (.HCLK(clk));

  logic run, clr;
  logic [CNT_W-1:0] acc_count [N];
  logic [CNT_W-1:0] sw_count  [N];
  logic acc_overflow [N];
  logic sw_overflow  [N];
  int checks = 0, failures = 0;
  int clr_pulses = 0, clr_len = 0;

  ahb_counter_regs #(.N_UNITS(N), .CNT_W(CNT_W)) dut (
    .HCLK(clk), .HRESETn(bus.HRESETn), .HSEL(bus.HSEL), .HADDR(bus.HADDR),
    .HTRANS(bus.HTRANS), .HWRITE(bus.HWRITE), .HSIZE(bus.HSIZE),
    .HWDATA(bus.HWDATA), .HREADY(bus.HREADY), .HRDATA(bus.HRDATA),
    .HREADYOUT(bus.HREADYOUT), .HRESP(bus.HRESP),
    .run(run), .clr(clr), .acc_count(acc_count), .sw_count(sw_count),
    .acc_overflow(acc_overflow), .sw_overflow(sw_overflow));

  // Count clear pulses and their length; check the response every cycle.
  always @(posedge clk) begin
    if (clr) clr_len++;
    else if (clr_len != 0) begin
      clr_pulses++;
      if (clr_len != 1) begin failures++; $display("FAIL clear pulse %0d cycles", clr_len); end
      clr_len = 0;
    end
    if (bus.HRESETn && (bus.HREADYOUT !== 1'b1 || bus.HRESP !== 1'b0)) begin
      failures++; $display("FAIL HREADYOUT/HRESP");
    end
  end

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++; $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, d2, c0, c1;
    bus.idle();
    bus.HRESETn = 0;
    for (int i = 0; i < N; i++) begin
      acc_count[i] = 32'h1000_0000 * (i + 1) + 32'h11;
      sw_count[i]  = 32'hA000_0000 + 32'h22 * (i + 1);
      acc_overflow[i] = 0; sw_overflow[i] = 0;
    end
    repeat (3) @(negedge clk);
    bus.HRESETn = 1;

    bus.read(32'(REG_CTRL), d);   expect_eq("CTRL after reset", d, 0);
    expect_eq("run after reset", 32'(run), 0);
    bus.read(32'(REG_CYCLES), d); expect_eq("CYCLES while stopped", d, 0);
    bus.read(32'(REG_CONFIG), d); expect_eq("CONFIG", d, {16'd0, 8'(CNT_W), 8'(N)});

    // Run for a known number of cycles: RUN is set at the edge ending the
    // write data phase and cleared at the edge ending the second one.
    bus.write(32'(REG_CTRL), 32'h1);
    expect_eq("run set", 32'(run), 1);
    repeat (37) @(negedge clk);
    bus.write(32'(REG_CTRL), 32'h0);
    expect_eq("run cleared", 32'(run), 0);
    bus.read(32'(REG_CYCLES), c0);
    // RUN is seen high at the edge after the first write's data phase and
    // up to the edge ending the second write's data phase: 1 + 37 + 2 edges.
    expect_eq("CYCLES counted while running", c0, 40);
    repeat (10) @(negedge clk);
    bus.read(32'(REG_CYCLES), c1); expect_eq("CYCLES frozen while stopped", c1, c0);

    // Counter readback, single and pipelined.
    for (int i = 0; i < N; i++) begin
      bus.read(32'(REG_UNIT0) + 8*i, d);     expect_eq($sformatf("ACCESS[%0d]", i), d, acc_count[i]);
      bus.read(32'(REG_UNIT0) + 8*i + 4, d); expect_eq($sformatf("SWITCH[%0d]", i), d, sw_count[i]);
    end
    bus.read_pair(32'(REG_UNIT0) + 4, 32'(REG_UNIT0) + 8, d, d2);
    expect_eq("pipelined SWITCH[0]", d, sw_count[0]);
    expect_eq("pipelined ACCESS[1]", d2, acc_count[1]);
    bus.read(32'(REG_UNIT0) + 8*N, d); expect_eq("unit past the last", d, 0);
    bus.read(32'h0000_0FFC, d);        expect_eq("unmapped", d, 0);

    // STATUS bits.
    acc_overflow[1] = 1; sw_overflow[0] = 1;
    bus.read(32'(REG_STATUS), d); expect_eq("STATUS", d, 32'h0000_0102);
    acc_overflow[1] = 0; sw_overflow[0] = 0;

    // A write elsewhere must not change the control register.
    bus.write(32'(REG_CYCLES), 32'h3);
    expect_eq("run unchanged by other write", 32'(run), 0);

    // CLEAR: one pulse, cycle counter back to zero, RUN written at the same time.
    bus.write(32'(REG_CTRL), 32'h3);
    @(negedge clk);
    bus.read(32'(REG_CTRL), d); expect_eq("CTRL reads RUN only", d, 1);
    bus.write(32'(REG_CTRL), 32'h0);
    bus.read(32'(REG_CYCLES), d);
    // Cleared at the edge after the write's data phase; then counted at the
    // edge before the idle negedge, the two of the read and the two of the
    // write that stops the monitor.
    expect_eq("CYCLES restarted after CLEAR", d, 5);
    repeat (3) @(negedge clk);
    expect_eq("one clear pulse", 32'(clr_pulses), 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
