// tb_monitor_unit: drives a 12-bit data tap and a 4-bit control tap of one
// monitor unit with random values, holds and single-bit changes, toggles run
// and pulses clear, and compares both counts and flags every cycle with a
// reference model that keeps the previous sample itself. The counters are 10
// bits wide so that saturation is reached. It also checks that the first
// sample after reset and after clear is not counted.
module tb_monitor_unit;
  localparam int unsigned DATA_W = 12;
  localparam int unsigned CTRL_W = 4;
  localparam int unsigned CNT_W  = 10;
  localparam int unsigned MAXC   = (1 << CNT_W) - 1;

  logic clk = 0, rst_n = 0, clr = 0, run = 0;
  logic [DATA_W-1:0] data_in = '0;
  logic [CTRL_W-1:0] ctrl_in = '0;
  logic [CNT_W-1:0]  acc_count, sw_count;
  logic              acc_overflow, sw_overflow;
  int checks = 0, failures = 0;

  // reference state
  logic [DATA_W+CTRL_W-1:0] m_prev;
  bit   m_prev_valid = 0;
  int   m_acc = 0, m_sw = 0;
  bit   m_acc_ovf = 0, m_sw_ovf = 0;
  int   n_first_skipped = 0, n_sat = 0, n_stopped = 0;

  monitor_unit #(.DATA_W(DATA_W), .CTRL_W(CTRL_W), .CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step();
    logic [DATA_W+CTRL_W-1:0] cur;
    cur = {ctrl_in, data_in};
    if (clr) begin
      m_acc = 0; m_sw = 0; m_acc_ovf = 0; m_sw_ovf = 0;
    end else if (run && m_prev_valid) begin
      if (cur != m_prev) begin
        if (m_acc == MAXC) m_acc_ovf = 1; else m_acc++;
      end
      m_sw += $countones(cur ^ m_prev);
      if (m_sw > MAXC) begin m_sw = MAXC; m_sw_ovf = 1; n_sat++; end
    end else if (run && !m_prev_valid) begin
      n_first_skipped++;
    end else if (!run && cur != m_prev) begin
      n_stopped++;
    end
    m_prev = cur;
    m_prev_valid = !clr;
    @(posedge clk); #1;
    checks++;
    if (int'(acc_count) != m_acc || int'(sw_count) != m_sw ||
        acc_overflow != m_acc_ovf || sw_overflow != m_sw_ovf) begin
      failures++;
      $display("FAIL t=%0t acc=%0d/%0d sw=%0d/%0d ovf=%b%b/%b%b", $time,
               acc_count, m_acc, sw_count, m_sw, acc_overflow, sw_overflow, m_acc_ovf, m_sw_ovf);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run = 1;
    for (int k = 0; k < 6000; k++) begin
      @(negedge clk);
      case ($urandom % 4)
        0: ;                                        // hold: no access
        1: data_in = data_in ^ (DATA_W'(1) << ($urandom % DATA_W));
        2: ctrl_in = CTRL_W'($urandom);
        default: data_in = DATA_W'($urandom);
      endcase
      if (k % 500 == 400) run = 0;
      if (k % 500 == 450) run = 1;
      clr = (k % 1500 == 1499);
      step();
    end
    checks++;
    if (n_first_skipped < 2 || n_sat == 0 || n_stopped == 0) begin
      failures++;
      $display("FAIL mechanism missing: first=%0d sat=%0d stopped=%0d", n_first_skipped, n_sat, n_stopped);
    end
    $display("first-sample skips=%0d saturations=%0d changes while stopped=%0d",
             n_first_skipped, n_sat, n_stopped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
