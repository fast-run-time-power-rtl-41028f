// tb_switch_counter: drives random samples, enable and clear into an 8-bit
// switch counter over 12-bit samples and compares count and overflow flag
// every cycle with a reference model (add the number of differing bits,
// saturate at 255 and set the flag when a sum would pass it, clear first).
module tb_switch_counter;
  localparam int unsigned W = 12;
  localparam int unsigned CNT_W = 8;

  logic clk = 0, rst_n = 0, clr = 0, count_en = 0;
  logic [W-1:0] sig_cur = '0, sig_prev = '0;
  logic [CNT_W-1:0] count;
  logic overflow;
  int checks = 0, failures = 0;
  int exp_count = 0;
  bit exp_ovf = 0;
  int n_sat = 0, n_clr = 0;

  switch_counter #(.W(W), .CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      count_en = ($urandom % 4) != 0;
      clr      = ($urandom % 80) == 0;
      sig_prev = W'($urandom);
      sig_cur  = W'($urandom);
      if (clr) begin
        exp_count = 0; exp_ovf = 0; n_clr++;
      end else if (count_en) begin
        exp_count += $countones(sig_cur ^ sig_prev);
        if (exp_count > (1 << CNT_W) - 1) begin
          exp_count = (1 << CNT_W) - 1; exp_ovf = 1; n_sat++;
        end
      end
      @(posedge clk); #1;
      checks++;
      if (int'(count) != exp_count || overflow != exp_ovf) begin
        failures++;
        $display("FAIL k=%0d count=%0d exp=%0d ovf=%0b exp=%0b", k, count, exp_count, overflow, exp_ovf);
      end
    end
    checks++;
    if (n_sat == 0 || n_clr == 0) begin
      failures++; $display("FAIL saturation/clear not exercised");
    end
    $display("saturated=%0d clears=%0d", n_sat, n_clr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
