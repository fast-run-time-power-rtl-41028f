// tb_access_counter: drives random current/previous samples, enable and clear
// into a 4-bit access counter and compares count and overflow flag every
// cycle with a reference model (count a cycle whose samples differ, saturate
// at 15 and flag the access that was lost, clear first).
module tb_access_counter;
  localparam int unsigned W = 8;
  localparam int unsigned CNT_W = 4;

  logic clk = 0, rst_n = 0, clr = 0, count_en = 0;
  logic [W-1:0] sig_cur = '0, sig_prev = '0;
  logic [CNT_W-1:0] count;
  logic overflow;
  int checks = 0, failures = 0;
  int exp_count = 0;
  bit exp_ovf = 0;
  int n_sat = 0, n_clr = 0, n_acc = 0;

  access_counter #(.W(W), .CNT_W(CNT_W)) dut (.*);

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
      clr      = ($urandom % 60) == 0;
      sig_prev = W'($urandom);
      sig_cur  = ($urandom % 3 == 0) ? sig_prev : W'($urandom);
      // reference
      if (clr) begin
        exp_count = 0; exp_ovf = 0; n_clr++;
      end else if (count_en && sig_cur != sig_prev) begin
        n_acc++;
        if (exp_count == (1 << CNT_W) - 1) begin exp_ovf = 1; n_sat++; end
        else exp_count++;
      end
      @(posedge clk); #1;
      checks++;
      if (int'(count) != exp_count || overflow != exp_ovf) begin
        failures++;
        $display("FAIL k=%0d count=%0d exp=%0d ovf=%0b exp=%0b", k, count, exp_count, overflow, exp_ovf);
      end
    end
    checks++;
    if (n_sat == 0 || n_clr == 0 || n_acc == 0) begin
      failures++; $display("FAIL saturation/clear/access not exercised");
    end
    $display("accesses=%0d saturated=%0d clears=%0d", n_acc, n_sat, n_clr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
