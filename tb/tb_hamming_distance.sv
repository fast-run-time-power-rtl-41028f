// tb_hamming_distance: checks the bit-switch count against $countones of the
// XOR of the two samples, for a narrow (16-bit) and a wide (88-bit) instance,
// on corner cases and random vectors.
module tb_hamming_distance;
  localparam int unsigned WA = 16;
  localparam int unsigned WB = 88;

  logic [WA-1:0] a_cur, a_prev;
  logic [WB-1:0] b_cur, b_prev;
  logic [$clog2(WA+1)-1:0] a_n;
  logic [$clog2(WB+1)-1:0] b_n;
  int checks = 0, failures = 0;

  hamming_distance #(.W(WA)) dut_a (.cur(a_cur), .prev(a_prev), .n_switch(a_n));
  hamming_distance #(.W(WB)) dut_b (.cur(b_cur), .prev(b_prev), .n_switch(b_n));

  task automatic check_now();
    int ea, eb;
    #1;
    ea = $countones(a_cur ^ a_prev);
    eb = $countones(b_cur ^ b_prev);
    checks += 2;
    if (int'(a_n) != ea) begin
      failures++; $display("FAIL W=%0d cur=%h prev=%h got %0d exp %0d", WA, a_cur, a_prev, a_n, ea);
    end
    if (int'(b_n) != eb) begin
      failures++; $display("FAIL W=%0d cur=%h prev=%h got %0d exp %0d", WB, b_cur, b_prev, b_n, eb);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_cur = '0; a_prev = '0; b_cur = '0; b_prev = '0; check_now();
    a_cur = '1; b_cur = '1; check_now();           // every bit switches
    a_prev = '1; b_prev = '1; check_now();         // nothing switches
    a_cur = WA'(1); b_cur = {1'b1, {(WB-1){1'b0}}}; a_prev = '0; b_prev = '0; check_now();
    for (int k = 0; k < 500; k++) begin
      a_cur  = WA'($urandom);
      a_prev = WA'($urandom);
      b_cur  = {$urandom, $urandom, $urandom};
      b_prev = (k % 3 == 0) ? b_cur ^ (WB'(1) << (k % WB)) : {$urandom, $urandom, $urandom};
      check_now();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
