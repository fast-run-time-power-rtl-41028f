// switch_counter: accumulated bit-switch count of one monitored signal.
//
// Each counted cycle adds the Hamming distance between the signal's current
// and previous value to the running total (total_new = total_old + switches),
// which is the switching-activity algorithm of the monitor. The total
// saturates at all ones instead of wrapping and then raises a sticky
// overflow flag; saturation, the flag and the clear input are this design's
// own choices.
//
// Interface: sig_cur / sig_prev are the signal in this and the previous cycle;
// count_en selects the cycles that are counted; clr (synchronous) zeroes the
// total and the flag and takes precedence over counting.
// Timing: the count of a cycle shows in count one clock later.
module switch_counter #(
  parameter int unsigned W     = 16,
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             count_en,
  input  logic [W-1:0]     sig_cur,
  input  logic [W-1:0]     sig_prev,
  output logic [CNT_W-1:0] count,
  output logic             overflow
);

  localparam int unsigned DW = $clog2(W+1);

  logic [DW-1:0]  n_switch;
  logic [CNT_W:0] sum;

  hamming_distance #(.W(W)) u_hd (
    .cur  (sig_cur),
    .prev (sig_prev),
    .n_switch (n_switch)
  );

  assign sum = {1'b0, count} + (CNT_W+1)'(n_switch);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count    <= '0;
      overflow <= 1'b0;
    end else if (clr) begin
      count    <= '0;
      overflow <= 1'b0;
    end else if (count_en) begin
      if (sum[CNT_W]) begin
        count    <= '1;
        overflow <= 1'b1;
      end else begin
        count <= sum[CNT_W-1:0];
      end
    end
  end

endmodule
