// monitor_unit: access counter and switch counter of one monitored unit.
//
// The unit's data input and control signal are tapped beside the functional
// unit and sampled every clock. The sample of the previous clock is kept in a
// register, and current and previous samples feed an access counter (a change
// of the inputs is an access) and a switch counter (the number of bits that
// changed is added). The previous-state register and the two counters follow
// the monitoring scheme as described. The rest is this design's choice: after
// reset or clear, the first sample only primes the register, and run/clear
// come from the monitor's control register.
//
// Interface: data_in / ctrl_in are the tapped signals; run enables counting;
// clr (synchronous) zeroes both counters and re-primes the register.
// Timing: at clock edge k the taps are compared with their values at edge
// k-1; the counts include that comparison right after edge k.
module monitor_unit #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned CTRL_W = 4,
  parameter int unsigned CNT_W  = pm_pkg::CNT_W_DEFAULT
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              run,
  input  logic [DATA_W-1:0] data_in,
  input  logic [CTRL_W-1:0] ctrl_in,
  output logic [CNT_W-1:0]  acc_count,
  output logic [CNT_W-1:0]  sw_count,
  output logic              acc_overflow,
  output logic              sw_overflow
);

  localparam int unsigned W = DATA_W + CTRL_W;

  logic [W-1:0] sig_cur;
  logic [W-1:0] sig_prev;
  logic         prev_valid;
  logic         count_en;

  assign sig_cur  = {ctrl_in, data_in};
  assign count_en = run && prev_valid;

  // State of the monitored inputs in the previous cycle.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sig_prev   <= '0;
      prev_valid <= 1'b0;
    end else begin
      sig_prev   <= sig_cur;
      prev_valid <= !clr;
    end
  end

  access_counter #(.W(W), .CNT_W(CNT_W)) u_acc (
    .clk      (clk),
    .rst_n    (rst_n),
    .clr      (clr),
    .count_en (count_en),
    .sig_cur  (sig_cur),
    .sig_prev (sig_prev),
    .count    (acc_count),
    .overflow (acc_overflow)
  );

  switch_counter #(.W(W), .CNT_W(CNT_W)) u_sw (
    .clk      (clk),
    .rst_n    (rst_n),
    .clr      (clr),
    .count_en (count_en),
    .sig_cur  (sig_cur),
    .sig_prev (sig_prev),
    .count    (sw_count),
    .overflow (sw_overflow)
  );

endmodule
