// access_counter: number of accesses of one functional unit.
//
// A cycle counts as an access of the unit when its monitored inputs (data
// input and control signal, given here as one vector) differ from their value
// in the previous cycle. Counting changes of the inputs follows the
// description of the access counter; treating a change in any of the bits as
// an access, and saturating at all ones with a sticky overflow flag, are this
// design's own choices.
//
// Interface: sig_cur / sig_prev are the unit's inputs in this and the previous
// cycle; count_en selects the cycles that are counted; clr (synchronous)
// zeroes count and flag and takes precedence.
// Timing: an access shows in count one clock later.
module access_counter #(
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

  logic accessed;
  assign accessed = (sig_cur != sig_prev);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count    <= '0;
      overflow <= 1'b0;
    end else if (clr) begin
      count    <= '0;
      overflow <= 1'b0;
    end else if (count_en && accessed) begin
      if (&count) begin
        overflow <= 1'b1;
      end else begin
        count <= count + 1'b1;
      end
    end
  end

endmodule
