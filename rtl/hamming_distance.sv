// hamming_distance: number of bit switches between two samples of a signal.
//
// This is the inner step of the switching-activity algorithm: the current and
// previous values are XORed and the ones of the result are counted. The loop
// over the bits follows the algorithm as described; building it as one
// combinational adder chain (synthesis turns it into a popcount tree) is this
// design's choice.
//
// Interface: cur, prev are W-bit samples; n_switch (DW bits) is their Hamming distance.
// Timing: purely combinational, no clock.
module hamming_distance #(
  parameter int unsigned W  = 16,
  localparam int unsigned DW = $clog2(W+1)
) (
  input  logic [W-1:0]           cur,
  input  logic [W-1:0]           prev,
  output logic [DW-1:0]    n_switch
);

  logic [W-1:0] diff;

  always_comb begin
    diff = cur ^ prev;
    n_switch = '0;
    for (int unsigned i = 0; i < W; i++) begin
      n_switch = n_switch + DW'(diff[i]);
    end
  end

endmodule
