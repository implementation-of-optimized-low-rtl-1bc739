// amp_detect -- Amplitude Detection (AD) of a two's-complement word.
//
// `is_small` is 1 when the word lies within the threshold, -2^k <= din < 2^k,
// i.e. its absolute value is below 2^k. For a two's-complement word this
// holds exactly when the bits from the sign bit down to bit k are all equal:
// all ones (small negative, detected by an AND of those bits) or all zeros
// (small positive, detected by an OR of those bits being 0). The threshold
// exponent k selects, through a mask, which bits take part in the AND and
// the OR; that is the fan-in selection the document leaves to a simple
// comparator.
//
// Interface: din, th_log2 (k) in; is_small out. Combinational.
// The AND/OR-of-upper-bits structure follows the amplitude detector figure;
// the power-of-two threshold chosen at run time is this design's choice.
module amp_detect #(
  parameter int unsigned W    = 16,
  parameter int unsigned TH_W = $clog2(W)
) (
  input  logic [W-1:0]    din,
  input  logic [TH_W-1:0] th_log2,
  output logic            is_small
);
  logic [W-1:0] upper_mask;   // 1 for bit positions >= k
  logic         all_ones, any_one;

  always_comb begin
    for (int i = 0; i < W; i++) upper_mask[i] = (i >= int'(th_log2));
    all_ones = &(din | ~upper_mask);
    any_one  = |(din & upper_mask);
    is_small    = all_ones | ~any_one;
  end
endmodule
