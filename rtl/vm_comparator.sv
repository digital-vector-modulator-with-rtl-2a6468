// vm_comparator: tells the controller that the IQ vector at the input
// differs from the one held in the cache.
//
// Purely combinational: not_equal is high in any cycle where either the I or
// the Q word at the "new" input differs from the cached "old" vector. The
// controller only looks at it in its READY state, so a vector that changes
// while an update is running is picked up when that update has finished.
module vm_comparator #(
  parameter int IQ_BITS = 18   // bits per I or Q value
) (
  input  logic signed [IQ_BITS-1:0] new_i,
  input  logic signed [IQ_BITS-1:0] new_q,
  input  logic signed [IQ_BITS-1:0] old_i,
  input  logic signed [IQ_BITS-1:0] old_q,
  output logic                      not_equal
);

  always_comb not_equal = (new_i != old_i) || (new_q != old_q);

endmodule
