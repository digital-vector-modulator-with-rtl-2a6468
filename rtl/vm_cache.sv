// vm_cache: holds the IQ vector the sample buffer currently represents.
//
// A plain register pair. When the controller pulses store, the vector on
// i_in/q_in is taken at the next rising clock edge and then drives the
// comparator's "old" input and the sample calculator. The original description states
// that the cache is cleared to zero at start; reset here is synchronous and
// active high, which is this design's choice.
//
// Timing: i_out/q_out change one clock after store is high.
module vm_cache #(
  parameter int IQ_BITS = 18   // bits per I or Q value
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      store,
  input  logic signed [IQ_BITS-1:0] i_in,
  input  logic signed [IQ_BITS-1:0] q_in,
  output logic signed [IQ_BITS-1:0] i_out,
  output logic signed [IQ_BITS-1:0] q_out
);

  always_ff @(posedge clk) begin
    if (rst) begin
      i_out <= '0;
      q_out <= '0;
    end else if (store) begin
      i_out <= i_in;
      q_out <= q_in;
    end
  end

endmodule
