// vm_loader: holds a freshly computed period of samples and hands them to
// the circular buffer one at a time.
//
// In the cycle load is high all SAMPLES words are taken in parallel from
// the calculator. While shift is high the register moves one place per
// clock towards its output, so data_out shows sample 0, 1, ... N-1 in
// consecutive shift cycles; zeros fill in from the far end. The parallel
// load and the serial hand-over follow the original description; the load and shift
// controls are this design's, since the original block diagram draws no
// control line into the loader. Synchronous active-high reset clears it.
module vm_loader #(
  parameter int SAMPLES     = 10,  // samples per period
  parameter int SAMPLE_BITS = 14   // bits per sample
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          load,
  input  logic                          shift,
  input  logic signed [SAMPLE_BITS-1:0] data_in [SAMPLES],
  output logic signed [SAMPLE_BITS-1:0] data_out
);

  logic signed [SAMPLE_BITS-1:0] regs [SAMPLES];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < SAMPLES; k++) regs[k] <= '0;
    end else if (load) begin
      for (int k = 0; k < SAMPLES; k++) regs[k] <= data_in[k];
    end else if (shift) begin
      for (int k = 0; k < SAMPLES - 1; k++) regs[k] <= regs[k+1];
      regs[SAMPLES-1] <= '0;
    end
  end

  always_comb data_out = regs[0];

endmodule
