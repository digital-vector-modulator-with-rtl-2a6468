// vm_shifter: the circular sample buffer that feeds the DAC.
//
// A SAMPLES-word shift register that moves one place on every clock. Its
// head word, data_out, is the sample sent to the DAC in that cycle; the word
// on data_in (the multiplexer's output) enters at the tail and reaches the
// head SAMPLES cycles later, that is at the same position within the output
// period. With the multiplexer feeding data_out back, the stored period
// repeats for ever, which is how the output keeps running while nothing is
// recomputed.
//
// A phase counter tracks which sample of the period is at the head
// (0 .. SAMPLES-1). sync is high in the cycle where the head holds the last
// sample of a period, so that a word written in the following cycle lands at
// position 0. The original description names the sync output and its purpose; the phase
// counter and the exact cycle of sync are this design's choices.
// Synchronous active-high reset clears the buffer and the phase.
module vm_shifter #(
  parameter int SAMPLES     = 10,  // samples per period
  parameter int SAMPLE_BITS = 14   // bits per sample
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic signed [SAMPLE_BITS-1:0] data_in,
  output logic signed [SAMPLE_BITS-1:0] data_out,
  output logic                          sync
);

  localparam int PH_BITS = (SAMPLES > 1) ? $clog2(SAMPLES) : 1;

  logic signed [SAMPLE_BITS-1:0] regs [SAMPLES];
  logic [PH_BITS-1:0]            phase;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < SAMPLES; k++) regs[k] <= '0;
      phase <= '0;
    end else begin
      for (int k = 0; k < SAMPLES - 1; k++) regs[k] <= regs[k+1];
      regs[SAMPLES-1] <= data_in;
      phase <= (phase == PH_BITS'(SAMPLES - 1)) ? '0 : phase + 1'b1;
    end
  end

  always_comb begin
    data_out = regs[0];
    sync     = (phase == PH_BITS'(SAMPLES - 1));
  end

endmodule
