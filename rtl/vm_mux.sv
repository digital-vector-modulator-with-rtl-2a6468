// vm_mux: chooses what enters the circular sample buffer.
//
// With select low the buffer's own output (in2) is written back, so the
// stored period repeats. With select high the next new sample from the
// loader (in1) is written instead. Combinational.
module vm_mux #(
  parameter int SAMPLE_BITS = 14   // bits per output sample
) (
  input  logic                          select,
  input  logic signed [SAMPLE_BITS-1:0] in1,      // from the loader
  input  logic signed [SAMPLE_BITS-1:0] in2,      // from the shifter output
  output logic signed [SAMPLE_BITS-1:0] data_out
);

  always_comb data_out = select ? in1 : in2;

endmodule
