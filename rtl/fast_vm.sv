// fast_vm: digital vector modulator that turns an IQ vector into a stream
// of DAC samples of an intermediate-frequency sine wave.
//
// The output is a sine of frequency f_clk / NUMBER_OF_SAMPLES_PER_PERIOD
// (10 MHz at a 100 MHz clock with the default 10 samples) whose amplitude
// and phase follow the IQ vector: sample k of each period is
// I*cos(2*pi*k/N) - Q*sin(2*pi*k/N), scaled to the sample width. Instead of
// multiplying on every clock, which would limit the clock to the speed of
// the hardware multipliers, the whole period is computed once per vector
// change and kept in a circular buffer that is read out at the full clock
// rate. The blocks and their wiring follow the original design's block diagram:
//   cache       register of the IQ vector the buffer represents
//   comparator  input vector differs from the cached one
//   calculator  all N samples in parallel (sine/cosine tables, multipliers)
//   loader      parallel-in, serial-out register of the new period
//   multiplexer old sample (recirculate) or new sample from the loader
//   shifter     N-word circular buffer; its head word goes to the DAC
//   machine     six-state controller (READY, UPLOAD, CALCULATE, LOAD, SYNC,
//               LOAD_WAIT)
// The new period is switched in at a period boundary, so the output never
// shows a partial period of mixed data.
//
// Interface (names and the three width generics as in the original core's entity
// declaration): int_clk, int_rst (synchronous, active high), i and q
// (signed, assumed synchronous to int_clk), sample (signed two's complement
// DAC word, registered) and debug. debug[5:0] is the controller state one-hot
// (bit 0 READY .. bit 5 LOAD_WAIT), debug[6] the shifter's sync and debug[7]
// not_equal; that assignment is this design's choice.
//
// Timing: if a new vector is present in a READY cycle, the first sample of
// the new period appears 3 + CALC_CYCLES + T_sync + N cycles later, where
// T_sync is 1 .. N depending on the buffer's phase. Meanwhile the old period
// keeps playing. The cache takes the input as it stands in the UPLOAD cycle,
// one clock after the change was seen. A vector that changes later during an
// update is taken up once the update has finished.
module fast_vm
  import vm_pkg::*;
#(
  parameter int NUMBER_OF_BITS_PER_SAMPLE    = 14,
  parameter int NUMBER_OF_SAMPLES_PER_PERIOD = 10,
  parameter int NUMBER_OF_BITS_PER_IQVALUE   = 18,
  parameter int CALC_CYCLES                  = 3
) (
  input  logic                                        int_clk,
  input  logic                                        int_rst,
  input  logic signed [NUMBER_OF_BITS_PER_IQVALUE-1:0] i,
  input  logic signed [NUMBER_OF_BITS_PER_IQVALUE-1:0] q,
  output logic signed [NUMBER_OF_BITS_PER_SAMPLE-1:0]  sample,
  output logic [7:0]                                  debug
);

  localparam int SB = NUMBER_OF_BITS_PER_SAMPLE;
  localparam int N  = NUMBER_OF_SAMPLES_PER_PERIOD;
  localparam int IB = NUMBER_OF_BITS_PER_IQVALUE;

  logic signed [IB-1:0] cache_i, cache_q;
  logic signed [SB-1:0] new_samples [N];
  logic signed [SB-1:0] loader_out, mux_out, shifter_out;
  logic                 not_equal, samples_ready, sync;
  logic                 cache_load, loader_load, mux_select;
  logic [5:0]           state_onehot;

  vm_machine #(.SAMPLES(N)) u_machine (
    .clk           (int_clk),
    .rst           (int_rst),
    .not_equal     (not_equal),
    .samples_ready (samples_ready),
    .sync          (sync),
    .cache_load    (cache_load),
    .loader_load   (loader_load),
    .mux_select    (mux_select),
    .state_onehot  (state_onehot)
  );

  vm_cache #(.IQ_BITS(IB)) u_cache (
    .clk   (int_clk),
    .rst   (int_rst),
    .store (cache_load),
    .i_in  (i),
    .q_in  (q),
    .i_out (cache_i),
    .q_out (cache_q)
  );

  vm_comparator #(.IQ_BITS(IB)) u_comparator (
    .new_i     (i),
    .new_q     (q),
    .old_i     (cache_i),
    .old_q     (cache_q),
    .not_equal (not_equal)
  );

  vm_calculator #(
    .SAMPLES     (N),
    .SAMPLE_BITS (SB),
    .IQ_BITS     (IB),
    .CALC_CYCLES (CALC_CYCLES)
  ) u_calculator (
    .clk     (int_clk),
    .rst     (int_rst),
    .start   (cache_load),
    .i_val   (cache_i),
    .q_val   (cache_q),
    .samples (new_samples),
    .ready   (samples_ready)
  );

  vm_loader #(.SAMPLES(N), .SAMPLE_BITS(SB)) u_loader (
    .clk      (int_clk),
    .rst      (int_rst),
    .load     (loader_load),
    .shift    (mux_select),
    .data_in  (new_samples),
    .data_out (loader_out)
  );

  vm_mux #(.SAMPLE_BITS(SB)) u_mux (
    .select   (mux_select),
    .in1      (loader_out),
    .in2      (shifter_out),
    .data_out (mux_out)
  );

  vm_shifter #(.SAMPLES(N), .SAMPLE_BITS(SB)) u_shifter (
    .clk      (int_clk),
    .rst      (int_rst),
    .data_in  (mux_out),
    .data_out (shifter_out),
    .sync     (sync)
  );

  always_comb begin
    sample = shifter_out;
    debug  = {not_equal, sync, state_onehot};
  end

endmodule
