// vm_calculator: computes one full period of output samples from an IQ
// vector, all samples at once.
//
// For every sample index k of the N samples in a period it forms
//   s[k] = sat( (I*cos(2*pi*k/N) - Q*sin(2*pi*k/N)) >>> SHIFT )
// with SHIFT = 2*IQ_BITS - SAMPLE_BITS - 1, so that a vector of full-scale
// magnitude 2**(IQ_BITS-1) maps to a sample amplitude of about
// 2**(SAMPLE_BITS-1); results beyond the sample range are clipped. The sine
// and cosine tables are constants computed at elaboration (see vm_pkg) with
// IQ_BITS-bit words, as the original core's table dump does. The 2*N
// multipliers are combinational, fed straight from the cache.
//
// Because hardware multipliers are slower than the rest of the logic, the
// products are given CALC_CYCLES clock periods to settle: start (the cycle
// the cache is written) arms a down-counter and ready is high for exactly
// one cycle, CALC_CYCLES cycles after start. The samples must be taken by
// the loader in the cycle after ready. The original description says only that the step
// takes at least one cycle and depends on the multipliers; the settle
// counter, the I*cos - Q*sin sign convention, the scaling, the truncation and
// the clipping are this design's choices.
module vm_calculator
  import vm_pkg::*;
#(
  parameter int SAMPLES     = 10,  // samples per period of the output signal
  parameter int SAMPLE_BITS = 14,  // bits per output sample
  parameter int IQ_BITS     = 18,  // bits per I or Q value
  parameter int CALC_CYCLES = 3    // clock periods allowed for the multipliers
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          start,
  input  logic signed [IQ_BITS-1:0]     i_val,
  input  logic signed [IQ_BITS-1:0]     q_val,
  output logic signed [SAMPLE_BITS-1:0] samples [SAMPLES],
  output logic                          ready
);

  localparam int PROD_BITS = 2 * IQ_BITS;
  localparam int SUM_BITS  = PROD_BITS + 1;
  localparam int SHIFT     = 2 * IQ_BITS - SAMPLE_BITS - 1;
  localparam int CNT_BITS  = $clog2(CALC_CYCLES + 1);

  typedef logic signed [IQ_BITS-1:0] table_t [SAMPLES];

  function automatic table_t make_sine();
    table_t t;
    for (int k = 0; k < SAMPLES; k++) t[k] = IQ_BITS'(sine_entry(k, SAMPLES, IQ_BITS));
    return t;
  endfunction

  function automatic table_t make_cosine();
    table_t t;
    for (int k = 0; k < SAMPLES; k++) t[k] = IQ_BITS'(cosine_entry(k, SAMPLES, IQ_BITS));
    return t;
  endfunction

  localparam table_t SINE   = make_sine();
  localparam table_t COSINE = make_cosine();

  localparam logic signed [SUM_BITS-1:0] S_MAX = (SUM_BITS'(1) << (SAMPLE_BITS - 1)) - 1;
  localparam logic signed [SUM_BITS-1:0] S_MIN = -(SUM_BITS'(1) << (SAMPLE_BITS - 1));

  // Multipliers and clipping.
  always_comb begin
    for (int k = 0; k < SAMPLES; k++) begin
      logic signed [PROD_BITS-1:0] p_i, p_q;
      logic signed [SUM_BITS-1:0]  acc, scaled;
      p_i    = i_val * COSINE[k];
      p_q    = q_val * SINE[k];
      acc    = SUM_BITS'(p_i) - SUM_BITS'(p_q);
      scaled = acc >>> SHIFT;
      if (scaled > S_MAX)      samples[k] = S_MAX[SAMPLE_BITS-1:0];
      else if (scaled < S_MIN) samples[k] = S_MIN[SAMPLE_BITS-1:0];
      else                     samples[k] = scaled[SAMPLE_BITS-1:0];
    end
  end

  // Settle counter.
  logic [CNT_BITS-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst)             cnt <= '0;
    else if (start)      cnt <= CNT_BITS'(CALC_CYCLES);
    else if (cnt != '0)  cnt <= cnt - 1'b1;
  end

  always_comb ready = (cnt == CNT_BITS'(1)) && !start;

  initial begin
    assert (CALC_CYCLES >= 1) else $error("CALC_CYCLES must be at least 1");
    assert (SHIFT >= 0) else $error("SAMPLE_BITS must be below 2*IQ_BITS");
  end

endmodule
