// vm_pkg: types and constants shared by the digital vector modulator.
//
// It holds the controller's state encoding and the constant functions that
// fill the sine and cosine tables when the design is elaborated, so that the
// tables follow the sample count and word width chosen by parameters and no
// data file is needed. Table entry k of an N-entry table with B-bit words is
//   round(sin(2*pi*k/N) * (2**(B-1) - 1))      (cosine likewise),
// rounded half away from zero. With B = 18 the peak is 131071 and sin(pi/4)
// gives 92681, the numbers the design's published 8-sample sine dump shows.
// The six states are the ones of the published state diagram; their binary
// encoding is this design's choice.
package vm_pkg;

  typedef enum logic [2:0] {
    ST_READY     = 3'd0,
    ST_UPLOAD    = 3'd1,
    ST_CALCULATE = 3'd2,
    ST_LOAD      = 3'd3,
    ST_SYNC      = 3'd4,
    ST_LOAD_WAIT = 3'd5
  } vm_state_e;

  localparam real PI = 3.14159265358979323846;

  // Round half away from zero.
  function automatic int round_real(real x);
    return (x < 0.0) ? -$rtoi(-x + 0.5) : $rtoi(x + 0.5);
  endfunction

  // Largest table magnitude for a word of the given width.
  function automatic int table_peak(int bits);
    return (1 << (bits - 1)) - 1;
  endfunction

  // Sine table entry k of n, scaled to a signed word of the given width.
  function automatic int sine_entry(int k, int n, int bits);
    return round_real($sin(2.0 * PI * real'(k) / real'(n)) * real'(table_peak(bits)));
  endfunction

  // Cosine table entry k of n, scaled to a signed word of the given width.
  function automatic int cosine_entry(int k, int n, int bits);
    return round_real($cos(2.0 * PI * real'(k) / real'(n)) * real'(table_peak(bits)));
  endfunction

endpackage
