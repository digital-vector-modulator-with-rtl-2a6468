// vm_machine: the controller that sequences a sample update.
//
// Six states, as in the original state diagram:
//   READY      idle; the buffer repeats the current period. Leaves for
//              UPLOAD when the comparator reports a different IQ vector.
//   UPLOAD     one cycle; cache_load stores the new vector (it also starts
//              the calculator's settle counter).
//   CALCULATE  waits for samples_ready from the calculator.
//   LOAD       one cycle; loader_load takes all samples into the loader.
//   SYNC       waits for sync from the shifter (1 .. SAMPLES cycles), so the
//              hand-over starts at the first sample of an output period.
//   LOAD_WAIT  SAMPLES cycles with mux_select high, moving the new samples
//              one per clock from the loader into the circular buffer;
//              then back to READY.
// The original description gives LOAD_WAIT a length of SAMPLES cycles in its text while
// its diagram draws the exit on any clock; the counter here follows the text.
// Outputs are decoded from the state register (Moore). state_onehot drives
// the 8-bit debug port, where the original design showed the state changes on
// LEDs. Reset (synchronous, active high) enters READY.
module vm_machine
  import vm_pkg::*;
#(
  parameter int SAMPLES = 10   // samples per period
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       not_equal,
  input  logic       samples_ready,
  input  logic       sync,
  output logic       cache_load,
  output logic       loader_load,
  output logic       mux_select,
  output logic [5:0] state_onehot
);

  localparam int CNT_BITS = (SAMPLES > 1) ? $clog2(SAMPLES) : 1;

  vm_state_e           state, next;
  logic [CNT_BITS-1:0] wait_cnt;

  always_comb begin
    next = state;
    unique case (state)
      ST_READY:     if (not_equal)     next = ST_UPLOAD;
      ST_UPLOAD:                       next = ST_CALCULATE;
      ST_CALCULATE: if (samples_ready) next = ST_LOAD;
      ST_LOAD:                         next = ST_SYNC;
      ST_SYNC:      if (sync)          next = ST_LOAD_WAIT;
      ST_LOAD_WAIT: if (wait_cnt == CNT_BITS'(SAMPLES - 1)) next = ST_READY;
      default:                         next = ST_READY;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= ST_READY;
      wait_cnt <= '0;
    end else begin
      state    <= next;
      wait_cnt <= (state == ST_LOAD_WAIT) ? wait_cnt + 1'b1 : '0;
    end
  end

  always_comb begin
    cache_load   = (state == ST_UPLOAD);
    loader_load  = (state == ST_LOAD);
    mux_select   = (state == ST_LOAD_WAIT);
    state_onehot = 6'(1) << state;
  end

  // The calculator may only report completion while it is awaited.
  a_ready_in_calculate: assert property (@(posedge clk) disable iff (rst)
      samples_ready |-> state == ST_CALCULATE)
    else $error("samples_ready outside CALCULATE");

endmodule
