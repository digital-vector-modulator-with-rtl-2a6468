// tb_fast_vm: end-to-end test of the vector modulator at its default sizes
// (14-bit samples, 10 samples per period, 18-bit I/Q, 3 settle cycles).
//
// A cycle-level reference model runs beside the design. It knows the phase
// of the output period (cycles since reset modulo N), the vector held in
// the cache (the input as it stands in the UPLOAD cycle) and the vector
// whose period is playing. When the model is
// ready and the input differs from its cache, it schedules an update: the
// controller passes READY, UPLOAD, CALCULATE (CALC_CYCLES cycles), LOAD,
// SYNC (until the cycle before a period start) and LOAD_WAIT (N cycles),
// and the new period starts playing at the next period boundary. Every
// cycle the DAC sample is compared with the sample of the playing vector at
// the current phase (I*cos - Q*sin, scaled by 2**-21 and clipped, computed
// here independently) and the debug port with the expected state.
//
// Stimulus: first the four-entry vector table stepped through as if by
// switches, then updates started at each of the N phases of the period,
// changes in the middle of an update (which must be deferred), vectors that
// clip, a short glitch during an update that returns to the vector being
// loaded (which must not start another one), and random vectors applied at
// random times. Each update's latency 1+1+CALC_CYCLES+1+T_sync+N
// is checked with T_sync in 1..N, and the test fails if a one-cycle and an
// N-cycle sync wait, a deferred update, clipping or the suppressed restart
// never happened.
module tb_fast_vm;
  localparam int N = 10, SB = 14, IB = 18, C = 3;
  localparam int SHIFT = 2 * IB - SB - 1;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst;
  logic signed [IB-1:0] i_in, q_in;
  logic signed [SB-1:0] sample;
  logic [7:0] debug;

  fast_vm dut (.int_clk(clk), .int_rst(rst), .i(i_in), .q(q_in), .sample(sample), .debug(debug));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int updates = 0, sync_one = 0, sync_full = 0, deferred = 0, clip_cycles = 0, no_restart = 0;

  function automatic longint rnd(real x);
    return (x < 0.0) ? -longint'($rtoi(-x + 0.5)) : longint'($rtoi(x + 0.5));
  endfunction

  function automatic longint expected(longint i, longint q, int k);
    longint c, s, acc, hi, lo;
    c   = rnd($cos(2.0 * PI * k / N) * 131071.0);
    s   = rnd($sin(2.0 * PI * k / N) * 131071.0);
    acc = (i * c - q * s) >>> SHIFT;
    hi  = (longint'(1) << (SB - 1)) - 1;
    lo  = -(longint'(1) << (SB - 1));
    if (acc > hi) return hi;
    if (acc < lo) return lo;
    return acc;
  endfunction

  // Reference model state.
  longint cache_i, cache_q, play_i, play_q, next_i, next_q;
  int     t, r_cycle, sync_end, switch_at, ready_from;
  bit     pending, changed_while_busy;

  // Expected controller state (0 READY .. 5 LOAD_WAIT) in cycle t.
  function automatic int exp_state(int tt);
    if (!pending || tt >= ready_from) return 0;
    if (tt == r_cycle)            return 0;
    if (tt == r_cycle + 1)        return 1;
    if (tt <= r_cycle + 1 + C)    return 2;
    if (tt == r_cycle + 2 + C)    return 3;
    if (tt <= sync_end)           return 4;
    return 5;
  endfunction

  task automatic step();
    longint e;
    int st;
    // Model: the previous update's period starts playing.
    if (pending && t == switch_at) begin
      play_i = next_i; play_q = next_q;
    end
    // Model: start an update in a READY cycle with a differing input.
    if (t >= ready_from && (longint'(i_in) != cache_i || longint'(q_in) != cache_q)) begin
      int s;
      if (changed_while_busy) deferred++;
      changed_while_busy = 0;
      r_cycle = t;
      sync_end = r_cycle + 3 + C;
      while ((sync_end % N) != N - 1) sync_end++;
      s = sync_end - (r_cycle + 3 + C) + 1;
      if (s == 1) sync_one++;
      if (s == N) sync_full++;
      switch_at  = sync_end + N + 1;
      ready_from = switch_at;
      pending    = 1;
      updates++;
      checks++;
      if (switch_at - r_cycle != 1 + 1 + C + 1 + s + N || s < 1 || s > N) begin
        failures++;
        $display("FAIL latency %0d with sync wait %0d", switch_at - r_cycle, s);
      end
    end else if (pending && t == r_cycle + 1) begin
      // UPLOAD: the cache takes the vector present in this cycle.
      cache_i = longint'(i_in); cache_q = longint'(q_in);
      next_i = cache_i; next_q = cache_q;
    end else if (t < ready_from && (longint'(i_in) != next_i || longint'(q_in) != next_q)) begin
      changed_while_busy = 1;
    end
    // Compare the DAC sample and the debug port.
    e = expected(play_i, play_q, t % N);
    if (e == (1 << (SB - 1)) - 1 || e == -(1 << (SB - 1))) clip_cycles++;
    checks++;
    if (longint'(sample) != e) begin
      failures++;
      if (failures < 20)
        $display("FAIL cycle %0d: sample %0d expected %0d (playing I=%0d Q=%0d)", t, sample, e, play_i, play_q);
    end
    st = exp_state(t);
    checks++;
    if (debug[5:0] !== 6'(1 << st)) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: debug state %b expected state %0d", t, debug[5:0], st);
    end
    @(posedge clk);
    #1;
    t++;
  endtask

  task automatic apply(input longint i, input longint q, input int hold);
    i_in = IB'(i); q_in = IB'(q);
    repeat (hold) step();
  endtask

  task automatic hold(input int n);
    repeat (n) step();
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint tab_i [4], tab_q [4];
    tab_i = '{131071, 0, -65536, 20000};
    tab_q = '{0, 131071, -65536, -90000};
    rst = 1; i_in = '0; q_in = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // Cycle 0 is the clock period right after the last reset edge.
    t = 0; pending = 0; ready_from = 0; changed_while_busy = 0;
    cache_i = 0; cache_q = 0; play_i = 0; play_q = 0; next_i = 0; next_q = 0;
    // Make the reset state visible: zeros play.
    apply(0, 0, 2 * N);

    // Four-entry switch table, each held long enough to finish.
    for (int rep = 0; rep < 3; rep++)
      for (int k = 0; k < 4; k++) apply(tab_i[k], tab_q[k], 40 + rep + k);

    // Targeted sync waits: start an update in a READY cycle at each phase.
    for (int ph = 0; ph < N; ph++) begin
      while (t < ready_from || (t % N) != ph) hold(1);
      apply(longint'($urandom) % 200000 - 100000, longint'($urandom) % 200000 - 100000, 1);
    end

    // Change during an update (deferred), then a change that returns to
    // the vector being loaded before the update ends (no second update).
    while (t < ready_from) hold(1);
    apply(-131072, 131071, 4);            // full scale on both axes: clips
    apply(5000, -7000, 30);               // deferred until the update ends
    while (t < ready_from) hold(1);
    hold(2);
    begin
      int n_before;
      apply(77777, 1234, 2);              // READY and UPLOAD: starts an update
      apply(-3, 4, 3);                    // glitch while calculating
      n_before = updates;
      while (t < ready_from) apply(77777, 1234, 1);
      apply(77777, 1234, 3 * N);
      if (updates == n_before) no_restart++;
    end

    // Random vectors at random times.
    for (int n = 0; n < 150; n++)
      apply(longint'($urandom) % 262144 - 131072, longint'($urandom) % 262144 - 131072, 1 + ($urandom % 40));
    hold(4 * N);

    $display("updates %0d, sync wait 1: %0d, sync wait N: %0d, deferred %0d, clipped cycles %0d, no restart %0d",
             updates, sync_one, sync_full, deferred, clip_cycles, no_restart);
    checks++;
    if (updates == 0 || sync_one == 0 || sync_full == 0 || deferred == 0 || clip_cycles == 0 || no_restart == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
