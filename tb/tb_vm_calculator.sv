// tb_vm_calculator: self-checking test of the sample calculator.
//
// Instance u_main uses the default sizes (10 samples, 14-bit samples,
// 18-bit I/Q, 3 settle cycles). Random and full-scale vectors are applied
// and every sample is compared with a reference computed here from
// round(sin/cos * 131071) tables, the product I*cos - Q*sin, an arithmetic
// shift by 2*18-14-1 = 21 and clipping; full-scale vectors on both axes
// exercise the clipping. The ready pulse must come exactly CALC_CYCLES
// cycles after start and last one cycle.
//
// Instance u_tab uses 8 samples and a 35-bit sample word, so the shift is
// zero and a vector (0, -1) reproduces the sine table and (1, 0) the cosine
// table. The sine table is checked against the published 8-sample values:
// 0, 92681, 131071, 92681, 0, -92681, -131071, -92681 (peak 131071).
module tb_vm_calculator;
  localparam int N = 10, SB = 14, IB = 18, C = 3;
  localparam int SHIFT = 2 * IB - SB - 1;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst, start;
  logic signed [IB-1:0] iv, qv;
  logic signed [SB-1:0] smp [N];
  logic ready;

  logic signed [IB-1:0] ti, tq;
  logic signed [34:0]   tab [8];
  logic                 tready;

  int checks = 0, failures = 0, clipped = 0;

  vm_calculator #(.SAMPLES(N), .SAMPLE_BITS(SB), .IQ_BITS(IB), .CALC_CYCLES(C)) u_main (
    .clk(clk), .rst(rst), .start(start), .i_val(iv), .q_val(qv), .samples(smp), .ready(ready));

  vm_calculator #(.SAMPLES(8), .SAMPLE_BITS(35), .IQ_BITS(IB), .CALC_CYCLES(1)) u_tab (
    .clk(clk), .rst(rst), .start(1'b0), .i_val(ti), .q_val(tq), .samples(tab), .ready(tready));

  always #5 clk = ~clk;

  function automatic longint rnd(real x);
    return (x < 0.0) ? -longint'($rtoi(-x + 0.5)) : longint'($rtoi(x + 0.5));
  endfunction

  function automatic longint expected(longint i, longint q, int k, int n, int sb, int sh);
    longint c, s, acc, hi, lo;
    c   = rnd($cos(2.0 * PI * k / n) * 131071.0);
    s   = rnd($sin(2.0 * PI * k / n) * 131071.0);
    acc = (i * c - q * s) >>> sh;
    hi  = (longint'(1) << (sb - 1)) - 1;
    lo  = -(longint'(1) << (sb - 1));
    if (acc > hi) return hi;
    if (acc < lo) return lo;
    return acc;
  endfunction

  task automatic check_all(input string what);
    for (int k = 0; k < N; k++) begin
      longint e;
      e = expected(longint'(iv), longint'(qv), k, N, SB, SHIFT);
      if (e == (1 << (SB - 1)) - 1 || e == -(1 << (SB - 1))) clipped++;
      checks++;
      if (longint'(smp[k]) != e) begin
        failures++;
        $display("FAIL %s: I=%0d Q=%0d sample %0d = %0d expected %0d", what, iv, qv, k, smp[k], e);
      end
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint fig5 [8];
    fig5 = '{0, 92681, 131071, 92681, 0, -92681, -131071, -92681};
    rst = 1; start = 0; iv = '0; qv = '0; ti = '0; tq = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;

    // Table reproduction with 8 samples.
    ti = 0; tq = -1; #1;
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (longint'(tab[k]) != fig5[k]) begin
        failures++;
        $display("FAIL sine table %0d = %0d expected %0d", k, tab[k], fig5[k]);
      end
    end
    ti = 1; tq = 0; #1;
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (longint'(tab[k]) != fig5[(k + 2) % 8]) begin
        failures++;
        $display("FAIL cosine table %0d = %0d expected %0d", k, tab[k], fig5[(k + 2) % 8]);
      end
    end

    // Random vectors with the ready timing.
    for (int n = 0; n < 300; n++) begin
      int wait_c;
      logic signed [IB-1:0] ni, nq;
      case (n % 6)
        0: begin ni = 18'sh1FFFF; nq = -18'sh1FFFF; end
        1: begin ni = -18'sh20000; nq = 18'sh1FFFF; end
        default: begin ni = IB'($urandom); nq = IB'($urandom); end
      endcase
      start = 1; iv = ni; qv = nq;     // cache value changes at the same edge
      @(posedge clk); #1;
      start = 0;
      wait_c = 1;
      while (!ready && wait_c < 20) begin
        @(posedge clk); #1;
        wait_c++;
      end
      checks++;
      if (wait_c != C) begin
        failures++;
        $display("FAIL ready after %0d cycles, expected %0d", wait_c, C);
      end
      check_all("random");
      @(posedge clk); #1;
      checks++;
      if (ready) begin
        failures++;
        $display("FAIL ready longer than one cycle");
      end
    end
    if (clipped == 0) begin
      failures++;
      $display("FAIL clipping never exercised");
    end
    $display("clipped samples seen: %0d", clipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
