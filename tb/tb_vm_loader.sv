// tb_vm_loader: self-checking test of the parallel-in, serial-out loader.
// Loads random periods, idles a random time, then shifts and checks that
// samples 0 .. N-1 appear in order, followed by zeros; also checks reset.
module tb_vm_loader;
  localparam int N = 10, SB = 14;
  logic clk = 0, rst, load, shift;
  logic signed [SB-1:0] din [N];
  logic signed [SB-1:0] dout;
  logic signed [SB-1:0] ref_q [$];
  int checks = 0, failures = 0;

  vm_loader #(.SAMPLES(N), .SAMPLE_BITS(SB)) dut (.clk(clk), .rst(rst), .load(load), .shift(shift), .data_in(din), .data_out(dout));

  always #5 clk = ~clk;

  task automatic expect_out(input logic signed [SB-1:0] e, input string what);
    checks++;
    if (dout !== e) begin
      failures++;
      $display("FAIL %s: out %0d expected %0d", what, dout, e);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; load = 0; shift = 0;
    foreach (din[k]) din[k] = SB'($urandom);
    repeat (2) @(posedge clk);
    #1 rst = 0;
    expect_out('0, "after reset");
    for (int r = 0; r < 40; r++) begin
      logic signed [SB-1:0] snap [N];
      foreach (din[k]) begin din[k] = SB'($urandom); snap[k] = din[k]; end
      load = 1;
      @(posedge clk); #1 load = 0;
      foreach (din[k]) din[k] = SB'($urandom);   // must not be taken
      repeat ($urandom % 5) @(posedge clk);
      #1;
      expect_out(snap[0], "held after load");
      shift = 1;
      for (int k = 0; k < N + 2; k++) begin
        expect_out((k < N) ? snap[k] : '0, $sformatf("shift %0d", k));
        @(posedge clk); #1;
      end
      shift = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
