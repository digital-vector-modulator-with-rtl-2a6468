// tb_vm_shifter: self-checking test of the circular sample buffer.
// A reference queue models the N-word delay line. Random words are written
// for a while, then the output is fed back and the stored period must
// repeat. sync must be high exactly on the cycles where the buffer has
// advanced N-1, 2N-1, ... times since reset.
module tb_vm_shifter;
  localparam int N = 10, SB = 14;
  logic clk = 0, rst, sync, feedback;
  logic signed [SB-1:0] din_ext, din, dout;
  logic signed [SB-1:0] model [$];
  int checks = 0, failures = 0, t;

  vm_shifter #(.SAMPLES(N), .SAMPLE_BITS(SB)) dut (.clk(clk), .rst(rst), .data_in(din), .data_out(dout), .sync(sync));

  always_comb din = feedback ? dout : din_ext;
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; feedback = 0; din_ext = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    model = {};
    repeat (N) model.push_back('0);
    t = 0;
    for (int n = 0; n < 600; n++) begin
      feedback = ((n / 50) % 2) == 1;
      din_ext = SB'($urandom);
      #1;
      checks += 2;
      if (dout !== model[0]) begin
        failures++;
        $display("FAIL cycle %0d: out %0d expected %0d", t, dout, model[0]);
      end
      if (sync !== ((t % N) == N - 1)) begin
        failures++;
        $display("FAIL cycle %0d: sync %0b", t, sync);
      end
      model.push_back(din);
      void'(model.pop_front());
      @(posedge clk); #1;
      t++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
