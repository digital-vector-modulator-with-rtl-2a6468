// tb_vm_cache: self-checking test of the IQ cache register.
// Checks the zero value after reset, that the outputs hold while store is
// low and that they take the input one clock after store.
module tb_vm_cache;
  localparam int IQ_BITS = 18;
  logic clk = 0, rst, store;
  logic signed [IQ_BITS-1:0] ii, qi, io, qo, exp_i, exp_q;
  int checks = 0, failures = 0;

  vm_cache #(.IQ_BITS(IQ_BITS)) dut (.clk(clk), .rst(rst), .store(store), .i_in(ii), .q_in(qi), .i_out(io), .q_out(qo));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; store = 0; ii = IQ_BITS'($urandom); qi = IQ_BITS'($urandom);
    repeat (2) @(posedge clk);
    #1 rst = 0;
    exp_i = '0; exp_q = '0;
    for (int n = 0; n < 300; n++) begin
      checks++;
      if (io !== exp_i || qo !== exp_q) begin
        failures++;
        $display("FAIL cycle %0d: out %0d,%0d expected %0d,%0d", n, io, qo, exp_i, exp_q);
      end
      store = ($urandom % 3) == 0;
      ii = IQ_BITS'($urandom); qi = IQ_BITS'($urandom);
      @(posedge clk);
      if (store) begin exp_i = ii; exp_q = qi; end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
