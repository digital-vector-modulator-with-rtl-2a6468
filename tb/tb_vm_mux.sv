// tb_vm_mux: self-checking test of the buffer input multiplexer.
// Random data on both inputs; select high must pass in1, low in2.
module tb_vm_mux;
  localparam int SB = 14;
  logic sel;
  logic signed [SB-1:0] a, b, y;
  int checks = 0, failures = 0;

  vm_mux #(.SAMPLE_BITS(SB)) dut (.select(sel), .in1(a), .in2(b), .data_out(y));

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      a = SB'($urandom); b = SB'($urandom); sel = n[0];
      #1;
      checks++;
      if (y !== (sel ? a : b)) begin
        failures++;
        $display("FAIL sel=%0b in1=%0d in2=%0d out=%0d", sel, a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
