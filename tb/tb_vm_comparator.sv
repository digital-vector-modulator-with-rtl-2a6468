// tb_vm_comparator: self-checking test of the IQ comparator.
// Drives equal vectors, vectors differing in I only, in Q only and random
// pairs, and checks not_equal against the expected value.
module tb_vm_comparator;
  localparam int IQ_BITS = 18;
  logic signed [IQ_BITS-1:0] ni, nq, oi, oq;
  logic ne;
  int checks = 0, failures = 0;

  vm_comparator #(.IQ_BITS(IQ_BITS)) dut (.new_i(ni), .new_q(nq), .old_i(oi), .old_q(oq), .not_equal(ne));

  task automatic check(input logic exp, input string what);
    #1;
    checks++;
    if (ne !== exp) begin
      failures++;
      $display("FAIL %s: not_equal=%0b expected %0b", what, ne, exp);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      ni = IQ_BITS'($urandom); nq = IQ_BITS'($urandom);
      oi = ni; oq = nq;
      check(1'b0, "equal");
      oi = ni ^ IQ_BITS'(1 << ($urandom % IQ_BITS));
      check(1'b1, "I differs");
      oi = ni; oq = nq ^ IQ_BITS'(1 << ($urandom % IQ_BITS));
      check(1'b1, "Q differs");
      oi = IQ_BITS'($urandom); oq = IQ_BITS'($urandom);
      check((oi != ni) || (oq != nq), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
