// tb_vm_machine: self-checking test of the update controller.
//
// A reference model of the six-state sequence runs beside the controller
// under random stimulus: not_equal at random, samples_ready at random while
// CALCULATE is active (the only state where it may come), sync at random.
// Every cycle the one-hot state and the three strobes are compared with the
// model. The test also measures that UPLOAD and LOAD last one cycle and
// LOAD_WAIT exactly N cycles, and that both a one-cycle and a long SYNC wait
// occurred.
module tb_vm_machine;
  localparam int N = 10;
  typedef enum int {M_READY, M_UPLOAD, M_CALC, M_LOAD, M_SYNC, M_LWAIT} m_state_t;

  logic clk = 0, rst, ne, rdy, sync;
  logic cache_load, loader_load, mux_select;
  logic [5:0] onehot;
  m_state_t m;
  int lw_cnt, lw_len, sync_len;
  int checks = 0, failures = 0, updates = 0, short_sync = 0, long_sync = 0;

  vm_machine #(.SAMPLES(N)) dut (
    .clk(clk), .rst(rst), .not_equal(ne), .samples_ready(rdy), .sync(sync),
    .cache_load(cache_load), .loader_load(loader_load), .mux_select(mux_select), .state_onehot(onehot));

  always #5 clk = ~clk;

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %0t %s: got %0b expected %0b (model state %s)", $time, what, got, exp, m.name());
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; ne = 0; rdy = 0; sync = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    m = M_READY; lw_cnt = 0; sync_len = 0;
    for (int t = 0; t < 20000; t++) begin
      ne   = ($urandom % 4) == 0;
      rdy  = (m == M_CALC) && (($urandom % 3) == 0);
      sync = ($urandom % 6) == 0;
      #1;
      checks++;
      if (onehot !== 6'(1 << int'(m))) begin
        failures++;
        $display("FAIL %0t state one-hot %b, model %s", $time, onehot, m.name());
      end
      chk(cache_load,  m == M_UPLOAD, "cache_load");
      chk(loader_load, m == M_LOAD,   "loader_load");
      chk(mux_select,  m == M_LWAIT,  "mux_select");
      @(posedge clk);
      // Reference transition.
      case (m)
        M_READY:  if (ne) m = M_UPLOAD;
        M_UPLOAD: m = M_CALC;
        M_CALC:   if (rdy) m = M_LOAD;
        M_LOAD:   begin m = M_SYNC; sync_len = 0; end
        M_SYNC:   begin
                    sync_len++;
                    if (sync) begin
                      if (sync_len == 1) short_sync++;
                      if (sync_len >= 5) long_sync++;
                      m = M_LWAIT; lw_cnt = 0;
                    end
                  end
        M_LWAIT:  begin
                    lw_cnt++;
                    if (lw_cnt == N) begin m = M_READY; updates++; end
                  end
        default:  m = M_READY;
      endcase
      #1;
    end
    $display("updates %0d, one-cycle sync waits %0d, long sync waits %0d", updates, short_sync, long_sync);
    checks++;
    if (updates == 0 || short_sync == 0 || long_sync == 0) begin
      failures++;
      $display("FAIL a sequence was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
