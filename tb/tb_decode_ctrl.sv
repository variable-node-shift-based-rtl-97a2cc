// tb_decode_ctrl: runs the controller with a scripted syndrome: frames that
// are valid at once, that converge after a few iterations, that never
// converge (stop at ITMAX), and a restart in the middle of a frame. It checks
// load/en per cycle, the done latency (iterations + 2 edges after start),
// success, the iteration count and the offset = iterations mod Z.
module tb_decode_ctrl;
  localparam int ITMAX = 13, Z = 5;
  localparam int IW = $clog2(ITMAX + 1), OW = $clog2(Z);
  logic clk = 0, rst_n = 0, start = 0, syn_ok = 0;
  logic load, en, busy, done, success;
  logic [IW-1:0] iters;
  logic [OW-1:0] offset;
  int checks = 0, failures = 0, n_success = 0, n_itmax = 0;

  decode_ctrl #(.ITMAX(ITMAX), .Z(Z)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Decode a frame that becomes valid after conv iterations (-1: never).
  task automatic frame(int conv);
    int k, cycles, exp_k;
    @(negedge clk);
    start = 1;
    syn_ok = 0;
    #1 expect_true(load == 1 && en == 0, "load on start");
    @(posedge clk);
    cycles = 1;
    #1 start = 0;
    k = 0;
    while (1) begin
      @(negedge clk);
      syn_ok = (conv >= 0 && k >= conv);
      #1;
      if (done) break;
      expect_true(busy, "busy while running");
      expect_true(int'(iters) == k && int'(offset) == k % Z, "count/offset");
      expect_true(en == (!syn_ok && k < ITMAX), "enable");
      expect_true(load == 0, "no load while running");
      @(posedge clk);
      cycles++;
      if (en) k++;
      if (cycles > ITMAX + 10) break;
    end
    exp_k = (conv >= 0 && conv < ITMAX) ? conv : ITMAX;
    expect_true(done, "done");
    expect_true(int'(iters) == exp_k, "final iteration count");
    expect_true(cycles == exp_k + 2, "latency iterations+2");
    expect_true(success == (conv >= 0 && conv <= ITMAX), "success flag");
    if (success) n_success++; else n_itmax++;
    repeat (2) @(posedge clk);
    #1 expect_true(done && int'(iters) == exp_k, "done holds");
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 expect_true(!busy && !done, "idle after reset");
    frame(0);
    frame(3);
    frame(7);
    frame(-1);
    frame(ITMAX);
    // restart while running
    @(negedge clk);
    start = 1;
    @(posedge clk);
    #1 start = 0;
    repeat (4) @(posedge clk);
    frame(2);
    expect_true(n_success >= 4 && n_itmax >= 1, "both stop reasons seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
