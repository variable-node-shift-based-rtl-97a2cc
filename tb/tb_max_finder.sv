// tb_max_finder: random energy vectors (values 0..4, the range of a dv=3
// decoder, and 0..7), single large values at every position (150 inputs: two
// full groups of 64 and a partial one), and all-zero
// input; the output is compared with a loop maximum.
module tb_max_finder;
  localparam int NIN = 150;  // three groups of inputs, the last one partial
  localparam int EW  = 3;
  logic [NIN*EW-1:0] e;
  logic [EW-1:0] emax;
  int checks = 0, failures = 0;

  max_finder #(.NIN(NIN), .EW(EW)) dut (.e, .emax);

  task automatic check_cur();
    int m;
    #1;
    m = 0;
    for (int k = 0; k < NIN; k++) if (int'(e[k*EW +: EW]) > m) m = int'(e[k*EW +: EW]);
    checks++;
    if (int'(emax) != m) begin
      failures++;
      $display("FAIL emax=%0d expected %0d", emax, m);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    e = '0;
    check_cur();
    for (int p = 0; p < NIN; p++) begin
      e = '0;
      for (int k = 0; k < NIN; k++) e[k*EW +: EW] = EW'($urandom % 2);
      e[p*EW +: EW] = EW'(2 + $urandom % 6);
      check_cur();
    end
    for (int t = 0; t < 300; t++) begin
      for (int k = 0; k < NIN; k++)
        e[k*EW +: EW] = (t % 2 == 0) ? EW'($urandom % 5) : EW'($urandom);
      check_cur();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
