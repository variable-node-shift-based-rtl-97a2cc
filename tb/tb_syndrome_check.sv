// tb_syndrome_check: drives check vectors with no, one, and several
// unsatisfied checks (every single bit position is tried) and compares the
// flag with a loop over the bits.
module tb_syndrome_check;
  localparam int M = 648;
  logic [M-1:0] c;
  logic ok;
  int checks = 0, failures = 0;

  syndrome_check #(.M(M)) dut (.c, .ok);

  task automatic check_one(logic [M-1:0] val);
    logic exp;
    c = val;
    #1;
    exp = 1'b1;
    for (int k = 0; k < M; k++) if (val[k]) exp = 1'b0;
    checks++;
    if (ok !== exp) begin
      failures++;
      $display("FAIL ok=%b expected %b", ok, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [M-1:0] r;
    check_one('0);
    for (int k = 0; k < M; k++) check_one(M'(1) << k);
    for (int t = 0; t < 50; t++) begin
      r = '0;
      for (int q = 0; q < 3; q++) r[$urandom % M] = 1'b1;
      check_one(r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
