// tb_cnu: checks the check node unit against a bit-by-bit parity count, over
// all-zero, all-one, single-one and random input words.
module tb_cnu;
  localparam int DC = 6;
  logic [DC-1:0] v;
  logic c;
  int checks = 0, failures = 0;

  cnu #(.DC(DC)) dut (.v, .c);

  task automatic check_one(logic [DC-1:0] val);
    int ones;
    v = val;
    #1;
    ones = 0;
    for (int d = 0; d < DC; d++) if (val[d]) ones++;
    checks++;
    if (c !== ones[0]) begin
      failures++;
      $display("FAIL v=%b c=%b expected %0d", val, c, ones % 2);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one('0);
    check_one('1);
    for (int d = 0; d < DC; d++) check_one(DC'(1) << d);
    for (int t = 0; t < 200; t++) check_one(DC'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
