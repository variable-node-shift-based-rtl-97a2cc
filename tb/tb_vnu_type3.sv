// tb_vnu_type3: drives the register-only VNU with random load / shift / hold
// cycles and checks v, y and bu against a register model after every clock.
module tb_vnu_type3;
  logic clk = 0, rst_n = 0, load, en, y_load, v_prev, y_prev, v, y, bu;
  logic mv, my;
  int checks = 0, failures = 0, loads = 0, shifts = 0;

  vnu_type3 dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; en = 0; y_load = 0; v_prev = 0; y_prev = 0;
    mv = 0; my = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      load = ($urandom % 8) == 0;
      en = ($urandom % 4) != 0;
      y_load = 1'($urandom); v_prev = 1'($urandom); y_prev = 1'($urandom);
      @(posedge clk);
      if (load) begin mv = y_load; my = y_load; loads++; end
      else if (en) begin mv = v_prev; my = y_prev; shifts++; end
      #1;
      checks++;
      if (v !== mv || y !== my || bu !== mv) begin
        failures++;
        $display("FAIL v=%b y=%b bu=%b expected %b %b", v, y, bu, mv, my);
      end
    end
    $display("loads=%0d shifts=%0d", loads, shifts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
