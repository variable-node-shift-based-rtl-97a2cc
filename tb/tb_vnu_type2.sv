// tb_vnu_type2: drives the non-flipping VNU with random load / shift / hold
// cycles, random check values and random maximum energies (biased so that
// the energy often equals the maximum). A register-level model checks v and
// y after every clock, and the energy and the updated value bu every cycle.
// It also counts how often the energy hit the maximum (no flip may follow).
module tb_vnu_type2;
  localparam int DV = 3;
  localparam int EW = 3;
  logic clk = 0, rst_n = 0, load, en, y_load, v_prev, y_prev, v, y, bu;
  logic [DV-1:0] cn;
  logic [EW-1:0] emax, e;
  logic mv, my;
  int checks = 0, failures = 0, flips = 0;

  vnu_type2 #(.DV(DV), .EW(EW)) dut (.clk, .rst_n, .load, .en, .y_load, .v_prev, .y_prev, .cn, .v, .y, .bu, .e);

  always #5 clk = ~clk;

  task automatic fail(string what);
    failures++;
    $display("FAIL %s at %0t", what, $time);
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ee;
    load = 0; en = 0; y_load = 0; v_prev = 0; y_prev = 0; cn = '0; emax = '0;
    mv = 0; my = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      load = ($urandom % 8) == 0;
      en = ($urandom % 4) != 0;
      y_load = 1'($urandom); v_prev = 1'($urandom); y_prev = 1'($urandom);
      cn = DV'($urandom);
      #1;
      ee = int'(mv ^ my);
      for (int d = 0; d < DV; d++) ee += int'(cn[d]);
      emax = ($urandom % 2) ? EW'(ee) : EW'($urandom % (DV + 2));
      #1;
      checks++;
      if (int'(e) != ee) fail("energy");
      checks++;
      if (bu !== mv) fail("bu");
      if (ee == int'(emax)) flips++;
      @(posedge clk);
      if (load) begin mv = y_load; my = y_load; end
      else if (en) begin mv = v_prev; my = y_prev; end
      #1;
      checks++;
      if (v !== mv || y !== my) fail("registers");
    end
    if (flips == 0) fail("energy never equal to the maximum");
    $display("flips=%0d", flips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
