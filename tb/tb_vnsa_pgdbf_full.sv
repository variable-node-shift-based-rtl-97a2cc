// tb_vnsa_pgdbf_full: one decoder with every parameter at its default
// (VNSA-PGDBF, N = 1296, Z = 54, dv = 3, p0 = 0.7, 300 iterations), run
// through decoded and undecodable frames against a cycle-by-cycle PGDBF
// reference model. Same checks as tb_vnsa_pgdbf_decoder, without the
// imprecise variant: tentative word in natural order, iteration count and
// maximum energy every clock; done, success and a latency of iterations + 2
// cycles at the end; each mechanism (decoded stop, iteration-limit stop,
// flip, flip withheld by a non-flipping unit, more than Z iterations) must
// occur.
module tb_vnsa_pgdbf_full;
  localparam int Z = 54, NC = 24, NR = 12, DV = 3, P0_PCT = 70, ITMAX = 300;
  localparam int N = NC * Z, M = NR * Z, IW = $clog2(ITMAX + 1);
  localparam int NV = 1;  // decoder variants under test

  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] y_in;
  logic [N-1:0] cw[NV];
  logic busy[NV], done[NV], success[NV];
  logic [IW-1:0] iters[NV];

  vnsa_pgdbf_decoder dut_p (
    .clk, .rst_n, .start, .y_in, .codeword(cw[0]), .busy(busy[0]),
    .done(done[0]), .success(success[0]), .iters(iters[0]));

  logic [2:0] emax_dut[NV];
  assign emax_dut[0] = dut_p.emax;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_succ = 0, n_itmax = 0, n_flip = 0, n_suppressed = 0, n_imprecise = 0, n_wrap = 0;

  // loop bounds in variables, so that loops stay loops
  int nc_r = NC, dv_r = DV, z_r = Z, n_r = N, m_r = M;
  int rowof[NC][DV], shf[NC][DV];
  bit t1[NC][Z];
  bit ry[N], rv[2][N], rc[M];
  int en[N];
  int rk[2], emax_ref[2];
  bit stopped[2], rsucc[2];

  task automatic fail(string what);
    failures++;
    if (failures < 30) $display("FAIL %s at %0t", what, $time);
  endtask

  function automatic int gcd_f(int a, int b);
    while (b != 0) begin
      int t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  // Code and unit placement, from their defining formulas.
  task automatic build_code();
    int n1, mult, cnt;
    n1 = (P0_PCT * Z + 50) / 100;
    for (int i = 0; i < nc_r; i++) begin
      for (int e = 0; e < dv_r; e++) begin
        rowof[i][e] = (i + e * (1 + 4 * (i / NR))) % NR;
        shf[i][e] = (e * i * i + (1 << e) * i + 3 * e) % Z;
      end
      cnt = 0;
      mult = 1;
      for (int x = 1; x < 500; x++)
        if (gcd_f(x, Z) == 1) begin
          if (cnt == i % 8) begin
            mult = x;
            break;
          end
          cnt++;
        end
      for (int j = 0; j < z_r; j++) t1[i][j] = ((mult * j + 7 * i + 3) % Z) < n1;
    end
  endtask

  // checks of word w (natural order); returns 1 if all satisfied
  function automatic bit compute_checks(int m);
    bit ok = 1;
    for (int k = 0; k < m_r; k++) rc[k] = 0;
    for (int i = 0; i < nc_r; i++)
      for (int e = 0; e < dv_r; e++)
        for (int b = 0; b < z_r; b++)
          rc[rowof[i][e]*Z + b] ^= rv[m][i*Z + (b + shf[i][e]) % Z];
    for (int k = 0; k < m_r; k++) if (rc[k]) ok = 0;
    return ok;
  endfunction

  // one PGDBF iteration of the model (checks already in rc)
  task automatic ref_iteration(int m);
    int emax_all, emax_t1, p;
    emax_all = 0;
    emax_t1 = 0;
    for (int i = 0; i < nc_r; i++)
      for (int j = 0; j < z_r; j++) begin
        int q = i * Z + j;
        en[q] = (rv[m][q] != ry[q]) ? 1 : 0;
        for (int e = 0; e < dv_r; e++)
          en[q] += int'(rc[rowof[i][e]*Z + (j - shf[i][e] + Z) % Z]);
        if (en[q] > emax_all) emax_all = en[q];
        if (t1[i][(j + rk[m]) % Z] && en[q] > emax_t1) emax_t1 = en[q];
      end
    emax_ref[m] = (m == 1) ? emax_t1 : emax_all;
    if (m == 1 && emax_t1 < emax_all) n_imprecise++;
    for (int i = 0; i < nc_r; i++)
      for (int j = 0; j < z_r; j++) begin
        int q = i * Z + j;
        p = (j + rk[m]) % Z;
        if (en[q] == emax_ref[m]) begin
          if (t1[i][p]) begin
            rv[m][q] = ~rv[m][q];
            n_flip++;
          end else begin
            n_suppressed++;
          end
        end
      end
    rk[m]++;
    if (rk[m] > Z) n_wrap++;
  endtask

  task automatic compare_word(int m, string what);
    logic [N-1:0] w;
    int bad = 0;
    w = cw[m];
    for (int q = 0; q < n_r; q++) if (w[q] != rv[m][q]) bad++;
    checks++;
    if (bad != 0) fail($sformatf("%s: variant %0d word differs in %0d bits", what, m, bad));
  endtask

  function automatic bit all_flag(bit f[2]);
    for (int m = 0; m < NV; m++) if (!f[m]) return 0;
    return 1;
  endfunction

  task automatic run_frame(int nerr);
    int cycles;
    bit flag[2];
    logic [N-1:0] y;
    y = '0;
    for (int t = 0; t < nerr; t++) y[$urandom % N] = 1'b1;
    for (int q = 0; q < n_r; q++) begin
      ry[q] = y[q];
      rv[0][q] = y[q];
      rv[1][q] = y[q];
    end
    @(negedge clk);
    y_in = y;
    start = 1;
    @(posedge clk);
    #1 start = 0;
    cycles = 1;
    for (int m = 0; m < NV; m++) begin
      rk[m] = 0;
      stopped[m] = 0;
      flag[m] = 0;
    end
    while (!all_flag(flag) && cycles < ITMAX + 10) begin
      @(negedge clk);
      for (int m = 0; m < NV; m++) begin
        if (flag[m]) continue;
        if (stopped[m]) begin
          // decoder must have finished on this edge
          checks++;
          if (!done[m]) fail($sformatf("variant %0d not done after %0d cycles", m, cycles));
          checks++;
          if (success[m] != rsucc[m]) fail($sformatf("variant %0d success flag", m));
          checks++;
          if (int'(iters[m]) != rk[m] || cycles != rk[m] + 2)
            fail($sformatf("variant %0d iterations %0d/%0d cycles %0d", m, iters[m], rk[m], cycles));
          compare_word(m, "final word");
          if (rsucc[m]) n_succ++; else n_itmax++;
          flag[m] = 1;
          continue;
        end
        checks++;
        if (done[m] || !busy[m] || int'(iters[m]) != rk[m])
          fail($sformatf("variant %0d state at iteration %0d", m, rk[m]));
        compare_word(m, "tentative word");
        if (compute_checks(m)) begin
          stopped[m] = 1;
          rsucc[m] = 1;
        end else if (rk[m] == ITMAX) begin
          stopped[m] = 1;
          rsucc[m] = 0;
        end else begin
          ref_iteration(m);
          checks++;
          if (int'(emax_dut[m]) != emax_ref[m]) fail($sformatf("variant %0d maximum energy", m));
        end
      end
      @(posedge clk);
      cycles++;
    end
    if (!all_flag(flag)) fail("frame did not finish");
    for (int m = 0; m < NV; m++)
      $display("frame: %0d errors -> variant %0d %0s in %0d iterations",
               nerr, m, rsucc[m] ? "decoded" : "failed", rk[m]);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    y_in = '0;
    build_code();
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_frame(0);
    run_frame(1);
    run_frame(3);
    run_frame(6);
    run_frame(10);
    run_frame(16);
    run_frame(150);
    $display("stops: decoded=%0d limit=%0d; flips=%0d suppressed=%0d imprecise_max=%0d wrapped=%0d",
             n_succ, n_itmax, n_flip, n_suppressed, n_imprecise, n_wrap);
    if (n_succ == 0) fail("no frame decoded");
    if (n_itmax == 0) fail("iteration limit never reached");
    if (n_flip == 0) fail("no flip");
    if (n_suppressed == 0) fail("no flip suppressed by a non-flipping unit");
    if (NV > 1 && n_imprecise == 0) fail("imprecise maximum never below the true one");
    if (n_wrap == 0) fail("never more than Z iterations");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
