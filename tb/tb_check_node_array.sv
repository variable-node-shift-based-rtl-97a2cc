// tb_check_node_array: builds the parity-check matrix of the test code from
// its defining formulas (base row a = (i + e*(1+4*floor(i/NR))) mod NR,
// shift s = (e*i^2 + 2^e*i + 3e) mod Z; check b of row a sees variable
// (b+s) mod Z of column i) and checks, for random and sparse words:
//  - every check value c equals the parity of its variables (H v);
//  - every variable receives on edge e the check of row a, index (j-s) mod Z;
//  - rotating every base column by one position rotates every base row of the
//    check vector by one position (the property the variable-node shift
//    relies on).
// It also checks that every check node has degree DC and every variable DV.
module tb_check_node_array;
  localparam int Z = 54, NC = 24, NR = 12, DV = 3;
  localparam int DC = DV * NC / NR, N = NC * Z, M = NR * Z;

  logic [N-1:0] v;
  logic [M-1:0] c, c_prev;
  logic [N*DV-1:0] cn;
  int checks = 0, failures = 0;
  int rowof[NC][DV], shf[NC][DV];

  check_node_array #(.Z(Z), .NC(NC), .NR(NR), .DV(DV)) dut (.v, .c, .cn);

  task automatic fail(string what);
    failures++;
    if (failures < 20) $display("FAIL %s", what);
  endtask

  // Loop bounds are kept in variables so that the loops stay loops.
  int nc_r = NC, dv_r = DV, z_r = Z, n_r = N, m_r = M;
  bit vb[N], cb[M], ref_c[M];

  task automatic check_word();
    #1;
    for (int k = 0; k < n_r; k++) vb[k] = v[k];
    for (int k = 0; k < m_r; k++) begin
      cb[k] = c[k];
      ref_c[k] = 0;
    end
    for (int i = 0; i < nc_r; i++)
      for (int e = 0; e < dv_r; e++)
        for (int b = 0; b < z_r; b++)
          ref_c[rowof[i][e]*Z + b] ^= vb[i*Z + (b + shf[i][e]) % Z];
    for (int k = 0; k < m_r; k++) begin
      checks++;
      if (cb[k] != ref_c[k]) fail("check values");
    end
    for (int i = 0; i < nc_r; i++)
      for (int j = 0; j < z_r; j++)
        for (int e = 0; e < dv_r; e++) begin
          checks++;
          if (cn[(i*Z + j)*DV + e] != ref_c[rowof[i][e]*Z + (j - shf[i][e] + Z) % Z])
            fail("network 2 routing");
        end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int deg[M];
    logic [Z-1:0] col;
    for (int i = 0; i < nc_r; i++)
      for (int e = 0; e < dv_r; e++) begin
        rowof[i][e] = (i + e * (1 + 4 * (i / NR))) % NR;
        shf[i][e] = (e * i * i + (1 << e) * i + 3 * e) % Z;
      end
    // check-node degree
    for (int k = 0; k < M; k++) deg[k] = 0;
    for (int i = 0; i < nc_r; i++)
      for (int e = 0; e < dv_r; e++)
        for (int b = 0; b < z_r; b++) deg[rowof[i][e]*Z + b]++;
    for (int k = 0; k < M; k++) begin
      checks++;
      if (deg[k] != DC) fail("check node degree");
    end
    // single ones: exactly DV unsatisfied checks
    for (int t = 0; t < N; t += 7) begin
      int ones;
      v = '0;
      v[t] = 1'b1;
      check_word();
      ones = 0;
      for (int k = 0; k < M; k++) if (c[k]) ones++;
      checks++;
      if (ones != DV) fail("single error syndrome weight");
    end
    for (int t = 0; t < 30; t++) begin
      for (int k = 0; k < N; k++) v[k] = 1'($urandom);
      check_word();
      // rotate every base column by one and compare with rotated checks
      c_prev = c;
      for (int i = 0; i < nc_r; i++) begin
        col = v[i*Z +: Z];
        v[i*Z +: Z] = {col[Z-2:0], col[Z-1]};
      end
      check_word();
      for (int a = 0; a < m_r / z_r; a++)
        for (int b = 0; b < z_r; b++) begin
          checks++;
          if (c[a*Z + (b + 1) % Z] !== c_prev[a*Z + b]) fail("shift property");
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
