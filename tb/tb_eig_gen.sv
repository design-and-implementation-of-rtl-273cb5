// tb_eig_gen: self-checking testbench of the leading eigenvector generator.
//
// Builds a symmetric covariance matrix from a few random "spike shape"
// vectors with well separated weights, quantises it to BW bits, loads it and
// runs the generator. A bit-exact reference model of the modified algorithm
// (64-bit integers, written independently of the RTL) gives the expected PC
// elements and the expected number of busy cycles:
//   per PC: 1 (init) + per iteration [N*N + N*(1+shifts)
//           + per earlier PC (4*N + N*(1+shifts))] + N (output).
// A floating-point power iteration with deflation checks, in addition, that
// the first two PCs point along the true leading eigenvectors (|correlation|
// above 0.99). Two runs: 4 PCs x 20 iterations (the operating point of the
// design's capability figures) and 2 PCs x 3 iterations on another matrix.
module tb_eig_gen;
  import eig_pkg::*;

  localparam int N = 32, BW = 9, H = 4, ITER_MAX = 128;
  localparam int AW = $clog2(N), HW = $clog2(H), PW = $clog2(H + 1), TW = $clog2(ITER_MAX + 1);

  logic clk = 0, rst_n = 0;
  logic cov_we = 0, start = 0;
  logic [AW-1:0] cov_row = '0, cov_col = '0;
  logic signed [BW-1:0] cov_wdata = '0;
  logic [PW-1:0] num_pc = '0;
  logic [TW-1:0] num_iter = '0;
  logic busy, done, pc_valid;
  logic [HW-1:0] pc_sel, rd_sel = '0;
  logic [AW-1:0] pc_idx, rd_idx = '0;
  logic signed [BW-1:0] pc_data, rd_data;
  state_t state;
  logic [31:0] shift_cnt;

  eig_gen #(.N(N), .BW(BW), .H(H), .ITER_MAX(ITER_MAX)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint C [N][N];
  longint ref_pc [H][N];
  longint ref_cycles;
  longint got_pc [H][N];
  int n_shift_evt;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- reference model ----------------
  function automatic void level(ref longint v[N], ref longint cyc, ref int nsh);
    bit ovf;
    cyc += N;                         // the first check pass
    forever begin
      ovf = 0;
      for (int i = 0; i < N; i++)
        if (v[i] >= (64'sd1 <<< (BW-1)) || v[i] < -(64'sd1 <<< (BW-1))) ovf = 1;
      if (!ovf) break;
      for (int i = 0; i < N; i++) v[i] = (v[i] + 1) >>> 1;
      cyc += N;                       // one shift pass (checks its result)
      nsh++;
    end
  endfunction

  function automatic void ref_run(input int np, input int ni, ref int nsh);
    longint phi[N], nphi[N], a, b;
    ref_cycles = 0;
    for (int p = 0; p < np; p++) begin
      for (int i = 0; i < N; i++) phi[i] = 1;
      ref_cycles += 1;
      for (int it = 0; it < ni; it++) begin
        for (int i = 0; i < N; i++) begin
          nphi[i] = 0;
          for (int k = 0; k < N; k++) nphi[i] += C[i][k] * phi[k];
        end
        phi = nphi;
        ref_cycles += N * N;
        level(phi, ref_cycles, nsh);
        for (int j = 0; j < p; j++) begin
          a = 0; b = 0;
          for (int i = 0; i < N; i++) begin
            a += ref_pc[j][i] * ref_pc[j][i];
            b += phi[i] * ref_pc[j][i];
          end
          for (int i = 0; i < N; i++) phi[i] = a * phi[i] - b * ref_pc[j][i];
          ref_cycles += 4 * N;
          level(phi, ref_cycles, nsh);
        end
      end
      for (int i = 0; i < N; i++) ref_pc[p][i] = phi[i];
      ref_cycles += N;
    end
  endfunction

  // ------------- floating-point check --------------
  function automatic real corr(input real x[N], input longint y[N]);
    real sxy = 0, sxx = 0, syy = 0;
    for (int i = 0; i < N; i++) begin
      sxy += x[i] * real'(y[i]);
      sxx += x[i] * x[i];
      syy += real'(y[i]) * real'(y[i]);
    end
    if (sxx == 0 || syy == 0) return 0;
    return sxy / ($sqrt(sxx) * $sqrt(syy));
  endfunction

  function automatic void float_pcs(output real e0[N], output real e1[N]);
    real v[N], w[N], nrm, d;
    for (int pc = 0; pc < 2; pc++) begin
      for (int i = 0; i < N; i++) v[i] = 1.0;
      for (int it = 0; it < 300; it++) begin
        for (int i = 0; i < N; i++) begin
          w[i] = 0;
          for (int k = 0; k < N; k++) w[i] += real'(C[i][k]) * v[k];
        end
        if (pc == 1) begin
          d = 0;
          for (int i = 0; i < N; i++) d += w[i] * e0[i];
          for (int i = 0; i < N; i++) w[i] -= d * e0[i];
        end
        nrm = 0;
        for (int i = 0; i < N; i++) nrm += w[i] * w[i];
        nrm = $sqrt(nrm);
        for (int i = 0; i < N; i++) v[i] = w[i] / nrm;
      end
      if (pc == 0) e0 = v; else e1 = v;
    end
  endfunction

  // ---------------- stimulus helpers ----------------
  function automatic void make_cov(input int nvec);
    longint v[4][N], raw[N][N], mx;
    longint wgt[4] = '{64, 16, 4, 1};
    for (int m = 0; m < nvec; m++)
      for (int i = 0; i < N; i++) v[m][i] = longint'($urandom_range(200)) - 100;
    mx = 1;
    for (int i = 0; i < N; i++)
      for (int k = 0; k < N; k++) begin
        raw[i][k] = (i == k) ? 50 : 0;
        for (int m = 0; m < nvec; m++) raw[i][k] += wgt[m] * v[m][i] * v[m][k];
        if (raw[i][k] > mx) mx = raw[i][k];
        if (-raw[i][k] > mx) mx = -raw[i][k];
      end
    for (int i = 0; i < N; i++)
      for (int k = 0; k < N; k++) C[i][k] = raw[i][k] * ((1 <<< (BW-1)) - 1) / mx;
  endfunction

  task automatic load_cov();
    for (int i = 0; i < N; i++)
      for (int k = 0; k < N; k++) begin
        @(negedge clk);
        cov_we = 1; cov_row = AW'(i); cov_col = AW'(k); cov_wdata = BW'(C[i][k]);
      end
    @(negedge clk);
    cov_we = 0;
  endtask

  task automatic run(input int np, input int ni, input bit float_chk);
    longint busy_cycles;
    int nsh, nout;
    real e0[N], e1[N], c0, c1;
    nsh = 0;
    ref_run(np, ni, nsh);
    n_shift_evt += nsh;
    @(negedge clk);
    start = 1; num_pc = PW'(np); num_iter = TW'(ni);
    @(negedge clk);
    start = 0;
    busy_cycles = 0; nout = 0;
    while (!done) begin
      if (busy) busy_cycles++;
      if (pc_valid) begin
        got_pc[pc_sel][pc_idx] = longint'(pc_data);
        nout++;
      end
      @(negedge clk);
    end
    check(busy_cycles == ref_cycles,
          $sformatf("busy cycles %0d, expected %0d", busy_cycles, ref_cycles));
    check(nout == np * N, $sformatf("%0d output elements, expected %0d", nout, np * N));
    for (int p = 0; p < np; p++)
      for (int i = 0; i < N; i++) begin
        check(got_pc[p][i] == ref_pc[p][i],
              $sformatf("PC%0d[%0d] = %0d, expected %0d", p, i, got_pc[p][i], ref_pc[p][i]));
        rd_sel = HW'(p); rd_idx = AW'(i);
        #1;
        check(longint'(rd_data) == ref_pc[p][i], $sformatf("read port PC%0d[%0d]", p, i));
      end
    if (float_chk) begin
      float_pcs(e0, e1);
      c0 = corr(e0, ref_pc[0]);
      c1 = corr(e1, ref_pc[1]);
      if (c0 < 0) c0 = -c0;
      if (c1 < 0) c1 = -c1;
      $display("correlation with floating-point PCs: PC1 %f PC2 %f", c0, c1);
      check(c0 > 0.99, "PC1 direction");
      check(c1 > 0.99, "PC2 direction");
    end
    $display("run %0d PCs x %0d iterations: %0d cycles, %0d level shifts", np, ni, ref_cycles, nsh);
  endtask

  initial begin
    n_shift_evt = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    make_cov(4);
    load_cov();
    run(4, 20, 1);
    make_cov(2);
    load_cov();
    run(2, 3, 0);
    check(n_shift_evt > 0, "level shifts happened");
    check(shift_cnt == 32'(n_shift_evt), $sformatf("shift counter %0d, expected %0d", shift_cnt, n_shift_evt));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
