// eig_cfg_run: testbench helper that runs one eigenvector generator of a
// given size (N samples, BW bits) through a 4-PC, 20-iteration training on a
// synthetic covariance matrix, and compares PCs and busy cycles with a
// bit-exact 64-bit reference model. It reports its counts through ports so
// that one testbench can run several sizes side by side; it also returns the
// cycle count so that the caller can compare it with a budget.
module eig_cfg_run #(
  parameter int N  = 32,
  parameter int BW = 9
) (
  input  logic        clk,
  input  logic        go,
  output logic        finished,
  output int          checks,
  output int          failures,
  output longint      cycles
);
  import eig_pkg::*;
  localparam int H = 4, ITER_MAX = 128, NP = 4, NI = 20;
  localparam int AW = $clog2(N), HW = $clog2(H), PW = $clog2(H + 1), TW = $clog2(ITER_MAX + 1);

  logic rst_n = 0, cov_we = 0, start = 0;
  logic [AW-1:0] cov_row = '0, cov_col = '0, rd_idx = '0;
  logic signed [BW-1:0] cov_wdata = '0, pc_data, rd_data;
  logic [PW-1:0] num_pc = '0;
  logic [TW-1:0] num_iter = '0;
  logic busy, done, pc_valid;
  logic [HW-1:0] pc_sel, rd_sel = '0;
  logic [AW-1:0] pc_idx;
  state_t state;
  logic [31:0] shift_cnt;

  eig_gen #(.N(N), .BW(BW), .H(H), .ITER_MAX(ITER_MAX)) dut (.*);

  longint C [N][N];
  longint ref_pc [H][N];
  longint ref_cycles;

  function automatic void level(ref longint v[N]);
    bit ovf;
    ref_cycles += N;
    forever begin
      ovf = 0;
      for (int i = 0; i < N; i++)
        if (v[i] >= (64'sd1 <<< (BW-1)) || v[i] < -(64'sd1 <<< (BW-1))) ovf = 1;
      if (!ovf) break;
      for (int i = 0; i < N; i++) v[i] = (v[i] + 1) >>> 1;
      ref_cycles += N;
    end
  endfunction

  function automatic void ref_run();
    longint phi[N], nphi[N], a, b;
    ref_cycles = 0;
    for (int p = 0; p < NP; p++) begin
      for (int i = 0; i < N; i++) phi[i] = 1;
      ref_cycles += 1;
      for (int it = 0; it < NI; it++) begin
        for (int i = 0; i < N; i++) begin
          nphi[i] = 0;
          for (int k = 0; k < N; k++) nphi[i] += C[i][k] * phi[k];
        end
        phi = nphi;
        ref_cycles += N * N;
        level(phi);
        for (int j = 0; j < p; j++) begin
          a = 0; b = 0;
          for (int i = 0; i < N; i++) begin
            a += ref_pc[j][i] * ref_pc[j][i];
            b += phi[i] * ref_pc[j][i];
          end
          for (int i = 0; i < N; i++) phi[i] = a * phi[i] - b * ref_pc[j][i];
          ref_cycles += 4 * N;
          level(phi);
        end
      end
      for (int i = 0; i < N; i++) ref_pc[p][i] = phi[i];
      ref_cycles += N;
    end
  endfunction

  function automatic void make_cov();
    longint v[4][N], raw[N][N], mx;
    longint wgt[4] = '{64, 16, 4, 1};
    for (int m = 0; m < 4; m++)
      for (int i = 0; i < N; i++) v[m][i] = longint'($urandom_range(200)) - 100;
    mx = 1;
    for (int i = 0; i < N; i++)
      for (int k = 0; k < N; k++) begin
        raw[i][k] = (i == k) ? 50 : 0;
        for (int m = 0; m < 4; m++) raw[i][k] += wgt[m] * v[m][i] * v[m][k];
        if (raw[i][k] > mx) mx = raw[i][k];
        if (-raw[i][k] > mx) mx = -raw[i][k];
      end
    for (int i = 0; i < N; i++)
      for (int k = 0; k < N; k++) C[i][k] = raw[i][k] * ((64'sd1 <<< (BW-1)) - 1) / mx;
  endfunction

  initial begin
    finished = 0; checks = 0; failures = 0; cycles = 0;
    wait (go);
    @(negedge clk);
    rst_n = 1;
    make_cov();
    for (int i = 0; i < N; i++)
      for (int k = 0; k < N; k++) begin
        @(negedge clk);
        cov_we = 1; cov_row = AW'(i); cov_col = AW'(k); cov_wdata = BW'(C[i][k]);
      end
    @(negedge clk);
    cov_we = 0;
    ref_run();
    start = 1; num_pc = PW'(NP); num_iter = TW'(NI);
    @(negedge clk);
    start = 0;
    while (!done) begin
      if (busy) cycles++;
      @(negedge clk);
    end
    checks++;
    if (cycles != ref_cycles) begin
      failures++;
      $display("FAIL: N=%0d BW=%0d took %0d cycles, expected %0d", N, BW, cycles, ref_cycles);
    end
    for (int p = 0; p < NP; p++)
      for (int i = 0; i < N; i++) begin
        rd_sel = HW'(p); rd_idx = AW'(i);
        #1;
        checks++;
        if (longint'(rd_data) != ref_pc[p][i]) begin
          failures++;
          $display("FAIL: N=%0d BW=%0d PC%0d[%0d] = %0d, expected %0d", N, BW, p, i, rd_data, ref_pc[p][i]);
        end
      end
    finished = 1;
  end
endmodule
