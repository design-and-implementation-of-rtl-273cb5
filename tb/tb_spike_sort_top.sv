// tb_spike_sort_top: end-to-end test of the spike sorting core at its
// default size (N = 32 samples, BW = 9 bits, H = 4 PCs, 16 channels).
//
// Two channels are trained one after the other from synthetic covariance
// matrices (random spike shapes with well separated weights): channel 3 with
// 4 PCs x 20 iterations, channel 9 with 2 PCs x 5 iterations. A bit-exact
// reference model of the modified distilling algorithm gives the expected PCs
// and the expected training time in cycles. Synthetic spikes (mixtures of the
// shapes plus noise) are then fed on both channels, with and without gaps
// between samples, and one is fed on channel 3 while channel 9 trains; each
// spike's H scores are compared with inner products against the reference
// PCs, and must appear one cycle after the spike's last sample.
// A third channel (12) is then trained from spikes alone: 64 spikes are fed
// on it and the covariance matrix unit builds the matrix, while channel 3
// spikes are interleaved (sorted, and ignored by the collection) and one
// channel 12 spike arrives during an update (dropped). The matrix model
// (64*sum(x x') - sum(x) sum(x)', halved until it fits 9 bits) feeds the
// generator model, and channel 12 is trained with 2 PCs x 10 iterations.
// The mechanisms of the design are counted and each must occur: level shifts
// after a distilling pass, level shifts after an orthogonal process, checks
// that find no overflow, orthogonal processes, PC output, spikes with gaps,
// feature extraction overlapping training and collection, covariance
// collection and dropped spikes.
module tb_spike_sort_top;
  import eig_pkg::*;

  localparam int N = 32, BW = 9, H = 4, ITER_MAX = 128, CH = 16;
  localparam int AW = $clog2(N), HW = $clog2(H), PW = $clog2(H + 1), TW = $clog2(ITER_MAX + 1);
  localparam int CW = $clog2(CH), SW = 2 * BW + $clog2(N);

  logic clk = 0, rst_n = 0;
  logic collect_start = 0;
  logic [CW-1:0] collect_ch = '0;
  logic collect_busy, collect_done;
  logic [31:0] spikes_dropped;
  logic cov_we = 0;
  logic [AW-1:0] cov_row = '0, cov_col = '0;
  logic signed [BW-1:0] cov_wdata = '0;
  logic train_start = 0;
  logic [CW-1:0] train_ch = '0;
  logic [PW-1:0] num_pc = '0;
  logic [TW-1:0] num_iter = '0;
  logic train_busy, train_done;
  logic [HW-1:0] pc_rd_sel = '0;
  logic [AW-1:0] pc_rd_idx = '0;
  logic signed [BW-1:0] pc_rd_data;
  logic spk_valid = 0, spk_first = 0;
  logic [CW-1:0] spk_ch = '0;
  logic signed [BW-1:0] spk_sample = '0;
  logic score_valid;
  logic [CW-1:0] score_ch;
  logic signed [SW-1:0] score [H];
  state_t eig_state;
  logic [31:0] level_shifts;

  spike_sort_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint C [N][N];
  longint V [4][N];
  longint ref_pc [H][N];
  longint ref_cycles;
  longint chan_pc [CH][H][N];
  int     chan_np [CH];
  longint last_x [N];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- reference model of the generator ----------------
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

  function automatic void ref_run(input int np, input int ni);
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

  // ---------------- stimulus ----------------
  function automatic void make_cov(input int nvec);
    longint raw[N][N], mx;
    longint wgt[4] = '{64, 16, 4, 1};
    for (int m = 0; m < nvec; m++)
      for (int i = 0; i < N; i++) V[m][i] = longint'($urandom_range(200)) - 100;
    mx = 1;
    for (int i = 0; i < N; i++)
      for (int k = 0; k < N; k++) begin
        raw[i][k] = (i == k) ? 50 : 0;
        for (int m = 0; m < nvec; m++) raw[i][k] += wgt[m] * V[m][i] * V[m][k];
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

  // ---------------- mechanism counters ----------------
  int n_shift_dist = 0, n_shift_orth = 0, n_clean_check = 0, n_orth = 0;
  int n_collect_overlap = 0, n_collect_done = 0;
  always @(posedge clk) if (rst_n && collect_done) n_collect_done++;
  int n_pc_out = 0, n_gap_spikes = 0, n_overlap_spikes = 0, n_scores = 0;
  state_t prev_state = S_IDLE, last_proc = S_IDLE;
  always @(negedge clk) begin
    if (eig_state == S_DISTILL || eig_state == S_ORTH) last_proc = eig_state;
    if (eig_state == S_SHIFT && prev_state == S_CHECK) begin
      if (last_proc == S_DISTILL) n_shift_dist++; else n_shift_orth++;
    end
    if (prev_state == S_CHECK && eig_state != S_CHECK && eig_state != S_SHIFT) n_clean_check++;
    if (prev_state == S_SHIFT && eig_state != S_SHIFT) n_clean_check++;
    if (eig_state == S_ORTH && prev_state != S_ORTH) n_orth++;
    if (eig_state == S_OUTPUT && prev_state != S_OUTPUT) n_pc_out++;
    prev_state = eig_state;
  end

  // ---------------- training ----------------
  task automatic train(input int ch, input int nvec, input int np, input int ni, input bit load = 1);
    longint busy_cycles;
    real e0[N], nrm, d, c0;
    if (load) begin
      make_cov(nvec);
      load_cov();
    end
    ref_run(np, ni);
    @(negedge clk);
    train_start = 1; train_ch = CW'(ch); num_pc = PW'(np); num_iter = TW'(ni);
    @(negedge clk);
    train_start = 0;
    busy_cycles = 0;
    while (!train_done) begin
      if (train_busy) busy_cycles++;
      @(negedge clk);
    end
    chk(busy_cycles == ref_cycles,
        $sformatf("ch%0d training took %0d cycles, expected %0d", ch, busy_cycles, ref_cycles));
    $display("channel %0d: %0d PCs x %0d iterations in %0d cycles", ch, np, ni, busy_cycles);
    for (int p = 0; p < np; p++)
      for (int i = 0; i < N; i++) begin
        chan_pc[ch][p][i] = ref_pc[p][i];
        pc_rd_sel = HW'(p); pc_rd_idx = AW'(i);
        #1;
        chk(longint'(pc_rd_data) == ref_pc[p][i], $sformatf("ch%0d PC%0d[%0d]", ch, p, i));
      end
    chan_np[ch] = np;
    // PC1 direction against a floating-point power iteration
    for (int i = 0; i < N; i++) e0[i] = 1.0;
    for (int it = 0; it < 300; it++) begin
      real w[N];
      nrm = 0;
      for (int i = 0; i < N; i++) begin
        w[i] = 0;
        for (int k = 0; k < N; k++) w[i] += real'(C[i][k]) * e0[k];
        nrm += w[i] * w[i];
      end
      for (int i = 0; i < N; i++) e0[i] = w[i] / $sqrt(nrm);
    end
    d = 0; nrm = 0;
    for (int i = 0; i < N; i++) begin
      d += e0[i] * real'(ref_pc[0][i]);
      nrm += real'(ref_pc[0][i]) * real'(ref_pc[0][i]);
    end
    c0 = d / $sqrt(nrm);
    if (c0 < 0) c0 = -c0;
    chk(c0 > 0.99, $sformatf("ch%0d PC1 correlation %f", ch, c0));
  endtask

  // ---------------- feature extraction ----------------
  task automatic spike(input int ch, input bit gaps);
    longint x[N], expv[H];
    int w0, w1, last_cyc, cyc;
    w0 = $urandom_range(8) - 4; w1 = $urandom_range(8) - 4;
    for (int i = 0; i < N; i++) begin
      x[i] = (longint'(w0) * V[0][i] + longint'(w1) * V[1][i]) / 4 + longint'($urandom_range(20)) - 10;
      if (x[i] > 255) x[i] = 255;
      if (x[i] < -256) x[i] = -256;
    end
    for (int m = 0; m < H; m++) begin
      expv[m] = 0;
      for (int i = 0; i < N; i++) expv[m] += x[i] * chan_pc[ch][m][i];
    end
    cyc = 0;
    for (int i = 0; i < N; i++) begin
      if (gaps && ($urandom_range(3) == 0)) begin
        @(negedge clk); spk_valid = 0; cyc++;
      end
      @(negedge clk);
      spk_valid = 1; spk_first = (i == 0); spk_ch = CW'(ch); spk_sample = BW'(x[i]);
      cyc++;
    end
    @(negedge clk);
    spk_valid = 0; spk_first = 0;
    chk(score_valid, $sformatf("score one cycle after the last sample (ch%0d)", ch));
    if (score_valid) begin
      n_scores++;
      chk(score_ch == CW'(ch), "score channel");
      for (int m = 0; m < chan_np[ch]; m++)
        chk(longint'(score[m]) == expv[m],
            $sformatf("ch%0d score%0d = %0d, expected %0d", ch, m, score[m], expv[m]));
    end
    last_x = x;
    if (gaps) n_gap_spikes++;
    if (train_busy) n_overlap_spikes++;
    if (collect_busy && ch != int'(collect_ch)) n_collect_overlap++;
  endtask

  longint V3 [4][N];

  // ---------------- collection of a covariance matrix ----------------
  task automatic collect_and_train(input int ch);
    localparam int S = 64;
    longint sxx [N][N], sx [N], mx, mn;
    int sh;
    for (int m = 0; m < 4; m++)
      for (int i = 0; i < N; i++) V[m][i] = longint'($urandom_range(200)) - 100;
    for (int i = 0; i < N; i++) begin
      sx[i] = 0;
      for (int k = 0; k < N; k++) sxx[i][k] = 0;
    end
    chan_np[ch] = 0;
    @(negedge clk);
    collect_start = 1; collect_ch = CW'(ch);
    @(negedge clk);
    collect_start = 0;
    chk(collect_busy, "collection busy after start");
    for (int n = 0; n < S; n++) begin
      spike(ch, n % 4 == 1);
      for (int i = 0; i < N; i++) begin
        sx[i] += last_x[i];
        for (int k = 0; k < N; k++) sxx[i][k] += last_x[i] * last_x[k];
      end
      if (n == S - 1) break;
      if (n % 16 == 5) begin            // another channel: sorted, not collected
        longint Vs [4][N];
        Vs = V; V = V3;
        spike(3, 0);
        V = Vs;
      end
      if (n == 20) spike(ch, 0);        // during the update: dropped
      repeat (N * N) @(negedge clk);
    end
    mx = 0; mn = 0;
    for (int i = 0; i < N; i++)
      for (int k = 0; k < N; k++) begin
        C[i][k] = S * sxx[i][k] - sx[i] * sx[k];
        if (C[i][k] > mx) mx = C[i][k];
        if (C[i][k] < mn) mn = C[i][k];
      end
    sh = 0;
    while (mx > 255 || mn < -256) begin
      mx = (mx + 1) >>> 1; mn = (mn + 1) >>> 1; sh++;
    end
    for (int i = 0; i < N; i++)
      for (int k = 0; k < N; k++)
        for (int r = 0; r < sh; r++) C[i][k] = (C[i][k] + 1) >>> 1;
    wait (collect_done);
    @(negedge clk);
    $display("channel %0d: covariance of 64 spikes collected, %0d halvings", ch, sh);
    train(ch, 0, 2, 10, 0);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    train(3, 4, 4, 20);
    V3 = V;
    for (int s = 0; s < 6; s++) spike(3, s[0]);
    // train channel 9 while channel 3 keeps sorting
    make_cov(2);
    load_cov();
    ref_run(2, 5);
    @(negedge clk);
    train_start = 1; train_ch = CW'(9); num_pc = PW'(2); num_iter = TW'(5);
    @(negedge clk);
    train_start = 0;
    begin
      longint Vs [4][N];
      Vs = V; V = V3;
      spike(3, 1);
      V = Vs;
    end
    wait (train_done);
    @(negedge clk);
    for (int p = 0; p < 2; p++)
      for (int i = 0; i < N; i++) begin
        chan_pc[9][p][i] = ref_pc[p][i];
        pc_rd_sel = HW'(p); pc_rd_idx = AW'(i);
        #1;
        chk(longint'(pc_rd_data) == ref_pc[p][i], $sformatf("ch9 PC%0d[%0d]", p, i));
      end
    chan_np[9] = 2;
    for (int s = 0; s < 4; s++) spike(9, s[0]);
    V = V3;
    for (int s = 0; s < 2; s++) spike(3, 1);
    collect_and_train(12);
    V = V3;
    spike(3, 0);
    // every mechanism must have happened
    $display("level shifts after distilling %0d, after orthogonal process %0d, clean checks %0d",
             n_shift_dist, n_shift_orth, n_clean_check);
    $display("orthogonal processes %0d, PCs output %0d, scores %0d (gapped spikes %0d, during training %0d)",
             n_orth, n_pc_out, n_scores, n_gap_spikes, n_overlap_spikes);
    chk(n_shift_dist > 0, "level shift after distilling occurred");
    chk(n_shift_orth > 0, "level shift after orthogonal process occurred");
    chk(n_clean_check > 0, "check without overflow occurred");
    chk(n_orth > 0, "orthogonal process occurred");
    chk(n_pc_out == 8, $sformatf("%0d PCs output, expected 8", n_pc_out));
    chk(n_gap_spikes > 0, "spike with gaps occurred");
    chk(n_overlap_spikes > 0, "feature extraction during training occurred");
    chk(level_shifts > 0, "level shift counter");
    chk(n_collect_done == 1, $sformatf("%0d collections done, expected 1", n_collect_done));
    chk(n_collect_overlap > 0, "feature extraction during collection occurred");
    chk(spikes_dropped == 1, $sformatf("dropped spike counter %0d, expected 1", spikes_dropped));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
