// tb_cov_unit: collects 64 synthetic spikes (mixtures of three random
// shapes plus noise) on channel 5 while spikes of channel 2 are interleaved
// (they must be ignored) and one channel-5 spike is started during an update
// (it must be dropped). The written matrix is compared entry by entry with a
// model: c = S*sum(x x') - sum(x) sum(x)', halved with (x + 1) >> 1 as many
// times as needed for the largest and smallest entry to fit in 9 bits. Also
// checked: N*N writes, symmetry of the result, the drop counter, and the
// processing time after the last sample: 3*N*N + s + 1 cycles for s halvings.
module tb_cov_unit;
  localparam int N = 32, BW = 9, CH = 16, LOG2S = 6, S = 1 << LOG2S;
  localparam int AW = $clog2(N), CW = $clog2(CH);

  logic clk = 0, rst_n = 0, start = 0;
  logic [CW-1:0] ch = '0, spk_ch = '0;
  logic spk_valid = 0, spk_first = 0;
  logic signed [BW-1:0] spk_sample = '0;
  logic cov_we, busy, done;
  logic [AW-1:0] cov_row, cov_col;
  logic signed [BW-1:0] cov_wdata;
  logic [31:0] dropped;

  cov_unit #(.N(N), .BW(BW), .CH(CH), .LOG2S(LOG2S)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint shapes [3][N];
  longint sxx [N][N], sx [N];
  longint got [N][N];
  int nwr = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n && cov_we) begin
    got[cov_row][cov_col] = longint'(cov_wdata);
    nwr++;
  end

  task automatic send(input int c, input bit count_it);
    longint x[N];
    int a0, a1, a2;
    a0 = $urandom_range(8) - 4; a1 = $urandom_range(6) - 3; a2 = $urandom_range(4) - 2;
    for (int i = 0; i < N; i++) begin
      x[i] = (a0 * shapes[0][i] + a1 * shapes[1][i] + a2 * shapes[2][i]) / 4 + longint'($urandom_range(30)) - 15;
      if (x[i] > 255) x[i] = 255;
      if (x[i] < -256) x[i] = -256;
    end
    if (count_it)
      for (int i = 0; i < N; i++) begin
        sx[i] += x[i];
        for (int k = 0; k < N; k++) sxx[i][k] += x[i] * x[k];
      end
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      spk_valid = 1; spk_first = (i == 0); spk_ch = CW'(c); spk_sample = BW'(x[i]);
    end
    @(negedge clk);
    spk_valid = 0; spk_first = 0;
  endtask

  initial begin
    longint c [N][N], mx, mn, e;
    int s, cyc;
    longint t_last, t_done;
    for (int m = 0; m < 3; m++)
      for (int i = 0; i < N; i++) shapes[m][i] = longint'($urandom_range(200)) - 100;
    for (int i = 0; i < N; i++) begin
      sx[i] = 0;
      for (int k = 0; k < N; k++) sxx[i][k] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; ch = CW'(5);
    @(negedge clk); start = 0;
    for (int n = 0; n < S; n++) begin
      if (n % 8 == 3) send(2, 0);       // other channel: ignored
      send(5, 1);                       // collected
      if (n == S - 1) break;
      if (n == 10) send(5, 0);          // arrives during the update: dropped
      repeat (N * N) @(negedge clk);    // let the update finish
    end
    t_last = $time - 10;                // the last sample was taken one cycle ago
    // model
    mx = 0; mn = 0;
    for (int i = 0; i < N; i++)
      for (int k = 0; k < N; k++) begin
        c[i][k] = S * sxx[i][k] - sx[i] * sx[k];
        if (c[i][k] > mx) mx = c[i][k];
        if (c[i][k] < mn) mn = c[i][k];
      end
    s = 0;
    while (mx > 255 || mn < -256) begin
      mx = (mx + 1) >>> 1; mn = (mn + 1) >>> 1; s++;
    end
    wait (done);
    t_done = $time;
    cyc = int'((t_done - t_last) / 10);
    $display("collection: %0d halvings, %0d cycles from the last sample to done", s, cyc);
    chk(cyc == 3 * N * N + s + 1, $sformatf("processing took %0d cycles, expected %0d", cyc, 3 * N * N + s + 1));
    @(negedge clk);
    chk(nwr == N * N, $sformatf("%0d entries written", nwr));
    chk(dropped == 1, $sformatf("dropped counter %0d", dropped));
    chk(!busy, "idle after done");
    for (int i = 0; i < N; i++)
      for (int k = 0; k < N; k++) begin
        e = c[i][k];
        for (int r = 0; r < s; r++) e = (e + 1) >>> 1;
        chk(got[i][k] == e, $sformatf("C[%0d][%0d] = %0d, expected %0d", i, k, got[i][k], e));
        chk(got[i][k] == got[k][i], "symmetric");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
