// tb_feat_extract: drives the inner-product engine with random spikes on
// random channels, with and without idle cycles between samples, while a
// behavioural PC memory (random contents, read combinationally) answers its
// reads. Each spike's H scores must equal the inner products computed here,
// arrive one cycle after the last sample, for one cycle, with the spike's
// channel.
module tb_feat_extract;
  localparam int N = 32, BW = 9, H = 4, CH = 16;
  localparam int AW = $clog2(N), CW = $clog2(CH), SW = 2 * BW + $clog2(N);
  logic clk = 0, rst_n = 0;
  logic spk_valid = 0, spk_first = 0;
  logic [CW-1:0] spk_ch = '0;
  logic signed [BW-1:0] spk_sample = '0;
  logic [CW-1:0] pcm_ch;
  logic [AW-1:0] pcm_idx;
  logic signed [BW-1:0] pcm_data [H];
  logic score_valid;
  logic [CW-1:0] score_ch;
  logic signed [SW-1:0] score [H];
  logic signed [BW-1:0] pcs [CH][N][H];
  int checks = 0, failures = 0, nvalid = 0;

  feat_extract #(.N(N), .BW(BW), .H(H), .CH(CH)) dut (.*);

  always #5 clk = ~clk;

  always_comb for (int m = 0; m < H; m++) pcm_data[m] = pcs[pcm_ch][pcm_idx][m];

  always @(posedge clk) if (rst_n && score_valid) nvalid++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int c = 0; c < CH; c++)
      for (int i = 0; i < N; i++)
        for (int m = 0; m < H; m++) pcs[c][i][m] = BW'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 50; s++) begin
      int ch, n_before;
      longint x[N], expv[H];
      ch = $urandom_range(CH - 1);
      for (int i = 0; i < N; i++) x[i] = longint'($urandom_range(511)) - 256;
      if (s == 0) for (int i = 0; i < N; i++) x[i] = -256;   // extreme magnitudes
      for (int m = 0; m < H; m++) begin
        expv[m] = 0;
        for (int i = 0; i < N; i++) expv[m] += x[i] * longint'(pcs[ch][i][m]);
      end
      n_before = nvalid;
      for (int i = 0; i < N; i++) begin
        if (s[0] && $urandom_range(2) == 0) begin
          @(negedge clk); spk_valid = 0;
        end
        @(negedge clk);
        spk_valid = 1; spk_first = (i == 0); spk_ch = CW'(ch); spk_sample = BW'(x[i]);
      end
      @(negedge clk);
      spk_valid = 0; spk_first = 0;
      chk(score_valid && nvalid == n_before, "score valid one cycle after the last sample");
      chk(score_ch == CW'(ch), "score channel");
      for (int m = 0; m < H; m++)
        chk(longint'(score[m]) == expv[m], $sformatf("spike %0d score%0d = %0d, expected %0d", s, m, score[m], expv[m]));
      @(negedge clk);
      chk(!score_valid && nvalid == n_before + 1, "score valid for exactly one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
