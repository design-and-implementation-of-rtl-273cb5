// tb_cov_mem: fills the full 32 x 32 covariance memory with random entries,
// reads every entry back in a shuffled order and compares with a shadow copy;
// then overwrites a few entries and checks that only those changed.
module tb_cov_mem;
  localparam int N = 32, BW = 9, AW = $clog2(N);
  logic clk = 0, we = 0;
  logic [AW-1:0] wrow = '0, wcol = '0, rrow = '0, rcol = '0;
  logic signed [BW-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  logic signed [BW-1:0] shadow [N][N];

  cov_mem #(.N(N), .BW(BW)) dut (.*);

  always #5 clk = ~clk;

  task automatic readall();
    for (int n = 0; n < N * N; n++) begin
      int r, c;
      r = (n * 7) % N; c = (n / N * 13 + n) % N;
      rrow = AW'(r); rcol = AW'(c);
      #1;
      checks++;
      if (rdata != shadow[r][c]) begin
        failures++;
        $display("FAIL: [%0d][%0d] = %0d, expected %0d", r, c, rdata, shadow[r][c]);
      end
    end
  endtask

  initial begin
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        @(negedge clk);
        shadow[r][c] = BW'($urandom);
        we = 1; wrow = AW'(r); wcol = AW'(c); wdata = shadow[r][c];
      end
    @(negedge clk); we = 0;
    readall();
    for (int n = 0; n < 20; n++) begin
      int r, c;
      r = $urandom_range(N - 1); c = $urandom_range(N - 1);
      @(negedge clk);
      shadow[r][c] = BW'($urandom);
      we = 1; wrow = AW'(r); wcol = AW'(c); wdata = shadow[r][c];
    end
    @(negedge clk); we = 0;
    readall();
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
