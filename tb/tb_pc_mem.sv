// tb_pc_mem: fills the whole PC memory (16 channels x 4 PCs x 32 samples)
// one element per cycle with random values, then reads random (channel,
// sample) words and compares all H elements of each with a shadow copy.
module tb_pc_mem;
  localparam int N = 32, BW = 9, H = 4, CH = 16;
  localparam int AW = $clog2(N), HW = $clog2(H), CW = $clog2(CH);
  logic clk = 0, we = 0;
  logic [CW-1:0] wch = '0, rch = '0;
  logic [HW-1:0] wpc = '0;
  logic [AW-1:0] widx = '0, ridx = '0;
  logic signed [BW-1:0] wdata = '0;
  logic signed [BW-1:0] rdata [H];
  logic signed [BW-1:0] shadow [CH][H][N];
  int checks = 0, failures = 0;

  pc_mem #(.N(N), .BW(BW), .H(H), .CH(CH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int c = 0; c < CH; c++)
      for (int p = 0; p < H; p++)
        for (int i = 0; i < N; i++) begin
          @(negedge clk);
          shadow[c][p][i] = BW'($urandom);
          we = 1; wch = CW'(c); wpc = HW'(p); widx = AW'(i); wdata = shadow[c][p][i];
        end
    @(negedge clk); we = 0;
    for (int n = 0; n < 400; n++) begin
      int c, i;
      c = $urandom_range(CH - 1); i = $urandom_range(N - 1);
      rch = CW'(c); ridx = AW'(i);
      #1;
      for (int p = 0; p < H; p++) begin
        checks++;
        if (rdata[p] != shadow[c][p][i]) begin
          failures++;
          $display("FAIL: ch%0d PC%0d[%0d] = %0d, expected %0d", c, p, i, rdata[p], shadow[c][p][i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
