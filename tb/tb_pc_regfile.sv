// tb_pc_regfile: writes all H x N final-PC entries with random values and
// reads them back through both read ports at once (different addresses on
// each), against a shadow copy.
module tb_pc_regfile;
  localparam int N = 32, BW = 9, H = 4, AW = $clog2(N), HW = $clog2(H);
  logic clk = 0, we = 0;
  logic [HW-1:0] wsel = '0, a_sel = '0, b_sel = '0;
  logic [AW-1:0] widx = '0, a_idx = '0, b_idx = '0;
  logic signed [BW-1:0] wdata = '0, a_data, b_data;
  logic signed [BW-1:0] shadow [H][N];
  int checks = 0, failures = 0;

  pc_regfile #(.N(N), .BW(BW), .H(H)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int p = 0; p < H; p++)
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        shadow[p][i] = BW'($urandom);
        we = 1; wsel = HW'(p); widx = AW'(i); wdata = shadow[p][i];
      end
    @(negedge clk); we = 0;
    for (int n = 0; n < 500; n++) begin
      int pa, ia, pb, ib;
      pa = $urandom_range(H - 1); ia = $urandom_range(N - 1);
      pb = $urandom_range(H - 1); ib = $urandom_range(N - 1);
      a_sel = HW'(pa); a_idx = AW'(ia); b_sel = HW'(pb); b_idx = AW'(ib);
      #1;
      checks += 2;
      if (a_data != shadow[pa][ia]) begin failures++; $display("FAIL: port A [%0d][%0d]", pa, ia); end
      if (b_data != shadow[pb][ib]) begin failures++; $display("FAIL: port B [%0d][%0d]", pb, ib); end
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
