// tb_eig_regfile: exercises the intermediary register files against a
// behavioural shadow: one-cycle all-ones initialisation, in-place writes,
// writes into the other bank followed by a bank flip (the distilling
// pattern), and the partial-sum / scalar registers.
module tb_eig_regfile;
  localparam int N = 32, IW = 32, AW = $clog2(N);
  logic clk = 0, rst_n = 0;
  logic [AW-1:0] rd_idx = '0, wr_idx = '0;
  logic signed [IW-1:0] phi_rd, phi_wdata = '0, sum = '0, acc, norm, dot;
  logic phi_we = 0, phi_wnext = 0, init = 0, bank_flip = 0;
  logic acc_we = 0, norm_we = 0, dot_we = 0;
  logic signed [IW-1:0] sh [2][N];
  logic sbank;
  int checks = 0, failures = 0;

  eig_regfile #(.N(N), .IW(IW)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cmp_bank();
    for (int i = 0; i < N; i++) begin
      rd_idx = AW'(i);
      #1;
      chk(phi_rd == sh[sbank][i], $sformatf("phi[%0d] = %0d, expected %0d", i, phi_rd, sh[sbank][i]));
    end
  endtask

  initial begin
    sbank = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // initialise
    @(negedge clk); init = 1;
    @(negedge clk); init = 0;
    for (int i = 0; i < N; i++) sh[0][i] = 1;
    cmp_bank();
    // in-place writes
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      sh[sbank][i] = IW'($urandom);
      phi_we = 1; wr_idx = AW'(i); phi_wdata = sh[sbank][i];
    end
    @(negedge clk); phi_we = 0;
    cmp_bank();
    // write the other bank, then flip; working bank must not change before
    for (int r = 0; r < 3; r++) begin
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        sh[~sbank][i] = IW'($urandom);
        phi_we = 1; phi_wnext = 1; wr_idx = AW'(i); phi_wdata = sh[~sbank][i];
        bank_flip = (i == N - 1);
      end
      @(negedge clk);
      phi_we = 0; phi_wnext = 0; bank_flip = 0;
      sbank = ~sbank;
      cmp_bank();
    end
    // scalar registers
    @(negedge clk); sum = 32'sd123456; acc_we = 1;
    @(negedge clk); acc_we = 0; sum = -32'sd777; norm_we = 1;
    @(negedge clk); norm_we = 0; sum = 32'sd4242; dot_we = 1;
    @(negedge clk); dot_we = 0; sum = 0;
    chk(acc == 32'sd123456, "acc");
    chk(norm == -32'sd777, "norm");
    chk(dot == 32'sd4242, "dot");
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
