// tb_eig_ctrl: checks the control engine on its own at a small size
// (N = 4, H = 3). The testbench plays the comparator: for the k-th level
// adjustment it reports an overflow in the first (k mod 3) passes, so
// adjustments with 0, 1 and 2 shifts all occur. The observed sequence of
// states and their lengths is compared with the sequence the algorithm
// prescribes (INIT 1, DISTILL N*N, CHECK N, SHIFT N per shift, ORTH 4*N per
// earlier PC, OUTPUT N), and a few control-word counts are checked: N
// next-bank writes per distilling pass, one bank flip per pass, N output
// cycles per PC, one done pulse per run.
module tb_eig_ctrl;
  import eig_pkg::*;
  localparam int N = 4, H = 3, ITER_MAX = 8;
  localparam int AW = $clog2(N), HW = $clog2(H), PW = $clog2(H + 1), TW = $clog2(ITER_MAX + 1);

  logic clk = 0, rst_n = 0, start = 0, cmp_ovf = 0;
  logic [PW-1:0] num_pc = '0;
  logic [TW-1:0] num_iter = '0;
  dp_ctrl_t ctl;
  logic [AW-1:0] rd_idx, wr_idx, cov_row, cov_col;
  logic [HW-1:0] pcj_sel, pcp_sel;
  logic busy, done, pc_valid;
  state_t state_o;
  logic [31:0] shift_cnt;

  eig_ctrl #(.N(N), .H(H), .ITER_MAX(ITER_MAX)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  state_t exp_st [$];
  int     exp_len [$];
  state_t obs_st [$];
  int     obs_len [$];
  int proc_idx = 0, cip = 0, s_cur = 0;
  bit in_proc = 0;
  int n_next_wr = 0, n_flip = 0, n_out = 0, n_done = 0, n_shift = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic void push(state_t s, int len);
    if (len == 0) return;
    exp_st.push_back(s);
    exp_len.push_back(len);
  endfunction

  function automatic void expect_run(int np, int ni, ref int pidx);
    for (int p = 0; p < np; p++) begin
      push(S_INIT, 1);
      for (int it = 0; it < ni; it++) begin
        push(S_DISTILL, N * N);
        push(S_CHECK, N); push(S_SHIFT, N * (pidx % 3)); n_shift += pidx % 3; pidx++;
        for (int j = 0; j < p; j++) begin
          push(S_ORTH, 4 * N);
          push(S_CHECK, N); push(S_SHIFT, N * (pidx % 3)); n_shift += pidx % 3; pidx++;
        end
      end
      push(S_OUTPUT, N);
    end
  endfunction

  // comparator model and observers
  always @(negedge clk) begin
    if (state_o == S_CHECK || state_o == S_SHIFT) begin
      if (!in_proc) begin
        in_proc = 1; cip = 0; s_cur = proc_idx % 3; proc_idx++;
      end else cip++;
      cmp_ovf = ((cip / N) < s_cur) && ((cip % N) == N - 2);
    end else begin
      in_proc = 0; cmp_ovf = 0;
    end
    if (state_o != S_IDLE) begin
      if (obs_st.size() > 0 && obs_st[$] == state_o && !(state_o == S_CHECK && cip == 0))
        obs_len[$] = obs_len[$] + 1;
      else begin
        obs_st.push_back(state_o);
        obs_len.push_back(1);
      end
    end
    if (ctl.phi_we && ctl.phi_wnext) n_next_wr++;
    if (ctl.bank_flip) n_flip++;
    if (pc_valid) n_out++;
    if (done) n_done++;
  end

  task automatic run(int np, int ni);
    int pidx, ndist;
    exp_st.delete(); exp_len.delete(); obs_st.delete(); obs_len.delete();
    n_next_wr = 0; n_flip = 0; n_out = 0; n_done = 0;
    pidx = proc_idx;
    expect_run(np, ni, pidx);
    @(negedge clk);
    start = 1; num_pc = PW'(np); num_iter = TW'(ni);
    @(negedge clk);
    start = 0;
    wait (done);
    @(negedge clk);
    @(negedge clk);
    chk(obs_st.size() == exp_st.size(),
        $sformatf("%0d state runs, expected %0d", obs_st.size(), exp_st.size()));
    for (int n = 0; n < exp_st.size() && n < obs_st.size(); n++)
      chk(obs_st[n] == exp_st[n] && obs_len[n] == exp_len[n],
          $sformatf("run %0d: %s x%0d, expected %s x%0d", n, obs_st[n].name(), obs_len[n],
                    exp_st[n].name(), exp_len[n]));
    ndist = np * ni;
    chk(n_next_wr == ndist * N, $sformatf("next-bank writes %0d", n_next_wr));
    chk(n_flip == ndist, $sformatf("bank flips %0d", n_flip));
    chk(n_out == np * N, $sformatf("output cycles %0d", n_out));
    chk(n_done == 1, $sformatf("done pulses %0d", n_done));
    chk(!busy, "idle after done");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(3, 2);
    run(1, 3);
    run(2, 1);
    chk(shift_cnt == 32'(n_shift), $sformatf("shift counter %0d, expected %0d", shift_cnt, n_shift));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
