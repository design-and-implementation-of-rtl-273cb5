// eig_ctrl: control engine (main FSM) of the leading eigenvector generator.
//
// Sequences the folded datapath through the modified distilling algorithm:
//
//   for p in 0 .. num_pc-1:
//     phi_p = [1 .. 1]                                      S_INIT    1 cycle
//     repeat num_iter times:
//       phi_p = Cov * phi_p                                 S_DISTILL N*N
//       level check and shift                               S_CHECK/S_SHIFT
//       for j in 0 .. p-1:
//         phi_p = (phi_j'phi_j) phi_p - (phi_p'phi_j) phi_j S_ORTH    4*N
//         level check and shift                             S_CHECK/S_SHIFT
//     store phi_p as PC p and stream it out                 S_OUTPUT  N
//
// Level check and shift: S_CHECK passes the N elements of phi_p through the
// comparator (N cycles) and ORs the flags; if any element is out of the
// BW-bit range, S_SHIFT halves every element with rounding (N cycles). The
// comparator watches the halved values as S_SHIFT writes them, so a shift
// pass is also the next check pass: S_SHIFT repeats until a pass leaves every
// element in range. A level adjustment with s shifts thus costs N*(1+s)
// cycles; this is the count that reproduces the design's published cycle
// budget (about 192k cycles for N = 32, BW = 9, 4 PCs, 20 iterations). The state set, the
// per-state cycle counts (N*N, 4*N per phi_j, N per check and per shift) and
// the order of the four orthogonal passes follow the design; the single-cycle
// initialisation, the N-cycle output pass and the start/done handshake are
// this implementation's choices.
//
// Interface: start is sampled in S_IDLE together with num_pc (1..H) and
// num_iter (1..ITER_MAX); busy is high from the next cycle until the last
// output element; done pulses for one cycle after it. pc_valid marks the
// output cycles with pc_sel / pc_idx naming the element being produced.
module eig_ctrl
  import eig_pkg::*;
#(
  parameter int unsigned N        = 32,
  parameter int unsigned H        = 4,
  parameter int unsigned ITER_MAX = 128,
  localparam int unsigned AW = $clog2(N),
  localparam int unsigned HW = (H > 1) ? $clog2(H) : 1,
  localparam int unsigned PW = $clog2(H + 1),
  localparam int unsigned TW = $clog2(ITER_MAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [PW-1:0] num_pc,
  input  logic [TW-1:0] num_iter,
  input  logic          cmp_ovf,
  output dp_ctrl_t      ctl,
  output logic [AW-1:0] rd_idx,
  output logic [AW-1:0] wr_idx,
  output logic [AW-1:0] cov_row,
  output logic [AW-1:0] cov_col,
  output logic [HW-1:0] pcj_sel,
  output logic [HW-1:0] pcp_sel,
  output logic          busy,
  output logic          done,
  output logic          pc_valid,
  output state_t        state_o,
  output logic [31:0]   shift_cnt   // level-shift passes since reset
);
  localparam logic [AW-1:0] LAST = AW'(N - 1);

  state_t      state;
  orth_phase_t phase;
  logic [AW-1:0] i_cnt, k_cnt;
  logic [HW-1:0] p_cnt, j_cnt;
  logic [TW-1:0] it_cnt;
  logic [PW-1:0] np_q;
  logic [TW-1:0] ni_q;
  logic          ovf_flag, from_orth;

  logic ovf_any;
  logic last_iter, last_pc, last_j;

  always_comb begin
    ovf_any   = ovf_flag | cmp_ovf;
    last_iter = (32'(it_cnt) + 1 >= 32'(ni_q));
    last_pc   = (32'(p_cnt) + 1 >= 32'(np_q));
    last_j    = (32'(j_cnt) + 1 >= 32'(p_cnt));
  end

  // Datapath control word and addresses.
  always_comb begin
    ctl       = '0;
    ctl.mul_a = MA_COV;
    ctl.mul_b = MB_PHI;
    ctl.addend = AD_ZERO;
    rd_idx    = i_cnt;
    wr_idx    = i_cnt;
    cov_row   = i_cnt;
    cov_col   = k_cnt;
    pcj_sel   = j_cnt;
    pcp_sel   = p_cnt;
    pc_valid  = 1'b0;
    unique case (state)
      S_IDLE: ;
      S_INIT: ctl.phi_init = 1'b1;
      S_DISTILL: begin
        rd_idx        = k_cnt;
        ctl.mul_a     = MA_COV;
        ctl.mul_b     = MB_PHI;
        ctl.addend    = (k_cnt == '0) ? AD_ZERO : AD_ACC;
        ctl.acc_we    = 1'b1;
        ctl.phi_we    = (k_cnt == LAST);
        ctl.phi_wnext = 1'b1;
        ctl.bank_flip = (k_cnt == LAST) && (i_cnt == LAST);
      end
      S_CHECK: ctl.chk_en = 1'b1;
      S_SHIFT: begin
        ctl.phi_we    = 1'b1;
        ctl.shift_sel = 1'b1;
        ctl.chk_en    = 1'b1;
      end
      S_ORTH: begin
        unique case (phase)
          O_NORM: begin
            ctl.mul_a   = MA_PCJ;
            ctl.mul_b   = MB_PCJ;
            ctl.addend  = (i_cnt == '0) ? AD_ZERO : AD_ACC;
            ctl.acc_we  = 1'b1;
            ctl.norm_we = (i_cnt == LAST);
          end
          O_DOT: begin
            ctl.mul_a  = MA_PHI;
            ctl.mul_b  = MB_PCJ;
            ctl.addend = (i_cnt == '0) ? AD_ZERO : AD_ACC;
            ctl.acc_we = 1'b1;
            ctl.dot_we = (i_cnt == LAST);
          end
          O_SCALE: begin
            ctl.mul_a  = MA_NORM;
            ctl.mul_b  = MB_PHI;
            ctl.addend = AD_ZERO;
            ctl.phi_we = 1'b1;
          end
          O_SUB: begin
            ctl.mul_a  = MA_DOT;
            ctl.mul_b  = MB_PCJ;
            ctl.addend = AD_PHI;
            ctl.sub    = 1'b1;
            ctl.phi_we = 1'b1;
          end
        endcase
      end
      S_OUTPUT: begin
        ctl.pc_we = 1'b1;
        pc_valid  = 1'b1;
      end
      default: ;
    endcase
  end

  // Sequencing.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      phase     <= O_NORM;
      i_cnt     <= '0;
      k_cnt     <= '0;
      p_cnt     <= '0;
      j_cnt     <= '0;
      it_cnt    <= '0;
      np_q      <= '0;
      ni_q      <= '0;
      ovf_flag  <= 1'b0;
      from_orth <= 1'b0;
      done      <= 1'b0;
      shift_cnt <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            np_q  <= num_pc;
            ni_q  <= num_iter;
            p_cnt <= '0;
            state <= S_INIT;
          end
        end
        S_INIT: begin
          it_cnt <= '0;
          i_cnt  <= '0;
          k_cnt  <= '0;
          state  <= S_DISTILL;
        end
        S_DISTILL: begin
          k_cnt <= k_cnt + 1'b1;
          if (k_cnt == LAST) begin
            k_cnt <= '0;
            i_cnt <= i_cnt + 1'b1;
            if (i_cnt == LAST) begin
              i_cnt     <= '0;
              ovf_flag  <= 1'b0;
              from_orth <= 1'b0;
              state     <= S_CHECK;
            end
          end
        end
        S_CHECK, S_SHIFT: begin
          ovf_flag <= ovf_any;
          i_cnt    <= i_cnt + 1'b1;
          if (i_cnt == LAST) begin
            i_cnt    <= '0;
            ovf_flag <= 1'b0;
            if (ovf_any) begin
              shift_cnt <= shift_cnt + 1'b1;
              state     <= S_SHIFT;
            end else if (!from_orth && p_cnt != '0) begin
              j_cnt <= '0;
              phase <= O_NORM;
              state <= S_ORTH;
            end else if (from_orth && !last_j) begin
              j_cnt <= j_cnt + 1'b1;
              phase <= O_NORM;
              state <= S_ORTH;
            end else if (!last_iter) begin
              it_cnt <= it_cnt + 1'b1;
              k_cnt  <= '0;
              state  <= S_DISTILL;
            end else begin
              state <= S_OUTPUT;
            end
          end
        end
        S_ORTH: begin
          i_cnt <= i_cnt + 1'b1;
          if (i_cnt == LAST) begin
            i_cnt <= '0;
            if (phase == O_SUB) begin
              from_orth <= 1'b1;
              ovf_flag  <= 1'b0;
              state     <= S_CHECK;
            end else begin
              phase <= orth_phase_t'(phase + 2'd1);
            end
          end
        end
        S_OUTPUT: begin
          i_cnt <= i_cnt + 1'b1;
          if (i_cnt == LAST) begin
            i_cnt <= '0;
            if (last_pc) begin
              done  <= 1'b1;
              state <= S_IDLE;
            end else begin
              p_cnt <= p_cnt + 1'b1;
              state <= S_INIT;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy    = (state != S_IDLE);
  assign state_o = state;

  // The requested PC count and iteration count must be in range.
  a_num_pc_range: assert property (@(posedge clk)
    (state == S_IDLE && start) |-> (num_pc >= 1 && 32'(num_pc) <= H))
    else $error("num_pc out of range");
  a_num_iter_range: assert property (@(posedge clk)
    (state == S_IDLE && start) |-> (num_iter >= 1 && 32'(num_iter) <= ITER_MAX))
    else $error("num_iter out of range");
endmodule
