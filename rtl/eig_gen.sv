// eig_gen: leading eigenvector generator for PCA training.
//
// Computes the num_pc leading eigenvectors of the N x N covariance matrix
// held in cov_mem, one after another, by iterative eigenvector distilling:
// repeated multiplication by the covariance matrix, a Gram-Schmidt step
// against the eigenvectors already found, and an adaptive level shift after
// each of them. The Gram-Schmidt step is the division-free ("flipped") form
//   phi_p = (phi_j' phi_j) phi_p - (phi_p' phi_j) phi_j,
// and no normalisation is done; instead the level shift halves phi_p (with
// rounding) until every element fits in BW signed bits, so the results are
// mutually orthogonal but scaled eigenvectors that use the full BW-bit range.
//
// Structure (as in the design's block diagram): covariance matrix memory,
// register files for intermediary data, register files for the final PCs,
// one multiplier and one adder/subtractor forming a MAC, a >>1 shifter, a
// comparator, and the control engine. Everything runs serially: N*N cycles
// per distilling pass, 4*N per orthogonal process against one phi_j, N per
// overflow check and N per level shift (the comparator checks the halved
// values during a shift pass, so a shift pass doubles as the next check). The operand muxes around the MAC are
// this implementation's reading of the block diagram.
//
// Interface: the covariance matrix is loaded through cov_we / cov_row /
// cov_col / cov_wdata (one entry per cycle, while idle). start with num_pc and
// num_iter starts a run; each finished eigenvector streams out on pc_valid /
// pc_sel / pc_idx / pc_data (N cycles) and stays readable through rd_sel /
// rd_idx / rd_data. done pulses once at the end of the run.
module eig_gen
  import eig_pkg::*;
#(
  parameter int unsigned N        = 32,   // samples per spike waveform
  parameter int unsigned BW       = 9,    // covariance / PC bit width
  parameter int unsigned H        = 4,    // maximum number of PCs
  parameter int unsigned ITER_MAX = 128,  // maximum iterations per PC
  parameter int unsigned IW       = 3 * BW + $clog2(N),  // internal width
  localparam int unsigned AW = $clog2(N),
  localparam int unsigned HW = (H > 1) ? $clog2(H) : 1,
  localparam int unsigned PW = $clog2(H + 1),
  localparam int unsigned TW = $clog2(ITER_MAX + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // covariance matrix input
  input  logic                 cov_we,
  input  logic [AW-1:0]        cov_row,
  input  logic [AW-1:0]        cov_col,
  input  logic signed [BW-1:0] cov_wdata,
  // run control
  input  logic                 start,
  input  logic [PW-1:0]        num_pc,
  input  logic [TW-1:0]        num_iter,
  output logic                 busy,
  output logic                 done,
  // PC output stream
  output logic                 pc_valid,
  output logic [HW-1:0]        pc_sel,
  output logic [AW-1:0]        pc_idx,
  output logic signed [BW-1:0] pc_data,
  // PC read port
  input  logic [HW-1:0]        rd_sel,
  input  logic [AW-1:0]        rd_idx,
  output logic signed [BW-1:0] rd_data,
  // status: current FSM state and number of level-shift passes since reset
  output state_t               state,
  output logic [31:0]          shift_cnt
);
  dp_ctrl_t ctl;
  logic [AW-1:0] rf_rd_idx, rf_wr_idx, c_row, c_col;
  logic [HW-1:0] pcj_sel, pcp_sel;
  logic signed [BW-1:0] cov_q, pcj;
  logic signed [IW-1:0] phi_rd, acc, norm, dot;
  logic signed [IW-1:0] mul_a, prod, addend, sum, shifted, phi_wdata, cmp_in;
  logic signed [BW-1:0] mul_b;
  logic cmp_ovf, ovf;

  eig_ctrl #(.N(N), .H(H), .ITER_MAX(ITER_MAX)) u_ctrl (
    .clk, .rst_n, .start, .num_pc, .num_iter,
    .cmp_ovf (cmp_ovf),
    .ctl,
    .rd_idx  (rf_rd_idx),
    .wr_idx  (rf_wr_idx),
    .cov_row (c_row),
    .cov_col (c_col),
    .pcj_sel, .pcp_sel,
    .busy, .done, .pc_valid,
    .state_o (state),
    .shift_cnt
  );

  cov_mem #(.N(N), .BW(BW)) u_cov (
    .clk, .we(cov_we), .wrow(cov_row), .wcol(cov_col), .wdata(cov_wdata),
    .rrow(c_row), .rcol(c_col), .rdata(cov_q)
  );

  eig_regfile #(.N(N), .IW(IW)) u_rf (
    .clk, .rst_n,
    .rd_idx    (rf_rd_idx),
    .phi_rd,
    .phi_we    (ctl.phi_we),
    .phi_wnext (ctl.phi_wnext),
    .wr_idx    (rf_wr_idx),
    .phi_wdata,
    .init      (ctl.phi_init),
    .bank_flip (ctl.bank_flip),
    .acc_we    (ctl.acc_we),
    .norm_we   (ctl.norm_we),
    .dot_we    (ctl.dot_we),
    .sum,
    .acc, .norm, .dot
  );

  pc_regfile #(.N(N), .BW(BW), .H(H)) u_pc (
    .clk,
    .we    (ctl.pc_we),
    .wsel  (pcp_sel),
    .widx  (rf_rd_idx),
    .wdata (phi_rd[BW-1:0]),
    .a_sel (pcj_sel),
    .a_idx (rf_rd_idx),
    .a_data(pcj),
    .b_sel (rd_sel),
    .b_idx (rd_idx),
    .b_data(rd_data)
  );

  // Operand muxes of the MAC.
  always_comb begin
    unique case (ctl.mul_a)
      MA_COV:  mul_a = IW'(cov_q);
      MA_PHI:  mul_a = phi_rd;
      MA_PCJ:  mul_a = IW'(pcj);
      MA_NORM: mul_a = norm;
      MA_DOT:  mul_a = dot;
      default: mul_a = '0;
    endcase
    mul_b = (ctl.mul_b == MB_PCJ) ? pcj : phi_rd[BW-1:0];
    unique case (ctl.addend)
      AD_ACC:  addend = acc;
      AD_PHI:  addend = phi_rd;
      default: addend = '0;
    endcase
    phi_wdata = ctl.shift_sel ? shifted : sum;
    // During a shift pass the comparator checks the halved value.
    cmp_in    = ctl.shift_sel ? shifted : phi_rd;
  end

  eig_mult   #(.IW(IW), .BW(BW)) u_mult (.a(mul_a), .b(mul_b), .p(prod));
  eig_addsub #(.IW(IW))          u_add  (.addend, .product(prod), .sub(ctl.sub), .y(sum));
  eig_rshift #(.IW(IW))          u_shr  (.x(phi_rd), .y(shifted));
  eig_cmp    #(.IW(IW), .BW(BW)) u_cmp  (.x(cmp_in), .ovf);

  assign cmp_ovf = ovf & ctl.chk_en;

  // PC output stream: the element written into the final-PC registers.
  assign pc_sel  = pcp_sel;
  assign pc_idx  = rf_rd_idx;
  assign pc_data = phi_rd[BW-1:0];
endmodule
