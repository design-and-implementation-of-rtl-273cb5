// spike_sort_top: digital core of the on-chip PCA spike sorting system.
//
// Two dedicated processors share the trained principal components:
//  * PCA training: the covariance matrix unit collects 64 detected spikes of
//    one channel and writes their covariance matrix, quantised to BW bits,
//    into the eigenvector generator (an external port can load a matrix
//    directly instead). The generator computes its num_pc leading
//    eigenvectors (scaled, mutually orthogonal, BW bits per element) and
//    streams them into the PC memory slot of channel train_ch. Channels are
//    trained one after another.
//  * On-line feature extraction: every detected spike (N samples) of a
//    channel is projected onto that channel's stored PCs; the H inner
//    products are its feature scores.
// The programmable controller that schedules collection and training, and
// the filtering / spike detection front end, are outside this core: their
// signals are ports here (collection and training start, spike sample
// stream). This partition follows the system diagram of
// the design; the port protocol is this implementation's own.
//
// Timing: collection spends N*N cycles on each accepted spike and about
// 3*N*N cycles after the last one; collect_done pulses when the matrix is in
// the generator's memory. Training takes N*N cycles per distilling pass plus the orthogonal
// passes and level shifts (about 192k cycles for 4 PCs, 20 iterations, N = 32,
// BW = 9); train_done pulses at the end. The PC memory slot is written while
// the generator streams the PCs out, so spikes of the channel being trained
// should not be fed until train_done. Scores appear one cycle after the last
// sample of a spike.
module spike_sort_top
  import eig_pkg::*;
#(
  parameter int unsigned N        = 32,   // samples per spike
  parameter int unsigned BW       = 9,    // covariance, PC and sample width
  parameter int unsigned H        = 4,    // maximum number of PCs
  parameter int unsigned ITER_MAX = 128,  // maximum iterations per PC
  parameter int unsigned CH       = 16,   // recording channels
  parameter int unsigned LOG2S    = 6,    // spikes per covariance matrix = 2^LOG2S
  localparam int unsigned AW = $clog2(N),
  localparam int unsigned HW = (H > 1) ? $clog2(H) : 1,
  localparam int unsigned PW = $clog2(H + 1),
  localparam int unsigned TW = $clog2(ITER_MAX + 1),
  localparam int unsigned CW = (CH > 1) ? $clog2(CH) : 1,
  localparam int unsigned SW = 2 * BW + $clog2(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // spike collection for the covariance matrix (from the system controller)
  input  logic                 collect_start,
  input  logic [CW-1:0]        collect_ch,
  output logic                 collect_busy,
  output logic                 collect_done,
  output logic [31:0]          spikes_dropped,
  // direct covariance matrix load (used when collect_busy is low)
  input  logic                 cov_we,
  input  logic [AW-1:0]        cov_row,
  input  logic [AW-1:0]        cov_col,
  input  logic signed [BW-1:0] cov_wdata,
  // training control (from the system controller)
  input  logic                 train_start,
  input  logic [CW-1:0]        train_ch,
  input  logic [PW-1:0]        num_pc,
  input  logic [TW-1:0]        num_iter,
  output logic                 train_busy,
  output logic                 train_done,
  // PC read-back of the last trained channel
  input  logic [HW-1:0]        pc_rd_sel,
  input  logic [AW-1:0]        pc_rd_idx,
  output logic signed [BW-1:0] pc_rd_data,
  // detected spikes (from filtering and spike detection)
  input  logic                 spk_valid,
  input  logic                 spk_first,
  input  logic [CW-1:0]        spk_ch,
  input  logic signed [BW-1:0] spk_sample,
  // feature scores (to the telemetry)
  output logic                 score_valid,
  output logic [CW-1:0]        score_ch,
  output logic signed [SW-1:0] score [H],
  // status
  output state_t               eig_state,
  output logic [31:0]          level_shifts
);
  logic                 pc_valid;
  logic [HW-1:0]        pc_sel;
  logic [AW-1:0]        pc_idx;
  logic signed [BW-1:0] pc_data;
  logic [CW-1:0]        ch_q;
  logic [CW-1:0]        pcm_ch;
  logic [AW-1:0]        pcm_idx;
  logic signed [BW-1:0] pcm_data [H];
  logic                 cu_we, g_we;
  logic [AW-1:0]        cu_row, cu_col, g_row, g_col;
  logic signed [BW-1:0] cu_wdata, g_wdata;

  cov_unit #(.N(N), .BW(BW), .CH(CH), .LOG2S(LOG2S)) u_cov (
    .clk, .rst_n,
    .start     (collect_start),
    .ch        (collect_ch),
    .spk_valid, .spk_first, .spk_ch, .spk_sample,
    .cov_we    (cu_we),
    .cov_row   (cu_row),
    .cov_col   (cu_col),
    .cov_wdata (cu_wdata),
    .busy      (collect_busy),
    .done      (collect_done),
    .dropped   (spikes_dropped)
  );

  // Covariance memory write: the covariance unit, else the direct port.
  always_comb begin
    if (cu_we) begin
      g_we = 1'b1; g_row = cu_row; g_col = cu_col; g_wdata = cu_wdata;
    end else begin
      g_we = cov_we; g_row = cov_row; g_col = cov_col; g_wdata = cov_wdata;
    end
  end

  // Channel being trained, latched at start.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                         ch_q <= '0;
    else if (train_start && !train_busy) ch_q <= train_ch;
  end

  eig_gen #(.N(N), .BW(BW), .H(H), .ITER_MAX(ITER_MAX)) u_eig (
    .clk, .rst_n,
    .cov_we   (g_we),
    .cov_row  (g_row),
    .cov_col  (g_col),
    .cov_wdata(g_wdata),
    .start    (train_start),
    .num_pc, .num_iter,
    .busy     (train_busy),
    .done     (train_done),
    .pc_valid, .pc_sel, .pc_idx, .pc_data,
    .rd_sel   (pc_rd_sel),
    .rd_idx   (pc_rd_idx),
    .rd_data  (pc_rd_data),
    .state    (eig_state),
    .shift_cnt(level_shifts)
  );

  pc_mem #(.N(N), .BW(BW), .H(H), .CH(CH)) u_pcm (
    .clk,
    .we   (pc_valid),
    .wch  (ch_q),
    .wpc  (pc_sel),
    .widx (pc_idx),
    .wdata(pc_data),
    .rch  (pcm_ch),
    .ridx (pcm_idx),
    .rdata(pcm_data)
  );

  feat_extract #(.N(N), .BW(BW), .H(H), .CH(CH)) u_fe (
    .clk, .rst_n,
    .spk_valid, .spk_first, .spk_ch, .spk_sample,
    .pcm_ch, .pcm_idx, .pcm_data,
    .score_valid, .score_ch, .score
  );
endmodule
