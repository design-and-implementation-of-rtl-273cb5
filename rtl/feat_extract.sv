// feat_extract: PCA feature extraction engine (inner products).
//
// Projects each detected spike waveform onto the H trained PCs of its
// channel: score_m = sum_i x[i] * PC_m[i], i = 0 .. N-1. Samples arrive one
// per cycle on spk_valid / spk_sample with spk_ch naming the channel and
// spk_first marking sample 0; gaps between samples are allowed, and sample i
// is the i-th valid sample since spk_first. H multiply-accumulators run in
// parallel, each reading its PC element for the current sample from the PC
// memory (combinational read). One cycle after the N-th sample the H scores
// appear on score_valid / score_ch / score for one cycle. Scores are kept at
// full precision, 2*BW + log2(N) bits. The document gives the function
// (inner product with the stored PCs); the parallel-MAC organisation and the
// streaming interface are this implementation's choices.
module feat_extract #(
  parameter int unsigned N  = 32,
  parameter int unsigned BW = 9,
  parameter int unsigned H  = 4,
  parameter int unsigned CH = 16,
  localparam int unsigned AW = $clog2(N),
  localparam int unsigned CW = (CH > 1) ? $clog2(CH) : 1,
  localparam int unsigned SW = 2 * BW + $clog2(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 spk_valid,
  input  logic                 spk_first,
  input  logic [CW-1:0]        spk_ch,
  input  logic signed [BW-1:0] spk_sample,
  // PC memory read port
  output logic [CW-1:0]        pcm_ch,
  output logic [AW-1:0]        pcm_idx,
  input  logic signed [BW-1:0] pcm_data [H],
  // feature scores
  output logic                 score_valid,
  output logic [CW-1:0]        score_ch,
  output logic signed [SW-1:0] score [H]
);
  localparam logic [AW-1:0] LAST = AW'(N - 1);

  logic [AW-1:0]        idx;
  logic signed [SW-1:0] acc [H];
  logic [AW-1:0]        cur_idx;
  logic signed [SW-1:0] nxt [H];

  assign cur_idx = spk_first ? '0 : idx;
  assign pcm_ch  = spk_ch;
  assign pcm_idx = cur_idx;

  // Next value of each accumulator: restart on sample 0.
  always_comb begin
    for (int m = 0; m < H; m++) begin
      nxt[m] = SW'(spk_sample) * SW'(pcm_data[m]);
      if (cur_idx != '0) nxt[m] = acc[m] + nxt[m];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx         <= '0;
      score_valid <= 1'b0;
      score_ch    <= '0;
      for (int m = 0; m < H; m++) begin
        acc[m]   <= '0;
        score[m] <= '0;
      end
    end else begin
      score_valid <= 1'b0;
      if (spk_valid) begin
        idx <= cur_idx + 1'b1;
        for (int m = 0; m < H; m++) begin
          acc[m] <= nxt[m];
          if (cur_idx == LAST) score[m] <= nxt[m];
        end
        if (cur_idx == LAST) begin
          idx         <= '0;
          score_valid <= 1'b1;
          score_ch    <= spk_ch;
        end
      end
    end
  end
endmodule
