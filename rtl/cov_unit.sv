// cov_unit: covariance matrix unit of the PCA training processor.
//
// Collects S = 2^LOG2S detected spikes of one channel and writes their
// covariance matrix, quantised to BW bits, into the covariance matrix memory
// of the eigenvector generator. Only the function of this unit is given for
// the design; the arithmetic below is the simplest this implementation found
// that needs no divider:
//   * every accepted spike x (N samples) is buffered, then the unit spends
//     N*N cycles on one multiply-accumulate per matrix entry:
//       Sxx[i][k] += x[i]*x[k],   and Sx[i] += x[i] on the diagonal pass;
//   * after the S-th spike it forms, entry by entry,
//       c[i][k] = S*Sxx[i][k] - Sx[i]*Sx[k]  (= S^2 times the covariance),
//     first to find the largest and smallest entry (N*N cycles), then
//     again to write it out (N*N cycles);
//   * the scale factor S^2 is irrelevant to the eigenvectors, so instead of
//     dividing, the matrix is brought to BW bits with the generator's own
//     level-shifting rule: x -> (x + 1) >> 1, repeated s times for the
//     smallest s that makes every entry fit. Repeating that rule s times
//     equals one shift with rounding up, ceil(c / 2^s), which is what the
//     write pass applies. Finding s takes one cycle per halving.
//
// Interface: start (while idle) clears the spike count and selects the
// channel ch. Spikes arrive as in the feature extractor: spk_valid per
// sample, spk_first on sample 0, spk_ch naming the channel; samples of other
// channels are ignored, and a spike that starts while the unit is busy
// updating is dropped (counted on dropped). The matrix leaves on cov_we /
// cov_row / cov_col / cov_wdata, one entry per cycle, and done pulses after
// the last entry. busy is high from start until done.
module cov_unit #(
  parameter int unsigned N     = 32,
  parameter int unsigned BW    = 9,
  parameter int unsigned CH    = 16,
  parameter int unsigned LOG2S = 6,   // 64 spikes per covariance matrix
  localparam int unsigned AW = $clog2(N),
  localparam int unsigned CW = (CH > 1) ? $clog2(CH) : 1,
  localparam int unsigned XW = 2 * BW + LOG2S,       // Sxx entries
  localparam int unsigned SXW = BW + LOG2S,          // Sx entries
  localparam int unsigned WW = 2 * BW + 2 * LOG2S + 1,  // S^2 * covariance
  localparam int unsigned SHW = $clog2(WW + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [CW-1:0]        ch,
  input  logic                 spk_valid,
  input  logic                 spk_first,
  input  logic [CW-1:0]        spk_ch,
  input  logic signed [BW-1:0] spk_sample,
  output logic                 cov_we,
  output logic [AW-1:0]        cov_row,
  output logic [AW-1:0]        cov_col,
  output logic signed [BW-1:0] cov_wdata,
  output logic                 busy,
  output logic                 done,
  output logic [31:0]          dropped
);
  typedef enum logic [2:0] {C_IDLE, C_COLLECT, C_UPDATE, C_SCAN, C_SCALE, C_WRITE} cstate_t;

  localparam logic [AW-1:0] LAST = AW'(N - 1);
  localparam logic signed [WW-1:0] POS_LIM = (WW'(1) <<< (BW-1)) - 1;
  localparam logic signed [WW-1:0] NEG_LIM = -(WW'(1) <<< (BW-1));

  cstate_t state;
  logic [CW-1:0]        ch_q;
  logic signed [BW-1:0] xbuf [N];
  logic signed [XW-1:0] sxx [N*N];
  logic signed [SXW-1:0] sx [N];
  logic [AW-1:0]        in_idx, i_cnt, k_cnt;
  logic                 in_spike;
  logic [LOG2S:0]       n_spk;
  logic signed [WW-1:0] cmax, cmin;
  logic [SHW-1:0]       shift;

  // entry arithmetic
  logic signed [XW-1:0]  sxx_rd;
  logic signed [XW-1:0]  prod_xx;
  logic signed [WW-1:0]  c_ent, round_add;
  logic signed [BW-1:0]  c_scaled;
  logic                  first_spk;
  logic                  take;

  always_comb begin
    sxx_rd    = sxx[int'(i_cnt) * N + int'(k_cnt)];
    prod_xx   = XW'(xbuf[i_cnt]) * XW'(xbuf[k_cnt]);
    c_ent     = (WW'(sxx_rd) <<< LOG2S) - WW'(sx[i_cnt]) * WW'(sx[k_cnt]);
    round_add = (WW'(1) <<< shift) - WW'(1);
    c_scaled  = BW'((c_ent + round_add) >>> shift);
    first_spk = (n_spk == '0);
    take      = spk_valid && (spk_ch == ch_q);
  end

  always_ff @(posedge clk) begin
    // sample buffer
    if (state == C_COLLECT && take && (spk_first || in_spike)) xbuf[spk_first ? '0 : in_idx] <= spk_sample;
    // accumulators: the first spike overwrites, later ones add
    if (state == C_UPDATE) begin
      sxx[int'(i_cnt) * N + int'(k_cnt)] <= first_spk ? prod_xx : sxx_rd + prod_xx;
      if (k_cnt == '0) sx[i_cnt] <= first_spk ? SXW'(xbuf[i_cnt]) : sx[i_cnt] + SXW'(xbuf[i_cnt]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= C_IDLE;
      ch_q     <= '0;
      in_idx   <= '0;
      in_spike <= 1'b0;
      i_cnt    <= '0;
      k_cnt    <= '0;
      n_spk    <= '0;
      cmax     <= '0;
      cmin     <= '0;
      shift    <= '0;
      done     <= 1'b0;
      dropped  <= '0;
    end else begin
      done <= 1'b0;
      if (state != C_COLLECT && state != C_IDLE && take && spk_first) dropped <= dropped + 1'b1;
      unique case (state)
        C_IDLE: begin
          if (start) begin
            ch_q     <= ch;
            n_spk    <= '0;
            in_spike <= 1'b0;
            state    <= C_COLLECT;
          end
        end
        C_COLLECT: begin
          if (take && (spk_first || in_spike)) begin
            in_spike <= 1'b1;
            in_idx   <= (spk_first ? '0 : in_idx) + 1'b1;
            if ((spk_first ? '0 : in_idx) == LAST) begin
              in_spike <= 1'b0;
              in_idx   <= '0;
              i_cnt    <= '0;
              k_cnt    <= '0;
              state    <= C_UPDATE;
            end
          end
        end
        C_UPDATE: begin
          k_cnt <= k_cnt + 1'b1;
          if (k_cnt == LAST) begin
            k_cnt <= '0;
            i_cnt <= i_cnt + 1'b1;
            if (i_cnt == LAST) begin
              i_cnt <= '0;
              n_spk <= n_spk + 1'b1;
              if (32'(n_spk) + 1 == (32'd1 << LOG2S)) begin
                cmax  <= '0;
                cmin  <= '0;
                state <= C_SCAN;
              end else begin
                state <= C_COLLECT;
              end
            end
          end
        end
        C_SCAN: begin
          if (c_ent > cmax) cmax <= c_ent;
          if (c_ent < cmin) cmin <= c_ent;
          k_cnt <= k_cnt + 1'b1;
          if (k_cnt == LAST) begin
            k_cnt <= '0;
            i_cnt <= i_cnt + 1'b1;
            if (i_cnt == LAST) begin
              i_cnt <= '0;
              shift <= '0;
              state <= C_SCALE;
            end
          end
        end
        C_SCALE: begin
          // one halving per cycle until the extremes fit in BW bits
          if (cmax > POS_LIM || cmin < NEG_LIM) begin
            cmax  <= (cmax + 1) >>> 1;
            cmin  <= (cmin + 1) >>> 1;
            shift <= shift + 1'b1;
          end else begin
            state <= C_WRITE;
          end
        end
        C_WRITE: begin
          k_cnt <= k_cnt + 1'b1;
          if (k_cnt == LAST) begin
            k_cnt <= '0;
            i_cnt <= i_cnt + 1'b1;
            if (i_cnt == LAST) begin
              i_cnt <= '0;
              done  <= 1'b1;
              state <= C_IDLE;
            end
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  assign busy      = (state != C_IDLE);
  assign cov_we    = (state == C_WRITE);
  assign cov_row   = i_cnt;
  assign cov_col   = k_cnt;
  assign cov_wdata = c_scaled;
endmodule
