// pc_mem: PC memory of the on-line feature extraction processor.
//
// Keeps the trained principal components of every recording channel: CH
// channels x N samples, each word holding the H PC elements of one sample
// (BW bits each). The training side writes one element per cycle (channel,
// PC number, sample index), as the eigenvector generator streams a finished
// PC out; the feature extraction side reads, per cycle, the H elements of one
// sample of one channel, so all H inner products advance together. Written as
// a register array with a byte-style element write enable and a combinational
// read; the organisation (one word per sample holding all H PCs) is this
// implementation's choice.
module pc_mem #(
  parameter int unsigned N  = 32,
  parameter int unsigned BW = 9,
  parameter int unsigned H  = 4,
  parameter int unsigned CH = 16,
  localparam int unsigned AW = $clog2(N),
  localparam int unsigned HW = (H > 1) ? $clog2(H) : 1,
  localparam int unsigned CW = (CH > 1) ? $clog2(CH) : 1
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [CW-1:0]        wch,
  input  logic [HW-1:0]        wpc,
  input  logic [AW-1:0]        widx,
  input  logic signed [BW-1:0] wdata,
  input  logic [CW-1:0]        rch,
  input  logic [AW-1:0]        ridx,
  output logic signed [BW-1:0] rdata [H]
);
  logic [H-1:0][BW-1:0] mem [CH][N];

  always_ff @(posedge clk) begin
    if (we) mem[wch][widx][wpc] <= wdata;
  end

  always_comb begin
    for (int m = 0; m < H; m++) rdata[m] = mem[rch][ridx][m];
  end
endmodule
