// pc_regfile: register files for the final principal components.
//
// H vectors of N BW-bit elements. The generator writes eigenvector p here,
// one element per cycle, when it finishes it; the orthogonal process of every
// later eigenvector reads element (j, idx) through port A as phi_j, and the
// PC output reads through port B. Both read ports are combinational; the
// write takes effect at the clock edge. Not reset: an entry is read only
// after it has been written.
module pc_regfile #(
  parameter int unsigned N  = 32,
  parameter int unsigned BW = 9,
  parameter int unsigned H  = 4,
  localparam int unsigned AW = $clog2(N),
  localparam int unsigned HW = (H > 1) ? $clog2(H) : 1
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [HW-1:0]        wsel,
  input  logic [AW-1:0]        widx,
  input  logic signed [BW-1:0] wdata,
  input  logic [HW-1:0]        a_sel,
  input  logic [AW-1:0]        a_idx,
  output logic signed [BW-1:0] a_data,
  input  logic [HW-1:0]        b_sel,
  input  logic [AW-1:0]        b_idx,
  output logic signed [BW-1:0] b_data
);
  logic signed [BW-1:0] pc [H][N];

  always_ff @(posedge clk) begin
    if (we) pc[wsel][widx] <= wdata;
  end

  assign a_data = pc[a_sel][a_idx];
  assign b_data = pc[b_sel][b_idx];
endmodule
