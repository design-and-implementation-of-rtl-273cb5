// cov_mem: covariance matrix memory of the eigenvector generator.
//
// N x N entries of BW signed bits (32 x 32 x 9 bits by default), written one
// entry per cycle through the covariance matrix input port and read by the
// eigenvector distilling process, entry (row, col) per cycle. Written as a
// register array with a combinational read so that a distilling pass takes
// exactly N*N cycles; a synchronous SRAM macro in its place would need the
// read address issued one cycle ahead.
module cov_mem #(
  parameter int unsigned N  = 32,
  parameter int unsigned BW = 9,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [AW-1:0]        wrow,
  input  logic [AW-1:0]        wcol,
  input  logic signed [BW-1:0] wdata,
  input  logic [AW-1:0]        rrow,
  input  logic [AW-1:0]        rcol,
  output logic signed [BW-1:0] rdata
);
  logic signed [BW-1:0] mem [N*N];

  always_ff @(posedge clk) begin
    if (we) mem[int'(wrow)*N + int'(wcol)] <= wdata;
  end

  assign rdata = mem[int'(rrow)*N + int'(rcol)];
endmodule
