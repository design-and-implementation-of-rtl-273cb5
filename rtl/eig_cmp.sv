// eig_cmp: overflow comparator of the level check.
//
// Flags an element x of phi_p that does not fit in BW signed bits, i.e.
// x >= 2^(BW-1) or x < -2^(BW-1). One comparator serves both bounds: a mux
// driven by the sign of x chooses 2^(BW-1) for non-negative elements and
// -2^(BW-1) for negative ones, so each element takes one cycle and a whole
// vector N cycles. Combinational.
module eig_cmp #(
  parameter int unsigned IW = 32,
  parameter int unsigned BW = 9
) (
  input  logic signed [IW-1:0] x,
  output logic                 ovf
);
  localparam logic signed [IW-1:0] POS_LIM = IW'(1) <<< (BW-1);
  localparam logic signed [IW-1:0] NEG_LIM = -POS_LIM;

  logic signed [IW-1:0] thr;
  logic                 neg;

  always_comb begin
    neg = x[IW-1];
    thr = neg ? NEG_LIM : POS_LIM;
    ovf = neg ? (x < thr) : (x >= thr);
  end
endmodule
