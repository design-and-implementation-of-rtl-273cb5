// eig_mult: the multiplier of the generator's multiply-accumulate unit.
//
// A signed IW-bit operand (a covariance entry, a phi element or one of the
// two scalars of the orthogonal process) times a signed BW-bit operand (a phi
// element that has passed the level check, or a finished eigenvector element).
// The product is kept to IW bits: the scheduling guarantees that every product
// the generator forms fits, because phi_p and phi_j are at most BW bits wide
// when they are multiplied and the scalars are at most 2*BW+5 bits wide
// (for N = 32), so IW = 3*BW + log2(N) suffices. Purely combinational.
module eig_mult #(
  parameter int unsigned IW = 32,  // internal width
  parameter int unsigned BW = 9    // I/O width
) (
  input  logic signed [IW-1:0] a,
  input  logic signed [BW-1:0] b,
  output logic signed [IW-1:0] p
);
  logic signed [IW-1:0] b_ext;

  always_comb begin
    b_ext = IW'(b);   // sign extension
    p     = a * b_ext;
  end
endmodule
