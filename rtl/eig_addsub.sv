// eig_addsub: adder/subtractor of the multiply-accumulate unit.
//
// y = addend + product, or addend - product when sub is set. The addend is
// chosen upstream among 0 (start of a sum), the running partial sum and a
// stored phi element (the orthogonal process starts its final pass from the
// scaled vector (phi_j' phi_j) * phi_p and subtracts (phi_p' phi_j) * phi_j).
// Combinational, IW bits, wrap-around arithmetic; the word length is chosen
// so that no sum the generator forms overflows.
module eig_addsub #(
  parameter int unsigned IW = 32
) (
  input  logic signed [IW-1:0] addend,
  input  logic signed [IW-1:0] product,
  input  logic                 sub,
  output logic signed [IW-1:0] y
);
  always_comb begin
    if (sub) y = addend - product;
    else     y = addend + product;
  end
endmodule
