// eig_rshift: one step of the adaptive level shift.
//
// y = (x + 1) >> 1 with an arithmetic shift, i.e. x divided by two and
// rounded to nearest with halves rounded up. The control engine applies it
// to every element of phi_p (N cycles) each time the overflow check finds an
// element outside the BW-bit range. The +1 is folded into this unit rather
// than routed through the shared adder. Combinational.
module eig_rshift #(
  parameter int unsigned IW = 32
) (
  input  logic signed [IW-1:0] x,
  output logic signed [IW-1:0] y
);
  logic signed [IW:0] t;

  always_comb begin
    t = {x[IW-1], x} + (IW+1)'(1);
    y = IW'(t >>> 1);
  end
endmodule
