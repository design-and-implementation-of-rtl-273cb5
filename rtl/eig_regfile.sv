// eig_regfile: register files for the generator's intermediary data.
//
// Holds two banks of N IW-bit phi elements, the running partial sum and the
// two scalars of the orthogonal process (a = phi_j' phi_j, b = phi_p' phi_j).
// The working bank holds phi_p; a distilling pass reads the working bank and
// writes the new vector into the other bank, and bank_flip then makes the
// new vector the working one. All other passes update the working bank in
// place (read and write the same element in the same cycle).
//
// Interface: one combinational read port on the working bank (rd_idx), one
// write port (wr_idx, phi_wdata) aimed at the working bank or, with
// phi_wnext, at the other bank. init sets the working bank to all ones in a
// single cycle. All writes take effect at the clock edge; reset clears the
// bank select and the scalars.
module eig_regfile #(
  parameter int unsigned N  = 32,
  parameter int unsigned IW = 32,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [AW-1:0]        rd_idx,
  output logic signed [IW-1:0] phi_rd,
  input  logic                 phi_we,
  input  logic                 phi_wnext,
  input  logic [AW-1:0]        wr_idx,
  input  logic signed [IW-1:0] phi_wdata,
  input  logic                 init,
  input  logic                 bank_flip,
  input  logic                 acc_we,
  input  logic                 norm_we,
  input  logic                 dot_we,
  input  logic signed [IW-1:0] sum,
  output logic signed [IW-1:0] acc,
  output logic signed [IW-1:0] norm,
  output logic signed [IW-1:0] dot
);
  logic signed [IW-1:0] phi [2][N];
  logic                 bank;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bank <= 1'b0;
      acc  <= '0;
      norm <= '0;
      dot  <= '0;
    end else begin
      if (bank_flip) bank <= ~bank;
      if (acc_we)    acc  <= sum;
      if (norm_we)   norm <= sum;
      if (dot_we)    dot  <= sum;
    end
  end

  always_ff @(posedge clk) begin
    if (init) begin
      for (int i = 0; i < N; i++) phi[bank][i] <= IW'(1);
    end else if (phi_we) begin
      phi[phi_wnext ? ~bank : bank][wr_idx] <= phi_wdata;
    end
  end

  assign phi_rd = phi[bank][rd_idx];
endmodule
