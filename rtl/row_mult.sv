// row_mult: 1 x d digit product (17 x 136 bits) built from ND dsp_mac cells.
//
// Cell j multiplies the digit a by digit j of b and adds the carry of cell
// j-1; the last carry becomes the top digit of the (ND+1)-digit product.  The
// product is registered once, so p follows a and b by one clock cycle.  One
// such row stands for each "x" box of the modular multiplier.
module row_mult #(
  parameter int unsigned DIG_W = 17,
  parameter int unsigned ND    = 8
) (
  input  logic                      clk,
  input  logic [DIG_W-1:0]          a,
  input  logic [DIG_W*ND-1:0]       b,
  output logic [DIG_W*(ND+1)-1:0]   p
);
  logic [DIG_W:0]            carry [ND+1];
  logic [DIG_W*(ND+1)-1:0]   p_c;

  assign carry[0] = '0;
  for (genvar j = 0; j < ND; j++) begin : g_cell
    dsp_mac #(.DIG_W(DIG_W)) u_cell (
      .x_i  (a),
      .y_j  (b[j*DIG_W +: DIG_W]),
      .cin  (carry[j]),
      .digit(p_c[j*DIG_W +: DIG_W]),
      .cout (carry[j+1])
    );
  end
  // a*b < 2^(DIG_W*(ND+1)), so the final carry fits in one digit
  assign p_c[ND*DIG_W +: DIG_W] = carry[ND][DIG_W-1:0];

  always_ff @(posedge clk) p <= p_c;
endmodule
