// dsp_mac: one cell of a 1 x d digit product, as mapped onto a DSP48 slice.
//
// The cell multiplies a 17-bit digit x_i by one 17-bit digit y_j of the wide
// operand and adds the carry handed over by the cell of the next lower digit
// (that cell's sum shifted right by 17, the ">>17" cascade of a DSP48).  It
// delivers the 17 least significant bits of the sum as digit j of the product
// and passes the upper bits on.  Purely combinational: the row that chains the
// cells (row_mult) registers the result.  The DSP48 of the original mapping
// also registers the cell inputs so that digits travel one cycle apart; this
// design keeps the digits side by side and pipelines per row instead.
module dsp_mac #(
  parameter int unsigned DIG_W = 17
) (
  input  logic [DIG_W-1:0] x_i,   // multiplier digit
  input  logic [DIG_W-1:0] y_j,   // multiplicand digit
  input  logic [DIG_W:0]   cin,   // carry from the lower cell
  output logic [DIG_W-1:0] digit, // 17 LSBs of x_i*y_j + cin
  output logic [DIG_W:0]   cout   // (x_i*y_j + cin) >> 17
);
  logic [2*DIG_W:0] sum;
  always_comb begin
    sum   = (2*DIG_W+1)'(x_i) * (2*DIG_W+1)'(y_j) + (2*DIG_W+1)'(cin);
    digit = sum[DIG_W-1:0];
    cout  = sum[2*DIG_W:DIG_W];
  end
endmodule
