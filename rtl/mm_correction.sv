// mm_correction: correction step A/2 mod n of the modular multiplier.
//
// The least significant bit of A selects 0 or n, which is added to A so the
// sum is even; the sum is then shifted right by one bit.  With A < 3n the
// result is below 2n.  Two register stages (adder, shifter): r follows a_in
// and n by two clock cycles.
module mm_correction #(
  parameter int unsigned DIG_W = 17,
  parameter int unsigned ND    = 8
) (
  input  logic                  clk,
  input  logic [DIG_W*ND+1:0]   a_in,  // A < 3n < 2^(W+2)
  input  logic [DIG_W*ND-1:0]   n,
  output logic [DIG_W*ND-1:0]   r
);
  localparam int unsigned W = DIG_W * ND;
  logic [W+2:0] s;
  always_ff @(posedge clk) begin
    s <= (W+3)'(a_in) + (a_in[0] ? (W+3)'(n) : '0);
    r <= W'(s >> 1);
  end
endmodule
