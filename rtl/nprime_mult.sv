// nprime_mult: truncated 17 x 17 multiplier, u = (a * np) mod 2^17.
//
// Only the low digit of the product is needed (u_{d-1} of the last Montgomery
// iteration), so the product is split into a low partial product
// a[8:0]*np and a high one a[16:9]*np[7:0] shifted by 9; bits above 16 are
// never formed.  Four register stages: inputs, low partial product, high
// partial product, sum.  u follows a and np by 4 clock cycles.  The split is
// this design's choice; four stages follow the original circuit.  Lint
// reports the upper bits of the delayed np and the low bits of the delayed a
// as unused: the truncated high partial product does not need them.
module nprime_mult #(
  parameter int unsigned DIG_W = 17
) (
  input  logic             clk,
  input  logic [DIG_W-1:0] a,
  input  logic [DIG_W-1:0] np,
  output logic [DIG_W-1:0] u
);
  localparam int unsigned LO = DIG_W / 2;  // 8 -> low part a[8:0] is LO+1 bits
  localparam int unsigned LB = LO + 1;

  logic [DIG_W-1:0] a1, np1, np2;
  logic [DIG_W-1:0] a2;
  logic [DIG_W-1:0] plo2, plo3, phi3;

  always_ff @(posedge clk) begin
    // stage 1: register operands
    a1   <= a;
    np1  <= np;
    // stage 2: low partial product
    plo2 <= DIG_W'(a1[LB-1:0]) * np1;
    a2   <= a1;
    np2  <= np1;
    // stage 3: high partial product, only the bits that land below 2^DIG_W
    phi3 <= (DIG_W'(a2[DIG_W-1:LB]) * DIG_W'(np2[DIG_W-LB-1:0])) << LB;
    plo3 <= plo2;
    // stage 4: sum
    u    <= plo3 + phi3;
  end
endmodule
