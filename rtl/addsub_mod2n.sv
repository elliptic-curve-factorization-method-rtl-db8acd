// addsub_mod2n: pipelined modular adder/subtractor, r = (a +/- b) * 2^-2 mod 2n.
//
// Inputs a, b lie in [0, 2n]; the result lies in [0, 2n).  No comparison with
// n is made: instead the sum is made non-negative and divisible by 4 and then
// shifted right by two bits.
//   stage 1: S = a + b, or a - b in two's complement (b inverted, carry in)
//   stage 2: V = S (+2n when subtracting, so V is in [0, 4n]); in parallel
//            c0 = S[0] ? n : 0 and c0 + 2n, and RedMod, the second bit of the
//            multiple of n still needed: with V1 = S[1] xor sub,
//            RedMod = V1 when n = 3 (mod 4), V1 xor S[0] otherwise
//   stage 3: T = V + (RedMod ? c0 + 2n : c0), now T = 0 (mod 4), T < 7n
//   stage 4: r = T >> 2
// r follows a, b, sub and n by 4 clock cycles; one operation per cycle.  The
// extra factor 2^-2 is absorbed by keeping every operand premultiplied by 2^4.
// The structure follows the original circuit; the RedMod test reads bit 1 of
// n, the only bit that distinguishes the two cases for an odd modulus.
module addsub_mod2n #(
  parameter int unsigned DIG_W = 17,
  parameter int unsigned ND    = 8
) (
  input  logic                clk,
  input  logic [DIG_W*ND-1:0] a,
  input  logic [DIG_W*ND-1:0] b,
  input  logic                sub,   // 1: a - b, 0: a + b
  input  logic [DIG_W*ND-1:0] n,
  output logic [DIG_W*ND-1:0] r
);
  localparam int unsigned W  = DIG_W * ND;
  localparam int unsigned XW = W + 3;

  logic [XW-1:0] s1, v2, c02, c2n2, t3;
  logic          sub1, rm2;
  logic [W-1:0]  n1;

  always_ff @(posedge clk) begin
    // stage 1
    s1   <= XW'(a) + (sub ? ~XW'(b) : XW'(b)) + XW'(sub);
    sub1 <= sub;
    n1   <= n;
    // stage 2
    v2   <= s1 + (sub1 ? (XW'(n1) << 1) : '0);
    c02  <= s1[0] ? XW'(n1) : '0;
    c2n2 <= (s1[0] ? XW'(n1) : '0) + (XW'(n1) << 1);
    rm2  <= n1[1] ? (s1[1] ^ sub1) : (s1[1] ^ sub1 ^ s1[0]);
    // stage 3
    t3   <= v2 + (rm2 ? c2n2 : c02);
    // stage 4
    r    <= W'(t3 >> 2);
  end
endmodule
