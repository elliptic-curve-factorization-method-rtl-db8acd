// mont_mult: fully pipelined Montgomery "tail tailoring" modular multiplier.
//
// Computes r = x*y*R^-1 mod 2n with R = 2*b^ND, b = 2^17, for x, y < 2n and
// an odd modulus n < 2^134.  The bound keeps the top digit of every operand
// below b/2, which the halving correction needs for the result to stay < 2n.  One product can enter every clock
// cycle; the result and the tag that came with the operands leave LAT = 37
// cycles later (3 + 4*(ND-2) + 8 + 2 for ND = 8).
//
// The ND iterations of the digit loop are unrolled into ND circuits:
//   * iteration 0 (A = 0): P = x0*y, u0 = P mod b, A = P/b + u0*ns~
//   * iterations 1..ND-2: S = A + xi*y, ui = S mod b, A = S/b + ui*ns~
//   * iteration ND-1: S = A + x_{d-1}*y, u = (S mod b)*n' mod b,
//     A = (S + u*n)/b  (A < 3n)
//   * correction: A = A/2 mod n  (r < 2n)
// where n' = -n^-1 mod b and ns~ = floor(n*n'/b) + 1 (scaled modulus n*n',
// whose own Montgomery constant is 1, so the first ND-1 iterations need no
// multiplication by n').  Each "x" is a row_mult (17 x 136 digit row); n'
// uses the truncated nprime_mult.  The iteration split, the use of ns~ and the
// single halving step follow the original architecture; the operands are
// digit-parallel here rather than digit-skewed, and n, n' travel through the
// pipeline with the other operands instead of being injected late.
module mont_mult #(
  parameter int unsigned DIG_W = 17,
  parameter int unsigned ND    = 8,
  parameter int unsigned TAG_W = 24
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [DIG_W*ND-1:0]     x,
  input  logic [DIG_W*ND-1:0]     y,
  input  logic [DIG_W*ND-1:0]     nst,     // ns~
  input  logic [DIG_W*ND-1:0]     n,
  input  logic [DIG_W-1:0]        np,      // n'
  input  logic [TAG_W-1:0]        tag_in,
  output logic                    out_valid,
  output logic [DIG_W*ND-1:0]     r,
  output logic [TAG_W-1:0]        tag_out
);
  localparam int unsigned W    = DIG_W * ND;
  localparam int unsigned PW   = W + DIG_W;       // row product width
  localparam int unsigned AW   = W + DIG_W + 1;   // accumulator width
  localparam int unsigned MID0 = 3;               // first middle iteration stage
  localparam int unsigned LAST = MID0 + 4*(ND-2); // last iteration stage
  localparam int unsigned CORR = LAST + 8;        // correction stage
  localparam int unsigned LAT  = CORR + 2;

  typedef struct packed {
    logic [TAG_W-1:0] tag;
    logic [W-1:0]     x;
    logic [W-1:0]     y;
    logic [W-1:0]     nst;
    logic [W-1:0]     n;
    logic [DIG_W-1:0] np;
  } ctx_t;

  // operand context, delayed one stage per clock; ctx[k] is stage k
  ctx_t       ctx [LAT+1];
  logic [LAT:0] vld;
  assign ctx[0] = '{tag: tag_in, x: x, y: y, nst: nst, n: n, np: np};
  assign vld[0] = in_valid;
  for (genvar k = 0; k < LAT; k++) begin : g_ctx
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) vld[k+1] <= 1'b0;
      else        vld[k+1] <= vld[k];
    always_ff @(posedge clk) ctx[k+1] <= ctx[k];
  end

  // ---------------- iteration 0 ----------------
  logic [PW-1:0] p0, m0;
  logic [PW-1:0] hi0;
  logic [AW-1:0] acc [1:ND-1];   // acc[i]: A entering iteration i
  row_mult #(.DIG_W(DIG_W), .ND(ND)) u_x0 (.clk, .a(ctx[0].x[0 +: DIG_W]), .b(ctx[0].y), .p(p0));
  row_mult #(.DIG_W(DIG_W), .ND(ND)) u_u0 (.clk, .a(p0[DIG_W-1:0]), .b(ctx[1].nst), .p(m0));
  always_ff @(posedge clk) begin
    hi0    <= p0 >> DIG_W;
    acc[1] <= AW'(hi0) + AW'(m0);
  end

  // ---------------- iterations 1 .. ND-2 ----------------
  for (genvar i = 1; i <= ND-2; i++) begin : g_mid
    localparam int unsigned S0 = MID0 + 4*(i-1);
    logic [PW-1:0] p, m;
    logic [AW-1:0] a_d, s, sh;
    row_mult #(.DIG_W(DIG_W), .ND(ND)) u_xi (.clk, .a(ctx[S0].x[i*DIG_W +: DIG_W]), .b(ctx[S0].y), .p(p));
    row_mult #(.DIG_W(DIG_W), .ND(ND)) u_ui (.clk, .a(s[DIG_W-1:0]), .b(ctx[S0+2].nst), .p(m));
    always_ff @(posedge clk) begin
      a_d      <= acc[i];
      s        <= a_d + AW'(p);
      sh       <= s >> DIG_W;
      acc[i+1] <= sh + AW'(m);
    end
  end

  // ---------------- iteration ND-1 ----------------
  logic [PW-1:0]    pl, ml;
  logic [AW-1:0]    al_d, sl;
  logic [AW-1:0]    sl_d [5];
  logic [DIG_W-1:0] ul;
  logic [W+1:0]     al;   // A < 3n
  row_mult #(.DIG_W(DIG_W), .ND(ND)) u_xl (.clk, .a(ctx[LAST].x[(ND-1)*DIG_W +: DIG_W]), .b(ctx[LAST].y), .p(pl));
  nprime_mult #(.DIG_W(DIG_W)) u_np (.clk, .a(sl[DIG_W-1:0]), .np(ctx[LAST+2].np), .u(ul));
  row_mult #(.DIG_W(DIG_W), .ND(ND)) u_ul (.clk, .a(ul), .b(ctx[LAST+6].n), .p(ml));
  always_ff @(posedge clk) begin
    al_d    <= acc[ND-1];
    sl      <= al_d + AW'(pl);
    sl_d[0] <= sl;
    for (int k = 1; k < 5; k++) sl_d[k] <= sl_d[k-1];
    al      <= (W+2)'((sl_d[4] + AW'(ml)) >> DIG_W);
  end

  // ---------------- correction: A/2 mod n ----------------
  mm_correction #(.DIG_W(DIG_W), .ND(ND)) u_corr (.clk, .a_in(al), .n(ctx[CORR].n), .r(r));

  assign out_valid = vld[LAT];
  assign tag_out   = ctx[LAT].tag;
endmodule
