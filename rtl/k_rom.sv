// k_rom: the phase-1 scalar k of the elliptic curve method, held as a ROM.
//
// k is the product, over every prime p <= B1, of the largest power p^e that
// does not exceed B1.  The ROM is filled at elaboration by a constant
// function, so changing B1 regenerates it; for B1 = 960 k has 1374 bits.  The
// controller reads one bit per Montgomery ladder step (bit_o = k[idx],
// combinational) and takes the ladder length from nbits, the position of the
// leading one plus one.  Bounding the exponents by B1 is this design's
// reading; it matches about 1375 ladder steps per phase 1.
module k_rom #(
  parameter int unsigned B1 = 960,
  parameter int unsigned KW = 1536,               // ROM width, >= bit length of k
  localparam int unsigned IW = $clog2(KW) + 1
) (
  input  logic [IW-1:0] idx,
  output logic          bit_o,
  output logic [IW-1:0] nbits
);
  function automatic logic [KW-1:0] scalar_k(int unsigned bound);
    logic [KW-1:0] k;
    logic          prime;
    int unsigned   pe;
    k = KW'(1);
    for (int unsigned p = 2; p <= bound; p++) begin
      prime = 1'b1;
      for (int unsigned q = 2; q * q <= p; q++)
        if (p % q == 0) prime = 1'b0;
      if (prime) begin
        pe = p;
        while (pe * p <= bound) pe = pe * p;
        k = k * KW'(pe);
      end
    end
    return k;
  endfunction

  function automatic int unsigned bit_length(logic [KW-1:0] v);
    int unsigned len;
    len = 0;
    for (int unsigned i = 0; i < KW; i++)
      if (v[i]) len = i + 1;
    return len;
  endfunction

  localparam logic [KW-1:0] K     = scalar_k(B1);
  localparam int unsigned   K_LEN = bit_length(K);

  assign bit_o = (idx < IW'(KW)) ? K[idx[IW-2:0]] : 1'b0;
  assign nbits = IW'(K_LEN);
endmodule
