// ecm_pkg: sizes and types shared by the ECM phase-1 processor.
//
// Numbers are held in radix b = 2^17 with ND = 8 digits (136 bits), enough for
// moduli below 2^134 (operands < 2n then have a top digit below b/2, which
// the multiplier's single correction step relies on; R = 2*b^ND).  NC curves are processed
// in an interleaved way so that the long pipeline of the modular multiplier is
// never starved.  The micro-operation record describes one modular product
// issued by the controller: which RAM locations feed the two mod-2n
// adder/subtractors, how the two multiplier operand multiplexers are set and
// where the product is written back.
package ecm_pkg;
  localparam int unsigned DIG_W = 17;            // digit size (DSP48 17x17)
  localparam int unsigned ND    = 8;             // digits per number
  localparam int unsigned W     = DIG_W * ND;    // 136-bit operands
  localparam int unsigned NC    = 32;            // curves in flight
  localparam int unsigned NC_W  = $clog2(NC);
  localparam int unsigned IO_W  = 32;            // server data bus

  typedef logic [W-1:0]     word_t;
  typedef logic [DIG_W-1:0] digit_t;

  // banks of the working memory, in the order A, B, C, D
  typedef enum logic [1:0] {BANK_A = 2'd0, BANK_B = 2'd1, BANK_C = 2'd2, BANK_D = 2'd3} bank_e;

  // operand multiplexer selections
  typedef enum logic [1:0] {SEL_AS1 = 2'd0, SEL_AS2 = 2'd1, SEL_DBYP = 2'd2} opsel_e;

  // one issued modular product
  typedef struct packed {
    logic            valid;
    logic [NC_W-1:0] curve;
    logic [3:0]      rloc;    // read location (0/1) of banks D,C,B,A (bit 0 = A)
    logic [3:0]      rzero;   // force the bank's add/sub input to zero
    logic            sub1;    // A/B add/sub subtracts
    logic            sub2;    // C/D add/sub subtracts
    opsel_e          sel1;    // multiplier operand x (SEL_AS1 / SEL_AS2)
    opsel_e          sel2;    // multiplier operand y (SEL_AS1 / SEL_AS2 / SEL_DBYP)
    logic [3:0]      wmask;   // banks receiving the product
    logic [3:0]      wloc;    // location written in each bank
    logic            dsave;   // write the A/B add/sub result into D location 0
  } uop_t;
endpackage
