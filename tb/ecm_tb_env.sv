// ecm_tb_env: server model and checker for the ECM phase-1 processor.
//
// Plays the server: draws NC random odd moduli of NBITS bits
// (2^(NBITS-1) <= n < 2^NBITS, NBITS <= 134), base x-coordinates
// and curve constants a24, computes 2*P0, the Montgomery constants and the
// 2^4*R premultiplication, and streams NBATCH batches of 8*NC numbers in as
// 32-bit words.  It computes k = prod p^e (p^e <= B1) and the reference
// Montgomery ladder k*P0 itself with plain modular arithmetic, then reads the
// NC results of every batch from the output stream (with random backpressure)
// and checks that (x : z) from the processor equals the reference point
// projectively, x_hw*z_ref = z_hw*x_ref (mod n), with both coordinates below
// 2n.  It also checks the phase-1 duration, (len(k)-1)*10*NC + DRAIN cycles,
// i.e. one modular product per clock, and counts every mechanism of the
// datapath (squarings, D bypass, D store, both key-bit cases, zeroed inputs,
// batch copy, result save, load of the next batch during a run, output
// backpressure), failing if one never occurs.
module ecm_tb_env
  import ecm_pkg::*;
#(
  parameter int unsigned B1       = 960,
  parameter int unsigned NBATCH   = 1,
  parameter int unsigned NBITS    = 134,
  parameter longint      WATCHDOG = 64'd2000000
) (
  output logic            clk,
  output logic            rst_n,
  output logic            io_in_valid,
  input  logic            io_in_ready,
  output logic [IO_W-1:0] io_in_data,
  input  logic            io_out_valid,
  output logic            io_out_ready,
  input  logic [IO_W-1:0] io_out_data,
  input  logic            busy,
  input  uop_t            uop,
  input  logic [1:0]      step,
  input  logic            kbit,
  input  logic            start_pulse,
  input  logic [6:0]      ld_we,
  input  logic            sv_re
);
  localparam int unsigned NW  = (W + IO_W - 1) / IO_W;
  localparam int unsigned XW  = 2*W + 8;
  typedef logic [XW-1:0] wide_t;

  int checks = 0, failures = 0;
  longint cycle = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic word_t mulm(word_t a, word_t b, word_t n);
    wide_t p;
    p = (wide_t'(a) * wide_t'(b)) % wide_t'(n);
    return W'(p);
  endfunction
  function automatic word_t addm(word_t a, word_t b, word_t n);
    wide_t s;
    s = (wide_t'(a) + wide_t'(b)) % wide_t'(n);
    return W'(s);
  endfunction
  function automatic word_t subm(word_t a, word_t b, word_t n);
    wide_t s;
    s = (wide_t'(a) + wide_t'(n) - wide_t'(b)) % wide_t'(n);
    return W'(s);
  endfunction
  function automatic word_t rnd_word();
    word_t v;
    for (int i = 0; i < W; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  // k = prod over primes p <= B1 of the largest p^e <= B1
  logic [2047:0] kref;
  int unsigned   klen;
  initial begin
    bit          isp;
    int unsigned pe;
    kref = 2048'd1;
    for (int unsigned p = 2; p <= B1; p++) begin
      isp = 1;
      for (int unsigned q = 2; q < p; q++) if (p % q == 0) isp = 0;
      if (isp) begin
        pe = p;
        while (pe * p <= B1) pe *= p;
        kref = kref * 2048'(pe);
      end
    end
    klen = 0;
    for (int i = 0; i < 2048; i++) if (kref[i]) klen = i + 1;
  end

  // curve data per batch
  word_t cn [NBATCH][NC], cx0 [NBATCH][NC], ca [NBATCH][NC];
  word_t rx [NBATCH][NC], rz [NBATCH][NC];
  word_t din [NBATCH][NC][8];

  task automatic xdbl(input word_t x, z, a24, n, output word_t xo, zo);
    word_t t1, t2, t3;
    t1 = mulm(addm(x, z, n), addm(x, z, n), n);
    t2 = mulm(subm(x, z, n), subm(x, z, n), n);
    t3 = subm(t1, t2, n);
    xo = mulm(t1, t2, n);
    zo = mulm(t3, addm(t2, mulm(a24, t3, n), n), n);
  endtask
  task automatic xadd(input word_t xp, zp, xq, zq, xd, n, output word_t xo, zo);
    word_t u, v;
    u  = mulm(subm(xp, zp, n), addm(xq, zq, n), n);
    v  = mulm(addm(xp, zp, n), subm(xq, zq, n), n);
    xo = mulm(addm(u, v, n), addm(u, v, n), n);
    zo = mulm(mulm(subm(u, v, n), subm(u, v, n), n), xd, n);
  endtask

  task automatic prepare();
    for (int b = 0; b < NBATCH; b++)
      for (int c = 0; c < NC; c++) begin
        word_t n, x0, a24, x2, z2, s, xp, zp, xq, zq, tx, tz;
        logic [DIG_W-1:0] inv, np;
        wide_t nsw;
        n = rnd_word();
        n = n & ((word_t'(1) << NBITS) - 1'b1);
        n[NBITS-1] = 1'b1;  n[0] = 1'b1;                     // odd, NBITS bits
        if (c == 0) n[1] = 1'b0; else if (c == 1) n[1] = 1'b1; // both RedMod cases
        x0  = W'(wide_t'(rnd_word()) % wide_t'(n));
        a24 = W'(wide_t'(rnd_word()) % wide_t'(n));
        xdbl(x0, 1, a24, n, x2, z2);
        // reference ladder
        xq = x0; zq = 1; xp = x2; zp = z2;
        for (int i = int'(klen) - 2; i >= 0; i--) begin
          if (kref[i]) begin
            xadd(xp, zp, xq, zq, x0, n, xq, zq);
            xdbl(xp, zp, a24, n, xp, zp);
          end else begin
            xadd(xp, zp, xq, zq, x0, n, xp, zp);
            xdbl(xq, zq, a24, n, xq, zq);
          end
        end
        cn[b][c] = n; cx0[b][c] = x0; ca[b][c] = a24; rx[b][c] = xq; rz[b][c] = zq;
        // constants
        inv = 17'd1;
        for (int i = 0; i < 5; i++) inv = DIG_W'(inv * (17'd2 - DIG_W'(n) * inv));
        np  = DIG_W'(-inv);
        nsw = ((wide_t'(n) * wide_t'(np)) >> DIG_W) + 1;
        s   = W'((wide_t'(1) << (4 + 1 + DIG_W*ND)) % wide_t'(n));
        din[b][c][0] = mulm(x2, s, n);
        din[b][c][1] = mulm(z2, s, n);
        din[b][c][2] = mulm(x0, s, n);
        din[b][c][3] = s;
        din[b][c][4] = mulm(a24, s, n);
        din[b][c][5] = n;
        din[b][c][6] = W'(nsw);
        din[b][c][7] = W'(np);
      end
  endtask

  // ---------------- input stream ----------------
  initial begin
    io_in_valid = 1'b0;
    io_in_data  = '0;
    rst_n       = 1'b0;
    prepare();
    $display("k has %0d bits, %0d ladder steps", klen, klen - 1);
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    for (int b = 0; b < NBATCH; b++)
      for (int c = 0; c < NC; c++)
        for (int v = 0; v < 8; v++)
          for (int w = 0; w < NW; w++) begin
            io_in_valid <= 1'b1;
            io_in_data  <= IO_W'(din[b][c][v] >> (w * IO_W));
            do @(posedge clk); while (!io_in_ready);
          end
    io_in_valid <= 1'b0;
  end

  // ---------------- output stream ----------------
  int unsigned n_stall = 0;
  always @(posedge clk) io_out_ready <= ($urandom % 4) != 0;
  always @(posedge clk) if (io_out_valid && !io_out_ready) n_stall++;

  logic [NW*IO_W-1:0] got;
  int    wcnt = 0, vcnt = 0, bcnt = 0;
  word_t hx;
  always @(posedge clk) if (rst_n && io_out_valid && io_out_ready) begin
    got = (got >> IO_W) | ((NW*IO_W)'(io_out_data) << ((NW - 1) * IO_W));
    if (wcnt == NW - 1) begin
      word_t val;
      val = W'(got);
      wcnt = 0;
      if (vcnt % 2 == 0) hx = val;
      else begin
        int c;
        word_t n, xh, zh;
        c = vcnt / 2;  n = cn[bcnt][c];
        xh = W'(wide_t'(hx) % wide_t'(n));
        zh = W'(wide_t'(val) % wide_t'(n));
        checks++;
        if (hx >= (n << 1) || val >= (n << 1) || (xh == 0 && zh == 0) ||
            mulm(xh, rz[bcnt][c], n) != mulm(zh, rx[bcnt][c], n)) begin
          failures++;
          $display("FAIL batch %0d curve %0d: x=%h z=%h", bcnt, c, hx, val);
        end
      end
      vcnt++;
      if (vcnt == 2 * NC) begin vcnt = 0; bcnt++; end
    end else wcnt++;
  end

  // ---------------- timing and mechanism counters ----------------
  longint t_start, busy_cycles;
  int n_runs = 0, n_sq = 0, n_byp = 0, n_dsave = 0, n_k0 = 0, n_k1 = 0, n_zero = 0;
  int n_step [3] = '{0, 0, 0};
  int n_load = 0, n_save = 0, n_overlap = 0;
  always @(posedge clk) if (rst_n) begin
    if (start_pulse) t_start = cycle;
    if (uop.valid) begin
      n_step[step]++;
      if (uop.sel1 == uop.sel2) n_sq++;
      if (uop.sel2 == SEL_DBYP) n_byp++;
      if (uop.dsave) n_dsave++;
      if (uop.rzero != 0) n_zero++;
      if (kbit) n_k1++; else n_k0++;
    end
    if (|ld_we) n_load++;
    if (sv_re) n_save++;
    if (busy && io_in_valid && io_in_ready) n_overlap++;
  end
  logic busy_q = 1'b0;
  always @(posedge clk) begin
    busy_q <= rst_n && busy;   // ignore the power-up value before reset
    if (rst_n && busy_q && !busy) begin
      busy_cycles = cycle - t_start;
      n_runs++;
      checks++;
      if (busy_cycles != longint'(klen - 1) * 10 * NC + 65) begin
        failures++;
        $display("FAIL phase 1 took %0d cycles, expected %0d", busy_cycles, (klen - 1) * 10 * NC + 65);
      end
    end
  end

  task automatic need(string what, int cnt);
    checks++;
    $display("  %-34s %0d", what, cnt);
    if (cnt == 0) begin failures++; $display("FAIL mechanism never seen: %s", what); end
  endtask

  initial begin
    @(posedge rst_n);
    wait (bcnt == NBATCH);
    repeat (10) @(posedge clk);
    checks++;
    if (n_runs != NBATCH) begin failures++; $display("FAIL %0d runs", n_runs); end
    need("group I products", n_step[0]);
    need("group II products", n_step[1]);
    need("group III products", n_step[2]);
    need("squarings", n_sq);
    need("RAM D bypass operands", n_byp);
    need("add/sub results stored in D", n_dsave);
    need("zeroed add/sub inputs", n_zero);
    need("products with key bit 0", n_k0);
    need("products with key bit 1", n_k1);
    need("batch copy writes", n_load);
    need("result save reads", n_save);
    need("output backpressure cycles", n_stall);
    if (NBATCH > 1) need("words loaded during a run", n_overlap);
    $display("phase 1: %0d cycles for %0d curves", busy_cycles, NC);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL watchdog: runs=%0d batches out=%0d values=%0d loads=%0d saves=%0d", n_runs, bcnt, vcnt, n_load, n_save);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
