// ecm_phase1: phase 1 of the elliptic curve factoring method for NC curves at
// once, one modular product per clock cycle.
//
// Datapath: four working RAM banks A, B, C, D (two 136-bit locations per
// curve) feed two mod-2n adder/subtractors directly, A/B into the first and
// C/D into the second, without any multiplexer in front of them.  Two operand
// multiplexers choose the multiplier inputs: x from add/sub 1 or 2, y from
// add/sub 1, add/sub 2 or the RAM D bypass; selecting the same add/sub for both
// gives a squaring.  The Montgomery multiplier returns the product to the
// banks named in the micro-operation.  Per-curve constants n, ns~ and n' live
// in their own RAMs, read with the operands.  A dedicated path stores the A/B
// add/sub output into D (M2-M1).  ecm_ctrl issues the micro-operations of the
// Montgomery ladder; load_unload exchanges batches with the server.
//
// Timing from the issue of a micro-operation (cycle 0): RAM read data at 1,
// add/sub results and D bypass at 5, product written at 5 + 37 = 42.  The
// controller guarantees at least 2*NC-1 = 63 cycles between dependent issues.
//
// Number representation: every value is kept as v * 2^4 * R mod n (R = 2^137)
// and in [0, 2n); the modulus must be odd and below 2^134.  Each add/sub divides by 4 and each product multiplies by
// R^-1, so a product of two add/sub outputs is again in this form.  The
// server must supply x_2P0, z_2P0, x_P0, z_P0 = 2^4*R mod n, a24 = (a+2)/4
// in the same form, n, ns~ = floor(n*n'/2^17)+1 and n' = -n^-1 mod 2^17.
// Results are (x_Q : z_Q) = k*P0 in the same projective form.
//
// Ports: io_in_* / io_out_* are the 32-bit server streams (valid/ready),
// busy is high while the ladder runs.  The bank structure, the add/sub and
// multiplier circuits and the load/unload path follow the original
// architecture; the memory assignment, the bypass placement and all handshakes
// are this design's own.  All registers reset asynchronously on rst_n; the
// assertions below also use rst_n as their disable condition, which lint
// reports as a signal used both synchronously and asynchronously.
module ecm_phase1
  import ecm_pkg::*;
#(
  parameter int unsigned B1         = 960,
  parameter int unsigned FIFO_DEPTH = 512
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            io_in_valid,
  output logic            io_in_ready,
  input  logic [IO_W-1:0] io_in_data,
  output logic            io_out_valid,
  input  logic            io_out_ready,
  output logic [IO_W-1:0] io_out_data,
  output logic            busy
);
  localparam int unsigned BANK_AW = NC_W + 1;
  localparam int unsigned AS_LAT  = 4;
  localparam int unsigned TAG_W   = NC_W + 8;

  // ---------------- control ----------------
  uop_t uop;
  logic core_start, core_done;
  ecm_ctrl #(.B1(B1)) u_ctrl (.clk, .rst_n, .start(core_start), .busy, .done(core_done), .uop);

  logic [6:0]      ld_we;
  logic [3:0]      ld_loc;
  logic [NC_W-1:0] ld_curve, sv_curve;
  word_t           ld_data;
  logic            sv_re;
  word_t           bank_rd [4];

  load_unload #(.FIFO_DEPTH(FIFO_DEPTH)) u_lu (
    .clk, .rst_n,
    .io_in_valid, .io_in_ready, .io_in_data,
    .io_out_valid, .io_out_ready, .io_out_data,
    .core_start, .core_done,
    .ld_we, .ld_loc, .ld_curve, .ld_data,
    .sv_re, .sv_curve, .sv_c_data(bank_rd[BANK_C]), .sv_d_data(bank_rd[BANK_D]));

  // ---------------- multiplier result, write-back ----------------
  logic                 mm_valid;
  word_t                mm_r;
  logic [TAG_W-1:0]     mm_tag;
  logic [NC_W-1:0]      wb_curve;
  logic [3:0]           wb_mask, wb_loc;
  assign {wb_curve, wb_mask, wb_loc} = mm_tag;

  // A/B add/sub output stored into D location 0 (M2-M1), 5 cycles after issue
  logic [AS_LAT:0]      dsave_d;
  logic [NC_W-1:0]      dsave_curve [AS_LAT+1];
  word_t                as_r [2];

  // ---------------- working banks A..D ----------------
  logic [BANK_AW-1:0] rd_addr [4];
  for (genvar k = 0; k < 4; k++) begin : g_bank
    logic               we;
    logic [BANK_AW-1:0] waddr;
    word_t              wdata;
    always_comb begin
      we    = 1'b0;
      waddr = {wb_curve, wb_loc[k]};
      wdata = mm_r;
      if (ld_we[k]) begin  // batch copy (engine idle)
        we    = 1'b1;
        waddr = {ld_curve, ld_loc[k]};
        wdata = ld_data;
      end else if (k == BANK_D && dsave_d[AS_LAT]) begin
        we    = 1'b1;
        waddr = {dsave_curve[AS_LAT], 1'b0};
        wdata = as_r[0];
      end else if (mm_valid && wb_mask[k]) begin
        we    = 1'b1;
      end
    end
    assign rd_addr[k] = sv_re ? {sv_curve, 1'b0} : {uop.curve, uop.rloc[k]};
    ram_bank #(.WIDTH(W), .DEPTH(2*NC)) u_ram (
      .clk, .we, .waddr, .wdata, .raddr(rd_addr[k]), .rdata(bank_rd[k]));
  end

  // ---------------- constant banks n, ns~, n' ----------------
  word_t  n_rd, nst_rd;
  digit_t np_rd;
  ram_bank #(.WIDTH(W), .DEPTH(NC)) u_ram_n (
    .clk, .we(ld_we[4]), .waddr(ld_curve), .wdata(ld_data), .raddr(uop.curve), .rdata(n_rd));
  ram_bank #(.WIDTH(W), .DEPTH(NC)) u_ram_nst (
    .clk, .we(ld_we[5]), .waddr(ld_curve), .wdata(ld_data), .raddr(uop.curve), .rdata(nst_rd));
  ram_bank #(.WIDTH(DIG_W), .DEPTH(NC)) u_ram_np (
    .clk, .we(ld_we[6]), .waddr(ld_curve), .wdata(ld_data[DIG_W-1:0]), .raddr(uop.curve), .rdata(np_rd));

  // ---------------- issue pipeline: cycle 1 (RAM data) ----------------
  uop_t uop1;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) uop1 <= '0;
    else        uop1 <= uop;

  word_t as_in [4];
  for (genvar k = 0; k < 4; k++) begin : g_zero
    assign as_in[k] = uop1.rzero[k] ? '0 : bank_rd[k];
  end

  addsub_mod2n #(.DIG_W(DIG_W), .ND(ND)) u_as1 (
    .clk, .a(as_in[BANK_A]), .b(as_in[BANK_B]), .sub(uop1.sub1), .n(n_rd), .r(as_r[0]));
  addsub_mod2n #(.DIG_W(DIG_W), .ND(ND)) u_as2 (
    .clk, .a(as_in[BANK_C]), .b(as_in[BANK_D]), .sub(uop1.sub2), .n(n_rd), .r(as_r[1]));

  // ---------------- cycles 1..5: align D bypass, constants and control -----
  uop_t   uop_d  [AS_LAT+1];
  word_t  dbyp_d [AS_LAT+1];
  word_t  n_d    [AS_LAT+1];
  word_t  nst_d  [AS_LAT+1];
  digit_t np_d   [AS_LAT+1];
  assign uop_d[0]  = uop1;
  assign dbyp_d[0] = bank_rd[BANK_D];
  assign n_d[0]    = n_rd;
  assign nst_d[0]  = nst_rd;
  assign np_d[0]   = np_rd;
  for (genvar k = 0; k < AS_LAT; k++) begin : g_align
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) uop_d[k+1] <= '0;
      else        uop_d[k+1] <= uop_d[k];
    always_ff @(posedge clk) begin
      dbyp_d[k+1] <= dbyp_d[k];
      n_d[k+1]    <= n_d[k];
      nst_d[k+1]  <= nst_d[k];
      np_d[k+1]   <= np_d[k];
    end
  end
  for (genvar k = 0; k <= AS_LAT; k++) begin : g_dsave
    assign dsave_d[k]     = uop_d[k].valid && uop_d[k].dsave;
    assign dsave_curve[k] = uop_d[k].curve;
  end

  // ---------------- operand multiplexers and multiplier ----------------
  // (only the select, curve and write-back fields of the delayed micro-
  // operation are used here; the read fields were consumed at cycle 0/1)
  uop_t  u5;
  word_t mx, my;
  assign u5 = uop_d[AS_LAT];
  always_comb begin
    mx = (u5.sel1 == SEL_AS2) ? as_r[1] : as_r[0];
    unique case (u5.sel2)
      SEL_AS2:  my = as_r[1];
      SEL_DBYP: my = dbyp_d[AS_LAT];
      default:  my = as_r[0];
    endcase
  end

  mont_mult #(.DIG_W(DIG_W), .ND(ND), .TAG_W(TAG_W)) u_mm (
    .clk, .rst_n, .in_valid(u5.valid), .x(mx), .y(my),
    .nst(nst_d[AS_LAT]), .n(n_d[AS_LAT]), .np(np_d[AS_LAT]),
    .tag_in({u5.curve, u5.wmask, u5.wloc}),
    .out_valid(mm_valid), .r(mm_r), .tag_out(mm_tag));

  // the M2-M1 save into D and a product write never meet in the same cycle
  assert property (@(posedge clk) disable iff (!rst_n)
                   !(dsave_d[AS_LAT] && mm_valid && wb_mask[BANK_D]));
  // batch copies and saves happen only while the engine is idle
  assert property (@(posedge clk) disable iff (!rst_n) !((|ld_we || sv_re) && (uop.valid || mm_valid)));
endmodule
