// ecm_ctrl: phase-1 sequencer, a Montgomery ladder over the scalar k for NC
// interleaved curves.
//
// Every ladder step computes, for each curve, the doubling of one point and
// the sum of both (x-only Montgomery-curve formulas, the difference of the two
// points being the base point).  Because the multiplier pipeline is long, the
// ten products of a step are split into three groups that depend only on the
// previous group, and each group is issued for all NC curves before the next:
//   I   M1 = (xD-zD)^2, M2 = (xD+zD)^2, M3 = (xD-zD)(xS+zS), M4 = (xD+zD)(xS-zS)
//   II  M7 = (M3+M4)^2, M8 = (M3-M4)^2, M5 = M1*M2, M6 = (M2-M1)*a24
//   III M9 = x_{P-Q}*M8, M10 = (M2-M1)*(M1+M6)
// D is the doubled point, S the other one: D = P when the current bit of k is
// 1, D = Q otherwise (P in banks A/B location 0, Q in C/D location 0).  New
// coordinates: x2D = M5, z2D = M10, x(P+Q) = M7, z(P+Q) = M9.
//
// Working memory of a curve (bank/location), chosen so that every operand
// reaches its add/sub straight from a RAM:
//   A0 xP, then M3, then new xP     A1 M2, then M6
//   B0 zP, then M4, M8, new zP      B1 M1
//   C0 xQ, then M1, then new xQ     C1 a24
//   D0 zQ, then M2-M1, new zQ       D1 x_{P-Q}
// M2-M1 leaves the A/B add/sub in step II and is stored in D0; step III feeds
// it to the multiplier through the D bypass so that it is not divided by 4 a
// second time.  Single operands pass an add/sub with the partner input forced
// to zero, which keeps every multiplier operand at the same 2^-2 scaling.
//
// Interface: start (pulse) begins a phase 1; busy is high until done pulses,
// which is DRAIN cycles after the last issue so that every product has been
// written back.  uop is the product issued in this cycle (uop.valid).  One
// step takes 10*NC cycles; the ladder has nbits(k)-1 steps.  Between the
// issue of a product and the issue of the first product reading its result
// there are at least 2*NC-1 cycles, which must exceed the datapath latency.
// The groups follow the original architecture; the memory assignment and the
// issue order are this design's own.
module ecm_ctrl
  import ecm_pkg::*;
#(
  parameter int unsigned B1    = 960,
  parameter int unsigned KW    = 1536,
  parameter int unsigned DRAIN = 64
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic busy,
  output logic done,
  output uop_t uop
);
  localparam int unsigned IW = $clog2(KW) + 1;

  typedef enum logic [1:0] {C_IDLE, C_RUN, C_DRAIN} cstate_e;
  cstate_e          state;
  logic [IW-1:0]    bit_idx, nbits;
  logic [1:0]       step;      // 0: group I, 1: group II, 2: group III
  logic [1:0]       op;        // product within the group
  logic [NC_W-1:0]  curve;
  logic [7:0]       drain_cnt;
  logic             kbit;

  k_rom #(.B1(B1), .KW(KW)) u_k (.idx(bit_idx), .bit_o(kbit), .nbits(nbits));

  wire last_op    = (step == 2'd2) ? (op == 2'd1) : (op == 2'd3);
  wire last_curve = (curve == NC_W'(NC - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= C_IDLE;
      bit_idx   <= '0;
      step      <= '0;
      op        <= '0;
      curve     <= '0;
      drain_cnt <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        C_IDLE: if (start) begin
          step  <= '0;
          op    <= '0;
          curve <= '0;
          if (nbits >= IW'(2)) begin
            bit_idx <= nbits - IW'(2);
            state   <= C_RUN;
          end else begin
            drain_cnt <= '0;
            state     <= C_DRAIN;
          end
        end
        C_RUN: begin
          if (!last_op) op <= op + 2'd1;
          else begin
            op <= '0;
            if (!last_curve) curve <= curve + 1'b1;
            else begin
              curve <= '0;
              if (step != 2'd2) step <= step + 2'd1;
              else begin
                step <= '0;
                if (bit_idx == '0) begin
                  drain_cnt <= '0;
                  state     <= C_DRAIN;
                end else bit_idx <= bit_idx - 1'b1;
              end
            end
          end
        end
        C_DRAIN: begin
          drain_cnt <= drain_cnt + 8'd1;
          if (drain_cnt == 8'(DRAIN - 1)) begin
            done  <= 1'b1;
            state <= C_IDLE;
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  assign busy = (state != C_IDLE);

  // micro-operation table; bank bit order {D, C, B, A}
  always_comb begin
    uop       = '0;
    uop.valid = (state == C_RUN);
    uop.curve = curve;
    uop.sel1  = SEL_AS1;
    uop.sel2  = SEL_AS1;
    unique case (step)
      2'd0: begin  // group I: all reads at location 0
        unique case (op)
          2'd0: begin  // M1 -> B1 and C0
            uop.wmask = 4'b0110; uop.wloc = 4'b0010;
            if (kbit) begin uop.sub1 = 1'b1; end
            else begin uop.sub2 = 1'b1; uop.sel1 = SEL_AS2; uop.sel2 = SEL_AS2; end
          end
          2'd1: begin  // M2 -> A1
            uop.wmask = 4'b0001; uop.wloc = 4'b0001;
            if (!kbit) begin uop.sel1 = SEL_AS2; uop.sel2 = SEL_AS2; end
          end
          2'd2: begin  // M3 -> A0
            uop.wmask = 4'b0001;
            if (kbit) begin uop.sub1 = 1'b1; uop.sel2 = SEL_AS2; end
            else begin uop.sub2 = 1'b1; uop.sel1 = SEL_AS2; end
          end
          default: begin  // M4 -> B0
            uop.wmask = 4'b0010;
            if (kbit) begin uop.sub2 = 1'b1; uop.sel2 = SEL_AS2; end
            else begin uop.sub1 = 1'b1; uop.sel1 = SEL_AS2; end
          end
        endcase
      end
      2'd1: begin  // group II
        unique case (op)
          2'd0: begin  // M7 = (A0+B0)^2 -> x of the sum
            uop.wmask = kbit ? 4'b0100 : 4'b0001;
          end
          2'd1: begin  // M8 = (A0-B0)^2 -> B0
            uop.sub1 = 1'b1; uop.wmask = 4'b0010;
          end
          2'd2: begin  // M5 = A1 * C0 -> x of the double
            uop.rloc = 4'b0001; uop.rzero = 4'b1010; uop.sel2 = SEL_AS2;
            uop.wmask = kbit ? 4'b0001 : 4'b0100;
          end
          default: begin  // M6 = (A1-B1) * C1 -> A1, A1-B1 also to D0
            uop.rloc = 4'b0111; uop.rzero = 4'b1000; uop.sub1 = 1'b1; uop.sel2 = SEL_AS2;
            uop.wmask = 4'b0001; uop.wloc = 4'b0001; uop.dsave = 1'b1;
          end
        endcase
      end
      default: begin  // group III
        if (op == 2'd0) begin  // M9 = B0 * D1 -> z of the sum
          uop.rloc = 4'b1000; uop.rzero = 4'b0101; uop.sel2 = SEL_AS2;
          uop.wmask = kbit ? 4'b1000 : 4'b0010;
        end else begin  // M10 = (A1+B1) * D0 (bypass) -> z of the double
          uop.rloc = 4'b0011; uop.sel2 = SEL_DBYP;
          uop.wmask = kbit ? 4'b0010 : 4'b1000;
        end
      end
    endcase
  end
endmodule
