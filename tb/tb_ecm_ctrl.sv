// tb_ecm_ctrl: runs the sequencer with B1 = 10 (k = 2520 = 100111011000b)
// and checks the issue pattern: 4, 4 and 2 products per curve in groups I,
// II and III, curves in order, the key bit of each ladder step, one issue per
// cycle, the destinations chosen by the key bit, that no product reads a
// location still waiting for a write from an earlier group (replayed with the datapath latency of
// 42 cycles), and done after (len(k)-1)*10*NC + DRAIN cycles.
module tb_ecm_ctrl;
  import ecm_pkg::*;
  localparam int WB_LAT = 42;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done;
  always #5 clk = ~clk;
  uop_t uop;
  int checks = 0, failures = 0;
  ecm_ctrl #(.B1(10)) dut (.clk, .rst_n, .start, .busy, .done, .uop);

  localparam logic [11:0] K = 12'd2520;
  // pending writes per (curve, bank, loc): cycle at which they land
  longint pend [NC][4][2];
  int     pend_grp [NC][4][2];   // step group that issued the pending write
  int     grp = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic expect_op(int stepn, int bitv, int c, int op);
    checks++;
    if (!uop.valid || uop.curve != NC_W'(c)) begin
      failures++; if (failures < 5) $display("FAIL step %0d curve %0d op %0d", stepn, c, op);
    end
    // read hazard: every bank read must not target a pending write
    for (int k = 0; k < 4; k++)
      if (!uop.rzero[k] && pend[c][k][uop.rloc[k]] > cyc && pend_grp[c][k][uop.rloc[k]] < grp) begin
        failures++; $display("FAIL hazard curve %0d bank %0d", c, k);
      end
    for (int k = 0; k < 4; k++)
      if (uop.wmask[k]) begin pend[c][k][uop.wloc[k]] = cyc + WB_LAT; pend_grp[c][k][uop.wloc[k]] = grp; end
    if (uop.dsave) begin pend[c][3][0] = cyc + 5; pend_grp[c][3][0] = grp; end
    // destinations: x of the double goes to A0 for bit 1, C0 for bit 0
    if (stepn == 1 && op == 2) begin
      checks++;
      if (uop.wmask != (bitv ? 4'b0001 : 4'b0100)) begin failures++; $display("FAIL M5 destination"); end
    end
  endtask

  initial begin
    longint t0;
    foreach (pend[c, k, l]) begin pend[c][k][l] = 0; pend_grp[c][k][l] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    checks++;
    if (busy || uop.valid) begin failures++; $display("FAIL not idle"); end
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    t0 = cyc;
    for (int i = 10; i >= 0; i--)
      for (int s = 0; s < 3; s++) begin
        grp++;
        for (int c = 0; c < NC; c++)
          for (int op = 0; op < (s == 2 ? 2 : 4); op++) begin
            checks++;
            if (dut.kbit != K[i]) begin failures++; if (failures < 5) $display("FAIL key bit %0d", i); end
            expect_op(s, K[i], c, op);
            @(posedge clk); #1;
          end
      end
    checks++;
    if (uop.valid) begin failures++; $display("FAIL extra issue"); end
    while (!done && cyc < t0 + 5000) begin @(posedge clk); #1; end
    checks++;
    if (cyc - t0 != 11 * 10 * NC + 64) begin failures++; $display("FAIL done after %0d cycles", cyc - t0); end
    @(posedge clk); #1;
    checks++;
    if (busy) begin failures++; $display("FAIL still busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
