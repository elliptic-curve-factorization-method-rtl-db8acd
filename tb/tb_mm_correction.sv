// tb_mm_correction: for random odd n and A < 3n, r must be below 2n, satisfy
// 2r = A (mod n), and arrive two cycles after its inputs.
module tb_mm_correction;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [137:0] a;
  logic [135:0] n, r;
  typedef struct { logic [137:0] a; logic [135:0] n; } item_t;
  item_t q [$];
  int checks = 0, failures = 0;
  mm_correction dut (.clk, .a_in(a), .n, .r);
  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic [159:0] t;
      for (int k = 0; k < 136; k += 32) n[k +: 32] = $urandom;
      n[135] = 1'b0; n[134] = 1'b1; n[0] = 1'b1;
      for (int k = 0; k < 160; k += 32) t[k +: 32] = $urandom;
      a = 138'(t % (160'(n) * 3));
      if (i == 0) a = 138'(n) * 3 - 1;
      @(posedge clk);
      #1;
      q.push_back('{a, n});
      if (q.size() >= 2) begin
        item_t it;
        it = q.pop_front();
        checks++;
        if (!(r < 2 * it.n && ((2 * 140'(r)) % it.n) == (140'(it.a) % it.n))) begin
          failures++; if (failures < 5) $display("FAIL A=%h n=%h r=%h", it.a, it.n, r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
