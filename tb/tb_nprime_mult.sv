// tb_nprime_mult: streams random operands, one per cycle; u must equal
// (a*np) mod 2^17 exactly four cycles later.
module tb_nprime_mult;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [16:0] a, np, u;
  logic [16:0] exp_q [$];
  int checks = 0, failures = 0;
  nprime_mult dut (.clk, .a, .np, .u);
  initial begin
    for (int i = 0; i < 2000; i++) begin
      a  = 17'($urandom);
      np = 17'($urandom);
      @(posedge clk);
      #1;
      exp_q.push_back(17'(longint'(a) * longint'(np)));
      if (exp_q.size() >= 4) begin
        logic [16:0] e;
        e = exp_q.pop_front();
        checks++;
        if (u != e) begin failures++; if (failures < 5) $display("FAIL %h != %h", u, e); end
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
