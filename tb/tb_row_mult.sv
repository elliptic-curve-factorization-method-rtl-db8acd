// tb_row_mult: a new digit x 136-bit product every cycle; each result must
// equal a*b and appear exactly one cycle after its operands.
module tb_row_mult;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [16:0]  a;
  logic [135:0] b;
  logic [152:0] p, exp_q;
  int checks = 0, failures = 0;
  row_mult dut (.clk, .a, .b, .p);
  initial begin
    for (int i = 0; i < 1000; i++) begin
      a = 17'($urandom);
      for (int k = 0; k < 136; k += 32) b[k +: 32] = $urandom;
      if (i == 1) begin a = '1; b = '1; end
      exp_q = 153'(a) * 153'(b);
      @(posedge clk);
      #1;
      checks++;
      if (p != exp_q) begin failures++; if (failures < 5) $display("FAIL %h != %h", p, exp_q); end
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
