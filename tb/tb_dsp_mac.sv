// tb_dsp_mac: random digits and carries; digit and carry out must equal the
// low 17 bits and the upper bits of x*y + cin.
module tb_dsp_mac;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [16:0] x, y, d;
  logic [17:0] ci, co;
  int checks = 0, failures = 0;
  dsp_mac dut (.x_i(x), .y_j(y), .cin(ci), .digit(d), .cout(co));
  initial begin
    for (int i = 0; i < 2000; i++) begin
      longint unsigned e;
      x  = (i == 0) ? 17'h1ffff : 17'($urandom);
      y  = (i == 0) ? 17'h1ffff : 17'($urandom);
      ci = (i == 0) ? 18'h3ffff : 18'($urandom);
      @(posedge clk);
      e = longint'(x) * longint'(y) + longint'(ci);
      checks++;
      if (d != e[16:0] || co != e[34:17]) begin
        failures++;
        if (failures < 5) $display("FAIL %h*%h+%h -> %h %h", x, y, ci, co, d);
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
