// tb_ram_bank: random writes and reads against a model array; read data must
// appear one cycle after the address and a read of the address being written
// must return the previous contents.
module tb_ram_bank;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic         we;
  logic [5:0]   waddr, raddr;
  logic [135:0] wdata, rdata, model [64], exp_d;
  int checks = 0, failures = 0;
  ram_bank dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);
  initial begin
    we = 1'b1;
    for (int i = 0; i < 64; i++) begin  // initialise every word
      waddr = 6'(i); raddr = 6'(i);
      for (int k = 0; k < 136; k += 32) wdata[k +: 32] = $urandom;
      model[i] = wdata;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 3000; i++) begin
      we    = $urandom % 2;
      waddr = 6'($urandom);
      raddr = (i % 4 == 0) ? waddr : 6'($urandom);
      for (int k = 0; k < 136; k += 32) wdata[k +: 32] = $urandom;
      exp_d = model[raddr];
      @(posedge clk); #1;
      if (we) model[waddr] = wdata;
      checks++;
      if (rdata != exp_d) begin failures++; if (failures < 5) $display("FAIL addr %0d", raddr); end
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
