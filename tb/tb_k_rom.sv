// tb_k_rom: recomputes k = prod p^e (p^e <= 960) by its own loop and checks
// the bit length (1374) and every bit of the ROM.
module tb_k_rom;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [11:0]   idx, nbits;
  logic          b;
  logic [2047:0] k;
  int checks = 0, failures = 0;
  k_rom dut (.idx, .bit_o(b), .nbits);
  initial begin
    int unsigned pe;
    bit isp;
    k = 2048'd1;
    for (int unsigned p = 2; p <= 960; p++) begin
      isp = 1;
      for (int unsigned q = 2; q < p; q++) if (p % q == 0) isp = 0;
      if (isp) begin
        pe = 1;
        while (pe * p <= 960) pe = pe * p;
        k = k * 2048'(pe);
      end
    end
    #1;
    checks++;
    if (nbits != 12'd1374) begin failures++; $display("FAIL nbits=%0d", nbits); end
    for (int i = 0; i < 1536; i++) begin
      idx = 12'(i);
      @(posedge clk); #1;
      checks++;
      if (b != k[i]) begin failures++; if (failures < 5) $display("FAIL bit %0d", i); end
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
