// tb_serpar: random 136-bit values are sent in as 5 words (least significant
// first) and must come out whole; random values handed to the serializer must
// come out as the same 5 words.  Both sides see random stalls.
module tb_serpar;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic s_valid, s_ready, p_valid, p_ready, q_valid, q_ready, m_valid, m_ready;
  logic [31:0]  s_data, m_data;
  logic [135:0] p_data, q_data;
  logic [135:0] vin [40], vout [40];
  int checks = 0, failures = 0, np = 0, nm = 0;
  serpar dut (.*);
  initial begin
    for (int i = 0; i < 40; i++)
      for (int k = 0; k < 136; k += 32) begin vin[i][k +: 32] = $urandom; vout[i][k +: 32] = $urandom; end
  end
  // serial source
  initial begin
    s_valid = 0; s_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 40; i++)
      for (int w = 0; w < 5; w++) begin
        while ($urandom % 3 == 0) begin s_valid <= 1'b0; @(posedge clk); end
        s_valid <= 1'b1;
        s_data  <= 32'(vin[i] >> (32 * w));
        do @(posedge clk); while (!s_ready);
      end
    s_valid <= 1'b0;
  end
  always @(posedge clk) p_ready <= ($urandom % 3) != 0;
  always @(posedge clk) if (rst_n && p_valid && p_ready) begin
    checks++;
    if (p_data != vin[np]) begin failures++; $display("FAIL value %0d", np); end
    np++;
  end
  // parallel source
  initial begin
    q_valid = 0; q_data = 0;
    @(posedge rst_n);
    for (int i = 0; i < 40; i++) begin
      q_valid <= 1'b1;
      q_data  <= vout[i];
      do @(posedge clk); while (!q_ready);
    end
    q_valid <= 1'b0;
  end
  always @(posedge clk) m_ready <= ($urandom % 3) != 0;
  always @(posedge clk) if (rst_n && m_valid && m_ready) begin
    checks++;
    if (m_data != 32'(vout[nm / 5] >> (32 * (nm % 5)))) begin failures++; $display("FAIL word %0d", nm); end
    nm++;
  end
  initial begin
    wait (np == 40 && nm == 200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
