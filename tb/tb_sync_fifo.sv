// tb_sync_fifo: random pushes and pops (small depth so it fills) against a
// queue model; checks order, in_ready low exactly when full and out_valid low
// exactly when empty.
module tb_sync_fifo;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic        in_valid, in_ready, out_valid, out_ready;
  logic [31:0] in_data, out_data;
  logic [31:0] q [$];
  int checks = 0, failures = 0, n_full = 0;
  sync_fifo #(.DEPTH(8)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data);
  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      in_valid  = ($urandom % 4) < ((i / 500) % 2 ? 1 : 3);
      out_ready = ($urandom % 4) < ((i / 500) % 2 ? 3 : 1);
      in_data   = $urandom;
      #1;
      checks++;
      if (in_ready != (q.size() < 8) || out_valid != (q.size() > 0)) begin
        failures++; if (failures < 5) $display("FAIL flags size=%0d", q.size());
      end
      if (q.size() == 8) n_full++;
      if (out_valid && out_ready) begin
        checks++;
        if (out_data != q[0]) begin failures++; if (failures < 5) $display("FAIL data"); end
      end
      begin
        bit pop, push;
        pop  = out_valid && out_ready;
        push = in_valid && in_ready;
        @(posedge clk);
        if (pop) void'(q.pop_front());
        if (push) q.push_back(in_data);
      end
      #1;
    end
    checks++;
    if (n_full == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
