// tb_mont_mult: one product per cycle with random odd n < 2^134 and operands
// below 2n (extremes included).  Each result must be below 2n, satisfy
// r*2^137 = x*y (mod n), carry its tag, and appear exactly 37 cycles after
// its operands; a gap in the input stream must show as a gap in out_valid.
module tb_mont_mult;
  localparam int LAT = 37;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic         in_valid, out_valid;
  logic [135:0] x, y, nst, n, r;
  logic [16:0]  np;
  logic [23:0]  tag_in, tag_out;
  typedef struct { logic [135:0] x, y, n; logic [23:0] tag; logic v; } item_t;
  item_t q [$];
  int checks = 0, failures = 0, cyc_valid = 0;
  mont_mult dut (.clk, .rst_n, .in_valid, .x, .y, .nst, .n, .np, .tag_in, .out_valid, .r, .tag_out);
  function automatic logic [135:0] rnd_below(logic [136:0] lim);
    logic [191:0] t;
    for (int k = 0; k < 192; k += 32) t[k +: 32] = $urandom;
    return 136'(t % 192'(lim));
  endfunction
  initial begin
    in_valid = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      logic [16:0] inv;
      for (int k = 0; k < 136; k += 32) n[k +: 32] = $urandom;
      n[135:134] = 2'b00; n[133] = (i % 3 != 0); n[0] = 1'b1;
      inv = 17'd1;
      for (int k = 0; k < 5; k++) inv = 17'(inv * (17'd2 - 17'(n) * inv));
      np  = 17'(-inv);
      nst = 136'(((272'(n) * 272'(np)) >> 17) + 1);
      x   = rnd_below(137'(n) * 2);
      y   = rnd_below(137'(n) * 2);
      if (i % 9 == 1) begin x = 136'(n) * 2 - 1; y = 136'(n) * 2 - 1; end
      if (i % 13 == 5) x = '0;
      tag_in   = 24'($urandom);
      in_valid = (i % 50) != 49;
      @(posedge clk);
      #1;
      q.push_back('{x, y, n, tag_in, in_valid});
      if (q.size() >= LAT) begin
        item_t it;
        logic [272:0] lhs, rhs;
        it = q.pop_front();
        checks++;
        if (out_valid != it.v) begin
          failures++; $display("FAIL valid mismatch at latency %0d", LAT);
        end else if (it.v) begin
          lhs = (273'(r) << 137) % 273'(it.n);
          rhs = (273'(it.x) * 273'(it.y)) % 273'(it.n);
          if (!(r < 2 * it.n) || lhs != rhs || tag_out != it.tag) begin
            failures++; if (failures < 5) $display("FAIL x=%h y=%h n=%h r=%h", it.x, it.y, it.n, r);
          end
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
