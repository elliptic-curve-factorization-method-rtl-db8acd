// tb_addsub_mod2n: random odd moduli of both residues mod 4, operands in
// [0, 2n] including the extremes, alternating add and subtract, one operation
// per cycle.  Checks r < 2n, 4r = a +/- b (mod n) and the 4-cycle latency.
module tb_addsub_mod2n;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [135:0] a, b, n, r;
  logic         sub;
  typedef struct { logic [135:0] a, b, n; logic sub; } item_t;
  item_t q [$];
  int checks = 0, failures = 0;
  addsub_mod2n dut (.clk, .a, .b, .sub, .n, .r);
  function automatic logic [135:0] rnd_below(logic [136:0] lim);
    logic [191:0] t;
    for (int k = 0; k < 192; k += 32) t[k +: 32] = $urandom;
    return 136'(t % 192'(lim));
  endfunction
  initial begin
    for (int i = 0; i < 4000; i++) begin
      for (int k = 0; k < 136; k += 32) n[k +: 32] = $urandom;
      n[135] = 1'b0; n[134] = 1'b1; n[0] = 1'b1;
      n[1] = i[1];
      a   = rnd_below(137'(n) * 2 + 1);
      b   = rnd_below(137'(n) * 2 + 1);
      if (i % 7 == 3) a = 136'(n) * 2;
      if (i % 5 == 2) b = 136'(n) * 2;
      if (i % 11 == 4) a = '0;
      sub = i[0];
      @(posedge clk);
      #1;
      q.push_back('{a, b, n, sub});
      if (q.size() >= 4) begin
        item_t it;
        logic [139:0] lhs, rhs;
        it  = q.pop_front();
        lhs = (4 * 140'(r)) % 140'(it.n);
        rhs = it.sub ? ((140'(it.a) + 2 * 140'(it.n) - 140'(it.b)) % 140'(it.n))
                     : ((140'(it.a) + 140'(it.b)) % 140'(it.n));
        checks++;
        if (!(r < 2 * it.n) || lhs != rhs) begin
          failures++; if (failures < 5) $display("FAIL a=%h b=%h sub=%0d r=%h", it.a, it.b, it.sub, r);
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
