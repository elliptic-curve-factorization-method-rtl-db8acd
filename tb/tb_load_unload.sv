// tb_load_unload: streams two batches of 8*NC random numbers in, acts as the
// engine (checks every word of the batch copy: target RAMs, curve, location
// and data; answers start with done after a delay; answers the C/D result
// reads like a RAM) and checks that the 2*NC results of each run come out in
// order as 32-bit words.  The second batch is streamed while the first run is
// in progress, and the output side stalls at random.
module tb_load_unload;
  import ecm_pkg::*;
  localparam int NW = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic            io_in_valid, io_in_ready, io_out_valid, io_out_ready;
  logic [IO_W-1:0] io_in_data, io_out_data;
  logic            core_start, core_done, sv_re;
  logic [6:0]      ld_we;
  logic [3:0]      ld_loc;
  logic [NC_W-1:0] ld_curve, sv_curve;
  word_t           ld_data, sv_c_data, sv_d_data;
  int checks = 0, failures = 0;

  load_unload dut (.*);

  word_t din [2][NC][8];
  function automatic word_t resval(int b, int c, int xz);
    return {32'(b), 32'(c), 32'(xz), 40'hA5A5_5A5A_00} ^ din[b][c][xz];
  endfunction

  initial begin
    for (int b = 0; b < 2; b++) for (int c = 0; c < NC; c++) for (int v = 0; v < 8; v++)
      for (int k = 0; k < W; k += 32) din[b][c][v][k +: 32] = $urandom;
  end

  // input stream
  initial begin
    io_in_valid = 0; io_in_data = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int b = 0; b < 2; b++) for (int c = 0; c < NC; c++) for (int v = 0; v < 8; v++)
      for (int w = 0; w < NW; w++) begin
        io_in_valid <= 1'b1;
        io_in_data  <= IO_W'(din[b][c][v] >> (32 * w));
        do @(posedge clk); while (!io_in_ready);
      end
    io_in_valid <= 1'b0;
  end

  // engine model
  int  run = -1, nld = 0, n_overlap = 0;
  bit  running = 0;
  always @(posedge clk) if (rst_n) begin
    if (|ld_we) begin
      int slot, bb;
      logic [6:0] exp_we;
      logic [3:0] exp_loc;
      bb   = run + 1;
      slot = nld % 8;
      unique case (slot)
        0: begin exp_we = 7'b0000001; exp_loc = 4'b0000; end
        1: begin exp_we = 7'b0000010; exp_loc = 4'b0000; end
        2: begin exp_we = 7'b0001100; exp_loc = 4'b1000; end
        3: begin exp_we = 7'b0001000; exp_loc = 4'b0000; end
        4: begin exp_we = 7'b0000100; exp_loc = 4'b0100; end
        5: begin exp_we = 7'b0010000; exp_loc = 4'b0000; end
        6: begin exp_we = 7'b0100000; exp_loc = 4'b0000; end
        default: begin exp_we = 7'b1000000; exp_loc = 4'b0000; end
      endcase
      checks++;
      if (running || ld_we != exp_we || (ld_loc & {ld_we[3:0]}) != exp_loc || ld_curve != NC_W'(nld / 8) ||
          ld_data != din[bb][nld / 8][slot]) begin
        failures++; if (failures < 5) $display("FAIL copy %0d", nld);
      end
      nld++;
    end
    if (core_start) begin
      checks++;
      if (nld != 8 * NC) begin failures++; $display("FAIL start after %0d copies", nld); end
      nld = 0; run++; running = 1;
    end
    if (running && io_in_valid && io_in_ready) n_overlap++;
  end
  initial begin
    core_done = 0;
    forever begin
      @(posedge clk);
      if (core_start) begin
        repeat (3000) @(posedge clk);
        core_done <= 1'b1;
        @(posedge clk);
        core_done <= 1'b0;
        running = 0;
      end
    end
  end
  // RAM C/D location 0 as seen by the save
  always @(posedge clk) if (sv_re) begin
    sv_c_data <= resval(run, int'(sv_curve), 0);
    sv_d_data <= resval(run, int'(sv_curve), 1);
  end

  // output stream
  always @(posedge clk) io_out_ready <= ($urandom % 3) != 0;
  logic [NW*32-1:0] got;
  int wcnt = 0, vcnt = 0, bcnt = 0;
  always @(posedge clk) if (rst_n && io_out_valid && io_out_ready) begin
    got = (got >> 32) | ((NW*32)'(io_out_data) << (32 * (NW - 1)));
    if (wcnt == NW - 1) begin
      wcnt = 0;
      checks++;
      if (W'(got) != resval(bcnt, vcnt / 2, vcnt % 2)) begin
        failures++; if (failures < 5) $display("FAIL result batch %0d value %0d", bcnt, vcnt);
      end
      vcnt++;
      if (vcnt == 2 * NC) begin vcnt = 0; bcnt++; end
    end else wcnt++;
  end

  initial begin
    wait (bcnt == 2);
    checks++;
    if (n_overlap == 0) begin failures++; $display("FAIL no input accepted during a run"); end
    $display("words accepted while running: %0d", n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
