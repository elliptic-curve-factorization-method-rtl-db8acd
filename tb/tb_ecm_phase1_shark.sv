// tb_ecm_phase1_shark: one complete phase 1 with every parameter of the
// processor at its default, on the cofactor size the design is meant for:
// 32 curves with random odd 125-bit moduli (2^124 <= n < 2^125), B1 = 960.
// The processor is the same as for 134-bit moduli; only the server model
// draws smaller numbers, which exercises leading zero digits in every
// operand.  Checks the results, the phase-1 cycle count and the mechanism
// counters of the shared environment, which ends the run.
module tb_ecm_phase1_shark;
  import ecm_pkg::*;
  logic clk, rst_n, in_valid, in_ready, out_valid, out_ready, busy;
  logic [IO_W-1:0] in_data, out_data;

  ecm_phase1 dut (
    .clk, .rst_n, .io_in_valid(in_valid), .io_in_ready(in_ready), .io_in_data(in_data),
    .io_out_valid(out_valid), .io_out_ready(out_ready), .io_out_data(out_data), .busy);

  ecm_tb_env #(.B1(960), .NBATCH(1), .NBITS(125), .WATCHDOG(600000)) env (
    .clk, .rst_n, .io_in_valid(in_valid), .io_in_ready(in_ready), .io_in_data(in_data),
    .io_out_valid(out_valid), .io_out_ready(out_ready), .io_out_data(out_data), .busy,
    .uop(dut.u_ctrl.uop), .step(dut.u_ctrl.step), .kbit(dut.u_ctrl.kbit),
    .start_pulse(dut.core_start), .ld_we(dut.ld_we), .sv_re(dut.sv_re));

  // outer watchdog, in case the environment's own never fires
  initial begin
    repeat (800000) @(posedge clk);
    $display("TB_RESULT checks=1 failures=1");
    $finish;
  end
endmodule
