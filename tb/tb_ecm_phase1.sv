// tb_ecm_phase1: end-to-end test of the phase-1 processor at a reduced scalar
// (B1 = 10, k = 2520, 11 ladder steps), two batches of 32 curves so that the
// second batch streams in while the first one runs.
module tb_ecm_phase1;
  import ecm_pkg::*;
  logic clk, rst_n, in_valid, in_ready, out_valid, out_ready, busy;
  logic [IO_W-1:0] in_data, out_data;

  ecm_phase1 #(.B1(10)) dut (
    .clk, .rst_n, .io_in_valid(in_valid), .io_in_ready(in_ready), .io_in_data(in_data),
    .io_out_valid(out_valid), .io_out_ready(out_ready), .io_out_data(out_data), .busy);

  ecm_tb_env #(.B1(10), .NBATCH(2), .WATCHDOG(200000)) env (
    .clk, .rst_n, .io_in_valid(in_valid), .io_in_ready(in_ready), .io_in_data(in_data),
    .io_out_valid(out_valid), .io_out_ready(out_ready), .io_out_data(out_data), .busy,
    .uop(dut.u_ctrl.uop), .step(dut.u_ctrl.step), .kbit(dut.u_ctrl.kbit),
    .start_pulse(dut.core_start), .ld_we(dut.ld_we), .sv_re(dut.sv_re));
endmodule
