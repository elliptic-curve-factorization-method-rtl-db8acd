// tb_ecm_phase1_full: one complete phase 1 with every parameter of the
// processor at its default: B1 = 960 (k has 1374 bits), 32 curves with 134-bit
// moduli (operands below 2n, up to 135 bits), about 440,000 cycles.
module tb_ecm_phase1_full;
  import ecm_pkg::*;
  logic clk, rst_n, in_valid, in_ready, out_valid, out_ready, busy;
  logic [IO_W-1:0] in_data, out_data;

  ecm_phase1 dut (
    .clk, .rst_n, .io_in_valid(in_valid), .io_in_ready(in_ready), .io_in_data(in_data),
    .io_out_valid(out_valid), .io_out_ready(out_ready), .io_out_data(out_data), .busy);

  ecm_tb_env #(.B1(960), .NBATCH(1), .WATCHDOG(600000)) env (
    .clk, .rst_n, .io_in_valid(in_valid), .io_in_ready(in_ready), .io_in_data(in_data),
    .io_out_valid(out_valid), .io_out_ready(out_ready), .io_out_data(out_data), .busy,
    .uop(dut.u_ctrl.uop), .step(dut.u_ctrl.step), .kbit(dut.u_ctrl.kbit),
    .start_pulse(dut.core_start), .ld_we(dut.ld_we), .sv_re(dut.sv_re));
endmodule
