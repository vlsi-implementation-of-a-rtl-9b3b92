// tb_wfq_full: the end-to-end scenario of wfq_tb_body.svh with the queuing
// unit at its full size (2048 connections, 16 ports, 128 buckets over an
// 8192-tick window, 190650 cell buffers in a 2M-word SRAM).
module tb_wfq_full;
  localparam int NC = 2048, NP = 16, NB = 128, TWIN = 8192, NBUF = 190650;
  localparam int WATCHDOG = 600000;
  `include "wfq_tb_body.svh"

  wfq_unit dut (
    .clk, .rst_n, .rx_data, .rx_valid, .rx_soc, .tx_data, .tx_wr, .tx_soc, .tx_fifo_full, .bp,
    .sram_addr, .sram_we_n, .sram_oe_n, .sram_dq_o, .sram_dq_oe, .sram_dq_i,
    .cpu_as_n, .cpu_rw, .cpu_addr, .cpu_din, .cpu_dout, .cpu_dtack_n, .cpu_irq_n);

  sram_model #(.AW(21), .DW(48)) mem (.clk, .addr(sram_addr), .we_n(sram_we_n),
    .oe_n(sram_oe_n), .dq_in(sram_dq_o), .dq_out(sram_dq_i));
endmodule
