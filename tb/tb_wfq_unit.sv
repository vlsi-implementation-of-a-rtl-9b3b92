// tb_wfq_unit: end-to-end test of the queuing unit at a reduced size
// (64 connections, 4 ports, 16 buckets over a 256-tick window, 128 cell
// buffers) against the behavioural SRAM. The scenario is in wfq_tb_body.svh.
module tb_wfq_unit;
  localparam int NC = 64, NP = 4, NB = 16, TWIN = 256, NBUF = 128;
  localparam int WATCHDOG = 200000;
  `include "wfq_tb_body.svh"

  wfq_unit #(.N_CONN(NC), .N_PORTS(NP), .N_BUCKETS(NB), .T_WINDOW(TWIN), .N_BUFS(NBUF)) dut (
    .clk, .rst_n, .rx_data, .rx_valid, .rx_soc, .tx_data, .tx_wr, .tx_soc, .tx_fifo_full, .bp,
    .sram_addr, .sram_we_n, .sram_oe_n, .sram_dq_o, .sram_dq_oe, .sram_dq_i,
    .cpu_as_n, .cpu_rw, .cpu_addr, .cpu_din, .cpu_dout, .cpu_dtack_n, .cpu_irq_n);

  sram_model #(.AW(21), .DW(48)) mem (.clk, .addr(sram_addr), .we_n(sram_we_n),
    .oe_n(sram_oe_n), .dq_in(sram_dq_o), .dq_out(sram_dq_i));
endmodule
