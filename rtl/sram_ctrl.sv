// sram_ctrl: external SRAM access (address bus and data bus controllers).
//
// One word access may start every clock. The request (address, write flag,
// 42 data bits) is registered onto the SRAM pins in the next clock: the
// address controller drives sram_addr, the data controller drives the
// Hamming-encoded 48-bit word on sram_dq_o with sram_dq_oe high and pulses
// sram_we_n low for a write, or lowers sram_oe_n for a read. The read word
// is sampled from sram_dq_i at the end of that clock into the data-in
// register and decoded, so rsp_valid and the corrected data appear two clocks
// after the request. rsp_corrected flags a corrected single bit error,
// rsp_uncorrectable a word the code could not correct.
//
// The bidirectional bus is split into dq_o / dq_oe / dq_i; the pad drivers
// are outside this block. The SRAM is taken to write the word on the rising
// clock edge that ends a clock with sram_we_n low, and to return read data
// within one clock of the address.
module sram_ctrl
  import wfq_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // access request
  input  logic               req_valid,
  input  logic               req_we,
  input  logic [SRAM_AW-1:0] req_addr,
  input  logic [MEM_DW-1:0]  req_wdata,
  // read response
  output logic               rsp_valid,
  output logic [MEM_DW-1:0]  rsp_data,
  output logic               rsp_corrected,
  output logic               rsp_uncorrectable,
  // SRAM pins
  output logic [SRAM_AW-1:0] sram_addr,
  output logic               sram_we_n,
  output logic               sram_oe_n,
  output logic [SRAM_DW-1:0] sram_dq_o,
  output logic               sram_dq_oe,
  input  logic [SRAM_DW-1:0] sram_dq_i
);
  logic [SRAM_DW-1:0] enc_code;
  logic [SRAM_DW-1:0] din_q;
  logic               rd_pend;
  logic               rd_done;
  logic               corr, uncorr;

  hamming48 u_ecc (
    .enc_data          (req_wdata),
    .enc_code          (enc_code),
    .dec_code          (din_q),
    .dec_data          (rsp_data),
    .dec_corrected     (corr),
    .dec_uncorrectable (uncorr)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sram_addr  <= '0;
      sram_we_n  <= 1'b1;
      sram_oe_n  <= 1'b1;
      sram_dq_o  <= '0;
      sram_dq_oe <= 1'b0;
      rd_pend    <= 1'b0;
      rd_done    <= 1'b0;
      din_q      <= '0;
    end else begin
      sram_we_n  <= !(req_valid && req_we);
      sram_oe_n  <= !(req_valid && !req_we);
      sram_dq_oe <= req_valid && req_we;
      rd_pend    <= req_valid && !req_we;
      if (req_valid) begin
        sram_addr <= req_addr;
        if (req_we) sram_dq_o <= enc_code;
      end
      rd_done <= rd_pend;
      if (rd_pend) din_q <= sram_dq_i;
    end
  end

  assign rsp_valid         = rd_done;
  assign rsp_corrected     = rd_done && corr;
  assign rsp_uncorrectable = rd_done && uncorr;
endmodule
