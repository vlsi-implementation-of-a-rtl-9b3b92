// cpu_if: register interface to an external MC68000-series processor.
//
// The processor sees 16-bit registers (map in wfq_pkg::reg_addr_e). An access
// starts when cpu_as_n is sampled low; cpu_rw = 1 is a read. A write is
// committed and acknowledged (cpu_dtack_n low) after 4 clocks, a read after
// 5 clocks with its data on cpu_dout; the acknowledge stays low until
// cpu_as_n goes high again, and the next access needs cpu_as_n high for at
// least one clock. The bus is simplified to a synchronous strobe on the
// unit's clock; the 5/4-clock access times are those of the unit.
//
// Writes to the table data registers (queue maximum, spacing constant, port,
// label, shaper interval) become one-clock cfg_wr pulses carrying the table,
// the index from the matching select register and the value. Event pulses
// from the rest of the unit increment 16-bit wrapping counters and set
// interrupt causes; the single interrupt line cpu_irq_n is low while any
// unmasked cause is set. Causes are cleared by writing 1 to them. The SRAM
// access registers let the processor read or write one 42-bit SRAM word:
// writing R_MEM_CMD raises mem_req until mem_done; the read data are then
// in R_MEM_D0..D2 and the IRQ_MEMDONE cause is set.
module cpu_if
  import wfq_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // processor bus
  input  logic               cpu_as_n,
  input  logic               cpu_rw,
  input  logic [5:0]         cpu_addr,
  input  logic [15:0]        cpu_din,
  output logic [15:0]        cpu_dout,
  output logic               cpu_dtack_n,
  output logic               cpu_irq_n,
  // configuration
  output logic               ctrl_enable,
  output logic               cfg_wr,
  output cfg_wr_t            cfg,
  output logic [15:0]        conn_sel,
  input  logic [15:0]        conn_qlen,
  input  logic               init_done,
  // events
  input  logic               ev_rx,
  input  logic               ev_tx,
  input  logic               ev_disc,
  input  logic               ev_mism,
  input  logic               ev_corr,
  input  logic               ev_uncorr,
  input  logic               ev_byp,
  input  logic               ev_ovrun,
  // SRAM access
  output logic               mem_req,
  output logic               mem_we,
  output logic [SRAM_AW-1:0] mem_addr,
  output logic [MEM_DW-1:0]  mem_wdata,
  input  logic               mem_done,
  input  logic [MEM_DW-1:0]  mem_rdata
);
  logic [2:0]  cyc;
  logic        acked;
  logic [15:0] irq_stat, irq_mask;
  logic [15:0] lbl_sel, shp_sel;
  logic [15:0] cnt_rx, cnt_tx, cnt_disc, cnt_mism, cnt_corr, cnt_uncorr, cnt_byp;
  logic [MEM_DW-1:0] mem_data;

  logic        wr_commit, rd_commit;
  logic [15:0] rd_val;

  assign wr_commit = !cpu_as_n && !acked && !cpu_rw && cyc == 3'd3;
  assign rd_commit = !cpu_as_n && !acked &&  cpu_rw && cyc == 3'd4;
  assign cpu_irq_n = !(|(irq_stat & irq_mask));
  assign mem_wdata = mem_data;

  always_comb begin
    unique case (reg_addr_e'(cpu_addr))
      R_ID:         rd_val = CHIP_ID;
      R_CTRL:       rd_val = {15'd0, ctrl_enable};
      R_STATUS:     rd_val = {14'd0, mem_req, init_done};
      R_IRQ_STAT:   rd_val = irq_stat;
      R_IRQ_MASK:   rd_val = irq_mask;
      R_CONN_SEL:   rd_val = conn_sel;
      R_CONN_QLEN:  rd_val = conn_qlen;
      R_LBL_SEL:    rd_val = lbl_sel;
      R_SHP_SEL:    rd_val = shp_sel;
      R_CNT_RX:     rd_val = cnt_rx;
      R_CNT_TX:     rd_val = cnt_tx;
      R_CNT_DISC:   rd_val = cnt_disc;
      R_CNT_MISM:   rd_val = cnt_mism;
      R_CNT_CORR:   rd_val = cnt_corr;
      R_CNT_UNCORR: rd_val = cnt_uncorr;
      R_CNT_BYP:    rd_val = cnt_byp;
      R_MEM_ALO:    rd_val = mem_addr[15:0];
      R_MEM_AHI:    rd_val = 16'(mem_addr[SRAM_AW-1:16]);
      R_MEM_D0:     rd_val = mem_data[15:0];
      R_MEM_D1:     rd_val = mem_data[31:16];
      R_MEM_D2:     rd_val = 16'(mem_data[MEM_DW-1:32]);
      default:      rd_val = 16'h0000;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc         <= '0;
      acked       <= 1'b0;
      cpu_dout    <= '0;
      cpu_dtack_n <= 1'b1;
      ctrl_enable <= 1'b0;
      cfg_wr      <= 1'b0;
      cfg         <= '0;
      conn_sel    <= '0;
      lbl_sel     <= '0;
      shp_sel     <= '0;
      irq_stat    <= '0;
      irq_mask    <= '0;
      cnt_rx      <= '0;
      cnt_tx      <= '0;
      cnt_disc    <= '0;
      cnt_mism    <= '0;
      cnt_corr    <= '0;
      cnt_uncorr  <= '0;
      cnt_byp     <= '0;
      mem_req     <= 1'b0;
      mem_we      <= 1'b0;
      mem_addr    <= '0;
      mem_data    <= '0;
    end else begin
      cfg_wr <= 1'b0;
      // bus cycle timing
      if (cpu_as_n) begin
        cyc         <= '0;
        acked       <= 1'b0;
        cpu_dtack_n <= 1'b1;
      end else if (!acked) begin
        cyc <= cyc + 1'b1;
        if (wr_commit || rd_commit) begin
          acked       <= 1'b1;
          cpu_dtack_n <= 1'b0;
        end
        if (rd_commit) cpu_dout <= rd_val;
      end
      // event counters and interrupt causes
      if (ev_rx)     cnt_rx     <= cnt_rx + 1'b1;
      if (ev_tx)     cnt_tx     <= cnt_tx + 1'b1;
      if (ev_disc)   cnt_disc   <= cnt_disc + 1'b1;
      if (ev_mism)   cnt_mism   <= cnt_mism + 1'b1;
      if (ev_corr)   cnt_corr   <= cnt_corr + 1'b1;
      if (ev_uncorr) cnt_uncorr <= cnt_uncorr + 1'b1;
      if (ev_byp)    cnt_byp    <= cnt_byp + 1'b1;
      if (wr_commit && reg_addr_e'(cpu_addr) == R_IRQ_STAT) irq_stat <= irq_stat & ~cpu_din;
      if (ev_disc)   irq_stat[IRQ_DISC]   <= 1'b1;
      if (ev_mism)   irq_stat[IRQ_MISM]   <= 1'b1;
      if (ev_corr)   irq_stat[IRQ_CORR]   <= 1'b1;
      if (ev_uncorr) irq_stat[IRQ_UNCORR] <= 1'b1;
      if (ev_ovrun)  irq_stat[IRQ_OVRUN]  <= 1'b1;
      // SRAM access
      if (mem_req && mem_done) begin
        mem_req <= 1'b0;
        if (!mem_we) mem_data <= mem_rdata;
        irq_stat[IRQ_MEMDONE] <= 1'b1;
      end
      // register writes
      if (wr_commit) begin
        unique case (reg_addr_e'(cpu_addr))
          R_CTRL:       ctrl_enable <= cpu_din[0];
          R_IRQ_MASK:   irq_mask <= cpu_din;
          R_CONN_SEL:   conn_sel <= cpu_din;
          R_LBL_SEL:    lbl_sel  <= cpu_din;
          R_SHP_SEL:    shp_sel  <= cpu_din;
          R_CONN_QMAX:  begin cfg_wr <= 1'b1; cfg <= '{CFG_QMAX,  conn_sel, cpu_din}; end
          R_CONN_SPACE: begin cfg_wr <= 1'b1; cfg <= '{CFG_SPACE, conn_sel, cpu_din}; end
          R_CONN_PORT:  begin cfg_wr <= 1'b1; cfg <= '{CFG_PORT,  conn_sel, cpu_din}; end
          R_LBL_DATA:   begin cfg_wr <= 1'b1; cfg <= '{CFG_LABEL, lbl_sel,  cpu_din}; end
          R_SHP_IVAL:   begin cfg_wr <= 1'b1; cfg <= '{CFG_SHAPE, shp_sel,  cpu_din}; end
          R_MEM_ALO:    mem_addr[15:0] <= cpu_din;
          R_MEM_AHI:    mem_addr[SRAM_AW-1:16] <= cpu_din[SRAM_AW-17:0];
          R_MEM_D0:     mem_data[15:0] <= cpu_din;
          R_MEM_D1:     mem_data[31:16] <= cpu_din;
          R_MEM_D2:     mem_data[MEM_DW-1:32] <= cpu_din[MEM_DW-33:0];
          R_MEM_CMD:    if (!mem_req && cpu_din[1:0] != 2'd0) begin
                          mem_req <= 1'b1;
                          mem_we  <= cpu_din[1];
                        end
          default: ;
        endcase
      end
    end
  end
endmodule
