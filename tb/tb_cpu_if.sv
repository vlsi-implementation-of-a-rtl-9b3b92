// tb_cpu_if: exercises the processor register interface. Checks the access
// times (write acknowledged 4 clocks, read 5 clocks after the strobe), the
// identifier and read/write registers, the configuration write pulses with
// their table, index and value, the event counters, the interrupt line with
// mask and write-one-to-clear, and an SRAM read and write through the
// access registers against a small responder.
module tb_cpu_if;
  import wfq_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic as_n, rw, dtack_n, irq_n, enable, cfg_wr, init_done;
  logic [5:0] addr;
  logic [15:0] din, dout, conn_sel, conn_qlen;
  cfg_wr_t cfg;
  logic ev_rx, ev_tx, ev_disc, ev_mism, ev_corr, ev_uncorr, ev_byp, ev_ovrun;
  logic mem_req, mem_we, mem_done;
  logic [SRAM_AW-1:0] mem_addr;
  logic [MEM_DW-1:0] mem_wdata, mem_rdata;

  cpu_if dut (.clk, .rst_n, .cpu_as_n(as_n), .cpu_rw(rw), .cpu_addr(addr), .cpu_din(din),
    .cpu_dout(dout), .cpu_dtack_n(dtack_n), .cpu_irq_n(irq_n), .ctrl_enable(enable),
    .cfg_wr, .cfg, .conn_sel, .conn_qlen, .init_done, .ev_rx, .ev_tx, .ev_disc, .ev_mism,
    .ev_corr, .ev_uncorr, .ev_byp, .ev_ovrun, .mem_req, .mem_we, .mem_addr, .mem_wdata,
    .mem_done, .mem_rdata);

  cfg_wr_t cfg_log [$];
  always @(posedge clk) if (rst_n && cfg_wr) cfg_log.push_back(cfg);

  // SRAM responder: one word store, answers 3 clocks after a request
  logic [MEM_DW-1:0] store;
  logic [SRAM_AW-1:0] store_addr;
  int req_age = 0;
  always @(posedge clk) begin
    mem_done <= 1'b0;
    if (mem_req && !mem_done) begin
      req_age <= req_age + 1;
      if (req_age == 3) begin
        mem_done <= 1'b1;
        req_age  <= 0;
        if (mem_we) begin store <= mem_wdata; store_addr <= mem_addr; end
      end
    end
  end
  assign mem_rdata = store;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic access(input bit read, input reg_addr_e a, input logic [15:0] wd,
                        output logic [15:0] rd);
    int n;
    @(negedge clk);
    as_n = 0; rw = read; addr = a; din = wd;
    n = 0;
    do begin @(posedge clk); n++; #1; end while (dtack_n && n < 20);
    check(n == (read ? 5 : 4), $sformatf("%s time %0d clocks", read ? "read" : "write", n));
    rd = dout;
    @(negedge clk);
    as_n = 1;
    @(negedge clk);
  endtask

  task automatic wr(input reg_addr_e a, input logic [15:0] d);
    logic [15:0] x;
    access(0, a, d, x);
  endtask

  task automatic rd_check(input reg_addr_e a, input logic [15:0] want, input string what);
    logic [15:0] x;
    access(1, a, 16'h0, x);
    check(x == want, $sformatf("%s: got %h want %h", what, x, want));
  endtask

  task automatic pulse(ref logic ev, input int n);
    repeat (n) begin
      @(negedge clk); ev = 1;
      @(negedge clk); ev = 0;
    end
  endtask

  initial begin
    as_n = 1; rw = 1; addr = 0; din = 0; conn_qlen = 16'd37; init_done = 1;
    {ev_rx, ev_tx, ev_disc, ev_mism, ev_corr, ev_uncorr, ev_byp, ev_ovrun} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    rd_check(R_ID, CHIP_ID, "id");
    rd_check(R_STATUS, 16'h0001, "status");
    wr(R_CTRL, 16'h0001);
    check(enable, "enable bit");
    rd_check(R_CTRL, 16'h0001, "ctrl readback");
    // configuration pulses
    wr(R_CONN_SEL, 16'd1234);
    wr(R_CONN_QMAX, 16'd500);
    wr(R_CONN_SPACE, 16'd77);
    wr(R_CONN_PORT, 16'd9);
    wr(R_LBL_SEL, 16'd55);
    wr(R_LBL_DATA, 16'h8000 | 16'd1234);
    wr(R_SHP_SEL, 16'd3);
    wr(R_SHP_IVAL, 16'd100);
    check(cfg_log.size() == 5, "five table writes");
    if (cfg_log.size() == 5) begin
      check(cfg_log[0].target == CFG_QMAX  && cfg_log[0].index == 1234 && cfg_log[0].value == 500, "qmax write");
      check(cfg_log[1].target == CFG_SPACE && cfg_log[1].index == 1234 && cfg_log[1].value == 77, "spacing write");
      check(cfg_log[2].target == CFG_PORT  && cfg_log[2].index == 1234 && cfg_log[2].value == 9, "port write");
      check(cfg_log[3].target == CFG_LABEL && cfg_log[3].index == 55 && cfg_log[3].value == 16'h84d2, "label write");
      check(cfg_log[4].target == CFG_SHAPE && cfg_log[4].index == 3 && cfg_log[4].value == 100, "shaper write");
    end
    check(conn_sel == 16'd1234, "connection select output");
    rd_check(R_CONN_QLEN, 16'd37, "queue length read");
    // counters and interrupt
    pulse(ev_rx, 7); pulse(ev_tx, 5); pulse(ev_disc, 3); pulse(ev_byp, 2);
    pulse(ev_mism, 4); pulse(ev_corr, 1); pulse(ev_uncorr, 6);
    rd_check(R_CNT_RX, 16'd7, "rx counter");
    rd_check(R_CNT_TX, 16'd5, "tx counter");
    rd_check(R_CNT_DISC, 16'd3, "discard counter");
    rd_check(R_CNT_BYP, 16'd2, "bypass counter");
    rd_check(R_CNT_MISM, 16'd4, "mismatch counter");
    rd_check(R_CNT_CORR, 16'd1, "corrected counter");
    rd_check(R_CNT_UNCORR, 16'd6, "uncorrectable counter");
    check(irq_n, "interrupt masked");
    wr(R_IRQ_MASK, 16'h0001 << IRQ_DISC);
    check(!irq_n, "interrupt raised");
    wr(R_IRQ_STAT, 16'h0001 << IRQ_DISC);
    check(irq_n, "interrupt cleared");
    rd_check(R_IRQ_STAT, 16'h000e, "remaining causes");
    // SRAM write and read through the access registers
    wr(R_MEM_ALO, 16'h1234);
    wr(R_MEM_AHI, 16'h001a);
    wr(R_MEM_D0, 16'hbeef);
    wr(R_MEM_D1, 16'hcafe);
    wr(R_MEM_D2, 16'h0155);
    wr(R_MEM_CMD, 16'd2);
    repeat (8) @(posedge clk);
    check(store == {10'h155, 16'hcafe, 16'hbeef} && store_addr == 21'h1a1234, "SRAM write");
    wr(R_MEM_D0, 16'h0);
    wr(R_MEM_D1, 16'h0);
    wr(R_MEM_CMD, 16'd1);
    repeat (8) @(posedge clk);
    rd_check(R_MEM_D0, 16'hbeef, "SRAM read D0");
    rd_check(R_MEM_D1, 16'hcafe, "SRAM read D1");
    rd_check(R_MEM_D2, 16'h0155, "SRAM read D2");
    rd_check(R_STATUS, 16'h0001, "SRAM access finished");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
