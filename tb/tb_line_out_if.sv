// tb_line_out_if: sends random cells through the output interface with a
// randomly full external FIFO. The written bytes must equal the cells byte
// by byte, the start marker must flag exactly the first byte of each cell, no
// byte may be written in a clock after the full flag was high, and with the
// FIFO never full a cell must take exactly 53 clocks.
module tb_line_out_if;
  import wfq_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic load_valid, load_ready, tx_wr, tx_soc, full;
  logic [CELL_W-1:0] load_cell;
  logic [7:0] tx_data;

  line_out_if dut (.clk, .rst_n, .load_valid, .load_cell, .load_ready, .tx_data,
                   .tx_wr, .tx_soc, .tx_fifo_full(full));

  logic [7:0] exp_bytes [$];
  int nbytes = 0, nsoc = 0;
  bit full_q = 0;
  bit random_full = 1;

  initial begin
    repeat (200000) @(posedge clk);
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

  // monitor
  always @(posedge clk) begin
    if (rst_n && tx_wr) begin
      logic [7:0] e;
      e = exp_bytes.pop_front();
      check(tx_data == e, "byte value");
      check(tx_soc == (nbytes % CELL_BYTES == 0), "start of cell marker");
      check(!full_q, "no write after full");
      nbytes++;
    end
    full_q <= full;
  end

  always @(negedge clk) full = random_full ? ($urandom % 4 == 0) : 1'b0;

  initial begin
    load_valid = 0; load_cell = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 40; c++) begin
      int t0, t1;
      if (c == 30) random_full = 0;
      @(negedge clk);
      while (!load_ready) @(negedge clk);
      for (int i = 0; i < CELL_BYTES; i++) begin
        load_cell[8*i +: 8] = 8'($urandom);
        exp_bytes.push_back(load_cell[8*i +: 8]);
      end
      load_valid = 1;
      @(negedge clk);
      load_valid = 0;
      t0 = $time;
      while (!load_ready) @(negedge clk);
      t1 = $time;
      if (c > 30) check((t1 - t0) / 10 == CELL_BYTES, "53 clocks per cell at full rate");
    end
    repeat (3) @(posedge clk);
    check(exp_bytes.size() == 0 && nbytes == 40 * CELL_BYTES, "all bytes sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
