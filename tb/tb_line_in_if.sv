// tb_line_in_if: drives the incoming line with random cells and labels.
// Checks: complete cells appear byte-exact with the connection id and mapped
// flag of the label table entry addressed by the low VCI bits; cells cut
// short by a new start marker and bytes outside a cell are dropped and
// counted as mismatches; a cell completed while the previous one has not
// been taken is dropped as an overrun; idle clocks between bytes are allowed.
module tb_line_in_if;
  import wfq_pkg::*;
  localparam int LW = 6, NC = 64;
  int checks = 0, failures = 0;
  int n_mism = 0, n_ovr = 0, n_cells = 0, n_unmapped = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] rx_data;
  logic rx_valid, rx_soc;
  logic cell_valid, cell_mapped, cell_ack, ev_mismatch, ev_overrun;
  logic [CELL_W-1:0] cell_data;
  logic [5:0] cell_cid;
  logic lbl_we, lbl_mapped;
  logic [LW-1:0] lbl_idx;
  logic [5:0] lbl_cid;

  line_in_if #(.N_CONN(NC), .LW(LW)) dut (.clk, .rst_n, .rx_data, .rx_valid, .rx_soc,
    .cell_valid, .cell_data, .cell_mapped, .cell_cid, .cell_ack, .ev_mismatch, .ev_overrun,
    .lbl_we, .lbl_idx, .lbl_mapped, .lbl_cid);

  bit tab_map [2**LW];
  int tab_cid [2**LW];
  logic [CELL_W-1:0] exp_q [$];
  int exp_mism = 0, exp_ovr = 0;
  bit hold = 0;      // controller slow: do not acknowledge

  initial begin
    repeat (400000) @(posedge clk);
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

  // consumer: take each cell one clock after it appears, unless holding
  always @(posedge clk) begin
    if (rst_n && ev_mismatch) n_mism++;
    if (rst_n && ev_overrun)  n_ovr++;
  end
  always @(negedge clk) begin
    cell_ack = 0;
    if (cell_valid && !hold) begin
      logic [CELL_W-1:0] e;
      int idx;
      cell_ack = 1;
      e = exp_q.pop_front();
      idx = int'({e[8*2 +: 8], e[8*3 + 4 +: 4]}) % (2**LW);
      check(cell_data == e, "cell bytes");
      check(cell_mapped == tab_map[idx] && (!tab_map[idx] || int'(cell_cid) == tab_cid[idx]),
            "label decode");
      if (!tab_map[idx]) n_unmapped++;
      n_cells++;
    end
  end

  task automatic send_byte(input logic [7:0] b, input bit soc);
    @(negedge clk);
    rx_valid = 1; rx_data = b; rx_soc = soc;
    @(negedge clk);
    rx_valid = 0; rx_soc = 0;
    if ($urandom % 8 == 0) @(negedge clk);
  endtask

  // send a cell of len bytes; good cells are expected unless dropped
  task automatic send_cell(input int len, input bit expect_out);
    logic [CELL_W-1:0] c;
    for (int i = 0; i < CELL_BYTES; i++) c[8*i +: 8] = 8'($urandom);
    if (expect_out) exp_q.push_back(c);
    for (int i = 0; i < len; i++) send_byte(c[8*i +: 8], i == 0);
  endtask

  initial begin
    rx_valid = 0; rx_soc = 0; rx_data = 0; lbl_we = 0; lbl_idx = 0; lbl_mapped = 0; lbl_cid = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2**LW; i++) begin
      tab_map[i] = ($urandom % 4) != 0;
      tab_cid[i] = $urandom % NC;
      @(negedge clk);
      lbl_we = 1; lbl_idx = LW'(i); lbl_mapped = tab_map[i]; lbl_cid = 6'(tab_cid[i]);
    end
    @(negedge clk) lbl_we = 0;
    for (int k = 0; k < 120; k++) begin
      int r;
      r = $urandom % 10;
      if (r == 0) begin
        send_cell(1 + $urandom % (CELL_BYTES - 1), 0);   // cut short by next start
        exp_mism++;
        send_cell(CELL_BYTES, 1);
      end else if (r == 1) begin
        send_byte(8'($urandom), 0);                      // stray bytes
        send_byte(8'($urandom), 0);
        exp_mism++;
        send_cell(CELL_BYTES, 1);
      end else if (r == 2) begin
        repeat (2) @(posedge clk);                       // previous cell taken
        hold = 1;                                        // controller busy
        send_cell(CELL_BYTES, 1);
        send_cell(CELL_BYTES, 0);
        exp_ovr++;
        @(posedge clk);
        hold = 0;
      end else begin
        send_cell(CELL_BYTES, 1);
      end
    end
    repeat (5) @(negedge clk);
    check(exp_q.size() == 0, "all cells delivered");
    check(n_mism == exp_mism, $sformatf("mismatch count %0d want %0d", n_mism, exp_mism));
    check(n_ovr == exp_ovr, $sformatf("overrun count %0d want %0d", n_ovr, exp_ovr));
    check(n_unmapped > 0 && n_mism > 0 && n_ovr > 0, "mechanisms seen");
    $display("cells=%0d unmapped=%0d mismatches=%0d overruns=%0d", n_cells, n_unmapped, n_mism, n_ovr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
