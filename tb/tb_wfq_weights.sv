// tb_wfq_weights: weighted sharing workloads on the full-size unit.
//
// Two workloads run one after the other on port 0, each with four weight
// classes of equal size and spacing constants r = k / w:
//   A: 40 connections, ten each of weights 1, 10, 50, 100, k = 8100
//      (spacings 8100, 810, 162, 81);
//   B: 1500 connections, 300 each of weights 1, 10, 50, 80, k = 8000
//      (spacings 8000, 800, 160, 100).
// k stays below T_window (B-1)/B = 8128 so that no spacing laps the window.
// With the port held by backpressure, every connection is loaded with as
// many cells as it should send in one round (w cells for weight w; 1610
// cells for A, 42300 for B); the port is then released. Over the round each
// class must receive exactly its share, every connection's cells must leave
// in order, and for every cell the departure index is compared with the
// ideal n * round / w: mean and largest deviation per class are reported and
// must stay below half a round; classes of weight 10 and more must have sent
// 40..60 % of their cells in the first half of the round.
module tb_wfq_weights;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  localparam int MAXC = 1500;
  int ncls;              // connections per class in the current workload
  int weights [4];

  logic [7:0]  rx_data = '0;
  logic        rx_valid = 1'b0, rx_soc = 1'b0;
  logic [7:0]  tx_data;
  logic        tx_wr, tx_soc;
  logic [15:0] bp = '0;
  logic [20:0] sram_addr;
  logic        sram_we_n, sram_oe_n, sram_dq_oe;
  logic [47:0] sram_dq_o, sram_dq_i;
  logic        cpu_as_n = 1'b1, cpu_rw = 1'b1;
  logic [5:0]  cpu_addr = '0;
  logic [15:0] cpu_din = '0, cpu_dout;
  logic        cpu_dtack_n, cpu_irq_n;

  wfq_unit dut (
    .clk, .rst_n, .rx_data, .rx_valid, .rx_soc, .tx_data, .tx_wr, .tx_soc,
    .tx_fifo_full(1'b0), .bp,
    .sram_addr, .sram_we_n, .sram_oe_n, .sram_dq_o, .sram_dq_oe, .sram_dq_i,
    .cpu_as_n, .cpu_rw, .cpu_addr, .cpu_din, .cpu_dout, .cpu_dtack_n, .cpu_irq_n);

  sram_model #(.AW(21), .DW(48)) mem (.clk, .addr(sram_addr), .we_n(sram_we_n),
    .oe_n(sram_oe_n), .dq_in(sram_dq_o), .dq_out(sram_dq_i));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 12) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cpu_access(input bit read, input logic [5:0] a, input logic [15:0] wd,
                            output logic [15:0] rd);
    @(negedge clk);
    cpu_as_n = 0; cpu_rw = read; cpu_addr = a; cpu_din = wd;
    do @(posedge clk); while (cpu_dtack_n);
    #1 rd = cpu_dout;
    @(negedge clk);
    cpu_as_n = 1;
  endtask
  task automatic cpu_wr(input wfq_pkg::reg_addr_e a, input int d);
    logic [15:0] x;
    cpu_access(0, a, 16'(d), x);
  endtask

  function automatic int weight_of(int c);
    return weights[c / ncls];
  endfunction

  task automatic send_cell(input int c, input int s);
    logic [423:0] cl;
    for (int i = 0; i < 53; i++) cl[8*i +: 8] = 8'($urandom);
    cl[15:8]  = 8'h00;
    cl[23:16] = 8'(c >> 4);
    cl[31:24] = {4'(c), 4'h0};
    cl[47:40] = 8'(c);
    cl[63:48] = 16'(s);
    for (int i = 0; i < 53; i++) begin
      @(negedge clk);
      rx_valid = 1; rx_soc = (i == 0); rx_data = cl[8*i +: 8];
    end
    @(negedge clk);
    rx_valid = 0; rx_soc = 0;
  endtask

  // output monitor: departure index of each cell per connection
  int nb = 0, ndep = 0;
  logic [423:0] oc;
  int dep [MAXC][$];
  int seq_next [MAXC];
  int nconn;
  always @(posedge clk) begin
    if (rst_n && tx_wr) begin
      if (tx_soc) nb = 0;
      oc[8*nb +: 8] = tx_data;
      nb++;
      if (nb == 53) begin
        int c;
        c = int'({oc[23:16], oc[31:28]});
        checks++;
        if (c >= nconn || int'(oc[63:48]) != seq_next[c]) begin
          failures++;
          if (failures < 12) $display("FAIL order: connection %0d", c);
        end else begin
          seq_next[c]++;
          dep[c].push_back(ndep);
        end
        ndep++;
      end
    end
  end

  task automatic run_workload(input string name, input int per_class, input int w0,
                             input int w1, input int w2, input int w3, input int k);
    int total, round, maxw;
    ncls = per_class;
    nconn = 4 * per_class;
    weights[0] = w0; weights[1] = w1; weights[2] = w2; weights[3] = w3;
    round = per_class * (w0 + w1 + w2 + w3);
    maxw = w3;
    for (int c = 0; c < nconn; c++) begin
      seq_next[c] = 0;
      dep[c].delete();
    end
    ndep = 0;
    for (int c = 0; c < nconn; c++) begin
      cpu_wr(wfq_pkg::R_CONN_SEL, c);
      cpu_wr(wfq_pkg::R_CONN_PORT, 0);
      cpu_wr(wfq_pkg::R_CONN_SPACE, k / weight_of(c));
      cpu_wr(wfq_pkg::R_LBL_SEL, c);
      cpu_wr(wfq_pkg::R_LBL_DATA, 32'h8000 | c);
    end
    // load one round, interleaving the connections
    bp[0] = 1;
    total = 0;
    for (int n = 0; n < maxw; n++)
      for (int c = 0; c < nconn; c++)
        if (n < weight_of(c)) begin send_cell(c, n); total++; end
    check(total == round, "one round loaded");
    repeat (50) @(posedge clk);
    bp[0] = 0;
    while (ndep < round) @(posedge clk);
    repeat (100) @(posedge clk);
    check(ndep == round, "all cells sent");
    // shares and departure deviation per class
    for (int cl = 0; cl < 4; cl++) begin
      int w, got, maxdev, half;
      real sumdev;
      int nd;
      w = weights[cl];
      got = 0; maxdev = 0; sumdev = 0.0; nd = 0; half = 0;
      for (int c = per_class * cl; c < per_class * (cl + 1); c++) begin
        got += dep[c].size();
        for (int n = 0; n < dep[c].size(); n++) begin
          int ideal, d;
          ideal = ((n + 1) * round) / w;
          d = dep[c][n] - ideal;
          if (d < 0) d = -d;
          if (d > maxdev) maxdev = d;
          sumdev += d;
          nd++;
          if (dep[c][n] < round / 2) half++;
        end
      end
      check(got == per_class * w, $sformatf("%s class w=%0d sent %0d of %0d", name, w, got, per_class * w));
      check(maxdev < round / 2, $sformatf("%s class w=%0d deviation %0d", name, w, maxdev));
      if (w >= 10)
        check(half >= (per_class * w) * 4 / 10 && half <= (per_class * w) * 6 / 10,
              $sformatf("%s class w=%0d first-half share %0d of %0d", name, w, half, per_class * w));
      $display("%s weight %0d: cells %0d (%0d in first half round), departure deviation mean %0.1f max %0d cell periods",
               name, w, got, half, (nd > 0) ? sumdev / nd : 0.0, maxdev);
    end
  endtask

  initial begin
    logic [15:0] v;
    repeat (3) @(posedge clk);
    rst_n = 1;
    do begin
      repeat (1000) @(posedge clk);
      cpu_access(1, 6'(wfq_pkg::R_STATUS), 16'h0, v);
    end while (!v[0]);
    cpu_wr(wfq_pkg::R_CTRL, 1);
    run_workload("A", 10, 1, 10, 50, 100, 8100);
    run_workload("B", 300, 1, 10, 50, 80, 8000);
    $display("cycles %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
