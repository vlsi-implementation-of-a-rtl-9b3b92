// Shared body of the end-to-end testbenches of wfq_unit.
//
// The including module defines NC (connections), NP (ports), NB (buckets),
// TWIN (time window) and NBUF (cell buffers) to match its wfq_unit instance,
// named dut, and instantiates the SRAM model as mem. The body drives the
// line input, the processor bus and the backpressure, collects the line
// output and checks every cell that leaves against the cells sent, in order
// per connection. Phases: configuration through the processor bus; weighted
// sharing of one port by two connections with weights 3:1 (spacing 1 and 3
// bucket intervals); correction of a bit flipped in a stored cell; round robin
// between two ports; queue-full discard; per-port rate shaping; unmapped
// pass-through; mismatched cell; processor access to the SRAM; a run long
// enough to wrap the virtual time window; and back-to-back cells at line
// rate with a randomly full output FIFO. Every mechanism is counted and a
// mechanism that never happened is a failure.

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  localparam int IVL = TWIN / NB;          // bucket interval in virtual time
  localparam int CW  = $clog2(NC);

  logic [7:0]  rx_data = '0;
  logic        rx_valid = 1'b0, rx_soc = 1'b0;
  logic [7:0]  tx_data;
  logic        tx_wr, tx_soc;
  logic        tx_fifo_full = 1'b0;
  logic [NP-1:0] bp = '0;
  logic [20:0] sram_addr;
  logic        sram_we_n, sram_oe_n, sram_dq_oe;
  logic [47:0] sram_dq_o, sram_dq_i;
  logic        cpu_as_n = 1'b1, cpu_rw = 1'b1;
  logic [5:0]  cpu_addr = '0;
  logic [15:0] cpu_din = '0, cpu_dout;
  logic        cpu_dtack_n, cpu_irq_n;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 12) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  // ---------------- processor bus ----------------------------------------
  task automatic cpu_access(input bit read, input logic [5:0] a, input logic [15:0] wd,
                            output logic [15:0] rd);
    int n;
    @(negedge clk);
    cpu_as_n = 0; cpu_rw = read; cpu_addr = a; cpu_din = wd;
    n = 0;
    do begin @(posedge clk); n++; #1; end while (cpu_dtack_n && n < 20);
    check(n == (read ? 5 : 4), "processor access time");
    rd = cpu_dout;
    @(negedge clk);
    cpu_as_n = 1;
  endtask
  task automatic cpu_wr(input wfq_pkg::reg_addr_e a, input int d);
    logic [15:0] x;
    cpu_access(0, a, 16'(d), x);
  endtask
  task automatic cpu_rd(input wfq_pkg::reg_addr_e a, output logic [15:0] d);
    cpu_access(1, a, 16'h0, d);
  endtask

  task automatic conn_setup(input int c, input int port, input int spacing, input int qmax);
    cpu_wr(wfq_pkg::R_CONN_SEL, c);
    cpu_wr(wfq_pkg::R_CONN_PORT, port);
    cpu_wr(wfq_pkg::R_CONN_SPACE, spacing);
    cpu_wr(wfq_pkg::R_CONN_QMAX, qmax);
    cpu_wr(wfq_pkg::R_LBL_SEL, c);            // label = connection number
    cpu_wr(wfq_pkg::R_LBL_DATA, 32'h8000 | c);
  endtask

  // ---------------- cells ------------------------------------------------
  // header: VCI = label; payload byte 5 = label, 6..7 = sequence number
  int seq [NC];
  logic [423:0] expq [NC][$];
  int n_sent = 0, n_expected = 0;

  function automatic logic [423:0] make_cell(int label, int s);
    logic [423:0] c;
    logic [15:0] vci;
    for (int i = 0; i < 53; i++) c[8*i +: 8] = 8'($urandom);
    vci = 16'(label);
    c[7:0]   = 8'h00;
    c[15:8]  = {4'h0, vci[15:12]};
    c[23:16] = vci[11:4];
    c[31:24] = {vci[3:0], 4'h0};
    c[47:40] = 8'(label);
    c[63:48] = 16'(s);
    return c;
  endfunction

  function automatic int label_of(logic [423:0] c);
    return int'({c[23:16], c[31:28]}) % NC;
  endfunction

  task automatic send_bytes(input logic [423:0] c, input int len);
    for (int i = 0; i < len; i++) begin
      @(negedge clk);
      rx_valid = 1; rx_soc = (i == 0); rx_data = c[8*i +: 8];
    end
    @(negedge clk);
    rx_valid = 0; rx_soc = 0;
  endtask

  // send a cell; expect it at the output unless discarded
  task automatic send_cell(input int label, input bit expect_out);
    logic [423:0] c;
    c = make_cell(label, seq[label]);
    seq[label]++;
    if (expect_out) begin expq[label].push_back(c); n_expected++; end
    send_bytes(c, 53);
    n_sent++;
  endtask

  // ---------------- output monitor ---------------------------------------
  logic [423:0] rx_cell;
  int  nb = 0;
  int  n_out = 0;
  int  out_label [$];
  int  out_time [$];
  int  soc_time;
  always @(posedge clk) begin
    if (rst_n && tx_wr) begin
      if (tx_soc) begin nb = 0; soc_time = cyc; end
      rx_cell[8*nb +: 8] = tx_data;
      nb++;
      if (nb == 53) begin
        int l;
        l = label_of(rx_cell);
        n_out++;
        out_label.push_back(l);
        out_time.push_back(soc_time);
        checks++;
        if (expq[l].size() == 0) begin
          failures++;
          if (failures < 12) $display("FAIL unexpected cell label %0d at cycle %0d", l, cyc);
        end else begin
          logic [423:0] e;
          e = expq[l].pop_front();
          if (e != rx_cell) begin
            failures++;
            if (failures < 12) $display("FAIL cell content label %0d at cycle %0d", l, cyc);
          end
        end
      end
    end
  end

  function automatic int pending();
    int n = 0;
    for (int l = 0; l < NC; l++) n += expq[l].size();
    return n;
  endfunction

  task automatic drain(input int max_cycles);
    int t0;
    t0 = cyc;
    while (pending() > 0 && cyc - t0 < max_cycles) @(posedge clk);
    repeat (60) @(posedge clk);
    check(pending() == 0, "all expected cells delivered");
  endtask

  // ---------------- mechanism counters -----------------------------------
  int m_disc = 0, m_byp = 0, m_mism = 0, m_corr = 0, m_bp = 0, m_shape = 0, m_full = 0;
  int m_wrap = 0, m_skip = 0, m_same = 0, m_restamp = 0, m_cpumem = 0, m_ovr = 0;
  int prev_ts [NP];
  initial for (int p = 0; p < NP; p++) prev_ts[p] = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.ev_disc) m_disc++;
    if (dut.ev_byp)  m_byp++;
    if (dut.ev_mism) m_mism++;
    if (dut.ev_ovrun) m_ovr++;
    if (dut.mem_corr) m_corr++;
    if (|(dut.port_nonempty & bp)) m_bp++;
    if (|(dut.port_nonempty & ~bp & ~dut.eligible)) m_shape++;
    if (tx_fifo_full && !dut.lo_ready) m_full++;
    if (dut.u_bucket_sort.go_ins && dut.u_bucket_sort.ins_hit) m_same++;
    if (dut.u_bucket_sort.go_rem &&
        dut.u_bucket_sort.rem_b != dut.u_bucket_sort.active[dut.u_bucket_sort.op_port]) m_skip++;
    if (dut.bs_valid && dut.bs_type == wfq_pkg::BS_INSERT && dut.cq_done) m_restamp++;
    if (dut.cpu_mem_done) m_cpumem++;
    if (dut.u_bucket_sort.go_rem) begin
      int p, ts;
      p  = int'(dut.u_bucket_sort.op_port);
      ts = int'({dut.u_bucket_sort.rem_b, dut.u_bucket_sort.ent_off[dut.u_bucket_sort.rem_e]});
      if (ts < prev_ts[p]) m_wrap++;
      prev_ts[p] = ts;
    end
  end

  // ---------------- watchdog ----------------------------------------------
  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- scenario ---------------------------------------------
  localparam int C_A = 0, C_B = 1, C_R2 = 2, C_R3 = 3, C_S = 4, C_D = 5, C_W = 6;
  localparam int L_UNMAPPED = 30;
  localparam int SHAPE_IVAL = 300;

  initial begin
    logic [15:0] v;
    int t0;
    for (int l = 0; l < NC; l++) seq[l] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // wait for the linked lists to be built
    t0 = cyc;
    do begin
      repeat (200) @(posedge clk);
      cpu_rd(wfq_pkg::R_STATUS, v);
    end while (!v[0] && cyc - t0 < NBUF + 10000);
    check(v[0], "initialisation finished");
    check(cyc - t0 >= NBUF, "initialisation covers all buffers");
    cpu_rd(wfq_pkg::R_ID, v);
    check(v == wfq_pkg::CHIP_ID, "chip id");

    conn_setup(C_A,  0, IVL,     400);
    conn_setup(C_B,  0, 3 * IVL, 400);
    conn_setup(C_R2, 2, IVL,     400);
    conn_setup(C_R3, 3, IVL,     400);
    conn_setup(C_S,  1, IVL,     400);
    conn_setup(C_D,  2, IVL,     2);
    conn_setup(C_W,  3, 3 * IVL, 400);
    for (int c = 8; c < 16; c++) conn_setup(c, c % NP, IVL + c, 400);
    cpu_wr(wfq_pkg::R_SHP_SEL, 1);
    cpu_wr(wfq_pkg::R_SHP_IVAL, SHAPE_IVAL);
    cpu_wr(wfq_pkg::R_IRQ_MASK, 1 << wfq_pkg::IRQ_DISC);
    cpu_wr(wfq_pkg::R_CTRL, 1);

    // ---- 1. weighted sharing of port 0 (weights 3:1) + ECC correction ----
    bp[0] = 1;
    for (int i = 0; i < 32; i++) send_cell((i % 4 == 3) ? C_B : C_A, 1);
    repeat (20) @(posedge clk);
    begin
      // flip one stored bit of the first C_B cell (look up its buffer)
      logic [423:0] target;
      int found;
      target = expq[C_B][0];
      found = 0;
      for (int b = 0; b < NBUF && !found; b++) begin
        logic [47:0] w;
        logic [41:0] d;
        int k;
        w = mem.peek(b * 11);
        k = 0;
        for (int p = 1; p <= 48; p++) if ((p & (p - 1)) != 0) begin d[k] = w[p-1]; k++; end
        if (d[39:0] == target[39:0] && mem.peek(b * 11 + 1) != 48'd0) begin
          // the header matches; confirm with the sequence bytes in word 1
          logic [47:0] w1;
          logic [41:0] d1;
          w1 = mem.peek(b * 11 + 1);
          k = 0;
          for (int p = 1; p <= 48; p++) if ((p & (p - 1)) != 0) begin d1[k] = w1[p-1]; k++; end
          if (d1[39:0] == target[79:40]) begin
            mem.flip_bit(b * 11 + 1, 17);
            found = 1;
          end
        end
      end
      check(found == 1, "stored cell found in SRAM");
    end
    out_label.delete(); out_time.delete();
    bp[0] = 0;
    drain(32 * 200);
    begin
      int na, nbb;
      na = 0; nbb = 0;
      for (int i = 0; i < 16; i++) begin
        if (out_label[i] == C_A) na++;
        if (out_label[i] == C_B) nbb++;
      end
      // 3:1 weights: 12 and 4 of the first 16 cells, within the bucket approximation
      check(na >= 10 && na <= 14 && na + nbb == 16, $sformatf("weighted share A=%0d B=%0d", na, nbb));
    end

    // ---- 2. round robin between ports 2 and 3 ----
    bp[2] = 1; bp[3] = 1;
    for (int i = 0; i < 6; i++) begin send_cell(C_R2, 1); send_cell(C_R3, 1); end
    repeat (20) @(posedge clk);
    out_label.delete(); out_time.delete();
    bp[2] = 0; bp[3] = 0;
    drain(12 * 200);
    begin
      int alt;
      alt = 0;
      for (int i = 1; i < 12; i++) if (out_label[i] != out_label[i-1]) alt++;
      check(alt == 11, $sformatf("round robin alternation %0d of 11", alt));
    end

    // ---- 3. queue-full discard ----
    bp[2] = 1;
    for (int i = 0; i < 5; i++) send_cell(C_D, i < 2);
    repeat (20) @(posedge clk);
    check(!cpu_irq_n, "discard interrupt");
    bp[2] = 0;
    drain(5 * 200);
    cpu_rd(wfq_pkg::R_CNT_DISC, v);
    check(v == 3, "discard counter");

    // ---- 4. rate shaping of port 1 ----
    bp[1] = 1;
    for (int i = 0; i < 5; i++) send_cell(C_S, 1);
    out_label.delete(); out_time.delete();
    bp[1] = 0;
    drain(5 * (SHAPE_IVAL + 200));
    for (int i = 1; i < 5; i++)
      check(out_time[i] - out_time[i-1] >= SHAPE_IVAL &&
            out_time[i] - out_time[i-1] <= SHAPE_IVAL + 60, "shaped cell spacing");

    // ---- 5. unmapped pass-through and a mismatched cell ----
    send_cell(L_UNMAPPED, 1);
    send_bytes(make_cell(C_A, 999), 20);     // cut short by the next cell
    send_cell(L_UNMAPPED, 1);
    drain(400);
    cpu_rd(wfq_pkg::R_CNT_BYP, v);
    check(v == 2, "pass-through counter");
    cpu_rd(wfq_pkg::R_CNT_MISM, v);
    check(v == 1, "mismatch counter");

    // ---- 6. processor access to the SRAM ----
    cpu_wr(wfq_pkg::R_MEM_ALO, 16'hfff0);
    cpu_wr(wfq_pkg::R_MEM_AHI, 16'h001f);
    cpu_wr(wfq_pkg::R_MEM_D0, 16'h1357);
    cpu_wr(wfq_pkg::R_MEM_D1, 16'h2468);
    cpu_wr(wfq_pkg::R_MEM_D2, 16'h0321);
    cpu_wr(wfq_pkg::R_MEM_CMD, 2);
    repeat (10) @(posedge clk);
    cpu_wr(wfq_pkg::R_MEM_D0, 0);
    cpu_wr(wfq_pkg::R_MEM_D1, 0);
    cpu_wr(wfq_pkg::R_MEM_D2, 0);
    cpu_wr(wfq_pkg::R_MEM_CMD, 1);
    repeat (10) @(posedge clk);
    cpu_rd(wfq_pkg::R_MEM_D0, v); check(v == 16'h1357, "SRAM read back D0");
    cpu_rd(wfq_pkg::R_MEM_D1, v); check(v == 16'h2468, "SRAM read back D1");
    cpu_rd(wfq_pkg::R_MEM_D2, v); check(v == 16'h0321, "SRAM read back D2");

    // ---- 7. a long run that wraps the virtual time window ----
    for (int i = 0; i < NB / 3 + 8; i++) send_cell(C_W, 1);
    drain(2000);

    // ---- 8. back-to-back cells at line rate, output FIFO sometimes full ----
    fork
      begin
        for (int i = 0; i < 40; i++) send_cell(8 + (i % 8), 1);
      end
      begin
        for (int i = 0; i < 40 * 53; i++) begin
          @(negedge clk);
          tx_fifo_full = (i > 400 && i < 900) ? ($urandom % 8 == 0) : 1'b0;
        end
        tx_fifo_full = 0;
      end
    join
    drain(8000);

    // ---- totals ----
    cpu_rd(wfq_pkg::R_CNT_RX, v);
    check(int'(v) == n_expected - 2, $sformatf("queued-cell counter %0d", v));
    cpu_rd(wfq_pkg::R_CNT_TX, v);
    check(int'(v) == n_expected - 2, "sent-cell counter");
    cpu_rd(wfq_pkg::R_CNT_CORR, v);
    check(v == 1, "corrected error counter");
    check(m_ovr == 0, "no input overrun at line rate");
    check(m_disc > 0, "mechanism: discard");
    check(m_byp > 0, "mechanism: pass-through");
    check(m_mism > 0, "mechanism: mismatched cell");
    check(m_corr > 0, "mechanism: SRAM error corrected");
    check(m_bp > 0, "mechanism: backpressure stall");
    check(m_shape > 0, "mechanism: shaper stall");
    check(m_full > 0, "mechanism: output FIFO full");
    check(m_wrap > 0, "mechanism: virtual time wrap");
    check(m_skip > 0, "mechanism: empty bucket skipped");
    check(m_same > 0, "mechanism: insert into non-empty bucket");
    check(m_restamp > 0, "mechanism: front cell restamped");
    check(m_cpumem > 0, "mechanism: processor SRAM access");
    $display("cells sent=%0d out=%0d discard=%0d bypass=%0d mism=%0d corr=%0d bp=%0d shape=%0d full=%0d wrap=%0d skip=%0d same=%0d restamp=%0d cpumem=%0d",
             n_sent, n_out, m_disc, m_byp, m_mism, m_corr, m_bp, m_shape, m_full, m_wrap, m_skip,
             m_same, m_restamp, m_cpumem);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
