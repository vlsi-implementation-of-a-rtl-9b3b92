// tb_bucket_sort: checks the bucket sorter against a reference model kept in
// the testbench: per port, one FIFO per bucket, the active bucket and the
// last timestamp. Random inserts (each connection at most once in the
// sorter, random spacing below the window) and removes on 2 ports with 8
// buckets over a 64-tick window. Every result (connection, timestamp, empty)
// is compared, the one-clock result latency and the port status flags are
// checked, and the run must see wrap-around of the window, skipped empty
// buckets and FIFO order inside one bucket.
module tb_bucket_sort;
  import wfq_pkg::*;
  localparam int NC = 16, NP = 2, NB = 8, TWIN = 64, IVL = TWIN / NB;
  int checks = 0, failures = 0;
  int n_wrap = 0, n_skip = 0, n_same_bucket = 0, n_empty = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic op_valid, op_ready, done, done_empty;
  bs_op_e op_type;
  logic [0:0] op_port;
  logic [3:0] op_cid, done_cid;
  logic [5:0] op_spacing, done_ts;
  logic [NP-1:0] port_nonempty;

  bucket_sort #(.N_CONN(NC), .N_PORTS(NP), .N_BUCKETS(NB), .T_WINDOW(TWIN)) dut (
    .clk, .rst_n, .op_valid, .op_ready, .op_type, .op_port, .op_cid, .op_spacing,
    .done, .done_empty, .done_cid, .done_ts, .port_nonempty);

  // reference model
  int q_cid [NP][NB][$];
  int q_ts  [NP][NB][$];
  int active [NP];
  int last_ts [NP];
  bit present [NC];

  initial begin
    repeat (50000) @(posedge clk);
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

  function automatic int total(int p);
    int n = 0;
    for (int b = 0; b < NB; b++) n += q_cid[p][b].size();
    return n;
  endfunction

  task automatic do_insert(int p, int c, int sp);
    int ts, b;
    ts = (last_ts[p] + sp) % TWIN;
    b  = ts / IVL;
    if (q_cid[p][b].size() > 0) n_same_bucket++;
    q_cid[p][b].push_back(c);
    q_ts[p][b].push_back(ts);
    present[c] = 1;
    op_valid = 1; op_type = BS_INSERT; op_port = 1'(p); op_cid = 4'(c); op_spacing = 6'(sp);
    @(posedge clk); #1;
    op_valid = 0;
    check(done && !done_empty && done_ts == 6'(ts), "insert result");
  endtask

  task automatic do_remove(int p);
    int b, c, ts, found;
    found = -1;
    for (int k = 0; k < NB; k++) begin
      b = (active[p] + k) % NB;
      if (q_cid[p][b].size() > 0) begin found = b; break; end
    end
    op_valid = 1; op_type = BS_REMOVE; op_port = 1'(p);
    @(posedge clk); #1;
    op_valid = 0;
    if (found < 0) begin
      n_empty++;
      check(done && done_empty, "remove from empty port");
    end else begin
      if (found != active[p]) n_skip++;
      if (found < active[p]) n_wrap++;
      c  = q_cid[p][found].pop_front();
      ts = q_ts[p][found].pop_front();
      present[c] = 0;
      active[p]  = found;
      last_ts[p] = ts;
      check(done && !done_empty && int'(done_cid) == c && int'(done_ts) == ts,
            $sformatf("remove p%0d want cid %0d ts %0d got %0d %0d", p, c, ts, done_cid, done_ts));
    end
  endtask

  initial begin
    op_valid = 0; op_type = BS_INSERT; op_port = 0; op_cid = 0; op_spacing = 0;
    for (int p = 0; p < NP; p++) begin active[p] = 0; last_ts[p] = 0; end
    for (int c = 0; c < NC; c++) present[c] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // initialisation takes N_CONN clocks
    begin
      int n = 0;
      while (!op_ready) begin @(posedge clk); n++; end
      check(n >= NC - 1 && n <= NC + 1, "init length");
    end
    #1;
    for (int t = 0; t < 3000; t++) begin
      int p, c;
      p = $urandom % NP;
      if ($urandom % 2 == 0) begin
        c = $urandom % NC;
        if (!present[c]) do_insert(p, c, 1 + $urandom % (TWIN - IVL - 1));
        else do_remove(p);
      end else begin
        do_remove(p);
      end
      for (int q = 0; q < NP; q++) check(port_nonempty[q] == (total(q) > 0), "port status");
    end
    check(n_wrap > 0 && n_skip > 0 && n_same_bucket > 0 && n_empty > 0, "mechanisms seen");
    $display("wraps=%0d skips=%0d same-bucket inserts=%0d empty removes=%0d", n_wrap, n_skip, n_same_bucket, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
