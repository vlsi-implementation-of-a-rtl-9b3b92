// tb_cell_queue: checks the per-connection queue controller against a model:
// per-connection FIFOs of buffer numbers, an idle FIFO of buffers (initially
// 0..N_BUFS-1 in order) and per-connection maxima. Random enqueues and
// dequeues on 8 connections sharing 16 buffers; the buffer returned, the
// accept/discard decision, the was-empty / now-empty flags, the CPU written
// maximum and the queue length read port are compared. Discards on a full
// queue and on an exhausted pool must both occur.
module tb_cell_queue;
  import wfq_pkg::*;
  localparam int NC = 8, NBF = 16, QW = 4, DQ = 5;
  int checks = 0, failures = 0;
  int n_full = 0, n_pool = 0, n_deq_empty = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic op_valid, op_ready, done, done_ok, done_was_empty, done_now_empty;
  cq_op_e op_type;
  logic [2:0] op_cid;
  logic [3:0] done_buf;
  logic cfg_we;
  logic [2:0] cfg_cid;
  logic [QW-1:0] cfg_qmax, cfg_qlen;

  cell_queue #(.N_CONN(NC), .N_BUFS(NBF), .QLEN_W(QW), .DEFAULT_QMAX(DQ)) dut (
    .clk, .rst_n, .op_valid, .op_ready, .op_type, .op_cid, .done, .done_ok,
    .done_buf, .done_was_empty, .done_now_empty, .cfg_we, .cfg_cid, .cfg_qmax, .cfg_qlen);

  int q [NC][$];
  int idle [$];
  int qmax [NC];

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

  initial begin
    op_valid = 0; op_type = CQ_ENQ; op_cid = 0; cfg_we = 0; cfg_cid = 0; cfg_qmax = 0;
    for (int b = 0; b < NBF; b++) idle.push_back(b);
    for (int c = 0; c < NC; c++) qmax[c] = DQ;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (!op_ready) @(posedge clk);
    #1;
    for (int t = 0; t < 4000; t++) begin
      int c, r;
      c = $urandom % NC;
      r = $urandom % 100;
      if (r < 3) begin
        qmax[c] = 1 + $urandom % 8;
        cfg_we = 1; cfg_cid = 3'(c); cfg_qmax = QW'(qmax[c]);
        @(posedge clk); #1;
        cfg_we = 0;
      end else if (r < 55) begin
        bit ok;
        ok = (q[c].size() < qmax[c]) && idle.size() > 0;
        if (q[c].size() >= qmax[c]) n_full++;
        else if (idle.size() == 0) n_pool++;
        op_valid = 1; op_type = CQ_ENQ; op_cid = 3'(c);
        @(posedge clk); #1;
        op_valid = 0;
        check(done && done_ok == ok, "enq accept");
        if (ok) begin
          int b;
          b = idle.pop_front();
          check(int'(done_buf) == b && done_was_empty == (q[c].size() == 0), "enq buffer");
          q[c].push_back(b);
        end
      end else begin
        op_valid = 1; op_type = CQ_DEQ; op_cid = 3'(c);
        @(posedge clk); #1;
        op_valid = 0;
        if (q[c].size() == 0) begin
          n_deq_empty++;
          check(done && !done_ok, "deq empty");
        end else begin
          int b;
          b = q[c].pop_front();
          idle.push_back(b);
          check(done && done_ok && int'(done_buf) == b && done_now_empty == (q[c].size() == 0),
                "deq buffer");
        end
      end
      cfg_cid = 3'($urandom % NC); #1;
      check(int'(cfg_qlen) == q[cfg_cid].size(), "qlen read");
    end
    check(n_full > 0 && n_pool > 0 && n_deq_empty > 0, "mechanisms seen");
    $display("full=%0d pool-empty=%0d deq-empty=%0d", n_full, n_pool, n_deq_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
