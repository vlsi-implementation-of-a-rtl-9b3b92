// cell_queue: per-connection cell queue controller.
//
// Every connection keeps a queue length, a maximum queue length and head and
// tail pointers to a FIFO linked list of cell buffers. All cell buffers come
// from one shared pool; the unused ones form the idle cell list kept by
// idle_head / idle_tail. A cell arriving for a connection whose queue length
// has reached its maximum (or when the pool is empty) is discarded. The maximum of
// each connection is set through the CPU interface (cfg_*); after reset every
// connection gets DEFAULT_QMAX, the value shown for all connections in the
// unit's queue organisation example. The cell data themselves live in the
// external SRAM at an address computed from the buffer number; this block only
// manages buffer numbers and the links between them.
//
// Operations (one per clock once initialised, result one clock later):
//   CQ_ENQ cid : takes the head of the idle list, appends it to the queue,
//                returns the buffer and whether the queue was empty before.
//                done_ok = 0 means the cell was discarded.
//   CQ_DEQ cid : unlinks the head buffer of the queue, returns it to the tail
//                of the idle list, reports the buffer and whether the queue is
//                now empty. done_ok = 0 means the queue was empty.
// After reset an initialisation sequence of max(N_BUFS, N_CONN) clocks links
// the idle list and clears the queue lengths; op_ready is low meanwhile.
// The link pointers of the buffers are kept on chip in this design.
module cell_queue
  import wfq_pkg::*;
#(
  parameter int unsigned N_CONN      = N_CONN_DEF,
  parameter int unsigned N_BUFS      = N_BUFS_DEF,
  parameter int unsigned QLEN_W      = QLEN_W_DEF,
  parameter int unsigned DEFAULT_QMAX = 500,
  localparam int unsigned CW = $clog2(N_CONN),
  localparam int unsigned BFW = $clog2(N_BUFS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              op_valid,
  output logic              op_ready,
  input  cq_op_e            op_type,
  input  logic [CW-1:0]     op_cid,
  output logic              done,
  output logic              done_ok,
  output logic [BFW-1:0]    done_buf,
  output logic              done_was_empty,  // ENQ: queue was empty before
  output logic              done_now_empty,  // DEQ: queue is empty after
  // CPU access to the queue table
  input  logic              cfg_we,
  input  logic [CW-1:0]     cfg_cid,
  input  logic [QLEN_W-1:0] cfg_qmax,
  output logic [QLEN_W-1:0] cfg_qlen
);
  localparam int unsigned INIT_N = (N_BUFS > N_CONN) ? N_BUFS : N_CONN;
  localparam int unsigned IW = $clog2(INIT_N + 1);

  logic [QLEN_W-1:0] qlen  [N_CONN];
  logic [QLEN_W-1:0] qmax  [N_CONN];
  logic [BFW-1:0]    qhead [N_CONN];
  logic [BFW-1:0]    qtail [N_CONN];
  logic [BFW-1:0]    buf_next [N_BUFS];

  logic [BFW-1:0] idle_head, idle_tail;
  logic [BFW:0]   idle_cnt;
  logic           init_busy;
  logic [IW-1:0]  init_cnt;

  assign op_ready = !init_busy;
  assign cfg_qlen = qlen[cfg_cid];

  logic [QLEN_W-1:0] len;
  logic              go_enq, go_deq;
  logic [BFW-1:0]    hb;

  always_comb begin
    len    = qlen[op_cid];
    hb     = qhead[op_cid];
    go_enq = op_valid && op_ready && op_type == CQ_ENQ &&
             len < qmax[op_cid] && idle_cnt != '0;
    go_deq = op_valid && op_ready && op_type == CQ_DEQ && len != '0;
  end

  // queue table and buffer links (no reset)
  always_ff @(posedge clk) begin
    if (init_busy) begin
      if (init_cnt < IW'(N_BUFS)) buf_next[init_cnt[BFW-1:0]] <= init_cnt[BFW-1:0] + BFW'(1);
      if (init_cnt < IW'(N_CONN)) begin
        qlen[init_cnt[CW-1:0]] <= '0;
        qmax[init_cnt[CW-1:0]] <= QLEN_W'(DEFAULT_QMAX);
      end
    end else begin
      if (cfg_we) qmax[cfg_cid] <= cfg_qmax;
      if (go_enq) begin
        if (len == '0) qhead[op_cid] <= idle_head;
        else           buf_next[qtail[op_cid]] <= idle_head;
        qtail[op_cid] <= idle_head;
        qlen[op_cid]  <= len + 1'b1;
      end else if (go_deq) begin
        qhead[op_cid] <= buf_next[hb];
        qlen[op_cid]  <= len - 1'b1;
        if (idle_cnt != '0) buf_next[idle_tail] <= hb;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_busy      <= 1'b1;
      init_cnt       <= '0;
      idle_head      <= '0;
      idle_tail      <= BFW'(N_BUFS - 1);
      idle_cnt       <= (BFW+1)'(N_BUFS);
      done           <= 1'b0;
      done_ok        <= 1'b0;
      done_buf       <= '0;
      done_was_empty <= 1'b0;
      done_now_empty <= 1'b0;
    end else begin
      done <= op_valid && op_ready;
      if (init_busy) begin
        init_cnt <= init_cnt + 1'b1;
        if (init_cnt == IW'(INIT_N - 1)) init_busy <= 1'b0;
      end else if (op_valid) begin
        done_ok        <= go_enq || go_deq;
        done_was_empty <= (len == '0);
        done_now_empty <= (len <= QLEN_W'(1));
        if (op_type == CQ_ENQ) begin
          done_buf <= idle_head;
          if (go_enq) begin
            idle_head <= buf_next[idle_head];
            idle_cnt  <= idle_cnt - 1'b1;
          end
        end else begin
          done_buf <= hb;
          if (go_deq) begin
            if (idle_cnt == '0) idle_head <= hb;
            idle_tail <= hb;
            idle_cnt  <= idle_cnt + 1'b1;
          end
        end
      end
    end
  end
endmodule
