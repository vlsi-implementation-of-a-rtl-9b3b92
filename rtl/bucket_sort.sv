// bucket_sort: approximate timestamp sorter of the weighted fair queueing
// unit (a bucket sort over a cyclic virtual time window).
//
// Every port (WFQ module) owns N_BUCKETS buckets that divide the virtual time
// window T_WINDOW into equal intervals of T_WINDOW/N_BUCKETS ticks. A bucket
// is a FIFO linked list of bucket entries; an entry holds a connection id,
// the timestamp offset inside the bucket interval and a pointer to the next
// entry. There are N_CONN entries in all (one per connection, since only the
// cell at the front of a queue carries a timestamp); unused entries form the
// idle entry list kept by idle_head / idle_tail. A one-bit flag per bucket
// says whether it is non-empty; the search for the next non-empty bucket
// scans only these flags (cyclic_find), starting at the port's active
// bucket. In this design the flag is also what marks a bucket as empty, so
// its head/tail pointers need no nil value.
//
// Operations (one per clock once initialised, result one clock later):
//   BS_INSERT port,cid,spacing : timestamp = last_ts[port] + spacing (mod
//       T_WINDOW); the entry goes to the tail of bucket timestamp/interval
//       with offset timestamp mod interval. The bucket index is a shift, as
//       both T_WINDOW and N_BUCKETS are powers of two.
//   BS_REMOVE port : takes the head entry of the active bucket or of the first
//       following non-empty bucket, returns its connection id and full
//       timestamp (bucket base + offset), makes that bucket the active one and
//       that timestamp the port's last timestamp. done_empty is set when the
//       port has no entries.
// The entry list is built by an initialisation sequence of N_CONN clocks
// after reset; op_ready is low until it ends. Entries in one bucket leave in
// insertion order, so timestamps inside one bucket interval are not sorted:
// this is the approximation of the method.
module bucket_sort
  import wfq_pkg::*;
#(
  parameter int unsigned N_CONN    = N_CONN_DEF,
  parameter int unsigned N_PORTS   = N_PORTS_DEF,
  parameter int unsigned N_BUCKETS = N_BUCKETS_DEF,
  parameter int unsigned T_WINDOW  = T_WINDOW_DEF,
  localparam int unsigned CW = $clog2(N_CONN),
  localparam int unsigned PW = $clog2(N_PORTS),
  localparam int unsigned BW = $clog2(N_BUCKETS),
  localparam int unsigned TW = $clog2(T_WINDOW),
  localparam int unsigned OW = TW - BW
) (
  input  logic               clk,
  input  logic               rst_n,
  // operation request
  input  logic               op_valid,
  output logic               op_ready,
  input  bs_op_e             op_type,
  input  logic [PW-1:0]      op_port,
  input  logic [CW-1:0]      op_cid,
  input  logic [TW-1:0]      op_spacing,
  // result, one clock after the request
  output logic               done,
  output logic               done_empty,   // remove found no entry / insert found no idle entry
  output logic [CW-1:0]      done_cid,
  output logic [TW-1:0]      done_ts,
  // status
  output logic [N_PORTS-1:0] port_nonempty
);
  // bucket memory: head and tail pointer per (port, bucket)
  logic [CW-1:0] bkt_head [N_PORTS*N_BUCKETS];
  logic [CW-1:0] bkt_tail [N_PORTS*N_BUCKETS];
  // bucket entries
  logic [CW-1:0] ent_cid  [N_CONN];
  logic [OW-1:0] ent_off  [N_CONN];
  logic [CW-1:0] ent_next [N_CONN];
  // bucket flags, active bucket and last timestamp per port
  logic [N_PORTS-1:0][N_BUCKETS-1:0] flags;
  logic [BW-1:0] active  [N_PORTS];
  logic [TW-1:0] last_ts [N_PORTS];
  // idle entry list
  logic [CW-1:0] idle_head, idle_tail;
  logic [CW:0]   idle_cnt;
  // initialisation
  logic          init_busy;
  logic [CW-1:0] init_cnt;

  assign op_ready = !init_busy;

  always_comb begin
    for (int p = 0; p < N_PORTS; p++) port_nonempty[p] = |flags[p];
  end

  // ---- request decode ----------------------------------------------------
  logic            go_ins, go_rem;
  logic [TW-1:0]   ins_ts;
  logic [BW-1:0]   ins_b;
  logic [PW+BW-1:0] ins_idx;
  logic            ins_hit;        // target bucket already non-empty
  logic            ins_ok;
  logic            rem_found;
  logic [BW-1:0]   rem_b;
  logic [PW+BW-1:0] rem_idx;
  logic [CW-1:0]   rem_e;
  logic            rem_last;       // entry is the only one in its bucket

  cyclic_find #(.W(N_BUCKETS)) u_search (
    .flags (flags[op_port]),
    .start (active[op_port]),
    .found (rem_found),
    .idx   (rem_b)
  );

  always_comb begin
    ins_ts   = last_ts[op_port] + op_spacing;
    ins_b    = ins_ts[TW-1:OW];
    ins_idx  = {op_port, ins_b};
    ins_hit  = flags[op_port][ins_b];
    ins_ok   = idle_cnt != '0;
    rem_idx  = {op_port, rem_b};
    rem_e    = bkt_head[rem_idx];
    rem_last = (rem_e == bkt_tail[rem_idx]);
    go_ins   = op_valid && op_ready && op_type == BS_INSERT && ins_ok;
    go_rem   = op_valid && op_ready && op_type == BS_REMOVE && rem_found;
  end

  // ---- memories (no reset) -------------------------------------------------
  always_ff @(posedge clk) begin
    if (init_busy) begin
      ent_next[init_cnt] <= init_cnt + CW'(1);
    end else if (go_ins) begin
      ent_cid[idle_head] <= op_cid;
      ent_off[idle_head] <= ins_ts[OW-1:0];
      if (ins_hit) ent_next[bkt_tail[ins_idx]] <= idle_head;
      if (!ins_hit) bkt_head[ins_idx] <= idle_head;
      bkt_tail[ins_idx] <= idle_head;
    end else if (go_rem) begin
      if (!rem_last) bkt_head[rem_idx] <= ent_next[rem_e];
      if (idle_cnt != '0) ent_next[idle_tail] <= rem_e;
    end
  end

  // ---- control registers ---------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_busy  <= 1'b1;
      init_cnt   <= '0;
      idle_head  <= '0;
      idle_tail  <= CW'(N_CONN - 1);
      idle_cnt   <= (CW+1)'(N_CONN);
      flags      <= '0;
      for (int p = 0; p < N_PORTS; p++) begin
        active[p]  <= '0;
        last_ts[p] <= '0;
      end
      done       <= 1'b0;
      done_empty <= 1'b0;
      done_cid   <= '0;
      done_ts    <= '0;
    end else begin
      done       <= op_valid && op_ready;
      done_empty <= 1'b0;
      if (init_busy) begin
        init_cnt <= init_cnt + CW'(1);
        if (init_cnt == CW'(N_CONN - 1)) init_busy <= 1'b0;
      end else if (op_valid && op_type == BS_INSERT) begin
        done_cid <= op_cid;
        done_ts  <= ins_ts;
        if (go_ins) begin
          idle_head <= ent_next[idle_head];
          idle_cnt  <= idle_cnt - 1'b1;
          flags[op_port][ins_b] <= 1'b1;
        end else begin
          done_empty <= 1'b1;
        end
      end else if (op_valid && op_type == BS_REMOVE) begin
        if (go_rem) begin
          done_cid <= ent_cid[rem_e];
          done_ts  <= {rem_b, ent_off[rem_e]};
          active[op_port]  <= rem_b;
          last_ts[op_port] <= {rem_b, ent_off[rem_e]};
          if (rem_last) flags[op_port][rem_b] <= 1'b0;
          if (idle_cnt == '0) idle_head <= rem_e;
          idle_tail <= rem_e;
          idle_cnt  <= idle_cnt + 1'b1;
        end else begin
          done_empty <= 1'b1;
        end
      end
    end
  end
endmodule
