// wfq_unit: weighted fair queueing input queuing unit for an ATM switch.
//
// Cells arrive on an 8-bit line (155 Mb/s class), are mapped by their label
// to one of N_CONN connections and queued per connection in cell buffers held
// in an external 2M x 48-bit SRAM. Each connection belongs to one of N_PORTS
// weighted-fair-queueing modules (one per switch output port). Inside a port
// the next cell is chosen by an approximate weighted fair queueing: the front
// cell of every non-empty queue carries a virtual timestamp
// (last transmitted timestamp + the connection's spacing constant, i.e.
// inversely proportional to its weight) and is kept in a bucket sort over a
// cyclic virtual time window. The ports are served round robin, each limited
// by a per-port rate shaper and by backpressure from the switch. Unmapped
// cells pass straight through. An MC68000-series processor configures the
// tables, reads counters and can access the SRAM; one interrupt line reports
// events. The SRAM word is protected by a single-error-correcting Hamming
// code.
//
// Blocks: line_in_if, line_out_if, sram_ctrl (+hamming48), bucket_sort,
// cell_queue, port_scheduler, traffic_shaper, cpu_if and global_ctrl, which
// sequences them. After reset the unit initialises its linked lists (about
// N_BUFS clocks; R_STATUS bit 0 then reads 1) and processes cells once
// R_CTRL bit 0 is set. The SRAM data bus is split into dq_o / dq_oe / dq_i.
module wfq_unit
  import wfq_pkg::*;
#(
  parameter int unsigned N_CONN    = N_CONN_DEF,
  parameter int unsigned N_PORTS   = N_PORTS_DEF,
  parameter int unsigned N_BUCKETS = N_BUCKETS_DEF,
  parameter int unsigned T_WINDOW  = T_WINDOW_DEF,
  parameter int unsigned N_BUFS    = N_BUFS_DEF,
  parameter int unsigned QLEN_W    = QLEN_W_DEF,
  localparam int unsigned CW  = $clog2(N_CONN),
  localparam int unsigned PW  = $clog2(N_PORTS),
  localparam int unsigned TW  = $clog2(T_WINDOW),
  localparam int unsigned BFW = $clog2(N_BUFS)
) (
  input  logic               clk,
  input  logic               rst_n,
  // incoming line
  input  logic [7:0]         rx_data,
  input  logic               rx_valid,
  input  logic               rx_soc,
  // outgoing line to an external FIFO
  output logic [7:0]         tx_data,
  output logic               tx_wr,
  output logic               tx_soc,
  input  logic               tx_fifo_full,
  // backpressure from the switch, one bit per port
  input  logic [N_PORTS-1:0] bp,
  // external SRAM
  output logic [SRAM_AW-1:0] sram_addr,
  output logic               sram_we_n,
  output logic               sram_oe_n,
  output logic [SRAM_DW-1:0] sram_dq_o,
  output logic               sram_dq_oe,
  input  logic [SRAM_DW-1:0] sram_dq_i,
  // processor bus
  input  logic               cpu_as_n,
  input  logic               cpu_rw,
  input  logic [5:0]         cpu_addr,
  input  logic [15:0]        cpu_din,
  output logic [15:0]        cpu_dout,
  output logic               cpu_dtack_n,
  output logic               cpu_irq_n
);
  // ---- interconnect ----------------------------------------------------------
  logic              enable, init_done;
  logic              cfg_wr;
  cfg_wr_t           cfg;
  logic [15:0]       conn_sel;
  logic [QLEN_W-1:0] conn_qlen;

  logic              cell_valid, cell_mapped, cell_ack;
  logic [CELL_W-1:0] cell_data;
  logic [CW-1:0]     cell_cid;
  logic              lo_ready, lo_load;
  logic [CELL_W-1:0] lo_cell;

  logic              bs_ready, bs_valid, bs_done, bs_empty;
  bs_op_e            bs_type;
  logic [PW-1:0]     bs_port;
  logic [CW-1:0]     bs_cid, bs_done_cid;
  logic [TW-1:0]     bs_spacing, bs_done_ts;
  logic [N_PORTS-1:0] port_nonempty, eligible;

  logic              cq_ready, cq_valid, cq_done, cq_ok, cq_was_empty, cq_now_empty;
  cq_op_e            cq_type;
  logic [CW-1:0]     cq_cid;
  logic [BFW-1:0]    cq_buf;

  logic              sch_valid, sch_accept, shp_sent;
  logic [PW-1:0]     sch_port, shp_port;

  logic               mem_valid, mem_we, mem_rsp, mem_corr, mem_uncorr;
  logic [SRAM_AW-1:0] mem_addr;
  logic [MEM_DW-1:0]  mem_wdata, mem_rdata;
  logic               cpu_mem_req, cpu_mem_we, cpu_mem_done;
  logic [SRAM_AW-1:0] cpu_mem_addr;
  logic [MEM_DW-1:0]  cpu_mem_wdata;

  logic ev_rx, ev_tx, ev_disc, ev_byp, ev_mism, ev_ovrun;

  logic cfg_qmax_we, cfg_space_we, cfg_port_we, cfg_label_we, cfg_shape_we;
  always_comb begin
    cfg_qmax_we  = cfg_wr && cfg.target == CFG_QMAX;
    cfg_space_we = cfg_wr && cfg.target == CFG_SPACE;
    cfg_port_we  = cfg_wr && cfg.target == CFG_PORT;
    cfg_label_we = cfg_wr && cfg.target == CFG_LABEL;
    cfg_shape_we = cfg_wr && cfg.target == CFG_SHAPE;
  end

  // ---- blocks ----------------------------------------------------------------
  line_in_if #(.N_CONN(N_CONN), .LW(CW)) u_line_in (
    .clk, .rst_n,
    .rx_data, .rx_valid, .rx_soc,
    .cell_valid, .cell_data, .cell_mapped, .cell_cid, .cell_ack,
    .ev_mismatch (ev_mism),
    .ev_overrun  (ev_ovrun),
    .lbl_we      (cfg_label_we),
    .lbl_idx     (cfg.index[CW-1:0]),
    .lbl_mapped  (cfg.value[15]),
    .lbl_cid     (cfg.value[CW-1:0])
  );

  line_out_if u_line_out (
    .clk, .rst_n,
    .load_valid (lo_load),
    .load_cell  (lo_cell),
    .load_ready (lo_ready),
    .tx_data, .tx_wr, .tx_soc, .tx_fifo_full
  );

  bucket_sort #(.N_CONN(N_CONN), .N_PORTS(N_PORTS), .N_BUCKETS(N_BUCKETS),
                .T_WINDOW(T_WINDOW)) u_bucket_sort (
    .clk, .rst_n,
    .op_valid   (bs_valid),
    .op_ready   (bs_ready),
    .op_type    (bs_type),
    .op_port    (bs_port),
    .op_cid     (bs_cid),
    .op_spacing (bs_spacing),
    .done       (bs_done),
    .done_empty (bs_empty),
    .done_cid   (bs_done_cid),
    .done_ts    (bs_done_ts),
    .port_nonempty
  );

  cell_queue #(.N_CONN(N_CONN), .N_BUFS(N_BUFS), .QLEN_W(QLEN_W)) u_cell_queue (
    .clk, .rst_n,
    .op_valid       (cq_valid),
    .op_ready       (cq_ready),
    .op_type        (cq_type),
    .op_cid         (cq_cid),
    .done           (cq_done),
    .done_ok        (cq_ok),
    .done_buf       (cq_buf),
    .done_was_empty (cq_was_empty),
    .done_now_empty (cq_now_empty),
    .cfg_we         (cfg_qmax_we),
    .cfg_cid        (cfg_qmax_we ? cfg.index[CW-1:0] : conn_sel[CW-1:0]),
    .cfg_qmax       (cfg.value[QLEN_W-1:0]),
    .cfg_qlen       (conn_qlen)
  );

  traffic_shaper #(.N_PORTS(N_PORTS)) u_shaper (
    .clk, .rst_n,
    .bp,
    .sent      (shp_sent),
    .sent_port (shp_port),
    .cfg_we    (cfg_shape_we),
    .cfg_port  (cfg.index[PW-1:0]),
    .cfg_ival  (cfg.value),
    .eligible
  );

  port_scheduler #(.N_PORTS(N_PORTS)) u_sched (
    .clk, .rst_n,
    .req         (port_nonempty & eligible),
    .accept      (sch_accept),
    .grant_valid (sch_valid),
    .grant_port  (sch_port)
  );

  sram_ctrl u_sram (
    .clk, .rst_n,
    .req_valid (mem_valid),
    .req_we    (mem_we),
    .req_addr  (mem_addr),
    .req_wdata (mem_wdata),
    .rsp_valid (mem_rsp),
    .rsp_data  (mem_rdata),
    .rsp_corrected     (mem_corr),
    .rsp_uncorrectable (mem_uncorr),
    .sram_addr, .sram_we_n, .sram_oe_n, .sram_dq_o, .sram_dq_oe, .sram_dq_i
  );

  cpu_if u_cpu (
    .clk, .rst_n,
    .cpu_as_n, .cpu_rw, .cpu_addr, .cpu_din, .cpu_dout, .cpu_dtack_n, .cpu_irq_n,
    .ctrl_enable (enable),
    .cfg_wr, .cfg, .conn_sel,
    .conn_qlen   (16'(conn_qlen)),
    .init_done,
    .ev_rx, .ev_tx, .ev_disc,
    .ev_mism, .ev_corr (mem_corr), .ev_uncorr (mem_uncorr), .ev_byp, .ev_ovrun,
    .mem_req   (cpu_mem_req),
    .mem_we    (cpu_mem_we),
    .mem_addr  (cpu_mem_addr),
    .mem_wdata (cpu_mem_wdata),
    .mem_done  (cpu_mem_done),
    .mem_rdata (mem_rdata)
  );

  global_ctrl #(.N_CONN(N_CONN), .N_PORTS(N_PORTS), .T_WINDOW(T_WINDOW),
                .N_BUFS(N_BUFS)) u_ctrl (
    .clk, .rst_n, .enable, .init_done,
    .cfg_space_we, .cfg_port_we,
    .cfg_cid   (cfg.index[CW-1:0]),
    .cfg_value (cfg.value),
    .cell_valid, .cell_data, .cell_mapped, .cell_cid, .cell_ack,
    .lo_ready, .lo_load, .lo_cell,
    .bs_ready, .bs_valid, .bs_type, .bs_port, .bs_cid, .bs_spacing,
    .bs_done, .bs_empty, .bs_done_cid,
    .cq_ready, .cq_valid, .cq_type, .cq_cid, .cq_done, .cq_ok, .cq_buf,
    .cq_was_empty, .cq_now_empty,
    .sch_valid, .sch_port, .sch_accept, .shp_sent, .shp_port,
    .mem_valid, .mem_we, .mem_addr, .mem_wdata, .mem_rsp, .mem_rdata,
    .cpu_req   (cpu_mem_req),
    .cpu_we    (cpu_mem_we),
    .cpu_addr  (cpu_mem_addr),
    .cpu_wdata (cpu_mem_wdata),
    .cpu_done  (cpu_mem_done),
    .ev_rx, .ev_tx, .ev_disc, .ev_byp
  );
endmodule
