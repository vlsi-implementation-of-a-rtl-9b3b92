// global_ctrl: central state machine of the weighted fair queueing unit.
//
// It sequences the other units, one cell operation at a time:
//
//  * Arrival of a mapped cell: ENQ to the cell queue controller (the cell is
//    discarded if the queue is full); the 53 bytes are written to the cell
//    buffer in external SRAM as 11 words of 5 bytes at address
//    buffer * 11 + word; if the queue was empty, the cell is now at the front
//    of its queue and is stamped and inserted into the bucket sorter of the
//    connection's port (timestamp = port's last timestamp + the connection's
//    spacing constant).
//  * Arrival of an unmapped cell: passed straight to the line output.
//  * Transmission, when the line output is free and the round robin port
//    scheduler grants a port that has entries and is allowed by its shaper:
//    REMOVE from that port's buckets gives the connection; DEQ gives its
//    oldest buffer; if cells remain, the new front cell is stamped and
//    re-inserted; the 11 words are read back (corrected by the Hamming
//    decoder) and the cell goes to the line output.
//  * A processor access to one SRAM word, when no cell work is waiting.
// Arrivals are served before transmissions. An arrival takes 15 clocks and a
// transmission 19, so both fit in the 53 byte clocks of one cell at line rate.
// The unit also holds the per-connection spacing constant and port tables
// (cfg_* writes), initialised to DEFAULT_SPACING and port 0.
// The ordering of the steps is this design's reading of the method; the unit
// only states that a central state machine controls the others.
module global_ctrl
  import wfq_pkg::*;
#(
  parameter int unsigned N_CONN    = N_CONN_DEF,
  parameter int unsigned N_PORTS   = N_PORTS_DEF,
  parameter int unsigned T_WINDOW  = T_WINDOW_DEF,
  parameter int unsigned N_BUFS    = N_BUFS_DEF,
  parameter int unsigned DEFAULT_SPACING = 64,
  localparam int unsigned CW  = $clog2(N_CONN),
  localparam int unsigned PW  = $clog2(N_PORTS),
  localparam int unsigned TW  = $clog2(T_WINDOW),
  localparam int unsigned BFW = $clog2(N_BUFS)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               enable,
  output logic               init_done,
  // configuration tables
  input  logic               cfg_space_we,
  input  logic               cfg_port_we,
  input  logic [CW-1:0]      cfg_cid,
  input  logic [15:0]        cfg_value,
  // line in
  input  logic               cell_valid,
  input  logic [CELL_W-1:0]  cell_data,
  input  logic               cell_mapped,
  input  logic [CW-1:0]      cell_cid,
  output logic               cell_ack,
  // line out
  input  logic               lo_ready,
  output logic               lo_load,
  output logic [CELL_W-1:0]  lo_cell,
  // bucket sort
  input  logic               bs_ready,
  output logic               bs_valid,
  output bs_op_e             bs_type,
  output logic [PW-1:0]      bs_port,
  output logic [CW-1:0]      bs_cid,
  output logic [TW-1:0]      bs_spacing,
  input  logic               bs_done,
  input  logic               bs_empty,
  input  logic [CW-1:0]      bs_done_cid,
  // cell queue
  input  logic               cq_ready,
  output logic               cq_valid,
  output cq_op_e             cq_type,
  output logic [CW-1:0]      cq_cid,
  input  logic               cq_done,
  input  logic               cq_ok,
  input  logic [BFW-1:0]     cq_buf,
  input  logic               cq_was_empty,
  input  logic               cq_now_empty,
  // port scheduler and shaper
  input  logic               sch_valid,
  input  logic [PW-1:0]      sch_port,
  output logic               sch_accept,
  output logic               shp_sent,
  output logic [PW-1:0]      shp_port,
  // external memory
  output logic               mem_valid,
  output logic               mem_we,
  output logic [SRAM_AW-1:0] mem_addr,
  output logic [MEM_DW-1:0]  mem_wdata,
  input  logic               mem_rsp,
  input  logic [MEM_DW-1:0]  mem_rdata,
  // processor SRAM access
  input  logic               cpu_req,
  input  logic               cpu_we,
  input  logic [SRAM_AW-1:0] cpu_addr,
  input  logic [MEM_DW-1:0]  cpu_wdata,
  output logic               cpu_done,
  // events
  output logic               ev_rx,
  output logic               ev_tx,
  output logic               ev_disc,
  output logic               ev_byp
);
  localparam int unsigned WPC = WORDS_PER_CELL;
  localparam int unsigned WDB = BYTES_PER_WORD * 8;

  typedef enum logic [3:0] {
    S_INIT, S_IDLE, S_ENQ, S_WR, S_INS, S_REM, S_DEQ, S_RD, S_SEND, S_CPU
  } state_e;

  state_e            st;
  logic [CW-1:0]     init_cnt;
  logic              tab_init;
  logic [TW-1:0]     spacing_tab [N_CONN];
  logic [PW-1:0]     port_tab    [N_CONN];
  logic [CW-1:0]     cur_cid;
  logic [PW-1:0]     cur_port;
  logic [BFW-1:0]    cur_buf;
  logic              cur_was_empty;
  logic [3:0]        wcnt;      // words issued
  logic [3:0]        rcnt;      // words received
  logic [WPC*WDB-1:0] rd_cell;

  logic [WPC*WDB-1:0] in_padded;
  assign in_padded = (WPC*WDB)'(cell_data);

  assign init_done = (st != S_INIT);

  // configuration tables
  always_ff @(posedge clk) begin
    if (tab_init) begin
      spacing_tab[init_cnt] <= TW'(DEFAULT_SPACING);
      port_tab[init_cnt]    <= '0;
    end else begin
      if (cfg_space_we) spacing_tab[cfg_cid] <= cfg_value[TW-1:0];
      if (cfg_port_we)  port_tab[cfg_cid]    <= cfg_value[PW-1:0];
    end
  end

  // requests are combinational from the state
  logic idle_in, idle_out, idle_cpu;
  always_comb begin
    idle_in  = st == S_IDLE && enable && cell_valid;
    idle_out = st == S_IDLE && enable && !cell_valid && lo_ready && sch_valid && bs_ready;
    idle_cpu = st == S_IDLE && !(enable && cell_valid) && !idle_out && cpu_req;

    cell_ack   = 1'b0;
    lo_load    = 1'b0;
    lo_cell    = rd_cell[CELL_W-1:0];
    bs_valid   = 1'b0;
    bs_type    = BS_INSERT;
    bs_port    = cur_port;
    bs_cid     = cur_cid;
    bs_spacing = spacing_tab[cur_cid];
    cq_valid   = 1'b0;
    cq_type    = CQ_ENQ;
    cq_cid     = cell_cid;
    sch_accept = 1'b0;
    shp_sent   = 1'b0;
    shp_port   = cur_port;
    mem_valid  = 1'b0;
    mem_we     = 1'b0;
    mem_addr   = SRAM_AW'(cur_buf) * SRAM_AW'(WPC) + SRAM_AW'(wcnt);
    mem_wdata  = MEM_DW'(in_padded[WDB*wcnt +: WDB]);
    ev_rx      = 1'b0;
    ev_tx      = 1'b0;
    ev_byp     = 1'b0;

    unique case (st)
      S_IDLE: begin
        if (idle_in && !cell_mapped) begin
          if (lo_ready) begin           // pass-through of an unmapped cell
            lo_load  = 1'b1;
            lo_cell  = cell_data;
            cell_ack = 1'b1;
            ev_byp   = 1'b1;
          end
        end else if (idle_in && cq_ready) begin
          cq_valid = 1'b1;
          cq_type  = CQ_ENQ;
          cq_cid   = cell_cid;
        end else if (idle_out) begin
          bs_valid   = 1'b1;
          bs_type    = BS_REMOVE;
          bs_port    = sch_port;
          sch_accept = 1'b1;
        end else if (idle_cpu) begin
          mem_valid = 1'b1;
          mem_we    = cpu_we;
          mem_addr  = cpu_addr;
          mem_wdata = cpu_wdata;
        end
      end
      S_WR: begin
        mem_valid = 1'b1;
        mem_we    = 1'b1;
      end
      S_INS: begin
        bs_valid = cur_was_empty;       // front of its queue: stamp it
        bs_type  = BS_INSERT;
        cell_ack = 1'b1;
        ev_rx    = 1'b1;
      end
      S_ENQ: begin
        if (cq_done && !cq_ok) cell_ack = 1'b1;   // queue full: discard
      end
      S_REM: begin
        if (bs_done && !bs_empty) begin
          cq_valid = 1'b1;
          cq_type  = CQ_DEQ;
          cq_cid   = bs_done_cid;
        end
      end
      S_DEQ: begin
        if (cq_done && cq_ok && !cq_now_empty) begin
          bs_valid = 1'b1;              // stamp the new front cell
          bs_type  = BS_INSERT;
        end
      end
      S_RD: begin
        mem_valid = wcnt < 4'(WPC);
        mem_we    = 1'b0;
      end
      S_SEND: begin
        lo_load  = 1'b1;
        shp_sent = 1'b1;
        ev_tx    = 1'b1;
      end
      default: ;
    endcase
  end

  assign cpu_done = (st == S_CPU) && (cpu_we || mem_rsp);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st            <= S_INIT;
      tab_init      <= 1'b1;
      init_cnt      <= '0;
      cur_cid       <= '0;
      cur_port      <= '0;
      cur_buf       <= '0;
      cur_was_empty <= 1'b0;
      wcnt          <= '0;
      rcnt          <= '0;
      rd_cell       <= '0;
      ev_disc       <= 1'b0;
    end else begin
      ev_disc <= 1'b0;
      if (tab_init) begin
        init_cnt <= init_cnt + 1'b1;
        if (init_cnt == CW'(N_CONN - 1)) tab_init <= 1'b0;
      end
      unique case (st)
        S_INIT: if (!tab_init && bs_ready && cq_ready) st <= S_IDLE;
        S_IDLE: begin
          wcnt <= '0;
          rcnt <= '0;
          if (idle_in && cell_mapped && cq_ready) begin
            cur_cid  <= cell_cid;
            cur_port <= port_tab[cell_cid];
            st       <= S_ENQ;
          end else if (idle_in && !cell_mapped) begin
            st <= S_IDLE;
          end else if (idle_out) begin
            cur_port <= sch_port;
            st       <= S_REM;
          end else if (idle_cpu) begin
            st <= S_CPU;
          end
        end
        S_ENQ: if (cq_done) begin
          if (cq_ok) begin
            cur_buf       <= cq_buf;
            cur_was_empty <= cq_was_empty;
            st            <= S_WR;
          end else begin
            ev_disc <= 1'b1;
            st      <= S_IDLE;
          end
        end
        S_WR: begin
          wcnt <= wcnt + 1'b1;
          if (wcnt == 4'(WPC - 1)) st <= S_INS;
        end
        S_INS: st <= S_IDLE;
        S_REM: if (bs_done) begin
          if (bs_empty) st <= S_IDLE;
          else begin
            cur_cid <= bs_done_cid;
            st      <= S_DEQ;
          end
        end
        S_DEQ: if (cq_done) begin
          cur_buf <= cq_buf;
          st      <= cq_ok ? S_RD : S_IDLE;
        end
        S_RD: begin
          if (wcnt < 4'(WPC)) wcnt <= wcnt + 1'b1;
          if (mem_rsp) begin
            rd_cell[WDB*rcnt +: WDB] <= mem_rdata[WDB-1:0];
            rcnt <= rcnt + 1'b1;
            if (rcnt == 4'(WPC - 1)) st <= S_SEND;
          end
        end
        S_SEND: st <= S_IDLE;
        S_CPU:  if (cpu_done) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
