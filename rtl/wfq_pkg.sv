// wfq_pkg: sizes, field types and register map shared by the weighted fair
// queueing unit.
//
// The unit serves ATM cells (53 bytes) from per-connection queues in an
// approximate weighted-fair-queueing order. The sizes below are the main
// configuration: 2048 connections, 16 scheduled ports (WFQ modules),
// 128 buckets per port, a virtual time window of 8192 ticks, queue length
// fields of log2(32768) = 15 bits, a 21-bit by 48-bit external SRAM whose
// data word is Hamming coded. The split of the 48-bit word into 42 data and
// 6 check bits, the 5-byte packing of a cell into 11 SRAM words and the
// register map are choices of this design.
package wfq_pkg;

  // ---------------- main configuration -----------------------------------
  localparam int unsigned N_CONN_DEF    = 2048;  // connections
  localparam int unsigned N_PORTS_DEF   = 16;    // WFQ modules / ports
  localparam int unsigned N_BUCKETS_DEF = 128;   // buckets per port
  localparam int unsigned T_WINDOW_DEF  = 8192;  // virtual time window
  localparam int unsigned QLEN_W_DEF    = 15;    // log2(Qmax), Qmax = 32768

  // ---------------- ATM cell and external memory -------------------------
  localparam int unsigned CELL_BYTES     = 53;
  localparam int unsigned CELL_W         = CELL_BYTES * 8;
  localparam int unsigned SRAM_AW        = 21;   // address bus
  localparam int unsigned SRAM_DW        = 48;   // data bus (Hamming codeword)
  localparam int unsigned MEM_DW         = 42;   // payload bits of one word
  localparam int unsigned BYTES_PER_WORD = 5;    // cell bytes per SRAM word
  localparam int unsigned WORDS_PER_CELL = (CELL_BYTES + BYTES_PER_WORD - 1) / BYTES_PER_WORD; // 11
  // All cell buffers that fit the 2^21-word address space: 190650.
  localparam int unsigned N_BUFS_DEF     = (1 << SRAM_AW) / WORDS_PER_CELL;

  // ---------------- CPU register map (16-bit registers, word index) ------
  typedef enum logic [5:0] {
    R_ID         = 6'd0,   // RO  chip identifier
    R_CTRL       = 6'd1,   // RW  bit0: enable cell processing
    R_STATUS     = 6'd2,   // RO  bit0: tables initialised, bit1: SRAM access busy
    R_IRQ_STAT   = 6'd3,   // RW1C interrupt causes (see irq bits)
    R_IRQ_MASK   = 6'd4,   // RW  interrupt enables
    R_CONN_SEL   = 6'd5,   // RW  connection index for 6..9
    R_CONN_QMAX  = 6'd6,   // WO  max queue length of selected connection
    R_CONN_QLEN  = 6'd7,   // RO  queue length of selected connection
    R_CONN_SPACE = 6'd8,   // WO  spacing constant r_w of selected connection
    R_CONN_PORT  = 6'd9,   // WO  port (WFQ module) of selected connection
    R_LBL_SEL    = 6'd10,  // RW  label table index (low VCI bits)
    R_LBL_DATA   = 6'd11,  // WO  bit15 mapped, low bits connection id
    R_SHP_SEL    = 6'd12,  // RW  port index for 13
    R_SHP_IVAL   = 6'd13,  // WO  minimum clocks between cells of the port
    R_CNT_RX     = 6'd14,  // RO  cells queued
    R_CNT_TX     = 6'd15,  // RO  cells sent from queues
    R_CNT_DISC   = 6'd16,  // RO  cells discarded (queue full)
    R_CNT_MISM   = 6'd17,  // RO  mismatched cells discarded at line in
    R_CNT_CORR   = 6'd18,  // RO  corrected single bit SRAM errors
    R_CNT_UNCORR = 6'd19,  // RO  uncorrectable SRAM words
    R_CNT_BYP    = 6'd20,  // RO  unmapped cells passed through
    R_MEM_ALO    = 6'd21,  // RW  SRAM address [15:0]
    R_MEM_AHI    = 6'd22,  // RW  SRAM address [20:16]
    R_MEM_D0     = 6'd23,  // RW  SRAM data [15:0]
    R_MEM_D1     = 6'd24,  // RW  SRAM data [31:16]
    R_MEM_D2     = 6'd25,  // RW  SRAM data [41:32]
    R_MEM_CMD    = 6'd26   // WO  1: read, 2: write
  } reg_addr_e;

  localparam logic [15:0] CHIP_ID = 16'hA7F0;

  // interrupt cause bits of R_IRQ_STAT / R_IRQ_MASK
  localparam int unsigned IRQ_DISC   = 0;
  localparam int unsigned IRQ_MISM   = 1;
  localparam int unsigned IRQ_CORR   = 2;
  localparam int unsigned IRQ_UNCORR = 3;
  localparam int unsigned IRQ_OVRUN  = 4;
  localparam int unsigned IRQ_MEMDONE = 5;

  // configuration tables written through the CPU interface
  typedef enum logic [2:0] {
    CFG_QMAX  = 3'd0,
    CFG_SPACE = 3'd1,
    CFG_PORT  = 3'd2,
    CFG_LABEL = 3'd3,
    CFG_SHAPE = 3'd4
  } cfg_target_e;

  typedef struct packed {
    cfg_target_e  target;
    logic [15:0]  index;
    logic [15:0]  value;
  } cfg_wr_t;

  // operations of the bucket sorter and the cell queue controller
  typedef enum logic {BS_INSERT = 1'b0, BS_REMOVE = 1'b1} bs_op_e;
  typedef enum logic {CQ_ENQ = 1'b0, CQ_DEQ = 1'b1} cq_op_e;

endpackage
