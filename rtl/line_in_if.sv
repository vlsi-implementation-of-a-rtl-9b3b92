// line_in_if: incoming line interface of the queuing unit.
//
// Receives ATM cells over an 8-bit parallel synchronous interface: one byte
// per clock in which rx_valid is high, with rx_soc marking the first byte of
// a cell. The interface keeps cell synchronisation with a byte counter: a
// cell is taken only if exactly CELL_BYTES bytes follow its start marker.
// A cell cut short by a new start marker, and bytes that arrive outside a
// cell, are discarded as mismatched (one ev_mismatch pulse per event).
//
// A complete cell is copied into an output register (so the next cell can be
// assembled meanwhile) and its label is decoded: the low LW bits of the VCI
// (UNI header: VCI = byte1[3:0], byte2, byte3[7:4]) index a label table set
// by the CPU that gives "mapped" and the connection id. Unmapped cells are
// later passed straight to the output. The cell waits in cell_valid until the
// controller pulses cell_ack; a cell completed while the previous one still
// waits is dropped with an ev_overrun pulse. Byte i of the cell is
// cell_data[8*i +: 8]. Framing by start marker and the table lookup on the
// VCI are this design's choices.
module line_in_if
  import wfq_pkg::*;
#(
  parameter int unsigned N_CONN = N_CONN_DEF,
  parameter int unsigned LW     = $clog2(N_CONN_DEF),  // label table index bits
  localparam int unsigned CW = $clog2(N_CONN)
) (
  input  logic              clk,
  input  logic              rst_n,
  // line
  input  logic [7:0]        rx_data,
  input  logic              rx_valid,
  input  logic              rx_soc,
  // cell to the controller
  output logic              cell_valid,
  output logic [CELL_W-1:0] cell_data,
  output logic              cell_mapped,
  output logic [CW-1:0]     cell_cid,
  input  logic              cell_ack,
  // events
  output logic              ev_mismatch,
  output logic              ev_overrun,
  // label table write port
  input  logic              lbl_we,
  input  logic [LW-1:0]     lbl_idx,
  input  logic              lbl_mapped,
  input  logic [CW-1:0]     lbl_cid
);
  localparam int unsigned NB = CELL_BYTES;

  logic [CELL_W-1:0] asm_q;
  logic [5:0]        cnt;       // bytes of the current cell received
  logic              in_cell;
  logic              stray;     // already reported the current stray bytes

  logic [2**LW-1:0]  lbl_map;
  logic [CW-1:0]     lbl_tab [2**LW];

  // label of the cell being completed (bytes 1..3 are in asm_q by then)
  logic [15:0] vci;
  logic [LW-1:0] vidx;
  logic        complete;
  logic        out_free;

  always_comb begin
    vci      = {asm_q[8*1 +: 4], asm_q[8*2 +: 8], asm_q[8*3 + 4 +: 4]};
    vidx     = vci[LW-1:0];
    complete = rx_valid && !rx_soc && in_cell && cnt == 6'(NB - 1);
    out_free = !cell_valid || cell_ack;
  end

  always_ff @(posedge clk) begin
    if (lbl_we) lbl_tab[lbl_idx] <= lbl_cid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      asm_q       <= '0;
      cnt         <= '0;
      in_cell     <= 1'b0;
      stray       <= 1'b0;
      lbl_map     <= '0;
      cell_valid  <= 1'b0;
      cell_data   <= '0;
      cell_mapped <= 1'b0;
      cell_cid    <= '0;
      ev_mismatch <= 1'b0;
      ev_overrun  <= 1'b0;
    end else begin
      ev_mismatch <= 1'b0;
      ev_overrun  <= 1'b0;
      if (lbl_we) lbl_map[lbl_idx] <= lbl_mapped;
      if (cell_ack) cell_valid <= 1'b0;
      if (rx_valid) begin
        if (rx_soc) begin
          if (in_cell) ev_mismatch <= 1'b1;   // previous cell cut short
          asm_q[7:0] <= rx_data;
          cnt        <= 6'd1;
          in_cell    <= 1'b1;
          stray      <= 1'b0;
        end else if (in_cell) begin
          asm_q[8*cnt +: 8] <= rx_data;
          cnt <= cnt + 1'b1;
          if (complete) begin
            in_cell <= 1'b0;
            if (out_free) begin
              cell_valid  <= 1'b1;
              cell_data   <= asm_q;
              cell_data[8*(NB-1) +: 8] <= rx_data;
              cell_mapped <= lbl_map[vidx];
              cell_cid    <= lbl_tab[vidx];
            end else begin
              ev_overrun <= 1'b1;
            end
          end
        end else if (!stray) begin
          ev_mismatch <= 1'b1;                // byte outside any cell
          stray       <= 1'b1;
        end
      end
    end
  end
endmodule
