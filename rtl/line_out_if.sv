// line_out_if: outgoing line interface of the queuing unit.
//
// Sends a cell as CELL_BYTES bytes over an 8-bit parallel synchronous
// interface into an external FIFO: tx_wr writes tx_data into the FIFO, tx_soc
// marks the first byte of a cell. The FIFO's full flag (tx_fifo_full) holds
// the transfer: no byte is written in a clock where it is high. A cell is
// loaded whole (load_valid while load_ready) and leaves one byte per clock,
// byte 0 (load_cell[7:0]) first. load_ready is high again in the clock after
// the last byte is written. The full-flag handshake is this design's choice.
module line_out_if
  import wfq_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load_valid,
  input  logic [CELL_W-1:0] load_cell,
  output logic              load_ready,
  output logic [7:0]        tx_data,
  output logic              tx_wr,
  output logic              tx_soc,
  input  logic              tx_fifo_full
);
  localparam int unsigned NB = CELL_BYTES;

  logic [CELL_W-1:0] sh;
  logic [5:0]        left;    // bytes still to send

  assign load_ready = (left == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh      <= '0;
      left    <= '0;
      tx_data <= '0;
      tx_wr   <= 1'b0;
      tx_soc  <= 1'b0;
    end else begin
      tx_wr  <= 1'b0;
      tx_soc <= 1'b0;
      if (left == '0) begin
        if (load_valid) begin
          sh   <= load_cell;
          left <= 6'(NB);
        end
      end else if (!tx_fifo_full) begin
        tx_data <= sh[7:0];
        tx_wr   <= 1'b1;
        tx_soc  <= (left == 6'(NB));
        sh      <= sh >> 8;
        left    <= left - 1'b1;
      end
    end
  end
endmodule
