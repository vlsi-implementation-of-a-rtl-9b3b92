// sram_model: behavioural model of the external SRAM (testbench only).
//
// 2^AW words of DW bits. Reads are asynchronous: dq_out shows the addressed
// word while oe_n is low. A write stores dq_in at the rising clock edge that
// ends a clock with we_n low. The model's contents start cleared; testbenches
// may flip stored bits through flip_bit() to inject errors.
module sram_model #(
  parameter int unsigned AW = 21,
  parameter int unsigned DW = 48
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we_n,
  input  logic          oe_n,
  input  logic [DW-1:0] dq_in,
  output logic [DW-1:0] dq_out
);
  logic [DW-1:0] mem [2**AW];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (!we_n) mem[addr] <= dq_in;
  end

  assign dq_out = oe_n ? '0 : mem[addr];

  function automatic void flip_bit(int unsigned a, int unsigned b);
    mem[a][b] = ~mem[a][b];
  endfunction

  function automatic logic [DW-1:0] peek(int unsigned a);
    return mem[a];
  endfunction
endmodule
