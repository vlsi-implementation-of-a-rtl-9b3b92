// cyclic_find: finds the first set bit of a flag vector at or after a start
// position, wrapping around the end of the vector.
//
// The bucket sorter uses it to scan the one-bit "bucket non-empty" flags from
// the active bucket onward, so that the bucket memory itself need not be read
// during the search; the port scheduler uses it as the search of its round
// robin. The search is purely combinational: the vector is rotated so that
// the start position becomes bit 0, the lowest set bit is found, and the start
// is added back modulo W. W must be a power of two.
//
// Interface: flags[W-1:0], start -> found (any flag set), idx (position of the
// first set flag, cyclically from start; 0 when none is set).
module cyclic_find #(
  parameter int unsigned W = 128
) (
  input  logic [W-1:0]         flags,
  input  logic [$clog2(W)-1:0] start,
  output logic                 found,
  output logic [$clog2(W)-1:0] idx
);
  localparam int unsigned IW = $clog2(W);

  logic [2*W-1:0]  doubled;
  logic [W-1:0]    rotated;
  logic [IW-1:0]   offset;

  always_comb begin
    doubled = {flags, flags};
    rotated = doubled[(IW+1)'(start) +: W];
    offset  = '0;
    found   = 1'b0;
    for (int i = W - 1; i >= 0; i--) begin
      if (rotated[i]) begin
        offset = IW'(i);
        found  = 1'b1;
      end
    end
    idx = start + offset;
  end
endmodule
