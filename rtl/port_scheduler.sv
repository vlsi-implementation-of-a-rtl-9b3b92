// port_scheduler: round robin choice among the WFQ modules (ports).
//
// Each port requests service when it has a non-empty queue and its traffic
// shaper allows a cell (req). The grant is combinational: the first
// requesting port at or after the round robin pointer (cyclic_find). When the
// grant is used (accept), the pointer moves to the port after the granted one,
// so every requesting port is served once per round.
module port_scheduler
  import wfq_pkg::*;
#(
  parameter int unsigned N_PORTS = N_PORTS_DEF,
  localparam int unsigned PW = $clog2(N_PORTS)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N_PORTS-1:0] req,
  input  logic               accept,
  output logic               grant_valid,
  output logic [PW-1:0]      grant_port
);
  logic [PW-1:0] ptr;

  cyclic_find #(.W(N_PORTS)) u_find (
    .flags (req),
    .start (ptr),
    .found (grant_valid),
    .idx   (grant_port)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     ptr <= '0;
    else if (accept && grant_valid) ptr <= grant_port + PW'(1);
  end
endmodule
