// traffic_shaper: per-port maximum rate control with switch backpressure.
//
// Each port has a programmable minimum distance, in clock cycles, between the
// starts of two of its cells (interval, set by the CPU; 0 means no limit) and a
// down counter. When a cell of the port is sent the counter is loaded with the
// interval; it then counts down once per clock. A port is eligible when its
// counter is zero and the switch does not assert backpressure for it (bp).
// Backpressure therefore stops a port at once, and the interval caps its rate
// at f_clk / interval; the CPU can change the interval at any time.
module traffic_shaper
  import wfq_pkg::*;
#(
  parameter int unsigned N_PORTS = N_PORTS_DEF,
  parameter int unsigned IVAL_W  = 16,
  localparam int unsigned PW = $clog2(N_PORTS)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N_PORTS-1:0] bp,
  input  logic               sent,
  input  logic [PW-1:0]      sent_port,
  input  logic               cfg_we,
  input  logic [PW-1:0]      cfg_port,
  input  logic [IVAL_W-1:0]  cfg_ival,
  output logic [N_PORTS-1:0] eligible
);
  logic [IVAL_W-1:0] ival [N_PORTS];
  logic [IVAL_W-1:0] cnt  [N_PORTS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < N_PORTS; p++) begin
        ival[p] <= '0;
        cnt[p]  <= '0;
      end
    end else begin
      for (int p = 0; p < N_PORTS; p++) begin
        if (cfg_we && cfg_port == PW'(p)) ival[p] <= cfg_ival;
        if (sent && sent_port == PW'(p)) cnt[p] <= ival[p];
        else if (cnt[p] != '0)           cnt[p] <= cnt[p] - 1'b1;
      end
    end
  end

  always_comb begin
    for (int p = 0; p < N_PORTS; p++) eligible[p] = (cnt[p] == '0) && !bp[p];
  end
endmodule
