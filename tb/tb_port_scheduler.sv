// tb_port_scheduler: checks the round robin over 16 ports against a model
// pointer: the grant must be the first requesting port at or after the
// pointer, and the pointer moves past a granted port only when the grant is
// accepted. A fully loaded phase checks that 16 consecutive grants serve
// every port exactly once.
module tb_port_scheduler;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] req;
  logic accept, gv;
  logic [3:0] gp;

  port_scheduler #(.N_PORTS(16)) dut (.clk, .rst_n, .req, .accept, .grant_valid(gv), .grant_port(gp));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    int ptr;
    int seen [16];
    ptr = 0; req = 0; accept = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int want;
      @(negedge clk);
      req    = 16'($urandom) & 16'($urandom);
      accept = ($urandom % 4) != 0;
      #1;
      want = -1;
      for (int k = 0; k < 16; k++) if (req[(ptr + k) % 16]) begin want = (ptr + k) % 16; break; end
      check(gv == (want >= 0) && (want < 0 || int'(gp) == want), "grant");
      @(posedge clk);
      if (accept && want >= 0) ptr = (want + 1) % 16;
    end
    // all ports requesting: one full round serves each port once
    @(negedge clk);
    req = '1; accept = 1;
    for (int k = 0; k < 16; k++) seen[k] = 0;
    for (int k = 0; k < 16; k++) begin
      @(negedge clk);
      seen[gp]++;
      @(posedge clk);
    end
    for (int k = 0; k < 16; k++) check(seen[k] == 1, "one grant per port per round");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
