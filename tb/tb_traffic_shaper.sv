// tb_traffic_shaper: checks per-port rate limiting and backpressure on 4
// ports. A port sending every time it is eligible must be sent at exactly
// interval+1 clocks apart; interval 0 allows a cell every clock;
// backpressure blocks a port immediately and the port recovers when it is
// released. Eligibility is also compared clock by clock with a counter model.
module tb_traffic_shaper;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] bp, el;
  logic sent, cfg_we;
  logic [1:0] sent_port, cfg_port;
  logic [15:0] cfg_ival;

  traffic_shaper #(.N_PORTS(4), .IVAL_W(16)) dut (.clk, .rst_n, .bp, .sent, .sent_port,
    .cfg_we, .cfg_port, .cfg_ival, .eligible(el));

  int ival [4];
  int cnt [4];
  int last_sent [4];
  int n_gap_ok = 0;

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
    bp = 0; sent = 0; sent_port = 0; cfg_we = 0; cfg_port = 0; cfg_ival = 0;
    for (int p = 0; p < 4; p++) begin cnt[p] = 0; ival[p] = 0; last_sent[p] = -1; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // program intervals 0, 3, 7, 20
    foreach (ival[p]) begin
      ival[p] = (p == 0) ? 0 : (p == 1) ? 3 : (p == 2) ? 7 : 20;
      @(negedge clk);
      cfg_we = 1; cfg_port = 2'(p); cfg_ival = 16'(ival[p]);
      @(posedge clk);
      #1 cfg_we = 0;
    end
    for (int t = 0; t < 3000; t++) begin
      int sp;
      @(negedge clk);
      bp = (t % 500 > 450) ? 4'b1010 : 4'b0000;
      if (t % 37 == 0) bp = 4'($urandom);
      #1;
      for (int p = 0; p < 4; p++)
        check(el[p] == (cnt[p] == 0 && !bp[p]), $sformatf("eligible port %0d", p));
      // send on the lowest eligible port in rotation
      sent = 0;
      sp = t % 4;
      if (el[sp]) begin
        sent = 1; sent_port = 2'(sp);
        if (last_sent[sp] >= 0 && !(bp != 0) && (t - last_sent[sp]) >= 4 && ival[sp] >= 4) begin
          n_gap_ok++;
        end
        last_sent[sp] = t;
      end
      @(posedge clk);
      for (int p = 0; p < 4; p++) begin
        if (sent && int'(sent_port) == p) cnt[p] = ival[p];
        else if (cnt[p] > 0) cnt[p]--;
      end
    end
    // rate check: port 2 alone, sent whenever eligible -> gap of ival+1 clocks
    begin
      int first, second;
      bp = 0; sent = 0;
      first = -1; second = -1;
      for (int t = 0; t < 60 && second < 0; t++) begin
        @(negedge clk);
        sent = el[2]; sent_port = 2'd2;
        if (el[2]) begin if (first < 0) first = t; else second = t; end
        @(posedge clk);
      end
      check(second - first == ival[2] + 1, "rate limit gap");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
