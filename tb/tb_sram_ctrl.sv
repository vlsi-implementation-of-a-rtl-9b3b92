// tb_sram_ctrl: runs the SRAM controller against the behavioural SRAM. Random
// words are written and read back in back-to-back bursts; read data must
// return exactly two clocks after the request. The stored words must be
// Hamming codewords (zero syndrome); a single flipped bit in the SRAM must
// be corrected and flagged; a double flip must be flagged.
module tb_sram_ctrl;
  import wfq_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic req_valid, req_we, rsp_valid, rsp_corr, rsp_unc;
  logic [SRAM_AW-1:0] req_addr, sram_addr;
  logic [MEM_DW-1:0] req_wdata, rsp_data;
  logic sram_we_n, sram_oe_n, sram_dq_oe;
  logic [SRAM_DW-1:0] dq_o, dq_i;

  sram_ctrl dut (.clk, .rst_n, .req_valid, .req_we, .req_addr, .req_wdata,
    .rsp_valid, .rsp_data, .rsp_corrected(rsp_corr), .rsp_uncorrectable(rsp_unc),
    .sram_addr, .sram_we_n, .sram_oe_n, .sram_dq_o(dq_o), .sram_dq_oe, .sram_dq_i(dq_i));

  sram_model #(.AW(SRAM_AW), .DW(SRAM_DW)) mem (.clk, .addr(sram_addr), .we_n(sram_we_n),
    .oe_n(sram_oe_n), .dq_in(dq_o), .dq_out(dq_i));

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

  int addrs [64];
  int flipped [64];
  logic [MEM_DW-1:0] data [64];
  int exp_idx [$];
  int exp_time [$];
  int cyc = 0;
  int mode = 0;     // 0 clean, 1 single error expected, 2 double error expected

  always @(posedge clk) cyc++;

  always @(negedge clk) begin
    if (rsp_valid) begin
      int i, t;
      i = exp_idx.pop_front();
      t = exp_time.pop_front();
      check(cyc - t == 2, "read latency 2 clocks");
      if (mode == 2) check(rsp_corr || rsp_unc, "double error flagged");
      else begin
        check(rsp_data == data[i], "read data");
        check(rsp_corr == (mode == 1) && !rsp_unc, "error flags");
      end
    end
  end

  task automatic burst(input bit we);
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      req_valid = 1; req_we = we; req_addr = SRAM_AW'(addrs[i]); req_wdata = data[i];
      if (!we) begin exp_idx.push_back(i); exp_time.push_back(cyc); end
    end
    @(negedge clk) req_valid = 0;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    req_valid = 0; req_we = 0; req_addr = 0; req_wdata = 0;
    for (int i = 0; i < 64; i++) begin
      addrs[i] = (i == 0) ? 0 : (i == 1) ? (2**SRAM_AW - 1) : ($urandom % (2**SRAM_AW));
      for (int j = 0; j < i; j++) if (addrs[j] == addrs[i]) addrs[i] = i + 5;
      data[i] = {10'($urandom), $urandom};
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    burst(1);
    // stored words are codewords
    for (int i = 0; i < 64; i++) begin
      logic [47:0] w;
      int syn;
      w = mem.peek(addrs[i]);
      syn = 0;
      for (int p = 1; p <= 48; p++) if (w[p-1]) syn ^= p;
      check(syn == 0, "stored codeword");
    end
    mode = 0; burst(0);
    for (int i = 0; i < 64; i++) begin
      flipped[i] = $urandom % 48;
      mem.flip_bit(addrs[i], flipped[i]);
    end
    mode = 1; burst(0);
    // a second, different bit per word
    for (int i = 0; i < 64; i++) mem.flip_bit(addrs[i], (flipped[i] + 1 + $urandom % 47) % 48);
    mode = 2; burst(0);
    check(exp_idx.size() == 0, "all reads answered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
