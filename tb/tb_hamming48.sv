// tb_hamming48: checks the SRAM word code. For random data it verifies that
// the codeword has a zero syndrome (XOR of the position numbers 1..48 of all
// one bits), that the data bits sit at the non-power-of-two positions in
// order, that a clean word decodes unchanged, that every single bit error is
// corrected and flagged, and that a double error is never passed as clean.
module tb_hamming48;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [41:0] ed, dd;
  logic [47:0] ec, dc;
  logic corr, unc;

  hamming48 dut (.enc_data(ed), .enc_code(ec), .dec_code(dc), .dec_data(dd),
                 .dec_corrected(corr), .dec_uncorrectable(unc));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 8) $display("FAIL %s data=%h code=%h", what, ed, ec);
    end
  endtask

  initial begin
    for (int t = 0; t < 300; t++) begin
      int syn, d;
      ed = {10'($urandom), $urandom};
      if (t == 0) ed = '0;
      if (t == 1) ed = '1;
      dc = '0;
      #1;
      // syndrome of the codeword and data placement, computed here
      syn = 0; d = 0;
      for (int p = 1; p <= 48; p++) begin
        if (ec[p-1]) syn ^= p;
        if ((p & (p - 1)) != 0) begin
          if (ec[p-1] != ed[d]) syn = 99;
          d++;
        end
      end
      check(syn == 0, "codeword syndrome / placement");
      dc = ec; #1;
      check(dd == ed && !corr && !unc, "clean decode");
      for (int b = 0; b < 48; b++) begin
        dc = ec ^ (48'(1) << b); #1;
        check(dd == ed && corr && !unc, "single bit correction");
      end
      begin
        int b1, b2;
        b1 = $urandom % 48;
        b2 = (b1 + 1 + $urandom % 47) % 48;
        dc = ec ^ (48'(1) << b1) ^ (48'(1) << b2); #1;
        check(corr || unc, "double error flagged");
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
