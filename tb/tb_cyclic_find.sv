// tb_cyclic_find: checks the cyclic first-set search against a direct loop
// over the flag vector, for random vectors and start positions at the
// bucket size (128) and the port count (16).
module tb_cyclic_find;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [127:0] f1;  logic [6:0] s1, i1;  logic fd1;
  logic [15:0]  f2;  logic [3:0] s2, i2;  logic fd2;

  cyclic_find #(.W(128)) dut1 (.flags(f1), .start(s1), .found(fd1), .idx(i1));
  cyclic_find #(.W(16))  dut2 (.flags(f2), .start(s2), .found(fd2), .idx(i2));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_find(logic [127:0] f, int w, int s);
    for (int k = 0; k < w; k++) if (f[(s + k) % w]) return (s + k) % w;
    return -1;
  endfunction

  initial begin
    for (int t = 0; t < 4000; t++) begin
      int r1, r2;
      f1 = {$urandom, $urandom, $urandom, $urandom};
      // make sparse vectors most of the time
      if (t % 4 != 0) f1 = f1 & {$urandom, $urandom, $urandom, $urandom} & {$urandom, $urandom, $urandom, $urandom} & {$urandom, $urandom, $urandom, $urandom};
      if (t % 5 == 0) f1 = 128'(1) << ($urandom % 128);
      if (t % 97 == 0) f1 = '0;
      f2 = 16'($urandom) & 16'($urandom);
      if (t % 13 == 0) f2 = '0;
      s1 = 7'($urandom);
      s2 = 4'($urandom);
      @(posedge clk);
      r1 = ref_find(f1, 128, s1);
      r2 = ref_find({112'd0, f2}, 16, s2);
      checks += 2;
      if (fd1 != (r1 >= 0) || (r1 >= 0 && int'(i1) != r1)) begin
        failures++;
        if (failures < 5) $display("W=128 flags=%h start=%0d got %0d/%0d want %0d", f1, s1, fd1, i1, r1);
      end
      if (fd2 != (r2 >= 0) || (r2 >= 0 && int'(i2) != r2)) begin
        failures++;
        if (failures < 5) $display("W=16 flags=%h start=%0d got %0d/%0d want %0d", f2, s2, fd2, i2, r2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
