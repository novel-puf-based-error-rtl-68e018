// tb_permute_block: each of the 8 permutations of a 64-bit word must be a
// bijection (every one-hot input gives a one-hot output, all different),
// keep the number of ones of any word, map zero to zero, and the
// permutations must differ from each other and from the identity.
module tb_permute_block;
  int checks = 0, failures = 0;
  logic [2:0]  sel;
  logic [63:0] din, dout;

  permute_block #(.N(64), .T(8), .SEED(5)) dut (.sel, .din, .dout);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] seen;
    int map [8][64];
    int same;
    for (int j = 0; j < 8; j++) begin
      sel = 3'(j);
      seen = '0;
      for (int b = 0; b < 64; b++) begin
        din = 64'd1 << b;
        #1;
        checks++;
        if ($countones(dout) != 1 || (seen & dout) != 0) begin
          failures++;
          $display("FAIL perm %0d input bit %0d -> %h", j, b, dout);
        end
        seen |= dout;
        map[j][b] = $clog2(dout);
      end
      din = 0; #1;
      checks++; if (dout != 0) begin failures++; $display("FAIL zero not kept"); end
      for (int k = 0; k < 20; k++) begin
        din = {$urandom, $urandom}; #1;
        checks++;
        if ($countones(dout) != $countones(din)) begin failures++; $display("FAIL weight changed"); end
      end
    end
    for (int a = 0; a < 8; a++) begin
      same = 0;
      for (int b = 0; b < 64; b++) same += (map[a][b] == b);
      checks++; if (same > 16) begin failures++; $display("FAIL perm %0d close to identity", a); end
      for (int c = a + 1; c < 8; c++) begin
        same = 0;
        for (int b = 0; b < 64; b++) same += (map[a][b] == map[c][b]);
        checks++; if (same == 64) begin failures++; $display("FAIL perm %0d == perm %0d", a, c); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
