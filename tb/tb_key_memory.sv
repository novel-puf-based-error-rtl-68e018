// tb_key_memory: writes random rows, then reads every row on the row port and
// every bit on the bit port (bit b = row b/64, column b%64) against a copy
// kept in the testbench; a write with we low must change nothing.
module tb_key_memory;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  logic [1:0] waddr = 0, raddr = 0;
  logic [63:0] wdata = 0, rdata;
  logic [7:0] baddr = 0;
  logic bdata;
  logic [63:0] copy [4];

  key_memory #(.K(4), .N(64)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata, .baddr, .bdata);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pass = 0; pass < 2; pass++) begin
      for (int r = 0; r < 4; r++) begin
        @(negedge clk);
        we = 1; waddr = 2'(r); wdata = {$urandom, $urandom}; copy[r] = wdata;
      end
      @(negedge clk);
      we = 0; waddr = 1; wdata = ~copy[1];
      @(negedge clk);
      for (int r = 0; r < 4; r++) begin
        raddr = 2'(r); #1;
        checks++;
        if (rdata !== copy[r]) begin failures++; $display("FAIL row %0d", r); end
      end
      for (int b = 0; b < 256; b++) begin
        baddr = 8'(b); #1;
        checks++;
        if (bdata !== copy[b / 64][b % 64]) begin failures++; $display("FAIL bit %0d", b); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
