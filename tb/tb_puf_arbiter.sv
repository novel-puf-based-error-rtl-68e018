// tb_puf_arbiter: checks the arbiter PUF model against an independent
// evaluation of the additive delay model (parity vector computed bit by bit,
// signed sum in integers) for random challenges at two widths, checks that
// both response values occur, and checks the expected statistics of
// Equation 2: challenges whose parity vectors differ in one bit agree far
// more often than challenges whose parity vectors differ in N/2 bits.
module tb_puf_arbiter;
  int checks = 0, failures = 0;

  logic [7:0]  c8;  logic r8;
  logic [63:0] c64; logic r64;

  puf_arbiter #(.N(8),  .SEED(1))  dut8  (.challenge(c8),  .response(r8));
  puf_arbiter #(.N(64), .SEED(23)) dut64 (.challenge(c64), .response(r64));

  function automatic logic ref_puf(input logic [63:0] c, input int n, input int unsigned seed);
    int s;
    logic par;
    s = puf_pkg::delay_weight(seed, n);
    for (int i = 0; i < n; i++) begin
      par = 1'b0;
      for (int k = i; k < n; k++) par ^= c[k];
      s += par ? -puf_pkg::delay_weight(seed, i) : puf_pkg::delay_weight(seed, i);
    end
    return s > 0;
  endfunction

  // Challenge whose parity vector is p (inverse of the suffix XOR).
  function automatic logic [63:0] from_parity(input logic [63:0] p);
    logic [63:0] c;
    for (int i = 0; i < 63; i++) c[i] = p[i] ^ p[i+1];
    c[63] = p[63];
    return c;
  endfunction

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones8 = 0, ones64 = 0;
    int agree_near = 0, agree_far = 0;
    logic [63:0] p, q;
    logic ra, rb;
    for (int k = 0; k < 256; k++) begin
      c8 = 8'(k);
      #1 check(r8, ref_puf(64'(c8), 8, 1), $sformatf("N=8 c=%0h", c8));
      ones8 += r8;
    end
    for (int k = 0; k < 300; k++) begin
      c64 = {$urandom, $urandom};
      #1 check(r64, ref_puf(c64, 64, 23), $sformatf("N=64 c=%0h", c64));
      ones64 += r64;
    end
    checks++; if (ones8 == 0 || ones8 == 256) begin failures++; $display("FAIL N=8 constant"); end
    checks++; if (ones64 == 0 || ones64 == 300) begin failures++; $display("FAIL N=64 constant"); end
    // Equation 2: P(equal) = 1 - (2/pi) atan(sqrt(d/(n+1-d))): ~0.92 for d=1, ~0.5 for d=32.
    for (int k = 0; k < 400; k++) begin
      p = {$urandom, $urandom};
      q = p; q[$urandom_range(63)] ^= 1'b1;
      c64 = from_parity(p); #1 ra = r64;
      c64 = from_parity(q); #1 rb = r64;
      agree_near += (ra == rb);
      q = p;
      for (int b = 0; b < 64; b += 2) q[b] ^= 1'b1;
      c64 = from_parity(q); #1 rb = r64;
      agree_far += (ra == rb);
    end
    $display("agreement: parity distance 1: %0d/400, distance 32: %0d/400", agree_near, agree_far);
    checks++; if (agree_near < 320) begin failures++; $display("FAIL near agreement low"); end
    checks++; if (agree_far < 140 || agree_far > 260) begin failures++; $display("FAIL far agreement not near 1/2"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
