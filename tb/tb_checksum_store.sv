// tb_checksum_store: three circular registers of lengths 3, 2 and 1. An
// enrolment pass shifts random bits into each register in the order of a
// sequence; later passes must read the same bits back in the same order,
// repeated any number of times, with the decoder advancing only the selected
// register. Reference: a list of the enrolled bits per register.
module tb_checksum_store;
  localparam int unsigned P [3] = '{3, 2, 1};
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [1:0] sel;
  logic shift, write, din, w_o;
  logic bits [3][3];

  checksum_store #(.Q(3), .P(P)) dut (.clk, .sel, .shift, .write, .din, .w_o);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    shift = 0; write = 0; din = 0; sel = 0;
    @(negedge clk);
    // enrolment: register g gets P[g] random bits, first bit ends at MSB
    for (int g = 0; g < 3; g++)
      for (int j = 0; j < P[g]; j++) begin
        bits[g][j] = 1'($urandom);
        sel = 2'(g); shift = 1; write = 1; din = bits[g][j];
        @(negedge clk);
      end
    write = 0;
    // read back: register g walked through (g+2) times, interleaved with idle cycles
    for (int rep = 0; rep < 3; rep++)
      for (int g = 0; g < 3; g++)
        for (int c = 0; c < g + 2; c++)
          for (int j = 0; j < P[g]; j++) begin
            sel = 2'(g); shift = 1;
            #1;
            checks++;
            if (w_o !== bits[g][j]) begin
              failures++;
              $display("FAIL reg %0d bit %0d got %0b exp %0b", g, j, w_o, bits[g][j]);
            end
            @(negedge clk);
            shift = 0; sel = 2'($urandom_range(2));   // idle cycle: nothing may move
            @(negedge clk);
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
