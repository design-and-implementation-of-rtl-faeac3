// tb_lfsr8 - self-checking testbench for the pattern generator.
//
// Checks the reset value, the exact reference pattern sequence from seed 0x01
// (0x01, 0x03, then 0x13 0x16 0x1D 0x0E 0x18 0x05 0x0B repeating), that the
// register holds while enable is low, and that the sequence has period 7 and
// leaves bits 7:5 at zero. The expected values are written out by hand.
module tb_lfsr8;

  logic       clk = 1'b0;
  logic       reset;
  logic       enable;
  logic [7:0] pattern;
  int         checks = 0;
  int         failures = 0;

  lfsr8 dut (.clk, .reset, .enable, .pattern);

  always #5 clk = ~clk;

  localparam logic [7:0] CYCLE [7] = '{8'h13, 8'h16, 8'h1D, 8'h0E, 8'h18, 8'h05, 8'h0B};

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset  = 1'b1;
    enable = 1'b0;
    repeat (2) @(posedge clk);
    #1 check(pattern, 8'h01, "reset value");
    reset = 1'b0;
    // Held while enable is low.
    repeat (3) @(posedge clk);
    #1 check(pattern, 8'h01, "hold with enable low");
    enable = 1'b1;
    @(posedge clk);
    #1 check(pattern, 8'h03, "step 1");
    for (int i = 0; i < 21; i++) begin
      @(posedge clk);
      #1 check(pattern, CYCLE[i % 7], $sformatf("cycle step %0d", i));
      checks++;
      if (pattern[7:5] != 3'b000) failures++;
    end
    // Hold in the middle of the cycle.
    enable = 1'b0;
    repeat (4) @(posedge clk);
    #1 check(pattern, CYCLE[20 % 7], "hold mid-sequence");
    enable = 1'b1;
    @(posedge clk);
    #1 check(pattern, CYCLE[0], "resume");
    // Reset in the middle of the sequence.
    reset = 1'b1;
    #1 check(pattern, 8'h01, "asynchronous reset");
    @(posedge clk);
    reset = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
