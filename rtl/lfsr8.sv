// lfsr8 - 8-bit pseudo-random pattern generator for the SPI self-test.
//
// An 8-bit register that, while enable is high, steps once per clock through
// a linear feedback sequence. The feedback network reproduces, bit for bit,
// the pattern sequence of the reference generator: from the reset value 0x01
// it goes 0x03, then repeats the seven patterns
//   0x13 0x16 0x1D 0x0E 0x18 0x05 0x0B
// for ever. Read as a shift register, bits 0 -> 1 -> 4 -> 2 -> 3 form a five-stage
// chain whose first stage takes the XOR of itself and bit 4, i.e. a
// three-stage maximal-length LFSR (x^3 + x^2 + 1, period 7) followed by two
// delay stages, with the stages wired to the output bus in that order.
// Bits 7:5 never change in the reference sequence; here they hold their reset
// value (0 for every seed on the cycle above).
//
// Interface: asynchronous active-high reset loads SEED; enable advances one
// step per clock; pattern is the register itself. The sequence is taken from
// the reference simulation. The reset polarity and timing and
// the SEED parameter are this design's choices.
module lfsr8 #(
  parameter logic [7:0] SEED = 8'h01
) (
  input  logic       clk,
  input  logic       reset,    // asynchronous, active high: load SEED
  input  logic       enable,   // advance one pattern per clock
  output logic [7:0] pattern
);

  logic [7:0] q, d;

  always_comb begin
    d[0]   = q[0] ^ q[4];
    d[1]   = q[0];
    d[4]   = q[1];
    d[2]   = q[4];
    d[3]   = q[2];
    d[7:5] = q[7:5];
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset)       q <= SEED;
    else if (enable) q <= d;
  end

  assign pattern = q;

endmodule
