// bist_comparator - checks the serial SPI output against the patterns sent.
//
// At the end of every bit step of a frame (see spi_bist_pkg) it compares the
// bit on spi_sdat with the bit the frame should carry at that step, taken
// from the three pattern bytes, and increments bit_correct or bit_error.
// Both counts saturate at their maximum and accumulate over frames until
// reset, so a self-test of any number of frames passes when bit_error is 0
// and bit_correct is 24 per frame.
//
// Interface: in_control, in_address and in_data are the bytes the SPI master
// is sending (they must not change during a frame); sd_counter is the
// master's step counter; enable gates the counting. Timing: the comparison
// for step s happens at the clk edge that ends step s; counts are registered.
//
// The reference design names the comparator, its pattern and spi_sdat inputs
// and its bit_correct and bit_error outputs, and says it compares transmitted
// and received bit patterns and gives the number of errors. The step-counter
// input, the enable, the count width and saturation are this design's choices.
module bist_comparator
  import spi_bist_pkg::*;
#(
  parameter int unsigned COUNT_W = 8
) (
  input  logic               clk,
  input  logic               reset_n,      // asynchronous, active low
  input  logic               enable,       // count only while high
  input  step_t              sd_counter,   // frame step of the SPI master
  input  logic [7:0]         in_control,   // expected control byte
  input  logic [7:0]         in_address,   // expected status-address byte
  input  logic [7:0]         in_data,      // expected data byte
  input  logic               spi_sdat,     // serial line under test
  output logic [COUNT_W-1:0] bit_correct,
  output logic [COUNT_W-1:0] bit_error
);

  localparam logic [COUNT_W-1:0] MAX = '1;

  slot_t slot;
  logic  expected;
  logic  is_bit;

  always_comb begin
    slot     = decode_step(sd_counter);
    is_bit   = enable && (slot.field != FIELD_NONE);
    expected = frame_bit(slot, in_control, in_address, in_data);
  end

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      bit_correct <= '0;
      bit_error   <= '0;
    end else if (is_bit) begin
      if (spi_sdat == expected) begin
        if (bit_correct != MAX) bit_correct <= bit_correct + 1'b1;
      end else begin
        if (bit_error != MAX)   bit_error   <= bit_error + 1'b1;
      end
    end
  end

endmodule
