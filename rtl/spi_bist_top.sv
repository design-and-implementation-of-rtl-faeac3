// spi_bist_top - SPI master with a built-in self-test.
//
// The SPI master (spi_master) sends frames of three bytes: control,
// status-address and data. In normal mode (bist_mode low) the bytes come from
// the in_control, in_status and in_data pins. In BIST mode three pattern
// generators (lfsr8) supply them instead: LFSR1 the status-address byte,
// LFSR2 the control byte and LFSR3 the data byte. The comparator
// (bist_comparator) watches spi_sdat against the same patterns and counts
// correct and wrong bits, so a self-test needs nothing but GO pulses and a look
// at bit_error and bit_correct afterwards.
//
// Every frame is started by a rising GO and ends when SD_COUNTER reaches 29;
// GO must then go low for one clock at least before the next frame. In BIST
// mode the generators step once per frame, at step 28, after the last data
// bit, so every frame carries new patterns that are stable for its whole
// length. bit_correct and bit_error accumulate until reset.
//
// The block structure (three LFSRs, SPI module, comparator, with the LFSRs
// feeding both the SPI module and the comparator) follows the reference
// top-level schematic. This design's own choices: the bist_mode pin and the
// multiplexers for normal mode, one generator step per frame, the seeds (three
// phases of the same sequence, so the three bytes differ), and driving the
// generators' reset from reset_n instead of a separate pin.
module spi_bist_top
  import spi_bist_pkg::*;
#(
  parameter int unsigned  COUNT_W   = 8,      // width of bit_correct / bit_error
  parameter logic [7:0]   SEED_STAT = 8'h01,  // LFSR1, status-address byte
  parameter logic [7:0]   SEED_CTRL = 8'h03,  // LFSR2, control byte
  parameter logic [7:0]   SEED_DATA = 8'h13   // LFSR3, data byte
) (
  input  logic               clk,
  input  logic               reset_n,     // active low, whole design
  input  logic               go,          // start a frame
  input  logic               ss_n,        // active-low port enable of the master
  input  logic               bist_mode,   // 1: self-test patterns, 0: pins
  input  logic [7:0]         in_control,  // normal-mode control byte
  input  logic [7:0]         in_status,   // normal-mode status-address byte
  input  logic [7:0]         in_data,     // normal-mode data byte
  input  logic               spi_sdi,     // MISO
  output logic [7:0]         out_data,    // byte received in the data phase
  output step_t              sd_counter,  // frame step
  output logic               spi_sclk,
  output logic               spi_sdat,    // MOSI
  output logic               spi_cs_n,
  output logic [COUNT_W-1:0] bit_correct, // BIST: bits seen correct
  output logic [COUNT_W-1:0] bit_error    // BIST: bits seen wrong
);

  logic [7:0] pat_stat, pat_ctrl, pat_data;
  logic [7:0] tx_ctrl, tx_stat, tx_data;
  logic       lfsr_step;
  logic       sdat;

  assign lfsr_step = bist_mode && (sd_counter == STEP_LATCH);

  lfsr8 #(.SEED(SEED_STAT)) u_lfsr1 (
    .clk, .reset(!reset_n), .enable(lfsr_step), .pattern(pat_stat));
  lfsr8 #(.SEED(SEED_CTRL)) u_lfsr2 (
    .clk, .reset(!reset_n), .enable(lfsr_step), .pattern(pat_ctrl));
  lfsr8 #(.SEED(SEED_DATA)) u_lfsr3 (
    .clk, .reset(!reset_n), .enable(lfsr_step), .pattern(pat_data));

  always_comb begin
    tx_ctrl = bist_mode ? pat_ctrl : in_control;
    tx_stat = bist_mode ? pat_stat : in_status;
    tx_data = bist_mode ? pat_data : in_data;
  end

  spi_master u_spi (
    .clk,
    .reset_n,
    .go,
    .ss_n,
    .in_control (tx_ctrl),
    .in_status  (tx_stat),
    .in_data    (tx_data),
    .spi_sdi,
    .out_data,
    .sd_counter,
    .spi_sclk,
    .spi_sdat   (sdat),
    .spi_cs_n
  );

  bist_comparator #(.COUNT_W(COUNT_W)) u_cmp (
    .clk,
    .reset_n,
    .enable     (bist_mode),
    .sd_counter,
    .in_control (pat_ctrl),
    .in_address (pat_stat),
    .in_data    (pat_data),
    .spi_sdat   (sdat),
    .bit_correct,
    .bit_error
  );

  assign spi_sdat = sdat;

endmodule
