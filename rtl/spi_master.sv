// spi_master - single-slave SPI master that sends one three-byte frame per GO.
//
// While GO is high (and the active-low port enable ss_n is low) the 7-bit step
// counter SD_COUNTER runs from 0 to 29 (0x1D) and then holds; taking GO low
// returns it to 0 and arms the next frame. The step schedule is defined in
// spi_bist_pkg: start step, control byte, gap, status-address byte, gap, data
// byte, gap, done. Bytes go out MSB first on spi_sdat (MOSI). Each bit takes
// one clk cycle. The byte inputs are read at the clk edge that begins the
// bit's step, so they only have to be stable from that point on, not for the
// whole frame.
//
// Clocking (SPI mode 0): spi_sclk idles low. During a bit step it is the
// inverted system clock, so it rises in the middle of the step, where slave
// and master sample, and falls at the step's end, where both shift. spi_sdi
// (MISO) is sampled on the rising spi_sclk edge (falling clk). The byte seen
// on spi_sdi during the data-byte steps appears on out_data at the start of
// step 29 and stays until the next frame's data byte replaces it.
//
// spi_cs_n (active-low slave select) is low from step 1 to step 28.
//
// Interface and timing follow the reference design: the pin set (in_control,
// in_status, in_data, GO, reset_n, SS, SPI_SDI, out_data, SD_COUNTER,
// SPI_SCLK, SPI_SDAT), one counter step per clock, the byte order and the
// 0..0x1D count. This design's own choices: the exact step of each bit, SPI
// mode 0, the spi_cs_n output (the reference pin list has no slave-select
// output though its set-up drives one), the use of ss_n as an enable, and the
// asynchronous active-low reset. spi_sclk is a gated copy of clk; it only
// leaves the chip and clocks no flip-flop inside this design.
module spi_master
  import spi_bist_pkg::*;
(
  input  logic       clk,
  input  logic       reset_n,     // asynchronous, active low
  input  logic       go,          // high: run one frame; low: back to idle
  input  logic       ss_n,        // active-low port enable; high holds the master idle
  input  logic [7:0] in_control,  // control byte, sent first
  input  logic [7:0] in_status,   // status-address byte, sent second
  input  logic [7:0] in_data,     // data byte, sent third
  input  logic       spi_sdi,     // MISO
  output logic [7:0] out_data,    // byte received during the data-byte steps
  output step_t      sd_counter,  // frame step, 0..29
  output logic       spi_sclk,    // SPI clock, idle low
  output logic       spi_sdat,    // MOSI
  output logic       spi_cs_n     // slave select, active low
);

  step_t      cnt_q, cnt_d;
  slot_t      slot_d;
  logic       sclk_en_q;
  logic       sdat_q;
  logic       cs_n_q;
  logic [7:0] rx_q;
  logic [7:0] out_q;

  always_comb begin
    if (!go || ss_n)             cnt_d = STEP_IDLE;
    else if (cnt_q != STEP_DONE) cnt_d = cnt_q + step_t'(1);
    else                         cnt_d = cnt_q;
    slot_d = decode_step(cnt_d);
  end

  // Step counter and the line outputs of the step about to begin.
  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      cnt_q     <= STEP_IDLE;
      sclk_en_q <= 1'b0;
      sdat_q    <= 1'b0;
      cs_n_q    <= 1'b1;
    end else begin
      cnt_q     <= cnt_d;
      sclk_en_q <= (slot_d.field != FIELD_NONE);
      sdat_q    <= frame_bit(slot_d, in_control, in_status, in_data);
      cs_n_q    <= !(cnt_d >= STEP_START && cnt_d < STEP_DONE);
    end
  end

  // MISO is sampled on the rising spi_sclk edge, i.e. the falling clk edge.
  always_ff @(negedge clk or negedge reset_n) begin
    if (!reset_n)       rx_q <= '0;
    else if (sclk_en_q) rx_q <= {rx_q[6:0], spi_sdi};
  end

  // The last eight bits received are the data-byte phase.
  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n)                  out_q <= '0;
    else if (cnt_q == STEP_LATCH)  out_q <= rx_q;
  end

  assign spi_sclk   = sclk_en_q & ~clk;
  assign spi_sdat   = sdat_q;
  assign spi_cs_n   = cs_n_q;
  assign sd_counter = cnt_q;
  assign out_data   = out_q;

  // Out of reset the clock only runs while the slave is selected, and the
  // counter never passes the last step.
  always_comb begin
    a_sclk_in_frame : assert final (!reset_n || !sclk_en_q || !cs_n_q);
    a_cnt_range     : assert final (!reset_n || cnt_q <= STEP_DONE);
  end

endmodule
