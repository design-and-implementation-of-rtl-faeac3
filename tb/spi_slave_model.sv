// spi_slave_model - behavioural model of the SPI slave the master talks to
// (a serial EEPROM in the reference set-up). Simulation only.
//
// It is the classic SPI slave: one 8-bit shift register that the master's
// clock rotates through MOSI and MISO (SPI mode 0). When cs_n falls the
// register is loaded with PRELOAD and its MSB goes out on miso. On each rising
// sclk edge mosi is sampled; on each falling edge the register shifts left
// and takes that sample. While cs_n is high the model ignores sclk and mosi
// and does not drive miso (it reads 0). Because only eight bits fit, what it
// sends back during the third byte of a frame is the second byte it received.
// rx_word collects every bit received since cs_n fell; n_bits counts them.
module spi_slave_model #(
  parameter logic [7:0] PRELOAD = 8'h00
) (
  input  logic        sclk,
  input  logic        mosi,
  input  logic        cs_n,
  output logic        miso,
  output logic [31:0] rx_word,
  output int          n_bits
);

  logic [7:0] sr = PRELOAD;
  logic       sample = 1'b0;

  initial begin
    rx_word = '0;
    n_bits  = 0;
  end

  always @(negedge cs_n) begin
    sr      = PRELOAD;
    rx_word = '0;
    n_bits  = 0;
  end

  always @(posedge sclk) begin
    if (!cs_n) begin
      sample  = mosi;
      rx_word = {rx_word[30:0], mosi};
      n_bits++;
    end
  end

  always @(negedge sclk) begin
    if (!cs_n) sr = {sr[6:0], sample};
  end

  assign miso = cs_n ? 1'b0 : sr[7];

endmodule
