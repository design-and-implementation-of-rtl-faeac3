// tb_spi_master - self-checking testbench for the SPI master.
//
// The testbench plays the slave: it captures spi_sdat on every rising
// spi_sclk edge and drives spi_sdi from a 24-bit word, changing it on every
// falling spi_sclk edge (SPI mode 0). For each frame it checks the 24 bits
// sent (control, status address, data, MSB first), the byte received on
// out_data, the number of clock pulses (24), the slave-select low time
// (28 clocks), the frame length from GO to step 29 (29 clocks), and that the
// step counter counts 0, 1, 2 ... 29 and holds. The first frame uses the
// reference normal-mode values 0x14 / 0x00 / 0xAA, with the data byte
// applied only after the frame has started. Further checks: ss_n high keeps
// the master idle, GO falling mid-frame aborts the frame.
module tb_spi_master;
  import spi_bist_pkg::*;

  logic       clk = 1'b0;
  logic       reset_n = 1'b1;
  logic       go;
  logic       ss_n;
  logic [7:0] in_control, in_status, in_data;
  logic       spi_sdi;
  logic [7:0] out_data;
  step_t      sd_counter;
  logic       spi_sclk, spi_sdat, spi_cs_n;

  int checks = 0;
  int failures = 0;

  spi_master dut (.*);

  always #5 clk = ~clk;

  // ---- slave side ----
  logic [23:0] mosi_word;
  logic [23:0] miso_word;
  int          n_rise;
  int          n_fall;

  assign spi_sdi = (n_fall < 24) ? miso_word[23 - n_fall] : 1'b0;

  always @(posedge spi_sclk) if (reset_n) begin
    mosi_word = {mosi_word[22:0], spi_sdat};
    n_rise++;
    checks++;
    if (spi_cs_n) begin
      failures++;
      $display("FAIL spi_sclk pulse while slave deselected");
    end
  end
  always @(negedge spi_sclk) n_fall++;

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // One frame; late_data applies in_data only after the frame has begun.
  task automatic run_frame(input logic [7:0] c, input logic [7:0] s,
                           input logic [7:0] d, input logic [23:0] miso,
                           input bit late_data);
    int cycles, cs_low;
    step_t prev;
    mosi_word  = '0;
    n_rise     = 0;
    n_fall     = 0;
    miso_word  = miso;
    in_control = c;
    in_status  = s;
    in_data    = late_data ? ~d : d;
    @(negedge clk);
    check(sd_counter, STEP_IDLE, "idle before GO");
    check(spi_cs_n, 1'b1, "deselected before GO");
    go     = 1'b1;
    cycles = 0;
    cs_low = 0;
    prev   = sd_counter;
    while (sd_counter != STEP_DONE && cycles < 100) begin
      @(negedge clk);
      cycles++;
      if (!spi_cs_n) cs_low++;
      check(sd_counter, prev + step_t'(1), "counter increments by one");
      prev = sd_counter;
      if (late_data && sd_counter == step_t'(12)) in_data = d;
    end
    check(cycles, 29, "frame length GO to step 29");
    check(cs_low, 28, "slave select low time");
    check(n_rise, 24, "spi_sclk pulses per frame");
    check(mosi_word, {c, s, d}, "bits sent on spi_sdat");
    check(out_data, miso[7:0], "byte received on out_data");
    repeat (5) @(negedge clk);
    check(sd_counter, STEP_DONE, "counter holds at step 29");
    check(spi_cs_n, 1'b1, "deselected after frame");
    check(n_rise, 24, "no clock after frame");
    go = 1'b0;
    @(negedge clk);
    check(sd_counter, STEP_IDLE, "GO low returns to idle");
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset_n    = 1'b0;
    go         = 1'b0;
    ss_n       = 1'b0;
    in_control = '0;
    in_status  = '0;
    in_data    = '0;
    miso_word  = '0;
    n_rise     = 0;
    n_fall     = 0;
    repeat (3) @(negedge clk);
    reset_n = 1'b1;
    @(negedge clk);

    // Reference normal-mode frame: control 0x14, status 0x00, data 0xAA.
    run_frame(8'h14, 8'h00, 8'hAA, 24'h5A_C3_69, 1'b1);

    // Random frames.
    for (int i = 0; i < 20; i++)
      run_frame(8'($urandom), 8'($urandom), 8'($urandom), 24'($urandom), 1'b0);

    // ss_n high holds the master idle.
    ss_n   = 1'b1;
    n_rise = 0;
    go     = 1'b1;
    repeat (40) @(negedge clk);
    check(sd_counter, STEP_IDLE, "ss_n high keeps counter idle");
    check(spi_cs_n, 1'b1, "ss_n high keeps slave deselected");
    check(n_rise, 0, "ss_n high gives no clock");
    go   = 1'b0;
    ss_n = 1'b0;
    @(negedge clk);

    // GO falling in the middle of a frame aborts it.
    go = 1'b1;
    repeat (15) @(negedge clk);
    check(sd_counter, step_t'(15), "mid-frame step");
    check(spi_cs_n, 1'b0, "selected mid-frame");
    go = 1'b0;
    @(negedge clk);
    check(sd_counter, STEP_IDLE, "abort returns to idle");
    check(spi_cs_n, 1'b1, "abort deselects slave");

    // A full frame still works after the abort.
    run_frame(8'hC3, 8'h3C, 8'h81, 24'h00_00_7E, 1'b0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
