// tb_spi_bist_top - end-to-end testbench of the SPI master with self-test,
// at the design's default parameters.
//
// A behavioural SPI slave (spi_slave_model, an 8-bit shift register as in a
// serial EEPROM) sits on the bus. The test runs:
//   1. normal mode, the reference frame 0x14 / 0x00 / 0xAA, then random
//      frames: the slave must receive control, status and data in that order,
//      and out_data must be the byte the slave echoes in the data phase (the
//      status byte it received, since its register holds eight bits);
//   2. BIST mode: frames whose bytes come from the three pattern generators.
//      The expected patterns are the reference sequence written out here
//      (0x01, 0x03, then 0x13 0x16 0x1D 0x0E 0x18 0x05 0x0B repeating), LFSR1
//      starting at 0x01 (status byte), LFSR2 at 0x03 (control), LFSR3 at 0x13
//      (data), one step per frame. bit_correct must grow by 24 per frame and
//      bit_error stay 0, until bit_correct saturates at 255;
//   3. a BIST frame with spi_sdat forced high: bit_error must rise by the
//      number of zero bits in that frame's patterns;
//   4. a frame aborted by GO falling, and ss_n high holding the master idle.
// Every frame is also checked for its length (29 clocks from GO to step 29).
// Each mechanism is counted and one that never happened counts as a failure.
module tb_spi_bist_top;
  import spi_bist_pkg::*;

  logic        clk = 1'b0;
  logic        reset_n = 1'b1;
  logic        go, ss_n, bist_mode;
  logic [7:0]  in_control, in_status, in_data;
  logic        spi_sdi;
  logic [7:0]  out_data;
  step_t       sd_counter;
  logic        spi_sclk, spi_sdat, spi_cs_n;
  logic [7:0]  bit_correct, bit_error;

  logic [31:0] rx_word;
  int          rx_bits;

  int checks = 0;
  int failures = 0;
  int n_normal = 0, n_bist = 0, n_pattern_change = 0, n_saturate = 0;
  int n_detect = 0, n_abort = 0, n_idle_hold = 0;

  spi_bist_top dut (.*);

  spi_slave_model #(.PRELOAD(8'h00)) slave (
    .sclk(spi_sclk), .mosi(spi_sdat), .cs_n(spi_cs_n), .miso(spi_sdi),
    .rx_word, .n_bits(rx_bits));

  always #5 clk = ~clk;

  localparam logic [7:0] CYCLE [7] = '{8'h13, 8'h16, 8'h1D, 8'h0E, 8'h18, 8'h05, 8'h0B};

  // k-th pattern of the reference sequence from seed 0x01.
  function automatic logic [7:0] pat(input int k);
    if (k == 0) return 8'h01;
    if (k == 1) return 8'h03;
    return CYCLE[(k - 2) % 7];
  endfunction

  function automatic int zeros(input logic [23:0] w);
    int n = 0;
    for (int i = 0; i < 24; i++) if (!w[i]) n++;
    return n;
  endfunction

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // Runs one frame from GO to step 29 and back to idle.
  task automatic frame();
    int cycles = 0;
    @(negedge clk);
    check(sd_counter, STEP_IDLE, "idle before GO");
    go = 1'b1;
    while (sd_counter != STEP_DONE && cycles < 100) begin
      @(negedge clk);
      cycles++;
    end
    check(cycles, 29, "frame length");
    check(rx_bits, 24, "bits received by slave");
    go = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int f, ok, err, ok_before, err_before;
    logic [23:0] w;
    reset_n    = 1'b0;
    go         = 1'b0;
    ss_n       = 1'b0;
    bist_mode  = 1'b0;
    in_control = '0;
    in_status  = '0;
    in_data    = '0;
    repeat (3) @(negedge clk);
    reset_n = 1'b1;

    // ---- 1. normal mode ----
    for (int i = 0; i < 6; i++) begin
      w = (i == 0) ? 24'h14_00_AA : 24'($urandom);
      {in_control, in_status, in_data} = w;
      frame();
      check(rx_word[23:0], w, "normal: bytes received by slave");
      check(out_data, w[15:8], "normal: out_data echoes status byte");
      check(bit_correct, 0, "normal: comparator idle (correct)");
      check(bit_error, 0, "normal: comparator idle (error)");
      n_normal++;
    end

    // ---- 2. BIST mode ----
    bist_mode = 1'b1;
    {in_control, in_status, in_data} = 24'hFF_FF_FF;  // must be ignored
    ok  = 0;
    err = 0;
    for (f = 0; f < 12; f++) begin
      w = {pat(f + 1), pat(f), pat(f + 2)};  // control, status, data
      frame();
      check(rx_word[23:0], w, $sformatf("bist frame %0d: patterns on the bus", f));
      if (f > 0 && rx_word[23:0] != {pat(f), pat(f - 1), pat(f + 1)}) n_pattern_change++;
      ok += 24;
      check(bit_correct, (ok > 255) ? 255 : ok, $sformatf("bist frame %0d: bit_correct", f));
      check(bit_error, 0, $sformatf("bist frame %0d: bit_error", f));
      if (ok > 255 && bit_correct == 8'd255) n_saturate++;
      n_bist++;
    end

    // ---- 3. stuck-at-1 on the serial line is detected ----
    w          = {pat(f + 1), pat(f), pat(f + 2)};
    err_before = bit_error;
    ok_before  = bit_correct;
    force dut.sdat = 1'b1;
    frame();
    release dut.sdat;
    check(bit_error, err_before + zeros(w), "stuck-at-1 frame: errors counted");
    check(bit_correct, ok_before, "stuck-at-1 frame: correct saturated");
    if (bit_error > err_before) n_detect++;
    f++;

    // Next clean frame: no new errors.
    w          = {pat(f + 1), pat(f), pat(f + 2)};
    err_before = bit_error;
    frame();
    check(rx_word[23:0], w, "clean frame after fault");
    check(bit_error, err_before, "clean frame after fault: no new errors");
    n_bist++;

    // ---- 4. abort and idle hold ----
    bist_mode = 1'b0;
    {in_control, in_status, in_data} = 24'h5A_A5_3C;
    @(negedge clk);
    go = 1'b1;
    repeat (14) @(negedge clk);
    check(spi_cs_n, 1'b0, "abort: slave selected mid-frame");
    go = 1'b0;
    @(negedge clk);
    check(sd_counter, STEP_IDLE, "abort: counter back to idle");
    check(spi_cs_n, 1'b1, "abort: slave deselected");
    n_abort++;
    ss_n = 1'b1;
    go   = 1'b1;
    repeat (40) @(negedge clk);
    check(sd_counter, STEP_IDLE, "ss_n high: idle");
    check(spi_cs_n, 1'b1, "ss_n high: no select");
    n_idle_hold++;
    go   = 1'b0;
    ss_n = 1'b0;
    frame();
    check(rx_word[23:0], 24'h5A_A5_3C, "frame after abort");
    check(out_data, 8'hA5, "frame after abort: out_data");
    n_normal++;

    $display("mechanisms: normal=%0d bist=%0d pattern_change=%0d saturate=%0d detect=%0d abort=%0d idle_hold=%0d",
             n_normal, n_bist, n_pattern_change, n_saturate, n_detect, n_abort, n_idle_hold);
    begin
      int m[7];
      m = '{n_normal, n_bist, n_pattern_change, n_saturate, n_detect, n_abort, n_idle_hold};
      for (int i = 0; i < 7; i++) begin
        checks++;
        if (m[i] == 0) begin
          failures++;
          $display("FAIL mechanism %0d never happened", i);
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
