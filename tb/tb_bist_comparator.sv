// tb_bist_comparator - self-checking testbench for the BIST comparator.
//
// The testbench steps sd_counter through whole frames (0 .. 29) itself and
// drives spi_sdat with the bit the frame should carry, flipping chosen bits
// to inject errors. The expected bit positions are written out here
// independently of the package: steps 2-9 carry the control byte, 11-18 the
// address byte and 20-27 the data byte, MSB first. It checks the correct and
// error counts after each frame, that nothing is counted while enable is low
// or on non-bit steps, and that both counts saturate at 255.
module tb_bist_comparator;
  import spi_bist_pkg::*;

  logic       clk = 1'b0;
  logic       reset_n = 1'b1;
  logic       enable;
  step_t      sd_counter;
  logic [7:0] in_control, in_address, in_data;
  logic       spi_sdat;
  logic [7:0] bit_correct, bit_error;

  int checks = 0;
  int failures = 0;

  bist_comparator dut (.*);

  always #5 clk = ~clk;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Bit the line should carry at a step; valid = 0 on non-bit steps.
  function automatic void ref_bit(input int s, input logic [23:0] w,
                                  output logic b, output logic valid);
    valid = 1'b1;
    if (s >= 2 && s <= 9)        b = w[23 - (s - 2)];
    else if (s >= 11 && s <= 18) b = w[15 - (s - 11)];
    else if (s >= 20 && s <= 27) b = w[7 - (s - 20)];
    else begin
      b     = 1'b0;
      valid = 1'b0;
    end
  endfunction

  // Runs a frame; err_mask marks the steps (bit s) whose bit is flipped.
  // Returns the number of bit steps and of flipped bit steps.
  task automatic run_frame(input logic [23:0] w, input logic [31:0] err_mask,
                           input bit junk_on_gaps,
                           output int n_bits, output int n_err);
    logic b, v;
    n_bits = 0;
    n_err  = 0;
    {in_control, in_address, in_data} = w;
    for (int s = 0; s <= 29; s++) begin
      ref_bit(s, w, b, v);
      sd_counter = step_t'(s);
      spi_sdat   = v ? (b ^ err_mask[s]) : (junk_on_gaps ? 1'($urandom) : 1'b0);
      if (v) begin
        n_bits++;
        if (err_mask[s]) n_err++;
      end
      @(negedge clk);
    end
    sd_counter = STEP_IDLE;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nb, ne, tot_ok, tot_err;
    reset_n    = 1'b0;
    enable     = 1'b0;
    sd_counter = STEP_IDLE;
    spi_sdat   = 1'b0;
    {in_control, in_address, in_data} = '0;
    repeat (2) @(negedge clk);
    reset_n = 1'b1;
    check(bit_correct, 0, "correct after reset");
    check(bit_error, 0, "error after reset");

    // Disabled: nothing counted.
    run_frame(24'h14_00_AA, 32'h0000_0F0C, 1'b0, nb, ne);
    check(bit_correct, 0, "disabled: correct");
    check(bit_error, 0, "disabled: error");

    enable  = 1'b1;
    tot_ok  = 0;
    tot_err = 0;
    // Clean reference frame, then junk on the gap steps.
    run_frame(24'h14_00_AA, 32'h0, 1'b0, nb, ne);
    check(nb, 24, "bits per frame");
    tot_ok += nb - ne; tot_err += ne;
    check(bit_correct, tot_ok, "clean frame correct");
    check(bit_error, tot_err, "clean frame error");
    run_frame(24'h13_16_1D, 32'h0, 1'b1, nb, ne);
    tot_ok += nb - ne; tot_err += ne;
    check(bit_correct, tot_ok, "gaps ignored: correct");
    check(bit_error, tot_err, "gaps ignored: error");

    // Frames with injected errors.
    for (int i = 0; i < 8; i++) begin
      run_frame(24'($urandom), $urandom, 1'b1, nb, ne);
      tot_ok += nb - ne; tot_err += ne;
      check(bit_correct, (tot_ok > 255) ? 255 : tot_ok, $sformatf("frame %0d correct", i));
      check(bit_error, (tot_err > 255) ? 255 : tot_err, $sformatf("frame %0d error", i));
    end
    // Single-bit error in each field's MSB and LSB.
    begin
      int steps[6] = '{2, 9, 11, 18, 20, 27};
      for (int k = 0; k < 6; k++) begin
        run_frame(24'hA5_5A_C3, 32'(1) << steps[k], 1'b0, nb, ne);
        check(ne, 1, "one error injected");
        tot_ok += nb - ne; tot_err += ne;
        check(bit_error, (tot_err > 255) ? 255 : tot_err, $sformatf("single error at step %0d", steps[k]));
      end
    end
    // Saturation: keep going with error-free and all-error frames.
    for (int i = 0; i < 12; i++) begin
      run_frame(24'($urandom), (i % 2) ? 32'hFFFF_FFFF : 32'h0, 1'b0, nb, ne);
      tot_ok += nb - ne; tot_err += ne;
    end
    check(bit_correct, 255, "correct count saturates");
    check(bit_error, (tot_err > 255) ? 255 : tot_err, "error count after many frames");
    for (int i = 0; i < 12; i++) begin
      run_frame(24'($urandom), 32'hFFFF_FFFF, 1'b0, nb, ne);
    end
    check(bit_error, 255, "error count saturates");
    check(bit_correct, 255, "correct count stays saturated");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
