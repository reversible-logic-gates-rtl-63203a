// End-to-end testbench for code_converter_top at its default configuration.
//
// Runs one complete operation of every converter in the set:
//   * counts 0..15 in binary, converts each value to Gray, checks it against
//     x ^ (x >> 1), checks that neighbouring Gray codes (15 wrapping to 0)
//     differ in exactly one bit, and feeds the Gray code back through the
//     Gray-to-binary converter to recover the count;
//   * takes each decimal digit 0..9 to Excess-3, checks it is the digit
//     plus 3, and feeds it back through the Excess-3-to-BCD converter.
// It counts each kind of conversion it observed and counts a failure for
// any kind that never happened. A watchdog ends the run with a failure if
// the stimulus never finishes.
module tb_code_converter_top;
  import code_conv_pkg::*;

  code4_t     bin_in, gray_out, gray_in, bin_out;
  code4_t     bcd_in, xs3_out, xs3_in, bcd_out;
  logic [BIN2GRAY_COST.garbage-1:0] b2g_garbage;
  logic [GRAY2BIN_COST.garbage-1:0] g2b_garbage;
  logic [BCD2XS3_COST.garbage-1:0]  b2x_garbage;
  logic [XS32BCD_COST.garbage-1:0]  x2b_garbage;

  int   checks = 0, failures = 0;
  int   n_b2g = 0, n_g2b = 0, n_b2x = 0, n_x2b = 0, n_gray_steps = 0;
  logic clk = 1'b0;

  code_converter_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    code4_t prev_gray;
    bin_in = '0; gray_in = '0; bcd_in = '0; xs3_in = 4'd3;

    // Binary -> Gray -> binary over the whole 4-bit range.
    for (int i = 0; i <= 16; i++) begin
      @(posedge clk);
      bin_in = code4_t'(i);
      #1;
      check(gray_out == (bin_in ^ (bin_in >> 1)),
            $sformatf("gray of %0d is %b", bin_in, gray_out));
      n_b2g++;
      if (i > 0) begin
        check($countones(gray_out ^ prev_gray) == 1,
              $sformatf("gray %b -> %b changes more than one bit", prev_gray, gray_out));
        n_gray_steps++;
      end
      prev_gray = gray_out;
      gray_in = gray_out;
      #1;
      check(bin_out == bin_in, $sformatf("gray %b back to %0d, expected %0d",
                                         gray_in, bin_out, bin_in));
      n_g2b++;
    end

    // BCD -> Excess-3 -> BCD over the ten decimal digits.
    for (int digit = 0; digit < 10; digit++) begin
      @(posedge clk);
      bcd_in = code4_t'(digit);
      #1;
      check(int'(xs3_out) == digit + 3, $sformatf("excess-3 of %0d is %0d", digit, xs3_out));
      n_b2x++;
      xs3_in = xs3_out;
      #1;
      check(int'(bcd_out) == digit, $sformatf("excess-3 %b back to %0d, expected %0d",
                                              xs3_in, bcd_out, digit));
      n_x2b++;
    end

    $display("conversions: bin->gray %0d, gray->bin %0d, bcd->xs3 %0d, xs3->bcd %0d, gray steps %0d",
             n_b2g, n_g2b, n_b2x, n_x2b, n_gray_steps);
    check(n_b2g > 0, "binary to Gray never exercised");
    check(n_g2b > 0, "Gray to binary never exercised");
    check(n_b2x > 0, "BCD to Excess-3 never exercised");
    check(n_x2b > 0, "Excess-3 to BCD never exercised");
    check(n_gray_steps > 0, "no Gray single-bit step observed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
