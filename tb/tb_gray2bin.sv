// Self-checking testbench for gray2bin (Gray code to binary).
//
// Drives every valid input code (0 to 15), compares the converted code with
// a value computed arithmetically in the testbench (the xor of all right shifts of the Gray code), and checks that the
// reversible network's full output vector {code_out, garbage} is different
// for all sixteen input codes, so the input can be recovered from it. A
// watchdog ends the run with a failure if
// the stimulus never finishes.
module tb_gray2bin;
  import code_conv_pkg::*;

  code4_t                code_in, code_out, expected;
  logic [GRAY2BIN_COST.garbage-1:0] garbage;
  int                    checks = 0, failures = 0;
  logic                  clk = 1'b0;

  gray2bin dut (.code_in(code_in), .code_out(code_out), .garbage(garbage));

  always #5 clk = ~clk;

  function automatic code4_t reference(code4_t x);
    code4_t r = x; for (int s = 1; s < 4; s++) r ^= x >> s; return r;
  endfunction

  initial begin
    bit seen [logic [GRAY2BIN_COST.garbage+3:0]];  // output vectors met so far
    for (int i = 0; i < 16; i++) begin
      code_in = code4_t'(i);
      #1;
      if (i >= 0 && i <= 15) begin
        expected = reference(code_in);
        checks++;
        if (code_out !== expected) begin
          failures++;
          $display("FAIL in=%b out=%b expected %b", code_in, code_out, expected);
        end
      end
      checks++;
      if (seen.exists({code_out, garbage})) begin
        failures++;
        $display("FAIL in=%b: output vector %b_%b repeats an earlier one", code_in, code_out, garbage);
      end
      seen[{code_out, garbage}] = 1'b1;
    end
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
