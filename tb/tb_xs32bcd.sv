// Self-checking testbench for xs32bcd (Excess-3 to BCD).
//
// Drives every valid input code (3 to 12), compares the converted code with
// a value computed arithmetically in the testbench (the code minus 3), and checks that the
// reversible network's full output vector {code_out, garbage} is different
// for all sixteen input codes, so the input can be recovered from it. A
// watchdog ends the run with a failure if
// the stimulus never finishes.
module tb_xs32bcd;
  import code_conv_pkg::*;

  code4_t                code_in, code_out, expected;
  logic [XS32BCD_COST.garbage-1:0] garbage;
  int                    checks = 0, failures = 0;
  logic                  clk = 1'b0;

  xs32bcd dut (.code_in(code_in), .code_out(code_out), .garbage(garbage));

  always #5 clk = ~clk;

  function automatic code4_t reference(code4_t x);
    return x - 4'd3;
  endfunction

  initial begin
    bit seen [logic [XS32BCD_COST.garbage+3:0]];  // output vectors met so far
    for (int i = 0; i < 16; i++) begin
      code_in = code4_t'(i);
      #1;
      if (i >= 3 && i <= 12) begin
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
