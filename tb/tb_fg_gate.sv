// Self-checking testbench for fg_gate.
//
// Applies all four input patterns and compares P and Q with the gate's
// truth table, written out row by row. It also checks that the four output
// pairs are all different, i.e. that the gate is reversible. A watchdog
// ends the run with a failure if the stimulus never finishes.
module tb_fg_gate;

  logic a, b, p, q;
  int   checks = 0, failures = 0;
  logic clk = 1'b0;

  fg_gate dut (.a(a), .b(b), .p(p), .q(q));

  always #5 clk = ~clk;

  // Truth table rows {A,B,P,Q}.
  localparam logic [3:0] TABLE [4] = '{4'b0000, 4'b0101, 4'b1011, 4'b1110};

  initial begin
    logic [3:0] seen;
    seen = '0;
    for (int i = 0; i < 4; i++) begin
      {a, b} = TABLE[i][3:2];
      #1;
      checks++;
      if ({p, q} !== TABLE[i][1:0]) begin
        failures++;
        $display("FAIL a=%b b=%b: p=%b q=%b expected %b", a, b, p, q, TABLE[i][1:0]);
      end
      checks++;
      if (seen[{p, q}]) begin
        failures++;
        $display("FAIL output %b%b produced twice", p, q);
      end
      seen[{p, q}] = 1'b1;
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
