// Self-checking testbench for urg_gate.
//
// Applies all eight input patterns and compares P, Q and R with the gate's
// truth table, written out row by row. It also checks that the eight output
// triples are all different, i.e. that the gate is reversible. A watchdog
// ends the run with a failure if the stimulus never finishes.
module tb_urg_gate;

  logic a, b, c, p, q, r;
  int   checks = 0, failures = 0;
  logic clk = 1'b0;

  urg_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  always #5 clk = ~clk;

  // Truth table rows {A,B,C,P,Q,R}.
  localparam logic [5:0] TABLE [8] = '{
    6'b000_000, 6'b001_101, 6'b010_011, 6'b011_110,
    6'b100_001, 6'b101_100, 6'b110_111, 6'b111_010
  };

  initial begin
    logic [7:0] seen;
    seen = '0;
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = TABLE[i][5:3];
      #1;
      checks++;
      if ({p, q, r} !== TABLE[i][2:0]) begin
        failures++;
        $display("FAIL abc=%b%b%b: pqr=%b%b%b expected %b", a, b, c, p, q, r, TABLE[i][2:0]);
      end
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("FAIL output %b%b%b produced twice", p, q, r);
      end
      seen[{p, q, r}] = 1'b1;
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
