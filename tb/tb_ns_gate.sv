// tb_ns_gate -- exhaustive self-checking test of the NS gate.
//
// Applies all 16 input patterns and compares the four outputs with a truth
// table worked out by hand from the gate's equations. It then checks the two
// uses the arithmetic relies on: with a = 0 the gate is a full adder
// (o1 = sum, o2 = carry of b + c + d), and with a = 0, d = 0 output 2 is
// the AND of b and c. A watchdog ends the run if it stalls.
module tb_ns_gate;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic d, c, b, a;
  logic o1, o2, o3, o4;

  ns_gate dut (.d(d), .c(c), .b(b), .a(a), .o1(o1), .o2(o2), .o3(o3), .o4(o4));

  // Expected {o1, o2, o3, o4}, indexed by {d, c, b, a}.
  localparam logic [3:0] EXPECTED [16] = '{
    4'b0011, 4'b0000, 4'b1001, 4'b1110,
    4'b1011, 4'b1100, 4'b0111, 4'b0100,
    4'b1001, 4'b1010, 4'b0101, 4'b0010,
    4'b0111, 4'b0000, 4'b1101, 4'b1110
  };

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {d, c, b, a} = 4'(i);
      @(posedge clk);
      checks++;
      if ({o1, o2, o3, o4} !== EXPECTED[i]) begin
        failures++;
        $display("FAIL dcba=%04b: got %04b expected %04b", 4'(i), {o1, o2, o3, o4}, EXPECTED[i]);
      end
    end
    // Full-adder use: a = 0.
    for (int i = 0; i < 8; i++) begin
      {d, c, b} = 3'(i);
      a = 1'b0;
      @(posedge clk);
      checks++;
      if ({o2, o1} !== 2'(int'(d) + int'(c) + int'(b))) begin
        failures++;
        $display("FAIL full adder dcb=%03b: carry,sum=%b%b", 3'(i), o2, o1);
      end
      if (d == 1'b0) begin
        checks++;
        if (o2 !== (b & c)) begin
          failures++;
          $display("FAIL AND use cb=%b%b: o2=%b", c, b, o2);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
