// tb_ns_mult8 -- exhaustive self-checking test of the 8x8 NS multiplier.
//
// All 65536 operand pairs are applied and the 16-bit product is compared
// with the integer product. The pair 51 x 30 = 1530, the operands of the
// unit's published simulation, is checked first on its own. It also counts
// the operand pairs for which the carry out of the second adder is needed
// (middle sum plus upper nibble of the low term above 255) and fails if
// the sweep never hit one. A watchdog ends the run if it stalls.
module tb_ns_mult8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int late_carries = 0;

  logic [7:0]  a, b;
  logic [15:0] p;

  ns_mult8 dut (.a(a), .b(b), .p(p));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 8'd51; b = 8'd30;
    #1;
    checks++;
    if (p !== 16'd1530) begin
      failures++;
      $display("FAIL 51 * 30: got %0d", p);
    end
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        checks++;
        if (((((i % 16) * (j / 16) + (i / 16) * (j % 16)) % 256) + ((i % 16) * (j % 16)) / 16) > 255)
          late_carries++;
        if (p !== 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d: got %0d", i, j, p);
        end
      end
    end
    checks++;
    if (late_carries == 0) begin
      failures++;
      $display("FAIL no operand pair exercised the second adder's carry");
    end
    $display("second-adder carries exercised: %0d", late_carries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
