// tb_ns_mult4 -- exhaustive self-checking test of the 4x4 NS multiplier.
//
// All 256 operand pairs are applied and the 8-bit product is compared with
// the integer product. A watchdog ends the run if it stalls.
module tb_ns_mult4;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [3:0] a, b;
  logic [7:0] p;

  ns_mult4 dut (.a(a), .b(b), .p(p));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j);
        #1;
        checks++;
        if (p !== 8'(i * j)) begin
          failures++;
          $display("FAIL %0d * %0d: got %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
