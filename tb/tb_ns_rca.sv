// tb_ns_rca -- self-checking test of the NS-gate ripple-carry adder.
//
// The 8-bit adder (its default width, as used in the multiplier) is tested
// exhaustively over both operands and the carry-in; a 16-bit instance (the
// accumulating adder's width) gets random operands plus the corner cases
// that ripple a carry through every bit. {cout, sum} is compared with the
// integer sum x + y + cin. A watchdog ends the run if it stalls.
module tb_ns_rca;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [7:0]  x8, y8, s8;
  logic        ci8, co8;
  logic [15:0] x16, y16, s16;
  logic        ci16, co16;

  ns_rca dut8 (.x(x8), .y(y8), .cin(ci8), .sum(s8), .cout(co8));
  ns_rca #(.WIDTH(16)) dut16 (.x(x16), .y(y16), .cin(ci16), .sum(s16), .cout(co16));

  task automatic check16(input logic [15:0] xv, input logic [15:0] yv, input logic cv);
    int unsigned expected;
    x16 = xv; y16 = yv; ci16 = cv;
    #1;
    expected = int'(xv) + int'(yv) + int'(cv);
    checks++;
    if ({co16, s16} !== 17'(expected)) begin
      failures++;
      $display("FAIL 16-bit %0d + %0d + %0d: got %0d", xv, yv, cv, {co16, s16});
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        for (int k = 0; k < 2; k++) begin
          x8 = 8'(i); y8 = 8'(j); ci8 = 1'(k);
          #1;
          checks++;
          if ({co8, s8} !== 9'(i + j + k)) begin
            failures++;
            if (failures < 10)
              $display("FAIL 8-bit %0d + %0d + %0d: got %0d", i, j, k, {co8, s8});
          end
        end
      end
    end
    check16(16'hFFFF, 16'h0000, 1'b1);
    check16(16'hFFFF, 16'hFFFF, 1'b1);
    check16(16'h8000, 16'h8000, 1'b0);
    check16(16'h0000, 16'h0000, 1'b0);
    for (int n = 0; n < 20000; n++)
      check16(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
