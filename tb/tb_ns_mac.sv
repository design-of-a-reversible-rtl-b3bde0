// tb_ns_mac -- end-to-end self-checking test of the NS-gate
// multiply-accumulate unit at its default (and only) size.
//
// 1. After reset the sum is zero.
// 2. The published example: a = 51, b = 30 accumulated on two clock edges
//    gives 1530 and then 3060.
// 3. Thousands of random cycles with random operands, enable and clear,
//    compared with a model accumulator (integer multiply and add, modulo
//    2^16). Before each edge the sum must still hold the old value and after
//    it the new one: one clock edge of latency. The product output is
//    compared with a * b every cycle.
// The testbench counts how often each mechanism occurred (accumulate, hold
// with en low, synchronous clear, asynchronous reset, wrap-around past
// 2^16) and counts a failure for any that never did. A watchdog ends the
// run if it stalls.
module tb_ns_mac;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int n_accumulate = 0, n_hold = 0, n_clear = 0, n_reset = 0, n_wrap = 0;

  logic        rst_n, clr, en;
  logic [7:0]  a, b;
  logic [15:0] product, acc;
  logic [15:0] model;

  ns_mac dut (
    .clk(clk), .rst_n(rst_n), .clr(clr), .en(en),
    .a(a), .b(b), .product(product), .acc(acc)
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_acc(input logic [15:0] value, input string what);
    checks++;
    if (acc !== value) begin
      failures++;
      $display("FAIL %s: acc=%0d expected %0d", what, acc, value);
    end
  endtask

  task automatic expect_mechanism(input int count, input string what);
    checks++;
    $display("%s: %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  // One clock cycle: drive on the falling edge, check before and after the
  // rising edge.
  task automatic cycle(input logic clr_v, input logic en_v, input logic [7:0] a_v, input logic [7:0] b_v);
    int unsigned next;
    @(negedge clk);
    clr = clr_v; en = en_v; a = a_v; b = b_v;
    #1;
    checks++;
    if (product !== 16'(int'(a_v) * int'(b_v))) begin
      failures++;
      $display("FAIL product %0d * %0d = %0d", a_v, b_v, product);
    end
    expect_acc(model, "before edge");
    next = int'(model) + int'(a_v) * int'(b_v);
    if (clr_v) begin
      model = '0;
      n_clear++;
    end else if (en_v) begin
      model = 16'(next);
      n_accumulate++;
      if (next > 32'hFFFF) n_wrap++;
    end else begin
      n_hold++;
    end
    @(posedge clk);
    #1;
    expect_acc(model, "after edge");
  endtask

  initial begin
    rst_n = 1'b0; clr = 1'b0; en = 1'b0; a = '0; b = '0;
    model = '0;
    #12;
    expect_acc(16'd0, "reset");
    n_reset++;
    rst_n = 1'b1;

    // Published example.
    cycle(1'b0, 1'b1, 8'd51, 8'd30);
    expect_acc(16'd1530, "51*30 once");
    cycle(1'b0, 1'b1, 8'd51, 8'd30);
    expect_acc(16'd3060, "51*30 twice");

    // Random operation.
    for (int n = 0; n < 6000; n++) begin
      cycle(($urandom % 40) == 0, ($urandom % 4) != 0, 8'($urandom), 8'($urandom));
      if (n == 3000) begin
        @(negedge clk);
        rst_n = 1'b0;
        #1;
        model = '0;
        expect_acc(16'd0, "asynchronous reset");
        n_reset++;
        @(negedge clk);
        rst_n = 1'b1;
      end
    end

    expect_mechanism(n_accumulate, "accumulate");
    expect_mechanism(n_hold, "hold");
    expect_mechanism(n_clear, "clear");
    expect_mechanism(n_reset, "reset");
    expect_mechanism(n_wrap, "wrap-around");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
