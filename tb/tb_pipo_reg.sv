// tb_pipo_reg -- self-checking test of the PIPO register.
//
// Drives random load, clear and data for many cycles, with two asynchronous
// resets in between, and compares q after every clock edge with a model
// register kept in the testbench: reset and clear give zero, load takes all
// bits of d in one edge, otherwise q holds. A watchdog ends the run if it
// stalls.
module tb_pipo_reg;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic        rst_n, clr, load;
  logic [15:0] d, q, model;

  pipo_reg dut (.clk(clk), .rst_n(rst_n), .clr(clr), .load(load), .d(d), .q(q));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string what);
    checks++;
    if (q !== model) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, model);
    end
  endtask

  initial begin
    clr = 1'b0; load = 1'b0; d = '0;
    rst_n = 1'b0;
    #12;
    model = '0;
    compare("reset");
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      clr  = ($urandom % 8) == 0;
      load = ($urandom % 2) == 0;
      d    = 16'($urandom);
      if (clr)       model = '0;
      else if (load) model = d;
      @(posedge clk);
      #1;
      compare("cycle");
      if (n == 700 || n == 1400) begin
        // Asynchronous reset between edges.
        #2 rst_n = 1'b0;
        #1;
        model = '0;
        compare("async reset");
        @(negedge clk);
        rst_n = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
