// pipo_reg -- WIDTH-bit parallel-in, parallel-out register.
//
// All bits are loaded together on a rising clock edge when load is high and
// all are visible together on q; with load low the register holds. clr
// (synchronous, active high, takes priority over load) empties it and rst_n
// (asynchronous, active low) resets it to zero. In the multiply-accumulate
// unit it holds the running sum, which is both the unit's output and the
// adder's second operand.
//
// The parallel-in, parallel-out behaviour and the 16-bit width follow the
// design description; the load enable, the clear and the reset are this
// design's own choices. q changes one clock edge after d is presented.
module pipo_reg #(
  parameter int unsigned WIDTH = ns_pkg::ACC_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (clr)   q <= '0;
    else if (load)  q <= d;
  end

endmodule
