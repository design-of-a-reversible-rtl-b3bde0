// ns_rca -- WIDTH-bit ripple-carry adder whose full-adder cells are NS gates.
//
// Bit i is one ns_gate with its constant input a tied to 0, b = x[i],
// c = y[i] and d = the carry into bit i; output 1 is sum[i] and output 2 the
// carry into bit i+1 (see ns_gate for why this gives a full adder). The
// carry ripples from cin at bit 0 to cout at the top. Outputs 3 and 4 of
// every cell are garbage and are collected in a local vector that drives
// nothing.
//
// The ripple-carry structure and the use of NS gates follow the design
// description; it is used as the 8-bit adders inside the 8x8 multiplier and
// as the 16-bit accumulating adder. Purely combinational: the delay is WIDTH
// gate delays along the carry chain.
module ns_rca #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH:0]     carry;
  logic [2*WIDTH-1:0] garbage_unused;

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    ns_gate u_fa (
      .d (carry[i]),
      .c (y[i]),
      .b (x[i]),
      .a (1'b0),
      .o1(sum[i]),
      .o2(carry[i+1]),
      .o3(garbage_unused[2*i]),
      .o4(garbage_unused[2*i+1])
    );
  end

  assign cout = carry[WIDTH];

endmodule
