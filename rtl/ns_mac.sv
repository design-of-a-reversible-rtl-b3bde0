// ns_mac -- multiply-accumulate unit built from NS gates.
//
// Every clock edge with en high adds the product of the 8-bit unsigned
// operands a and b to a 16-bit running sum:
//
//      a, b --> ns_mult8 --product--> ns_rca (16 bit) --> pipo_reg --> acc
//                                        ^                     |
//                                        +------ acc ----------+
//
// The 8x8 multiplier, the 16-bit ripple-carry adder and the 16-bit PIPO
// register, with the register's output fed back as the adder's second input,
// follow the design description. The sum wraps modulo 2^16 (the adder's
// carry-out is dropped, as the description shows no carry output).
//
// Interface and timing (this design's own choices): rst_n is an
// asynchronous active-low reset and clr a synchronous clear, both emptying
// the register; with en low the sum holds. The multiply and the add are
// combinational, so a product is in acc one clock edge after a and b are
// presented with en high. product shows the current multiplier output.
module ns_mac
  import ns_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  logic                 en,
  input  logic [OPERAND_W-1:0] a,
  input  logic [OPERAND_W-1:0] b,
  output logic [ACC_W-1:0]     product,
  output logic [ACC_W-1:0]     acc
);

  logic [ACC_W-1:0] next_acc;
  logic             carry_unused;

  ns_mult8 u_mult (.a(a), .b(b), .p(product));

  ns_rca #(.WIDTH(ACC_W)) u_adder (
    .x(product), .y(acc), .cin(1'b0), .sum(next_acc), .cout(carry_unused)
  );

  pipo_reg #(.WIDTH(ACC_W)) u_reg (
    .clk(clk), .rst_n(rst_n), .clr(clr), .load(en), .d(next_acc), .q(acc)
  );

endmodule
