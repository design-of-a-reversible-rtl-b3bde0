// ns_pkg -- widths shared by the NS-gate multiply-accumulate unit.
//
// The unit multiplies two 8-bit unsigned operands and accumulates the
// 16-bit products in a 16-bit register; both widths come from the design
// description (8-bit operands, 16-bit adder and 16-bit PIPO register).
package ns_pkg;

  // Width of each multiplier operand A and B.
  localparam int unsigned OPERAND_W = 8;

  // Width of the product, of the accumulating adder and of the register.
  localparam int unsigned ACC_W = 2 * OPERAND_W;

endpackage
