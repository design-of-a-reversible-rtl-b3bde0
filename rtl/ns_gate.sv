// ns_gate -- the 4-input, 4-output "NS gate" (NSG) from which every
// arithmetic cell of this design is built.
//
// Inputs d, c, b, a are terminals 1 to 4; outputs o1 to o4 are outputs 1
// to 4. The four output equations are those of the gate's definition:
//
//   o1 = b ^ c ^ d
//   o2 = ((a ^ b) ^ d) & c  |  b & (a ^ d)
//   o3 = (~a~b~d | abd) | (ab~c | ~a~bc) | (a~cd | ~ac~d)
//   o4 = ~a
//
// Used with a = 0 the gate is a full adder: o1 is the sum of b, c, d and
// o2 = b&d | c&(b^d) is their majority, the carry. With a = 0 and d = 0 it
// is a half adder / AND gate: o1 = b ^ c and o2 = b & c. o3 and o4 are
// then garbage outputs. (The equations, taken literally, give 12 distinct
// output patterns over the 16 input patterns, so the gate as defined is not
// a bijection; the RTL keeps the equations exactly as defined, and the
// arithmetic here only relies on o1 and o2.)
//
// Purely combinational, no timing of its own.
module ns_gate (
  input  logic d,   // terminal 1
  input  logic c,   // terminal 2
  input  logic b,   // terminal 3
  input  logic a,   // terminal 4
  output logic o1,  // output 1
  output logic o2,  // output 2
  output logic o3,  // output 3
  output logic o4   // output 4
);

  always_comb begin
    o1 = b ^ c ^ d;
    o2 = (((a ^ b) ^ d) & c) | (b & (a ^ d));
    o3 = ((~a & ~b & ~d) | (a & b & d))
       | ((a & b & ~c) | (~a & ~b & c))
       | ((a & ~c & d) | (~a & c & ~d));
    o4 = ~a;
  end

endmodule
