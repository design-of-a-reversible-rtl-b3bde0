// ns_mult8 -- 8x8 unsigned multiplier made of four 4x4 NS multipliers and
// three 8-bit NS-gate ripple-carry adders.
//
// Split each operand into nibbles, A = {AH, AL} and B = {BH, BL}. Then
//   A*B = (AH*BH) << 8 + (AH*BL + AL*BH) << 4 + AL*BL.
// Four ns_mult4 blocks form q3 = AH*BH, q1 = AL*BH, q2 = AH*BL and
// q0 = AL*BL, each 8 bits wide. The result is assembled in three adders:
//   * adder 1 adds the two middle terms, q1 + q2, giving an 8-bit sum s1 and
//     a carry c1;
//   * adder 2 adds the upper nibble of q0 to s1. Its low nibble is product
//     bits 7..4; q0's low nibble is product bits 3..0 directly;
//   * adder 3 adds q3 to the high nibble of adder 2 with the carry of the
//     middle terms at bit 4, giving product bits 15..8.
// The arrangement, the nibble split and the widths of the buses between the
// blocks follow the design's multiplier diagram. That diagram carries only
// c1 into adder 3; adder 2 can also carry out (for example when s1 is near
// 255), and since c1 and adder 2's carry can never both be 1, this design
// merges them with one more NS gate used as an exclusive-OR (a = 0, d = 0,
// output 1 = b ^ c) so that the product is exact for every operand pair.
// Purely combinational.
module ns_mult8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);

  logic [7:0] q0, q1, q2, q3;

  ns_mult4 u_m_ll (.a(a[3:0]), .b(b[3:0]), .p(q0));
  ns_mult4 u_m_lh (.a(a[3:0]), .b(b[7:4]), .p(q1));
  ns_mult4 u_m_hl (.a(a[7:4]), .b(b[3:0]), .p(q2));
  ns_mult4 u_m_hh (.a(a[7:4]), .b(b[7:4]), .p(q3));

  // Adder 1: middle terms.
  logic [7:0] s1;
  logic       c1;
  ns_rca #(.WIDTH(8)) u_add_mid (
    .x(q1), .y(q2), .cin(1'b0), .sum(s1), .cout(c1)
  );

  // Adder 2: middle sum plus the upper nibble of the low term.
  logic [7:0] s2;
  logic       c2;
  ns_rca #(.WIDTH(8)) u_add_low (
    .x(s1), .y({4'b0000, q0[7:4]}), .cin(1'b0), .sum(s2), .cout(c2)
  );

  // Merge the two mutually exclusive carries of weight 2^12.
  logic c12;
  logic [2:0] merge_unused;
  ns_gate u_merge (
    .d(1'b0), .c(c2), .b(c1), .a(1'b0),
    .o1(c12), .o2(merge_unused[0]), .o3(merge_unused[1]), .o4(merge_unused[2])
  );

  // Adder 3: high term plus everything carried up from the middle.
  logic [7:0] s3;
  logic       c3_unused;
  ns_rca #(.WIDTH(8)) u_add_high (
    .x(q3), .y({3'b000, c12, s2[7:4]}), .cin(1'b0), .sum(s3), .cout(c3_unused)
  );

  assign p = {s3, s2[3:0], q0[3:0]};

endmodule
