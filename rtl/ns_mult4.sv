// ns_mult4 -- 4x4 unsigned array multiplier built only from NS gates.
//
// Each of the 16 partial-product bits a[j] & b[i] is one ns_gate with
// a = 0 and d = 0, whose output 2 is then b & c. The four partial-product
// rows are summed by three 4-bit NS-gate ripple-carry adders in the usual
// array arrangement: after row i is added, the lowest bit of the running sum
// is product bit i and the rest, with the adder's carry-out on top, is shifted
// down to meet row i+1. The last adder gives product bits 7..4.
//
// The design description gives only the function of this block (a "4 bit NS
// multiplier" made of NS gates); the array arrangement is this design's own
// choice. Purely combinational.
module ns_mult4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);

  // pp[i][j] = a[j] & b[i]
  logic [3:0] pp [4];
  logic [3:0] xor_unused [4];
  logic [7:0] o3_o4_unused [4];

  for (genvar i = 0; i < 4; i++) begin : g_row
    for (genvar j = 0; j < 4; j++) begin : g_col
      ns_gate u_and (
        .d (1'b0),
        .c (b[i]),
        .b (a[j]),
        .a (1'b0),
        .o1(xor_unused[i][j]),
        .o2(pp[i][j]),
        .o3(o3_o4_unused[i][2*j]),
        .o4(o3_o4_unused[i][2*j+1])
      );
    end
  end

  // acc[k] holds the upper bits carried into row k+1's addition.
  logic [3:0] acc [4];
  logic [3:0] row_sum [1:3];
  logic       row_cout [1:3];

  assign acc[0] = {1'b0, pp[0][3:1]};
  assign p[0]   = pp[0][0];

  for (genvar i = 1; i < 4; i++) begin : g_add
    ns_rca #(.WIDTH(4)) u_rca (
      .x   (pp[i]),
      .y   (acc[i-1]),
      .cin (1'b0),
      .sum (row_sum[i]),
      .cout(row_cout[i])
    );
    assign p[i]   = row_sum[i][0];
    assign acc[i] = {row_cout[i], row_sum[i][3:1]};
  end

  assign p[7:4] = acc[3];

endmodule
