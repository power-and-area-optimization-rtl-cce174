// twos_complement - negates the multiplicand: neg_md = ~md + 1.
//
// WIDTH GDI inverters form ~md, then a ripple chain of WIDTH half adders adds
// the +1 (carry into bit 0 is a constant 1). The carry out of the top bit is
// dropped, so neg_md has the same WIDTH as md, as in the multiplier this
// generator feeds: the most negative md (-2^(WIDTH-1)) maps onto itself.
// Inverters-plus-half-adders follows the multiplier's description; WIDTH = 8
// is its operand size.
//
// Interface: md in, neg_md out, both WIDTH bits two's complement.
// Combinational; the critical path is the WIDTH-long half-adder carry chain.
module twos_complement #(
  parameter int WIDTH = 8
) (
  input  logic [WIDTH-1:0] md,
  output logic [WIDTH-1:0] neg_md
);
  logic [WIDTH-1:0] md_n;
  logic [WIDTH:0]   carry;

  assign carry[0] = 1'b1;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    gdi_cell u_inv (.g(md[i]), .p(1'b1), .n(1'b0), .out(md_n[i]));
    gdi_half_adder u_ha (.a(md_n[i]), .b(carry[i]), .sum(neg_md[i]), .cout(carry[i+1]));
  end
endmodule
