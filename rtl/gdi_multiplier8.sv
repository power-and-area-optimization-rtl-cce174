// gdi_multiplier8 - 8-bit Booth / Wallace multiplier built from GDI cells.
//
// MD (multiplicand) is negated by the two's complement generator; MR
// (multiplier) is radix-2 Booth recoded into x/z control pairs; the partial
// product generator picks MD, -MD or 0 for each of the WIDTH digits and
// sign-extends each to 2*WIDTH-1 bits; the Wallace tree adds them into the
// 2*WIDTH-bit product. This four-block structure, the 8-bit size and the
// 15-bit sign-extended partial products follow the multiplier's description.
// Every gate in the datapath is a GDI cell (a 2:1 mux in logic).
//
// Operands and product are two's complement. -MD is kept at WIDTH bits, so
// md = -2^(WIDTH-1) (-128) cannot be negated and is outside the valid range:
// md in -127..127, mr in -128..127. Over that range the product is exact.
//
// Interface: md, mr in (WIDTH bits); product out (2*WIDTH bits).
// Purely combinational: no clock or reset; the result is valid one
// propagation delay after the operands settle.
module gdi_multiplier8 #(
  parameter int WIDTH = 8
) (
  input  logic [WIDTH-1:0]   md,
  input  logic [WIDTH-1:0]   mr,
  output logic [2*WIDTH-1:0] product
);
  logic [WIDTH-1:0]              neg_md;
  logic [WIDTH-1:0]              x, z;
  logic [WIDTH-1:0][2*WIDTH-2:0] pp;

  twos_complement #(.WIDTH(WIDTH)) u_twos (.md(md), .neg_md(neg_md));

  booth_encoder #(.WIDTH(WIDTH)) u_booth (.mr(mr), .x(x), .z(z));

  partial_product_generator #(.WIDTH(WIDTH)) u_ppg (
    .md(md), .neg_md(neg_md), .x(x), .z(z), .pp(pp)
  );

  wallace_tree_adder #(.WIDTH(WIDTH)) u_wallace (.pp(pp), .product(product));
endmodule
