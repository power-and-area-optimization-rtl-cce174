// partial_product_generator - forms the Booth partial products.
//
// For each Booth digit i the generator selects MD, -MD or zero:
//   pp[i][j] = x[i] & (z[i] ? neg_md[j] : md[j])     for j < WIDTH
// using one GDI mux cell (G=z, P=md, N=neg_md) and one GDI AND cell
// (G=x, P=0, N=mux) per bit. Each WIDTH-bit set is then sign-extended by
// WIDTH-1 copies of its top bit to 2*WIDTH-1 bits, so 8 sets of 15 bits,
// 120 bits in all, leave the block - as in the multiplier's description.
// The sets are not shifted here: pp[i] carries weight 2^i, which the Wallace
// tree applies by its column wiring.
//
// Interface: md, neg_md, x, z in (WIDTH bits each); pp out,
// WIDTH sets of 2*WIDTH-1 bits. Combinational.
module partial_product_generator #(
  parameter int WIDTH = 8,
  localparam int PPW  = 2*WIDTH - 1
) (
  input  logic [WIDTH-1:0] md,
  input  logic [WIDTH-1:0] neg_md,
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] z,
  output logic [WIDTH-1:0][PPW-1:0] pp
);
  for (genvar i = 0; i < WIDTH; i++) begin : g_set
    logic [WIDTH-1:0] sel;
    logic [WIDTH-1:0] bits;
    for (genvar j = 0; j < WIDTH; j++) begin : g_bit
      gdi_cell u_mux (.g(z[i]), .p(md[j]), .n(neg_md[j]), .out(sel[j]));
      gdi_cell u_and (.g(x[i]), .p(1'b0),  .n(sel[j]),    .out(bits[j]));
    end
    // MSB sign extension by WIDTH-1 bits
    assign pp[i] = {{(WIDTH-1){bits[WIDTH-1]}}, bits};
  end
endmodule
