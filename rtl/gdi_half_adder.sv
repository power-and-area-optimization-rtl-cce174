// gdi_half_adder - one-bit half adder made of three GDI cells.
//
// sum  = a ^ b : GDI cell with G=a, P=b, N=~b (the ~b from a GDI inverter)
// cout = a & b : GDI cell with G=a, P=0, N=b
// The half adder is used in the two's complement generator and in the
// Wallace tree; its cell-level arrangement here is this design's own choice,
// built only from the GDI functions listed in gdi_cell.
//
// Interface: a, b in; sum, cout out. Combinational.
module gdi_half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic cout
);
  logic b_n;

  gdi_cell u_inv_b (.g(b), .p(1'b1), .n(1'b0), .out(b_n));
  gdi_cell u_xor   (.g(a), .p(b),    .n(b_n),  .out(sum));
  gdi_cell u_and   (.g(a), .p(1'b0), .n(b),    .out(cout));
endmodule
