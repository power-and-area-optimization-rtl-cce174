// gdi_full_adder - one-bit full adder made of five GDI cells (ten transistors).
//
// The ten-transistor count matches the 10T GDI full adder this multiplier is
// built around. The arrangement of the five cells is this design's own:
//   b_n   = ~b                     (GDI inverter: G=b,   P=1,    N=0)
//   p     = a ^ b                  (GDI mux:      G=a,   P=b,    N=b_n)
//   cin_n = ~cin                   (GDI inverter: G=cin, P=1,    N=0)
//   sum   = p ? ~cin : cin         (GDI mux:      G=p,   P=cin,  N=cin_n)
//   cout  = p ?  cin : a           (GDI mux:      G=p,   P=a,    N=cin)
// When a and b differ the carry equals cin, otherwise it equals a (= b).
//
// Interface: a, b, cin in; sum, cout out. Combinational.
module gdi_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic b_n, cin_n, p;

  gdi_cell u_inv_b   (.g(b),   .p(1'b1), .n(1'b0),  .out(b_n));
  gdi_cell u_xor_ab  (.g(a),   .p(b),    .n(b_n),   .out(p));
  gdi_cell u_inv_cin (.g(cin), .p(1'b1), .n(1'b0),  .out(cin_n));
  gdi_cell u_sum     (.g(p),   .p(cin),  .n(cin_n), .out(sum));
  gdi_cell u_carry   (.g(p),   .p(a),    .n(cin),   .out(cout));
endmodule
