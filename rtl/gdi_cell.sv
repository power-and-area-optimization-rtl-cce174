// gdi_cell - logic view of the Gate Diffusion Input (GDI) basic cell.
//
// A GDI cell is one pMOS and one nMOS transistor whose gates are tied together
// (input G). Unlike a CMOS inverter, the pMOS source (P) and the nMOS source (N)
// are inputs too. With G low the pMOS conducts and Out follows P; with G high
// the nMOS conducts and Out follows N. In logic this is a 2:1 multiplexer,
// Out = G ? N : P, and tying P/N to constants or to other signals yields the
// usual gates:
//   N=0, P=B  -> A'B      N=B, P=1  -> A'+B     N=1, P=B -> A+B
//   N=B, P=0  -> AB       N=C, P=B  -> A'B+AC   N=0, P=1 -> A' (inverter)
// (A is the signal on G.) The cell, its three inputs and this function table
// come from the GDI technique; threshold-voltage drop and drive strength are
// analog effects that a logic model leaves out.
//
// Interface: g, p, n in; out out. Purely combinational, no timing.
module gdi_cell (
  input  logic g,
  input  logic p,
  input  logic n,
  output logic out
);
  always_comb out = g ? n : p;
endmodule
