// booth_encoder - radix-2 Booth recoding of the multiplier MR.
//
// Bit pair (MR[i], MR[i-1]), with MR[-1] = 0, selects the digit of partial
// product i:  00 -> 0, 01 -> +MD, 10 -> -MD, 11 -> 0.
// Two control signals per digit drive the partial product generator:
//   x[i] = MR[i] ^ MR[i-1]          digit is non-zero
//   z[i] = MR[i] & ~MR[i-1]         digit is negative (select -MD)
// x and z, one pair per MR bit, and the XOR / inverter / AND make-up follow the
// multiplier's description; the exact equations are this design's choice.
// Each gate is a GDI cell (XOR as mux with inverted input, AND as G=a,P=0,N=b).
// MR is two's complement, so WIDTH digits cover its whole range.
//
// Interface: mr in (WIDTH bits); x, z out (WIDTH bits each). Combinational.
module booth_encoder #(
  parameter int WIDTH = 8
) (
  input  logic [WIDTH-1:0] mr,
  output logic [WIDTH-1:0] x,
  output logic [WIDTH-1:0] z
);
  logic [WIDTH-1:0] mr_ext;   // mr_ext[i] = MR[i-1], mr_ext[0] = 0
  logic [WIDTH-1:0] prev_n;

  assign mr_ext = {mr[WIDTH-2:0], 1'b0};

  for (genvar i = 0; i < WIDTH; i++) begin : g_digit
    gdi_cell u_inv (.g(mr_ext[i]), .p(1'b1), .n(1'b0), .out(prev_n[i]));
    // x = MR[i] ^ MR[i-1]
    gdi_cell u_xor (.g(mr[i]), .p(mr_ext[i]), .n(prev_n[i]), .out(x[i]));
    // z = MR[i] & ~MR[i-1]
    gdi_cell u_and (.g(mr[i]), .p(1'b0), .n(prev_n[i]), .out(z[i]));
  end
endmodule
