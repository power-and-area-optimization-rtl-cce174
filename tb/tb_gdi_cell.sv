// tb_gdi_cell - exhaustive check of the GDI cell's logic function.
// Drives all eight (g, p, n) combinations and compares out with g ? n : p,
// then checks the gate rows of the GDI function table (A'B, A'+B, A+B, AB,
// A'B+AC, A') for every A, B, C, each written independently as a gate equation.
module tb_gdi_cell;
  logic g, p, n, out;
  int checks = 0, failures = 0;

  gdi_cell dut (.g(g), .p(p), .n(n), .out(out));

  task automatic check(input logic exp, input string what);
    checks++;
    if (out !== exp) begin
      failures++;
      $display("FAIL %s: g=%b p=%b n=%b out=%b exp=%b", what, g, p, n, out, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {g, p, n} = 3'(v);
      #1 check((g & n) | (~g & p), "mux");
    end
    for (int v = 0; v < 8; v++) begin
      logic a, b, c;
      {a, b, c} = 3'(v);
      g = a;
      n = 1'b0; p = b;    #1 check(~a & b, "A'B");
      n = b;    p = 1'b1; #1 check(~a | b, "A'+B");
      n = 1'b1; p = b;    #1 check(a | b, "A+B");
      n = b;    p = 1'b0; #1 check(a & b, "AB");
      n = c;    p = b;    #1 check((~a & b) | (a & c), "A'B+AC");
      n = 1'b0; p = 1'b1; #1 check(~a, "A'");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
