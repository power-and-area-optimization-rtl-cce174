// tb_partial_product_generator - for every 8-bit md and several random x/z
// control words, each 15-bit partial product must be the sign extension of
// md, -md or 0 as the digit's (x, z) pair selects. z with x low must give 0.
module tb_partial_product_generator;
  localparam int WIDTH = 8;
  localparam int PPW   = 2*WIDTH - 1;
  logic [WIDTH-1:0] md, neg_md, x, z;
  logic [WIDTH-1:0][PPW-1:0] pp;
  int checks = 0, failures = 0;

  partial_product_generator dut (
    .md(md), .neg_md(neg_md), .x(x), .z(z), .pp(pp)
  );

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2**WIDTH; v++) begin
      for (int r = 0; r < 6; r++) begin
        md     = WIDTH'(v);
        neg_md = WIDTH'(-v);
        x      = WIDTH'($urandom);
        z      = WIDTH'($urandom);
        #1;
        for (int i = 0; i < WIDTH; i++) begin
          int sel;
          sel = !x[i] ? 0 : (z[i] ? -int'($signed(md)) : int'($signed(md)));
          // -md wraps at 8 bits exactly like the generator's input
          sel = int'($signed(WIDTH'(sel)));
          checks++;
          if (pp[i] !== PPW'(sel)) begin
            failures++;
            $display("FAIL md=%0d x=%b z=%b pp%0d=%h exp=%h", $signed(md), x[i], z[i], i, pp[i], PPW'(sel));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
