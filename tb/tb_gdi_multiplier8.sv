// tb_gdi_multiplier8 - end-to-end test of the 8-bit GDI Booth multiplier at
// its default size (no parameter override).
// Every pair md in -127..127, mr in -128..127 (65,280 products) is compared
// with the integer product. Alongside it the test counts, from the operands
// alone, how often each mechanism of the datapath was exercised: Booth digits
// selecting +MD, -MD and 0, a negative partial product that needs sign
// extension, a partial product with non-zero bits above column 14 (the bits
// the tree leaves out), negative, positive and zero products, and the largest
// magnitude products. A mechanism that never occurs counts as a failure.
module tb_gdi_multiplier8;
  localparam int WIDTH = 8;
  localparam int PPW   = 2*WIDTH - 1;
  logic [WIDTH-1:0]   md, mr;
  logic [2*WIDTH-1:0] product;
  int checks = 0, failures = 0;
  int n_pos_digit = 0, n_neg_digit = 0, n_zero_digit = 0, n_neg_pp = 0;
  int n_upper_bits = 0, n_neg_prod = 0, n_pos_prod = 0, n_zero_prod = 0, n_extreme = 0;

  gdi_multiplier8 dut (.md(md), .mr(mr), .product(product));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic need(input int count, input string what);
    checks++;
    $display("  %-34s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    for (int a = -127; a <= 127; a++) begin
      for (int b = -128; b <= 127; b++) begin
        int exp;
        md = WIDTH'(a);
        mr = WIDTH'(b);
        #1;
        exp = a * b;
        checks++;
        if (product !== (2*WIDTH)'(exp)) begin
          failures++;
          if (failures < 20)
            $display("FAIL md=%0d mr=%0d product=%0d expected %0d", a, b, $signed(product), exp);
        end
        // coverage from the operands
        for (int i = 0; i < WIDTH; i++) begin
          int d, ppv;
          d = int'((i == 0) ? 1'b0 : mr[i-1]) - int'(mr[i]);
          ppv = d * a;
          if (d > 0) n_pos_digit++;
          else if (d < 0) n_neg_digit++;
          else n_zero_digit++;
          if (ppv < 0) n_neg_pp++;
          // bits of the 15-bit set that land in columns 15 and above
          if (i > 0 && ((PPW'(ppv) >> (2*WIDTH - 1 - i)) != 0)) n_upper_bits++;
        end
        if (exp < 0) n_neg_prod++;
        else if (exp > 0) n_pos_prod++;
        else n_zero_prod++;
        if (exp == 127*128 || exp == -127*128) n_extreme++;
      end
    end
    $display("mechanisms exercised:");
    need(n_pos_digit,  "Booth digit +1 (select MD)");
    need(n_neg_digit,  "Booth digit -1 (select -MD)");
    need(n_zero_digit, "Booth digit 0 (select 0)");
    need(n_neg_pp,     "negative partial product");
    need(n_upper_bits, "bits dropped above column 14");
    need(n_neg_prod,   "negative product");
    need(n_pos_prod,   "positive product");
    need(n_zero_prod,  "zero product");
    need(n_extreme,    "largest-magnitude product");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
