// tb_multiplier_widths - the multiplier at widths other than its default 8.
// For WIDTH = 3 .. 7 every pair md in -(2^(W-1)-1) .. 2^(W-1)-1 and every mr is
// multiplied and compared with the integer product. This checks that the
// Booth encoder, the partial product generator and the Wallace tree netlist
// (which is derived from WIDTH while elaborating) stay correct when resized.
module tb_multiplier_widths;
  int checks = 0, failures = 0;
  int done = 0;

  for (genvar W = 3; W <= 7; W++) begin : g_w
    logic [W-1:0]   md, mr;
    logic [2*W-1:0] product;

    gdi_multiplier8 #(.WIDTH(W)) dut (.md(md), .mr(mr), .product(product));

    initial begin
      // widths run one after another, none at time 0
      #((W - 3) * 100000 + 1);
      for (int a = -(2**(W-1)) + 1; a < 2**(W-1); a++)
        for (int b = -(2**(W-1)); b < 2**(W-1); b++) begin
          md = W'(a);
          mr = W'(b);
          #1;
          checks++;
          if (product !== (2*W)'(a * b)) begin
            failures++;
            $display("FAIL W=%0d md=%0d mr=%0d product=%0d", W, a, b, $signed(product));
          end
        end
      done++;
    end
  end

  initial begin
    wait (done == 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
