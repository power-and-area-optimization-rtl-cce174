// tb_twos_complement - exhaustive check of the negator at the default 8 bits:
// for every md, neg_md must equal (0 - md) modulo 2^8, and md + neg_md == 0.
module tb_twos_complement;
  localparam int WIDTH = 8;
  logic [WIDTH-1:0] md, neg_md;
  int checks = 0, failures = 0;

  twos_complement dut (.md(md), .neg_md(neg_md));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2**WIDTH; v++) begin
      md = WIDTH'(v);
      #1;
      checks++;
      if (neg_md !== WIDTH'((2**WIDTH - v) % 2**WIDTH) || WIDTH'(md + neg_md) !== '0) begin
        failures++;
        $display("FAIL md=%0d neg_md=%0d", md, neg_md);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
