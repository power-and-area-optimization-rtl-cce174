// tb_wallace_tree_adder - random 15-bit partial product sets through the tree.
// The low 15 product bits must equal sum(pp[i] * 2^i) modulo 2^15, and bit 15
// must repeat bit 14. Bits of pp that fall above column 14 may hold anything,
// so they are randomised too. Directed sets check all-zero and all-ones rows.
module tb_wallace_tree_adder;
  localparam int WIDTH = 8;
  localparam int PPW   = 2*WIDTH - 1;
  logic [WIDTH-1:0][PPW-1:0] pp;
  logic [2*WIDTH-1:0]        product;
  int checks = 0, failures = 0;

  wallace_tree_adder dut (.pp(pp), .product(product));

  task automatic check();
    longint sum;
    logic [PPW-1:0] low;
    sum = 0;
    for (int i = 0; i < WIDTH; i++) sum += longint'(pp[i]) << i;
    low = PPW'(sum);
    checks++;
    if (product[PPW-1:0] !== low || product[2*WIDTH-1] !== product[2*WIDTH-2]) begin
      failures++;
      $display("FAIL pp=%h product=%h expected low bits %h", pp, product, low);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pp = '0;  #1 check();
    pp = '1;  #1 check();
    for (int i = 0; i < WIDTH; i++) begin
      pp = '0;
      pp[i] = '1;
      #1 check();
    end
    for (int t = 0; t < 20000; t++) begin
      for (int i = 0; i < WIDTH; i++) pp[i] = PPW'($urandom);
      #1 check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
