// tb_booth_encoder - exhaustive check of the radix-2 Booth recoder.
// For every 8-bit mr: x and z must match the digit table (pair 01 -> +1,
// 10 -> -1, 00/11 -> 0), and the digits weighted by 2^i must add up to mr
// read as a two's complement number.
module tb_booth_encoder;
  localparam int WIDTH = 8;
  logic [WIDTH-1:0] mr, x, z;
  int checks = 0, failures = 0;

  booth_encoder dut (.mr(mr), .x(x), .z(z));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2**WIDTH; v++) begin
      int total;
      mr = WIDTH'(v);
      #1;
      total = 0;
      for (int i = 0; i < WIDTH; i++) begin
        logic cur, prev;
        int   digit;
        cur   = mr[i];
        prev  = (i == 0) ? 1'b0 : mr[i-1];
        digit = int'(prev) - int'(cur);       // Booth digit of pair (cur, prev)
        checks++;
        if (x[i] !== (digit != 0) || z[i] !== (digit < 0)) begin
          failures++;
          $display("FAIL mr=%b digit %0d: x=%b z=%b", mr, i, x[i], z[i]);
        end
        total += (x[i] ? (z[i] ? -1 : 1) : 0) * (2**i);
      end
      checks++;
      if (total != int'($signed(mr))) begin
        failures++;
        $display("FAIL mr=%0d recodes to %0d", $signed(mr), total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
