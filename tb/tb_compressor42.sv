// tb_compressor42: exhaustive check of the exact 4-2 compressor.
// For all 32 input combinations it checks the counting identity
//   x[0]+x[1]+x[2]+x[3]+cin == sum + 2*(carry+cout)
// and that cout does not depend on cin (the property that keeps a chained
// row of compressors free of a rippling carry).
module tb_compressor42;
  logic [3:0] x;
  logic       cin, sum, carry, cout;
  int checks = 0, failures = 0;

  compressor42 dut (.x(x), .cin(cin), .sum(sum), .carry(carry), .cout(cout));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic cout_cin0;
    int   ones;
    for (int v = 0; v < 16; v++) begin
      for (int c = 0; c < 2; c++) begin
        x   = 4'(v);
        cin = 1'(c);
        #1;
        ones = int'(x[0]) + int'(x[1]) + int'(x[2]) + int'(x[3]) + c;
        checks++;
        if (int'(sum) + 2 * (int'(carry) + int'(cout)) != ones) begin
          failures++;
          $display("FAIL x=%b cin=%0b -> sum=%0b carry=%0b cout=%0b", x, cin, sum, carry, cout);
        end
        if (c == 0) cout_cin0 = cout;
        else begin
          checks++;
          if (cout != cout_cin0) begin
            failures++;
            $display("FAIL cout depends on cin for x=%b", x);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
