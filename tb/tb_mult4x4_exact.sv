// tb_mult4x4_exact: checks the 4x4 exact-compressor multiplier. First the
// published example x = 1001, t = 0001 -> y = 00001001, then all 256 operand
// pairs against integer multiplication.
module tb_mult4x4_exact;
  logic [3:0] x, t;
  logic [7:0] y;
  int checks = 0, failures = 0;

  mult4x4_exact dut (.x(x), .t(t), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = 4'b1001; t = 4'b0001;
    #1;
    checks++;
    if (y != 8'b0000_1001) begin
      failures++;
      $display("FAIL example: y=%b", y);
    end
    for (int v = 0; v < 256; v++) begin
      {x, t} = 8'(v);
      #1;
      checks++;
      if (y != 8'(x) * 8'(t)) begin
        failures++;
        $display("FAIL %0d * %0d -> %0d", x, t, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
