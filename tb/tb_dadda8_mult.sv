// tb_dadda8_mult: exhaustive check of the 8x8 Dadda multiplier: all 65536
// operand pairs, product compared with integer multiplication.
// It also reports the usual accuracy metrics of approximate multipliers over
// all pairs: error distance ED = |p - a*b|, its mean (MED), MED normalised
// by the largest product (NED) and the mean relative error distance (MRED,
// over pairs with a nonzero product). With exact compressors all must be 0.
module tb_dadda8_mult;
  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;

  dadda8_mult dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ed_sum, red_sum, med, ned, mred;
    int  nonzero;
    ed_sum = 0.0; red_sum = 0.0; nonzero = 0;
    for (int v = 0; v < 65536; v++) begin
      {a, b} = 16'(v);
      #1;
      checks++;
      if (p != 16'(a) * 16'(b)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d * %0d -> %0d", a, b, p);
      end
      begin
        int exact, ed;
        exact = int'(a) * int'(b);
        ed    = (int'(p) > exact) ? int'(p) - exact : exact - int'(p);
        ed_sum += real'(ed);
        if (exact != 0) begin
          red_sum += real'(ed) / real'(exact);
          nonzero++;
        end
      end
    end
    med  = ed_sum / 65536.0;
    ned  = med / (255.0 * 255.0);
    mred = red_sum / real'(nonzero);
    $display("MED=%f NED=%e MRED=%e", med, ned, mred);
    checks++;
    if (mred != 0.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
