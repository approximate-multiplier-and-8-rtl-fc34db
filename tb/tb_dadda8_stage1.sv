// tb_dadda8_stage1: checks the first reduction stage for all 65536 operand
// pairs. The partial products are formed here, independently of pp_gen, as
// b[i] & a[j]; the four output rows must add up to a * b (a reduction stage
// must not change the value it carries).
module tb_dadda8_stage1;
  import mult_pkg::*;
  logic [7:0][7:0] pp;
  row16_t [3:0]    row;
  int checks = 0, failures = 0;

  dadda8_stage1 dut (.pp(pp), .row(row));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0]  a, b;
    logic [17:0] total;
    for (int v = 0; v < 65536; v++) begin
      {a, b} = 16'(v);
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) pp[i][j] = a[j] & b[i];
      #1;
      total = 18'(row[0]) + 18'(row[1]) + 18'(row[2]) + 18'(row[3]);
      checks++;
      if (total != 18'(a) * 18'(b)) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d b=%0d rows sum to %0d", a, b, total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
