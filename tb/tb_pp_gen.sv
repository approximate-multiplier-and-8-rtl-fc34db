// tb_pp_gen: checks every partial-product bit of pp_gen, pp[i][j] == b[i]&a[j],
// exhaustively for N = 4 and for 4000 random plus corner operand pairs at the
// default N = 8.
module tb_pp_gen;
  logic [7:0] a8, b8;
  logic [7:0][7:0] pp8;
  logic [3:0] a4, b4;
  logic [3:0][3:0] pp4;
  int checks = 0, failures = 0;

  pp_gen          dut8 (.a(a8), .b(b8), .pp(pp8));
  pp_gen #(.N(4)) dut4 (.a(a4), .b(b4), .pp(pp4));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check8();
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        checks++;
        if (pp8[i][j] != (a8[j] && b8[i])) begin
          failures++;
          $display("FAIL N=8 a=%h b=%h pp[%0d][%0d]=%0b", a8, b8, i, j, pp8[i][j]);
        end
      end
  endtask

  initial begin
    for (int v = 0; v < 256; v++) begin
      {a4, b4} = 8'(v);
      #1;
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          checks++;
          if (pp4[i][j] != (a4[j] && b4[i])) begin
            failures++;
            $display("FAIL N=4 a=%h b=%h pp[%0d][%0d]", a4, b4, i, j);
          end
        end
    end
    a8 = 8'hFF; b8 = 8'hFF; #1; check8();
    a8 = 8'h00; b8 = 8'hFF; #1; check8();
    a8 = 8'hA5; b8 = 8'h5A; #1; check8();
    for (int n = 0; n < 4000; n++) begin
      a8 = 8'($urandom);
      b8 = 8'($urandom);
      #1;
      check8();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
