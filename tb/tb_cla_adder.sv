// tb_cla_adder: checks the carry-lookahead adder against integer addition.
// W = 8 is tried exhaustively (65536 pairs); the default W = 16 with corner
// cases (carry through all bits, largest operands) and 50000 random pairs.
// Both the sum and the carry out are compared.
module tb_cla_adder;
  logic [15:0] a16, b16, s16;
  logic        co16;
  logic [7:0]  a8, b8, s8;
  logic        co8;
  int checks = 0, failures = 0;

  cla_adder          dut16 (.a(a16), .b(b16), .s(s16), .co(co16));
  cla_adder #(.W(8)) dut8  (.a(a8),  .b(b8),  .s(s8),  .co(co8));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16();
    logic [16:0] want;
    want = 17'(a16) + 17'(b16);
    checks++;
    if ({co16, s16} != want) begin
      failures++;
      $display("FAIL W=16 %h + %h -> %0b %h", a16, b16, co16, s16);
    end
  endtask

  initial begin
    for (int v = 0; v < 65536; v++) begin
      {a8, b8} = 16'(v);
      #1;
      checks++;
      if ({co8, s8} != 9'(a8) + 9'(b8)) begin
        failures++;
        $display("FAIL W=8 %h + %h -> %0b %h", a8, b8, co8, s8);
      end
    end
    a16 = 16'hFFFF; b16 = 16'h0001; #1; check16();
    a16 = 16'hFFFF; b16 = 16'hFFFF; #1; check16();
    a16 = 16'h7FFF; b16 = 16'h0001; #1; check16();
    a16 = 16'hAAAA; b16 = 16'h5555; #1; check16();
    for (int n = 0; n < 50000; n++) begin
      a16 = 16'($urandom);
      b16 = 16'($urandom);
      #1;
      check16();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
