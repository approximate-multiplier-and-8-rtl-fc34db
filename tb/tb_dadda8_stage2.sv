// tb_dadda8_stage2: checks the second reduction stage with 200000 random
// input patterns and a few corner patterns. Every column is filled with
// random bits up to the height stage 1 leaves there (1 2 3 4 4 4 4 4 3 4 4 4
// 4 2 1 for columns 0..14); the two output rows must add up to the same
// value as the four input rows.
module tb_dadda8_stage2;
  import mult_pkg::*;
  row16_t [3:0] row_in;
  row16_t [1:0] row_out;
  int checks = 0, failures = 0;

  localparam int HEIGHT [15] = '{1, 2, 3, 4, 4, 4, 4, 4, 3, 4, 4, 4, 4, 2, 1};

  dadda8_stage2 dut (.row_in(row_in), .row_out(row_out));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input bit all_ones);
    logic [17:0] want, got;
    row_in = '0;
    for (int c = 0; c < 15; c++)
      for (int n = 0; n < HEIGHT[c]; n++) row_in[n][c] = all_ones ? 1'b1 : 1'($urandom);
    #1;
    want = 18'(row_in[0]) + 18'(row_in[1]) + 18'(row_in[2]) + 18'(row_in[3]);
    got  = 18'(row_out[0]) + 18'(row_out[1]);
    checks++;
    if (want != got) begin
      failures++;
      if (failures < 10) $display("FAIL rows %h %h %h %h: want %0d got %0d",
                                  row_in[0], row_in[1], row_in[2], row_in[3], want, got);
    end
  endtask

  initial begin
    apply(1'b1);
    for (int n = 0; n < 200000; n++) apply(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
