// tb_image_workload: runs an image-scaling workload through the 8x8 Dadda
// multiplier of approx_mult_top.
//
// A 255 x 255 8-bit grey image (65025 pixels, the size of the test image the
// multiplier was evaluated on) is generated here from a formula: a diagonal
// gradient with a ring pattern,
//     pix(r, c) = (r + c + ((r - 127)^2 + (c - 127)^2) / 64) mod 256.
// Every pixel is multiplied by a gain g in {64, 128, 200, 255}, and the
// scaled pixel is the high byte of the 16-bit product, (pix * g) >> 8.
// Each product is compared with integer multiplication, and a checksum of
// each scaled image is compared with one computed from integer products.
module tb_image_workload;
  localparam int ROWS = 255;
  localparam int COLS = 255;
  localparam int GAINS [4] = '{64, 128, 200, 255};

  logic [7:0]  a, b;
  logic [15:0] p;
  logic [3:0]  x, t;
  logic [7:0]  y;
  int checks = 0, failures = 0;

  approx_mult_top dut (.a(a), .b(b), .p(p), .x(x), .t(t), .y(y));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] pixel(int r, int c);
    return 8'(r + c + ((r - 127) * (r - 127) + (c - 127) * (c - 127)) / 64);
  endfunction

  initial begin
    x = '0; t = '0;
    foreach (GAINS[g]) begin
      longint sum_hw, sum_ref;
      sum_hw = 0; sum_ref = 0;
      for (int r = 0; r < ROWS; r++) begin
        for (int c = 0; c < COLS; c++) begin
          a = pixel(r, c);
          b = 8'(GAINS[g]);
          #1;
          checks++;
          if (p != 16'(a) * 16'(b)) begin
            failures++;
            if (failures < 10) $display("FAIL pixel (%0d,%0d): %0d * %0d -> %0d", r, c, a, b, p);
          end
          sum_hw  += longint'(p[15:8]);
          sum_ref += longint'((int'(a) * GAINS[g]) >> 8);
        end
      end
      checks++;
      if (sum_hw != sum_ref) failures++;
      $display("gain %0d: %0d pixels, scaled-image checksum %0d (expected %0d)",
               GAINS[g], ROWS * COLS, sum_hw, sum_ref);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
