// tb_approx_mult_top: end-to-end test of the whole design at its default
// parameters. Every one of the 65536 operand pairs of the 8x8 Dadda
// multiplier and every one of the 256 pairs of the 4x4 multiplier is applied
// and the products are compared with integer multiplication.
//
// It also counts how often each mechanism of the reduction tree is actually
// used (a carry out of each kind of cell, the cout -> cin chains of the
// compressor rows, a generate in the final adder) and counts a failure for
// any mechanism that never fires. Combinational design: each vector is
// given 1 time unit to settle.
module tb_approx_mult_top;
  logic [7:0]  a, b;
  logic [15:0] p;
  logic [3:0]  x, t;
  logic [7:0]  y;
  int checks = 0, failures = 0;

  approx_mult_top dut (.a(a), .b(b), .p(p), .x(x), .t(t), .y(y));

  typedef enum int {
    S1_HA_CARRY, S1_FA_CARRY, S1_COMP_CHAIN, S1_COMP_CARRY,
    S2_HA_CARRY, S2_FA_CARRY, S2_COMP_CHAIN, S2_COMP_CARRY,
    CPA_GENERATE, M4_HA_CARRY, M4_COMP_CHAIN, M4_FA_CARRY, NUM_EVENTS
  } event_e;
  int seen [NUM_EVENTS];

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic note(event_e e, logic fired);
    if (fired) seen[e]++;
  endtask

  initial begin
    foreach (seen[e]) seen[e] = 0;
    x = '0; t = '0;
    for (int v = 0; v < 65536; v++) begin
      {a, b} = 16'(v);
      #1;
      checks++;
      if (p != 16'(a) * 16'(b)) begin
        failures++;
        if (failures < 10) $display("FAIL 8x8: %0d * %0d -> %0d", a, b, p);
      end
      note(S1_HA_CARRY,   dut.u_dadda8.u_stage1.c_h4 | dut.u_dadda8.u_stage1.c_h6);
      note(S1_FA_CARRY,   dut.u_dadda8.u_stage1.c_f9 | dut.u_dadda8.u_stage1.c_f11);
      note(S1_COMP_CHAIN, dut.u_dadda8.u_stage1.o6a & dut.u_dadda8.u_stage1.o7a);
      note(S1_COMP_CARRY, dut.u_dadda8.u_stage1.k8b);
      note(S2_HA_CARRY,   dut.u_dadda8.u_stage2.c_h2);
      note(S2_FA_CARRY,   dut.u_dadda8.u_stage2.c_f13);
      note(S2_COMP_CHAIN, dut.u_dadda8.u_stage2.o[11] & dut.u_dadda8.u_stage2.o[12]);
      note(S2_COMP_CARRY, |dut.u_dadda8.u_stage2.k);
      note(CPA_GENERATE,  |(dut.u_dadda8.row2[0] & dut.u_dadda8.row2[1]));
    end
    for (int v = 0; v < 256; v++) begin
      {x, t} = 8'(v);
      #1;
      checks++;
      if (y != 8'(x) * 8'(t)) begin
        failures++;
        $display("FAIL 4x4: %0d * %0d -> %0d", x, t, y);
      end
      note(M4_HA_CARRY,   dut.u_mult4.c_h2);
      note(M4_COMP_CHAIN, dut.u_mult4.o3);
      note(M4_FA_CARRY,   dut.u_mult4.c5);
    end
    for (int e = 0; e < NUM_EVENTS; e++) begin
      event_e ev;
      ev = event_e'(e);
      $display("mechanism %-14s fired %0d times", ev.name(), seen[e]);
      checks++;
      if (seen[e] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", ev.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
