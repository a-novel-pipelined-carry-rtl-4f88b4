// tb_mpca -- end-to-end self-check of the modified 8-bit pipelined carry
// adder at its default parameters (no parameter list on the adder).
//
// 1. The worked example 149 + 213 = 362 and the operand pairs of the
//    reference gate-level run (184+50, 215+155, 255+255, ...).
// 2. All 65,536 operand pairs against integer addition.
// 3. Structure: 20 half adders in total.
// 4. Mechanisms, each counted and required to occur at least once:
//    a carry passed from slice 0 to slice 1 and from slice 1 to slice 2,
//    the final carry-out, a carry rippling through all three slices, and
//    each stage of each slice being the one that delivers its carry-out.
// Combinational design: each vector is given 1 time unit to settle.
module tb_mpca;
  logic [7:0] a, b;
  logic [8:0] sum;

  int checks = 0;
  int failures = 0;

  mpca dut (.a(a), .b(b), .sum(sum));

  int n_c01 = 0, n_c12 = 0, n_cout = 0, n_through = 0;
  int seen0 [3];
  int seen1 [4];
  int seen2 [3];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic apply(int x, int y);
    a = 8'(x); b = 8'(y);
    #1;
    check(sum == 9'(x + y), $sformatf("%0d + %0d gave %0d", x, y, sum));
  endtask

  // Operand pairs of the reference gate-level simulation.
  localparam int NREF = 12;
  localparam int REF_A [NREF] = '{184, 106, 12, 215, 210, 186, 200, 156, 212, 255, 158, 176};
  localparam int REF_B [NREF] = '{ 50, 145, 219, 155, 90, 220, 100, 176, 96, 255, 215, 240};

  initial begin : watchdog
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(dut.HA_COUNT == 20, $sformatf("half-adder count %0d, expected 20", dut.HA_COUNT));

    apply(149, 213);
    check(sum == 9'b1_0110_1010, "149 + 213 = 101101010");
    for (int r = 0; r < NREF; r++) apply(REF_A[r], REF_B[r]);

    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        apply(i, j);
        if (dut.carry[1]) n_c01++;
        if (dut.carry[2]) n_c12++;
        if (dut.carry[3]) n_cout++;
        if (dut.carry[1] && dut.carry[2] && dut.carry[3]) n_through++;
        for (int k = 0; k < 3; k++) if (dut.part[0].stage_cout[k]) seen0[k]++;
        for (int k = 0; k < 4; k++) if (dut.part[1].stage_cout[k]) seen1[k]++;
        for (int k = 0; k < 3; k++) if (dut.part[2].stage_cout[k]) seen2[k]++;
      end
    end

    $display("carry slice0->1: %0d, slice1->2: %0d, carry-out: %0d, through all slices: %0d",
             n_c01, n_c12, n_cout, n_through);
    check(n_c01 > 0, "no carry from slice 0 to slice 1");
    check(n_c12 > 0, "no carry from slice 1 to slice 2");
    check(n_cout > 0, "no carry-out");
    check(n_through > 0, "no carry through all slices");
    for (int k = 0; k < 3; k++) check(seen0[k] > 0, $sformatf("slice 0 stage %0d never carried out", k + 1));
    for (int k = 0; k < 4; k++) check(seen1[k] > 0, $sformatf("slice 1 stage %0d never carried out", k + 1));
    for (int k = 0; k < 3; k++) check(seen2[k] > 0, $sformatf("slice 2 stage %0d never carried out", k + 1));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
