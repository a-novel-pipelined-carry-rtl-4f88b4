// tb_pca_core -- self-check of the N-bit pipelined carry adder triangle.
//
// Three instances are tested exhaustively against integer addition:
//   u8 : the default block, 8 bits without carry-in (the plain 8-bit PCA)
//   u3 : 3-bit mini circuit with carry-in
//   u2 : 2-bit mini circuit with carry-in
// Besides the sum, the testbench checks that at most one of the per-stage
// top-bit carries is 1 (which is what makes a plain OR a correct carry-out),
// that each of them is 1 for some input (every stage can produce the
// carry-out) and the worked example 149 + 213 = 362. Each vector is given
// 1 time unit to settle.
module tb_pca_core;

  int checks = 0;
  int failures = 0;

  // Default instance: no parameter list.
  logic [7:0] a8, b8, s8;
  logic       co8;
  logic [7:0] sc8;
  pca_core u8 (.a(a8), .b(b8), .cin(1'b0), .sum(s8), .cout(co8), .stage_cout(sc8));

  logic [2:0] a3, b3, s3;
  logic       ci3, co3;
  logic [3:0] sc3;
  pca_core #(.N(3), .HAS_CIN(1'b1)) u3 (.a(a3), .b(b3), .cin(ci3), .sum(s3), .cout(co3), .stage_cout(sc3));

  logic [1:0] a2, b2, s2;
  logic       ci2, co2;
  logic [2:0] sc2;
  pca_core #(.N(2), .HAS_CIN(1'b1)) u2 (.a(a2), .b(b2), .cin(ci2), .sum(s2), .cout(co2), .stage_cout(sc2));

  int seen8 [8];
  int seen3 [4];
  int seen2 [3];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Worked example: 10010101 + 11010101 = 101101010.
    a8 = 8'b1001_0101; b8 = 8'b1101_0101; #1;
    check({co8, s8} == 9'b1_0110_1010, $sformatf("149+213 gave %0d", {co8, s8}));

    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j); #1;
        check({co8, s8} == 9'(i + j), $sformatf("u8 %0d+%0d gave %0d", i, j, {co8, s8}));
        check($countones(sc8) <= 1, $sformatf("u8 %0d+%0d several top carries %b", i, j, sc8));
        for (int k = 0; k < 8; k++) if (sc8[k]) seen8[k]++;
      end
    end

    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        for (int c = 0; c < 2; c++) begin
          a3 = 3'(i); b3 = 3'(j); ci3 = 1'(c); #1;
          check({co3, s3} == 4'(i + j + c), $sformatf("u3 %0d+%0d+%0d gave %0d", i, j, c, {co3, s3}));
          check($countones(sc3) <= 1, "u3 several top carries");
          for (int k = 0; k < 4; k++) if (sc3[k]) seen3[k]++;
        end

    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        for (int c = 0; c < 2; c++) begin
          a2 = 2'(i); b2 = 2'(j); ci2 = 1'(c); #1;
          check({co2, s2} == 3'(i + j + c), $sformatf("u2 %0d+%0d+%0d gave %0d", i, j, c, {co2, s2}));
          check($countones(sc2) <= 1, "u2 several top carries");
          for (int k = 0; k < 3; k++) if (sc2[k]) seen2[k]++;
        end

    // Every stage must have delivered the carry-out at least once.
    for (int k = 0; k < 8; k++) check(seen8[k] > 0, $sformatf("u8 stage %0d never carried out", k + 1));
    for (int k = 0; k < 4; k++) check(seen3[k] > 0, $sformatf("u3 stage %0d never carried out", k + 1));
    for (int k = 0; k < 3; k++) check(seen2[k] > 0, $sformatf("u2 stage %0d never carried out", k + 1));
    for (int k = 0; k < 8; k++) $display("u8 stage %0d carried out %0d times", k + 1, seen8[k]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
