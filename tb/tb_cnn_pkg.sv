// tb_cnn_pkg: checks the shared constants of the package on their own.
// For random 8-bit data rows d[0..7] and filter rows g[0..2] it runs the whole
// integer Winograd chain with the package matrices (AT_S * ((G_S g) .* (BT_S d)))
// and compares each of the INV_VEC results with WINO_SCALE times the direct
// 3-tap correlation sum_k d[i+k] g[k]. It also checks sat8 at and around both
// limits and the derived sizes (INV_VEC, LANE_NUM, distinct condition bits).
module tb_cnn_pkg;
  import cnn_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic expect_eq(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    longint d [W_VEC], g [KW], u [W_VEC], v [W_VEC], y;
    @(posedge clk);
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < W_VEC; i++) d[i] = longint'($urandom_range(0, 255)) - 128;
      for (int k = 0; k < KW; k++) g[k] = longint'($urandom_range(0, 255)) - 128;
      if (t == 0) begin  // extremes
        for (int i = 0; i < W_VEC; i++) d[i] = (i % 2 == 1) ? -128 : 127;
        for (int k = 0; k < KW; k++) g[k] = (k % 2 == 1) ? 127 : -128;
      end
      for (int l = 0; l < W_VEC; l++) begin
        u[l] = 0; v[l] = 0;
        for (int k = 0; k < KW; k++) u[l] += longint'(G_S[l][k]) * g[k];
        for (int k = 0; k < W_VEC; k++) v[l] += longint'(BT_S[l][k]) * d[k];
      end
      for (int i = 0; i < INV_VEC; i++) begin
        longint direct;
        y = 0;
        for (int l = 0; l < W_VEC; l++) y += longint'(AT_S[i][l]) * u[l] * v[l];
        direct = 0;
        for (int k = 0; k < KW; k++) direct += d[i + k] * g[k];
        expect_eq(y, direct * WINO_SCALE, $sformatf("Winograd output %0d", i));
      end
    end

    expect_eq(longint'($signed(sat8(OUTW'(127)))), 127, "sat8(127)");
    expect_eq(longint'($signed(sat8(OUTW'(128)))), 127, "sat8(128)");
    expect_eq(longint'($signed(sat8(OUTW'(-128)))), -128, "sat8(-128)");
    expect_eq(longint'($signed(sat8(OUTW'(-129)))), -128, "sat8(-129)");
    expect_eq(longint'($signed(sat8(OUTW'(5)))), 5, "sat8(5)");
    expect_eq(longint'($signed(sat8(OUTW'(-7)))), -7, "sat8(-7)");
    expect_eq(longint'($signed(sat8({1'b0, {(OUTW-1){1'b1}}}))), 127, "sat8(max)");
    expect_eq(longint'($signed(sat8({1'b1, {(OUTW-1){1'b0}}}))), -128, "sat8(min)");
    expect_eq(INV_VEC, W_VEC - KW + 1, "INV_VEC");
    expect_eq(LANE_NUM, PE_ROWS * PE_COLS, "LANE_NUM");
    expect_eq(WINO_SCALE, 11520, "WINO_SCALE");
    checks++;
    if (COND_FIRST == COND_LAST || COND_LAST == COND_SET_END || COND_FIRST == COND_SET_END ||
        COND_SET_END >= COND_W) begin failures++; $display("condition bits overlap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
