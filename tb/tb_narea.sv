// tb_narea - self-checking testbench of NAREA.
// Presents random areas and increments, one per clock, and checks one clock
// later the clamped sum SA, AI, the two pixel flags and ABFI against integer
// arithmetic. Directed cases hit the clamps and both flags; the testbench
// counts a failure if one of below-zero, above-one, in-range, PXA0 or PXA1
// never occurred.
module tb_narea;
  logic clk = 1'b0, slrt;
  logic [11:0] am_i, sa_o;
  logic [14:0] d_i;
  logic abfs_i;
  logic [7:0] ai_o;
  logic px0_o, px1_o, abfi_o;
  int checks = 0, failures = 0;
  int n_neg = 0, n_over = 0, n_mid = 0, n_px0 = 0, n_px1 = 0;

  narea dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s = %0h, expected %0h (am=%h d=%h)", what, got, exp, am_i, d_i);
    end
  endtask

  task automatic one(logic [11:0] am, logic [14:0] d, logic abf);
    int dv, s, exp_sa, exp_ai;
    am_i = am; d_i = d; abfs_i = abf;
    @(posedge clk); #1;
    dv = int'($signed(d));
    // top 12 bits of a 15-bit signed number: floor(d / 8)
    s = int'(am) + ((dv >= 0) ? dv / 8 : -((-dv + 7) / 8));
    if (s < 0)         begin exp_sa = 0;    n_neg++;  end
    else if (s > 4095) begin exp_sa = 4095; n_over++; end
    else               begin exp_sa = s;    n_mid++;  end
    exp_ai = exp_sa / 16;
    if (exp_ai == 0) n_px0++;
    if (exp_ai == 255) n_px1++;
    expect_eq("sa", int'(sa_o), exp_sa);
    expect_eq("ai", int'(ai_o), exp_ai);
    expect_eq("px0", int'(px0_o), exp_ai == 0 ? 1 : 0);
    expect_eq("px1", int'(px1_o), exp_ai == 255 ? 1 : 0);
    expect_eq("abfi", int'(abfi_o), int'(abf));
  endtask

  initial begin
    slrt = 1'b1; am_i = '1; d_i = 15'h1fff; abfs_i = 1'b1;
    @(posedge clk); #1;
    expect_eq("sa after clear", int'(sa_o), 0);
    expect_eq("px0 after clear", int'(px0_o), 1);
    slrt = 1'b0;
    one(12'h800, 15'h0000, 1'b0);   // unchanged
    one(12'h010, 15'h7F00, 1'b1);   // small area, large negative step: clamp to 0
    one(12'hF00, 15'h2000, 1'b0);   // large area, large positive step: clamp to .FF
    one(12'hFF0, 15'h0000, 1'b1);   // exactly .FF
    one(12'h00F, 15'h0000, 1'b0);   // AI zero with nonzero low bits
    one(12'h000, 15'h7FF8, 1'b0);   // -1 LSB from zero
    one(12'hFFF, 15'h0008, 1'b0);   // +1 LSB from the top
    for (int i = 0; i < 1000; i++) one(12'($urandom), 15'($urandom), 1'($urandom));
    checks++;
    if (n_neg == 0 || n_over == 0 || n_mid == 0 || n_px0 == 0 || n_px1 == 0) begin
      failures++;
      $display("coverage: neg=%0d over=%0d mid=%0d px0=%0d px1=%0d", n_neg, n_over, n_mid, n_px0, n_px1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
