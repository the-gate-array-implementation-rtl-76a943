// tb_vpac - end-to-end self-checking testbench of the area calculation
// pipeline, with all parameters at their defaults.
//
// Drives both area modules with loads, accumulation runs and random data,
// clears the pipeline in the middle of a run, and compares A0, B0, C0 and the
// four pixel flags every clock with the integer reference model. It checks
// the three-clock latency of the first result after a clear and that a new
// result appears every clock, and counts a failure for any mechanism that was
// never exercised: each area select, each multiple, old and new increment,
// clamping below zero and above one on both modules, each flag, each of the
// three split cases, and the clear.
module tb_vpac;
  import acp_model_pkg::*;
  logic clk = 1'b0, slrt;
  logic [4:0] as_i, aa_i, bs_i, ba_i;
  logic [14:0] daj_i, dbj_i;
  logic abf_i, msa_i, msb_i, msd_i, alus0_i, alus2_i;
  logic [7:0] a0_o, b0_o, c0_o;
  logic pxa0_o, pxa1_o, pxb0_o, pxb1_o;
  int checks = 0, failures = 0;
  b103_model ma, mb;
  calc_model mc;

  // coverage counters
  int n_sel[4], n_mult[5], n_msd[2], n_case[4];
  int n_neg_a = 0, n_over_a = 0, n_neg_b = 0, n_over_b = 0;
  int n_pxa0 = 0, n_pxa1 = 0, n_pxb0 = 0, n_pxb1 = 0, n_clear = 0;

  vpac dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("t=%0t %s = %0d, expected %0d", $time, what, got, exp);
    end
  endtask

  task automatic tick();
    @(posedge clk);
    if (slrt) begin
      ma.clear(); mb.clear(); mc.clear(); n_clear++;
    end else begin
      mc.step(ma.ai(), mb.ai(), ma.abfi());
      ma.step(msa_i, msb_i, msd_i, alus0_i, alus2_i, as_i, aa_i, daj_i, abf_i);
      mb.step(msa_i, msb_i, msd_i, alus0_i, alus2_i, bs_i, ba_i, dbj_i, abf_i);
      n_sel[ma.last_sel]++; n_mult[ma.last_mult]++; n_msd[ma.last_msd]++;
      n_case[mc.last_case]++;
      if (ma.raw_sum() < 0) n_neg_a++;
      if (ma.raw_sum() > 4095) n_over_a++;
      if (mb.raw_sum() < 0) n_neg_b++;
      if (mb.raw_sum() > 4095) n_over_b++;
    end
    #1;
    expect_eq("A0", int'(a0_o), mc.a);
    expect_eq("B0", int'(b0_o), mc.b);
    expect_eq("C0", int'(c0_o), mc.c);
    expect_eq("PXA0", int'(pxa0_o), ma.px0());
    expect_eq("PXA1", int'(pxa1_o), ma.px1());
    expect_eq("PXB0", int'(pxb0_o), mb.px0());
    expect_eq("PXB1", int'(pxb1_o), mb.px1());
    n_pxa0 += int'(pxa0_o); n_pxa1 += int'(pxa1_o);
    n_pxb0 += int'(pxb0_o); n_pxb1 += int'(pxb1_o);
  endtask

  // Counts a failure for a mechanism that never happened.
  task automatic require(bit happened, string what);
    checks++;
    if (!happened) begin
      failures++;
      $display("never exercised: %s", what);
    end
  endtask

  task automatic set_ctrl(int sel, int mult, int msd);
    {msa_i, msb_i} = 2'(sel);
    {alus0_i, alus2_i} = 2'(mult);
    msd_i = 1'(msd);
  endtask

  task automatic random_data(bit small_steps);
    as_i = 5'($urandom); aa_i = 5'($urandom);
    bs_i = 5'($urandom); ba_i = 5'($urandom);
    abf_i = 1'($urandom);
    if (small_steps) begin
      daj_i = 15'($signed(15'($urandom_range(0, 1023))) - 15'sd512);
      dbj_i = 15'($signed(15'($urandom_range(0, 1023))) - 15'sd512);
    end else begin
      daj_i = 15'($urandom); dbj_i = 15'($urandom);
    end
  endtask

  initial begin
    ma = new(); mb = new(); mc = new();
    slrt = 1'b1;
    set_ctrl(0, 0, 0);
    as_i = '0; aa_i = '0; bs_i = '0; ba_i = '0; daj_i = '0; dbj_i = '0; abf_i = 1'b0;
    tick();
    slrt = 1'b0;

    // Latency: controls select AS with new increments, one clock ahead.
    set_ctrl(3, 0, 1);
    tick();
    as_i = 5'd4; bs_i = 5'd2; daj_i = 15'd0; dbj_i = 15'd0;   // AI = 32, BI = 16
    set_ctrl(0, 0, 1);
    tick();                                   // edge 1: data into section 1 register
    as_i = 5'd0; bs_i = 5'd0;
    tick();                                   // edge 2: AI, BI into CALC
    expect_eq("A0 not before 3 clocks", (a0_o == 8'd32) ? 1 : 0, 0);
    tick();                                   // edge 3: output register
    expect_eq("A0 after 3 clocks", int'(a0_o), 32);
    expect_eq("C0 after 3 clocks", int'(c0_o), 255 - 48);

    // Accumulation runs: load, then add a multiple of the increment per clock.
    for (int run = 0; run < 40; run++) begin
      set_ctrl(int'($urandom_range(1, 3)), int'($urandom_range(0, 3)), 1);
      tick();
      random_data(1'b1);
      set_ctrl(0, int'($urandom_range(0, 3)), int'($urandom_range(0, 1)));
      for (int i = 0; i < 30; i++) begin
        tick();
        if (i % 10 == 9) set_ctrl(0, int'($urandom_range(0, 3)), int'($urandom_range(0, 1)));
        abf_i = 1'($urandom);
      end
      if (run == 20) begin
        slrt = 1'b1;
        tick();
        slrt = 1'b0;
      end
    end

    // Random everything.
    for (int i = 0; i < 2000; i++) begin
      set_ctrl(int'($urandom_range(0, 3)), int'($urandom_range(0, 3)), int'($urandom_range(0, 1)));
      random_data(i % 2 == 0);
      tick();
    end

    for (int s = 0; s < 4; s++) require(n_sel[s] > 0, $sformatf("area select %0d", s));
    for (int k = 1; k <= 4; k++) require(n_mult[k] > 0, $sformatf("multiple %0d", k));
    for (int c = 1; c <= 3; c++) require(n_case[c] > 0, $sformatf("split case %0d", c));
    require(n_msd[0] > 0 && n_msd[1] > 0, "old and new increment");
    require(n_neg_a > 0 && n_over_a > 0 && n_neg_b > 0 && n_over_b > 0, "both clamps on both modules");
    require(n_pxa0 > 0 && n_pxa1 > 0 && n_pxb0 > 0 && n_pxb1 > 0, "all four pixel flags");
    require(n_clear >= 2, "clear in mid-run");
    $display("coverage: sel %0d %0d %0d %0d, mult %0d %0d %0d %0d, old/new %0d/%0d, split %0d %0d %0d",
             n_sel[0], n_sel[1], n_sel[2], n_sel[3], n_mult[1], n_mult[2], n_mult[3], n_mult[4],
             n_msd[0], n_msd[1], n_case[1], n_case[2], n_case[3]);
    $display("coverage: clamp A %0d/%0d B %0d/%0d, flags %0d %0d %0d %0d, clears %0d",
             n_neg_a, n_over_a, n_neg_b, n_over_b, n_pxa0, n_pxa1, n_pxb0, n_pxb1, n_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
