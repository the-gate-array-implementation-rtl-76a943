// tb_b103 - self-checking testbench of one area calculation module (B103).
// Runs random controls and data, plus stretches of pure accumulation, against
// the integer reference model, and checks AI, PXA0, PXA1 and ABFI every clock
// (one clock after the data). Counts how often each area select, each
// multiple, old and new increment and both clamps occurred.
module tb_b103;
  import acp_model_pkg::*;
  logic clk = 1'b0, slrt;
  acp_pkg::ctrl_t ctrl_i;
  logic [4:0] as_i, aa_i;
  logic [14:0] daj_i;
  logic abf_i;
  logic [7:0] ai_o;
  logic px0_o, px1_o, abfi_o;
  int checks = 0, failures = 0;
  int n_sel[4], n_mult[5], n_msd[2], n_neg = 0, n_over = 0;
  b103_model m;

  b103 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("t=%0t %s = %0h, expected %0h", $time, what, got, exp);
    end
  endtask

  task automatic tick();
    @(posedge clk);
    if (slrt) m.clear();
    else begin
      m.step(ctrl_i.msa, ctrl_i.msb, ctrl_i.msd, ctrl_i.alus0, ctrl_i.alus2,
             int'(as_i), int'(aa_i), int'(daj_i), int'(abf_i));
      n_sel[m.last_sel]++; n_mult[m.last_mult]++; n_msd[m.last_msd]++;
      if (m.raw_sum() < 0) n_neg++;
      if (m.raw_sum() > 4095) n_over++;
    end
    #1;
    expect_eq("ai", int'(ai_o), m.ai());
    expect_eq("px0", int'(px0_o), m.px0());
    expect_eq("px1", int'(px1_o), m.px1());
    expect_eq("abfi", int'(abfi_o), m.abfi());
  endtask

  initial begin
    m = new();
    slrt = 1'b1; ctrl_i = '0; as_i = '0; aa_i = '0; daj_i = '0; abf_i = 1'b0;
    tick();
    slrt = 1'b0;
    // load AS = 8/32, then accumulate +1/256 per clock (DAJ = 8 * 16)
    ctrl_i = '{msa: 1'b1, msb: 1'b1, msd: 1'b1, alus0: 1'b0, alus2: 1'b0};
    tick();
    as_i = 5'd8; daj_i = 15'd0;
    ctrl_i = '{msa: 1'b0, msb: 1'b0, msd: 1'b1, alus0: 1'b0, alus2: 1'b0};
    tick();
    for (int i = 0; i < 40; i++) begin daj_i = 15'd128; tick(); end
    checks++;
    if (ai_o != 8'd64 + 8'd40) begin failures++; $display("accumulated AI = %0d", ai_o); end
    for (int i = 0; i < 3000; i++) begin
      ctrl_i = 5'($urandom);
      as_i = 5'($urandom); aa_i = 5'($urandom); abf_i = 1'($urandom);
      // mostly small increments so that multiples do not wrap
      daj_i = (i % 3 == 0) ? 15'($urandom) : 15'($signed(15'($urandom_range(0, 2047))) - 15'sd1024);
      tick();
    end
    for (int s = 0; s < 4; s++) begin checks++; if (n_sel[s] == 0) failures++; end
    for (int k = 1; k <= 4; k++) begin checks++; if (n_mult[k] == 0) failures++; end
    checks++; if (n_msd[0] == 0 || n_msd[1] == 0) failures++;
    checks++; if (n_neg == 0 || n_over == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
