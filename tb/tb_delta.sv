// tb_delta - self-checking testbench of DELTA.
// Drives random controls, increments and flags; checks that the selects come
// out one clock later and that DS/ABFS take this clock's or the previous
// clock's DAJ/ABF according to the MSD registered a clock earlier.
module tb_delta;
  logic clk = 1'b0, slrt;
  acp_pkg::ctrl_t ctrl_i;
  logic [14:0] daj_i, ds_o;
  logic abf_i, abfs_o;
  acp_pkg::area_sel_e area_sel_o;
  acp_pkg::mult_sel_e mult_sel_o;
  int checks = 0, failures = 0;
  int p_msa, p_msb, p_msd, p_alus0, p_alus2, p_daj, p_abf;
  int n_old = 0, n_new = 0;

  delta dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s = %0h, expected %0h", what, got, exp);
    end
  endtask

  initial begin
    slrt = 1'b1; ctrl_i = '1; daj_i = 15'h7fff; abf_i = 1'b1;
    @(posedge clk); #1;
    slrt = 1'b0;
    daj_i = 15'h1234; abf_i = 1'b1; #1;
    // after the clear MSDR = 0, so DS is the cleared DAJR
    expect_eq("ds after clear", int'(ds_o), 0);
    expect_eq("abfs after clear", int'(abfs_o), 0);
    expect_eq("area_sel after clear", int'(area_sel_o), 0);
    p_msa = 0; p_msb = 0; p_msd = 0; p_alus0 = 0; p_alus2 = 0; p_daj = 0; p_abf = 0;
    for (int i = 0; i < 500; i++) begin
      ctrl_i = 5'($urandom);
      daj_i  = 15'($urandom);
      abf_i  = 1'($urandom);
      @(posedge clk); #1;
      // registered copies of what was just presented
      p_msa = ctrl_i.msa; p_msb = ctrl_i.msb; p_msd = ctrl_i.msd;
      p_alus0 = ctrl_i.alus0; p_alus2 = ctrl_i.alus2;
      p_daj = int'(daj_i); p_abf = int'(abf_i);
      expect_eq("area_sel", int'(area_sel_o), 2 * p_msa + p_msb);
      expect_eq("mult_sel", int'(mult_sel_o), 2 * p_alus0 + p_alus2);
      // new data of this clock
      daj_i = 15'($urandom);
      abf_i = 1'($urandom);
      #1;
      if (p_msd != 0) begin
        n_new++;
        expect_eq("ds (new)", int'(ds_o), int'(daj_i));
        expect_eq("abfs (new)", int'(abfs_o), int'(abf_i));
      end else begin
        n_old++;
        expect_eq("ds (old)", int'(ds_o), p_daj);
        expect_eq("abfs (old)", int'(abfs_o), p_abf);
      end
      ctrl_i = 5'($urandom);
    end
    checks++;
    if (n_old == 0 || n_new == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
