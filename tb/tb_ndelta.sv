// tb_ndelta - self-checking testbench of the NDELTA multiplier.
// Checks D = k * DS (k = 1..4, reduced to 15 bits) for every select on
// random and corner increments, with the products worked out by
// multiplication rather than shifting.
module tb_ndelta;
  logic [14:0] ds_i, d_o;
  acp_pkg::mult_sel_e mult_sel_i;
  int checks = 0, failures = 0;
  int k, expect_v;
  logic clk = 1'b0;

  ndelta dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(logic [14:0] ds, int sel);
    ds_i = ds;
    mult_sel_i = acp_pkg::mult_sel_e'(2'(sel));
    #1;
    k = sel + 1;
    expect_v = (int'(ds) * k) & 32'h7FFF;
    checks++;
    if (int'(d_o) != expect_v) begin
      failures++;
      $display("ds=%h k=%0d d=%h expected %h", ds, k, d_o, expect_v);
    end
  endtask

  initial begin
    logic [14:0] corners[6] = '{15'h0000, 15'h0001, 15'h3FFF, 15'h4000, 15'h7FFF, 15'h5555};
    foreach (corners[i])
      for (int s = 0; s < 4; s++) check_one(corners[i], s);
    for (int i = 0; i < 2000; i++) check_one(15'($urandom), int'($urandom_range(0, 3)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
