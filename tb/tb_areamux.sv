// tb_areamux - self-checking testbench of the AREAMUX area selector.
// Drives random areas and selects, keeps its own copy of the previous AA and
// checks AM against the selection table every clock; checks the clear too.
module tb_areamux;
  logic clk = 1'b0, slrt;
  logic [4:0] as_i, aa_i;
  logic [11:0] sa_i, am_o;
  acp_pkg::area_sel_e sel_i;
  int checks = 0, failures = 0;
  int prev_aa, expect_v;
  int seen[4];

  areamux dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    slrt = 1'b1; as_i = '0; aa_i = 5'h1f; sa_i = '0; sel_i = acp_pkg::AREA_AA_OLD;
    @(posedge clk); #1;
    checks++;
    if (am_o !== 12'h000) begin failures++; $display("clear: AR not zero, am=%h", am_o); end
    slrt = 1'b0;
    prev_aa = 0;
    for (int i = 0; i < 500; i++) begin
      as_i  = 5'($urandom);
      aa_i  = 5'($urandom);
      sa_i  = 12'($urandom);
      sel_i = acp_pkg::area_sel_e'(2'($urandom));
      #1;
      case (int'(sel_i))
        0: expect_v = int'(sa_i);
        1: expect_v = prev_aa * 128;
        2: expect_v = int'(aa_i) * 128;
        default: expect_v = int'(as_i) * 128;
      endcase
      seen[int'(sel_i)]++;
      checks++;
      if (int'(am_o) != expect_v) begin
        failures++;
        $display("cycle %0d sel=%0d am=%h expected %h", i, sel_i, am_o, expect_v);
      end
      @(posedge clk);
      prev_aa = int'(aa_i);
      #1;
    end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (seen[s] == 0) begin failures++; $display("select %0d never used", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
