// tb_calc - self-checking testbench of CALC (pipeline section 2).
// Feeds a new AI/BI/ABFI every clock and checks A, B, C two clocks later
// against the three cases of the split rule, computed with integer
// subtraction from 255. Also checks that A + B + C = 255 for every result,
// that nothing arrives one clock early, and that each case occurred.
module tb_calc;
  logic clk = 1'b0, slrt;
  logic [7:0] ai_i, bi_i, a_o, b_o, c_o;
  logic abfi_i;
  int checks = 0, failures = 0;
  int qa[$], qb[$], qf[$];
  int n_case[4];

  calc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ea, eb, ec, av, bv, fv;
    slrt = 1'b1; ai_i = 8'hff; bi_i = 8'hff; abfi_i = 1'b1;
    @(posedge clk); @(posedge clk); #1;
    checks++;
    if (a_o != 0 || b_o != 0 || c_o != 0) begin failures++; $display("clear failed"); end
    slrt = 1'b0;
    // one marker value after the clear, to measure the latency
    ai_i = 8'h40; bi_i = 8'h20; abfi_i = 1'b0;
    @(posedge clk); #1;
    ai_i = 8'h00; bi_i = 8'h00;
    checks++;
    if (a_o == 8'h40) begin failures++; $display("result one clock early"); end
    @(posedge clk); #1;
    checks++;
    if (a_o != 8'h40 || b_o != 8'h20 || c_o != 8'h9f) begin
      failures++; $display("latency: result not there after two clocks");
    end
    for (int i = 0; i < 1000; i++) begin
      if (i % 4 == 0) begin
        // bias towards sums near one pixel
        ai_i = 8'($urandom_range(100, 200));
        bi_i = 8'(255 - int'(ai_i) + $urandom_range(0, 2) - 1);
      end else begin
        ai_i = 8'($urandom); bi_i = 8'($urandom);
      end
      abfi_i = 1'($urandom);
      qa.push_back(int'(ai_i)); qb.push_back(int'(bi_i)); qf.push_back(int'(abfi_i));
      @(posedge clk); #1;
      if (qa.size() >= 2) begin
        av = qa.pop_front(); bv = qb.pop_front(); fv = qf.pop_front();
        if (av + bv < 255)  begin ea = av; eb = bv; ec = 255 - (av + bv); n_case[1]++; end
        else if (fv == 0)   begin ea = av; eb = 255 - av; ec = 0; n_case[2]++; end
        else                begin ea = 255 - bv; eb = bv; ec = 0; n_case[3]++; end
        checks++;
        if (int'(a_o) != ea || int'(b_o) != eb || int'(c_o) != ec) begin
          failures++;
          $display("ai=%0d bi=%0d abfi=%0d: got %0d %0d %0d expected %0d %0d %0d",
                   av, bv, fv, a_o, b_o, c_o, ea, eb, ec);
        end
        checks++;
        if (int'(a_o) + int'(b_o) + int'(c_o) != 255) failures++;
      end
    end
    for (int k = 1; k <= 3; k++) begin
      checks++;
      if (n_case[k] == 0) begin failures++; $display("case %0d never occurred", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
