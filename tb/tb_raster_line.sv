// tb_raster_line - two back-to-back 1000-pixel raster lines through four area
// calculation pipelines.
//
// The original system computes four neighbouring pixels per clock with four
// pipelines and builds one 1000-pixel line in 250 clocks. Here pipeline k
// (k = 1..4) first loads the initial area and adds k times the increment, then
// accumulates four times the increment every clock, so that it produces
// pixels k, k+4, k+8, ... of a linear area ramp (a grey-scale bar pattern).
// Line 1 is a gentle ramp of A up and B down with B given priority; line 2
// uses steep ramps so that both areas clamp, with A given priority. Every
// pixel of both lines is checked against the ramp formula
//   area(4n + k) = clamp(S * 128 + floor(k * D / 8) + n * floor(4 * D / 8))
// and the split rule, and the results must arrive one per clock per pipeline
// with no gap between the lines.
module tb_raster_line;
  localparam int PIPES = 4;
  localparam int CLOCKS_PER_LINE = 250;
  localparam int LINES = 2;
  localparam int DATA_CLOCKS = CLOCKS_PER_LINE * LINES;

  logic clk = 1'b0, slrt;
  logic msa, msb, msd, alus0, alus2, abf;
  logic [4:0] as_v, bs_v;
  logic [14:0] daj_v, dbj_v;
  logic [7:0] a0[PIPES], b0[PIPES], c0[PIPES];
  logic pxa0[PIPES], pxa1[PIPES], pxb0[PIPES], pxb1[PIPES];
  int checks = 0, failures = 0;
  int n_clamp_lo = 0, n_clamp_hi = 0, n_overlap = 0, n_c_zero = 0;

  // line parameters: initial areas (5-bit), increments (signed), priority
  int line_as[LINES]  = '{0, 4};
  int line_daj[LINES] = '{4, 400};
  int line_bs[LINES]  = '{31, 28};
  int line_dbj[LINES] = '{-24, -500};
  int line_abf[LINES] = '{1, 0};

  // Four pipelines, each with its own multiple select for the first clock of a line.
  logic [1:0] mult_sel[PIPES];

  for (genvar k = 0; k < PIPES; k++) begin : g_pipe
    vpac u_vpac (
      .clk, .slrt,
      .as_i(as_v), .aa_i(5'd0), .daj_i(daj_v),
      .bs_i(bs_v), .ba_i(5'd0), .dbj_i(dbj_v), .abf_i(abf),
      .msa_i(msa), .msb_i(msb), .msd_i(msd),
      .alus0_i(mult_sel[k][1]), .alus2_i(mult_sel[k][0]),
      .a0_o(a0[k]), .b0_o(b0[k]), .c0_o(c0[k]),
      .pxa0_o(pxa0[k]), .pxa1_o(pxa1[k]), .pxb0_o(pxb0[k]), .pxb1_o(pxb1[k])
    );
  end

  always #5 clk = ~clk;

  initial begin
    repeat (DATA_CLOCKS + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int floor_div8(int v);
    return (v >= 0) ? v / 8 : -((-v + 7) / 8);
  endfunction

  function automatic int ramp(int s, int d, int n, int k);
    int v = s * 128 + floor_div8(k * d) + n * floor_div8(4 * d);
    if (v < 0) v = 0;
    if (v > 4095) v = 4095;
    return v / 16;
  endfunction

  // Controls for data clock j (presented during clock j - 1).
  task automatic set_ctrl_for(int j);
    int n = j % CLOCKS_PER_LINE;
    msd = 1'b1;
    if (n == 0) begin
      {msa, msb} = 2'b11;                            // load AS
      for (int k = 0; k < PIPES; k++) mult_sel[k] = 2'(k);  // (k+1) x D
    end else begin
      {msa, msb} = 2'b00;                            // accumulate
      for (int k = 0; k < PIPES; k++) mult_sel[k] = 2'b11;  // 4 x D
    end
  endtask

  task automatic set_data_for(int j);
    int l = (j / CLOCKS_PER_LINE) % LINES;
    as_v  = 5'(line_as[l]);
    bs_v  = 5'(line_bs[l]);
    daj_v = 15'(line_daj[l]);
    dbj_v = 15'(line_dbj[l]);
    abf   = 1'(line_abf[l]);
  endtask

  task automatic check_result(int j);
    int l = j / CLOCKS_PER_LINE, n = j % CLOCKS_PER_LINE;
    for (int k = 0; k < PIPES; k++) begin
      int ai = ramp(line_as[l], line_daj[l], n, k + 1);
      int bi = ramp(line_bs[l], line_dbj[l], n, k + 1);
      int ea, eb, ec;
      if (ai + bi < 255)        begin ea = ai; eb = bi; ec = 255 - ai - bi; end
      else if (line_abf[l] == 0) begin ea = ai; eb = 255 - ai; ec = 0; n_overlap++; end
      else                       begin ea = 255 - bi; eb = bi; ec = 0; n_overlap++; end
      if (ai == 0 || bi == 0) n_clamp_lo++;
      if (ai == 255 || bi == 255) n_clamp_hi++;
      if (ec == 0) n_c_zero++;
      checks++;
      if (int'(a0[k]) != ea || int'(b0[k]) != eb || int'(c0[k]) != ec) begin
        failures++;
        if (failures < 10)
          $display("line %0d pixel %0d: got %0d %0d %0d expected %0d %0d %0d",
                   l, 4 * n + k + 1, a0[k], b0[k], c0[k], ea, eb, ec);
      end
    end
  endtask

  initial begin
    slrt = 1'b1;
    set_ctrl_for(0);
    set_data_for(0);
    @(posedge clk); #1;
    slrt = 1'b0;
    // clock -1: controls of data clock 0 only
    @(posedge clk); #1;
    for (int t = 0; t < DATA_CLOCKS + 2; t++) begin
      if (t < DATA_CLOCKS) set_data_for(t);
      if (t + 1 < DATA_CLOCKS) set_ctrl_for(t + 1);
      @(posedge clk); #1;
      // after the edge ending clock t, the outputs hold data clock t - 2
      if (t >= 2) check_result(t - 2);
    end
    checks++;
    if (n_clamp_lo == 0 || n_clamp_hi == 0 || n_overlap == 0) begin
      failures++;
      $display("coverage: clamp low %0d high %0d overlap %0d", n_clamp_lo, n_clamp_hi, n_overlap);
    end
    $display("pixels checked: %0d, overlaps %0d, clamped low %0d high %0d",
             checks - 1, n_overlap, n_clamp_lo, n_clamp_hi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
