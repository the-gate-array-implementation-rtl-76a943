// vpac - VPAC, the area calculation pipeline (ACP) gate array.
//
// Given preliminary data about two areas A and B of a pixel, the chip works
// out their final values and the remaining area C, with A + B + C equal to one
// pixel (.FF). Two identical B103 modules (pipeline section 1) compute the
// intermediate areas AI and BI, each from a choice of initial areas, a scaled
// increment and, when accumulating, its own previous result; CALC (pipeline
// section 2) splits the pixel between them, using ABF to decide which area
// keeps its value when they overlap. The controls are shared by both B103
// modules, as is ABF; the flag from the B module's NAREA is not used.
//
// Interface: plain input pins for the data and controls, one clock (120 ns,
// 8.33 MHz, in the original system) and the clear SLRT. Controls (msa, msb,
// msd, alus0, alus2) lead the data they steer by one clock.
//
// Timing: with data presented in clock n, PXA0/PXA1/PXB0/PXB1 are valid in
// clock n+1 and A0, B0, C0 in clock n+3. A new data set is accepted every
// clock. The structure, widths and pipeline depth follow the document; the
// polarity and synchronous action of SLRT are this design's choice.
module vpac
#(
  parameter int unsigned INIT_W  = acp_pkg::INIT_W,
  parameter int unsigned SUM_W   = acp_pkg::SUM_W,
  parameter int unsigned DELTA_W = acp_pkg::DELTA_W,
  parameter int unsigned AREA_W  = acp_pkg::AREA_W
) (
  input  logic               clk,
  input  logic               slrt,   // SLRT: synchronous clear, active high
  // A data
  input  logic [INIT_W-1:0]  as_i,   // AS
  input  logic [INIT_W-1:0]  aa_i,   // AA
  input  logic [DELTA_W-1:0] daj_i,  // DAJ
  // B data
  input  logic [INIT_W-1:0]  bs_i,   // BS
  input  logic [INIT_W-1:0]  ba_i,   // BA
  input  logic [DELTA_W-1:0] dbj_i,  // DBJ
  input  logic               abf_i,  // ABF, area priority flag
  // Shared controls, one clock ahead of the data
  input  logic               msa_i,
  input  logic               msb_i,
  input  logic               msd_i,
  input  logic               alus0_i,
  input  logic               alus2_i,
  // Results
  output logic [AREA_W-1:0]  a0_o,   // A0
  output logic [AREA_W-1:0]  b0_o,   // B0
  output logic [AREA_W-1:0]  c0_o,   // C0
  output logic               pxa0_o, // AI is zero
  output logic               pxa1_o, // AI is .FF
  output logic               pxb0_o, // BI is zero
  output logic               pxb1_o  // BI is .FF
);

  acp_pkg::ctrl_t             ctrl;
  logic [AREA_W-1:0] ai, bi;
  logic              abfi;

  assign ctrl = '{msa: msa_i, msb: msb_i, msd: msd_i, alus0: alus0_i, alus2: alus2_i};

  b103 #(.INIT_W(INIT_W), .SUM_W(SUM_W), .DELTA_W(DELTA_W), .AREA_W(AREA_W)) u_b103_a (
    .clk, .slrt, .ctrl_i(ctrl), .as_i, .aa_i, .daj_i, .abf_i,
    .ai_o(ai), .px0_o(pxa0_o), .px1_o(pxa1_o), .abfi_o(abfi)
  );

  b103 #(.INIT_W(INIT_W), .SUM_W(SUM_W), .DELTA_W(DELTA_W), .AREA_W(AREA_W)) u_b103_b (
    .clk, .slrt, .ctrl_i(ctrl), .as_i(bs_i), .aa_i(ba_i), .daj_i(dbj_i), .abf_i,
    .ai_o(bi), .px0_o(pxb0_o), .px1_o(pxb1_o), .abfi_o()
  );

  calc #(.AREA_W(AREA_W)) u_calc (
    .clk, .slrt, .ai_i(ai), .bi_i(bi), .abfi_i(abfi),
    .a_o(a0_o), .b_o(b0_o), .c_o(c0_o)
  );

endmodule
