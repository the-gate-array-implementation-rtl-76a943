// b103 - B103, one area calculation module of pipeline section 1.
//
// Computes an intermediate area (AI or BI) from two possible initial areas,
// an increment and the shared controls. DELTA registers the controls and picks
// the new or old increment; NDELTA multiplies it by 1..4; AREAMUX picks the
// starting area (AS, AA, old AA, or the module's own last result SA); NAREA
// registers both, adds them and clamps the result to [0, .FF]. Selecting SA
// every clock makes the module an accumulator that adds D once per clock.
// The split into sub-modules and their wiring follow the document; ABF is
// carried through for the A module, and the B instance of the top leaves its
// abfi_o unconnected, as the document does.
//
// Timing: controls must be presented one clock before the data (as_i, aa_i,
// daj_i, abf_i) they steer. ai_o, px0_o, px1_o and abfi_o appear one clock
// after the data.
module b103
#(
  parameter int unsigned INIT_W  = acp_pkg::INIT_W,
  parameter int unsigned SUM_W   = acp_pkg::SUM_W,
  parameter int unsigned DELTA_W = acp_pkg::DELTA_W,
  parameter int unsigned AREA_W  = acp_pkg::AREA_W
) (
  input  logic               clk,
  input  logic               slrt,    // synchronous clear of all registers
  input  acp_pkg::ctrl_t              ctrl_i,  // MSA, MSB, MSD, ALUS0, ALUS2
  input  logic [INIT_W-1:0]  as_i,    // AS (or BS)
  input  logic [INIT_W-1:0]  aa_i,    // AA (or BA)
  input  logic [DELTA_W-1:0] daj_i,   // DAJ (or DBJ)
  input  logic               abf_i,   // ABF
  output logic [AREA_W-1:0]  ai_o,    // AI (or BI)
  output logic               px0_o,   // PXA0 (or PXB0)
  output logic               px1_o,   // PXA1 (or PXB1)
  output logic               abfi_o   // ABFI
);

  acp_pkg::area_sel_e          area_sel;
  acp_pkg::mult_sel_e          mult_sel;
  logic [DELTA_W-1:0] ds, d;
  logic               abfs;
  logic [SUM_W-1:0]   am, sa;

  delta #(.DELTA_W(DELTA_W)) u_delta (
    .clk, .slrt, .ctrl_i, .daj_i, .abf_i,
    .area_sel_o(area_sel), .mult_sel_o(mult_sel), .ds_o(ds), .abfs_o(abfs)
  );

  ndelta #(.DELTA_W(DELTA_W)) u_ndelta (
    .ds_i(ds), .mult_sel_i(mult_sel), .d_o(d)
  );

  areamux #(.INIT_W(INIT_W), .SUM_W(SUM_W)) u_areamux (
    .clk, .slrt, .as_i, .aa_i, .sa_i(sa), .sel_i(area_sel), .am_o(am)
  );

  narea #(.SUM_W(SUM_W), .DELTA_W(DELTA_W), .AREA_W(AREA_W)) u_narea (
    .clk, .slrt, .am_i(am), .d_i(d), .abfs_i(abfs),
    .sa_o(sa), .ai_o, .px0_o, .px1_o, .abfi_o
  );

endmodule
