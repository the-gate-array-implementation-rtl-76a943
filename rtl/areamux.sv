// areamux - AREAMUX, the 4:1 area selector at the head of an area calculation
// module (B103).
//
// Each clock AA is stored in a 5-bit register (AR). The output AM is one of:
//   sel 00  SA, the last value of the area fed back from NAREA (accumulate),
//   sel 01  AR, the AA of the previous clock,
//   sel 10  AA of this clock,
//   sel 11  AS of this clock.
// The 5-bit initial areas are placed in the top bits of the 12-bit AM with
// zeros below. The selection table, the widths and the AR register follow the
// document; the synchronous active-high clear (slrt) is this design's choice.
//
// Timing: AM is combinational from sa_i, as_i, aa_i, sel_i and AR; AR loads
// on every rising clock edge.
module areamux
#(
  parameter int unsigned INIT_W = acp_pkg::INIT_W,
  parameter int unsigned SUM_W  = acp_pkg::SUM_W
) (
  input  logic              clk,
  input  logic              slrt,   // synchronous clear of AR
  input  logic [INIT_W-1:0] as_i,   // AS
  input  logic [INIT_W-1:0] aa_i,   // AA
  input  logic [SUM_W-1:0]  sa_i,   // SA, fed back from NAREA
  input  acp_pkg::area_sel_e         sel_i,  // {MSAR, MSBR}
  output logic [SUM_W-1:0]  am_o    // AM
);

  localparam int unsigned PAD_W = SUM_W - INIT_W;

  logic [INIT_W-1:0] ar_q;  // AR: AA of the previous clock

  always_ff @(posedge clk) begin
    if (slrt) ar_q <= '0;
    else      ar_q <= aa_i;
  end

  always_comb begin
    unique case (sel_i)
      acp_pkg::AREA_SA:     am_o = sa_i;
      acp_pkg::AREA_AA_OLD: am_o = {ar_q, PAD_W'(0)};
      acp_pkg::AREA_AA_NEW: am_o = {aa_i, PAD_W'(0)};
      acp_pkg::AREA_AS:     am_o = {as_i, PAD_W'(0)};
      default:     am_o = sa_i;
    endcase
  end

endmodule
