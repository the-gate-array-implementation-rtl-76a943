// delta - DELTA, the input register and old/new selector of an area
// calculation module (B103).
//
// The five control inputs (MSA, MSB, MSD, ALUS0, ALUS2) arrive one clock ahead
// of the data they steer and are registered here; the registered area and
// multiple selects go on to AREAMUX and NDELTA. The increment DAJ and the
// priority flag ABF are also registered, and the registered MSD chooses between
// this clock's values (MSDR = 1) and the previous clock's (MSDR = 0):
//   DS   = MSDR ? DAJ : DAJR
//   ABFS = MSDR ? ABF : ABFR
// All of this follows the document; the synchronous active-high clear is this
// design's choice.
//
// Timing: area_sel_o and mult_sel_o are register outputs; ds_o and abfs_o are
// combinational from daj_i/abf_i and the registers.
module delta
#(
  parameter int unsigned DELTA_W = acp_pkg::DELTA_W
) (
  input  logic               clk,
  input  logic               slrt,        // synchronous clear
  input  acp_pkg::ctrl_t              ctrl_i,      // MSA, MSB, MSD, ALUS0, ALUS2
  input  logic [DELTA_W-1:0] daj_i,       // DAJ
  input  logic               abf_i,       // ABF
  output acp_pkg::area_sel_e          area_sel_o,  // {MSAR, MSBR}
  output acp_pkg::mult_sel_e          mult_sel_o,  // {ALUS0R, ALUS2R}
  output logic [DELTA_W-1:0] ds_o,        // DS
  output logic               abfs_o       // ABFS
);

  acp_pkg::ctrl_t              ctrl_q;  // MSAR, MSBR, MSDR, ALUS0R, ALUS2R
  logic [DELTA_W-1:0] dajr_q;  // DAJR
  logic               abfr_q;  // ABFR

  always_ff @(posedge clk) begin
    if (slrt) begin
      ctrl_q <= '0;
      dajr_q <= '0;
      abfr_q <= 1'b0;
    end else begin
      ctrl_q <= ctrl_i;
      dajr_q <= daj_i;
      abfr_q <= abf_i;
    end
  end

  assign area_sel_o = acp_pkg::area_sel_e'({ctrl_q.msa, ctrl_q.msb});
  assign mult_sel_o = acp_pkg::mult_sel_e'({ctrl_q.alus0, ctrl_q.alus2});
  assign ds_o       = ctrl_q.msd ? daj_i : dajr_q;
  assign abfs_o     = ctrl_q.msd ? abf_i : abfr_q;

endmodule
