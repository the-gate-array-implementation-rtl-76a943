// ndelta - NDELTA, the increment multiplier of an area calculation module
// (B103).
//
// Forms 1, 2, 3 and 4 times the selected increment DS and passes one of them
// on as D, chosen by the registered selects {ALUS0R, ALUS2R} (00: 1x, 01: 2x,
// 10: 3x, 11: 4x). As in the document, 2x and 4x are shifts of DS by one and
// two places, 3x is DS + 2x, and every result keeps the DS width, so bits
// shifted out at the top are lost: the increments fed in must be small enough
// for the multiple they are used with.
//
// Timing: purely combinational.
module ndelta
#(
  parameter int unsigned DELTA_W = acp_pkg::DELTA_W
) (
  input  logic [DELTA_W-1:0] ds_i,        // DS
  input  acp_pkg::mult_sel_e          mult_sel_i,  // {ALUS0R, ALUS2R}
  output logic [DELTA_W-1:0] d_o          // D
);

  logic [DELTA_W-1:0] x2, x3, x4;

  assign x2 = {ds_i[DELTA_W-2:0], 1'b0};
  assign x4 = {ds_i[DELTA_W-3:0], 2'b00};
  assign x3 = ds_i + x2;

  always_comb begin
    unique case (mult_sel_i)
      acp_pkg::MULT_X1: d_o = ds_i;
      acp_pkg::MULT_X2: d_o = x2;
      acp_pkg::MULT_X3: d_o = x3;
      acp_pkg::MULT_X4: d_o = x4;
      default: d_o = ds_i;
    endcase
  end

endmodule
