// calc - CALC, pipeline section 2: splits one pixel into the areas A, B, C.
//
// AI, BI and the priority flag ABFI are captured in the section 2 pipeline
// register. A 9-bit adder forms AI + BI; its carry OV says the two areas do
// not fit in one pixel (.FF). Then
//   no carry           A = AI,        B = BI,        C = .FF - (AI + BI)
//   carry, ABFI = 0    A = AI,        B = .FF - AI,  C = 0
//   carry, ABFI = 1    A = .FF - BI,  B = BI,        C = 0
// so that A + B + C = .FF always (the assertion below checks it). ".FF - x"
// is the bitwise complement of x, as in the document's circuit. The result
// goes through the output pipeline register, the stage added in the final
// version of the design so that the logic after the chip has a full clock.
// All of this follows the document; the synchronous clear is this design's
// choice.
//
// Timing: a_o, b_o, c_o are register outputs, two clocks after ai_i, bi_i,
// abfi_i.
module calc
#(
  parameter int unsigned AREA_W = acp_pkg::AREA_W
) (
  input  logic              clk,
  input  logic              slrt,    // synchronous clear
  input  logic [AREA_W-1:0] ai_i,    // AI
  input  logic [AREA_W-1:0] bi_i,    // BI
  input  logic              abfi_i,  // ABFI: 1 gives B priority on overflow
  output logic [AREA_W-1:0] a_o,     // A0
  output logic [AREA_W-1:0] b_o,     // B0
  output logic [AREA_W-1:0] c_o      // C0
);

  logic [AREA_W-1:0] air_q, bir_q;  // AIR, BIR
  logic              abfir_q;       // ABFIR
  logic [AREA_W:0]   ci;            // CI: carry (OV) and sum
  logic              ov, ova, ovb;
  logic [AREA_W-1:0] ap, bp, cp;    // AP, BP, CP

  always_ff @(posedge clk) begin
    if (slrt) begin
      air_q   <= '0;
      bir_q   <= '0;
      abfir_q <= 1'b0;
    end else begin
      air_q   <= ai_i;
      bir_q   <= bi_i;
      abfir_q <= abfi_i;
    end
  end

  assign ci  = {1'b0, air_q} + {1'b0, bir_q};
  assign ov  = ci[AREA_W];
  assign ova = ov & abfir_q;
  assign ovb = ov & ~abfir_q;
  assign ap  = ova ? ~bir_q : air_q;
  assign bp  = ovb ? ~air_q : bir_q;
  assign cp  = ov ? '0 : ~ci[AREA_W-1:0];

  // Output pipeline register (APR, BPR, CPR).
  always_ff @(posedge clk) begin
    if (slrt) begin
      a_o <= '0;
      b_o <= '0;
      c_o <= '0;
    end else begin
      a_o <= ap;
      b_o <= bp;
      c_o <= cp;
    end
  end

  // The three areas always fill exactly one pixel.
  a_sum_is_one: assert property (@(posedge clk)
    ({1'b0, ap} + {1'b0, bp} + {1'b0, cp}) == {1'b0, {AREA_W{1'b1}}});

endmodule
