// narea - NAREA, the first pipeline register and the clamping adder of an area
// calculation module (B103).
//
// On each rising clock edge the selected area AM, the multiplied increment D
// and the flag ABFS are captured (AMR, DR, ABFSR: the pipeline register of
// section 1). The top SUM_W bits of DR, a two's complement number, are added
// to the unsigned area AMR. The sum is clamped:
//   below zero            -> 0
//   one (2**SUM_W) or more -> all ones, i.e. AI = .FF
//   otherwise             -> unchanged.
// The clamped 12-bit value is SA, fed back to AREAMUX as "the last value of
// the area"; its top AREA_W bits are AI. PXA0 is 1 when AI is zero, PXA1 when
// AI is .FF. ABFI is the registered ABFS.
// Register contents, adder, clamp rule and flags follow the document. The
// exact clamp value at the top (all ones rather than .FF followed by zeros)
// and feeding back the clamped rather than the raw sum are this design's
// reading of it; the clear is this design's choice.
//
// Timing: AI, SA, PXA0, PXA1 and ABFI are combinational from the registers,
// so they follow the inputs by one clock.
// DR is kept at the full increment width, as in the original register list;
// its three low bits are not used by the adder, which a linter reports.
module narea
#(
  parameter int unsigned SUM_W   = acp_pkg::SUM_W,
  parameter int unsigned DELTA_W = acp_pkg::DELTA_W,
  parameter int unsigned AREA_W  = acp_pkg::AREA_W
) (
  input  logic               clk,
  input  logic               slrt,    // synchronous clear
  input  logic [SUM_W-1:0]   am_i,    // AM
  input  logic [DELTA_W-1:0] d_i,     // D
  input  logic               abfs_i,  // ABFS
  output logic [SUM_W-1:0]   sa_o,    // SA, clamped area, fed back
  output logic [AREA_W-1:0]  ai_o,    // AI
  output logic               px0_o,   // PXA0: AI is zero
  output logic               px1_o,   // PXA1: AI is .FF
  output logic               abfi_o   // ABFI
);

  logic [SUM_W-1:0]   amr_q;   // AMR
  logic [DELTA_W-1:0] dr_q;    // DR
  logic               abfsr_q; // ABFSR

  always_ff @(posedge clk) begin
    if (slrt) begin
      amr_q   <= '0;
      dr_q    <= '0;
      abfsr_q <= 1'b0;
    end else begin
      amr_q   <= am_i;
      dr_q    <= d_i;
      abfsr_q <= abfs_i;
    end
  end

  // Two guard bits: bit SUM_W+1 is the sign, bit SUM_W the "one or more" bit.
  logic [SUM_W-1:0] dtop;
  logic [SUM_W+1:0] sum;
  logic             negative, overflow;

  assign dtop     = dr_q[DELTA_W-1 -: SUM_W];
  assign sum      = {2'b00, amr_q} + {{2{dtop[SUM_W-1]}}, dtop};
  assign negative = sum[SUM_W+1];
  assign overflow = !negative && sum[SUM_W];

  always_comb begin
    if (negative)      sa_o = '0;
    else if (overflow) sa_o = '1;
    else               sa_o = sum[SUM_W-1:0];
  end

  assign ai_o   = sa_o[SUM_W-1 -: AREA_W];
  assign px0_o  = ~|ai_o;
  assign px1_o  = &ai_o;
  assign abfi_o = abfsr_q;

endmodule
