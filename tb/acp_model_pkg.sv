// acp_model_pkg - cycle-level reference model of the area calculation
// pipeline, for the testbenches.
//
// The model works on plain integers rather than bit vectors: an increment is
// a signed integer, a multiple is k * DS reduced modulo 2**15, the area sum is
// an integer clamped to [0, 4095], and CALC applies its three cases with
// integer subtraction from 255. step() is called once per rising clock edge
// with the inputs the design sees at that edge; the output functions give what
// the design shows between that edge and the next.
package acp_model_pkg;

  // One area calculation module (B103).
  class b103_model;
    // registered controls
    int msa, msb, msd, alus0, alus2;
    // registered data
    int ar, dajr, abfr;
    // section 1 pipeline register
    int amr, dr, abfsr;
    // what the last step() did, for coverage counting
    int last_sel, last_mult, last_msd;

    function new();
      clear();
    endfunction

    function void clear();
      msa = 0; msb = 0; msd = 0; alus0 = 0; alus2 = 0;
      ar = 0; dajr = 0; abfr = 0; amr = 0; dr = 0; abfsr = 0;
      last_sel = 0; last_mult = 0; last_msd = 0;
    endfunction

    static function int to_signed15(int v);
      int w = v & 32'h7FFF;
      return (w >= 16384) ? w - 32768 : w;
    endfunction

    // Raw (unclamped) sum of the pipeline register: area plus the increment
    // scaled down by 8 (the top 12 of its 15 bits, rounded towards minus
    // infinity).
    function int raw_sum();
      int q = dr / 8;
      if (dr < 0 && (dr % 8) != 0) q = q - 1;
      return amr + q;
    endfunction

    function int sa();
      int s = raw_sum();
      if (s < 0) return 0;
      if (s > 4095) return 4095;
      return s;
    endfunction

    function int ai();
      return sa() / 16;
    endfunction

    function int px0();
      return (ai() == 0) ? 1 : 0;
    endfunction

    function int px1();
      return (ai() == 255) ? 1 : 0;
    endfunction

    function int abfi();
      return abfsr;
    endfunction

    // Inputs: controls (presented one clock ahead) and data of this clock.
    function void step(int c_msa, int c_msb, int c_msd, int c_alus0, int c_alus2,
                       int as_v, int aa_v, int daj_v, int abf_v);
      int ds, k, d, am, sel;
      int daj_s = to_signed15(daj_v);
      ds = (msd != 0) ? daj_s : dajr;
      k  = 2 * alus0 + alus2 + 1;
      d  = to_signed15(ds * k);
      sel = 2 * msa + msb;
      case (sel)
        0: am = sa();
        1: am = ar * 128;
        2: am = aa_v * 128;
        default: am = as_v * 128;
      endcase
      last_sel = sel; last_mult = k; last_msd = msd;
      // register updates
      abfsr = (msd != 0) ? abf_v : abfr;
      amr = am;
      dr  = d;
      msa = c_msa; msb = c_msb; msd = c_msd; alus0 = c_alus0; alus2 = c_alus2;
      ar = aa_v; dajr = daj_s; abfr = abf_v;
    endfunction
  endclass

  // Pipeline section 2 (CALC with its output register).
  class calc_model;
    int air, bir, abfir;
    int a, b, c;
    int last_case;  // 1: no overflow, 2: overflow A kept, 3: overflow B kept

    function new();
      clear();
    endfunction

    function void clear();
      air = 0; bir = 0; abfir = 0; a = 0; b = 0; c = 0; last_case = 0;
    endfunction

    function void step(int ai_v, int bi_v, int abfi_v);
      if (air + bir < 255) begin
        a = air; b = bir; c = 255 - (air + bir); last_case = 1;
      end else if (abfir == 0) begin
        a = air; b = 255 - air; c = 0; last_case = 2;
      end else begin
        a = 255 - bir; b = bir; c = 0; last_case = 3;
      end
      air = ai_v; bir = bi_v; abfir = abfi_v;
    endfunction
  endclass

endpackage
