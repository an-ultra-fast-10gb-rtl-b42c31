// lc_pll: BEHAVIOURAL MODEL (not synthesizable) of the LC-oscillator
// charge-pump PLL that makes the 5 GHz serialiser clock.
//
// The real block is analogue: an LC oscillator whose band is set by
// switchable capacitors, a phase-frequency detector and charge pump driving
// the loop filter, and a divide-by-128 feedback divider of dynamic
// flip-flops. This model keeps that structure at event level:
//  * VCO: a clock whose frequency is f_band(cap_sel) + tune, with
//    f_band = F_TOP_MHZ - cap_sel*F_STEP_MHZ and tune limited to
//    +/- TUNE_MHZ (more capacitance, lower band);
//  * divider: the synthesizable pll_div128 (clk5g / 128);
//  * PFD + charge pump: a tri-state detector; the UP/DN pulse widths of
//    each reference cycle (in ps) are the pumped charge q;
//  * loop filter: proportional-integral, tune = KI*sum(q) + KP*q.
// 'lock' rises after LOCK_CYCLES reference cycles with |q| < LOCK_PS and
// falls when |q| exceeds 4*LOCK_PS. With a 39.0625 MHz reference the
// output settles at 5 GHz (and 10 Gb/s on the line); a 40.28 MHz reference
// gives the 5.156 GHz needed for the 10.3125 Gb/s Aurora line rate.
// The divide ratio, the LC oscillator with switchable capacitors and the
// charge-pump loop are the source design's; every number here (bands,
// gains, lock rule) is this model's own.
`timescale 1ps/1fs
module lc_pll #(
  parameter real         F_TOP_MHZ   = 5400.0,  // band of cap_sel = 0
  parameter real         F_STEP_MHZ  = 100.0,   // band step per capacitor
  parameter real         TUNE_MHZ    = 150.0,   // loop tuning range
  parameter real         KP          = 0.02,    // MHz per ps of phase error
  parameter real         KI          = 0.0005,  // MHz per ps, integrated
  parameter real         LOCK_PS     = 5.0,
  parameter int unsigned LOCK_CYCLES = 32
) (
  input  logic       ref_clk,
  input  logic       rst_n,     // low: loop filter cleared, divider reset
  input  logic [2:0] cap_sel,   // switchable tuning capacitors (band)
  output logic       clk5g,
  output logic       fb_clk,    // divided clock, for observation
  output logic       lock
);

  real         f_mhz = F_TOP_MHZ;
  real         integ;
  real         q;        // charge of the current reference cycle, ps
  real         t_up, t_dn;
  real         tune;
  logic        up, dn;
  int unsigned good;

  pll_div128 u_div (
    .clk    (clk5g),
    .rst_n  (rst_n),
    .clk_div(fb_clk)
  );

  // VCO
  initial clk5g = 1'b0;
  always #(500000.0 / f_mhz) clk5g = ~clk5g;

  // PFD, charge pump and loop filter. One process sees every change of both
  // inputs, so coincident edges are handled in a defined order.
  logic ref_d, fb_d;

  always @(ref_clk or fb_clk or rst_n) begin
    if (!rst_n) begin
      up    = 1'b0;
      dn    = 1'b0;
      q     = 0.0;
      integ = 0.0;
      tune  = 0.0;
      good  = 0;
      lock  = 1'b0;
      ref_d = ref_clk;
      fb_d  = fb_clk;
      f_mhz = F_TOP_MHZ - real'(cap_sel) * F_STEP_MHZ;
    end else begin
      // feedback edge: ends an UP pulse or starts a DN pulse
      if (fb_clk && !fb_d) begin
        if (up) begin
          q  = q + ($realtime - t_up);
          up = 1'b0;
        end else if (!dn) begin
          dn   = 1'b1;
          t_dn = $realtime;
        end
      end
      // reference edge: ends a DN pulse or starts an UP pulse, then the
      // charge of the cycle goes through the loop filter
      if (ref_clk && !ref_d) begin
        if (dn) begin
          q  = q - ($realtime - t_dn);
          dn = 1'b0;
        end else if (!up) begin
          up   = 1'b1;
          t_up = $realtime;
        end
        integ = integ + KI * q;
        if (integ > TUNE_MHZ)  integ = TUNE_MHZ;
        if (integ < -TUNE_MHZ) integ = -TUNE_MHZ;
        tune = integ + KP * q;
        if (tune > TUNE_MHZ)  tune = TUNE_MHZ;
        if (tune < -TUNE_MHZ) tune = -TUNE_MHZ;
        f_mhz = F_TOP_MHZ - real'(cap_sel) * F_STEP_MHZ + tune;
        if (q < LOCK_PS && q > -LOCK_PS) begin
          if (good < LOCK_CYCLES) good = good + 1;
          else                    lock = 1'b1;
        end else begin
          good = 0;
          if (q > 4.0 * LOCK_PS || q < -4.0 * LOCK_PS) lock = 1'b0;
        end
        q = 0.0;
      end
      ref_d = ref_clk;
      fb_d  = fb_clk;
    end
  end

endmodule
