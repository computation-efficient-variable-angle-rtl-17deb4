// pucu: particle updating calculation unit.  For one particle it computes
// the PSO velocity and position update of all cells at once:
//     v'   = sat( w*v + cp*r1*(pbest - phi) + cg*r2*(gbest - phi), +-VLIM )
//     phi' = (phi + v') mod pi
// How it works: each cell has its own datapath (two subtractors, two
// multipliers by the random factors r1, r2, an adder and a saturator); the
// constant coefficients w, cp and cg are powers of two and are applied as
// arithmetic shifts (OMEGA_SHIFT, CP_SHIFT, CG_SHIFT: positive = left shift,
// negative = right shift).  Products are kept with 17 fraction bits, the sum
// is truncated to the 8 fraction bits of the velocity word and saturated to
// +-VLIM; the new angle wraps modulo pi (1.0 p.u., the 8 fraction bits).
// Interface: start (one clock) samples v, phi, pbest, gbest, r1, r2 and
// loads the results; done pulses one clock later with phi_new/v_new valid;
// results hold until the next start.
// Timing: one clock from start to done, one particle per clock if started
// back to back.
// The structure (shifts for w/cp/cg, multipliers, saturation, mod pi) and
// the word formats follow the design; the coefficient values and VLIM are
// not given there and are this design's defaults (w = 0.5, cp = cg = 2,
// VLIM = 64/256 p.u. = pi/4).
module pucu
  import vaps_pkg::*;
#(
  parameter int N_CELLS     = 4,
  parameter int OMEGA_SHIFT = -1,
  parameter int CP_SHIFT    = 1,
  parameter int CG_SHIFT    = 1,
  parameter int VLIM        = 64
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  vel_t v       [N_CELLS],
  input  ang_t phi     [N_CELLS],
  input  ang_t pbest   [N_CELLS],
  input  ang_t gbest   [N_CELLS],
  input  rnd_t r1,
  input  rnd_t r2,
  output logic done,
  output ang_t phi_new [N_CELLS],
  output vel_t v_new   [N_CELLS]
);

  localparam int W    = 32;                 // internal width, 17 fraction bits
  localparam int IFR  = ANG_FRAC + RND_FRAC;

  initial begin
    assert (VLIM > 0 && VLIM < (1 << (VEL_W - 1))) else $error("pucu: VLIM out of range");
    assert (OMEGA_SHIFT <= RND_FRAC && CP_SHIFT <= 4 && CG_SHIFT <= 4 &&
            OMEGA_SHIFT >= -8 && CP_SHIFT >= -8 && CG_SHIFT >= -8)
      else $error("pucu: coefficient shift out of range");
  end

  function automatic logic signed [W-1:0] shift_s(input logic signed [W-1:0] x, input int s);
    return (s >= 0) ? (x <<< s) : (x >>> (-s));
  endfunction

  vel_t v_calc   [N_CELLS];
  ang_t phi_calc [N_CELLS];

  always_comb begin
    for (int k = 0; k < N_CELLS; k++) begin
      logic signed [W-1:0] dp, dg, tp, tg, tw, sum, vr;
      logic signed [W-1:0] ps;
      dp  = W'($signed({1'b0, pbest[k]})) - W'($signed({1'b0, phi[k]}));
      dg  = W'($signed({1'b0, gbest[k]})) - W'($signed({1'b0, phi[k]}));
      tp  = shift_s(dp, CP_SHIFT) * W'($signed({1'b0, r1}));
      tg  = shift_s(dg, CG_SHIFT) * W'($signed({1'b0, r2}));
      tw  = shift_s(W'(v[k]) <<< RND_FRAC, OMEGA_SHIFT);
      sum = tw + tp + tg;                              // 17 fraction bits
      vr  = sum >>> (IFR - ANG_FRAC);                  // back to 8 fraction bits
      if (vr > W'(VLIM))       vr = W'(VLIM);
      else if (vr < -W'(VLIM)) vr = -W'(VLIM);
      v_calc[k] = VEL_W'(vr);
      ps = W'($signed({1'b0, phi[k]})) + vr;
      phi_calc[k] = {1'b0, ps[ANG_FRAC-1:0]};          // mod pi
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= 1'b0;
      for (int k = 0; k < N_CELLS; k++) begin
        phi_new[k] <= '0;
        v_new[k]   <= '0;
      end
    end else begin
      done <= start;
      if (start) begin
        phi_new <= phi_calc;
        v_new   <= v_calc;
      end
    end
  end

endmodule
