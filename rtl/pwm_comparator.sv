// pwm_comparator: unipolar PWM of every H-bridge cell with two opposite
// carriers.
//
// Each cell's two legs are modulated with carriers of opposite sign, which
// doubles the switching frequency seen at the cell's AC output: leg A is on
// while m*_k > c_k, leg B is on while -m*_k > c_k (the same as comparing
// m*_k with the opposite carrier -c_k).  The reference m*_k is a signed
// word with 11 fraction bits (full scale +-1.0) and the carrier spans
// +-HALF, so the comparison is m*HALF > c*2^11.
// How it works: the references written by the DSP are taken over at each
// period_start (start of a carrier period, where the new reference is
// already used) and held for the rest of the period.
// Interface: m_ref from the variable memory, carrier / period_start from the
// carrier generator; leg_a[k], leg_b[k] are the upper-switch gate commands
// of the two legs of cell k (the lower switch of a leg is the complement;
// dead time is left to the gate drivers).
// Timing: outputs registered, one clock after the carrier sample.
// The comparison with two opposite carriers follows the design; the
// reference format and the update instant are this design's choices.
module pwm_comparator
  import vaps_pkg::*;
#(
  parameter int N_CELLS = 4,
  parameter int CAR_W   = 18,
  parameter int HALF    = 60000
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    period_start,
  input  mod_t                    m_ref   [N_CELLS],
  input  logic signed [CAR_W-1:0] carrier [N_CELLS],
  output logic [N_CELLS-1:0]      leg_a,
  output logic [N_CELLS-1:0]      leg_b
);

  localparam int PW = CAR_W + MOD_W + 2;

  mod_t m_act [N_CELLS];

  logic [N_CELLS-1:0] a_next, b_next;
  always_comb begin
    for (int k = 0; k < N_CELLS; k++) begin
      logic signed [PW-1:0] mh, ch;
      mh = PW'(period_start ? m_ref[k] : m_act[k]) * PW'(HALF);
      ch = PW'(carrier[k]) <<< MOD_FRAC;
      a_next[k] = mh > ch;
      b_next[k] = -mh > ch;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      leg_a <= '0;
      leg_b <= '0;
      for (int k = 0; k < N_CELLS; k++) m_act[k] <= '0;
    end else begin
      if (period_start) m_act <= m_ref;
      leg_a <= a_next;
      leg_b <= b_next;
    end
  end

endmodule
