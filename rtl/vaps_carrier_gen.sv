// vaps_carrier_gen: generation of the variable-angle phase-shifted carriers.
//
// Every cell of the cascaded H-bridge gets a triangular carrier of period
// PERIOD clocks (the switching period of one bridge leg), shifted against
// the carrier of the first cell by its carrier angle phi_c*,k.  The angle is
// a per-unit word with base pi, so the shift in clocks is
// phi_c*,k / (2*pi) * PERIOD = (phi_word * PERIOD) >> 9.
// How it works: one master counter 0..PERIOD-1 is restarted by the rising
// edge of the synchronization clock from the DSP (passed through a
// two-flop synchronizer) and otherwise wraps freely.  Each cell adds its
// shift modulo PERIOD and folds the result into a triangle
// carrier = 2*min(p, PERIOD-p) - PERIOD/2, which runs from -PERIOD/2 (phase 0)
// up to +PERIOD/2 and back.  New angles are taken over only when the master
// counter restarts, so a carrier never jumps in the middle of a period.
// Interface: sync_in (asynchronous), phic_ref from the variable memory;
// carrier[k] signed, period_start pulses in the clock where the master
// carrier is at phase 0 (aligned with carrier[]).
// Timing: carrier[] is registered; a sync edge restarts the counter three
// clocks after it reaches sync_in.
// Triangular carriers, the DSP synchronization clock and the per-cell phase
// shifts follow the design; the counter resolution (one clock), the
// update at the period start and the phase origin are this design's choices.
module vaps_carrier_gen
  import vaps_pkg::*;
#(
  parameter int N_CELLS = 4,
  parameter int PERIOD  = 120000,
  localparam int CNT_W  = $clog2(PERIOD),
  localparam int CAR_W  = CNT_W + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    sync_in,
  input  ang_t                    phic_ref [N_CELLS],
  output logic signed [CAR_W-1:0] carrier  [N_CELLS],
  output logic                    period_start
);

  localparam int HALF = PERIOD / 2;

  initial begin
    assert (PERIOD % 2 == 0 && PERIOD >= 8) else $error("vaps_carrier_gen: PERIOD must be even");
  end

  logic [2:0]       sync_s;
  logic             sync_rise;
  logic [CNT_W-1:0] cnt, cnt_next;
  logic [CNT_W-1:0] shift [N_CELLS];

  assign sync_rise = sync_s[1] && !sync_s[2];
  assign cnt_next  = (sync_rise || cnt == CNT_W'(PERIOD - 1)) ? '0 : cnt + 1'b1;

  function automatic logic [CNT_W-1:0] angle_to_shift(input ang_t a);
    logic [CNT_W+ANG_W-1:0] p;
    p = (CNT_W+ANG_W)'(a) * (CNT_W+ANG_W)'(PERIOD);
    return CNT_W'(p >> (ANG_W));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_s <= '0;
      cnt    <= '0;
      for (int k = 0; k < N_CELLS; k++) shift[k] <= '0;
    end else begin
      sync_s <= {sync_s[1:0], sync_in};
      cnt    <= cnt_next;
      if (cnt_next == '0)
        for (int k = 0; k < N_CELLS; k++) shift[k] <= angle_to_shift(phic_ref[k]);
    end
  end

  // triangle of every cell from the shifted master count
  logic signed [CAR_W-1:0] car_next [N_CELLS];
  always_comb begin
    for (int k = 0; k < N_CELLS; k++) begin
      logic [CNT_W:0] p;
      logic [CNT_W:0] tri_v;
      p = (CNT_W+1)'(cnt) + (CNT_W+1)'(shift[k]);
      if (p >= (CNT_W+1)'(PERIOD)) p = p - (CNT_W+1)'(PERIOD);
      tri_v = (p < (CNT_W+1)'(HALF)) ? p : (CNT_W+1)'(PERIOD) - p;
      car_next[k] = CAR_W'($signed({tri_v, 1'b0}) - $signed((CAR_W+1)'(HALF)));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      period_start <= 1'b0;
      for (int k = 0; k < N_CELLS; k++) carrier[k] <= -CAR_W'(HALF);
    end else begin
      period_start <= (cnt == '0);
      carrier      <= car_next;
    end
  end

endmodule
