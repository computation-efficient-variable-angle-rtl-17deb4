// cordic_sincos: pipelined CORDIC that returns cos and sin of a per-unit angle.
//
// The harmonic calculation unit evaluates the trigonometric functions of its
// harmonic phases with the CORDIC algorithm, one angle at a time.  This block
// accepts one angle per clock and returns its cosine and sine ITER+2 clocks
// later.  How it works:
//   * input stage: the angle (unsigned, base pi, range [0,2) = one turn) is
//     folded into [-pi/2, pi/2); for the 2nd and 3rd quadrant the angle is
//     moved by pi and a "negate" flag is kept;
//   * ITER rotation stages: classic rotation-mode CORDIC on 18-bit x/y words
//     (14 fraction bits) started at x = K = 0.60725, y = 0; the angle
//     accumulator has 16 fraction bits of a p.u. (pi = 2^16);
//   * output stage: round to the cos/sin word (1 sign, 1 integer, 8 fraction
//     bits) and apply the negate flag.
// A TAG_W-bit side-band travels with each angle so the caller can match the
// results to its request.
// Interface: in_valid/in_angle/in_tag -> out_valid/out_cos/out_sin/out_tag.
// Timing: fully pipelined, latency ITER+2 clocks, throughput one per clock.
// The use of CORDIC and the output format follow the design; the pipelined
// structure, the internal word widths and ITER = 12 are this design's choices.
module cordic_sincos
  import vaps_pkg::*;
#(
  parameter int ITER  = 12,
  parameter int TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  ang_t             in_angle,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output trig_t            out_cos,
  output trig_t            out_sin,
  output logic [TAG_W-1:0] out_tag
);

  localparam int XY_W = 18;
  localparam int XY_FRAC = 14;
  localparam int Z_W = 19;
  localparam int Z_FRAC = 16;                     // 1.0 p.u. (= pi) = 2^16

  // atan(2^-i)/pi * 2^16, rounded
  localparam logic signed [Z_W-1:0] ATAN [16] = '{
    19'sd16384, 19'sd9672, 19'sd5110, 19'sd2594, 19'sd1302, 19'sd652,
    19'sd326,   19'sd163,  19'sd81,   19'sd41,   19'sd20,   19'sd10,
    19'sd5,     19'sd3,    19'sd1,    19'sd1 };
  // CORDIC gain compensation K = prod 1/sqrt(1+2^-2i) = 0.60725, times 2^14
  localparam logic signed [XY_W-1:0] K_INIT = 18'sd9949;

  initial begin
    assert (ITER >= 8 && ITER <= 16) else $error("cordic_sincos: ITER must be 8..16");
  end

  logic signed [XY_W-1:0] x [ITER+1];
  logic signed [XY_W-1:0] y [ITER+1];
  logic signed [Z_W-1:0]  z [ITER+1];
  logic                   neg [ITER+1];
  logic                   vld [ITER+1];
  logic [TAG_W-1:0]       tag [ITER+1];

  // ---- input stage: quadrant folding ----
  logic signed [Z_W-1:0] z_in;
  logic                  neg_in;
  always_comb begin
    // angle a in [0,2): quadrant = a[8:7]
    unique case (in_angle[ANG_W-1 -: 2])
      2'd0:    begin z_in = Z_W'(in_angle);                       neg_in = 1'b0; end
      2'd1,
      2'd2:    begin z_in = Z_W'(in_angle) - Z_W'(PI_PU);         neg_in = 1'b1; end
      default: begin z_in = Z_W'(in_angle) - Z_W'(2 * PI_PU);     neg_in = 1'b0; end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld[0] <= 1'b0;
      x[0] <= '0; y[0] <= '0; z[0] <= '0; neg[0] <= 1'b0; tag[0] <= '0;
    end else begin
      vld[0] <= in_valid;
      x[0]   <= K_INIT;
      y[0]   <= '0;
      z[0]   <= z_in <<< (Z_FRAC - ANG_FRAC);
      neg[0] <= neg_in;
      tag[0] <= in_tag;
    end
  end

  // ---- rotation stages ----
  for (genvar i = 0; i < ITER; i++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        vld[i+1] <= 1'b0;
        x[i+1] <= '0; y[i+1] <= '0; z[i+1] <= '0; neg[i+1] <= 1'b0; tag[i+1] <= '0;
      end else begin
        vld[i+1] <= vld[i];
        neg[i+1] <= neg[i];
        tag[i+1] <= tag[i];
        if (!z[i][Z_W-1]) begin
          x[i+1] <= x[i] - (y[i] >>> i);
          y[i+1] <= y[i] + (x[i] >>> i);
          z[i+1] <= z[i] - ATAN[i];
        end else begin
          x[i+1] <= x[i] + (y[i] >>> i);
          y[i+1] <= y[i] - (x[i] >>> i);
          z[i+1] <= z[i] + ATAN[i];
        end
      end
    end
  end

  // ---- output stage: round to 8 fraction bits, undo the quadrant fold ----
  function automatic trig_t round_trig(input logic signed [XY_W-1:0] v, input logic n);
    logic signed [XY_W-1:0] r;
    r = (v + XY_W'(1 << (XY_FRAC - TRIG_FRAC - 1))) >>> (XY_FRAC - TRIG_FRAC);
    if (r > XY_W'(1 << TRIG_FRAC))   r = XY_W'(1 << TRIG_FRAC);
    if (r < -XY_W'(1 << TRIG_FRAC))  r = -XY_W'(1 << TRIG_FRAC);
    return n ? -TRIG_W'(r) : TRIG_W'(r);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_cos   <= '0;
      out_sin   <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= vld[ITER];
      out_cos   <= round_trig(x[ITER], neg[ITER]);
      out_sin   <= round_trig(y[ITER], neg[ITER]);
      out_tag   <= tag[ITER];
    end
  end

endmodule
