// hcu: harmonic calculation unit.  Computes, for one particle of the swarm,
// the squared sum of the carrier-band voltage harmonics of the whole
// cascaded-H-bridge output,
//     U_h,sum^2 = sum_{h1,h2} [ (sum_k U_hkf cos phi_hkf)^2 + (sum_k U_hkf sin phi_hkf)^2 ]
//     phi_hkf   = (2*h1*phi_c,k + (2*h2-1)*phi_0,k) mod 2*pi
// over h1 = 1..2, h2 = -2..3 and the N_CELLS cells.
// How it works (data flow of the unit):
//   1. on start the particle's carrier angles phi_c and the fundamental
//      angles phi_0 are latched; all N_HH*N_CELLS phases phi_hkf are formed in
//      parallel with small constant multipliers (2*h1 and 2*h2-1); the modulo
//      is the wrap-around of the 9-bit per-unit angle word;
//   2. a parallel-to-series stage feeds them, one per clock, to a single
//      pipelined CORDIC (cos, sin) in the order (h1,h2) outer, cell k inner;
//   3. two multipliers form X_hkf = U_hkf*cos and Y_hkf = U_hkf*sin;
//   4. an accumulator sums the N_CELLS terms of one (h1,h2) pair into X_hf, Y_hf;
//   5. two squarers form X_hf^2, Y_hf^2, which a series-to-parallel stage
//      collects for all N_HH pairs;
//   6. an adder tree sums the 2*N_HH squares into U_h,sum^2.
// Word formats (see vaps_pkg) follow the design's precision table; narrowing
// steps truncate low bits and saturate high bits (this design's choice).
// Interface: start (one-clock pulse, ignored while busy); u_hkf, phi0 and
// phic must stay valid until done (phi0/phic are latched, u_hkf is read as
// its terms pass through the pipeline).  done pulses for one clock with usum valid;
// usum holds until the next result.
// Timing: done comes N_HH*N_CELLS + ITER + 5 clocks after start.
module hcu
  import vaps_pkg::*;
#(
  parameter int N_CELLS = 4,
  parameter int ITER    = 12
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  uh_t   u_hkf [N_HH*N_CELLS],   // index (h1i*N_H2 + h2i)*N_CELLS + k
  input  ang_t  phi0  [N_CELLS],
  input  ang_t  phic  [N_CELLS],
  output logic  busy,
  output logic  done,
  output usum_t usum
);

  localparam int NT   = N_HH * N_CELLS;
  localparam int HH_W = $clog2(N_HH);
  localparam int K_W  = (N_CELLS > 1) ? $clog2(N_CELLS) : 1;
  localparam int TAG_W = HH_W + K_W;

  initial begin
    assert (N_CELLS >= 1 && N_CELLS <= MAX_CELLS) else $error("hcu: N_CELLS out of range");
  end

  // ---------------- 1. phase generation ----------------
  ang_t phic_q [N_CELLS];
  ang_t phi0_q [N_CELLS];
  ang_t phi_hkf [NT];

  always_comb begin
    for (int h1i = 0; h1i < N_H1; h1i++) begin
      for (int h2i = 0; h2i < N_H2; h2i++) begin
        for (int k = 0; k < N_CELLS; k++) begin
          logic signed [15:0] a;
          a = 16'(2 * (h1i + 1)) * $signed({7'd0, phic_q[k]})
            + 16'(2 * (h2i + H2_MIN) - 1) * $signed({7'd0, phi0_q[k]});
          phi_hkf[(h1i*N_H2 + h2i)*N_CELLS + k] = a[ANG_W-1:0];   // mod 2*pi
        end
      end
    end
  end

  // ---------------- 2. parallel to series ----------------
  logic             issuing;
  logic [HH_W-1:0]  iss_hh;
  logic [K_W-1:0]   iss_k;
  logic             run;                 // busy with the current particle

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing <= 1'b0;
      iss_hh  <= '0;
      iss_k   <= '0;
      for (int k = 0; k < N_CELLS; k++) begin
        phic_q[k] <= '0;
        phi0_q[k] <= '0;
      end
    end else if (start && !run) begin
      issuing <= 1'b1;
      iss_hh  <= '0;
      iss_k   <= '0;
      phic_q  <= phic;
      phi0_q  <= phi0;
    end else if (issuing) begin
      if (iss_k == K_W'(N_CELLS - 1)) begin
        iss_k <= '0;
        if (iss_hh == HH_W'(N_HH - 1)) issuing <= 1'b0;
        else                           iss_hh  <= iss_hh + 1'b1;
      end else begin
        iss_k <= iss_k + 1'b1;
      end
    end
  end

  logic [$clog2(NT)-1:0] iss_idx;
  assign iss_idx = $clog2(NT)'(iss_hh) * $clog2(NT)'(N_CELLS) + $clog2(NT)'(iss_k);

  // ---------------- CORDIC ----------------
  logic             c_valid;
  trig_t            c_cos, c_sin;
  logic [TAG_W-1:0] c_tag;

  cordic_sincos #(.ITER(ITER), .TAG_W(TAG_W)) u_cordic (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (issuing),
    .in_angle (phi_hkf[iss_idx]),
    .in_tag   ({iss_hh, iss_k}),
    .out_valid(c_valid),
    .out_cos  (c_cos),
    .out_sin  (c_sin),
    .out_tag  (c_tag)
  );

  // ---------------- 3. multipliers U*cos, U*sin ----------------
  logic [HH_W-1:0] c_hh;
  logic [K_W-1:0]  c_k;
  assign {c_hh, c_k} = c_tag;

  uh_t u_sel;
  assign u_sel = u_hkf[$clog2(NT)'(c_hh) * $clog2(NT)'(N_CELLS) + $clog2(NT)'(c_k)];

  logic signed [UH_W+TRIG_W-1:0] px_full, py_full;   // 20 fraction bits
  assign px_full = u_sel * c_cos;
  assign py_full = u_sel * c_sin;

  logic             m_valid;
  prod_t            m_x, m_y;
  logic [HH_W-1:0]  m_hh;
  logic [K_W-1:0]   m_k;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_valid <= 1'b0;
      m_x <= '0; m_y <= '0; m_hh <= '0; m_k <= '0;
    end else begin
      m_valid <= c_valid;
      m_hh    <= c_hh;
      m_k     <= c_k;
      m_x <= PROD_W'(sat_s(64'(px_full >>> (UH_FRAC + TRIG_FRAC - PROD_FRAC)), PROD_W));
      m_y <= PROD_W'(sat_s(64'(py_full >>> (UH_FRAC + TRIG_FRAC - PROD_FRAC)), PROD_W));
    end
  end

  // ---------------- 4. sum over the cells ----------------
  localparam int ACC_W = PROD_W + 4;
  logic signed [ACC_W-1:0] acc_x, acc_y, nx, ny;
  assign nx = (m_k == '0) ? ACC_W'(m_x) : acc_x + ACC_W'(m_x);
  assign ny = (m_k == '0) ? ACC_W'(m_y) : acc_y + ACC_W'(m_y);

  logic            s_valid;
  logic [HH_W-1:0] s_hh;
  sxy_t            s_x, s_y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_x <= '0; acc_y <= '0;
      s_valid <= 1'b0; s_hh <= '0; s_x <= '0; s_y <= '0;
    end else begin
      s_valid <= 1'b0;
      if (m_valid) begin
        acc_x <= nx;
        acc_y <= ny;
        if (m_k == K_W'(N_CELLS - 1)) begin
          s_valid <= 1'b1;
          s_hh    <= m_hh;
          s_x <= SXY_W'(sat_s(64'(nx >>> (PROD_FRAC - SXY_FRAC)), SXY_W));
          s_y <= SXY_W'(sat_s(64'(ny >>> (PROD_FRAC - SXY_FRAC)), SXY_W));
        end
      end
    end
  end

  // ---------------- 5. squares, series to parallel ----------------
  sq_t xsq [N_HH];
  sq_t ysq [N_HH];
  logic sum_go;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_go <= 1'b0;
      for (int j = 0; j < N_HH; j++) begin
        xsq[j] <= '0;
        ysq[j] <= '0;
      end
    end else begin
      sum_go <= 1'b0;
      if (s_valid) begin
        xsq[s_hh] <= SQ_W'(s_x * s_x);
        ysq[s_hh] <= SQ_W'(s_y * s_y);
        if (s_hh == HH_W'(N_HH - 1)) sum_go <= 1'b1;
      end
    end
  end

  // ---------------- 6. final sum ----------------
  localparam int TOT_W = SQ_W + $clog2(2 * N_HH) + 1;
  logic [TOT_W-1:0] total;
  always_comb begin
    total = '0;
    for (int j = 0; j < N_HH; j++) total += TOT_W'(xsq[j]) + TOT_W'(ysq[j]);
  end

  logic [TOT_W-1:0] total_sh;
  assign total_sh = total >> (SQ_FRAC - USUM_FRAC);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= 1'b0;
      usum <= '0;
      run  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !run) run <= 1'b1;
      if (sum_go) begin
        done <= 1'b1;
        run  <= 1'b0;
        usum <= (total_sh > TOT_W'({USUM_W{1'b1}})) ? {USUM_W{1'b1}} : USUM_W'(total_sh);
      end
    end
  end

  assign busy = run;

endmodule
