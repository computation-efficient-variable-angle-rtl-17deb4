// vaps_pkg: word formats and constants shared by the VAPS PWM accelerator.
//
// All phase angles are unsigned per-unit numbers whose base is pi: an angle
// word holds angle/pi with 1 integer and 8 fraction bits, so the range
// [0, 2) p.u. covers one full turn and "mod 2*pi" is plain 9-bit wrap-around,
// and "mod pi" is wrap-around of the 8 fraction bits.  The bit splits of every
// word (sign / integer / fraction) follow the precision table of the design;
// the choice of pi as the per-unit base is this implementation's reading of
// it (the formats give angles one integer bit and the carrier angle is
// reduced modulo pi).
package vaps_pkg;

  // ---- angles (p.u., base pi): 0 sign, 1 integer, 8 fraction bits ----
  localparam int ANG_W    = 9;
  localparam int ANG_FRAC = 8;
  localparam int PI_PU    = 1 << ANG_FRAC;   // pi in p.u. = 1.0
  typedef logic [ANG_W-1:0] ang_t;

  // ---- cos/sin: 1 sign, 1 integer, 8 fraction bits ----
  localparam int TRIG_W    = 10;
  localparam int TRIG_FRAC = 8;
  typedef logic signed [TRIG_W-1:0] trig_t;

  // ---- harmonic amplitude U_hkf: 1 sign, 12 integer, 12 fraction bits ----
  localparam int UH_W    = 25;
  localparam int UH_FRAC = 12;
  typedef logic signed [UH_W-1:0] uh_t;

  // ---- U*cos and U*sin: 1 sign, 10 integer, 18 fraction bits ----
  localparam int PROD_W    = 29;
  localparam int PROD_FRAC = 18;
  typedef logic signed [PROD_W-1:0] prod_t;

  // ---- sum over cells of X_hkf / Y_hkf: 1 sign, 10 integer, 10 fraction ----
  localparam int SXY_W    = 21;
  localparam int SXY_FRAC = 10;
  typedef logic signed [SXY_W-1:0] sxy_t;

  // ---- X_hf^2, Y_hf^2: 0 sign, 20 integer, 20 fraction bits ----
  localparam int SQ_W    = 40;
  localparam int SQ_FRAC = 20;
  typedef logic [SQ_W-1:0] sq_t;

  // ---- U_h,sum^2: 0 sign, 20 integer, 4 fraction bits ----
  localparam int USUM_W    = 24;
  localparam int USUM_FRAC = 4;
  typedef logic [USUM_W-1:0] usum_t;

  // ---- particle velocity (p.u.): 1 sign, 0 integer, 8 fraction bits ----
  localparam int VEL_W = 9;
  typedef logic signed [VEL_W-1:0] vel_t;

  // ---- random factors r1, r2: 0 sign, 0 integer, 9 fraction bits ----
  localparam int RND_W    = 9;
  localparam int RND_FRAC = 9;
  typedef logic [RND_W-1:0] rnd_t;

  // ---- modulation reference m*: 1 sign, 0 integer, 11 fraction bits ----
  localparam int MOD_W    = 12;
  localparam int MOD_FRAC = 11;
  typedef logic signed [MOD_W-1:0] mod_t;

  // ---- harmonic orders evaluated by an HCU ----
  // Carrier-band index h1 = 1..N_H1, sideband index h2 = H2_MIN..H2_MIN+N_H2-1.
  // A harmonic component is at frequency h1*fc + h2*f0 relative to the
  // doubled carrier; its phase is 2*h1*phi_c + (2*h2-1)*phi_0.
  localparam int N_H1   = 2;
  localparam int N_H2   = 6;
  localparam int H2_MIN = -2;
  localparam int N_HH   = N_H1 * N_H2;      // (h1,h2) pairs per cell

  // Maximum supported cell count (bounded by the bus address map).
  localparam int MAX_CELLS = 10;

  // ---- bus ----
  localparam int BUS_W  = 12;
  localparam int ADDR_W = 12;

  // Address map of the 12-bit word bus (see cu_regfile):
  //   0x000-0x1FF  U_hkf, index i = (h1i*N_H2 + h2i)*N_CELLS + k, word w:
  //                addr = 4*i + w, w = 0 (bits 11:0), 1 (23:12), 2 (bit 24)
  //   0x200 + k    phi_0,k
  //   0x240 + k    phi_c*,k   (carrier angle references for the modulator)
  //   0x280 + k    m*_k       (modulation references)
  //   0x2C0 + k    phi_c,g,k^best (global best, shared by all PUCUs)
  //   0x3F0        write: start mask of HCUs (bit j starts HCU j)
  //   0x3F1        write: start mask of PUCUs
  //   0x3F2        read : done mask of HCUs   (sticky, cleared by start)
  //   0x3F3        read : done mask of PUCUs
  //   0x400 + 32*j + k    HCU j: phi_c,k of its particle
  //   0x400 + 32*j + 30   HCU j: U_h,sum^2 bits 11:0  (read only)
  //   0x400 + 32*j + 31   HCU j: U_h,sum^2 bits 23:12 (read only)
  //   0x600 + 128*j + 16*f + k   PUCU j, field f:
  //                f=0 v^a, 1 phi^a, 2 phi^best, 3 r (k=0 r1, k=1 r2),
  //                f=5 phi^(a+1) (read only), 6 v^(a+1) (read only)
  localparam logic [ADDR_W-1:0] A_PHI0   = 12'h200;
  localparam logic [ADDR_W-1:0] A_PHICS  = 12'h240;
  localparam logic [ADDR_W-1:0] A_MSTAR  = 12'h280;
  localparam logic [ADDR_W-1:0] A_GBEST  = 12'h2C0;
  localparam logic [ADDR_W-1:0] A_HSTART = 12'h3F0;
  localparam logic [ADDR_W-1:0] A_PSTART = 12'h3F1;
  localparam logic [ADDR_W-1:0] A_HDONE  = 12'h3F2;
  localparam logic [ADDR_W-1:0] A_PDONE  = 12'h3F3;
  localparam logic [ADDR_W-1:0] A_HCU    = 12'h400;
  localparam logic [ADDR_W-1:0] A_PUCU   = 12'h600;
  localparam int HCU_STRIDE  = 32;
  localparam int PUCU_STRIDE = 128;

  // Saturate a wide signed value to W bits (symmetric: +-(2^(W-1)-1)).
  function automatic logic signed [63:0] sat_s(input logic signed [63:0] v, input int w);
    logic signed [63:0] lim;
    lim = (64'sd1 <<< (w - 1)) - 64'sd1;
    if (v > lim)       return lim;
    else if (v < -lim) return -lim;
    else               return v;
  endfunction

endpackage
