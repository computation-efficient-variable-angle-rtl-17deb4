// vaps_tb_pkg: floating-point reference models used by the testbenches.
//
// Independent of the RTL: it works in real arithmetic and radians.
//   bessel_j(n, x)    Bessel function of the first kind, power series
//   u_hkf_volts(...)  amplitude of the (h1,h2) sideband harmonic of one cell,
//                     sqrt(2)*Udc/(pi*h1) * J_(2h2-1)(h1*pi*M) * cos((h1+h2-1)*pi)
//   ang_to_pu(rad)    9-bit per-unit angle word (base pi, mod 2*pi)
//   usum_ref(...)     U_h,sum^2 from (1)-(2) for given amplitudes and angles
package vaps_tb_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic real bessel_j(input int n, input real x);
    real s, term, fact_j, fact_nj;
    int  an;
    an = (n < 0) ? -n : n;
    s = 0.0;
    fact_j = 1.0;
    fact_nj = 1.0;
    for (int i = 1; i <= an; i++) fact_nj = fact_nj * i;
    for (int j = 0; j < 30; j++) begin
      if (j > 0) begin
        fact_j  = fact_j * j;
        fact_nj = fact_nj * (j + an);
      end
      term = ((j % 2 != 0) ? -1.0 : 1.0) / (fact_j * fact_nj) * $pow(x / 2.0, 2 * j + an);
      s += term;
    end
    if (n < 0 && (an % 2 != 0)) s = -s;
    return s;
  endfunction

  function automatic real u_hkf_volts(input int h1, input int h2, input real udc, input real m);
    real sgn;
    sgn = ((h1 + h2 - 1) % 2 == 0) ? 1.0 : -1.0;
    return $sqrt(2.0) * udc / (PI * h1) * bessel_j(2 * h2 - 1, h1 * PI * m) * sgn;
  endfunction

  // radians -> 9-bit p.u. angle word (base pi), wrapped to one turn
  function automatic logic [8:0] ang_to_pu(input real rad);
    int v;
    v = int'(rad / PI * 256.0);
    return 9'(v);
  endfunction

  function automatic real pu_to_rad(input logic [8:0] a);
    return real'(a) / 256.0 * PI;
  endfunction

  // reference U_h,sum^2 (harmonic amplitudes in volts, angles as RTL words)
  function automatic real usum_ref(input int n, input real u [], input logic [8:0] phi0 [],
                                   input logic [8:0] phic []);
    real tot, x, y, ph;
    int h1, h2;
    tot = 0.0;
    for (int h1i = 0; h1i < 2; h1i++) begin
      for (int h2i = 0; h2i < 6; h2i++) begin
        h1 = h1i + 1;
        h2 = h2i - 2;
        x = 0.0;
        y = 0.0;
        for (int k = 0; k < n; k++) begin
          ph = 2.0 * h1 * pu_to_rad(phic[k]) + (2.0 * h2 - 1.0) * pu_to_rad(phi0[k]);
          x += u[(h1i * 6 + h2i) * n + k] * $cos(ph);
          y += u[(h1i * 6 + h2i) * n + k] * $sin(ph);
        end
        tot += x * x + y * y;
      end
    end
    return tot;
  endfunction

  // real volts -> U_hkf word (12 fraction bits)
  function automatic logic signed [24:0] volts_to_uh(input real v);
    return 25'(longint'(v * 4096.0));
  endfunction

endpackage
