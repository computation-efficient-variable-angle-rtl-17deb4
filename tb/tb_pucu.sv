// tb_pucu: random particles through the particle updating unit, compared
// bit for bit with the PSO update computed in real arithmetic (all values
// are short binary fractions, so the real model is exact):
//   v' = floor256(0.5*v + 2*r1*(pbest-phi) + 2*r2*(gbest-phi)) saturated to
//   +-64/256, phi' = (phi + v') mod 1.0 p.u.
// Checks the one-clock start-to-done timing and that saturation and the
// modulo wrap in both directions were exercised.
module tb_pucu;
  import vaps_pkg::*;

  localparam int N = 4;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  vel_t v [N];
  ang_t phi [N], pbest [N], gbest [N];
  rnd_t r1, r2;
  logic done;
  ang_t phi_new [N];
  vel_t v_new [N];

  int checks = 0, failures = 0;
  int n_sat = 0, n_wrap_up = 0, n_wrap_dn = 0;

  pucu #(.N_CELLS(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real vr, ps;
    int  ev, ep;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      for (int k = 0; k < N; k++) begin
        v[k]     = 9'(int'($urandom_range(128)) - 64);
        phi[k]   = 9'($urandom_range(255));
        pbest[k] = (t % 3 == 0) ? phi[k] : 9'($urandom_range(255));
        gbest[k] = 9'($urandom_range(255));
      end
      r1 = 9'($urandom_range(511));
      r2 = (t % 5 == 0) ? 9'd0 : 9'($urandom_range(511));
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      checks++;
      if (!done) begin
        failures++;
        $display("FAIL t=%0d: done not one clock after start", t);
      end
      for (int k = 0; k < N; k++) begin
        vr = 0.5 * real'(v[k]) / 256.0
           + 2.0 * real'(r1) / 512.0 * (real'(pbest[k]) - real'(phi[k])) / 256.0
           + 2.0 * real'(r2) / 512.0 * (real'(gbest[k]) - real'(phi[k])) / 256.0;
        ev = int'($floor(vr * 256.0));
        if (ev > 64)  begin ev = 64;  n_sat++; end
        if (ev < -64) begin ev = -64; n_sat++; end
        ep = int'(phi[k]) + ev;
        if (ep >= 256) n_wrap_up++;
        if (ep < 0)    n_wrap_dn++;
        ep = (ep + 256) % 256;
        ps = 0.0;
        checks++;
        if (int'($signed(v_new[k])) != ev || int'(phi_new[k]) != ep) begin
          failures++;
          $display("FAIL t=%0d k=%0d: v'=%0d (exp %0d) phi'=%0d (exp %0d)",
                   t, k, $signed(v_new[k]), ev, phi_new[k], ep);
        end
      end
    end
    checks++;
    if (n_sat == 0 || n_wrap_up == 0 || n_wrap_dn == 0) begin
      failures++;
      $display("FAIL mechanisms not exercised: sat=%0d wrap_up=%0d wrap_dn=%0d", n_sat, n_wrap_up, n_wrap_dn);
    end
    $display("saturations=%0d wraps up=%0d down=%0d", n_sat, n_wrap_up, n_wrap_dn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
