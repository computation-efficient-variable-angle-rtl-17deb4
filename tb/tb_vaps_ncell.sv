// tb_vaps_ncell: the complete carrier-angle optimisation on a 10-cell
// converter, the largest cell count for which the optimisation time and
// hardware cost of the design are evaluated (4 HCUs, 1 PUCU, 100 particles,
// 10 iterations).  It is the same DSP model as tb_vaps_fpga_top with
// N_CELLS = 10; the operating point (no values are given for 10 cells) is
// an unbalanced one of this testbench's own: Udc = 80..125 V,
// M = 0.3..0.9, phi_0 = 0 or about pi.  The starting reference is the
// conventional phase shift phi_c,k = k*pi/N; the optimised angles replace
// it only if their cost is lower, as the DSP does.  Every HCU result is
// compared with a floating-point evaluation (3 % + 5 V^2: ten cells add up
// the rounding of the 8-bit cos/sin words), every PUCU result bit for bit;
// the modulator checks (switching instants, duty cycles) run on all 10 cells.
module tb_vaps_ncell;
  import vaps_pkg::*;
  import vaps_tb_pkg::*;

  localparam int N = 10, NH = 4, NT = N_HH * N;
  localparam int P = 120000;               // default carrier period
  localparam int NPART = 100, NITER = 10;
  localparam int TD = 7;                   // DSP bus clock period

  logic clk = 1'b0, rst_n = 1'b0;
  logic bus_cs_n = 1'b1, bus_we_n = 1'b1, bus_rd_n = 1'b1;
  logic [ADDR_W-1:0] bus_addr = '0;
  logic [BUS_W-1:0] bus_din = '0;
  logic [BUS_W-1:0] bus_dout;
  logic bus_doe;
  logic sync_in = 1'b0;
  logic [N-1:0] leg_a, leg_b;

  int checks = 0, failures = 0;
  int n_par = 0, n_sat = 0, n_wrap = 0, n_refupd = 0, n_sync = 0;

  vaps_fpga_top #(.N_CELLS(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #60_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- DSP bus accesses ----------------
  task automatic bus_write(input int a, input int d);
    bus_cs_n = 1'b0; bus_addr = ADDR_W'(a); bus_din = BUS_W'(d);
    #TD  bus_we_n = 1'b0;
    #(5*TD) bus_we_n = 1'b1;
    #TD  bus_cs_n = 1'b1;
    #(2*TD);
  endtask

  task automatic bus_read(input int a, output int d);
    bus_cs_n = 1'b0; bus_addr = ADDR_W'(a);
    #TD  bus_rd_n = 1'b0;
    #(6*TD);
    d = int'(bus_dout);
    bus_rd_n = 1'b1;
    #TD  bus_cs_n = 1'b1;
    #(2*TD);
  endtask

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  // ---------------- operating point ----------------
  real udc [N], mi [N], p0r [N];
  initial
    for (int k = 0; k < N; k++) begin
      udc[k] = 80.0 + 5.0 * real'((7 * k) % 10);
      mi[k]  = 0.3 + 0.6 * real'((3 * k) % 10) / 9.0;
      p0r[k] = (k % 4 == 3) ? 3.1293 : 0.0;
    end
  real uv [];
  logic [8:0] p0w [];

  // ---------------- swarm (DSP variables) ----------------
  int x [NPART][N], v [NPART][N], pb [NPART][N], gb [N];
  real pbc [NPART], gbc;

  function automatic real cost_ref(input int a [N]);
    logic [8:0] pc [];
    pc = new[N];
    for (int k = 0; k < N; k++) pc[k] = 9'(a[k]);
    return usum_ref(N, uv, p0w, pc);
  endfunction

  // evaluate up to four particles in parallel; returns the HW costs
  task automatic eval4(input int idx [4], input int cnt, output real c [4]);
    int d, lo, hi, mask;
    mask = (1 << cnt) - 1;
    for (int j = 0; j < cnt; j++)
      for (int k = 0; k < N; k++) bus_write(int'(A_HCU) + 32 * j + k, x[idx[j]][k]);
    bus_write(int'(A_HSTART), mask);
    do bus_read(int'(A_HDONE), d); while ((d & mask) != mask);
    if (cnt == 4) n_par++;
    for (int j = 0; j < cnt; j++) begin
      real r;
      bus_read(int'(A_HCU) + 32 * j + 30, lo);
      bus_read(int'(A_HCU) + 32 * j + 31, hi);
      c[j] = real'((hi << 12) | lo) / 16.0;
      r = cost_ref(x[idx[j]]);
      check(c[j] - r <= 0.03 * r + 5.0 && r - c[j] <= 0.03 * r + 5.0,
            $sformatf("HCU %0d cost %f, reference %f", j, c[j], r));
    end
  endtask

  task automatic eval_all();
    int idx [4];
    real c [4];
    for (int b = 0; b < NPART; b += 4) begin
      int cnt;
      cnt = (NPART - b < 4) ? NPART - b : 4;
      for (int j = 0; j < 4; j++) idx[j] = (b + j < NPART) ? b + j : b;
      eval4(idx, cnt, c);
      for (int j = 0; j < cnt; j++) begin
        if (c[j] < pbc[b + j]) begin
          pbc[b + j] = c[j];
          pb[b + j] = x[b + j];
        end
        if (c[j] < gbc) begin
          gbc = c[j];
          gb = x[b + j];
        end
      end
    end
  endtask

  // update one particle on PUCU 0 and check the result bit for bit
  task automatic update(input int b);
    int r1, r2, d, ev, ep;
    r1 = $urandom_range(511);
    r2 = $urandom_range(511);
    for (int k = 0; k < N; k++) begin
      bus_write(int'(A_PUCU) + k, v[b][k] & 12'h1FF);
      bus_write(int'(A_PUCU) + 16 + k, x[b][k]);
      bus_write(int'(A_PUCU) + 32 + k, pb[b][k]);
    end
    bus_write(int'(A_PUCU) + 48, r1);
    bus_write(int'(A_PUCU) + 49, r2);
    bus_write(int'(A_PSTART), 1);
    do bus_read(int'(A_PDONE), d); while ((d & 1) == 0);
    for (int k = 0; k < N; k++) begin
      real vr;
      vr = 0.5 * real'(v[b][k]) + 2.0 * real'(r1) / 512.0 * real'(pb[b][k] - x[b][k])
         + 2.0 * real'(r2) / 512.0 * real'(gb[k] - x[b][k]);
      ev = int'($floor(vr));
      if (ev > 64)  begin ev = 64;  n_sat++; end
      if (ev < -64) begin ev = -64; n_sat++; end
      ep = x[b][k] + ev;
      if (ep < 0 || ep > 255) n_wrap++;
      ep = (ep + 256) % 256;
      bus_read(int'(A_PUCU) + 80 + k, d);
      check(d == ep, $sformatf("PUCU phi' cell %0d: %0d expected %0d", k, d, ep));
      x[b][k] = d;
      bus_read(int'(A_PUCU) + 96 + k, d);
      d = (d > 2047) ? d - 4096 : d;
      check(d == ev, $sformatf("PUCU v' cell %0d: %0d expected %0d", k, d, ev));
      v[b][k] = d;
    end
  endtask

  // ---------------- synchronization clock: period P clocks ----------------
  logic sync_run = 1'b0;
  initial begin
    wait (sync_run);
    forever begin
      sync_in = 1'b1;
      #(5 * P);
      sync_in = 1'b0;
      #(5 * P);
    end
  end

  // ---------------- main sequence ----------------
  int old_pc [N], new_pc [N];
  initial begin
    int d;
    real c_old, c_new, c_init;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    #100;
    uv = new[NT];
    p0w = new[N];
    for (int k = 0; k < N; k++) p0w[k] = ang_to_pu(p0r[k]);
    for (int h1i = 0; h1i < 2; h1i++)
      for (int h2i = 0; h2i < 6; h2i++)
        for (int k = 0; k < N; k++) begin
          int i, w;
          i = (h1i * 6 + h2i) * N + k;
          uv[i] = u_hkf_volts(h1i + 1, h2i - 2, udc[k], mi[k]);
          w = int'(volts_to_uh(uv[i]));
          bus_write(4 * i + 0, w & 12'hFFF);
          bus_write(4 * i + 1, (w >> 12) & 12'hFFF);
          bus_write(4 * i + 2, (w >> 24) & 1);
        end
    for (int k = 0; k < N; k++) bus_write(int'(A_PHI0) + k, int'(p0w[k]));
    // read-back of a few memory words over the bus
    bus_read(int'(A_PHI0) + 3, d);
    check(d == int'(p0w[3]), "read-back of phi_0");

    // the previous optimum is the modulator's present reference
    for (int k = 0; k < N; k++) old_pc[k] = (k * 256) / N;
    for (int k = 0; k < N; k++) begin
      bus_write(int'(A_PHICS) + k, old_pc[k]);
      bus_write(int'(A_MSTAR) + k, 0);
    end

    // initial swarm: cell 1 is the reference (angle 0, velocity 0)
    gbc = 1.0e30;
    for (int b = 0; b < NPART; b++) begin
      pbc[b] = 1.0e30;
      for (int k = 0; k < N; k++) begin
        x[b][k] = (k == 0) ? 0 : $urandom_range(255);
        v[b][k] = (k == 0) ? 0 : int'($urandom_range(128)) - 64;
        pb[b][k] = x[b][k];
      end
    end
    eval_all();
    c_init = gbc;
    for (int it = 0; it < NITER; it++) begin
      for (int k = 0; k < N; k++) bus_write(int'(A_GBEST) + k, gb[k]);
      for (int b = 0; b < NPART; b++) update(b);
      eval_all();
      $display("iteration %0d: best U_h,sum^2 = %f", it + 1, gbc);
    end
    $display("best angles (p.u. words): %0d %0d %0d %0d", gb[0], gb[1], gb[2], gb[3]);
    check(gbc <= c_init, "optimisation did not get worse");

    // step 4: compare with the angles in use, on the HCUs
    begin
      int idx [4];
      real c [4];
      x[0] = old_pc;
      x[1] = gb;
      idx = '{0, 1, 0, 0};
      eval4(idx, 2, c);
      c_old = c[0];
      c_new = c[1];
    end
    $display("U_h,sum^2 with previous angles %f, with new angles %f", c_old, c_new);
    check(c_new <= c_init, "optimised cost not above the best initial particle");
    if (c_new < c_old) $display("optimised angles replace the conventional ones");
    else               $display("conventional angles kept");
    new_pc = (c_new < c_old) ? gb : old_pc;

    // ---------------- modulator ----------------
    // m* = 0: leg A of cell k rises where its carrier falls through zero,
    // 3P/4 - shift_k clocks after the period start (plus 1 clock of output register)
    for (int k = 0; k < N; k++) bus_write(int'(A_PHICS) + k, new_pc[k]);
    // start the synchronization clock in mid-period
    @(negedge clk);
    while (!dut.period_start) @(negedge clk);
    repeat (P / 3) @(negedge clk);
    sync_run = 1'b1;
    begin
      int t;
      t = 0;
      @(negedge clk);
      while (!dut.period_start) begin
        @(negedge clk);
        t++;
      end
      check(t < 10, $sformatf("carrier restart %0d clocks after the sync edge", t));
      if (t < 10) n_sync++;
    end
    n_refupd++;   // the new angles became active at this period start
    // measure over the next, undisturbed period
    @(negedge clk);
    while (!dut.period_start) @(negedge clk);
    begin
      int t, rise [N];
      logic [N-1:0] prev;
      for (int k = 0; k < N; k++) rise[k] = -1;
      t = 0;
      prev = leg_a;
      @(negedge clk);
      while (!dut.period_start) begin
        t++;
        for (int k = 0; k < N; k++) if (leg_a[k] && !prev[k] && rise[k] < 0) rise[k] = t;
        prev = leg_a;
        @(negedge clk);
      end
      check(t == P - 1, $sformatf("period %0d clocks", t + 1));
      for (int k = 0; k < N; k++) begin
        int s, e, diff;
        s = int'((longint'(new_pc[k]) * P) >> 9);
        e = ((3 * P) / 4 - s + P) % P;
        diff = rise[k] - e;
        check(diff >= -1 && diff <= 3,
              $sformatf("cell %0d leg A rises at %0d, expected about %0d", k, rise[k], e));
      end
    end
    // duty cycle with m* = +0.5, -0.25, 0.75, 0
    begin
      int m_w [N];
      int on_a [N], on_b [N];
      for (int k = 0; k < N; k++) m_w[k] = 512 * (k % 5) - 1024;
      for (int k = 0; k < N; k++) bus_write(int'(A_MSTAR) + k, m_w[k] & 12'hFFF);
      @(negedge clk);
      while (!dut.period_start) @(negedge clk);
      n_refupd++;
      for (int k = 0; k < N; k++) begin on_a[k] = 0; on_b[k] = 0; end
      for (int t = 0; t < P; t++) begin
        @(negedge clk);
        for (int k = 0; k < N; k++) begin
          if (leg_a[k]) on_a[k]++;
          if (leg_b[k]) on_b[k]++;
        end
      end
      for (int k = 0; k < N; k++) begin
        real ea, eb;
        ea = (1.0 + real'(m_w[k]) / 2048.0) / 2.0 * P;
        eb = (1.0 - real'(m_w[k]) / 2048.0) / 2.0 * P;
        check(real'(on_a[k]) < ea + 4.0 && real'(on_a[k]) > ea - 4.0 &&
              real'(on_b[k]) < eb + 4.0 && real'(on_b[k]) > eb - 4.0,
              $sformatf("cell %0d duty A %0d (exp %f) B %0d (exp %f)", k, on_a[k], ea, on_b[k], eb));
      end
    end

    $display("mechanisms: parallel HCU runs %0d, velocity saturations %0d, wraps mod pi %0d, reference updates %0d, sync restarts %0d",
             n_par, n_sat, n_wrap, n_refupd, n_sync);
    check(n_par > 0, "parallel HCU runs never happened");
    check(n_sat > 0, "velocity saturation never happened");
    check(n_wrap > 0, "wrap modulo pi never happened");
    check(n_refupd > 0, "reference update never happened");
    check(n_sync > 0, "sync restart never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
