// tb_vaps_carrier_gen: checks the phase-shifted triangle carriers against a
// model that follows the master period from the period_start pulse:
// carrier_k(t) = tri((t + round_down(phi_k/(2*pi)*PERIOD)) mod PERIOD).
// Also checks that new angles act only from the next period start, that
// period_start recurs every PERIOD clocks, and that a synchronization edge
// in mid-period restarts the period.  Uses PERIOD = 200 for speed.
module tb_vaps_carrier_gen;
  import vaps_pkg::*;

  localparam int N = 4;
  localparam int PERIOD = 200;
  localparam int HALF = PERIOD / 2;
  localparam int CAR_W = $clog2(PERIOD) + 1;

  logic clk = 1'b0, rst_n = 1'b0, sync_in = 1'b0;
  ang_t phic_ref [N];
  logic signed [CAR_W-1:0] carrier [N];
  logic period_start;

  int checks = 0, failures = 0;
  int tcnt = 0, last_ps = -1, cyc = 0, n_periods = 0, n_sync = 0;
  ang_t act [N];

  vaps_carrier_gen #(.N_CELLS(N), .PERIOD(PERIOD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int tri_model(input int t, input ang_t a);
    int s, p;
    s = int'($floor(real'(a) / 512.0 * real'(PERIOD)));
    p = (t + s) % PERIOD;
    return 2 * ((p < HALF) ? p : PERIOD - p) - HALF;
  endfunction

  // checker, sampled between edges
  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (period_start) begin
      tcnt = 0;
      for (int k = 0; k < N; k++) act[k] = phic_ref[k];
      n_periods++;
    end else tcnt++;
    if (last_ps >= 0) begin
      for (int k = 0; k < N; k++) begin
        checks++;
        if (int'(carrier[k]) != tri_model(tcnt, act[k])) begin
          failures++;
          if (failures < 10)
            $display("FAIL cyc %0d cell %0d: carrier %0d, expected %0d", cyc, k, carrier[k], tri_model(tcnt, act[k]));
        end
      end
    end
    if (period_start) last_ps = cyc;
  end

  initial begin
    for (int k = 0; k < N; k++) phic_ref[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // a few free-running periods, angles changed in mid-period
    for (int t = 0; t < 12; t++) begin
      int p0;
      @(negedge clk);
      while (!period_start) @(negedge clk);
      p0 = cyc;
      repeat (PERIOD / 2) @(negedge clk);
      for (int k = 1; k < N; k++) phic_ref[k] = 9'($urandom_range(t < 6 ? 255 : 511));
      while (!period_start) @(negedge clk);
      checks++;
      if (cyc - p0 != PERIOD) begin
        failures++;
        $display("FAIL period %0d clocks, expected %0d", cyc - p0, PERIOD);
      end
    end
    // synchronization edge in mid-period restarts the carriers
    for (int t = 0; t < 3; t++) begin
      int s0;
      repeat (37 + 11 * t) @(negedge clk);
      sync_in = 1'b1;
      s0 = cyc;
      @(negedge clk);
      while (!period_start && cyc - s0 < 10) @(negedge clk);
      checks++;
      if (!period_start || cyc - s0 != 4) begin
        failures++;
        $display("FAIL sync: period start %0d clocks after sync edge, expected 4", cyc - s0);
      end else n_sync++;
      repeat (20) @(negedge clk);
      sync_in = 1'b0;
    end
    repeat (PERIOD) @(negedge clk);
    checks++;
    if (n_sync != 3 || n_periods < 15) begin
      failures++;
      $display("FAIL mechanisms: syncs %0d periods %0d", n_sync, n_periods);
    end
    $display("periods=%0d syncs=%0d", n_periods, n_sync);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
