// tb_hcu: self-checking testbench of the harmonic calculation unit.
// Drives operating points (the 4-cell test case of the design plus random
// ones), computes U_h,sum^2 in floating point with vaps_tb_pkg and compares
// it with the unit's result within a tolerance set by the 8-bit cos/sin
// words.  Also checks the start-to-done latency (N_HH*N_CELLS + ITER + 5
// clocks) and that done is a single-clock pulse.
module tb_hcu;
  import vaps_pkg::*;
  import vaps_tb_pkg::*;

  localparam int N    = 4;
  localparam int ITER = 12;
  localparam int NT   = N_HH * N;

  logic  clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  uh_t   u_hkf [NT];
  ang_t  phi0 [N];
  ang_t  phic [N];
  logic  busy, done;
  usum_t usum;

  int checks = 0, failures = 0;

  hcu #(.N_CELLS(N), .ITER(ITER)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real udc [N], m [N], uv [];
  logic [8:0] p0 [], pc [];

  task automatic run_case(input string name);
    real ref_v, got;
    int lat;
    uv = new[NT];
    p0 = new[N];
    pc = new[N];
    for (int h1i = 0; h1i < 2; h1i++)
      for (int h2i = 0; h2i < 6; h2i++)
        for (int k = 0; k < N; k++) begin
          uv[(h1i*6+h2i)*N+k] = u_hkf_volts(h1i + 1, h2i - 2, udc[k], m[k]);
          u_hkf[(h1i*6+h2i)*N+k] = volts_to_uh(uv[(h1i*6+h2i)*N+k]);
        end
    for (int k = 0; k < N; k++) begin
      p0[k] = phi0[k];
      pc[k] = phic[k];
    end
    ref_v = usum_ref(N, uv, p0, pc);
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 0;  // clocks after the edge that sampled start
    while (!done) begin
      @(negedge clk);
      lat++;
    end
    got = real'(usum) / 16.0;
    checks++;
    if ((got - ref_v > 0.01 * ref_v + 2.0) || (ref_v - got > 0.01 * ref_v + 2.0)) begin
      failures++;
      $display("FAIL %s: usum=%f ref=%f", name, got, ref_v);
    end else
      $display("ok   %s: usum=%f ref=%f", name, got, ref_v);
    checks++;
    if (lat != NT + ITER + 5) begin
      failures++;
      $display("FAIL %s: latency %0d, expected %0d", name, lat, NT + ITER + 5);
    end
    @(negedge clk);
    checks++;
    if (done) begin
      failures++;
      $display("FAIL %s: done longer than one clock", name);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // test case of the design, state 1 and its optimal angles
    udc = '{120.0, 100.0, 110.0, 80.0};
    m   = '{0.9, 0.3, 0.9, 0.9};
    phi0 = '{ang_to_pu(0.0), ang_to_pu(3.1293), ang_to_pu(0.0), ang_to_pu(0.0)};
    phic = '{ang_to_pu(0.0), ang_to_pu(1.1290), ang_to_pu(2.0249), ang_to_pu(1.6690)};
    run_case("state1_opt");
    phic = '{ang_to_pu(0.0), ang_to_pu(0.0), ang_to_pu(0.0), ang_to_pu(0.0)};
    run_case("state1_zero");
    // state 2 and its optimal angles
    m   = '{0.9, 0.8, 0.9, 0.3};
    phi0 = '{ang_to_pu(0.5277), ang_to_pu(0.0), ang_to_pu(0.0), ang_to_pu(3.1293)};
    phic = '{ang_to_pu(0.0), ang_to_pu(0.0736), ang_to_pu(2.1598), ang_to_pu(1.0677)};
    run_case("state2_opt");
    // random operating points
    for (int t = 0; t < 30; t++) begin
      for (int k = 0; k < N; k++) begin
        udc[k]  = 50.0 + real'($urandom_range(1000)) / 10.0;
        m[k]    = 0.05 + real'($urandom_range(950)) / 1000.0;
        phi0[k] = 9'($urandom_range(511));
        phic[k] = 9'($urandom_range(255));
      end
      run_case($sformatf("random%0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
