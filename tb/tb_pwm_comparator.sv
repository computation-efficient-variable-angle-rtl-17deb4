// tb_pwm_comparator: drives triangle carriers (HALF = 100) and random
// references, and checks both legs of every cell one clock later against
// real-valued comparisons m > c/HALF (leg A) and -m > c/HALF (leg B), with
// the reference taken over only at period_start.  Also checks the duty
// cycle of leg A over one period, (1+m)/2, to within one carrier step.
module tb_pwm_comparator;
  import vaps_pkg::*;

  localparam int N = 4;
  localparam int HALF = 100;
  localparam int PERIOD = 2 * HALF;
  localparam int CAR_W = 9;

  logic clk = 1'b0, rst_n = 1'b0, period_start = 1'b0;
  mod_t m_ref [N];
  logic signed [CAR_W-1:0] carrier [N];
  logic [N-1:0] leg_a, leg_b;

  int checks = 0, failures = 0;
  mod_t m_act [N];
  logic [N-1:0] exp_a, exp_b;
  int on_a [N];

  pwm_comparator #(.N_CELLS(N), .CAR_W(CAR_W), .HALF(HALF)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N; k++) begin
      m_ref[k] = '0;
      m_act[k] = '0;
      carrier[k] = -9'sd100;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int per = 0; per < 40; per++) begin
      for (int k = 0; k < N; k++) on_a[k] = 0;
      for (int t = 0; t < PERIOD; t++) begin
        @(negedge clk);
        // compare the outputs produced from the previous clock's inputs
        if (per > 0 || t > 0) begin
          checks++;
          if (leg_a != exp_a || leg_b != exp_b) begin
            failures++;
            $display("FAIL per %0d t %0d: legs %b/%b expected %b/%b", per, t, leg_a, leg_b, exp_a, exp_b);
          end
          for (int k = 0; k < N; k++) if (leg_a[k]) on_a[k]++;
        end
        // new inputs
        period_start = (t == 0);
        if (t == 0) for (int k = 0; k < N; k++) m_act[k] = m_ref[k];
        for (int k = 0; k < N; k++) begin
          int p, c;
          p = (t + 37 * k) % PERIOD;
          c = 2 * ((p < HALF) ? p : PERIOD - p) - HALF;
          carrier[k] = CAR_W'(c);
          exp_a[k] = (real'(m_act[k]) / 2048.0) > (real'(c) / HALF);
          exp_b[k] = (-real'(m_act[k]) / 2048.0) > (real'(c) / HALF);
        end
        // references change in mid-period; they must wait for period_start
        if (t == HALF) for (int k = 0; k < N; k++) m_ref[k] = 12'(int'($urandom_range(4000)) - 2000);
      end
      if (per > 1) begin
        for (int k = 0; k < N; k++) begin
          real duty;
          duty = (1.0 + real'(m_act[k]) / 2048.0) / 2.0;
          checks++;
          // the count of a period spans the last clock of the previous one
          if (real'(on_a[k]) > duty * PERIOD + 3.0 || real'(on_a[k]) < duty * PERIOD - 3.0) begin
            failures++;
            $display("FAIL duty cell %0d: %0d of %0d, expected %f", k, on_a[k], PERIOD, duty * PERIOD);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
