// tb_cordic_sincos: feeds all 512 per-unit angles back to back (one per
// clock) and compares cos/sin with rounded floating-point values (at most one
// LSB of 1/256 off).  Checks the latency of ITER+2 clocks and that the tag
// returns with its own angle, in order.
module tb_cordic_sincos;
  import vaps_pkg::*;

  localparam int ITER = 12;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  ang_t in_angle = '0;
  logic [8:0] in_tag = '0;
  logic out_valid;
  trig_t out_cos, out_sin;
  logic [8:0] out_tag;

  int checks = 0, failures = 0;
  int cyc = 0, first_out = -1, first_in = -1, n_out = 0;
  logic [8:0] exp_tag = '0;

  cordic_sincos #(.ITER(ITER), .TAG_W(9)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int ec, es, a;
      real th;
      if (first_out < 0) first_out = cyc;
      a  = int'(out_tag);
      th = real'(a) / 256.0 * PI;
      ec = int'($cos(th) * 256.0);
      es = int'($sin(th) * 256.0);
      checks++;
      if (out_tag != exp_tag) begin
        failures++;
        $display("FAIL tag %0d, expected %0d", out_tag, exp_tag);
      end
      checks++;
      if (int'(out_cos) - ec > 1 || ec - int'(out_cos) > 1 ||
          int'(out_sin) - es > 1 || es - int'(out_sin) > 1) begin
        failures++;
        $display("FAIL angle %0d: cos %0d (exp %0d) sin %0d (exp %0d)", a, out_cos, ec, out_sin, es);
      end
      exp_tag <= exp_tag + 1'b1;
      n_out++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int a = 0; a < 512; a++) begin
      in_valid = 1'b1;
      in_angle = 9'(a);
      in_tag   = 9'(a);
      if (a == 0) first_in = cyc;
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (ITER + 6) @(negedge clk);
    checks++;
    if (n_out != 512) begin
      failures++;
      $display("FAIL %0d results, expected 512", n_out);
    end
    checks++;
    // the first angle is sampled at edge first_in+1... result seen ITER+2 edges later
    if (first_out - first_in != ITER + 2) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", first_out - first_in, ITER + 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
