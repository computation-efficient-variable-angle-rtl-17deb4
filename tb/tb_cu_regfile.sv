// tb_cu_regfile: writes every variable of the address map through the
// memory's write port, checks the unit-side outputs and reads everything
// back; checks the start pulses (one clock, right mask), the sticky done
// masks (set by a unit's done, cleared by its start) and the capture of the
// units' results on done.
module tb_cu_regfile;
  import vaps_pkg::*;

  localparam int N = 4, NH = 4, NP = 1, NT = N_HH * N;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0;
  logic [ADDR_W-1:0] wr_addr = '0, rd_addr = '0;
  logic [BUS_W-1:0] wr_data = '0, rd_data;
  uh_t u_hkf [NT];
  ang_t phi0 [N], gbest [N], phic_star [N];
  mod_t m_star [N];
  logic [NH-1:0] hcu_start, hcu_done = '0;
  ang_t hcu_phic [NH][N];
  usum_t hcu_usum [NH];
  logic [NP-1:0] pucu_start, pucu_done = '0;
  vel_t pucu_v [NP][N];
  ang_t pucu_phi [NP][N], pucu_pbest [NP][N];
  rnd_t pucu_r1 [NP], pucu_r2 [NP];
  ang_t pucu_phi_new [NP][N];
  vel_t pucu_v_new [NP][N];

  int checks = 0, failures = 0;

  cu_regfile #(.N_CELLS(N), .N_HCU(NH), .N_PUCU(NP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int a, input int d);
    @(negedge clk);
    wr_en = 1'b1; wr_addr = ADDR_W'(a); wr_data = BUS_W'(d);
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  task automatic expect_rd(input int a, input int d, input string what);
    rd_addr = ADDR_W'(a);
    #1;
    checks++;
    if (rd_data != BUS_W'(d)) begin
      failures++;
      $display("FAIL read %s @%h: %h expected %h", what, a, rd_data, BUS_W'(d));
    end
  endtask

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d expected %0d", what, got, exp);
    end
  endtask

  int uval [NT];
  int pv [N], pp [N], pb [N], gb [N], p0 [N], pc [NH][N], ps [N], ms [N];

  initial begin
    for (int j = 0; j < NH; j++) hcu_usum[j] = '0;
    for (int k = 0; k < N; k++) begin
      pucu_phi_new[0][k] = '0;
      pucu_v_new[0][k] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // U_hkf as three words each
    for (int i = 0; i < NT; i++) begin
      uval[i] = int'($urandom_range(33554431)) - 16777216;
      wr(4 * i + 0, uval[i] & 12'hFFF);
      wr(4 * i + 1, (uval[i] >> 12) & 12'hFFF);
      wr(4 * i + 2, (uval[i] >> 24) & 1);
    end
    for (int k = 0; k < N; k++) begin
      p0[k] = $urandom_range(511); wr(int'(A_PHI0) + k, p0[k]);
      ps[k] = $urandom_range(511); wr(int'(A_PHICS) + k, ps[k]);
      ms[k] = $urandom_range(4095); wr(int'(A_MSTAR) + k, ms[k]);
      gb[k] = $urandom_range(511); wr(int'(A_GBEST) + k, gb[k]);
      pv[k] = $urandom_range(511); wr(int'(A_PUCU) + 16 * 0 + k, pv[k]);
      pp[k] = $urandom_range(511); wr(int'(A_PUCU) + 16 * 1 + k, pp[k]);
      pb[k] = $urandom_range(511); wr(int'(A_PUCU) + 16 * 2 + k, pb[k]);
      for (int j = 0; j < NH; j++) begin
        pc[j][k] = $urandom_range(511);
        wr(int'(A_HCU) + 32 * j + k, pc[j][k]);
      end
    end
    wr(int'(A_PUCU) + 48, 123);
    wr(int'(A_PUCU) + 49, 456);
    // unit-side outputs
    for (int i = 0; i < NT; i++) expect_eq(int'(u_hkf[i]), ((uval[i] << 7) >>> 7), "u_hkf");
    for (int k = 0; k < N; k++) begin
      expect_eq(int'(phi0[k]), p0[k], "phi0");
      expect_eq(int'(phic_star[k]), ps[k], "phic_star");
      expect_eq(int'(m_star[k]) & 12'hFFF, ms[k], "m_star");
      expect_eq(int'(gbest[k]), gb[k], "gbest");
      expect_eq(int'(pucu_v[0][k]) & 9'h1FF, pv[k], "pucu_v");
      expect_eq(int'(pucu_phi[0][k]), pp[k], "pucu_phi");
      expect_eq(int'(pucu_pbest[0][k]), pb[k], "pucu_pbest");
      for (int j = 0; j < NH; j++) expect_eq(int'(hcu_phic[j][k]), pc[j][k], "hcu_phic");
    end
    expect_eq(int'(pucu_r1[0]), 123, "r1");
    expect_eq(int'(pucu_r2[0]), 456, "r2");
    // read back
    for (int i = 0; i < NT; i++) begin
      expect_rd(4 * i + 0, uval[i] & 12'hFFF, "U lo");
      expect_rd(4 * i + 1, (uval[i] >> 12) & 12'hFFF, "U mid");
      expect_rd(4 * i + 2, (uval[i] >> 24) & 1, "U hi");
    end
    for (int k = 0; k < N; k++) begin
      expect_rd(int'(A_PHI0) + k, p0[k], "phi0");
      expect_rd(int'(A_PHICS) + k, ps[k], "phic*");
      expect_rd(int'(A_MSTAR) + k, ms[k], "m*");
      expect_rd(int'(A_GBEST) + k, gb[k], "gbest");
      expect_rd(int'(A_PUCU) + 16 + k, pp[k], "pucu phi");
      for (int j = 0; j < NH; j++) expect_rd(int'(A_HCU) + 32 * j + k, pc[j][k], "hcu phic");
    end
    // start pulses
    @(negedge clk);
    wr_en = 1'b1; wr_addr = A_HSTART; wr_data = 12'b0101;
    @(negedge clk);
    wr_en = 1'b0;
    expect_eq(int'(hcu_start), 5, "hcu_start pulse");
    @(negedge clk);
    expect_eq(int'(hcu_start), 0, "hcu_start one clock");
    // done and results
    hcu_usum[0] = 24'hABCDEF;
    hcu_usum[2] = 24'h123456;
    hcu_done = 4'b0101;
    @(negedge clk);
    hcu_done = '0;
    hcu_usum[0] = '0;
    expect_rd(int'(A_HDONE), 5, "hcu done mask");
    expect_rd(int'(A_HCU) + 30, 12'hDEF, "usum0 lo");
    expect_rd(int'(A_HCU) + 31, 12'hABC, "usum0 hi");
    expect_rd(int'(A_HCU) + 64 + 30, 12'h456, "usum2 lo");
    wr(int'(A_HSTART), 1);
    expect_rd(int'(A_HDONE), 4, "hcu done cleared by start");
    wr(int'(A_PSTART), 1);
    expect_eq(int'(pucu_start), 1, "pucu_start pulse");
    @(negedge clk);
    expect_eq(int'(pucu_start), 0, "pucu_start one clock");
    for (int k = 0; k < N; k++) begin
      pucu_phi_new[0][k] = ANG_W'(k + 10);
      pucu_v_new[0][k] = VEL_W'(-k - 1);
    end
    pucu_done = 1'b1;
    @(negedge clk);
    pucu_done = 1'b0;
    expect_rd(int'(A_PDONE), 1, "pucu done mask");
    for (int k = 0; k < N; k++) begin
      expect_rd(int'(A_PUCU) + 80 + k, k + 10, "phi new");
      expect_rd(int'(A_PUCU) + 96 + k, (-k - 1) & 12'hFFF, "v new");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
