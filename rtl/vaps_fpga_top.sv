// vaps_fpga_top: FPGA co-processor and modulator for variable-angle
// phase-shifting (VAPS) PWM of an N-cell cascaded H-bridge converter.
//
// The DSP runs a particle-swarm optimisation (PSO) of the carrier phase-shift
// angles that minimise the carrier-band harmonics of the converter's total
// output voltage, and hands the two expensive steps to this FPGA:
//   * N_HCU harmonic calculation units (hcu) each evaluate the cost
//     U_h,sum^2 of one particle; several particles are evaluated in parallel;
//   * N_PUCU particle updating units (pucu) each compute the new velocity and
//     position of one particle.
// Operands and results move over a 12-bit parallel bus (dsp_bus_if) into a
// register memory (cu_regfile) that all units read in parallel.  The same
// memory holds the angle references phi_c* and modulation references m* of
// the modulator: vaps_carrier_gen makes the phase-shifted triangle carriers,
// kept in step with the DSP by its synchronization clock, and
// pwm_comparator produces the gate commands of both legs of every cell.
// Interface: clk (150 MHz main clock), rst_n (asynchronous, active low),
// bus_* pins to the DSP (address map in vaps_pkg), sync_in from the DSP,
// leg_a/leg_b gate commands.
// Timing: a unit is started by writing its bit to the start register; the
// DSP polls the done register.  An HCU needs 12*N_CELLS + CORDIC_ITER + 5
// clocks, a PUCU one clock; the carriers have a period of CARRIER_PERIOD
// clocks.
// The partition into HCUs, PUCUs, RAM, carrier generation and PWM
// comparison, the bus width and the default sizes (4 cells, 4 HCUs, 1
// PUCU, 150 MHz / 1.25 kHz carriers) follow the design.  The design splits
// the units over two FPGAs; this top puts them into one device.
module vaps_fpga_top
  import vaps_pkg::*;
#(
  parameter int N_CELLS        = 4,
  parameter int N_HCU          = 4,
  parameter int N_PUCU         = 1,
  parameter int CARRIER_PERIOD = 120000,
  parameter int CORDIC_ITER    = 12,
  parameter int OMEGA_SHIFT    = -1,
  parameter int CP_SHIFT       = 1,
  parameter int CG_SHIFT       = 1,
  parameter int VLIM           = 64
) (
  input  logic               clk,
  input  logic               rst_n,
  // parallel bus to the DSP
  input  logic               bus_cs_n,
  input  logic               bus_we_n,
  input  logic               bus_rd_n,
  input  logic [ADDR_W-1:0]  bus_addr,
  input  logic [BUS_W-1:0]   bus_din,
  output logic [BUS_W-1:0]   bus_dout,
  output logic               bus_doe,
  // synchronization clock from the DSP
  input  logic               sync_in,
  // gate commands
  output logic [N_CELLS-1:0] leg_a,
  output logic [N_CELLS-1:0] leg_b
);

  localparam int CAR_W = $clog2(CARRIER_PERIOD) + 1;

  // ---------------- bus and memory ----------------
  logic              wr_en;
  logic [ADDR_W-1:0] wr_addr, rd_addr;
  logic [BUS_W-1:0]  wr_data, rd_data;

  dsp_bus_if u_bus (
    .clk, .rst_n,
    .bus_cs_n, .bus_we_n, .bus_rd_n, .bus_addr, .bus_din, .bus_dout, .bus_doe,
    .wr_en, .wr_addr, .wr_data, .rd_addr, .rd_data
  );

  uh_t               u_hkf [N_HH*N_CELLS];
  ang_t              phi0 [N_CELLS];
  ang_t              gbest [N_CELLS];
  ang_t              phic_star [N_CELLS];
  mod_t              m_star [N_CELLS];
  logic [N_HCU-1:0]  hcu_start, hcu_done;
  ang_t              hcu_phic [N_HCU][N_CELLS];
  usum_t             hcu_usum [N_HCU];
  logic [N_PUCU-1:0] pucu_start, pucu_done;
  vel_t              pucu_v [N_PUCU][N_CELLS];
  ang_t              pucu_phi [N_PUCU][N_CELLS];
  ang_t              pucu_pbest [N_PUCU][N_CELLS];
  rnd_t              pucu_r1 [N_PUCU];
  rnd_t              pucu_r2 [N_PUCU];
  ang_t              pucu_phi_new [N_PUCU][N_CELLS];
  vel_t              pucu_v_new [N_PUCU][N_CELLS];

  cu_regfile #(.N_CELLS(N_CELLS), .N_HCU(N_HCU), .N_PUCU(N_PUCU)) u_ram (
    .clk, .rst_n,
    .wr_en, .wr_addr, .wr_data, .rd_addr, .rd_data,
    .u_hkf, .phi0, .gbest, .phic_star, .m_star,
    .hcu_start, .hcu_phic, .hcu_done, .hcu_usum,
    .pucu_start, .pucu_v, .pucu_phi, .pucu_pbest, .pucu_r1, .pucu_r2,
    .pucu_done, .pucu_phi_new, .pucu_v_new
  );

  // ---------------- calculation units ----------------
  for (genvar j = 0; j < N_HCU; j++) begin : g_hcu
    hcu #(.N_CELLS(N_CELLS), .ITER(CORDIC_ITER)) u_hcu (
      .clk, .rst_n,
      .start (hcu_start[j]),
      .u_hkf (u_hkf),
      .phi0  (phi0),
      .phic  (hcu_phic[j]),
      .busy  (),
      .done  (hcu_done[j]),
      .usum  (hcu_usum[j])
    );
  end

  for (genvar j = 0; j < N_PUCU; j++) begin : g_pucu
    pucu #(.N_CELLS(N_CELLS), .OMEGA_SHIFT(OMEGA_SHIFT), .CP_SHIFT(CP_SHIFT),
           .CG_SHIFT(CG_SHIFT), .VLIM(VLIM)) u_pucu (
      .clk, .rst_n,
      .start   (pucu_start[j]),
      .v       (pucu_v[j]),
      .phi     (pucu_phi[j]),
      .pbest   (pucu_pbest[j]),
      .gbest   (gbest),
      .r1      (pucu_r1[j]),
      .r2      (pucu_r2[j]),
      .done    (pucu_done[j]),
      .phi_new (pucu_phi_new[j]),
      .v_new   (pucu_v_new[j])
    );
  end

  // ---------------- modulator ----------------
  logic signed [CAR_W-1:0] carrier [N_CELLS];
  logic                    period_start;

  vaps_carrier_gen #(.N_CELLS(N_CELLS), .PERIOD(CARRIER_PERIOD)) u_car (
    .clk, .rst_n, .sync_in,
    .phic_ref (phic_star),
    .carrier,
    .period_start
  );

  pwm_comparator #(.N_CELLS(N_CELLS), .CAR_W(CAR_W), .HALF(CARRIER_PERIOD / 2)) u_pwm (
    .clk, .rst_n, .period_start,
    .m_ref   (m_star),
    .carrier,
    .leg_a, .leg_b
  );

endmodule
