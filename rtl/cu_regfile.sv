// cu_regfile: the variable memory between the DSP bus and the calculation
// units.  It holds everything the DSP writes for the units (harmonic
// amplitudes U_hkf, fundamental angles phi_0, the carrier angles of each
// HCU's particle, the velocity / position / best positions / random factors
// of each PUCU's particle, the global best), the references of the modulator
// (phi_c* and m*), and everything the units return (U_h,sum^2 of each HCU,
// phi' and v' of each PUCU).  It also holds the start and done masks by
// which the DSP launches units and polls them.
// How it works: every variable is a register, so all units can read their
// operands in parallel; one bus write port and one bus read port
// (combinational read) use the 12-bit word address map of vaps_pkg.  Writes
// take the low bits of the 12-bit word; U_hkf (25 bits) is written as three
// words.  A unit's done bit is set by its done pulse and cleared when the
// DSP starts it again; its results are captured on the done pulse.
// Interface: wr_en/wr_addr/wr_data (one clock per word), rd_addr -> rd_data
// (same clock), start pulses to the units one clock after the write of a
// start mask.
// The content of the memory follows the design; the address map, the
// start/done masks and the register (rather than block RAM) implementation
// are this design's choices.
module cu_regfile
  import vaps_pkg::*;
#(
  parameter int N_CELLS = 4,
  parameter int N_HCU   = 4,
  parameter int N_PUCU  = 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // bus side
  input  logic               wr_en,
  input  logic [ADDR_W-1:0]  wr_addr,
  input  logic [BUS_W-1:0]   wr_data,
  input  logic [ADDR_W-1:0]  rd_addr,
  output logic [BUS_W-1:0]   rd_data,
  // shared operands
  output uh_t                u_hkf      [N_HH*N_CELLS],
  output ang_t               phi0       [N_CELLS],
  output ang_t               gbest      [N_CELLS],
  // modulator references
  output ang_t               phic_star  [N_CELLS],
  output mod_t               m_star     [N_CELLS],
  // HCUs
  output logic [N_HCU-1:0]   hcu_start,
  output ang_t               hcu_phic   [N_HCU][N_CELLS],
  input  logic [N_HCU-1:0]   hcu_done,
  input  usum_t              hcu_usum   [N_HCU],
  // PUCUs
  output logic [N_PUCU-1:0]  pucu_start,
  output vel_t               pucu_v     [N_PUCU][N_CELLS],
  output ang_t               pucu_phi   [N_PUCU][N_CELLS],
  output ang_t               pucu_pbest [N_PUCU][N_CELLS],
  output rnd_t               pucu_r1    [N_PUCU],
  output rnd_t               pucu_r2    [N_PUCU],
  input  logic [N_PUCU-1:0]  pucu_done,
  input  ang_t               pucu_phi_new [N_PUCU][N_CELLS],
  input  vel_t               pucu_v_new   [N_PUCU][N_CELLS]
);

  localparam int NT = N_HH * N_CELLS;

  initial begin
    assert (N_CELLS >= 1 && N_CELLS <= MAX_CELLS) else $error("cu_regfile: N_CELLS out of range");
    assert (N_HCU >= 1 && N_HCU <= BUS_W)          else $error("cu_regfile: N_HCU out of range");
    assert (N_PUCU >= 1 && N_PUCU <= 4)            else $error("cu_regfile: N_PUCU out of range");
  end

  // region decode
  function automatic logic in_u(input logic [ADDR_W-1:0] a);
    return a[11:9] == 3'b000;
  endfunction
  function automatic logic in_hcu(input logic [ADDR_W-1:0] a);
    return a[11:9] == 3'b010;
  endfunction
  function automatic logic in_pucu(input logic [ADDR_W-1:0] a);
    return a[11:9] == 3'b011;
  endfunction

  usum_t             hcu_res  [N_HCU];
  logic [N_HCU-1:0]  hcu_dmask;
  ang_t              pres_phi [N_PUCU][N_CELLS];
  vel_t              pres_v   [N_PUCU][N_CELLS];
  logic [N_PUCU-1:0] pucu_dmask;

  // ---------------- writes ----------------
  // address fields of the write port
  int w_i, w_j, w_k, w_pj, w_pk;
  assign w_i  = int'(wr_addr[8:2]);
  assign w_j  = int'(wr_addr[8:5]);
  assign w_k  = int'(wr_addr[4:0]);
  assign w_pj = int'(wr_addr[8:7]);
  assign w_pk = int'(wr_addr[3:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NT; i++) u_hkf[i] <= '0;
      for (int k = 0; k < N_CELLS; k++) begin
        phi0[k] <= '0;
        gbest[k] <= '0;
        phic_star[k] <= '0;
        m_star[k] <= '0;
        for (int j = 0; j < N_HCU; j++) hcu_phic[j][k] <= '0;
        for (int j = 0; j < N_PUCU; j++) begin
          pucu_v[j][k] <= '0;
          pucu_phi[j][k] <= '0;
          pucu_pbest[j][k] <= '0;
          pres_phi[j][k] <= '0;
          pres_v[j][k] <= '0;
        end
      end
      for (int j = 0; j < N_PUCU; j++) begin
        pucu_r1[j] <= '0;
        pucu_r2[j] <= '0;
      end
      for (int j = 0; j < N_HCU; j++) hcu_res[j] <= '0;
      hcu_start  <= '0;
      pucu_start <= '0;
      hcu_dmask  <= '0;
      pucu_dmask <= '0;
    end else begin
      hcu_start  <= '0;
      pucu_start <= '0;

      // results of the units
      for (int j = 0; j < N_HCU; j++)
        if (hcu_done[j]) begin
          hcu_res[j]   <= hcu_usum[j];
          hcu_dmask[j] <= 1'b1;
        end
      for (int j = 0; j < N_PUCU; j++)
        if (pucu_done[j]) begin
          pres_phi[j]   <= pucu_phi_new[j];
          pres_v[j]     <= pucu_v_new[j];
          pucu_dmask[j] <= 1'b1;
        end

      if (wr_en) begin
        if (in_u(wr_addr)) begin
          if (w_i < NT) begin
            unique case (wr_addr[1:0])
              2'd0:    u_hkf[w_i][11:0]  <= wr_data;
              2'd1:    u_hkf[w_i][23:12] <= wr_data;
              default: u_hkf[w_i][24]    <= wr_data[0];
            endcase
          end
        end else if (in_hcu(wr_addr)) begin
          if (w_j < N_HCU && w_k < N_CELLS) hcu_phic[w_j][w_k] <= wr_data[ANG_W-1:0];
        end else if (in_pucu(wr_addr)) begin
          if (w_pj < N_PUCU) begin
            unique case (wr_addr[6:4])
              3'd0: if (w_pk < N_CELLS) pucu_v[w_pj][w_pk]     <= wr_data[VEL_W-1:0];
              3'd1: if (w_pk < N_CELLS) pucu_phi[w_pj][w_pk]   <= wr_data[ANG_W-1:0];
              3'd2: if (w_pk < N_CELLS) pucu_pbest[w_pj][w_pk] <= wr_data[ANG_W-1:0];
              3'd3: begin
                if (w_pk == 0) pucu_r1[w_pj] <= wr_data[RND_W-1:0];
                if (w_pk == 1) pucu_r2[w_pj] <= wr_data[RND_W-1:0];
              end
              default: ;
            endcase
          end
        end else begin
          for (int k = 0; k < N_CELLS; k++) begin
            if (wr_addr == A_PHI0  + ADDR_W'(k)) phi0[k]      <= wr_data[ANG_W-1:0];
            if (wr_addr == A_PHICS + ADDR_W'(k)) phic_star[k] <= wr_data[ANG_W-1:0];
            if (wr_addr == A_MSTAR + ADDR_W'(k)) m_star[k]    <= wr_data;
            if (wr_addr == A_GBEST + ADDR_W'(k)) gbest[k]     <= wr_data[ANG_W-1:0];
          end
          if (wr_addr == A_HSTART) begin
            hcu_start <= wr_data[N_HCU-1:0];
            hcu_dmask <= hcu_dmask & ~wr_data[N_HCU-1:0];
          end
          if (wr_addr == A_PSTART) begin
            pucu_start <= wr_data[N_PUCU-1:0];
            pucu_dmask <= pucu_dmask & ~wr_data[N_PUCU-1:0];
          end
        end
      end
    end
  end

  // ---------------- reads ----------------
  // address fields of the read port
  int r_i, r_j, r_k, r_pj, r_pk, r_vk;
  assign r_i  = int'(rd_addr[8:2]);
  assign r_j  = int'(rd_addr[8:5]);
  assign r_k  = int'(rd_addr[4:0]);
  assign r_pj = int'(rd_addr[8:7]);
  assign r_pk = int'(rd_addr[3:0]);
  assign r_vk = int'(rd_addr[5:0]);

  always_comb begin
    rd_data = '0;
    if (in_u(rd_addr)) begin
      if (r_i < NT) begin
        unique case (rd_addr[1:0])
          2'd0:    rd_data = u_hkf[r_i][11:0];
          2'd1:    rd_data = u_hkf[r_i][23:12];
          default: rd_data = BUS_W'(u_hkf[r_i][24]);
        endcase
      end
    end else if (in_hcu(rd_addr)) begin
      if (r_j < N_HCU) begin
        if (r_k < N_CELLS) rd_data = BUS_W'(hcu_phic[r_j][r_k]);
        else if (r_k == 30) rd_data = hcu_res[r_j][11:0];
        else if (r_k == 31) rd_data = hcu_res[r_j][23:12];
      end
    end else if (in_pucu(rd_addr)) begin
      if (r_pj < N_PUCU) begin
        unique case (rd_addr[6:4])
          3'd0: if (r_pk < N_CELLS) rd_data = BUS_W'($signed(pucu_v[r_pj][r_pk]));
          3'd1: if (r_pk < N_CELLS) rd_data = BUS_W'(pucu_phi[r_pj][r_pk]);
          3'd2: if (r_pk < N_CELLS) rd_data = BUS_W'(pucu_pbest[r_pj][r_pk]);
          3'd3: begin
            if (r_pk == 0) rd_data = BUS_W'(pucu_r1[r_pj]);
            if (r_pk == 1) rd_data = BUS_W'(pucu_r2[r_pj]);
          end
          3'd5: if (r_pk < N_CELLS) rd_data = BUS_W'(pres_phi[r_pj][r_pk]);
          3'd6: if (r_pk < N_CELLS) rd_data = BUS_W'($signed(pres_v[r_pj][r_pk]));
          default: ;
        endcase
      end
    end else if (rd_addr[11:8] == 4'h2) begin
      // 0x200-0x2FF: four vectors of N_CELLS words, 64 words apart
      if (r_vk < N_CELLS) begin
        unique case (rd_addr[7:6])
          2'd0:    rd_data = BUS_W'(phi0[r_vk]);
          2'd1:    rd_data = BUS_W'(phic_star[r_vk]);
          2'd2:    rd_data = m_star[r_vk];
          default: rd_data = BUS_W'(gbest[r_vk]);
        endcase
      end
    end else if (rd_addr == A_HDONE) begin
      rd_data = BUS_W'(hcu_dmask);
    end else if (rd_addr == A_PDONE) begin
      rd_data = BUS_W'(pucu_dmask);
    end
  end

endmodule
