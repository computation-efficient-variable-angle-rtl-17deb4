// dsp_bus_if: slave side of the 12-bit parallel bus from the DSP.
//
// The DSP moves every operand and result of the calculation units over an
// asynchronous parallel bus (chip select, write strobe, read strobe, word
// address, 12-bit data), like the external interface of a TMS320F28335.
// How it works: all bus inputs pass through a two-flop synchronizer into the
// FPGA clock domain.  A write is committed once, at the end of the
// synchronized write strobe, with the address and data sampled while the
// strobe was still active.  For a read the synchronized address drives the
// memory's read port and the word is registered onto bus_dout; bus_doe (the
// pad's output enable) follows chip select and read strobe directly.
// Interface: bus_* pins toward the DSP; wr_en/wr_addr/wr_data and
// rd_addr/rd_data toward the variable memory.
// Timing (this design's assumption; the bus timing is not specified): a
// write strobe must be active for at least 3 FPGA clocks and inactive for at
// least 2 between accesses; the read data is valid 4 FPGA clocks after the
// read strobe and address become active, so the DSP must keep the strobe
// active at least that long.  At 150 MHz this allows about 30 Mwords/s.
// The bus width follows the design; protocol and synchronizer are this
// design's choices.
module dsp_bus_if
  import vaps_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // DSP pins
  input  logic              bus_cs_n,
  input  logic              bus_we_n,
  input  logic              bus_rd_n,
  input  logic [ADDR_W-1:0] bus_addr,
  input  logic [BUS_W-1:0]  bus_din,
  output logic [BUS_W-1:0]  bus_dout,
  output logic              bus_doe,
  // memory side
  output logic              wr_en,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [BUS_W-1:0]  wr_data,
  output logic [ADDR_W-1:0] rd_addr,
  input  logic [BUS_W-1:0]  rd_data
);

  logic [1:0]        cs_s, we_s, rd_s;      // [1] is the synchronized value
  logic [ADDR_W-1:0] addr_s [2];
  logic [BUS_W-1:0]  data_s [2];
  logic              wact_q;                // write strobe active last clock
  logic [ADDR_W-1:0] waddr_q;
  logic [BUS_W-1:0]  wdata_q;

  logic wact, ract;
  assign wact = !cs_s[1] && !we_s[1];
  assign ract = !cs_s[1] && !rd_s[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs_s <= 2'b11;
      we_s <= 2'b11;
      rd_s <= 2'b11;
      addr_s[0] <= '0; addr_s[1] <= '0;
      data_s[0] <= '0; data_s[1] <= '0;
      wact_q  <= 1'b0;
      waddr_q <= '0;
      wdata_q <= '0;
      wr_en   <= 1'b0;
      wr_addr <= '0;
      wr_data <= '0;
      bus_dout <= '0;
    end else begin
      cs_s <= {cs_s[0], bus_cs_n};
      we_s <= {we_s[0], bus_we_n};
      rd_s <= {rd_s[0], bus_rd_n};
      addr_s[0] <= bus_addr;  addr_s[1] <= addr_s[0];
      data_s[0] <= bus_din;   data_s[1] <= data_s[0];
      wact_q <= wact;
      if (wact) begin
        waddr_q <= addr_s[1];
        wdata_q <= data_s[1];
      end
      // commit at the end of the write strobe
      wr_en   <= wact_q && !wact;
      wr_addr <= waddr_q;
      wr_data <= wdata_q;
      if (ract) bus_dout <= rd_data;
    end
  end

  assign rd_addr = addr_s[1];
  assign bus_doe = !bus_cs_n && !bus_rd_n;

endmodule
