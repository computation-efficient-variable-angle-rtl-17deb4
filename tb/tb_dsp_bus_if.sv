// tb_dsp_bus_if: drives the parallel bus the way the DSP does, with a bus
// clock (period 7) unrelated to the FPGA clock (period 10), against a small
// memory model on the memory side.  Random writes followed by reads back;
// checks every read word, that each write strobe gives exactly one memory
// write, and that the read data is on bus_dout within 4 FPGA clocks.
module tb_dsp_bus_if;
  import vaps_pkg::*;

  localparam int TD = 7;      // DSP bus clock period

  logic clk = 1'b0, rst_n = 1'b0;
  logic bus_cs_n = 1'b1, bus_we_n = 1'b1, bus_rd_n = 1'b1;
  logic [ADDR_W-1:0] bus_addr = '0;
  logic [BUS_W-1:0] bus_din = '0;
  logic [BUS_W-1:0] bus_dout;
  logic bus_doe;
  logic wr_en;
  logic [ADDR_W-1:0] wr_addr, rd_addr;
  logic [BUS_W-1:0] wr_data, rd_data;

  logic [BUS_W-1:0] mem [64];
  logic [BUS_W-1:0] shadow [64];
  int n_wr = 0;

  int checks = 0, failures = 0;

  dsp_bus_if dut (.*);

  always #5 clk = ~clk;

  // memory model: 64 words, mirrored across the address space
  always @(posedge clk) if (rst_n && wr_en) begin
    mem[wr_addr[5:0]] <= wr_data;
    n_wr++;
  end
  assign rd_data = mem[rd_addr[5:0]];

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bus_write(input logic [ADDR_W-1:0] a, input logic [BUS_W-1:0] d);
    bus_cs_n = 1'b0; bus_addr = a; bus_din = d;
    #TD  bus_we_n = 1'b0;
    #(5*TD) bus_we_n = 1'b1;
    #TD  bus_cs_n = 1'b1;
    #(2*TD);
  endtask

  task automatic bus_read(input logic [ADDR_W-1:0] a, output logic [BUS_W-1:0] d);
    bus_cs_n = 1'b0; bus_addr = a;
    #TD  bus_rd_n = 1'b0;
    #(6*TD);
    d = bus_dout;
    if (!bus_doe) begin
      failures++;
      $display("FAIL output enable not active during read");
    end
    checks++;
    bus_rd_n = 1'b1;
    #TD  bus_cs_n = 1'b1;
    #(2*TD);
  endtask

  initial begin
    logic [BUS_W-1:0] d;
    for (int i = 0; i < 64; i++) mem[i] = '0;
    #33 rst_n = 1'b1;
    #50;
    for (int i = 0; i < 64; i++) shadow[i] = '0;
    for (int t = 0; t < 400; t++) begin
      int a;
      a = $urandom_range(63);
      d = BUS_W'($urandom);
      bus_write(ADDR_W'(a), d);
      shadow[a] = d;
    end
    #100;
    checks++;
    if (n_wr != 400) begin
      failures++;
      $display("FAIL %0d memory writes for 400 bus writes", n_wr);
    end
    for (int i = 0; i < 64; i++) begin
      bus_read(ADDR_W'(i), d);
      checks++;
      if (d != shadow[i]) begin
        failures++;
        $display("FAIL read addr %0d: %h, expected %h", i, d, shadow[i]);
      end
    end
    checks++;
    if (bus_doe) begin
      failures++;
      $display("FAIL output enable active while idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
