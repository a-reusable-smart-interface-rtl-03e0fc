// digital_interface: the synthesizable digital section of the smart sensor.
//
// Four blocks, as partitioned in the source: the SPI slave talks to the
// external controller, the internal controller decodes transactions and
// sequences readouts, the configuration registers hold settings and the
// result buffer, and the oscillator interface selects a sensing resistor,
// enables the ring oscillator and converts its period into an eight-bit
// count.
//
// Interface: one system clock clk (which must be at least eight times the
// SPI clock) with an asynchronous active-low reset; the four SPI pins; and
// the oscillator pins osc_in (the ring oscillator's output, asynchronous to
// clk), osc_sel (multiplexer select sel1:sel0) and osc_enable (the loop's
// transmission gate).
module digital_interface (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sclk,
  input  logic       ss_n,
  input  logic       mosi,
  output logic       miso,
  input  logic       osc_in,
  output logic [1:0] osc_sel,
  output logic       osc_enable
);

  import gsi_pkg::*;

  logic [7:0]            rx_data, tx_data;
  logic                  rx_valid, frame_start;
  logic                  reg_we, hw_we;
  reg_addr_t             reg_waddr, reg_raddr, hw_addr;
  reg_data_t             reg_wdata, reg_rdata, hw_wdata;
  logic [NUM_REGS*REG_W-1:0] regs_flat;
  readout_cfg_t          cfg;
  logic                  start, busy, done, overflow;
  logic [RESULT_W-1:0]   result;

  spi_slave #(.WIDTH(8)) u_spi (
    .clk, .rst_n, .sclk, .ss_n, .mosi, .miso,
    .rx_data, .rx_valid, .tx_data, .frame_start, .active()
  );

  internal_controller u_ctrl (
    .clk, .rst_n,
    .rx_data, .rx_valid, .frame_start, .tx_data,
    .reg_we, .reg_waddr, .reg_wdata, .reg_raddr, .reg_rdata,
    .hw_we, .hw_addr, .hw_wdata, .regs_flat,
    .cfg, .start, .busy, .done, .result, .overflow
  );

  config_regs u_regs (
    .clk, .rst_n,
    .we(reg_we), .waddr(reg_waddr), .wdata(reg_wdata),
    .raddr(reg_raddr), .rdata(reg_rdata),
    .hw_we, .hw_addr, .hw_wdata(hw_wdata),
    .regs_flat
  );

  osc_interface u_osc (
    .clk, .rst_n, .cfg, .start,
    .osc_in, .osc_sel, .osc_enable,
    .busy, .done, .result, .overflow
  );

endmodule
