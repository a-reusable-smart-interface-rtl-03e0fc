// gsi_pkg: types and constants shared by the gas-sensor smart interface.
//
// The digital section is split into an SPI slave, an internal controller,
// a configuration register file and an oscillator interface. They share the
// register map and the decoded configuration defined here.
//
// Register map (8-bit registers, this design's own choice; the source only
// says that the register file holds the SPI data and the readout settings):
//   0x0 CTRL    [1:0] sensor select, [2] keep oscillator enabled,
//               [3] start (write 1 to start a measurement, reads as 0)
//   0x1 NPER    N, the number of oscillator periods in the monitoring window
//               (0 is treated as 1)
//   0x2 PRESC   clock prescaler: the clock counter advances every PRESC+1
//               system clocks
//   0x3 RESULT  eight-bit result buffer (read only)
//   0x4 STATUS  [0] busy, [1] done, [2] overflow (read only; done is cleared
//               when a new measurement starts)
//
// SPI transaction (this design's own choice): two words while ss_n is low.
// Word 0 is a command: bit 7 = 1 for a write, bits 2:0 the address.
// Word 1 is the data: written on a write, shifted out on MISO on a read.
package gsi_pkg;

  localparam int unsigned REG_W      = 8;
  localparam int unsigned NUM_REGS   = 8;
  localparam int unsigned ADDR_W     = 3;
  localparam int unsigned RESULT_W   = 8;   // "eight-bit digital format"

  typedef logic [ADDR_W-1:0] reg_addr_t;
  typedef logic [REG_W-1:0]  reg_data_t;

  localparam reg_addr_t ADDR_CTRL   = 3'd0;
  localparam reg_addr_t ADDR_NPER   = 3'd1;
  localparam reg_addr_t ADDR_PRESC  = 3'd2;
  localparam reg_addr_t ADDR_RESULT = 3'd3;
  localparam reg_addr_t ADDR_STATUS = 3'd4;

  // Bit positions inside CTRL and STATUS.
  localparam int unsigned CTRL_SEL_LSB  = 0;
  localparam int unsigned CTRL_OSC_EN   = 2;
  localparam int unsigned CTRL_START    = 3;
  localparam int unsigned STAT_BUSY     = 0;
  localparam int unsigned STAT_DONE     = 1;
  localparam int unsigned STAT_OVF      = 2;

  // Command word: bit 7 selects write.
  localparam int unsigned CMD_WRITE_BIT = 7;

  // Readout configuration as the oscillator interface sees it.
  typedef struct packed {
    logic [1:0]       sel;      // sensing resistor to measure
    logic             osc_en;   // keep the oscillator running between windows
    logic [REG_W-1:0] nper;     // periods in the monitoring window
    logic [REG_W-1:0] presc;    // clock prescaler, divide by presc+1
  } readout_cfg_t;

endpackage
