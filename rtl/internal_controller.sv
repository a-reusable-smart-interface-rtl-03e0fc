// internal_controller: local control of the smart sensor's digital section.
//
// The source names this block as the one that provides the local control
// signals to the others; how it does so is this design's own. It has two
// jobs:
//  * SPI transactions. Each transaction is a command word followed by a data
//    word. The command's bit 7 selects a write, bits 2:0 the register. On a
//    write the data word is stored in the configuration registers (only CTRL,
//    NPER and PRESC are writable); on a read the register is sent back on
//    MISO in the data word. While a command word is shifted in, MISO carries
//    STATUS, so every transaction also polls the sensor. After a data word the
//    next word is again a command, so several transactions may share one
//    slave-select frame.
//  * Readout sequencing. Writing CTRL with the start bit set stores CTRL with
//    that bit cleared and, one clock later (once the new select is in the
//    register), pulses start to the oscillator interface. When the
//    oscillator interface reports done, the eight-bit result is written to the
//    RESULT buffer, and the done and overflow flags are set.
//
// The internal write port of the register file is shared: in the clock of
// done it writes RESULT, in every other clock it refreshes STATUS, so STATUS
// shows done one clock after RESULT holds the new value.
module internal_controller (
  input  logic                    clk,
  input  logic                    rst_n,
  // SPI slave word interface
  input  logic [7:0]              rx_data,
  input  logic                    rx_valid,
  input  logic                    frame_start,
  output logic [7:0]              tx_data,
  // configuration registers, host port
  output logic                    reg_we,
  output gsi_pkg::reg_addr_t      reg_waddr,
  output gsi_pkg::reg_data_t      reg_wdata,
  output gsi_pkg::reg_addr_t      reg_raddr,
  input  gsi_pkg::reg_data_t      reg_rdata,
  // configuration registers, internal port
  output logic                    hw_we,
  output gsi_pkg::reg_addr_t      hw_addr,
  output gsi_pkg::reg_data_t      hw_wdata,
  input  logic [gsi_pkg::NUM_REGS*gsi_pkg::REG_W-1:0] regs_flat,
  // oscillator interface
  output gsi_pkg::readout_cfg_t   cfg,
  output logic                    start,
  input  logic                    busy,
  input  logic                    done,
  input  logic [gsi_pkg::RESULT_W-1:0] result,
  input  logic                    overflow
);

  import gsi_pkg::*;

  typedef enum logic {PH_CMD, PH_DATA} phase_t;
  phase_t    phase;
  logic      cmd_write;
  reg_addr_t cmd_addr;
  logic      done_flag, ovf_flag;

  reg_data_t ctrl_r, nper_r, presc_r, status_r;
  assign ctrl_r  = regs_flat[ADDR_CTRL*REG_W  +: REG_W];
  assign nper_r  = regs_flat[ADDR_NPER*REG_W  +: REG_W];
  assign presc_r = regs_flat[ADDR_PRESC*REG_W +: REG_W];

  assign cfg.sel    = ctrl_r[CTRL_SEL_LSB +: 2];
  assign cfg.osc_en = ctrl_r[CTRL_OSC_EN];
  assign cfg.nper   = nper_r;
  assign cfg.presc  = presc_r;

  always_comb begin
    status_r            = '0;
    status_r[STAT_BUSY] = busy;
    status_r[STAT_DONE] = done_flag;
    status_r[STAT_OVF]  = ovf_flag;
  end

  // Host-side decode.
  logic data_word, writable;
  assign data_word = rx_valid && phase == PH_DATA;
  assign writable  = (cmd_addr == ADDR_CTRL) || (cmd_addr == ADDR_NPER) ||
                     (cmd_addr == ADDR_PRESC);

  always_comb begin
    reg_we    = data_word && cmd_write && writable;
    reg_waddr = cmd_addr;
    reg_wdata = rx_data;
    if (cmd_addr == ADDR_CTRL) reg_wdata[CTRL_START] = 1'b0;
  end

  assign reg_raddr = cmd_addr;
  assign tx_data   = (phase == PH_DATA) ? reg_rdata : status_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= PH_CMD;
      cmd_write <= 1'b0;
      cmd_addr  <= '0;
      start     <= 1'b0;
      done_flag <= 1'b0;
      ovf_flag  <= 1'b0;
    end else begin
      start <= 1'b0;
      if (frame_start) begin
        phase <= PH_CMD;
      end else if (rx_valid) begin
        if (phase == PH_CMD) begin
          cmd_write <= rx_data[CMD_WRITE_BIT];
          cmd_addr  <= rx_data[ADDR_W-1:0];
          phase     <= PH_DATA;
        end else begin
          phase <= PH_CMD;
          if (cmd_write && cmd_addr == ADDR_CTRL && rx_data[CTRL_START]) begin
            start     <= 1'b1;
            done_flag <= 1'b0;
            ovf_flag  <= 1'b0;
          end
        end
      end
      if (done) begin
        done_flag <= 1'b1;
        ovf_flag  <= overflow;
      end
    end
  end

  // Internal port: RESULT in the clock of done, STATUS otherwise.
  always_comb begin
    hw_we    = 1'b1;
    hw_addr  = done ? ADDR_RESULT : ADDR_STATUS;
    hw_wdata = done ? reg_data_t'(result) : status_r;
  end

endmodule
