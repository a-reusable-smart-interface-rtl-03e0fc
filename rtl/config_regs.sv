// config_regs: configuration register file of the smart sensor.
//
// Holds the words written over SPI and the readout state (result buffer and
// status). It is built from D flip-flops, as in the source, but is addressed
// like a small RAM so that it could later be swapped for one: a host port
// with one write and one combinational read, and an internal port through
// which the controller stores the result and status. When both ports write
// the same register in one clock the internal port wins (this design's
// choice). The whole register file is also presented as a flat vector so
// that the controller can read the configuration every clock.
//
// Timing: writes take effect at the next rising clock edge; reads are
// combinational. All registers reset to RESET_VAL (zero by default).
module config_regs #(
  parameter int unsigned NUM_REGS  = gsi_pkg::NUM_REGS,
  parameter int unsigned REG_W     = gsi_pkg::REG_W,
  parameter int unsigned ADDR_W    = $clog2(NUM_REGS),
  parameter logic [REG_W-1:0] RESET_VAL = '0
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // host (SPI) port
  input  logic                      we,
  input  logic [ADDR_W-1:0]         waddr,
  input  logic [REG_W-1:0]          wdata,
  input  logic [ADDR_W-1:0]         raddr,
  output logic [REG_W-1:0]          rdata,
  // internal port
  input  logic                      hw_we,
  input  logic [ADDR_W-1:0]         hw_addr,
  input  logic [REG_W-1:0]          hw_wdata,
  // all registers
  output logic [NUM_REGS*REG_W-1:0] regs_flat
);

  logic [REG_W-1:0] mem [NUM_REGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NUM_REGS); i++) mem[i] <= RESET_VAL;
    end else begin
      if (we && int'(waddr) < int'(NUM_REGS)) mem[waddr] <= wdata;
      if (hw_we && int'(hw_addr) < int'(NUM_REGS)) mem[hw_addr] <= hw_wdata;
    end
  end

  always_comb begin
    rdata = '0;
    if (int'(raddr) < int'(NUM_REGS)) rdata = mem[raddr];
  end

  always_comb begin
    for (int i = 0; i < int'(NUM_REGS); i++) regs_flat[i*REG_W +: REG_W] = mem[i];
  end

endmodule
