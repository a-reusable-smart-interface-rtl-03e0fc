// smart_sensor_top: the smart gas-sensor interface with its oscillator.
//
// Joins the synthesizable digital section (SPI slave, internal controller,
// configuration registers, oscillator interface) to the behavioural model of
// the RC ring oscillator with its four-resistor sensor array and external
// capacitor, as in the system architecture of the source. The external
// controller connects through the SPI pins. The resistor and capacitor values
// are parameters of the model, passed through; the ring oscillator's output
// and control are brought out for observation.
//
// This top contains a behavioural model and is meant for simulation; the
// part to synthesise is digital_interface.
module smart_sensor_top #(
  parameter real R0_OHM = 10.0e3,
  parameter real R1_OHM = 20.0e3,
  parameter real R2_OHM = 100.0e3,
  parameter real R3_OHM = 1.5e6,
  parameter real C_F    = 330.0e-12
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sclk,
  input  logic       ss_n,
  input  logic       mosi,
  output logic       miso,
  output logic       osc_out,
  output logic [1:0] osc_sel,
  output logic       osc_enable
);

  digital_interface u_dig (
    .clk, .rst_n, .sclk, .ss_n, .mosi, .miso,
    .osc_in(osc_out), .osc_sel, .osc_enable
  );

  rc_oscillator #(
    .R0_OHM(R0_OHM), .R1_OHM(R1_OHM), .R2_OHM(R2_OHM), .R3_OHM(R3_OHM),
    .C_F(C_F)
  ) u_osc (
    .sel(osc_sel), .enable(osc_enable), .osc_out
  );

endmodule
