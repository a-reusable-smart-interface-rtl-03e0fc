// rc_oscillator: behavioural model (not synthesizable) of the RC ring
// oscillator and the sensor array it reads.
//
// The real circuit is analog and laid out by hand: two inverter stages, an
// RC stage made of one of four sensing resistors (picked by a switch
// multiplexer driven by sel1:sel0) and the external capacitor C, and a
// Schmitt-trigger inverter closed into a ring through a transmission gate
// controlled by enable. The period is dominated by the RC stage, so it grows
// linearly with the selected resistance.
//
// The model reproduces only that timing. Its period is
//     P = SLOPE_S_PER_OHM * R * (C_F / C_FIT_F) + OFFSET_S
// where SLOPE and OFFSET are the straight-line fit of measured period against
// resistance given in the source for a 330 pF capacitor
// (P = 6.49e-10 * R + 6.92e-6 s). Scaling the slope linearly with C is this
// model's assumption, as is a 50 % duty cycle. The switch resistance (about
// a thousandth of the film's) is ignored, as the source does.
// While enable is low the ring is open and osc_out stays low; after enable
// rises the output first goes high half a period later. A change of sel
// takes effect at the next half period. Default resistances are this model's
// choice, spread over the 10 kOhm to 1.5 MOhm range that the source measured.
module rc_oscillator #(
  parameter real R0_OHM          = 10.0e3,
  parameter real R1_OHM          = 20.0e3,
  parameter real R2_OHM          = 100.0e3,
  parameter real R3_OHM          = 1.5e6,
  parameter real C_F             = 330.0e-12,
  parameter real C_FIT_F         = 330.0e-12,
  parameter real SLOPE_S_PER_OHM = 6.49e-10,
  parameter real OFFSET_S        = 6.92e-6
) (
  input  logic [1:0] sel,
  input  logic       enable,
  output logic       osc_out
);

  function automatic real r_of(input logic [1:0] s);
    case (s)
      2'd0:    return R0_OHM;
      2'd1:    return R1_OHM;
      2'd2:    return R2_OHM;
      default: return R3_OHM;
    endcase
  endfunction

  // Half period in nanoseconds for the selected resistor.
  function automatic real half_ns(input logic [1:0] s);
    return 0.5e9 * (SLOPE_S_PER_OHM * r_of(s) * (C_F / C_FIT_F) + OFFSET_S);
  endfunction

  // The ring runs while enable is high; opening the gate stops it at once
  // and discharges it to the low state.
  always begin
    osc_out = 1'b0;
    wait (enable);
    fork
      forever begin
        #(half_ns(sel) * 1ns);
        osc_out = ~osc_out;
      end
      @(negedge enable);
    join_any
    disable fork;
  end

endmodule
