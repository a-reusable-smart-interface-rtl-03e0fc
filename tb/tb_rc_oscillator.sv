// tb_rc_oscillator: self-checking test of the ring-oscillator model.
//
// For each of the four resistors the period is measured from rising edge to
// rising edge and compared with the straight-line law
// P = 6.49e-10 s/Ohm * R + 6.92e-6 s at 330 pF, worked out here from the
// resistor values. Also checked: 50 % duty cycle, output low and still while
// disabled, the first rising edge half a period after enable, and that a
// capacitor of a tenth the size divides the resistive part of the period by
// ten.
module tb_rc_oscillator;

  localparam real R [4] = '{20.0e3, 100.0e3, 470.0e3, 1.5e6};

  logic [1:0] sel = '0, sel_b = '0;
  logic enable = 1'b0, enable_b = 1'b0, osc, osc_b;
  int checks = 0, failures = 0;

  rc_oscillator #(.R0_OHM(20.0e3), .R1_OHM(100.0e3), .R2_OHM(470.0e3), .R3_OHM(1.5e6))
    dut (.sel, .enable, .osc_out(osc));
  rc_oscillator #(.R0_OHM(20.0e3), .R1_OHM(100.0e3), .R2_OHM(470.0e3), .R3_OHM(1.5e6),
                  .C_F(33.0e-12))
    dut_small_c (.sel(sel_b), .enable(enable_b), .osc_out(osc_b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic bit near(input real a, input real b);
    return (a - b) < 1.0 && (b - a) < 1.0;   // within 1 ns
  endfunction

  initial begin
    realtime t0, t1, t2, t_en;
    real p_exp;
    for (int i = 0; i < 4; i++) begin
      sel = 2'(i);
      p_exp = (6.49e-10 * R[i] + 6.92e-6) * 1.0e9;   // ns
      #(1us);
      check(osc == 1'b0, "low while disabled");
      enable = 1'b1;
      t_en = $realtime;
      @(posedge osc) t0 = $realtime;
      check(near(t0 - t_en, p_exp / 2.0), $sformatf("first edge %0f ns after enable, expected %0f", t0 - t_en, p_exp / 2.0));
      @(negedge osc) t1 = $realtime;
      @(posedge osc) t2 = $realtime;
      check(near(t2 - t0, p_exp), $sformatf("R=%0f period %0f ns expected %0f", R[i], t2 - t0, p_exp));
      check(near(t1 - t0, p_exp / 2.0), "50% duty cycle");
      enable = 1'b0;
      #(1ns);
      check(osc == 1'b0, "stops low when disabled");
    end
    // Capacitor scaling.
    sel_b = 2'd3;
    enable_b = 1'b1;
    @(posedge osc_b) t0 = $realtime;
    @(posedge osc_b) t1 = $realtime;
    p_exp = (6.49e-10 * 1.5e6 / 10.0 + 6.92e-6) * 1.0e9;
    check(near(t1 - t0, p_exp), $sformatf("33 pF period %0f ns expected %0f", t1 - t0, p_exp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(20ms);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
