// tb_resistance_sweep: measures resistance across the two ranges the sensor
// is specified for and checks that the recovered value is within 1 %.
//
// Four sensor chips share one SPI bus (common SCLK and MOSI, one slave
// select each). Three carry a 330 pF capacitor and twelve resistors spread
// over 10 kOhm to 1.5 MOhm; the fourth carries 3.3 pF and resistors of 1 to
// 200 MOhm. For every resistor the testbench acts as the external
// processor: it measures once with a coarse setting, then picks the window
// length N and the prescaler so that the next count lands near 225 of 255,
// and repeats until the count is in 200..255 (at most four passes). The
// resistance is then recovered from the count through the straight-line
// period law of the oscillator, P = 6.49e-10 s/Ohm * R * (C/330 pF) +
// 6.92e-6 s, and compared with the resistor's value.
module tb_resistance_sweep;

  import gsi_pkg::*;

  localparam real CLK_NS    = 100.0;   // 10 MHz system clock
  localparam real SCLK_HALF = 500.0;   // 1 MHz SCLK
  localparam int  CHIPS     = 4;
  // Resistor s of chip c, and the chip's capacitor.
  function automatic real rs(input int c, input int s);
    case (c * 4 + s)
      0:  return 10.0e3;   1: return 20.0e3;   2: return 30.0e3;   3: return 50.0e3;
      4:  return 75.0e3;   5: return 100.0e3;  6: return 200.0e3;  7: return 390.0e3;
      8:  return 470.0e3;  9: return 820.0e3; 10: return 910.0e3; 11: return 1.5e6;
      12: return 1.0e6;   13: return 10.0e6;  14: return 100.0e6;  default: return 200.0e6;
    endcase
  endfunction

  function automatic real cs(input int c);
    return (c == 3) ? 3.3e-12 : 330.0e-12;
  endfunction

  logic clk = 1'b0, rst_n = 1'b0;
  logic sclk = 1'b0, mosi = 1'b0;
  logic [CHIPS-1:0] ss_n = '1, miso_v, osc_out_v, osc_en_v;
  logic [1:0] osc_sel_v [CHIPS];
  int chip = 0;

  int checks = 0, failures = 0, passes_total = 0, measured = 0;

  always #(CLK_NS / 2.0 * 1ns) clk = ~clk;

  for (genvar g = 0; g < CHIPS; g++) begin : g_chip
    smart_sensor_top #(
      .R0_OHM(rs(g, 0)), .R1_OHM(rs(g, 1)), .R2_OHM(rs(g, 2)), .R3_OHM(rs(g, 3)),
      .C_F(cs(g))
    ) u_chip (
      .clk, .rst_n, .sclk, .ss_n(ss_n[g]), .mosi, .miso(miso_v[g]),
      .osc_out(osc_out_v[g]), .osc_sel(osc_sel_v[g]), .osc_enable(osc_en_v[g])
    );
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic spi_word(input logic [7:0] out, output logic [7:0] in);
    for (int i = 7; i >= 0; i--) begin
      mosi = out[i];
      #(SCLK_HALF * 1ns);
      sclk = 1'b1;
      in[i] = miso_v[chip];
      #(SCLK_HALF * 1ns);
      sclk = 1'b0;
    end
  endtask

  task automatic xact(input logic wr, input reg_addr_t a, input logic [7:0] d,
                      output logic [7:0] r);
    logic [7:0] st;
    ss_n[chip] = 1'b0;
    #(SCLK_HALF * 1ns);
    spi_word({wr, 4'b0, a}, st);
    spi_word(d, r);
    #(SCLK_HALF * 1ns);
    ss_n[chip] = 1'b1;
    #(4 * SCLK_HALF * 1ns);
  endtask

  // One readout; returns the count and the overflow flag.
  task automatic readout(input int s, input int n, input int d, output int cnt, output bit ovf);
    logic [7:0] r;
    xact(1'b1, ADDR_NPER, 8'(n), r);
    xact(1'b1, ADDR_PRESC, 8'(d - 1), r);
    xact(1'b1, ADDR_CTRL, 8'(s) | 8'h08, r);
    do xact(1'b0, ADDR_STATUS, 8'h00, r); while (!r[STAT_DONE]);
    ovf = r[STAT_OVF];
    xact(1'b0, ADDR_RESULT, 8'h00, r);
    cnt = int'(r);
    passes_total++;
  endtask

  // Window length and prescaler that bring the count closest to 225.
  task automatic pick(input real p_clk, output int n_best, output int d_best);
    real err, best;
    int n;
    best = 1.0e30; n_best = 1; d_best = 256;
    for (int d = 1; d <= 256; d++) begin
      n = int'(225.0 * real'(d) / p_clk + 0.5);
      if (n < 1) n = 1;
      if (n > 255) n = 255;
      err = real'(n) * p_clk / real'(d) - 225.0;
      if (err < 0.0) err = -err;
      if (err < best) begin
        best = err; n_best = n; d_best = d;
      end
    end
  endtask

  task automatic measure_resistor(input int c, input int s);
    int n, d, cnt, pass;
    bit ovf;
    real p_clk, p_s, r_est, r_true, rel;
    chip = c;
    r_true = rs(c, s);
    n = 1; d = 16;
    pass = 0;
    forever begin
      readout(s, n, d, cnt, ovf);
      pass++;
      if (!ovf && cnt >= 200) break;
      if (pass == 4) break;
      if (ovf) begin
        // Longer than 255*d/n clocks: retry with the coarsest division.
        if (d == 256) break;
        n = 1; d = 256;
        continue;
      end
      p_clk = (real'(cnt) + 0.5) * real'(d) / real'(n);
      pick(p_clk, n, d);
    end
    check(!ovf && cnt >= 200, $sformatf("chip %0d sensor %0d: count %0d after %0d passes", c, s, cnt, pass));
    p_s   = (real'(cnt) + 0.5) * real'(d) / real'(n) * CLK_NS * 1.0e-9;
    r_est = (p_s - 6.92e-6) / (6.49e-10 * cs(c) / 330.0e-12);
    rel   = (r_est - r_true) / r_true;
    check(rel < 0.01 && rel > -0.01,
          $sformatf("R = %0.0f Ohm measured as %0.0f Ohm (%0.3f %%)", r_true, r_est, rel * 100.0));
    $display("C=%0.1f pF R=%0.0f Ohm: N=%0d prescale=%0d count=%0d -> %0.0f Ohm (%0.3f %%)",
             cs(c) * 1.0e12, r_true, n, d, cnt, r_est, rel * 100.0);
    measured++;
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    for (int c = 0; c < CHIPS; c++)
      for (int s = 0; s < 4; s++)
        measure_resistor(c, s);
    check(measured == CHIPS * 4, "all resistors measured");
    $display("readouts: %0d for %0d resistors", passes_total, measured);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1s);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
