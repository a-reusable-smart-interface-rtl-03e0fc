// tb_smart_sensor_top: end-to-end test of the smart sensor at its default
// sizes (10, 20, 100 and 1500 kOhm sensors, 330 pF capacitor).
//
// The testbench plays the external controller: an SPI master task (mode 0,
// 1 MHz SCLK against a 10 MHz system clock) programs N and the prescaler,
// starts a readout on each sensor, polls STATUS until done and reads RESULT.
// The expected count is worked out from the oscillator's period law,
// floor(N*P/((PRESC+1)*Tclk)) within one count, and the resistance recovered
// from the count is checked to lie within 1 % of the sensor's value. The
// mechanisms of the design are each counted and must all occur: switching
// between the four sensors, busy polling, prescaled counting, counter
// overflow, the keep-running oscillator mode and a restart of a running
// measurement.
module tb_smart_sensor_top;

  import gsi_pkg::*;

  localparam real CLK_NS   = 100.0;   // 10 MHz system clock
  localparam real SCLK_HALF = 500.0;  // 1 MHz SCLK
  localparam real R [4]    = '{10.0e3, 20.0e3, 100.0e3, 1.5e6};

  logic clk = 1'b0, rst_n = 1'b0;
  logic sclk = 1'b0, ss_n = 1'b1, mosi = 1'b0, miso, osc_out, osc_enable;
  logic [1:0] osc_sel;

  int checks = 0, failures = 0;
  int n_sensor[4] = '{0, 0, 0, 0};
  int n_busy_polls = 0, n_presc = 0, n_ovf = 0, n_keep_on = 0, n_restart = 0;

  always #(CLK_NS / 2.0 * 1ns) clk = ~clk;

  smart_sensor_top dut (
    .clk, .rst_n, .sclk, .ss_n, .mosi, .miso, .osc_out, .osc_sel, .osc_enable
  );

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
      in[i] = miso;
      #(SCLK_HALF * 1ns);
      sclk = 1'b0;
    end
  endtask

  // One transaction per frame; returns STATUS (sent during the command word)
  // and the data word.
  task automatic spi_xact(input logic wr, input reg_addr_t a, input logic [7:0] d,
                          output logic [7:0] status, output logic [7:0] rdata);
    ss_n = 1'b0;
    #(SCLK_HALF * 1ns);
    spi_word({wr, 4'b0, a}, status);
    spi_word(d, rdata);
    #(SCLK_HALF * 1ns);
    ss_n = 1'b1;
    #(4 * SCLK_HALF * 1ns);
  endtask

  task automatic reg_write(input reg_addr_t a, input logic [7:0] d);
    logic [7:0] s, r;
    spi_xact(1'b1, a, d, s, r);
  endtask

  task automatic reg_read(input reg_addr_t a, output logic [7:0] d);
    logic [7:0] s;
    spi_xact(1'b0, a, 8'h00, s, d);
  endtask

  function automatic real period_ns(input int s);
    return (6.49e-10 * R[s] + 6.92e-6) * 1.0e9;
  endfunction

  task automatic measure(input int s, input int n, input int presc, input bit keep_on);
    logic [7:0] st, res, ctrl;
    real exact, p_est, r_est;
    int exp_lo, exp_hi;
    bit exp_ovf;
    exact  = real'(n) * period_ns(s) / (real'(presc + 1) * CLK_NS);
    exp_lo = int'($floor(exact)) - 1;
    exp_hi = int'($floor(exact)) + 1;
    exp_ovf = exact >= 256.0;
    reg_write(ADDR_NPER, 8'(n));
    reg_write(ADDR_PRESC, 8'(presc));
    ctrl = 8'(s) | (keep_on ? 8'h04 : 8'h00);
    reg_write(ADDR_CTRL, ctrl | 8'h08);
    if (osc_sel == 2'(s)) n_sensor[s]++;
    if (presc > 0) n_presc++;
    // Poll STATUS until done.
    do begin
      reg_read(ADDR_STATUS, st);
      if (st[STAT_BUSY]) n_busy_polls++;
    end while (!st[STAT_DONE]);
    check(!st[STAT_BUSY], "done implies not busy");
    if (keep_on) begin
      check(osc_enable, "oscillator kept running after the window");
      n_keep_on++;
    end else begin
      check(!osc_enable, "oscillator stopped after the window");
    end
    reg_read(ADDR_RESULT, res);
    check(st[STAT_OVF] == exp_ovf, $sformatf("sensor %0d overflow flag %0d expected %0d", s, st[STAT_OVF], exp_ovf));
    if (exp_ovf) begin
      check(res == 8'hFF, "saturated result");
      n_ovf++;
    end else begin
      check(int'(res) >= exp_lo && int'(res) <= exp_hi,
            $sformatf("sensor %0d N=%0d PRESC=%0d: result %0d expected %0f", s, n, presc, res, exact));
      p_est = real'(res) * real'(presc + 1) * CLK_NS / real'(n) * 1.0e-9;
      r_est = (p_est - 6.92e-6) / 6.49e-10;
      check((r_est - R[s]) / R[s] < 0.01 && (R[s] - r_est) / R[s] < 0.01,
            $sformatf("sensor %0d resistance %0f Ohm from the count, actual %0f", s, r_est, R[s]));
    end
    reg_write(ADDR_CTRL, 8'h00);
  endtask

  initial begin
    logic [7:0] st, d;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    reg_read(ADDR_STATUS, st);
    check(st == 8'h00, "idle after reset");
    reg_write(ADDR_NPER, 8'd77);
    reg_read(ADDR_NPER, d);
    check(d == 8'd77, "register read back");

    measure(0, 1, 0, 1'b0);     // 10 kOhm: about 134 counts
    measure(1, 1, 0, 1'b1);     // 20 kOhm: about 199 counts, oscillator kept on
    measure(2, 2, 7, 1'b0);     // 100 kOhm: about 179 counts with prescaler
    measure(3, 2, 99, 1'b0);    // 1.5 MOhm: about 196 counts with prescaler
    measure(2, 4, 0, 1'b0);     // 100 kOhm without prescaler: overflow

    // Restart: start on the slowest sensor, then restart on the fastest.
    reg_write(ADDR_NPER, 8'd1);
    reg_write(ADDR_PRESC, 8'd0);
    reg_write(ADDR_CTRL, 8'h0B);
    reg_read(ADDR_STATUS, st);
    check(st[STAT_BUSY], "busy after the first start");
    reg_write(ADDR_CTRL, 8'h08);
    n_restart++;
    measure(0, 1, 0, 1'b0);

    for (int s = 0; s < 4; s++) check(n_sensor[s] > 0, $sformatf("sensor %0d measured", s));
    check(n_busy_polls > 0, "busy seen while polling");
    check(n_presc > 0, "prescaler used");
    check(n_ovf > 0, "overflow seen");
    check(n_keep_on > 0, "keep-running mode used");
    check(n_restart > 0, "restart done");
    $display("mechanisms: sensors %0d/%0d/%0d/%0d busy polls %0d prescaled %0d overflow %0d keep-on %0d restart %0d",
             n_sensor[0], n_sensor[1], n_sensor[2], n_sensor[3], n_busy_polls, n_presc, n_ovf, n_keep_on, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(50ms);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
