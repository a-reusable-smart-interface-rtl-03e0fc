// tb_osc_interface: self-checking test of the period-to-digital converter.
//
// A square wave stands in for the ring oscillator: it runs while osc_enable
// is high, with a period of a whole number of clocks and a phase offset so
// that its edges never coincide with the clock; it restarts from low when
// disabled, like the ring whose loop is opened. For each case the expected
// result is worked out from the period: N*P/(PRESC+1) clocks, saturated at
// 255 with overflow set. Cases cover a plain count, the prescaler, a count
// that overflows, N = 0 (taken as 1), a restart while busy, every value of
// the sensor select and the enable behaviour. The time from start to done is
// checked against the number of periods the measurement must wait for.
module tb_osc_interface;

  import gsi_pkg::*;

  localparam int CLK_NS = 10;

  logic clk = 1'b0, rst_n = 1'b0;
  readout_cfg_t cfg;
  logic start = 1'b0, osc_in = 1'b0, busy, done, overflow, osc_enable;
  logic [1:0] osc_sel;
  logic [7:0] result;
  int period_clk = 40;

  int checks = 0, failures = 0;

  always #(CLK_NS/2 * 1ns) clk = ~clk;

  // Oscillator stand-in, stepped every nanosecond at 0.3 ns past the clock
  // grid. It restarts from low whenever it is disabled.
  int ph_ns = 0;
  initial begin
    #0.3ns;
    forever begin
      #1ns;
      if (!osc_enable) begin
        ph_ns  = 0;
        osc_in = 1'b0;
      end else begin
        ph_ns++;
        if (ph_ns >= period_clk * CLK_NS / 2) begin
          ph_ns  = 0;
          osc_in = ~osc_in;
        end
      end
    end
  end

  osc_interface dut (
    .clk, .rst_n, .cfg, .start, .osc_in, .osc_sel, .osc_enable,
    .busy, .done, .result, .overflow
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic measure(input int p, input int n, input int presc, input logic [1:0] sel);
    int exp_cnt, n_eff, cycles;
    logic exp_ovf;
    period_clk = p;
    n_eff     = (n == 0) ? 1 : n;
    exp_cnt   = (n_eff * p) / (presc + 1);
    exp_ovf   = exp_cnt > 255;
    if (exp_ovf) exp_cnt = 255;
    @(negedge clk);
    cfg.sel = sel; cfg.nper = 8'(n); cfg.presc = 8'(presc); cfg.osc_en = 1'b0;
    #1ns if (!busy) check(osc_sel == sel, "select follows configuration while idle");
    else check(osc_sel == 2'd0, "select held from the interrupted measurement");
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(busy && osc_enable, "busy and oscillator enabled after start");
    cfg.sel = ~sel;
    #1ns check(osc_sel == sel, "select held during measurement");
    cycles = 1;
    while (!done && cycles < 100000) begin
      @(negedge clk);
      cycles++;
    end
    check(done, "done seen");
    check(result == 8'(exp_cnt) && overflow == exp_ovf,
          $sformatf("P=%0d N=%0d PRESC=%0d: result %0d ovf %0d expected %0d ovf %0d",
                    p, n, presc, result, overflow, exp_cnt, exp_ovf));
    // One dropped period, one alignment edge, then N periods; the first
    // edge comes half a period after enable.
    check(cycles >= (n_eff + 1) * p && cycles <= (n_eff + 1) * p + p / 2 + 6,
          $sformatf("latency %0d cycles for P=%0d N=%0d", cycles, p, n_eff));
    @(negedge clk);
    check(!busy && !osc_enable, "idle and oscillator off after done");
  endtask

  initial begin
    cfg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    check(!busy && !done && !osc_enable, "idle after reset");
    measure(40, 4, 0, 2'd0);      // 160
    measure(37, 6, 0, 2'd1);      // 222
    measure(100, 4, 3, 2'd2);     // prescaler: 100
    measure(100, 4, 0, 2'd3);     // 400 -> overflow
    measure(30, 0, 0, 2'd1);      // N = 0 counts one period
    measure(64, 255, 127, 2'd2);  // long window: 127
    // Restart while busy: the second start wins.
    @(negedge clk);
    cfg.nper = 8'd8; cfg.presc = 8'd0; cfg.sel = 2'd0;
    start = 1'b1;
    @(negedge clk) start = 1'b0;
    repeat (50) @(negedge clk);
    measure(20, 5, 0, 2'd3);      // 100
    // osc_en keeps the oscillator on while idle.
    @(negedge clk);
    cfg.osc_en = 1'b1;
    #1ns check(osc_enable && !busy, "osc_en holds the oscillator on");
    cfg.osc_en = 1'b0;
    #1ns check(!osc_enable, "osc_en released");
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
