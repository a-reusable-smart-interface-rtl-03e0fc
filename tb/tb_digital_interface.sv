// tb_digital_interface: self-checking test of the synthesizable digital
// section on its own, with a square-wave stand-in for the ring oscillator.
//
// The stand-in's period depends on which sensor osc_sel picks (a whole
// number of clocks, distinct for each sensor) and it only runs while
// osc_enable is high, so a wrong select or a missing enable shows up as a
// wrong count. Over SPI the testbench writes N and the prescaler, starts a
// readout on each sensor, polls STATUS and reads RESULT, and compares it with
// N*P/(PRESC+1) clocks (within one count). Also checked: register
// read-back, that STATUS arrives during every command word, several
// transactions in one slave-select frame, and the overflow flag.
module tb_digital_interface;

  import gsi_pkg::*;

  localparam int CLK_NS    = 20;
  localparam int SCLK_HALF = 200;
  localparam int PER [4]   = '{50, 90, 130, 170};   // periods in clocks

  logic clk = 1'b0, rst_n = 1'b0;
  logic sclk = 1'b0, ss_n = 1'b1, mosi = 1'b0, miso;
  logic osc_in = 1'b0, osc_enable;
  logic [1:0] osc_sel;

  int checks = 0, failures = 0;

  always #(CLK_NS / 2 * 1ns) clk = ~clk;

  digital_interface dut (
    .clk, .rst_n, .sclk, .ss_n, .mosi, .miso, .osc_in, .osc_sel, .osc_enable
  );

  // Oscillator stand-in on a 1 ns grid, offset from the clock edges.
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
        if (ph_ns >= PER[osc_sel] * CLK_NS / 2) begin
          ph_ns  = 0;
          osc_in = ~osc_in;
        end
      end
    end
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
      in[i] = miso;
      #(SCLK_HALF * 1ns);
      sclk = 1'b0;
    end
  endtask

  task automatic xact(input logic wr, input reg_addr_t a, input logic [7:0] d,
                      output logic [7:0] st, output logic [7:0] r);
    ss_n = 1'b0;
    #(SCLK_HALF * 1ns);
    spi_word({wr, 4'b0, a}, st);
    spi_word(d, r);
    #(SCLK_HALF * 1ns);
    ss_n = 1'b1;
    #(3 * SCLK_HALF * 1ns);
  endtask

  task automatic measure(input int s, input int n, input int presc);
    logic [7:0] st, r;
    int exact;
    bit ovf;
    exact = n * PER[s] / (presc + 1);
    ovf   = exact > 255;
    xact(1'b1, ADDR_NPER, 8'(n), st, r);
    xact(1'b1, ADDR_PRESC, 8'(presc), st, r);
    xact(1'b1, ADDR_CTRL, 8'(s) | 8'h08, st, r);
    do xact(1'b0, ADDR_STATUS, 8'h00, st, r); while (!r[STAT_DONE]);
    check(st == r || st[STAT_BUSY], "status sent during the command word");
    xact(1'b0, ADDR_RESULT, 8'h00, st, r);
    check(st[STAT_DONE] && st[STAT_OVF] == ovf, $sformatf("status %b", st));
    if (ovf) check(r == 8'hFF, "saturated");
    else check(int'(r) >= exact - 1 && int'(r) <= exact + 1,
               $sformatf("sensor %0d N=%0d PRESC=%0d: %0d expected %0d", s, n, presc, r, exact));
  endtask

  initial begin
    logic [7:0] st, r, r2;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);
    // Two transactions in one frame: write PRESC, then read it back.
    ss_n = 1'b0;
    #(SCLK_HALF * 1ns);
    spi_word(8'h80 | 8'(ADDR_PRESC), st);
    spi_word(8'h5C, r);
    spi_word(8'(ADDR_PRESC), st);
    spi_word(8'h00, r2);
    #(SCLK_HALF * 1ns);
    ss_n = 1'b1;
    #(3 * SCLK_HALF * 1ns);
    check(r2 == 8'h5C, $sformatf("read back %h in the same frame", r2));
    measure(0, 3, 0);
    measure(1, 2, 0);
    measure(2, 7, 3);
    measure(3, 1, 0);
    measure(3, 2, 0);     // 340 -> overflow
    measure(1, 200, 99);  // 180
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
