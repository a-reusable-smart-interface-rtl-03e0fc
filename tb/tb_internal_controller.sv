// tb_internal_controller: self-checking test of the internal controller.
//
// The SPI slave is replaced by words driven straight onto the controller's
// word interface, and the oscillator interface by testbench signals; the
// register file is the real one. Checked: register writes and read-back,
// that only CTRL, NPER and PRESC are writable, that writing the start bit
// stores CTRL without it and pulses start exactly once, one clock later,
// that command words are answered with STATUS, that done stores the result
// and sets the done and overflow flags, that a new start clears them, and
// that a new frame resynchronises the command/data phase.
module tb_internal_controller;

  import gsi_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] rx_data = '0, tx_data;
  logic rx_valid = 1'b0, frame_start = 1'b0;
  logic reg_we, hw_we;
  reg_addr_t reg_waddr, reg_raddr, hw_addr;
  reg_data_t reg_wdata, reg_rdata, hw_wdata;
  logic [NUM_REGS*REG_W-1:0] regs_flat;
  readout_cfg_t cfg;
  logic start, busy = 1'b0, done = 1'b0, overflow = 1'b0;
  logic [7:0] result = '0;

  int checks = 0, failures = 0, starts = 0;

  always #5ns clk = ~clk;
  always_ff @(posedge clk) if (rst_n && start) starts <= starts + 1;

  internal_controller dut (
    .clk, .rst_n, .rx_data, .rx_valid, .frame_start, .tx_data,
    .reg_we, .reg_waddr, .reg_wdata, .reg_raddr, .reg_rdata,
    .hw_we, .hw_addr, .hw_wdata, .regs_flat,
    .cfg, .start, .busy, .done, .result, .overflow
  );

  config_regs u_regs (
    .clk, .rst_n, .we(reg_we), .waddr(reg_waddr), .wdata(reg_wdata),
    .raddr(reg_raddr), .rdata(reg_rdata),
    .hw_we, .hw_addr, .hw_wdata, .regs_flat
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Deliver one received word and return what the controller presents
  // for the following word slot.
  task automatic word(input logic [7:0] w, output logic [7:0] reply);
    @(negedge clk);
    rx_data  = w;
    rx_valid = 1'b1;
    @(negedge clk);
    rx_valid = 1'b0;
    reply    = tx_data;
    repeat (3) @(negedge clk);
  endtask

  task automatic new_frame();
    @(negedge clk);
    frame_start = 1'b1;
    @(negedge clk);
    frame_start = 1'b0;
  endtask

  task automatic wr(input reg_addr_t a, input logic [7:0] d);
    logic [7:0] r;
    word(8'h80 | 8'(a), r);
    word(d, r);
  endtask

  task automatic rd(input reg_addr_t a, output logic [7:0] d);
    logic [7:0] r;
    word(8'(a), d);
    word(8'h00, r);
  endtask

  function automatic logic [7:0] reg_of(input int a);
    return regs_flat[a*REG_W +: REG_W];
  endfunction

  initial begin
    logic [7:0] r;
    int s0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    new_frame();
    #1ns check(tx_data == 8'h00, "status after reset is zero");
    wr(ADDR_NPER, 8'd25);
    wr(ADDR_PRESC, 8'd7);
    check(cfg.nper == 8'd25 && cfg.presc == 8'd7, "NPER and PRESC reach the configuration");
    rd(ADDR_NPER, r);
    check(r == 8'd25, $sformatf("read NPER %0d", r));
    rd(ADDR_PRESC, r);
    check(r == 8'd7, $sformatf("read PRESC %0d", r));
    // Read-only registers ignore host writes.
    wr(ADDR_RESULT, 8'hEE);
    wr(ADDR_STATUS, 8'hEE);
    check(reg_of(ADDR_RESULT) == 8'h00 && reg_of(ADDR_STATUS) == 8'h00, "RESULT and STATUS not writable");
    // Write CTRL without start.
    s0 = starts;
    wr(ADDR_CTRL, 8'b0000_0101);
    check(cfg.sel == 2'd1 && cfg.osc_en && starts == s0, "CTRL write without start");
    // Start a measurement on sensor 2.
    @(negedge clk);
    rx_data = 8'h80; rx_valid = 1'b1;
    @(negedge clk);
    rx_data = 8'b0000_1010; rx_valid = 1'b1;
    @(negedge clk);
    rx_valid = 1'b0;
    check(start && cfg.sel == 2'd2 && !cfg.osc_en, "start pulses one clock after the CTRL write, with the new select");
    check(reg_of(ADDR_CTRL) == 8'b0000_0010, "start bit not stored");
    @(negedge clk);
    check(!start, "start is a single pulse");
    check(starts == s0 + 1, "one start");
    busy = 1'b1;
    repeat (3) @(negedge clk);
    new_frame();
    #1ns check(tx_data[STAT_BUSY] && !tx_data[STAT_DONE], "status shows busy");
    // Finish with an overflowing result.
    @(negedge clk);
    busy = 1'b0; done = 1'b1; result = 8'hFF; overflow = 1'b1;
    @(negedge clk);
    done = 1'b0;
    check(reg_of(ADDR_RESULT) == 8'hFF, "result stored");
    @(negedge clk);
    check(reg_of(ADDR_STATUS) == 8'b110, $sformatf("status after done %b", reg_of(ADDR_STATUS)));
    rd(ADDR_RESULT, r);
    check(r == 8'hFF, "read RESULT");
    // A frame break in the middle of a transaction: the next word is a command.
    word(8'h80 | 8'(ADDR_NPER), r);
    new_frame();
    rd(ADDR_NPER, r);
    check(r == 8'd25, "frame start resynchronises");
    // A second measurement clears the flags.
    wr(ADDR_CTRL, 8'b0000_1011);
    check(starts == s0 + 2 && cfg.sel == 2'd3, "second start");
    rd(ADDR_STATUS, r);
    check(r == 8'h00, $sformatf("flags cleared on start, status %b", r));
    @(negedge clk);
    done = 1'b1; result = 8'd42; overflow = 1'b0;
    @(negedge clk);
    done = 1'b0;
    rd(ADDR_RESULT, r);
    check(r == 8'd42, "second result");
    rd(ADDR_STATUS, r);
    check(r == 8'b010, "done without overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(100us);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
