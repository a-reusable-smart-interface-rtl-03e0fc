// tb_config_regs: self-checking test of the configuration register file.
//
// Random host writes, internal writes and reads, including both ports
// writing the same register in one clock (the internal port must win), are
// compared against a reference array kept in the testbench. The flat view of
// all registers and the reset values are checked as well.
module tb_config_regs;

  localparam int N = 8;
  localparam int W = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic we = 1'b0, hw_we = 1'b0;
  logic [2:0] waddr = '0, raddr = '0, hw_addr = '0;
  logic [W-1:0] wdata = '0, hw_wdata = '0, rdata;
  logic [N*W-1:0] regs_flat;
  logic [W-1:0] model [N];

  int checks = 0, failures = 0;

  always #5ns clk = ~clk;

  config_regs dut (
    .clk, .rst_n, .we, .waddr, .wdata, .raddr, .rdata,
    .hw_we, .hw_addr, .hw_wdata, .regs_flat
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) model[i] = '0;
    repeat (3) @(posedge clk);
    #1ns rst_n = 1'b1;
    for (int i = 0; i < N; i++) begin
      raddr = 3'(i);
      #1ns check(rdata == 8'h00, $sformatf("reset value of reg %0d", i));
    end
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      we       = 1'($urandom);
      hw_we    = 1'($urandom_range(0, 3) == 0);
      waddr    = 3'($urandom);
      hw_addr  = (t % 7 == 0) ? waddr : 3'($urandom);
      wdata    = 8'($urandom);
      hw_wdata = 8'($urandom);
      raddr    = 3'($urandom);
      #1ns check(rdata == model[raddr], $sformatf("read reg %0d: %h expected %h", raddr, rdata, model[raddr]));
      @(posedge clk);
      if (we)    model[waddr]   = wdata;
      if (hw_we) model[hw_addr] = hw_wdata;
      #1ns;
      for (int i = 0; i < N; i++)
        check(regs_flat[i*W +: W] == model[i], $sformatf("flat reg %0d", i));
    end
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
