// tb_spi_slave: self-checking test of the SPI slave (mode 0), with 8-bit
// words and, on a second instance, 16-bit words.
//
// A master task in the testbench shifts random words in on MOSI while
// sampling MISO. The testbench answers each received word by presenting its
// bitwise inverse as the reply for the next word slot, so every reply checks
// both directions of the previous word. The first word of a frame returns the
// value presented when the slave was selected. Checked: every received word,
// every reply, one rx_valid per word, one frame_start per frame, and that
// rx_valid arrives within a few clocks of the last SCLK rising edge.
module tb_spi_slave;

  localparam int CLK_NS   = 10;
  localparam int SCLK_HALF = 80;   // SCLK is clk/16

  logic clk = 1'b0, rst_n = 1'b0;
  logic sclk = 1'b0, ss_n = 1'b1, mosi = 1'b0, miso;
  logic [7:0] rx_data, tx_data;
  logic rx_valid, frame_start, active;

  int checks = 0, failures = 0;
  int rx_count = 0, fs_count = 0;
  logic [7:0] last_rx;

  always #(CLK_NS/2 * 1ns) clk = ~clk;

  spi_slave #(.WIDTH(8)) dut (
    .clk, .rst_n, .sclk, .ss_n, .mosi, .miso,
    .rx_data, .rx_valid, .tx_data, .frame_start, .active
  );

  // A 16-bit instance on the same SCLK and MOSI with its own slave select.
  logic ss16_n = 1'b1, miso16, rx_valid16, fs16, active16;
  logic [15:0] rx_data16, tx_data16 = 16'hBEEF;
  spi_slave #(.WIDTH(16)) dut16 (
    .clk, .rst_n, .sclk, .ss_n(ss16_n), .mosi, .miso(miso16),
    .rx_data(rx_data16), .rx_valid(rx_valid16), .tx_data(tx_data16),
    .frame_start(fs16), .active(active16)
  );

  // The 16-bit instance replies with the inverse of each received word.
  always @(posedge clk) if (rst_n && rx_valid16) tx_data16 <= ~rx_data16;

  // Reply to each word with its inverse.
  always @(posedge clk) begin
    if (rst_n && rx_valid) begin
      tx_data  <= ~rx_data;
      last_rx  <= rx_data;
      rx_count <= rx_count + 1;
    end
    if (rst_n && frame_start) fs_count <= fs_count + 1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic xfer16(input logic [15:0] out, output logic [15:0] in);
    for (int i = 15; i >= 0; i--) begin
      mosi = out[i];
      #(SCLK_HALF * 1ns);
      sclk = 1'b1;
      in[i] = miso16;
      #(SCLK_HALF * 1ns);
      sclk = 1'b0;
    end
  endtask

  task automatic xfer(input logic [7:0] out, output logic [7:0] in);
    for (int i = 7; i >= 0; i--) begin
      mosi = out[i];
      #(SCLK_HALF * 1ns);
      sclk = 1'b1;
      in[i] = miso;
      #(SCLK_HALF * 1ns);
      sclk = 1'b0;
    end
  endtask

  initial begin
    logic [7:0] w, r, expect_r;
    int n_before;
    tx_data = 8'hA5;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);
    for (int f = 0; f < 6; f++) begin
      tx_data = 8'(8'hA5 + f);
      expect_r = 8'(8'hA5 + f);
      ss_n = 1'b0;
      #(SCLK_HALF * 1ns);
      for (int k = 0; k < 4; k++) begin
        w = 8'($urandom);
        n_before = rx_count;
        xfer(w, r);
        check(r == expect_r, $sformatf("frame %0d word %0d miso %h expected %h", f, k, r, expect_r));
        // rx_valid must follow within 5 clocks of the last rising edge.
        repeat (6) @(posedge clk);
        check(rx_count == n_before + 1, "one rx_valid per word");
        check(last_rx == w, $sformatf("rx %h expected %h", last_rx, w));
        expect_r = ~w;
      end
      #(SCLK_HALF * 1ns);
      ss_n = 1'b1;
      repeat (8) @(posedge clk);
      check(!active, "inactive after ss_n high");
      check(miso == 1'b0, "miso low when deselected");
      check(fs_count == f + 1, $sformatf("frame_start count %0d expected %0d", fs_count, f + 1));
    end
    // 16-bit words: two words per frame; the reply to the first is its
    // inverse, presented after rx_valid.
    begin
      logic [15:0] w16, r16;
      for (int f = 0; f < 3; f++) begin
        tx_data16 = 16'(16'hBEEF + f);
        ss16_n = 1'b0;
        #(SCLK_HALF * 1ns);
        w16 = 16'($urandom);
        xfer16(w16, r16);
        check(r16 == 16'(16'hBEEF + f), $sformatf("16-bit first reply %h", r16));
        repeat (6) @(posedge clk);
        check(rx_data16 == w16, $sformatf("16-bit rx %h expected %h", rx_data16, w16));
        xfer16(16'h0000, r16);
        check(r16 == ~w16, $sformatf("16-bit second reply %h expected %h", r16, ~w16));
        #(SCLK_HALF * 1ns);
        ss16_n = 1'b1;
        repeat (8) @(posedge clk);
      end
      check(!active16, "16-bit slave released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2ms);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
