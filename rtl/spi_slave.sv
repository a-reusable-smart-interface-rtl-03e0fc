// spi_slave: SPI slave port of the smart sensor (clock polarity 0, phase 0).
//
// The external controller (a PC or microcontroller) is the SPI master. This
// block shifts WIDTH-bit words in on MOSI and out on MISO, most significant
// bit first. SCLK, SS_N and MOSI are brought into the system clock domain by
// two-stage synchronisers and SCLK edges are detected there, so the whole
// block runs on the system clock; this needs the system clock to be at least
// eight times faster than SCLK (a choice of this design: the source gives the
// function of the SPI block, not its insides or its clocking).
//
// Timing: MOSI is sampled at each detected rising SCLK edge. After the
// WIDTH-th rising edge rx_data holds the word and rx_valid pulses for one
// clock. MISO changes after each detected falling SCLK edge. tx_data is
// sampled when the slave is selected and at the falling SCLK edge that
// follows the last bit of a word, so the user has half an SCLK period after
// rx_valid to present the reply for the next word. MISO is driven low while
// the slave is not selected (no tri-state: an outside pad can add one).
//
// The source describes an 8- or 16-bit, slave-mode SPI; WIDTH defaults to 8
// and may be set to 16. Master mode, which the source says the design could
// be reused for, is not built.
module spi_slave #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  // SPI pins
  input  logic             sclk,
  input  logic             ss_n,
  input  logic             mosi,
  output logic             miso,
  // word interface
  output logic [WIDTH-1:0] rx_data,
  output logic             rx_valid,
  input  logic [WIDTH-1:0] tx_data,
  output logic             frame_start,
  output logic             active
);

  localparam int unsigned CNT_W = $clog2(WIDTH);

  logic [2:0] sclk_sync, ss_sync;
  logic [1:0] mosi_sync;
  logic       sclk_rise, sclk_fall, ss_fall;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_sync <= '0;
      ss_sync   <= '1;
      mosi_sync <= '0;
    end else begin
      sclk_sync <= {sclk_sync[1:0], sclk};
      ss_sync   <= {ss_sync[1:0], ss_n};
      mosi_sync <= {mosi_sync[0], mosi};
    end
  end

  assign active    = ~ss_sync[1];
  assign sclk_rise =  sclk_sync[1] & ~sclk_sync[2];
  assign sclk_fall = ~sclk_sync[1] &  sclk_sync[2];
  assign ss_fall   = ~ss_sync[1] &  ss_sync[2];

  logic [CNT_W-1:0] bit_cnt;
  logic [WIDTH-2:0] rx_shift;
  logic [WIDTH-1:0] tx_shift;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_cnt     <= '0;
      rx_shift    <= '0;
      tx_shift    <= '0;
      rx_data     <= '0;
      rx_valid    <= 1'b0;
      frame_start <= 1'b0;
    end else begin
      rx_valid    <= 1'b0;
      frame_start <= 1'b0;
      if (ss_fall) begin
        bit_cnt     <= '0;
        tx_shift    <= tx_data;
        frame_start <= 1'b1;
      end else if (active) begin
        if (sclk_rise) begin
          rx_shift <= {rx_shift[WIDTH-3:0], mosi_sync[1]};
          if (bit_cnt == CNT_W'(WIDTH-1)) begin
            bit_cnt  <= '0;
            rx_data  <= {rx_shift[WIDTH-2:0], mosi_sync[1]};
            rx_valid <= 1'b1;
          end else begin
            bit_cnt <= bit_cnt + 1'b1;
          end
        end else if (sclk_fall) begin
          if (bit_cnt == '0) tx_shift <= tx_data;
          else               tx_shift <= {tx_shift[WIDTH-2:0], 1'b0};
        end
      end
    end
  end

  assign miso = active & tx_shift[WIDTH-1];

  // Rising and falling SCLK edges cannot be seen in the same clock.
  assert property (@(posedge clk) disable iff (!rst_n) !(sclk_rise && sclk_fall));

endmodule
