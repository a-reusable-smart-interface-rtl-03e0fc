// osc_interface: period-to-digital converter for the RC ring oscillator.
//
// The ring oscillator's period grows with the resistance of the sensing film
// that is switched into its RC stage, so measuring the period measures the
// resistance. Following the source, two counters do the conversion: one
// counts oscillator periods, the other counts system clock cycles during N
// periods, and the clock count is the eight-bit result. The block also drives
// the oscillator's multiplexer select and its enable.
//
// How it works: osc_in is synchronised with two flip-flops and its rising
// edges detected. A start pulse latches the sensor select, N (0 counts as 1)
// and the prescaler, enables the oscillator, and waits for SKIP_PERIODS+1
// rising edges; the first SKIP_PERIODS periods after switching are dropped
// so the RC stage can settle. From the next edge on, the clock counter
// advances once every PRESC+1 clocks until N further rising edges have been
// seen. The counter saturates at its maximum and sets overflow.
// The dropped periods and the prescaler are this design's own choices: the
// source fixes the eight-bit result and the programmable N but not the clock
// rate, and without a prescaler an eight-bit count could only span periods of
// a few hundred clock cycles.
//
// Timing: with PRESC = 0 the result is exactly the number of clocks between
// the first and the last counted rising edge, N*T/Tclk for an oscillator of
// period T. done pulses for one clock when result and overflow are updated;
// busy is high from the clock after start until that clock. A start while
// busy restarts the measurement.
module osc_interface #(
  parameter int unsigned RESULT_W     = gsi_pkg::RESULT_W,
  parameter int unsigned SKIP_PERIODS = 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  gsi_pkg::readout_cfg_t cfg,
  input  logic                  start,
  // to and from the ring oscillator
  input  logic                  osc_in,
  output logic [1:0]            osc_sel,
  output logic                  osc_enable,
  // result
  output logic                  busy,
  output logic                  done,
  output logic [RESULT_W-1:0]   result,
  output logic                  overflow
);

  import gsi_pkg::*;

  typedef enum logic [1:0] {S_IDLE, S_ALIGN, S_COUNT} state_t;
  state_t state;

  // Synchroniser and rising-edge detector for the oscillator output.
  logic [2:0] osc_sync;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) osc_sync <= '0;
    else        osc_sync <= {osc_sync[1:0], osc_in};
  end
  logic osc_rise;
  assign osc_rise = osc_sync[1] & ~osc_sync[2];

  localparam int unsigned SKIP_W = $clog2(SKIP_PERIODS + 2);

  logic [1:0]          sel_q;
  logic [REG_W-1:0]    nper_q, presc_q, presc_cnt, period_cnt;
  logic [SKIP_W-1:0]   skip_cnt;
  logic [RESULT_W-1:0] clk_cnt, clk_cnt_next;
  logic                ovf_q, ovf_next, tick;

  // Prescaled clock-cycle counter, saturating.
  always_comb begin
    tick         = (presc_cnt == presc_q);
    clk_cnt_next = clk_cnt;
    ovf_next     = ovf_q;
    if (tick) begin
      if (clk_cnt == '1) ovf_next = 1'b1;
      else               clk_cnt_next = clk_cnt + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      sel_q      <= '0;
      nper_q     <= '0;
      presc_q    <= '0;
      presc_cnt  <= '0;
      period_cnt <= '0;
      skip_cnt   <= '0;
      clk_cnt    <= '0;
      ovf_q      <= 1'b0;
      done       <= 1'b0;
      result     <= '0;
      overflow   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        state    <= S_ALIGN;
        sel_q    <= cfg.sel;
        nper_q   <= (cfg.nper == '0) ? REG_W'(1) : cfg.nper;
        presc_q  <= cfg.presc;
        skip_cnt <= '0;
      end else begin
        unique case (state)
          S_IDLE: ;
          S_ALIGN: if (osc_rise) begin
            if (skip_cnt == SKIP_W'(SKIP_PERIODS)) begin
              state      <= S_COUNT;
              presc_cnt  <= '0;
              period_cnt <= '0;
              clk_cnt    <= '0;
              ovf_q      <= 1'b0;
            end else begin
              skip_cnt <= skip_cnt + 1'b1;
            end
          end
          S_COUNT: begin
            presc_cnt <= tick ? '0 : presc_cnt + 1'b1;
            clk_cnt   <= clk_cnt_next;
            ovf_q     <= ovf_next;
            if (osc_rise) begin
              if (period_cnt == nper_q - 1'b1) begin
                state    <= S_IDLE;
                result   <= clk_cnt_next;
                overflow <= ovf_next;
                done     <= 1'b1;
              end else begin
                period_cnt <= period_cnt + 1'b1;
              end
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  assign busy       = (state != S_IDLE);
  assign osc_sel    = busy ? sel_q : cfg.sel;
  assign osc_enable = busy | cfg.osc_en;

  // The result is only updated at the end of a measurement.
  assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);

endmodule
