// output_unit: the 24 output channels of the VME I/O module.
//
// Each channel is either in latch mode or in pulse mode, chosen by the
// output-type register (OUTSET: bit = 1 pulse mode, bit = 0 latch mode).
//  * OUTLATCH writes the latch of every latch-mode channel (1 sets, 0
//    clears); latches of pulse-mode channels keep their value.
//  * OUTPULSE starts a pulse on every pulse-mode channel whose data bit is 1;
//    other channels are unaffected.
// The channel output is its pulse in pulse mode and its latch in latch mode,
// so a latch that was set stays set through a spell in pulse mode and shows
// again when the channel returns to latch mode, as the module description
// requires. All channels share one pulse timer: a pulse lasts PULSE_CYCLES
// clocks, counted from the clock after the write; a new OUTPULSE during a
// pulse restarts the timer with the new channel set. The description gives a
// nominal 60 ns pulse; with the 16 MHz VME SYSCLK assumed as clk (62.5 ns per
// clock) one clock is the nearest whole number, hence PULSE_CYCLES = 1.
//
// Interface: 'wr' is the one-clock register write from the bus controller.
// Timing: modes and latches change on the clock edge after the write; the
// outputs are combinational from the mode, latch and pulse flip-flops.
// Reset: all channels in latch mode with latches cleared (power-up state of
// the description); no pulse active.
module output_unit
  import vmeio_pkg::*;
#(
  parameter int unsigned N_OUT        = 24,
  parameter int unsigned PULSE_CYCLES = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  reg_wr_t          wr,
  output logic [N_OUT-1:0] out_ch,
  output logic [N_OUT-1:0] mode,    // 1 = pulse mode, for read-back by tests
  output logic [N_OUT-1:0] latch
);

  localparam int unsigned CW = $clog2(PULSE_CYCLES + 1);

  logic [N_OUT-1:0] pulse_q;
  logic [CW-1:0]    pulse_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode      <= '0;
      latch     <= '0;
      pulse_q   <= '0;
      pulse_cnt <= '0;
    end else begin
      if (wr.en && wr.fn == FN_OUTSET)
        mode <= wr.data[N_OUT-1:0];
      if (wr.en && wr.fn == FN_OUTLATCH)
        latch <= (latch & mode) | (wr.data[N_OUT-1:0] & ~mode);
      if (wr.en && wr.fn == FN_OUTPULSE) begin
        pulse_q   <= wr.data[N_OUT-1:0] & mode;
        pulse_cnt <= CW'(PULSE_CYCLES - 1);
      end else if (pulse_cnt != '0) begin
        pulse_cnt <= pulse_cnt - 1'b1;
      end else begin
        pulse_q   <= '0;
      end
    end
  end

  assign out_ch = (mode & pulse_q) | (~mode & latch);

endmodule
