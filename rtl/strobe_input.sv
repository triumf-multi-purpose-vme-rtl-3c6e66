// strobe_input: synchronous (strobed) input register and STROBE arm logic.
//
// The external STROBE is used directly as a clock, so a strobe of a few
// nanoseconds is enough and the inputs need no setup time before it. While
// the strobe is armed, its rising edge copies the input channels into the
// synchronous data register and sets 'triggered'; further strobes are
// ignored until the module is re-armed by a CLSTB write. Re-arming does not
// clear the data, so RDSYNC always returns the last strobed word.
//
// Clock domains: the data register and the trigger flag live in the STROBE
// domain. The clk-domain CLSTB request 'clstb' is registered here and that
// glitch-free flop clears the trigger flag asynchronously. 'triggered' is
// brought into the clk domain through a two-flop synchronizer (two clocks of
// latency). 'sync_data' is read by the clk domain without synchronization:
// it only changes at the one strobe edge that sets the trigger flag, and the
// clk domain uses it for interrupts only after the synchronized flag is seen,
// by which time it has been stable for two clocks. For three clocks after a
// CLSTB request the output is held low, so the synchronizer's stale copy of
// the old trigger flag is never taken for a new strobe.
//
// Reset (power-up): data cleared, strobe armed, as the module description
// requires. Everything about the two clock domains is this design's choice;
// the description gives only the behaviour.
module strobe_input #(
  parameter int unsigned N_IN = 24
) (
  input  logic            clk,
  input  logic            rst_n,       // asynchronous, active low
  input  logic            strobe,      // external STROBE, rising edge active
  input  logic [N_IN-1:0] in_ch,       // input channels
  input  logic            clstb,       // clk domain, one clock: re-arm
  output logic [N_IN-1:0] sync_data,   // strobed input register
  output logic            triggered    // clk domain: a strobe has been taken
);

  logic rearm_q;       // registered re-arm request, clk domain
  logic clr_trig;      // asynchronous clear of the trigger flag
  logic trig_sd;       // trigger flag, STROBE domain
  logic trig_s;        // trigger flag after the synchronizer
  logic [2:0] mask_sr; // clocks since a CLSTB request

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rearm_q <= 1'b0;
      mask_sr <= '0;
    end else begin
      rearm_q <= clstb;
      mask_sr <= {mask_sr[1:0], clstb};
    end
  end

  assign clr_trig = rearm_q || !rst_n;

  always_ff @(posedge strobe or posedge clr_trig) begin
    if (clr_trig) trig_sd <= 1'b0;
    else          trig_sd <= 1'b1;
  end

  always_ff @(posedge strobe or negedge rst_n) begin
    if (!rst_n)        sync_data <= '0;
    else if (!trig_sd) sync_data <= in_ch;
  end

  sync2 #(.WIDTH(1), .RESET_VAL(1'b0)) u_sync_trig (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (trig_sd),
    .q    (trig_s)
  );

  assign triggered = trig_s && !clstb && !(|mask_sr);

endmodule
