// vme_interrupter: ROAK interrupter of the VME I/O module on IRQ7*.
//
// Sources. The first N_IRQ input channels can interrupt, each only if its
// bit in the interrupt-enable register (IRQENBL) is 1. The INTSRC register's
// LSB selects the source type:
//   synchronous  (1): the channels that were high when the STROBE was taken,
//                     valid while the strobe is in the triggered state;
//   asynchronous (0): the channels on which a low-to-high transition has been
//                     captured since the last INTSRC write.
// The request is raised while some enabled channel of the selected type is
// active and the interrupter has not yet been served.
//
// Release on acknowledge (ROAK). When the bus controller answers the level-7
// IACK cycle ('iack_ack', one clock) the request is dropped and the
// interrupter stays served, so the same event does not interrupt again. It is
// re-enabled by an INTSRC write (either source type; the write also clears the
// captured edges elsewhere) or, with the synchronous source selected, by a
// CLSTB write (which also re-arms the strobe).
//
// Status byte returned in the IACK cycle: 1 SSSS VVV, SSSS = switch S1 and VVV
// the number (0..7) of the highest active enabled channel, channel #1 being 0.
//
// Timing: 'irq' is registered, one clock after its cause; register writes
// take effect on the next clock. Reset: source synchronous, all interrupts
// disabled, not served. The register functions, ROAK, IRQ7, the status byte
// and the reset state follow the module description; the 'served' flag and
// which command clears it are this design's reading of "Interrupts must be
// re-enabled via a CLSTB or INTSRC command".
module vme_interrupter
  import vmeio_pkg::*;
#(
  parameter int unsigned N_IRQ = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  reg_wr_t          wr,          // register writes
  input  logic [N_IRQ-1:0] sync_bits,   // strobed data of the interrupt channels
  input  logic             triggered,   // strobe taken (clk domain)
  input  logic [N_IRQ-1:0] edges,       // captured rising edges (clk domain)
  input  logic [3:0]       sw_s1,       // switch S1: upper status bits
  input  logic             iack_ack,    // our IACK cycle is being answered
  output logic             irq,         // drive IRQ7* low while 1
  output logic [7:0]       status_byte, // D08 status/vector byte
  output logic [N_IRQ-1:0] irq_en,      // interrupt-enable register
  output logic             src_sync     // 1: synchronous source selected
);

  logic             served, served_nx;
  logic [N_IRQ-1:0] active;
  logic [2:0]       vvv;

  always_comb begin
    if (src_sync) active = triggered ? (sync_bits & irq_en) : '0;
    else          active = edges & irq_en;

    vvv = '0;
    for (int i = 0; i < N_IRQ; i++)
      if (active[i]) vvv = 3'(i);

    served_nx = served;
    if (wr.en && wr.fn == FN_INTSRC)                 served_nx = 1'b0;
    if (wr.en && wr.fn == FN_CNTL && src_sync)       served_nx = 1'b0;
    if (iack_ack)                                    served_nx = 1'b1;
  end

  assign status_byte = {1'b1, sw_s1, vvv};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      irq_en   <= '0;
      src_sync <= 1'b1;
      served   <= 1'b0;
      irq      <= 1'b0;
    end else begin
      if (wr.en && wr.fn == FN_IRQENBL) irq_en   <= wr.data[N_IRQ-1:0];
      if (wr.en && wr.fn == FN_INTSRC)  src_sync <= wr.data[0];
      served <= served_nx;
      irq    <= !served_nx && (|active) && !iack_ack;
    end
  end

  // ROAK: the request is gone the clock after the acknowledge.
  a_roak : assert property (@(posedge clk) disable iff (!rst_n)
                            iack_ack |=> !irq);

endmodule
