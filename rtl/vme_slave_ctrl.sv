// vme_slave_ctrl: VME bus controller of the VME I/O module.
//
// Runs the slave side of the asynchronous VME handshake in the clk domain.
// AS*, DS0*, DS1* and IACKIN* pass through two-flop synchronizers; address,
// AM, WRITE*, LWORD*, IACK* and write data are taken directly, because the
// VME protocol has them stable before the data strobes are asserted.
//
// Data cycles. When AS* and a data strobe are seen, the controller checks the
// decoder's verdict. A valid function in D32 form (DS0*, DS1* and LWORD* all
// low) is carried out:
//   write: one-clock register write 'wr' (function code and data), then
//          DTACK* is asserted;
//   read:  for RDASYNC a one-clock 'rd_sample' (combinational, in the clock
//          the cycle is recognised) makes the input sampler take the inputs;
//          one clock later the read word is latched and then driven with
//          DTACK*.
// Anything else (other address, invalid direction, not D32) is ignored and
// DTACK* stays released, so the master's bus timer ends the cycle. DTACK* is
// released after both data strobes go high; the controller then waits for AS*
// high before it looks at the next cycle.
//
// Interrupt acknowledge. In an IACK cycle (IACK* low) the controller waits for
// IACKIN* of the daisy chain. If the interrupter is requesting and the cycle
// is for level 7 (A3..A1 = 111) it drives the status byte on D7..D0 with
// DTACK* and pulses 'iack_ack' (which releases the request: ROAK);
// otherwise it passes the acknowledge on, IACKOUT* low until AS* rises.
//
// Latency from the data strobe to DTACK* is 2 synchronizer clocks plus 2
// clocks (write) or 3 clocks (read, IACK). The register map, D32-only access
// and "DTACK* asserted on valid function" follow the module description; the
// clocked implementation, the synchronizers and the IACK daisy-chain
// behaviour (standard VME interrupter practice) are this design's choices.
module vme_slave_ctrl
  import vmeio_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // VME backplane (active-low strobes)
  input  logic        as_n,
  input  logic        ds0_n,
  input  logic        ds1_n,
  input  logic        write_n,
  input  logic        lword_n,
  input  logic        iack_n,
  input  logic        iackin_n,
  input  logic [3:1]  addr_lo,     // A3..A1, interrupt level in IACK cycles
  input  logic [31:0] d_in,
  output logic [31:0] d_out,
  output logic        d_oe,        // drive D31..D0 (reads and IACK)
  output logic        dtack_n,
  output logic        iackout_n,
  // from the address decoder
  input  logic        valid,
  input  func_e       fn,
  // module side
  input  logic [31:0] rdata,       // read word for 'fn'
  input  logic        irq,         // interrupter is requesting
  input  logic [7:0]  status_byte,
  output reg_wr_t     wr,
  output logic        rd_sample,
  output logic        iack_ack,
  output logic        access       // a valid access is being acknowledged
);

  typedef enum logic [2:0] {
    S_IDLE, S_READ, S_ACK, S_END, S_PASS, S_IGNORE
  } state_e;

  state_e state;
  logic   as_s, ds0_s, ds1_s, iackin_s;
  logic   is_read;
  logic   start, d32;

  sync2 #(.WIDTH(4), .RESET_VAL(1'b1)) u_sync (
    .clk(clk), .rst_n(rst_n),
    .d({as_n, ds0_n, ds1_n, iackin_n}),
    .q({as_s, ds0_s, ds1_s, iackin_s})
  );

  assign start     = (state == S_IDLE) && !as_s && (!ds0_s || !ds1_s);
  assign d32       = !ds0_s && !ds1_s && !lword_n;
  assign rd_sample = start && iack_n && valid && d32 && write_n &&
                     (fn == FN_RDASYNC);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      wr       <= '0;
      d_out    <= '1;
      is_read  <= 1'b0;
      iack_ack <= 1'b0;
    end else begin
      wr.en    <= 1'b0;
      iack_ack <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          if (!iack_n) begin
            if (!iackin_s) begin
              if (irq && !ds0_s && addr_lo == IRQ_LEVEL) begin
                d_out    <= {24'hFF_FFFF, status_byte};
                is_read  <= 1'b1;
                iack_ack <= 1'b1;
                state    <= S_ACK;
              end else begin
                state <= S_PASS;
              end
            end
          end else if (valid && d32) begin
            is_read <= write_n;
            if (!write_n) begin
              wr    <= '{en: 1'b1, fn: fn, data: d_in};
              state <= S_ACK;
            end else begin
              state <= S_READ;
            end
          end else begin
            state <= S_IGNORE;
          end
        end
        S_READ: begin
          d_out <= rdata;
          state <= S_ACK;
        end
        S_ACK:    if (ds0_s && ds1_s) state <= S_END;
        S_END:    if (as_s) state <= S_IDLE;
        S_PASS:   if (as_s) state <= S_IDLE;
        S_IGNORE: if (as_s && ds0_s && ds1_s) state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
    end
  end

  assign dtack_n   = !(state == S_ACK);
  assign d_oe      = (state == S_ACK) && is_read;
  assign iackout_n = !(state == S_PASS);
  assign access    = (state == S_ACK);

  // The module never both answers and passes on the same cycle.
  a_ack_or_pass : assert property (@(posedge clk) disable iff (!rst_n)
                                   !(!dtack_n && !iackout_n));
  // A register write lasts exactly one clock.
  a_wr_pulse    : assert property (@(posedge clk) disable iff (!rst_n)
                                   wr.en |=> !wr.en);

endmodule
