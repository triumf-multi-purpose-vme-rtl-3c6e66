// vmeio_top: logic of the multi-purpose VME I/O module.
//
// A VME slave with 24 output channels (each latch or pulse mode), 24 input
// channels (strobed and asynchronous read-out) and a ROAK interrupter on
// IRQ7* fed by the first 8 inputs. It answers D32 cycles at the eight
// registers of its map (IRQENBL, INTSRC, OUTSET, OUTPULSE, OUTLATCH, RDSYNC,
// RDASYNC, RDCNTL/CLSTB), repeated through a 64 KiB window whose base is set
// by switches S3/S4, in A24 or A32 addressing (jumper JP9).
//
// Blocks: vme_addr_decode (AM and base-address match, register select),
// vme_slave_ctrl (handshake, DTACK*, IACK daisy chain), output_unit,
// strobe_input (STROBE-clocked register with arm/trigger), async_input
// (RDASYNC sampling and rising-edge capture), vme_interrupter and read_mux.
//
// Ports are the logic-level side of the board: the NIM/ECL level receivers
// and drivers, their jumpers and the open-collector VME drivers are outside.
// The bidirectional data bus is split into d_in / d_out / d_oe; DTACK*,
// IRQ7* and IACKOUT* are active low. clk is assumed to be the 16 MHz VME
// SYSCLK; sysreset_n is the VME SYSRESET* (power-up reset). 'led_access' is
// high while a valid access is acknowledged and is meant to fire the
// access-LED one-shot; the strobe LED is driven by the STROBE input itself.
module vmeio_top
  import vmeio_pkg::*;
#(
  parameter int unsigned N_IN         = 24,
  parameter int unsigned N_OUT        = 24,
  parameter int unsigned N_IRQ        = 8,
  parameter int unsigned PULSE_CYCLES = 1
) (
  input  logic             clk,
  input  logic             sysreset_n,
  // VME backplane
  input  logic             as_n,
  input  logic             ds0_n,
  input  logic             ds1_n,
  input  logic             write_n,
  input  logic             lword_n,
  input  logic             iack_n,
  input  logic             iackin_n,
  input  logic [31:1]      addr,
  input  logic [5:0]       am,
  input  logic [31:0]      d_in,
  output logic [31:0]      d_out,
  output logic             d_oe,
  output logic             dtack_n,
  output logic             iackout_n,
  output logic             irq7_n,
  // switches and jumpers
  input  logic [3:0]       sw_s1,     // status byte bits 6..3
  input  logic [7:0]       sw_s3,     // base address A23..A16
  input  logic [7:0]       sw_s4,     // base address A31..A24
  input  logic             jp9_a24,   // 1: A24 mode, 0: A32 mode
  // front panel (logic levels)
  input  logic             strobe,
  input  logic [N_IN-1:0]  in_ch,
  output logic [N_OUT-1:0] out_ch,
  output logic             led_access
);

  logic             rst_n;
  logic             valid;
  func_e            fn;
  reg_wr_t          wr;
  logic             rd_sample, iack_ack;
  logic [31:0]      rdata;
  logic [N_IN-1:0]  sync_data, async_data;
  logic             triggered;
  logic [N_IRQ-1:0] edges;
  logic             irq, src_sync;
  logic [7:0]       status_byte;

  assign rst_n = sysreset_n;

  vme_addr_decode u_dec (
    .addr_hi (addr[31:16]),
    .addr_lo (addr[4:2]),
    .am      (am),
    .write_n (write_n),
    .a24_mode(jp9_a24),
    .sw_s3   (sw_s3),
    .sw_s4   (sw_s4),
    .hit     (),
    .fn      (fn),
    .valid   (valid)
  );

  vme_slave_ctrl u_bus (
    .clk        (clk),
    .rst_n      (rst_n),
    .as_n       (as_n),
    .ds0_n      (ds0_n),
    .ds1_n      (ds1_n),
    .write_n    (write_n),
    .lword_n    (lword_n),
    .iack_n     (iack_n),
    .iackin_n   (iackin_n),
    .addr_lo    (addr[3:1]),
    .d_in       (d_in),
    .d_out      (d_out),
    .d_oe       (d_oe),
    .dtack_n    (dtack_n),
    .iackout_n  (iackout_n),
    .valid      (valid),
    .fn         (fn),
    .rdata      (rdata),
    .irq        (irq),
    .status_byte(status_byte),
    .wr         (wr),
    .rd_sample  (rd_sample),
    .iack_ack   (iack_ack),
    .access     (led_access)
  );

  read_mux #(.N_IN(N_IN)) u_rmux (
    .fn        (fn),
    .sync_data (sync_data),
    .async_data(async_data),
    .triggered (triggered),
    .src_sync  (src_sync),
    .rdata     (rdata)
  );

  strobe_input #(.N_IN(N_IN)) u_strobe (
    .clk      (clk),
    .rst_n    (rst_n),
    .strobe   (strobe),
    .in_ch    (in_ch),
    .clstb    (wr.en && wr.fn == FN_CNTL),
    .sync_data(sync_data),
    .triggered(triggered)
  );

  async_input #(.N_IN(N_IN), .N_IRQ(N_IRQ)) u_async (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_ch     (in_ch),
    .sample    (rd_sample),
    .intsrc    (wr.en && wr.fn == FN_INTSRC),
    .async_data(async_data),
    .edges     (edges)
  );

  vme_interrupter #(.N_IRQ(N_IRQ)) u_irq (
    .clk        (clk),
    .rst_n      (rst_n),
    .wr         (wr),
    .sync_bits  (sync_data[N_IRQ-1:0]),
    .triggered  (triggered),
    .edges      (edges),
    .sw_s1      (sw_s1),
    .iack_ack   (iack_ack),
    .irq        (irq),
    .status_byte(status_byte),
    .irq_en     (),
    .src_sync   (src_sync)
  );

  output_unit #(.N_OUT(N_OUT), .PULSE_CYCLES(PULSE_CYCLES)) u_out (
    .clk   (clk),
    .rst_n (rst_n),
    .wr    (wr),
    .out_ch(out_ch),
    .mode  (),
    .latch ()
  );

  assign irq7_n = !irq;

endmodule
