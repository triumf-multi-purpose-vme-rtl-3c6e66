// vmeio_pkg: types and constants shared by the VME I/O module.
//
// The function codes are the register map of the module: the eight D32
// addresses 0x00..0x1C are selected by address lines A4..A2, and the whole
// 64 KiB window repeats this map. Address 0x1C is RDCNTL when read and CLSTB
// when written, so the code alone does not name a function: the R/W line
// completes it. The two address-modifier codes are the standard (A24) and
// extended (A32) non-privileged data codes the module answers to.
package vmeio_pkg;

  // Register offsets, A4..A2 of the VME address.
  typedef enum logic [2:0] {
    FN_IRQENBL  = 3'd0,  // 0x00 W  8-bit interrupt-enable register
    FN_INTSRC   = 3'd1,  // 0x04 W  interrupt source (LSB: 1 = sync, 0 = async)
    FN_OUTSET   = 3'd2,  // 0x08 W  output mode register (1 = pulse, 0 = latch)
    FN_OUTPULSE = 3'd3,  // 0x0C W  pulse the pulse-mode channels given by the data
    FN_OUTLATCH = 3'd4,  // 0x10 W  set/clear the latch-mode channels
    FN_RDSYNC   = 3'd5,  // 0x14 R  strobed input register
    FN_RDASYNC  = 3'd6,  // 0x18 R  inputs sampled now
    FN_CNTL     = 3'd7   // 0x1C R  RDCNTL control register / W CLSTB re-arm
  } func_e;

  // Address modifiers (2.2): 0x39 standard non-privileged data (A24),
  // 0x09 extended non-privileged data (A32).
  localparam logic [5:0] AM_A24 = 6'h39;
  localparam logic [5:0] AM_A32 = 6'h09;

  // The interrupter drives IRQ7*, so it answers IACK cycles for level 7.
  localparam logic [2:0] IRQ_LEVEL = 3'd7;

  // A register write issued by the bus controller: one clock wide.
  typedef struct packed {
    logic        en;
    func_e       fn;
    logic [31:0] data;
  } reg_wr_t;

endpackage
