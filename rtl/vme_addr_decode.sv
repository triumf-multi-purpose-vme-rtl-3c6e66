// vme_addr_decode: address and function decoder of the VME I/O module.
//
// Combinational. A cycle selects the module when its address modifier is the
// one of the jumpered addressing mode and the upper address bits equal the
// base-address switches:
//   A24 mode (a24_mode = 1, jumper JP9 in):  AM = 0x39, A23..A16 = S3
//   A32 mode (a24_mode = 0, JP9 out):       AM = 0x09, A31..A16 = {S4, S3}
// S4 is ignored in A24 mode. A15..A5 are not decoded, so the eight-register
// map repeats through the whole 64 KiB window; A4..A2 pick the register.
// 'valid' is set only for the nine read/write combinations of the register
// map: reading a write-only register or writing a read-only one is not a
// valid function and the bus controller then leaves DTACK* released.
// The two AM codes, the switches, JP9 and the register map follow the module
// description. Treating the A24/A32 jumper as selecting exactly one AM code,
// and leaving invalid functions unacknowledged, are this design's reading of
// "DTACK*: Asserted on valid function".
module vme_addr_decode
  import vmeio_pkg::*;
(
  input  logic [31:16] addr_hi,  // VME address lines A31..A16
  input  logic [4:2]   addr_lo,  // VME address lines A4..A2
  input  logic [5:0]  am,        // address modifier AM5..AM0
  input  logic        write_n,   // VME WRITE*, low for a write
  input  logic        a24_mode,  // JP9 installed: A24 addressing
  input  logic [7:0]  sw_s3,     // base address A23..A16
  input  logic [7:0]  sw_s4,     // base address A31..A24 (A32 mode only)
  output logic        hit,       // address and AM select this module
  output func_e       fn,        // register selected by A4..A2
  output logic        valid      // hit, and the register allows this direction
);

  logic am_ok, base_ok, dir_ok;

  always_comb begin
    fn = func_e'(addr_lo);
    if (a24_mode) begin
      am_ok   = (am == AM_A24);
      base_ok = (addr_hi[23:16] == sw_s3);
    end else begin
      am_ok   = (am == AM_A32);
      base_ok = (addr_hi == {sw_s4, sw_s3});
    end
    hit = am_ok && base_ok;
    // Registers 0..4 are write-only, 5 and 6 read-only, 7 both.
    unique case (fn)
      FN_RDSYNC, FN_RDASYNC: dir_ok = write_n;
      FN_CNTL:               dir_ok = 1'b1;
      default:               dir_ok = !write_n;
    endcase
    valid = hit && dir_ok;
  end

endmodule
