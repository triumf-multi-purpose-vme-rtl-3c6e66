// read_mux: forms the 32-bit read word of the VME I/O module.
//
// Combinational. The module only ever drives D32 reads, and bits it has no
// data for read as 1, which is what the register descriptions show:
//   RDSYNC  (0x14): 0xFF, then the 24-bit strobed input register
//   RDASYNC (0x18): 0xFF, then the 24 inputs sampled for this read
//   RDCNTL  (0x1C): 0xFFFFFF, then the control byte 0xAB with
//                   A = 0xF if the synchronous interrupt source is selected,
//                       0x0 if the asynchronous one,
//                   B = 0xF if a STROBE has been received (triggered),
//                       0x0 while the strobe is armed.
// For codes that are write-only the word is all ones (it is never driven:
// the decoder rejects such reads). The RDSYNC and RDCNTL forms follow the
// description; the 0xFF upper byte of RDASYNC is this design's choice to
// match RDSYNC, as the description gives only "24 bits".
module read_mux
  import vmeio_pkg::*;
#(
  parameter int unsigned N_IN = 24
) (
  input  func_e           fn,
  input  logic [N_IN-1:0] sync_data,
  input  logic [N_IN-1:0] async_data,
  input  logic            triggered,
  input  logic            src_sync,
  output logic [31:0]     rdata
);

  always_comb begin
    rdata = '1;
    unique case (fn)
      FN_RDSYNC:  rdata[N_IN-1:0] = sync_data;
      FN_RDASYNC: rdata[N_IN-1:0] = async_data;
      FN_CNTL:    rdata[7:0]      = {{4{src_sync}}, {4{triggered}}};
      default:    ;
    endcase
  end

endmodule
