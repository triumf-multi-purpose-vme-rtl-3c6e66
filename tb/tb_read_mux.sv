// tb_read_mux: self-checking test of the read-word multiplexer.
// For random register contents and every function code, compares the read
// word with the documented forms: 0xFF then 24 data bits for RDSYNC and
// RDASYNC, 0xFFFFFF then 0xAB for RDCNTL (A = F/0 for sync/async source,
// B = F when a STROBE was received), all ones for write-only codes.
module tb_read_mux;
  import vmeio_pkg::*;

  func_e       fn;
  logic [23:0] sync_data, async_data;
  logic        triggered, src_sync;
  logic [31:0] rdata, exp;
  int checks = 0, failures = 0;

  read_mux #(.N_IN(24)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // the example from the register description: sync source, strobe seen
    fn = FN_CNTL; triggered = 1; src_sync = 1; sync_data = 0; async_data = 0;
    #1 checks++; if (rdata !== 32'hFFFF_FFFF) failures++;
    triggered = 0; src_sync = 1;
    #1 checks++; if (rdata[7:0] !== 8'hF0) failures++;
    triggered = 1; src_sync = 0;
    #1 checks++; if (rdata[7:0] !== 8'h0F) failures++;
    repeat (2000) begin
      fn = func_e'($urandom % 8);
      sync_data = 24'($urandom); async_data = 24'($urandom);
      triggered = 1'($urandom); src_sync = 1'($urandom);
      case (fn)
        FN_RDSYNC:  exp = {8'hFF, sync_data};
        FN_RDASYNC: exp = {8'hFF, async_data};
        FN_CNTL:    exp = {24'hFFFFFF, src_sync ? 4'hF : 4'h0, triggered ? 4'hF : 4'h0};
        default:    exp = 32'hFFFF_FFFF;
      endcase
      #1;
      checks++;
      if (rdata !== exp) begin
        failures++;
        $display("FAIL fn=%0d rdata=%h expected %h", fn, rdata, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
