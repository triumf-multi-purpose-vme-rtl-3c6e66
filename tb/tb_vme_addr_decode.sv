// tb_vme_addr_decode: self-checking test of the address/function decoder.
// Directed cycles at the documented register addresses in both addressing
// modes, then random addresses, modifiers and directions compared with a
// reference written from the register table (0x00..0x10 write-only,
// 0x14/0x18 read-only, 0x1C both; AM 0x39 for A24, 0x09 for A32; the base
// switch S4 only counts in A32 mode).
module tb_vme_addr_decode;
  import vmeio_pkg::*;

  logic [31:16] addr_hi;
  logic [4:2]   addr_lo;
  logic [5:0]   am;
  logic         write_n, a24_mode, hit, valid;
  logic [7:0]   sw_s3, sw_s4;
  func_e        fn;
  int checks = 0, failures = 0;

  vme_addr_decode dut (.*);

  function automatic logic ref_valid(logic [31:0] a, logic [5:0] m, logic wn,
                                     logic a24, logic [7:0] s3, logic [7:0] s4);
    logic h;
    logic [7:0] off;
    h = a24 ? (m == 6'h39 && a[23:16] == s3)
            : (m == 6'h09 && a[31:24] == s4 && a[23:16] == s3);
    off = {3'b0, a[4:2], 2'b00};
    case (off)
      8'h00, 8'h04, 8'h08, 8'h0C, 8'h10: return h && !wn;
      8'h14, 8'h18:                      return h && wn;
      default:                           return h;
    endcase
  endfunction

  task automatic apply(logic [31:0] a, logic [5:0] m, logic wn);
    logic exp_v;
    addr_hi = a[31:16]; addr_lo = a[4:2]; am = m; write_n = wn;
    #1;
    exp_v = ref_valid(a, m, wn, a24_mode, sw_s3, sw_s4);
    checks++;
    if (valid !== exp_v || fn !== func_e'(a[4:2])) begin
      failures++;
      $display("FAIL a=%h am=%h wn=%b a24=%b: valid=%b exp=%b fn=%0d",
               a, m, wn, a24_mode, valid, exp_v, fn);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // A32 mode, base 0x1234_0000
    a24_mode = 0; sw_s3 = 8'h34; sw_s4 = 8'h12;
    apply(32'h1234_0000, 6'h09, 0);  // IRQENBL write
    checks++; if (!valid || fn != FN_IRQENBL) failures++;
    apply(32'h1234_0014, 6'h09, 1);  // RDSYNC read
    checks++; if (!valid || fn != FN_RDSYNC) failures++;
    apply(32'h1234_0014, 6'h09, 0);  // RDSYNC written: invalid
    checks++; if (valid) failures++;
    apply(32'h1234_0000, 6'h09, 1);  // IRQENBL read: invalid
    checks++; if (valid) failures++;
    apply(32'h1234_FFFC, 6'h09, 1);  // image of 0x1C, RDCNTL
    checks++; if (!valid || fn != FN_CNTL) failures++;
    apply(32'h1234_001C, 6'h09, 0);  // CLSTB
    checks++; if (!valid) failures++;
    apply(32'h1234_001C, 6'h39, 0);  // wrong AM for A32
    checks++; if (valid) failures++;
    apply(32'h1334_001C, 6'h09, 0);  // wrong base
    checks++; if (valid || hit) failures++;
    // A24 mode: S4 ignored
    a24_mode = 1;
    apply(32'hAB34_0010, 6'h39, 0);  // OUTLATCH
    checks++; if (!valid || fn != FN_OUTLATCH) failures++;
    apply(32'h0034_0018, 6'h39, 1);  // RDASYNC
    checks++; if (!valid || fn != FN_RDASYNC) failures++;
    apply(32'h0034_0018, 6'h09, 1);  // A32 modifier in A24 mode
    checks++; if (valid) failures++;
    // structured sweep: every mode, base-match case, modifier, register
    // and direction
    for (int md = 0; md < 2; md++)
      for (int hm = 0; hm < 2; hm++)
        for (int lm = 0; lm < 2; lm++)
          for (int mi = 0; mi < 3; mi++)
            for (int f = 0; f < 8; f++)
              for (int w = 0; w < 2; w++) begin
                logic [31:0] a;
                a24_mode = 1'(md);
                sw_s3 = 8'h5C; sw_s4 = 8'hE1;
                a = {(hm != 0) ? sw_s4 : 8'h17, (lm != 0) ? sw_s3 : 8'h5D, 11'h2A5, 3'(f), 2'b00};
                apply(a, (mi == 0) ? 6'h39 : (mi == 1) ? 6'h09 : 6'h3D, 1'(w));
              end
    // random sweep
    repeat (4000) begin
      logic [31:0] a;
      logic [5:0]  m;
      a24_mode = 1'($urandom);
      sw_s3 = 8'($urandom); sw_s4 = 8'($urandom);
      a = $urandom;
      if ($urandom % 2 == 1) a[23:16] = sw_s3;
      if ($urandom % 2 == 1) a[31:24] = sw_s4;
      case ($urandom % 3)
        0: m = 6'h39;
        1: m = 6'h09;
        default: m = 6'($urandom);
      endcase
      apply(a, m, 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
