// tb_vme_slave_ctrl: self-checking test of the VME bus controller.
// A small VME master in the testbench runs full AS*/DS*/DTACK* cycles with
// a bus-error timeout. The decoder verdict is modelled here: the module sits
// at 0xBEEF0000 and the direction rules of the register map apply. Checks:
// writes give exactly one register-write pulse with the right code and data
// and are acknowledged; reads return the read word with DTACK*, and only
// RDASYNC reads pulse 'rd_sample'; invalid functions, other addresses and
// non-D32 cycles are never acknowledged and write nothing; DTACK* is released
// after the data strobes rise and within the stated latency; IACK cycles at
// level 7 with a pending request return 0xFFFFFF and the status byte and
// pulse 'iack_ack' once, while other levels, or no request, pass IACKOUT*.
module tb_vme_slave_ctrl;
  import vmeio_pkg::*;

  logic clk = 0, rst_n = 1;
  logic as_n = 1, ds0_n = 1, ds1_n = 1, write_n = 1, lword_n = 1, iack_n = 1, iackin_n = 1;
  logic [31:0] addr = 0, d_in = 0, d_out, rdata;
  logic [3:1]  addr_lo;
  logic        d_oe, dtack_n, iackout_n, valid, irq = 0, rd_sample, iack_ack, access;
  logic [7:0]  status_byte = 8'hD5;
  func_e       fn;
  reg_wr_t     wr;
  int checks = 0, failures = 0;
  int n_wr = 0, n_sample = 0, n_iack = 0;
  reg_wr_t last_wr;

  assign addr_lo = addr[3:1];
  assign fn      = func_e'(addr[4:2]);
  assign valid   = (addr[31:16] == 16'hBEEF) &&
                   ((fn == FN_CNTL) ||
                    ((fn == FN_RDSYNC || fn == FN_RDASYNC) ? write_n : !write_n));
  assign rdata   = {8'hC0, 13'h0, 8'(fn), 3'b101};

  vme_slave_ctrl dut (.*);

  always #31 clk = ~clk;

  always @(posedge clk) begin
    if (wr.en) begin n_wr++; last_wr = wr; end
    if (rd_sample) n_sample++;
    if (iack_ack) n_iack++;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // One VME cycle. Returns 1 if DTACK* came, with the read data and the
  // number of clocks from the data strobes to DTACK*.
  task automatic cycle(input logic [31:0] a, input logic wn, input logic [31:0] wd,
                       input logic d32, input logic is_iack,
                       output logic acked, output logic [31:0] rd, output int lat);
    addr = a; write_n = wn; lword_n = !d32; iack_n = !is_iack;
    #5 as_n = 0;
    d_in = wd;
    #5 ds0_n = 0; ds1_n = is_iack ? 1'b1 : !d32;
    if (is_iack) iackin_n = 0;
    lat = 0; acked = 0;
    while (lat < 20 && dtack_n) begin @(posedge clk); #1 lat++; end
    acked = !dtack_n;
    rd = d_out;
    if (acked && wn) check("data driven with DTACK", d_oe);
    ds0_n = 1; ds1_n = 1;
    if (acked) begin
      repeat (4) @(posedge clk);
      #1 check("DTACK released", dtack_n && !d_oe);
    end
    as_n = 1; iackin_n = 1; iack_n = 1;
    repeat (4) @(posedge clk);
    #1 check("idle after cycle", dtack_n && iackout_n);
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic acked;
    logic [31:0] rd, a, wd;
    int lat, wr0, s0, k;
    func_e f;
    logic wn;
    // a falling reset edge after two clocks, so that the asynchronous
    // clears (which also include registered clear requests) see an edge
    repeat (2) @(posedge clk);
    #1 rst_n = 0;
    #100 rst_n = 1;
    repeat (2) @(posedge clk);

    repeat (400) begin
      f  = func_e'($urandom % 8);
      wn = 1'($urandom);
      a  = {($urandom % 4 == 0) ? 16'h1234 : 16'hBEEF, 11'($urandom), 3'(f), 2'b00};
      wd = $urandom;
      k  = $urandom % 6;      // 0: not a D32 cycle
      wr0 = n_wr; s0 = n_sample;
      cycle(a, wn, wd, k != 0, 0, acked, rd, lat);
      if (a[31:16] == 16'hBEEF && k != 0 &&
          (f == FN_CNTL || ((f == FN_RDSYNC || f == FN_RDASYNC) ? wn : !wn))) begin
        check("valid acked", acked);
        check("DTACK latency", lat <= 6);
        if (!wn) begin
          check("one write", n_wr == wr0 + 1);
          check("write content", last_wr.fn == f && last_wr.data == wd);
          check("no sample on write", n_sample == s0);
        end else begin
          check("read data", rd == {8'hC0, 13'h0, 8'(f), 3'b101});
          check("no write on read", n_wr == wr0);
          check("sample only for RDASYNC", n_sample == s0 + ((f == FN_RDASYNC) ? 1 : 0));
        end
      end else begin
        check("invalid not acked", !acked);
        check("invalid writes nothing", n_wr == wr0 && n_sample == s0);
      end
    end

    // interrupt acknowledge
    for (int lvl = 1; lvl < 8; lvl++) begin
      for (int r = 0; r < 2; r++) begin
        int i0;
        logic passed;
        irq = 1'(r);
        i0 = n_iack;
        passed = 0;
        fork
          begin
            cycle({28'h0, 3'(lvl), 1'b1}, 1, 0, 0, 1, acked, rd, lat);
          end
          begin
            repeat (12) begin @(posedge clk); #1 if (!iackout_n) passed = 1; end
          end
        join
        if (irq && lvl == 7) begin
          check("IACK answered", acked && rd == {24'hFFFFFF, status_byte});
          check("one iack_ack", n_iack == i0 + 1);
          check("not passed on", !passed);
        end else begin
          check("IACK passed on", !acked && passed);
          check("no iack_ack", n_iack == i0);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
