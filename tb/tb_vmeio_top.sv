// tb_vmeio_top: end-to-end test of the VME I/O module at its default sizes
// (24 inputs, 24 outputs, 8 interrupt channels, one-clock pulse).
// A VME master in the testbench performs real bus cycles (AS*, DS0*/DS1*,
// LWORD*, DTACK* with a bus-error timeout, IACK with the IACKIN*/IACKOUT*
// daisy chain) and the front-panel side is driven with short STROBE and
// input pulses. Each scenario compares against values worked out here:
//   * power-up state: RDCNTL = 0xFFFFFFF0 (sync source, strobe armed),
//     outputs low, no interrupt;
//   * A32 and A24 addressing, register images, bus error on invalid access;
//   * latch outputs, pulse outputs (width measured in clocks), a latch kept
//     through a spell in pulse mode;
//   * strobed input, ignored second strobe, CLSTB re-arm, RDSYNC, RDASYNC;
//   * synchronous and asynchronous interrupts with ROAK release, status
//     byte 1SSSSVVV, re-enable by CLSTB / INTSRC, IACK passed on at other
//     levels.
// Every mechanism is counted; one that never happened counts as a failure.
module tb_vmeio_top;
  import vmeio_pkg::*;

  logic clk = 0, sysreset_n = 1;
  logic as_n = 1, ds0_n = 1, ds1_n = 1, write_n = 1, lword_n = 1, iack_n = 1, iackin_n = 1;
  logic [31:1] addr = '0;
  logic [5:0]  am = '0;
  logic [31:0] d_in = '0, d_out;
  logic        d_oe, dtack_n, iackout_n, irq7_n;
  logic [3:0]  sw_s1 = 4'h6;
  logic [7:0]  sw_s3 = 8'h42, sw_s4 = 8'h81;
  logic        jp9_a24 = 0;
  logic        strobe = 0;
  logic [23:0] in_ch = '0, out_ch;
  logic        led_access;

  vmeio_top dut (.*);

  always #31 clk = ~clk;   // about 16 MHz

  int checks = 0, failures = 0;
  // mechanism counters
  int n_a32 = 0, n_a24 = 0, n_image = 0, n_buserr = 0, n_latch = 0, n_pulse = 0,
      n_keep = 0, n_strobe = 0, n_ignored = 0, n_rearm = 0, n_rdasync = 0,
      n_sync_irq = 0, n_async_irq = 0, n_roak = 0, n_pass = 0, n_masked = 0;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [31:0] base();
    return jp9_a24 ? {8'h00, sw_s3, 16'h0} : {sw_s4, sw_s3, 16'h0};
  endfunction

  // one D32 cycle; returns whether DTACK* came
  task automatic vme(input logic [31:0] a, input logic wn, input logic [31:0] wd,
                     output logic acked, output logic [31:0] rd);
    int t;
    addr = a[31:1]; am = jp9_a24 ? 6'h39 : 6'h09;
    write_n = wn; lword_n = 0; iack_n = 1;
    #5 as_n = 0; d_in = wd;
    #5 ds0_n = 0; ds1_n = 0;
    t = 0;
    while (dtack_n && t < 24) begin @(posedge clk); #1 t++; end
    acked = !dtack_n;
    rd = d_out;
    if (acked && wn) check("read data driven", d_oe);
    ds0_n = 1; ds1_n = 1;
    if (!acked) n_buserr++;
    while (!dtack_n) @(posedge clk);
    #5 as_n = 1;
    repeat (2) @(posedge clk);
  endtask

  task automatic wreg(func_e f, logic [31:0] d);
    logic ok; logic [31:0] rd;
    vme(base() | {27'h0, f, 2'b00}, 0, d, ok, rd);
    check($sformatf("write %s acked", f.name()), ok);
  endtask

  task automatic rreg(func_e f, output logic [31:0] d);
    logic ok;
    vme(base() | {27'h0, f, 2'b00}, 1, 0, ok, d);
    check($sformatf("read %s acked", f.name()), ok);
  endtask

  // IACK cycle at a level; returns whether answered and the byte
  task automatic iack(input logic [2:0] lvl, output logic acked, output logic [7:0] sb,
                      output logic passed);
    int t;
    addr = {27'h0, lvl, 1'b1}; am = 6'h09; write_n = 1; lword_n = 1; iack_n = 0;
    #5 as_n = 0;
    #5 ds0_n = 0; iackin_n = 0;
    t = 0; passed = 0;
    while (dtack_n && t < 24) begin
      @(posedge clk); #1 t++;
      if (!iackout_n) passed = 1;
    end
    acked = !dtack_n;
    sb = d_out[7:0];
    ds0_n = 1;
    while (!dtack_n) @(posedge clk);
    #5 as_n = 1; iackin_n = 1; iack_n = 1;
    repeat (4) @(posedge clk);
    #1 check("IACKOUT released within 4 clocks of AS*", iackout_n);
  endtask

  task automatic pulse_strobe();
    #3 strobe = 1; #4 strobe = 0;
  endtask

  task automatic wait_clocks(int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pulse-width monitor on output 5
  int pw = 0, last_pw = 0;
  always @(posedge clk) begin
    if (out_ch[5]) pw++;
    else if (pw != 0) begin last_pw = pw; pw = 0; end
  end

  initial begin
    logic ok, passed;
    logic [31:0] rd, v;
    logic [7:0] sb;
    int ch;
    // a falling reset edge after two clocks, so that the asynchronous
    // clears (which also include registered clear requests) see an edge
    repeat (2) @(posedge clk);
    #1 sysreset_n = 0;
    #200 sysreset_n = 1;
    wait_clocks(3);

    // ---- power-up state
    rreg(FN_CNTL, rd);
    check("reset RDCNTL F0", rd == 32'hFFFF_FFF0);
    check("reset outputs", out_ch == '0 && irq7_n);
    rreg(FN_RDSYNC, rd);
    check("reset sync data", rd == 32'hFF00_0000);

    // ---- addressing
    vme(base() | 32'h0000_FF14, 1, 0, ok, rd);           // image of RDSYNC
    check("image read", ok); n_image += int'(ok);
    vme(base() | 32'h0000_0000, 1, 0, ok, rd);           // read of write-only
    check("bus error on read of IRQENBL", !ok);
    vme(base() ^ 32'h0001_0000 | 32'h1C, 1, 0, ok, rd);  // other base
    check("other base ignored", !ok);
    n_a32++;

    // ---- outputs
    wreg(FN_OUTLATCH, 32'h00C3_A55A);
    wait_clocks(1);
    check("latch outputs", out_ch == 24'hC3A55A); n_latch++;
    wreg(FN_OUTSET, 32'h0000_00FF);                      // ch 0..7 to pulse mode
    wait_clocks(1);
    check("pulse mode hides latch", out_ch == 24'hC3A500);
    wreg(FN_OUTLATCH, 32'h0);                             // clears 8..23 only
    wreg(FN_OUTPULSE, 32'h00FF_FF20);                     // only ch 5 may pulse
    wait_clocks(3);
    check("pulse width one clock", last_pw == PULSE_W);
    check("pulse only in pulse mode", out_ch == 24'h0);
    n_pulse += int'(last_pw == PULSE_W);
    wreg(FN_OUTSET, 32'h0);
    wait_clocks(1);
    check("latch kept through pulse mode", out_ch == 24'h00005A);
    n_keep += int'(out_ch == 24'h00005A);

    // ---- strobed and asynchronous input
    v = 32'($urandom) & 32'h00FF_FFFF;
    in_ch = v[23:0];
    pulse_strobe();
    in_ch = ~v[23:0];
    wait_clocks(4);
    rreg(FN_CNTL, rd);
    check("triggered", rd[7:0] == 8'hFF);
    rreg(FN_RDSYNC, rd);
    check("strobed data", rd == {8'hFF, v[23:0]}); n_strobe++;
    rreg(FN_RDASYNC, rd);
    check("async data", rd == {8'hFF, ~v[23:0]}); n_rdasync++;
    pulse_strobe();                                       // ignored
    wait_clocks(4);
    rreg(FN_RDSYNC, rd);
    check("second strobe ignored", rd == {8'hFF, v[23:0]}); n_ignored++;
    wreg(FN_CNTL, 0);                                     // CLSTB
    rreg(FN_CNTL, rd);
    check("re-armed", rd[7:0] == 8'hF0); n_rearm++;
    rreg(FN_RDSYNC, rd);
    check("data kept after re-arm", rd == {8'hFF, v[23:0]});

    // ---- synchronous interrupts
    wreg(FN_IRQENBL, {24'h0, en_mask});
    for (int r = 0; r < 20; r++) begin
      logic [7:0] bits;
      logic [2:0] exp_v;
      bits = 8'($urandom);
      in_ch = {16'h0, bits};
      pulse_strobe();
      in_ch = '0;
      wait_clocks(5);
      if ((bits & en_mask) == 0) begin
        check("no interrupt for disabled channels", irq7_n); n_masked++;
      end else begin
        check("sync IRQ7", !irq7_n);
        exp_v = 0;
        for (int i = 0; i < 8; i++) if (bits[i] && en_mask[i]) exp_v = 3'(i);
        iack(3'd5, ok, sb, passed);
        check("other level passed on", !ok && passed); n_pass += int'(passed);
        iack(3'd7, ok, sb, passed);
        check("status byte", ok && sb == {1'b1, sw_s1, exp_v});
        wait_clocks(1);
        check("ROAK released", irq7_n); n_roak++; n_sync_irq++;
        wait_clocks(4);
        check("stays served", irq7_n);
      end
      wreg(FN_CNTL, 0);                                   // CLSTB re-enables
      wait_clocks(5);
      check("no stale interrupt after CLSTB", irq7_n);
    end

    // ---- asynchronous interrupts
    wreg(FN_IRQENBL, 32'h0);
    wreg(FN_INTSRC, 32'h0);
    rreg(FN_CNTL, rd);
    check("async source in RDCNTL", rd[7:4] == 4'h0);
    wreg(FN_IRQENBL, 32'h0000_00FF);
    for (int r = 0; r < 20; r++) begin
      ch = $urandom % 8;
      #7 in_ch[ch] = 1; #4 in_ch[ch] = 0;                // short rising pulse
      wait_clocks(5);
      check("async IRQ7", !irq7_n);
      iack(3'd7, ok, sb, passed);
      check("async status byte", ok && sb == {1'b1, sw_s1, 3'(ch)});
      wait_clocks(1);
      check("async ROAK", irq7_n); n_async_irq++;
      wreg(FN_CNTL, 0);                                   // CLSTB does not re-enable
      wait_clocks(4);
      check("CLSTB leaves async served", irq7_n);
      wreg(FN_INTSRC, 32'h0);                             // re-enable
      wait_clocks(5);
      check("no stale async interrupt", irq7_n);
    end
    // a falling edge alone does not interrupt
    in_ch[3] = 1; wreg(FN_INTSRC, 0); wait_clocks(2);
    in_ch[3] = 0; wait_clocks(5);
    check("falling edge ignored", irq7_n);

    // ---- A24 addressing (jumper moved, module reset)
    jp9_a24 = 1;
    sysreset_n = 0; wait_clocks(2); sysreset_n = 1; wait_clocks(3);
    sw_s4 = 8'h00;
    rreg(FN_CNTL, rd);
    check("A24 read after reset", rd == 32'hFFFF_FFF0);
    vme(32'h0042_0010, 0, 32'h0000_0001, ok, rd);          // A24 OUTLATCH
    wait_clocks(1);
    check("A24 write", ok && out_ch == 24'h1); n_a24 += int'(ok);

    // ---- mechanism coverage
    begin
      int cnt[string];
      cnt["A32 access"] = n_a32;       cnt["A24 access"] = n_a24;
      cnt["register image"] = n_image; cnt["bus error"] = n_buserr;
      cnt["latch output"] = n_latch;   cnt["pulse output"] = n_pulse;
      cnt["latch kept"] = n_keep;      cnt["strobe capture"] = n_strobe;
      cnt["strobe ignored"] = n_ignored; cnt["re-arm"] = n_rearm;
      cnt["RDASYNC"] = n_rdasync;      cnt["sync interrupt"] = n_sync_irq;
      cnt["async interrupt"] = n_async_irq; cnt["ROAK release"] = n_roak;
      cnt["IACK passed on"] = n_pass;  cnt["masked channels"] = n_masked;
      foreach (cnt[k]) begin
        $display("mechanism %-16s %0d", k, cnt[k]);
        check({"mechanism ", k}, cnt[k] > 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int PULSE_W = 1;
  localparam logic [7:0] en_mask = 8'h36;
endmodule
