// tb_vme_interrupter: self-checking test of the ROAK interrupter.
// Drives the register writes and the two source types directly. Checks:
// reset state (synchronous source, all disabled, no request); the request
// needs an enabled active channel of the selected type; the status byte is
// 1 SSSS VVV with VVV the highest active enabled channel (random patterns
// against a reference priority encoder); the request drops the clock after
// the acknowledge and stays off until CLSTB (synchronous source) or INTSRC
// re-enables it; CLSTB does not re-enable the asynchronous source.
module tb_vme_interrupter;
  import vmeio_pkg::*;

  logic clk = 0, rst_n = 1;
  reg_wr_t wr = '0;
  logic [7:0] sync_bits = '0, edges = '0, irq_en, status_byte;
  logic triggered = 0, iack_ack = 0, irq, src_sync;
  logic [3:0] sw_s1 = 4'hA;
  int checks = 0, failures = 0;

  vme_interrupter #(.N_IRQ(8)) dut (.*);

  always #31 clk = ~clk;

  task automatic write(func_e f, logic [31:0] d);
    @(posedge clk); #1 wr = '{en: 1'b1, fn: f, data: d};
    @(posedge clk); #1 wr = '0;
  endtask

  task automatic ack();
    @(posedge clk); #1 iack_ack = 1;
    @(posedge clk); #1 iack_ack = 0;
  endtask

  task automatic expect_bit(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  function automatic logic [7:0] ref_status(logic [7:0] act);
    logic [2:0] v = 0;
    for (int i = 0; i < 8; i++) if (act[i]) v = 3'(i);
    return {1'b1, sw_s1, v};
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] en, bits;
    // a falling reset edge after two clocks, so that the asynchronous
    // clears (which also include registered clear requests) see an edge
    repeat (2) @(posedge clk);
    #1 rst_n = 0;
    #100 rst_n = 1;
    @(posedge clk); #1;
    expect_bit("reset src sync", src_sync, 1);
    checks++; if (irq_en !== 8'h00) failures++;
    // strobe with data but interrupts disabled: nothing
    sync_bits = 8'hFF; triggered = 1;
    repeat (3) @(posedge clk); #1;
    expect_bit("disabled", irq, 0);

    // synchronous source, random patterns
    repeat (300) begin
      en = 8'($urandom); bits = 8'($urandom);
      triggered = 0; sync_bits = bits;
      write(FN_IRQENBL, {24'hFFFFFF, en});
      write(FN_CNTL, 0);                       // CLSTB re-enables
      repeat (2) @(posedge clk); #1;
      expect_bit("armed, no strobe", irq, 0);
      triggered = 1;
      repeat (2) @(posedge clk); #1;
      expect_bit("sync request", irq, |(en & bits));
      if (|(en & bits)) begin
        checks++;
        if (status_byte !== ref_status(en & bits)) begin
          failures++;
          $display("FAIL status %h expected %h", status_byte, ref_status(en & bits));
        end
        ack();
        expect_bit("ROAK", irq, 0);
        repeat (3) @(posedge clk); #1;
        expect_bit("served", irq, 0);
      end
    end

    // asynchronous source
    write(FN_INTSRC, 0);
    @(posedge clk); #1;
    expect_bit("src async", src_sync, 0);
    triggered = 1; sync_bits = 8'hFF;
    repeat (300) begin
      en = 8'($urandom); bits = 8'($urandom);
      edges = '0;
      write(FN_IRQENBL, {24'h0, en});
      write(FN_INTSRC, 0);                    // re-enable async
      repeat (2) @(posedge clk); #1;
      expect_bit("no edges", irq, 0);
      edges = bits;
      repeat (2) @(posedge clk); #1;
      expect_bit("async request", irq, |(en & bits));
      if (|(en & bits)) begin
        checks++;
        if (status_byte !== ref_status(en & bits)) failures++;
        ack();
        expect_bit("ROAK async", irq, 0);
        write(FN_CNTL, 0);                     // CLSTB must not re-enable async
        repeat (2) @(posedge clk); #1;
        expect_bit("clstb no re-enable", irq, 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
