// tb_strobe_input: self-checking test of the strobed input register.
// Short (4 ns) STROBE pulses, asynchronous to the 62 ns clock, with the
// inputs changing right after the edge (zero setup time). Checks: reset state
// (armed, data clear); the first strobe captures and reports 'triggered'
// within three clocks; later strobes are ignored until CLSTB; CLSTB re-arms
// without clearing the data and 'triggered' then reads 0; random rounds.
module tb_strobe_input;
  localparam int N = 24;

  logic clk = 0, rst_n = 1, strobe = 0, clstb = 0;
  logic [N-1:0] in_ch = '0, sync_data;
  logic triggered;
  int checks = 0, failures = 0;

  strobe_input #(.N_IN(N)) dut (.*);

  always #31 clk = ~clk;   // about 16 MHz (62 ns)

  task automatic pulse_strobe(logic [N-1:0] value);
    in_ch = value;
    #1 strobe = 1;
    #1 in_ch = ~value;        // inputs move 1 ns after the edge
    #3 strobe = 0;
  endtask

  task automatic expect_eq(string what, logic [N-1:0] got, logic [N-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic do_clstb();
    @(posedge clk); #1 clstb = 1;
    @(posedge clk); #1 clstb = 0;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] v;
    int lat;
    // a falling reset edge after two clocks, so that the asynchronous
    // clears (which also include registered clear requests) see an edge
    repeat (2) @(posedge clk);
    #1 rst_n = 0;
    #100 rst_n = 1;
    repeat (3) @(posedge clk);
    expect_eq("reset data", sync_data, '0);
    expect_eq("reset armed", N'(triggered), '0);

    repeat (200) begin
      v = N'($urandom);
      repeat ($urandom % 60) #1;
      pulse_strobe(v);
      // triggered within 3 clocks of the strobe
      lat = 0;
      while (!triggered && lat < 10) begin @(posedge clk); #1 lat++; end
      checks++;
      if (lat > 3) begin failures++; $display("FAIL trigger latency %0d", lat); end
      expect_eq("captured", sync_data, v);
      // further strobes are ignored
      pulse_strobe(~v ^ 24'h123456);
      repeat (2) @(posedge clk);
      expect_eq("ignored", sync_data, v);
      expect_eq("still triggered", N'(triggered), N'(1));
      // re-arm: flag clears, data kept
      do_clstb();
      expect_eq("rearm clears flag", N'(triggered), '0);
      repeat (4) begin
        @(posedge clk); #1;
        expect_eq("armed", N'(triggered), '0);
      end
      expect_eq("data kept", sync_data, v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
