// tb_async_input: self-checking test of the asynchronous input path.
// Checks: reset state; an RDASYNC sample holds the inputs of the moment it
// was taken while the inputs keep changing; a 3 ns low-to-high pulse on one
// of the first 8 channels is reported in 'edges' within three clocks and
// stays until INTSRC; INTSRC clears it and no stale copy leaks out; a
// falling edge alone sets nothing; channels above the first 8 set nothing.
module tb_async_input;
  localparam int N  = 24;
  localparam int NI = 8;

  logic clk = 0, rst_n = 1, sample = 0, intsrc = 0;
  logic [N-1:0]  in_ch = '0, async_data;
  logic [NI-1:0] edges;
  int checks = 0, failures = 0;

  async_input #(.N_IN(N), .N_IRQ(NI)) dut (.*);

  always #31 clk = ~clk;

  task automatic expect_eq(string what, logic [N-1:0] got, logic [N-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic pulse_req(ref logic sig);
    @(posedge clk); #1 sig = 1;
    @(posedge clk); #1 sig = 0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] v;
    int ch, lat;
    // a falling reset edge after two clocks, so that the asynchronous
    // clears (which also include registered clear requests) see an edge
    repeat (2) @(posedge clk);
    #1 rst_n = 0;
    #100 rst_n = 1;
    repeat (3) @(posedge clk);
    expect_eq("reset data", async_data, '0);
    expect_eq("reset edges", N'(edges), '0);

    repeat (300) begin
      // sampling
      v = N'($urandom);
      in_ch = v;
      repeat (3) @(posedge clk);
      pulse_req(sample);
      in_ch = ~v;
      repeat (3) @(posedge clk);
      expect_eq("sample held", async_data, v);
      in_ch = '0;
      pulse_req(intsrc);
      repeat (4) @(posedge clk);
      #1 expect_eq("edges clear", N'(edges), '0);

      // short rising pulse on a random channel
      ch = $urandom % N;
      repeat ($urandom % 50) #1;
      in_ch[ch] = 1; #3 in_ch[ch] = 0;
      lat = 0;
      while (edges == '0 && lat < 8) begin @(posedge clk); #1 lat++; end
      if (ch < NI) begin
        checks++;
        if (lat > 3) begin failures++; $display("FAIL edge latency %0d", lat); end
        expect_eq("edge seen", N'(edges), N'(1) << ch);
        repeat (5) @(posedge clk);
        #1 expect_eq("edge held", N'(edges), N'(1) << ch);
        pulse_req(intsrc);
        expect_eq("masked on clear", N'(edges), '0);
        repeat (4) begin
          @(posedge clk); #1 expect_eq("cleared", N'(edges), '0);
        end
      end else begin
        expect_eq("no edge above 8", N'(edges), '0);
      end

      // a falling edge alone sets nothing
      in_ch = '1;
      pulse_req(intsrc);
      repeat (4) @(posedge clk);
      in_ch = '0;
      repeat (4) @(posedge clk);
      #1 expect_eq("fall only", N'(edges), '0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
