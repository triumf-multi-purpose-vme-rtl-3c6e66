// tb_output_unit: self-checking test of the 24 output channels.
// Checks the reset state (latch mode, latches clear), OUTLATCH acting only on
// latch-mode channels, OUTPULSE acting only on pulse-mode channels with a
// pulse of exactly PULSE_CYCLES clocks, a latch surviving a spell in pulse
// mode, and random write sequences against a reference model. Run with
// PULSE_CYCLES = 3 so the pulse length count is non-trivial.
module tb_output_unit;
  import vmeio_pkg::*;

  localparam int N  = 24;
  localparam int PC = 3;

  logic clk = 0, rst_n = 1;
  reg_wr_t wr;
  logic [N-1:0] out_ch, mode, latch;
  int checks = 0, failures = 0;

  output_unit #(.N_OUT(N), .PULSE_CYCLES(PC)) dut (.*);

  always #5 clk = ~clk;

  // reference model
  logic [N-1:0] m_mode, m_latch, m_pulse;
  int m_cnt;

  task automatic check(string what);
    logic [N-1:0] exp;
    exp = (m_mode & m_pulse) | (~m_mode & m_latch);
    checks++;
    if (out_ch !== exp) begin
      failures++;
      $display("FAIL %s at %0t: out=%h exp=%h", what, $time, out_ch, exp);
    end
  endtask

  // one register write; the reference is updated at the same clock edge
  task automatic write(func_e f, logic [31:0] d);
    wr = '{en: 1'b1, fn: f, data: d};
    @(posedge clk);
    if (f != FN_OUTPULSE && m_cnt > 0) begin
      m_cnt--;
      if (m_cnt == 0) m_pulse = '0;
    end
    case (f)
      FN_OUTSET:   m_mode  = d[N-1:0];
      FN_OUTLATCH: m_latch = (m_latch & m_mode) | (d[N-1:0] & ~m_mode);
      FN_OUTPULSE: begin m_pulse = d[N-1:0] & m_mode; m_cnt = PC; end
      default: ;
    endcase
    #1 wr = '0;
  endtask

  task automatic idle(int n);
    repeat (n) begin
      @(posedge clk);
      if (m_cnt > 0) begin
        m_cnt--;
        if (m_cnt == 0) m_pulse = '0;
      end
      #1 check("idle");
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int width;
    wr = '0;
    m_mode = '0; m_latch = '0; m_pulse = '0; m_cnt = 0;
    // a falling reset edge after two clocks, so that the asynchronous
    // clears (which also include registered clear requests) see an edge
    repeat (2) @(posedge clk);
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    check("reset");
    checks++; if (mode !== '0 || latch !== '0) failures++;

    // latch mode outputs
    write(FN_OUTLATCH, 32'hFFA5_5A5A); #1 check("latch");
    checks++; if (out_ch !== 24'hA55A5A) failures++;
    // channels 0..7 to pulse mode: their latch value is kept but hidden
    write(FN_OUTSET, 32'h0000_00FF); #1 check("outset");
    checks++; if (out_ch !== 24'hA55A00) failures++;
    // OUTLATCH must not touch pulse-mode channels
    write(FN_OUTLATCH, 32'h0); #1 check("latch2");
    checks++; if (latch[7:0] !== 8'h5A) failures++;
    // pulse: only pulse-mode channels, exactly PC clocks long
    write(FN_OUTPULSE, 32'h00FF_FF0F);
    width = 0;
    for (int i = 0; i < PC + 3; i++) begin
      #1;
      if (out_ch[3:0] == 4'hF) width++;
      checks++; if (out_ch[23:8] !== 16'h0) failures++; // latch cleared, no pulse
      @(posedge clk);
    end
    checks++;
    if (width != PC) begin
      failures++;
      $display("FAIL pulse width %0d clocks, expected %0d", width, PC);
    end
    m_pulse = '0; m_cnt = 0;
    // back to latch mode: the old latch value reappears
    write(FN_OUTSET, 32'h0); #1 check("restore");
    checks++; if (out_ch[7:0] !== 8'h5A) failures++;

    // random sequences
    repeat (2000) begin
      case ($urandom % 4)
        0: write(FN_OUTSET,   $urandom);
        1: write(FN_OUTLATCH, $urandom);
        2: write(FN_OUTPULSE, $urandom);
        default: write(FN_RDSYNC, $urandom);  // not an output register
      endcase
      #1 check("random-write");
      idle($urandom % 5);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
