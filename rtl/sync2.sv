// sync2: two-flip-flop synchronizer bringing asynchronous levels into the
// clk domain. Each bit is synchronized on its own, so a multi-bit value is
// only meaningful once it has been stable for two clocks. Output lags the
// input by two rising clk edges. RESET_VAL is the level after reset
// (1 for the active-low VME strobes, so a reset does not look like a cycle).
module sync2 #(
  parameter int unsigned WIDTH     = 1,
  parameter logic        RESET_VAL = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= {WIDTH{RESET_VAL}};
      q    <= {WIDTH{RESET_VAL}};
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
