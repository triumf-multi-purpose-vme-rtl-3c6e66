// async_input: asynchronous input path of the VME I/O module.
//
// Two jobs, both independent of the STROBE:
//  * RDASYNC sampling. The input channels pass through a two-flop
//    synchronizer; a one-clock 'sample' request (issued by the bus controller
//    when an RDASYNC read is decoded) copies them into 'async_data', which the
//    read path returns. Strobed data is not touched.
//  * Asynchronous interrupt sources. Each of the first N_IRQ channels has an
//    edge-capture flip-flop clocked by the channel itself, so a low-to-high
//    transition of a pulse of only a few nanoseconds is remembered. The flags
//    are cleared by an INTSRC write ('intsrc', registered here first so the
//    asynchronous clear is glitch-free) and by reset. 'edges' is the
//    clk-domain copy after a two-flop synchronizer, held low for three clocks
//    after an INTSRC request so that stale synchronizer contents are not
//    mistaken for new edges.
//
// Reset clears the sampled register and the edge flags ("synchronous and
// asynchronous input registers are cleared"). Capturing edges with
// channel-clocked flops and clearing them on INTSRC is this design's reading
// of "initiated by a low-to-high transition" and "INTSRC ... re-enables
// asynchronous interrupts".
module async_input #(
  parameter int unsigned N_IN  = 24,
  parameter int unsigned N_IRQ = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_IN-1:0]  in_ch,
  input  logic             sample,      // clk domain, one clock: RDASYNC
  input  logic             intsrc,      // clk domain, one clock: clear edges
  output logic [N_IN-1:0]  async_data,  // inputs as sampled by the last RDASYNC
  output logic [N_IRQ-1:0] edges        // clk domain: rising edge seen per channel
);

  logic [N_IN-1:0]  in_s;
  logic [N_IRQ-1:0] edge_ad;   // edge flags, each in its channel's domain
  logic [N_IRQ-1:0] edge_s;
  logic             clr_q;
  logic             clr_edge;
  logic [2:0]       mask_sr;

  sync2 #(.WIDTH(N_IN), .RESET_VAL(1'b0)) u_sync_in (
    .clk(clk), .rst_n(rst_n), .d(in_ch), .q(in_s)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      async_data <= '0;
      clr_q      <= 1'b0;
      mask_sr    <= '0;
    end else begin
      if (sample) async_data <= in_s;
      clr_q   <= intsrc;
      mask_sr <= {mask_sr[1:0], intsrc};
    end
  end

  assign clr_edge = clr_q || !rst_n;

  for (genvar i = 0; i < N_IRQ; i++) begin : g_edge
    logic flag;
    always_ff @(posedge in_ch[i] or posedge clr_edge) begin
      if (clr_edge) flag <= 1'b0;
      else          flag <= 1'b1;
    end
    assign edge_ad[i] = flag;
  end

  sync2 #(.WIDTH(N_IRQ), .RESET_VAL(1'b0)) u_sync_edge (
    .clk(clk), .rst_n(rst_n), .d(edge_ad), .q(edge_s)
  );

  assign edges = (intsrc || (|mask_sr)) ? '0 : edge_s;

endmodule
