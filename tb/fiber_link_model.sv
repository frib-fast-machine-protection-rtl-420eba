// fiber_link_model: behavioural model of one fibre span between two FPS
// nodes, for testbenches only (not synthesizable intent: a pure delay line).
// It delays a byte stream by DELAY clocks in each direction. Light in fibre
// travels about 4.9 ns/m, so at the 8 ns clock a 210 m span is about 129
// clocks and a 20 m span about 12 clocks. Serial transceiver latency is not
// modelled.
module fiber_link_model
  import fps_pkg::*;
#(
  parameter int DELAY = 12
) (
  input  logic  clk,
  input  link_t a_in,    // from the node nearer the master
  output link_t b_out,   // to the node further away
  input  link_t b_in,
  output link_t a_out
);
  link_t fwd [DELAY];
  link_t bwd [DELAY];

  initial begin
    for (int i = 0; i < DELAY; i++) begin
      fwd[i] = LINK_IDLE;
      bwd[i] = LINK_IDLE;
    end
  end

  always_ff @(posedge clk) begin
    fwd[0] <= a_in;
    bwd[0] <= b_in;
    for (int i = 1; i < DELAY; i++) begin
      fwd[i] <= fwd[i-1];
      bwd[i] <= bwd[i-1];
    end
  end

  assign b_out = fwd[DELAY-1];
  assign a_out = bwd[DELAY-1];
endmodule
