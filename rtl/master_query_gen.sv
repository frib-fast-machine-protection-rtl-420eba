// master_query_gen: polling timer of the FPS master.
//
// Every QUERY_PERIOD clocks the master sends one query frame down the
// daisy chain: SYNC(K), QRY(K), event code, EOF(K), one byte per clock.
// The event code carries the present MPS operation state, which is how the
// master informs the slaves of it. `query_strobe` is high in the cycle the
// first byte (SYNC) is on `q_out`; the first query goes out 1 clock after
// reset is released.
//
// The default period, 512 clocks of 8 ns = 4.096 us, is the system's query
// period (1024 query periods = 4.096 ms). The frame layout is this design's.
module master_query_gen
  import fps_pkg::*;
#(
  parameter int QUERY_PERIOD = 512
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] evt_code,
  output link_t      q_out,
  output logic       query_strobe
);

  localparam int CW = $clog2(QUERY_PERIOD);

  logic [CW-1:0] cnt_q;
  logic [7:0]    evt_q;
  link_t         q_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
      evt_q <= '0;
      q_q   <= LINK_IDLE;
    end else begin
      cnt_q <= (cnt_q == CW'(QUERY_PERIOD - 1)) ? '0 : cnt_q + 1'b1;
      unique case (cnt_q)
        CW'(0): begin q_q <= k_byte(K_SYNC); evt_q <= evt_code; end
        CW'(1): q_q <= k_byte(K_QRY);
        CW'(2): q_q <= d_byte(evt_q);
        CW'(3): q_q <= k_byte(K_EOF);
        default: q_q <= LINK_IDLE;
      endcase
    end
  end

  assign q_out        = q_q;
  assign query_strobe = q_q.valid && q_q.k && (q_q.data == K_SYNC);

  initial assert (QUERY_PERIOD >= 2 * QRY_LEN)
    else $error("QUERY_PERIOD too short for a query frame");

endmodule
