// fps_master: FPS master node for one daisy chain.
//
// The master polls its chain of slaves: master_query_gen sends a query
// carrying the MPS state every QUERY_PERIOD clocks (4.096 us at the 125 MHz
// system clock), each slave answers with its data package, and
// master_frame_rx decodes the packages that come back on `d_in`.
// master_protection turns them into the operation state and the mitigation
// outputs, and latches the first fault with the slave's and the master's
// time stamps. Counters of good packages, checksum errors and framing errors
// (16 bits, wrapping; a package with an out-of-range address counts as both good and framing error) are kept for the operator.
//
// Latency from the EOF byte of a package on `d_in` to the mitigation
// outputs: 2 clocks (1 in the receiver, 1 in the state machine).
// The polling scheme follows the system description; the byte-level link
// and the status counters are this design's.
module fps_master
  import fps_pkg::*;
#(
  parameter int N_SLAVES     = 8,
  parameter int QUERY_PERIOD = 512
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic [TS_BITS-1:0]                timestamp,
  input  logic                              cmd_valid,
  input  mps_state_t                        cmd_state,
  input  logic [N_SLAVES-1:0][IO_BITS-1:0]  mask,
  output link_t                             q_out,
  input  link_t                             d_in,
  output logic                              query_strobe,
  output mps_state_t                        state,
  output logic                              mit_a,
  output logic                              mit_b,
  output logic                              mit_c,
  output logic [N_SLAVES-1:0]               slave_err,
  output logic                              err_latched,
  output logic                              fault_valid,
  output logic [7:0]                        fault_addr,
  output logic [IO_BITS-1:0]                fault_io,
  output logic [TS_BITS-1:0]                fault_slave_ts,
  output logic [TS_BITS-1:0]                fault_master_ts,
  output logic [15:0]                       pkt_cnt,
  output logic [15:0]                       cks_err_cnt,
  output logic [15:0]                       frame_err_cnt
);

  logic       pkt_valid, cks_err, frame_err, bad_addr;
  slave_pkt_t pkt;

  master_query_gen #(.QUERY_PERIOD(QUERY_PERIOD)) u_query (
    .clk, .rst_n,
    .evt_code({6'd0, state}),
    .q_out, .query_strobe
  );

  master_frame_rx u_rx (
    .clk, .rst_n, .rx(d_in),
    .pkt_valid, .pkt, .cks_err, .frame_err
  );

  master_protection #(.N_SLAVES(N_SLAVES)) u_prot (
    .clk, .rst_n,
    .pkt_valid, .pkt,
    .cmd_valid, .cmd_state, .mask,
    .master_ts(timestamp),
    .state, .mit_a, .mit_b, .mit_c,
    .slave_err, .err_latched,
    .fault_valid, .fault_addr, .fault_io, .fault_slave_ts, .fault_master_ts,
    .bad_addr
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pkt_cnt       <= '0;
      cks_err_cnt   <= '0;
      frame_err_cnt <= '0;
    end else begin
      if (pkt_valid)               pkt_cnt <= pkt_cnt + 1'b1;
      if (cks_err)               cks_err_cnt <= cks_err_cnt + 1'b1;
      if (frame_err || bad_addr) frame_err_cnt <= frame_err_cnt + 1'b1;
    end
  end

endmodule
