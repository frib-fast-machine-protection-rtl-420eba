// fps_top: fast protection system (FPS) of the machine protection system,
// one master and one daisy chain of N_SLAVES slave nodes.
//
//   master --q--> slave 1 --q--> slave 2 --> ... --> slave N
//   master <--d-- slave 1 <--d-- slave 2 <-- ... <-- slave N
//
// Each slave collects IO_BITS (96) OK/NOK device inputs. The master polls
// the chain every QUERY_PERIOD clocks; every slave answers with its own data
// package first and then forwards those of the slaves behind it, so the
// master receives all N packages per query period, slave 1's first. The
// master evaluates them against the masks and its operation state and drives
// the three mitigation outputs (A: E-bend HV off, B: LEBT chopper,
// C: ion-source extraction HV off).
//
// Slave k (k = 1 .. N_SLAVES) is strapped to address k. All nodes share the
// `timestamp` input, which stands for the time that each node's event
// receiver derives from the global timing system. The fibre links between
// nodes are direct byte-wide connections here (no cable or transceiver
// delay). `q_end` is the query stream leaving the last slave. Nothing
// arrives behind the last slave, so its FIFO is never written and its
// `slave_fifo_overflow` bit is constant 0 (synthesis removes that FIFO).
// The whole system runs in one clock domain.
//
// Defaults follow the prototype: 8 slaves, 96 inputs each, 4.096 us query
// period at 125 MHz. The FIFO depth is this design's choice.
module fps_top
  import fps_pkg::*;
#(
  parameter int N_SLAVES     = 8,
  parameter int QUERY_PERIOD = 512,
  parameter int FIFO_DEPTH   = 256
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic [TS_BITS-1:0]                timestamp,
  input  logic [N_SLAVES-1:0][IO_BITS-1:0]  io_ok,
  input  logic                              cmd_valid,
  input  mps_state_t                        cmd_state,
  input  logic [N_SLAVES-1:0][IO_BITS-1:0]  mask,
  output logic                              mit_a,
  output logic                              mit_b,
  output logic                              mit_c,
  output mps_state_t                        state,
  output logic                              query_strobe,
  output logic [N_SLAVES-1:0]               slave_err,
  output logic                              err_latched,
  output logic                              fault_valid,
  output logic [7:0]                        fault_addr,
  output logic [IO_BITS-1:0]                fault_io,
  output logic [TS_BITS-1:0]                fault_slave_ts,
  output logic [TS_BITS-1:0]                fault_master_ts,
  output logic [15:0]                       pkt_cnt,
  output logic [15:0]                       cks_err_cnt,
  output logic [15:0]                       frame_err_cnt,
  output mps_state_t [N_SLAVES-1:0]         slave_mps_state,
  output logic [N_SLAVES-1:0]               slave_fifo_overflow,
  output link_t                             q_end
);

  // q[i] enters slave i (index 0 = slave 1), q[N_SLAVES] leaves the last.
  // d[i] leaves slave i towards the master, d[N_SLAVES] is the open end.
  link_t q [N_SLAVES+1];
  link_t d [N_SLAVES+1];

  assign d[N_SLAVES] = LINK_IDLE;
  assign q_end       = q[N_SLAVES];

  fps_master #(.N_SLAVES(N_SLAVES), .QUERY_PERIOD(QUERY_PERIOD)) u_master (
    .clk, .rst_n, .timestamp,
    .cmd_valid, .cmd_state, .mask,
    .q_out(q[0]), .d_in(d[0]),
    .query_strobe, .state, .mit_a, .mit_b, .mit_c,
    .slave_err, .err_latched,
    .fault_valid, .fault_addr, .fault_io, .fault_slave_ts, .fault_master_ts,
    .pkt_cnt, .cks_err_cnt, .frame_err_cnt
  );

  for (genvar i = 0; i < N_SLAVES; i++) begin : g_slave
    slave_node #(.FIFO_DEPTH(FIFO_DEPTH)) u_slave (
      .clk, .rst_n,
      .slave_addr(8'(i + 1)),
      .timestamp,
      .io_ok(io_ok[i]),
      .q_in(q[i]), .q_out(q[i+1]),
      .d_in(d[i+1]), .d_out(d[i]),
      .mps_state(slave_mps_state[i]),
      .fifo_overflow(slave_fifo_overflow[i])
    );
  end

endmodule
