// slave_node: one FPS slave in the daisy chain.
//
// The chain runs master -> slave 1 -> slave 2 -> ... Each slave has two link
// directions: `q_in`/`q_out` carry queries away from the master, and
// `d_in`/`d_out` carry data packages towards it.
//
//  * Query path: every byte on `q_in` is repeated on `q_out` one clock later.
//    When a query (QRY control byte followed by the event code byte) passes,
//    the slave records the event code, which tells it the MPS state, and
//    requests its own answer.
//  * Answer: the slave answers with its own data package first (snapshot of
//    the latched I/O status and error time stamp, see slave_io_latch), then
//    forwards, from its FIFO, the packages that arrive from the slaves
//    further down the chain.
//  * The output arbiter works on whole frames: a forwarded package is never
//    cut by the own package, and the own package is sent as soon as the
//    frame being forwarded (if any) has ended.
//
// Timing: the own package's sync byte appears on `d_out` 2 clocks after the
// event code byte is on `q_in` (if no forwarded frame is in progress).
// A forwarded byte leaves 3 clocks after it arrived when the arbiter was
// idle, 2 clocks while it is already forwarding.
//
// Polling, own-package-first and the FIFO follow the system description;
// the byte-level link, the arbiter and the latencies are this design's.
module slave_node
  import fps_pkg::*;
#(
  parameter int                 FIFO_DEPTH  = 256,
  parameter int                 SYNC_STAGES = 2,
  parameter logic [7:0]         VERSION     = 8'h01
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [7:0]         slave_addr,   // strap, 1 .. number of slaves
  input  logic [TS_BITS-1:0] timestamp,    // from the event receiver
  input  logic [IO_BITS-1:0] io_ok,        // device inputs, 1 = OK
  input  link_t              q_in,
  output link_t              q_out,
  input  link_t              d_in,
  output link_t              d_out,
  output mps_state_t         mps_state,    // last state announced by the master
  output logic               fifo_overflow
);

  // ---------------- query path ----------------
  link_t      q_out_q;
  logic       qry_seen_q;
  logic       own_req_q;
  logic [7:0] evt_q;
  logic       query_hit;

  assign query_hit = q_in.valid && !q_in.k && qry_seen_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_out_q    <= LINK_IDLE;
      qry_seen_q <= 1'b0;
      evt_q      <= '0;
    end else begin
      q_out_q <= q_in;
      if (q_in.valid) begin
        qry_seen_q <= q_in.k && (q_in.data == K_QRY);
        if (query_hit) evt_q <= q_in.data;
      end
    end
  end

  assign q_out     = q_out_q;
  assign mps_state = mps_state_t'(evt_q[1:0]);

  // ---------------- own package ----------------
  typedef enum logic [1:0] {ARB_IDLE, ARB_OWN, ARB_FWD} arb_t;
  arb_t arb_q;

  logic               tx_start;
  logic [IO_BITS-1:0] snap_nok;
  logic [TS_BITS-1:0] snap_ts;
  logic               err_pending;
  link_t              tx_link;
  logic               tx_busy, tx_last;

  assign tx_start = (arb_q == ARB_IDLE) && own_req_q;

  slave_io_latch #(
    .N_IO(IO_BITS), .TS_BITS(TS_BITS), .SYNC_STAGES(SYNC_STAGES)
  ) u_latch (
    .clk, .rst_n, .io_ok, .timestamp,
    .snap(tx_start), .snap_nok, .snap_ts, .err_pending
  );

  slave_frame_tx u_tx (
    .clk, .rst_n,
    .start(tx_start), .addr(slave_addr), .version(VERSION), .evt(evt_q),
    .ts(snap_ts), .io_nok(snap_nok),
    .tx(tx_link), .busy(tx_busy), .last(tx_last)
  );

  // ---------------- forwarding FIFO ----------------
  logic [8:0] fifo_dout;
  logic       fifo_empty, fifo_full, fifo_pop;
  link_t      fwd_q;

  slave_fifo #(.WIDTH(9), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .push(d_in.valid), .din({d_in.k, d_in.data}),
    .pop(fifo_pop), .dout(fifo_dout),
    .empty(fifo_empty), .full(fifo_full), .overflow(fifo_overflow)
  );

  assign fifo_pop = (arb_q == ARB_FWD) && !fifo_empty;

  // ---------------- output arbiter ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      arb_q     <= ARB_IDLE;
      own_req_q <= 1'b0;
      fwd_q     <= LINK_IDLE;
    end else begin
      if (query_hit)     own_req_q <= 1'b1;
      else if (tx_start) own_req_q <= 1'b0;

      fwd_q <= LINK_IDLE;
      if (fifo_pop) fwd_q <= '{valid: 1'b1, k: fifo_dout[8], data: fifo_dout[7:0]};

      unique case (arb_q)
        ARB_IDLE: begin
          if (own_req_q)        arb_q <= ARB_OWN;
          else if (!fifo_empty) arb_q <= ARB_FWD;
        end
        ARB_OWN: if (tx_last) arb_q <= ARB_IDLE;
        ARB_FWD: begin
          if (fifo_pop && fifo_dout[8] && (fifo_dout[7:0] == K_EOF)) arb_q <= ARB_IDLE;
        end
        default: arb_q <= ARB_IDLE;
      endcase
    end
  end

  assign d_out = tx_link.valid ? tx_link : fwd_q;

  // The two sources of d_out never drive it in the same cycle.
  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n)
    !(tx_link.valid && fwd_q.valid));

endmodule
