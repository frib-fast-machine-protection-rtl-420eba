// tb_prototype_response: the prototype's response-time test, with fibre.
//
// Builds the prototype chain from the RTL nodes: the master, 210 m of fibre
// to slave 1, then 20 m between each of slaves 1..8 (behavioural delay lines,
// 129 and 12 clocks at 4.9 ns/m). A one-clock (8 ns) NOK pulse is applied to
// slave 8, each pulse one clock later in the polling cycle than the one
// before (pulses 3 query periods + 1 clock apart; 1024 pulses cover every
// phase twice).
//  1. Monitor-only: the response is measured from the pulse to the master's
//     `err_latched`, as with an oscilloscope. Checks: every pulse seen, a
//     spread of exactly one query period, and a maximum within one period
//     plus the fibre round trip plus one chain read-out.
//  2. Enabled: one pulse at the worst phase trips the system; the response
//     is also derived from the two latched time stamps (master minus slave),
//     which must agree with the measured one less the 3 clocks the slave's
//     synchroniser and the master's receiver add.
module tb_prototype_response;
  import fps_pkg::*;
  localparam int N        = 8;
  localparam int PERIOD   = 512;
  localparam int PULSES   = 1024;
  localparam int D_FIRST  = 129;   // 210 m
  localparam int D_HOP    = 12;    // 20 m
  logic                      clk = 1'b0;
  logic                      rst_n = 1'b0;
  logic [31:0]               timestamp = '0;
  logic [N-1:0][IO_BITS-1:0] io_ok = '1;
  logic                      cmd_valid = 1'b0;
  mps_state_t                cmd_state = MPS_DISABLED;
  logic [N-1:0][IO_BITS-1:0] mask = '0;
  logic                      mit_a, mit_b, mit_c, query_strobe, err_latched, fault_valid;
  mps_state_t                state;
  logic [N-1:0]              slave_err;
  logic [7:0]                fault_addr;
  logic [95:0]               fault_io;
  logic [31:0]               fault_slave_ts, fault_master_ts;
  logic [15:0]               pkt_cnt, cks_err_cnt, frame_err_cnt;
  mps_state_t                slave_state [N];
  logic                      slave_ovf [N];
  int checks = 0, failures = 0;

  // node side of each span: qm/dm at the upstream node, qs/ds at the slave
  link_t qm [N], dm [N], qs [N], ds [N];
  link_t q_last;

  fps_master u_master (
    .clk, .rst_n, .timestamp, .cmd_valid, .cmd_state, .mask,
    .q_out(qm[0]), .d_in(dm[0]),
    .query_strobe, .state, .mit_a, .mit_b, .mit_c, .slave_err, .err_latched,
    .fault_valid, .fault_addr, .fault_io, .fault_slave_ts, .fault_master_ts,
    .pkt_cnt, .cks_err_cnt, .frame_err_cnt
  );

  for (genvar i = 0; i < N; i++) begin : g_chain
    fiber_link_model #(.DELAY(i == 0 ? D_FIRST : D_HOP)) u_fiber (
      .clk, .a_in(qm[i]), .b_out(qs[i]), .b_in(ds[i]), .a_out(dm[i])
    );
    link_t q_next, d_back;
    if (i < N - 1) begin : g_mid
      assign qm[i+1] = q_next;
      assign d_back  = dm[i+1];
    end else begin : g_end
      assign q_last = q_next;
      assign d_back = LINK_IDLE;
    end
    slave_node u_slave (
      .clk, .rst_n, .slave_addr(8'(i + 1)), .timestamp, .io_ok(io_ok[i]),
      .q_in(qs[i]), .q_out(q_next), .d_in(d_back), .d_out(ds[i]),
      .mps_state(slave_state[i]), .fifo_overflow(slave_ovf[i])
    );
  end

  always #4 clk = ~clk;
  always_ff @(posedge clk) timestamp <= timestamp + 1;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic command(mps_state_t s);
    @(negedge clk);
    cmd_state = s; cmd_valid = 1'b1;
    @(negedge clk);
    cmd_valid = 1'b0;
  endtask

  initial begin
    repeat ((PULSES + 16) * (3 * PERIOD + 1)) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int resp, rmin, rmax, cnt, pmax, round_trip;
    logic [31:0] ts_diff;
    round_trip = 2 * (D_FIRST + (N - 1) * D_HOP);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    command(MPS_MONITOR);
    repeat (3 * PERIOD) @(negedge clk);
    rmin = 1 << 30; rmax = 0; pmax = 0;
    for (int p = 0; p < PULSES; p++) begin
      check("latch released before the pulse", !err_latched);
      io_ok[N-1][p % IO_BITS] = 1'b0;
      @(negedge clk);
      io_ok[N-1][p % IO_BITS] = 1'b1;
      cnt = 1;
      while (!err_latched && cnt < 3 * PERIOD) begin @(negedge clk); cnt++; end
      check($sformatf("pulse %0d seen", p), err_latched);
      resp = cnt;
      if (resp < rmin) rmin = resp;
      if (resp > rmax) begin rmax = resp; pmax = p; end
      repeat (3 * PERIOD + 1 - cnt) @(negedge clk);
    end
    $display("Monitor-only, %0d pulses: response %0d..%0d ns (%0d..%0d clocks)",
             PULSES, rmin * 8, rmax * 8, rmin, rmax);
    check("spread is one query period", rmax - rmin == PERIOD - 1);
    check("minimum at least the return fibre delay", rmin > round_trip / 2);
    check("maximum within period + round trip + chain read-out",
          rmax <= PERIOD + round_trip + N * PKT_LEN + 4 * N + 8);
    check("chain healthy", cks_err_cnt == 0 && frame_err_cnt == 0);

    // Enabled: trip at the worst phase found above, read the time stamps
    command(MPS_ENABLED);
    repeat (3 * PERIOD) @(negedge clk);
    check("Enabled", state == MPS_ENABLED && !mit_c);
    // same phase relative to the polling cycle as the slowest pulse
    @(posedge clk iff query_strobe);
    repeat (((pmax * (3 * PERIOD + 1) + 3 * PERIOD + 5) % PERIOD)) @(negedge clk);
    cnt = 0;
    io_ok[N-1][7] = 1'b0;
    @(negedge clk);
    io_ok[N-1][7] = 1'b1;
    cnt = 1;
    while (!mit_c && cnt < 3 * PERIOD) begin @(negedge clk); cnt++; end
    ts_diff = fault_master_ts - fault_slave_ts;
    $display("Enabled: trip %0d ns after the pulse; time stamps give %0d ns",
             cnt * 8, ts_diff * 8);
    check("tripped, source slave 8", state == MPS_FAULT && fault_addr == 8'd8 && mit_a && mit_b && mit_c);
    check("time-stamp difference matches", ts_diff == 32'(cnt - 3));
    check("trip response inside the measured range", cnt >= rmin && cnt <= rmax + 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
