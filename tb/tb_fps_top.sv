// tb_fps_top: end-to-end test of the whole fast protection system at its
// default size: one master, a chain of 8 slaves with 96 inputs each, a
// 512-clock (4.096 us at 125 MHz) query period. Every mechanism of the
// design is made to happen and counted: polling, own-package answers and
// forwarding along the chain (all 8 packages per query reach the master),
// the state announced to the slaves, the Monitor-only error latch and its
// release, masking, the trip from Enabled to Fault with the fault record,
// the worst-case response (a one-clock, 8 ns NOK at the last slave right
// after its snapshot) and a best-case one (first slave, just before a
// query), and the return from Fault to Monitor-only.
module tb_fps_top;
  import fps_pkg::*;
  localparam int N      = 8;
  localparam int PERIOD = 512;
  logic                      clk = 1'b0;
  logic                      rst_n = 1'b0;
  logic [31:0]               timestamp = '0;
  logic [N-1:0][IO_BITS-1:0] io_ok = '1;
  logic                      cmd_valid = 1'b0;
  mps_state_t                cmd_state = MPS_DISABLED;
  logic [N-1:0][IO_BITS-1:0] mask = '0;
  logic                      mit_a, mit_b, mit_c, query_strobe, err_latched, fault_valid;
  mps_state_t                state;
  logic [N-1:0]              slave_err, slave_fifo_overflow;
  logic [7:0]                fault_addr;
  logic [95:0]               fault_io;
  logic [31:0]               fault_slave_ts, fault_master_ts;
  logic [15:0]               pkt_cnt, cks_err_cnt, frame_err_cnt;
  mps_state_t [N-1:0]        slave_mps_state;
  link_t                     q_end;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_query = 0, n_latch = 0, n_release = 0, n_masked = 0, n_trip = 0;
  int n_state_bcast = 0, n_recover = 0, n_worst = 0, n_best = 0;

  fps_top dut (.*);

  always #4 clk = ~clk;
  always_ff @(posedge clk) timestamp <= timestamp + 1;
  always @(posedge clk) if (query_strobe) n_query++;

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

  task automatic wait_periods(int n);
    repeat (n * PERIOD) @(negedge clk);
  endtask

  task automatic pulse(int slave, int bit_i);
    io_ok[slave][bit_i] = 1'b0;
    @(negedge clk);
    io_ok[slave][bit_i] = 1'b1;
  endtask

  task automatic all_slaves_know(mps_state_t s);
    logic ok = 1'b1;
    for (int i = 0; i < N; i++) if (slave_mps_state[i] != s) ok = 1'b0;
    check($sformatf("all slaves told state %0d", s), ok);
    if (ok) n_state_bcast++;
  endtask

  initial begin
    repeat (40 * PERIOD) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int q0, p0, t0, resp;
    logic [31:0] ts_inj;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // polling and forwarding
    wait_periods(3);
    q0 = n_query; p0 = pkt_cnt;
    wait_periods(2);
    check("two queries in two periods", n_query - q0 == 2);
    check("8 packages per query", int'(pkt_cnt - p0) == 2 * N);
    check("Disabled at start: A,B active", state == MPS_DISABLED && mit_a && mit_b && !mit_c);
    all_slaves_know(MPS_DISABLED);

    // Monitor-only: the error is latched until the slave's next package
    command(MPS_MONITOR);
    wait_periods(2);
    all_slaves_know(MPS_MONITOR);
    pulse(4, 17);
    fork
      begin
        while (!err_latched) @(negedge clk);
        n_latch++;
        check("latched on slave 5", slave_err == 8'b0001_0000);
        while (err_latched) @(negedge clk);
        n_release++;
      end
      wait_periods(3);
    join_any
    disable fork;
    check("Monitor-only: no trip", state == MPS_MONITOR && mit_a && mit_b && !mit_c);

    // Enabled: masked NOK ignored
    command(MPS_ENABLED);
    wait_periods(2);
    all_slaves_know(MPS_ENABLED);
    check("Enabled releases all mitigations", !mit_a && !mit_b && !mit_c);
    mask[1][3] = 1'b1;
    io_ok[1][3] = 1'b0;
    wait_periods(3);
    if (state == MPS_ENABLED && !mit_c) n_masked++;
    check("masked NOK does not trip", state == MPS_ENABLED);

    // worst case: NOK at the last slave just after its snapshot
    @(posedge clk iff dut.g_slave[N-1].u_slave.tx_start);
    @(negedge clk);
    ts_inj = timestamp;
    t0 = $time;
    pulse(N - 1, 95);
    while (!mit_c) @(negedge clk);
    resp = ($time - t0) / 8;
    $display("worst-case response: %0d clocks = %0d ns", resp, resp * 8);
    n_trip++;
    check("worst case within one period plus one chain read-out",
          resp >= PERIOD && resp <= PERIOD + N * PKT_LEN + 4 * N + 8);
    if (resp > PERIOD) n_worst++;
    check("Fault state, all mitigations", state == MPS_FAULT && mit_a && mit_b && mit_c);
    check("fault source slave 8 bit 95", fault_valid && fault_addr == 8'd8 && fault_io == (96'h1 << 95));
    check("slave error time stamp", fault_slave_ts == ts_inj + 2);
    check("master time stamp after slave's", fault_master_ts - fault_slave_ts == resp - 3);
    wait_periods(2);
    all_slaves_know(MPS_FAULT);
    command(MPS_ENABLED);
    check("Fault holds against Enabled", state == MPS_FAULT && fault_addr == 8'd8);

    // recovery, then best case: NOK at slave 1 just before a query
    io_ok[1][3] = 1'b1;
    command(MPS_MONITOR);
    check("Fault -> Monitor-only clears record", state == MPS_MONITOR && !fault_valid);
    n_recover++;
    command(MPS_ENABLED);
    wait_periods(2);
    @(posedge clk iff query_strobe);
    repeat (PERIOD - 6) @(negedge clk);
    t0 = $time;
    pulse(0, 0);
    while (!mit_c) @(negedge clk);
    resp = ($time - t0) / 8;
    $display("best-case response: %0d clocks = %0d ns", resp, resp * 8);
    check("best case within a package time", resp < 2 * PKT_LEN);
    check("fault source slave 1", fault_addr == 8'd1);
    n_best++;

    check("no link errors", cks_err_cnt == 0 && frame_err_cnt == 0);
    check("no FIFO overflow", slave_fifo_overflow == '0);

    $display("mechanisms: queries=%0d state_broadcasts=%0d monitor_latch=%0d monitor_release=%0d masked=%0d trips=%0d worst=%0d best=%0d recover=%0d",
             n_query, n_state_bcast, n_latch, n_release, n_masked, n_trip, n_worst, n_best, n_recover);
    check("query mechanism", n_query > 0);
    check("state broadcast mechanism", n_state_bcast > 0);
    check("monitor latch mechanism", n_latch > 0 && n_release > 0);
    check("mask mechanism", n_masked > 0);
    check("trip mechanism", n_trip > 0);
    check("worst/best case", n_worst > 0 && n_best > 0);
    check("recovery mechanism", n_recover > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
