// tb_slave_node: self-checking test of one slave node, with the testbench
// playing the master upstream and the next slave downstream.
// Checks: query repeated one clock later; event code taken as MPS state;
// own package 2 clocks after the event byte, with the latched errors and the
// error time stamp; downstream packages forwarded after the own package;
// a package already being forwarded is finished before the own package;
// the FIFO overflow flag of a second, 16-deep instance.
module tb_slave_node;
  import fps_pkg::*;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [31:0] timestamp = '0;
  logic [95:0] io_ok = '1;
  link_t       q_in = LINK_IDLE, d_in = LINK_IDLE;
  link_t       q_out, d_out, q_out_s, d_out_s;
  mps_state_t  mps_state, mps_state_s;
  logic        fifo_overflow, fifo_overflow_s;
  int checks = 0, failures = 0;
  logic [8:0] got [$];
  link_t      q_prev = LINK_IDLE;
  int         own_lat = -1, cyc = 0, evt_cyc = -1;

  slave_node dut (
    .clk, .rst_n, .slave_addr(8'd5), .timestamp, .io_ok,
    .q_in, .q_out, .d_in, .d_out, .mps_state, .fifo_overflow
  );

  slave_node #(.FIFO_DEPTH(16)) dut_small (
    .clk, .rst_n, .slave_addr(8'd5), .timestamp, .io_ok,
    .q_in, .q_out(q_out_s), .d_in, .d_out(d_out_s), .mps_state(mps_state_s),
    .fifo_overflow(fifo_overflow_s)
  );

  always #4 clk = ~clk;
  always_ff @(posedge clk) timestamp <= timestamp + 1;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // monitor, sampled mid-cycle
  always @(negedge clk) begin
    cyc++;
    if (rst_n) begin
      checks++;
      if (q_out != q_prev) begin failures++; $display("FAIL: q_out not q_in delayed"); end
      if (d_out.valid) begin
        got.push_back({d_out.k, d_out.data});
        if (own_lat < 0 && evt_cyc >= 0 && d_out.k && d_out.data == K_SYNC && got.size() == 1)
          own_lat = cyc - evt_cyc;
      end
    end
  end
  always @(posedge clk) q_prev <= q_in;

  task automatic drive_q(link_t b);
    q_in = b;
    @(negedge clk);
    q_in = LINK_IDLE;
  endtask

  // sends the query; returns the time stamp the slave sees in its snapshot cycle
  task automatic query(logic [7:0] evt, output logic [31:0] snap_ts_now);
    drive_q(k_byte(K_SYNC));
    drive_q(k_byte(K_QRY));
    q_in = d_byte(evt);
    evt_cyc = cyc + 1;
    snap_ts_now = timestamp + 1;
    @(negedge clk);
    q_in = LINK_IDLE;
    drive_q(k_byte(K_EOF));
  endtask

  task automatic send_down(fps_tb_pkg::frame_t f, int gap);
    for (int i = 0; i < PKT_LEN; i++) begin
      d_in = '{valid: 1'b1, k: f[i][8], data: f[i][7:0]};
      @(negedge clk);
      d_in = LINK_IDLE;
      repeat (gap) @(negedge clk);
    end
  endtask

  task automatic compare(string what, logic [8:0] exp [$]);
    check({what, ": byte count"}, got.size() == exp.size());
    for (int i = 0; i < exp.size() && i < got.size(); i++)
      if (got[i] != exp[i]) begin
        check($sformatf("%s: byte %0d", what, i), 1'b0);
        break;
      end
    checks++;
    got.delete();
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] ts_snap, ts_err;
    logic [8:0]  exp [$];
    fps_tb_pkg::frame_t f_own, f_a, f_b;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);

    // 1: plain query, no errors
    query(8'h02, ts_snap);
    repeat (40) @(negedge clk);
    check("own package latency 2 clocks", own_lat == 2);
    check("MPS state from event code", mps_state == MPS_ENABLED);
    f_own = fps_tb_pkg::ref_package(8'd5, 8'h01, 8'h02, ts_snap, '0);
    exp = {};
    foreach (f_own[i]) exp.push_back(f_own[i]);
    compare("own package", exp);

    // 2: one-clock NOK on two inputs, then query; two downstream packages
    //    arrive while the own package is being sent
    ts_err = timestamp + 2;
    io_ok[3] = 1'b0; io_ok[90] = 1'b0;
    @(negedge clk);
    io_ok = '1;
    repeat (10) @(negedge clk);
    f_a = fps_tb_pkg::ref_package(8'd6, 8'h01, 8'h01, 32'h1234_5678, fps_tb_pkg::rand96());
    f_b = fps_tb_pkg::ref_package(8'd7, 8'h01, 8'h01, 32'h9ABC_DEF0, fps_tb_pkg::rand96());
    query(8'h01, ts_snap);
    send_down(f_a, 0);
    send_down(f_b, 1);
    repeat (40) @(negedge clk);
    check("MPS state Monitor-only", mps_state == MPS_MONITOR);
    f_own = fps_tb_pkg::ref_package(8'd5, 8'h01, 8'h01, ts_err,
                                    (96'h1 << 3) | (96'h1 << 90));
    exp = {};
    foreach (f_own[i]) exp.push_back(f_own[i]);
    foreach (f_a[i]) exp.push_back(f_a[i]);
    foreach (f_b[i]) exp.push_back(f_b[i]);
    compare("own then forwarded", exp);
    check("16-deep FIFO overflowed", fifo_overflow_s);
    check("256-deep FIFO did not", !fifo_overflow);

    // 3: query arrives while a slow downstream package is being forwarded
    fork
      send_down(f_a, 2);
      begin
        repeat (20) @(negedge clk);
        query(8'h03, ts_snap);
      end
    join
    repeat (40) @(negedge clk);
    check("MPS state Fault", mps_state == MPS_FAULT);
    f_own = fps_tb_pkg::ref_package(8'd5, 8'h01, 8'h03, ts_snap, '0);
    exp = {};
    foreach (f_a[i]) exp.push_back(f_a[i]);
    got_own_ts: begin
      // the own package waits for the forwarded EOF, so its snapshot time is
      // taken from the received bytes
      logic [31:0] ts_rx;
      if (got.size() >= 2 * PKT_LEN) begin
        ts_rx = {got[PKT_LEN+5][7:0], got[PKT_LEN+6][7:0], got[PKT_LEN+7][7:0], got[PKT_LEN+8][7:0]};
        check("own package waited (later time stamp)", ts_rx > ts_snap);
        f_own = fps_tb_pkg::ref_package(8'd5, 8'h01, 8'h03, ts_rx, '0);
      end
    end
    foreach (f_own[i]) exp.push_back(f_own[i]);
    compare("forwarded frame not cut", exp);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
