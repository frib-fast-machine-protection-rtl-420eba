// tb_fps_master: self-checking test of the master node at its default
// parameters (8 slaves, 512-clock query period). The testbench answers each
// query with the 8 slave packages, as a chain would. Checks the event code
// of each query against the state, the package and error counters, a
// checksum error that must not trip, the trip to Fault from a package
// received in Enabled with the 2-clock latency from its EOF byte to the
// mitigation outputs, and the fault record.
module tb_fps_master;
  import fps_pkg::*;
  localparam int N = 8;
  logic                      clk = 1'b0;
  logic                      rst_n = 1'b0;
  logic [31:0]               timestamp = '0;
  logic                      cmd_valid = 1'b0;
  mps_state_t                cmd_state = MPS_DISABLED;
  logic [N-1:0][IO_BITS-1:0] mask = '0;
  link_t                     q_out, d_in = LINK_IDLE;
  logic                      query_strobe;
  mps_state_t                state;
  logic                      mit_a, mit_b, mit_c, err_latched, fault_valid;
  logic [N-1:0]              slave_err;
  logic [7:0]                fault_addr;
  logic [95:0]               fault_io;
  logic [31:0]               fault_slave_ts, fault_master_ts;
  logic [15:0]               pkt_cnt, cks_err_cnt, frame_err_cnt;
  int checks = 0, failures = 0;

  // what the modelled slaves report in the next answer
  logic [95:0] next_io [N];
  logic        corrupt [N];
  int          eof_cyc = -1, trip_cyc = -1, cyc = 0, queries = 0;
  logic [31:0] eof_ts;
  logic [7:0]  last_evt;

  fps_master dut (.*);

  always #4 clk = ~clk;
  always_ff @(posedge clk) timestamp <= timestamp + 1;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) begin
    cyc++;
    if (mit_c && trip_cyc < 0) trip_cyc = cyc;
  end

  // slave chain model: answer every query with N packages, slave 1 first
  initial begin
    logic seen_qry = 1'b0;
    fps_tb_pkg::frame_t f;
    foreach (next_io[i]) begin next_io[i] = '0; corrupt[i] = 1'b0; end
    forever begin
      @(negedge clk);
      if (q_out.valid && q_out.k && q_out.data == K_QRY) seen_qry = 1'b1;
      else if (q_out.valid && seen_qry) begin
        seen_qry = 1'b0;
        last_evt = q_out.data;
        queries++;
        repeat (3) @(negedge clk);
        for (int s = 0; s < N; s++) begin
          f = fps_tb_pkg::ref_package(8'(s + 1), 8'h01, last_evt, timestamp - 5, next_io[s]);
          if (corrupt[s]) f[12][0] = ~f[12][0];
          for (int i = 0; i < PKT_LEN; i++) begin
            d_in = '{valid: 1'b1, k: f[i][8], data: f[i][7:0]};
            if (i == PKT_LEN - 1 && next_io[s] != '0) begin eof_cyc = cyc + 1; eof_ts = timestamp + 1; end
            @(negedge clk);
          end
          d_in = LINK_IDLE;
          next_io[s] = '0;
          corrupt[s] = 1'b0;
        end
      end
    end
  end

  task automatic command(mps_state_t s);
    @(negedge clk);
    cmd_state = s; cmd_valid = 1'b1;
    @(negedge clk);
    cmd_valid = 1'b0;
  endtask

  task automatic wait_queries(int n);
    int q0 = queries;
    while (queries < q0 + n) @(negedge clk);
    repeat (300) @(negedge clk);   // let the answers arrive
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait_queries(2);
    check("event code Disabled", last_evt == 8'd0);
    check("16 packages counted", pkt_cnt == 16);
    check("Disabled mitigations", mit_a && mit_b && !mit_c);

    command(MPS_MONITOR);
    next_io[3] = 96'h10;
    wait_queries(1);
    check("event code Monitor-only", last_evt == 8'd1);
    check("Monitor: slave 4 error latched", err_latched && slave_err == 8'b0000_1000);
    wait_queries(1);
    check("Monitor: released by next package", !err_latched);

    command(MPS_ENABLED);
    wait_queries(1);
    check("event code Enabled", last_evt == 8'd2);
    check("Enabled releases mitigations", !mit_a && !mit_b && !mit_c);
    // corrupted package with a NOK: dropped, no trip
    p0 = pkt_cnt;
    next_io[2] = 96'h1; corrupt[2] = 1'b1;
    wait_queries(1);
    check("checksum error counted", cks_err_cnt == 1);
    check("corrupt package dropped", pkt_cnt == p0 + 7 && state == MPS_ENABLED);

    // real NOK from slave 7
    next_io[6] = 96'h1 << 64;
    wait_queries(1);
    check("tripped to Fault", state == MPS_FAULT && mit_a && mit_b && mit_c);
    check($sformatf("EOF to mitigation latency %0d", trip_cyc - eof_cyc), trip_cyc - eof_cyc == 2);
    check("fault record source", fault_valid && fault_addr == 8'd7 && fault_io == (96'h1 << 64));
    check("fault master time stamp", fault_master_ts == eof_ts);
    wait_queries(1);
    check("event code Fault", last_evt == 8'd3);
    command(MPS_MONITOR);
    check("back to Monitor-only", state == MPS_MONITOR && !fault_valid);
    check("no framing errors", frame_err_cnt == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
