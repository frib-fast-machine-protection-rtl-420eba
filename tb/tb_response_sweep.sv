// tb_response_sweep: response-time measurement of the full system with a
// phase-swept test pulse, at the default size (8 slaves, 512-clock query
// period, 8 ns clock).
//
// As in the prototype measurement, a one-clock (8 ns) NOK pulse is applied
// to an input of the last slave of the chain, and each following pulse comes
// one clock later relative to the polling cycle (pulses are 3 query periods
// plus 1 clock apart, so the latch of one pulse is released before the
// next), and 1024 pulses sweep every phase of the polling cycle twice. The master runs in Monitor-only, where the error is latched
// until the next package of that slave, and the response is measured from
// the pulse to `err_latched`. Checks: every pulse is seen, and the spread of
// the response over the phases is exactly one query period minus one clock.
// Prints the minimum and maximum response.
module tb_response_sweep;
  import fps_pkg::*;
  localparam int N      = 8;
  localparam int PERIOD = 512;
  localparam int PULSES = 1024;
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

  fps_top dut (.*);

  always #4 clk = ~clk;
  always_ff @(posedge clk) timestamp <= timestamp + 1;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat ((PULSES + 8) * (3 * PERIOD + 1)) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int resp, rmin, rmax, cnt;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    cmd_state = MPS_MONITOR; cmd_valid = 1'b1;
    @(negedge clk);
    cmd_valid = 1'b0;
    repeat (3 * PERIOD) @(negedge clk);
    rmin = 1 << 30; rmax = 0;
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
      if (resp > rmax) rmax = resp;
      repeat (3 * PERIOD + 1 - cnt) @(negedge clk);
    end
    $display("response over %0d pulses: min %0d clocks (%0d ns), max %0d clocks (%0d ns)",
             PULSES, rmin, rmin * 8, rmax, rmax * 8);
    check("spread is one query period", rmax - rmin == PERIOD - 1);
    check("maximum below one period plus one chain read-out",
          rmax <= PERIOD + N * PKT_LEN + 4 * N + 8);
    check("no link errors", cks_err_cnt == 0 && frame_err_cnt == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
