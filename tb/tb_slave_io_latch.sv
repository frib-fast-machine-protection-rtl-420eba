// tb_slave_io_latch: self-checking test of the slave I/O latch.
// Checks that a one-clock NOK is held until the next snapshot, that the
// time stamp of the first error is reported (input time + 2 synchroniser
// clocks), that a NOK arriving in the snapshot cycle is reported, and that
// the latch restarts empty after a snapshot.
module tb_slave_io_latch;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [95:0] io_ok = '1;
  logic [31:0] timestamp = '0;
  logic        snap = 1'b0;
  logic [95:0] snap_nok;
  logic [31:0] snap_ts;
  logic        err_pending;
  int checks = 0, failures = 0;

  slave_io_latch dut (.*);

  always #4 clk = ~clk;
  always_ff @(posedge clk) timestamp <= timestamp + 1;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] t_inj;
    logic [95:0] bits;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (4) @(negedge clk);
    check("idle: no NOK", snap_nok == '0 && !err_pending);
    check("idle: ts is now", snap_ts == timestamp);

    for (int n = 0; n < 50; n++) begin
      // one-clock NOK pulse on random bits
      bits = fps_tb_pkg::rand96() & fps_tb_pkg::rand96();
      if (bits == '0) bits[n % 96] = 1'b1;
      t_inj = timestamp;
      io_ok = ~bits;
      @(negedge clk);
      io_ok = '1;
      repeat (2 + ($urandom % 20)) @(negedge clk);
      // a second, later error must not move the time stamp
      io_ok[(n * 7) % 96] = 1'b0;
      @(negedge clk);
      io_ok = '1;
      repeat (3) @(negedge clk);
      bits[(n * 7) % 96] = 1'b1;
      check("latched bits", snap_nok == bits);
      check("error time stamp", snap_ts == t_inj + 2);
      check("pending", err_pending);
      snap = 1'b1;
      @(negedge clk);
      snap = 1'b0;
      check("cleared after snapshot", snap_nok == '0 && !err_pending);
      check("ts is now after snapshot", snap_ts == timestamp);
    end

    // NOK present in the snapshot cycle itself
    io_ok[42] = 1'b0;
    repeat (2) @(negedge clk);
    snap = 1'b1;
    check("NOK in snapshot cycle reported", snap_nok[42]);
    @(negedge clk);
    snap = 1'b0;
    io_ok[42] = 1'b1;
    @(negedge clk);
    check("persistent NOK re-latched", snap_nok[42] && err_pending);
    repeat (4) @(negedge clk);
    check("still latched after input returns OK", snap_nok[42]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
