// tb_slave_frame_tx: self-checking test of the package serialiser.
// Sends random packages and compares every byte with the reference frame;
// checks that the first byte follows `start` by one clock, that the frame
// is 23 bytes with no gaps, and that `last` marks the EOF byte.
module tb_slave_frame_tx;
  import fps_pkg::*;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic [7:0]  addr, version, evt;
  logic [31:0] ts;
  logic [95:0] io_nok;
  link_t       tx;
  logic        busy, last;
  int checks = 0, failures = 0;

  slave_frame_tx dut (.*);

  always #4 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fps_tb_pkg::frame_t exp;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    check("idle after reset", !tx.valid && !busy);
    for (int n = 0; n < 100; n++) begin
      addr = 8'($urandom); version = 8'($urandom); evt = 8'($urandom);
      ts = $urandom; io_nok = fps_tb_pkg::rand96();
      exp = fps_tb_pkg::ref_package(addr, version, evt, ts, io_nok);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      // inputs change during sending: the captured values must be used
      addr = 8'($urandom); io_nok = '0; ts = '0;
      for (int i = 0; i < PKT_LEN; i++) begin
        check($sformatf("pkg %0d byte %0d valid", n, i), tx.valid);
        check($sformatf("pkg %0d byte %0d value", n, i), {tx.k, tx.data} == exp[i]);
        check($sformatf("pkg %0d last flag", n), last == (i == PKT_LEN - 1));
        @(negedge clk);
      end
      check("idle after package", !tx.valid);
      repeat ($urandom % 3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
