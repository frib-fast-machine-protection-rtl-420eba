// tb_master_frame_rx: self-checking test of the package receiver.
// Sends reference packages with random idle gaps and checks the decoded
// fields one clock after EOF; corrupts checksums and framing and checks that
// such packages are dropped with the right error pulse.
module tb_master_frame_rx;
  import fps_pkg::*;
  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  link_t      rx = LINK_IDLE;
  logic       pkt_valid, cks_err, frame_err;
  slave_pkt_t pkt;
  int checks = 0, failures = 0;
  int n_valid = 0, n_cks = 0, n_frame = 0;

  master_frame_rx dut (.*);

  always #4 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    n_valid <= n_valid + int'(pkt_valid);
    n_cks   <= n_cks + int'(cks_err);
    n_frame <= n_frame + int'(frame_err);
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fps_tb_pkg::frame_t f;
    slave_pkt_t exp;
    int kind, v0, c0, e0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 300; n++) begin
      exp = '{addr: 8'($urandom), version: 8'($urandom), evt: 8'($urandom),
              ts: $urandom, io: fps_tb_pkg::rand96()};
      f = fps_tb_pkg::ref_package(exp.addr, exp.version, exp.evt, exp.ts, exp.io);
      kind = (n % 5 == 3) ? 1 : (n % 5 == 4) ? 2 : 0;  // 0 good, 1 checksum, 2 framing
      if (kind == 1) f[21][7:0] = f[21][7:0] ^ 8'(1 << ($urandom % 8));
      if (kind == 2) f[2 + $urandom % 19] = {1'b1, 8'hBC};
      v0 = n_valid; c0 = n_cks; e0 = n_frame;
      for (int i = 0; i < PKT_LEN; i++) begin
        while ($urandom % 4 == 0) begin rx = LINK_IDLE; @(negedge clk); end
        rx = '{valid: 1'b1, k: f[i][8], data: f[i][7:0]};
        @(negedge clk);
        if (i == PKT_LEN - 1 && kind == 0) begin
          // EOF was sampled at the last edge: the package is out now
          check("pkt_valid one clock after EOF", pkt_valid);
          check("decoded fields", pkt == exp);
        end
      end
      rx = LINK_IDLE;
      repeat (2) @(negedge clk);
      case (kind)
        0: check("good package counted once", n_valid == v0 + 1 && n_cks == c0 && n_frame == e0);
        1: check("checksum error flagged", n_valid == v0 && n_cks == c0 + 1);
        default: check("framing error flagged", n_valid == v0 && n_frame >= e0 + 1);
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
