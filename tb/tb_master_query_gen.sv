// tb_master_query_gen: self-checking test of the polling timer, at its
// default period of 512 clocks (4.096 us at 8 ns). Checks the query frame
// bytes, the event code taken at the start of each query and the exact
// number of clocks between queries.
module tb_master_query_gen;
  import fps_pkg::*;
  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [7:0] evt_code = 8'h00;
  link_t      q_out;
  logic       query_strobe;
  int checks = 0, failures = 0;
  localparam int PERIOD = 512;

  master_query_gen dut (.*);

  always #4 clk = ~clk;

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
    int last_q = -1, cyc = 0, nq = 0;
    logic [7:0] evt_at_start;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (nq < 20) begin
      @(negedge clk);
      cyc++;
      if (q_out.valid && q_out.k && q_out.data == K_SYNC) begin
        check("strobe with sync", query_strobe);
        if (last_q >= 0) check($sformatf("period %0d", cyc - last_q), cyc - last_q == PERIOD);
        last_q = cyc;
        nq++;
        evt_at_start = evt_code;
        evt_code = 8'($urandom);   // a change now must not reach this query
        @(negedge clk); cyc++;
        check("QRY byte", q_out.valid && q_out.k && q_out.data == K_QRY);
        @(negedge clk); cyc++;
        check("event byte", q_out.valid && !q_out.k && q_out.data == evt_at_start);
        @(negedge clk); cyc++;
        check("EOF byte", q_out.valid && q_out.k && q_out.data == K_EOF);
        @(negedge clk); cyc++;
        check("idle after query", !q_out.valid && !query_strobe);
      end else begin
        check("no stray strobe", !query_strobe);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
