// tb_slave_fifo: self-checking test of the forwarding FIFO (depth 8 here).
// Random pushes and pops against a queue model; checks order, empty/full
// flags and the sticky overflow flag on a push into a full FIFO.
module tb_slave_fifo;
  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       push = 1'b0, pop = 1'b0;
  logic [8:0] din = '0, dout;
  logic       empty, full, overflow;
  logic [8:0] model [$];
  int checks = 0, failures = 0;
  int fills = 0;

  slave_fifo #(.WIDTH(9), .DEPTH(8)) dut (.*);

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
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 4000; n++) begin
      // bias towards filling in the first half, draining in the second
      push = ($urandom % 100) < ((n < 2000) ? 60 : 40);
      pop  = ($urandom % 100) < 50;
      if (model.size() == 8) push = 1'b0;   // overflow is tested at the end
      din  = 9'($urandom);
      check("empty flag", empty == (model.size() == 0));
      check("full flag", full == (model.size() == 8));
      if (model.size() > 0) check("head value", dout == model[0]);
      if (model.size() == 8) fills++;
      if (push) model.push_back(din);
      if (pop && model.size() > int'(push)) void'(model.pop_front());
      check("no overflow yet", !overflow);
      @(negedge clk);
      push = 1'b0; pop = 1'b0;
    end
    check("reached full", fills > 0);
    while (!full) begin
      push = 1'b1; din = 9'($urandom); @(negedge clk);
    end
    push = 1'b1;
    @(negedge clk);
    push = 1'b0;
    check("overflow flagged", overflow);
    repeat (3) @(negedge clk);
    check("overflow sticky", overflow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
