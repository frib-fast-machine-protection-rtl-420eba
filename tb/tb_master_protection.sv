// tb_master_protection: self-checking test of the MPS state machine.
// Walks through Disabled, Monitor-only, Enabled and Fault, checking the
// mitigation outputs of each state, the per-slave error latch of
// Monitor-only, masking, the trip to Fault one clock after the package, the
// fault record, the ignored commands in Fault and the exit to Monitor-only.
module tb_master_protection;
  import fps_pkg::*;
  localparam int N = 8;
  logic                      clk = 1'b0;
  logic                      rst_n = 1'b0;
  logic                      pkt_valid = 1'b0;
  slave_pkt_t                pkt = '0;
  logic                      cmd_valid = 1'b0;
  mps_state_t                cmd_state = MPS_DISABLED;
  logic [N-1:0][IO_BITS-1:0] mask = '0;
  logic [31:0]               master_ts = '0;
  mps_state_t                state;
  logic                      mit_a, mit_b, mit_c, err_latched, fault_valid, bad_addr;
  logic [N-1:0]              slave_err;
  logic [7:0]                fault_addr;
  logic [95:0]               fault_io;
  logic [31:0]               fault_slave_ts, fault_master_ts;
  int checks = 0, failures = 0;

  master_protection #(.N_SLAVES(N)) dut (.*);

  always #4 clk = ~clk;
  always_ff @(posedge clk) master_ts <= master_ts + 1;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(int addr, logic [95:0] io, logic [31:0] ts);
    pkt = '{addr: 8'(addr), version: 8'h01, evt: 8'h00, ts: ts, io: io};
    pkt_valid = 1'b1;
    @(negedge clk);
    pkt_valid = 1'b0;
  endtask

  task automatic command(mps_state_t s);
    cmd_state = s; cmd_valid = 1'b1;
    @(negedge clk);
    cmd_valid = 1'b0;
  endtask

  task automatic expect_mit(string where, logic a, logic b, logic c);
    check({where, ": mitigations"}, mit_a == a && mit_b == b && mit_c == c);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] ts_at;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check("reset state Disabled", state == MPS_DISABLED);
    expect_mit("Disabled", 1, 1, 0);
    send(3, 96'h1, 32'h10);
    check("Disabled: not monitored", !err_latched && state == MPS_DISABLED);

    command(MPS_MONITOR);
    check("Monitor-only entered", state == MPS_MONITOR);
    expect_mit("Monitor-only", 1, 1, 0);
    send(3, 96'h4, 32'h20);
    check("Monitor: error latched", err_latched && slave_err == 8'b0000_0100);
    send(5, 96'h0, 32'h21);
    check("Monitor: other slave keeps latch", err_latched);
    send(3, 96'h0, 32'h22);
    check("Monitor: cleared by next package of slave", !err_latched);
    check("Monitor: no trip", state == MPS_MONITOR && !fault_valid);

    command(MPS_ENABLED);
    check("Enabled entered", state == MPS_ENABLED);
    expect_mit("Enabled", 0, 0, 0);
    mask[1][77] = 1'b1;
    send(2, 96'h0 | (96'h1 << 77), 32'h30);
    check("masked NOK ignored", state == MPS_ENABLED && !err_latched);
    send(0, '1, 32'h31);
    check("address 0 ignored", state == MPS_ENABLED && bad_addr);
    send(9, '1, 32'h32);
    check("address 9 ignored", state == MPS_ENABLED && bad_addr);

    // trip: state and mitigations change at the edge that takes pkt_valid
    pkt = '{addr: 8'd6, version: 8'h01, evt: 8'h02, ts: 32'hCAFE_0001,
            io: (96'h1 << 95) | (96'h1 << 12)};
    mask[5][12] = 1'b1;
    pkt_valid = 1'b1;
    ts_at = master_ts;
    @(negedge clk);
    pkt_valid = 1'b0;
    check("trip to Fault in one clock", state == MPS_FAULT);
    expect_mit("Fault", 1, 1, 1);
    check("fault record", fault_valid && fault_addr == 8'd6 &&
          fault_io == (96'h1 << 95) && fault_slave_ts == 32'hCAFE_0001 &&
          fault_master_ts == ts_at);
    send(7, 96'h8, 32'h40);
    check("record keeps first fault", fault_addr == 8'd6);
    command(MPS_ENABLED);
    check("Fault: Enabled command ignored", state == MPS_FAULT);
    command(MPS_DISABLED);
    check("Fault: Disabled command ignored", state == MPS_FAULT && fault_valid);
    command(MPS_MONITOR);
    check("Fault -> Monitor-only", state == MPS_MONITOR && !fault_valid);
    expect_mit("Monitor after Fault", 1, 1, 0);
    command(MPS_FAULT);
    check("Fault command ignored", state == MPS_MONITOR);
    command(MPS_DISABLED);
    check("Disabled clears latches", state == MPS_DISABLED && slave_err == '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
