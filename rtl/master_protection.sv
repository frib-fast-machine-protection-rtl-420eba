// master_protection: MPS operation-state machine and mitigation outputs.
//
// Four operation states (fps_pkg::mps_state_t):
//   Disabled     sensors not monitored; mitigations A and B active.
//   Monitor-only sensors monitored; A and B active whatever the inputs.
//   Enabled      sensors monitored; all mitigations released while no NOK
//                is seen; the first unmasked NOK moves the machine to Fault.
//   Fault        A, B and C active. The fault (source slave, its I/O bits
//                and its time stamp) is latched together with the master
//                time stamp of the cycle the package was accepted.
// Mitigation A removes the E-bend high voltage, B trips the LEBT chopper and
// C disables the ion-source extraction high voltage; an output is 1 while
// the mitigation is activated.
//
// Each accepted package (pkt_valid) comes from slave `pkt.addr`, 1 ..
// N_SLAVES; its I/O bits are AND'ed with the inverse of that slave's mask row
// (mask bit 1 = input ignored). In Monitor-only and Enabled the result is
// held per slave in `slave_err` until the next package of that slave, and
// `err_latched` is their OR. Packages with an address out of range pulse
// `bad_addr` and are ignored.
//
// Operator commands (`cmd_valid`, `cmd_state`) select Disabled,
// Monitor-only or Enabled. A command for Fault is ignored; in Fault only the
// command for Monitor-only is obeyed, which also clears the fault record.
// Timing: the state and the mitigation outputs change on the clock edge
// after pkt_valid (or cmd_valid). Reset enters Disabled.
//
// The four states, the mitigation sets and the latching follow the system
// description; the command interface, the masks' form and which exits from
// Fault are allowed are this design's choices.
module master_protection
  import fps_pkg::*;
#(
  parameter int N_SLAVES = 8
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              pkt_valid,
  input  slave_pkt_t                        pkt,
  input  logic                              cmd_valid,
  input  mps_state_t                        cmd_state,
  input  logic [N_SLAVES-1:0][IO_BITS-1:0]  mask,
  input  logic [TS_BITS-1:0]                master_ts,
  output mps_state_t                        state,
  output logic                              mit_a,
  output logic                              mit_b,
  output logic                              mit_c,
  output logic [N_SLAVES-1:0]               slave_err,
  output logic                              err_latched,
  output logic                              fault_valid,
  output logic [7:0]                        fault_addr,
  output logic [IO_BITS-1:0]                fault_io,
  output logic [TS_BITS-1:0]                fault_slave_ts,
  output logic [TS_BITS-1:0]                fault_master_ts,
  output logic                              bad_addr
);

  localparam int IW = (N_SLAVES > 1) ? $clog2(N_SLAVES) : 1;

  mps_state_t         st_q, st_d;
  logic               addr_ok;
  logic [IO_BITS-1:0] nok;
  logic [7:0]         idx;
  logic               trip;

  assign addr_ok = (pkt.addr != 8'd0) && (32'(pkt.addr) <= N_SLAVES);
  assign idx     = pkt.addr - 8'd1;
  assign nok     = addr_ok ? (pkt.io & ~mask[idx[IW-1:0]]) : '0;
  assign trip    = pkt_valid && addr_ok && (|nok) && (st_q == MPS_ENABLED);

  always_comb begin
    st_d = st_q;
    if (trip) begin
      st_d = MPS_FAULT;
    end else if (cmd_valid) begin
      if (st_q == MPS_FAULT) begin
        if (cmd_state == MPS_MONITOR) st_d = MPS_MONITOR;
      end else if (cmd_state != MPS_FAULT) begin
        st_d = cmd_state;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q            <= MPS_DISABLED;
      mit_a           <= 1'b1;
      mit_b           <= 1'b1;
      mit_c           <= 1'b0;
      slave_err       <= '0;
      fault_valid     <= 1'b0;
      fault_addr      <= '0;
      fault_io        <= '0;
      fault_slave_ts  <= '0;
      fault_master_ts <= '0;
      bad_addr        <= 1'b0;
    end else begin
      st_q     <= st_d;
      mit_a    <= (st_d != MPS_ENABLED);
      mit_b    <= (st_d != MPS_ENABLED);
      mit_c    <= (st_d == MPS_FAULT);
      bad_addr <= pkt_valid && !addr_ok;

      if (st_d == MPS_DISABLED) begin
        slave_err <= '0;
      end else if (pkt_valid && addr_ok) begin
        slave_err[idx[IW-1:0]] <= |nok;
      end

      if (trip) begin
        fault_valid     <= 1'b1;
        fault_addr      <= pkt.addr;
        fault_io        <= nok;
        fault_slave_ts  <= pkt.ts;
        fault_master_ts <= master_ts;
      end else if (st_q == MPS_FAULT && st_d == MPS_MONITOR) begin
        fault_valid <= 1'b0;
      end
    end
  end

  assign state       = st_q;
  assign err_latched = |slave_err;

  // Mitigations C is only ever active together with A and B.
  a_c_implies_ab: assert property (@(posedge clk) disable iff (!rst_n)
    mit_c |-> (mit_a && mit_b));

endmodule
