// slave_io_latch: OK/NOK input latch of an FPS slave.
//
// Each of the N_IO device inputs is OK when high and NOK when low (a broken
// cable then reads as NOK). The inputs are first passed through a
// SYNC_STAGES-deep synchroniser. A NOK seen for even one clock is latched
// until a data package has carried it to the master: `snap` marks the cycle
// in which the slave takes its snapshot for a package, and `snap_nok` /
// `snap_ts` are the values valid in that cycle (combinational). `snap_nok` is
// the latched NOK bits OR'ed with the present ones, so a NOK that arrives in
// the snapshot cycle itself is not lost. After the snapshot the latch starts
// again from empty.
//
// If an error was latched, `snap_ts` is the time stamp of the first error
// since the previous snapshot; otherwise it is the present time stamp. Both
// the latch-until-sent rule and the error time stamp follow the system
// description; the synchroniser and its depth are this design's choice.
module slave_io_latch #(
  parameter int N_IO        = 96,
  parameter int TS_BITS     = 32,
  parameter int SYNC_STAGES = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N_IO-1:0]    io_ok,       // asynchronous, 1 = OK
  input  logic [TS_BITS-1:0] timestamp,
  input  logic               snap,
  output logic [N_IO-1:0]    snap_nok,    // 1 = NOK
  output logic [TS_BITS-1:0] snap_ts,
  output logic               err_pending
);

  logic [N_IO-1:0]    sync_q [SYNC_STAGES];
  logic [N_IO-1:0]    nok_now;
  logic [N_IO-1:0]    latch_q;
  logic [TS_BITS-1:0] err_ts_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SYNC_STAGES; s++) sync_q[s] <= '1;
    end else begin
      sync_q[0] <= io_ok;
      for (int s = 1; s < SYNC_STAGES; s++) sync_q[s] <= sync_q[s-1];
    end
  end

  assign nok_now = ~sync_q[SYNC_STAGES-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      latch_q     <= '0;
      err_pending <= 1'b0;
      err_ts_q    <= '0;
    end else if (snap) begin
      latch_q     <= '0;
      err_pending <= 1'b0;
    end else begin
      latch_q <= latch_q | nok_now;
      if (!err_pending && (|nok_now)) begin
        err_pending <= 1'b1;
        err_ts_q    <= timestamp;
      end
    end
  end

  assign snap_nok = latch_q | nok_now;
  assign snap_ts  = err_pending ? err_ts_q : timestamp;

endmodule
