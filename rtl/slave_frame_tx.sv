// slave_frame_tx: serialiser of a slave's own data package.
//
// A pulse on `start` (ignored while a package is going out; accepted again
// in the cycle its EOF byte is on `tx`) captures the package fields and
// sends the 23-byte package on `tx`, one byte per clock, beginning the cycle
// after `start`: sync code, start of frame, address, version, master request
// event code, 4 time-stamp bytes (most significant first), 12 I/O status
// bytes (io[7:0] first), checksum and end of frame. The checksum, the 8-bit
// sum of the 19 payload bytes, is accumulated while the bytes go out.
// `last` is high in the cycle the end-of-frame byte is on `tx`.
// The field order is the system's; byte order, checksum kind and codes are
// this design's choice (see fps_pkg).
module slave_frame_tx
  import fps_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [7:0]         addr,
  input  logic [7:0]         version,
  input  logic [7:0]         evt,
  input  logic [TS_BITS-1:0] ts,
  input  logic [IO_BITS-1:0] io_nok,
  output link_t              tx,
  output logic               busy,
  output logic               last
);

  slave_pkt_t pkt_q;
  logic [4:0] idx_q;      // index of the next byte to send
  logic       active_q;
  logic [7:0] sum_q;
  link_t      tx_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pkt_q    <= '0;
      idx_q    <= '0;
      active_q <= 1'b0;
      sum_q    <= '0;
      tx_q     <= LINK_IDLE;
    end else if (!active_q) begin
      tx_q <= LINK_IDLE;
      if (start) begin
        pkt_q    <= '{addr: addr, version: version, evt: evt, ts: ts, io: io_nok};
        active_q <= 1'b1;
        idx_q    <= 5'd1;
        sum_q    <= '0;
        tx_q     <= k_byte(K_SYNC);
      end
    end else begin
      idx_q <= idx_q + 5'd1;
      if (idx_q == 5'd1) begin
        tx_q <= k_byte(K_SOF);
      end else if (idx_q < 5'(2 + PAYLOAD_LEN)) begin
        tx_q  <= d_byte(payload_byte(pkt_q, 32'(idx_q) - 2));
        sum_q <= sum_q + payload_byte(pkt_q, 32'(idx_q) - 2);
      end else if (idx_q == 5'(2 + PAYLOAD_LEN)) begin
        tx_q <= d_byte(sum_q);
      end else begin
        tx_q     <= k_byte(K_EOF);
        active_q <= 1'b0;
      end
    end
  end

  assign tx   = tx_q;
  assign busy = active_q || tx_q.valid;
  assign last = tx_q.valid && tx_q.k && (tx_q.data == K_EOF);

endmodule
