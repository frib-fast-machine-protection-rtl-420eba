// master_frame_rx: receiver and checker of slave data packages.
//
// Watches the byte stream that arrives at the master from the first slave
// and decodes each 23-byte data package (layout in fps_pkg). Idle cycles
// (valid = 0) may appear anywhere and are skipped. The parser hunts for a
// SYNC control byte followed by SOF, collects the 19 payload bytes while
// summing them, compares the checksum byte and requires EOF.
//
// Outputs are registered and last one clock: `pkt_valid` with the decoded
// `pkt` the clock after a good EOF byte; `cks_err` instead when the checksum
// does not match; `frame_err` when the framing is broken (a control byte
// inside the payload, or a missing SOF/EOF). A bad package is dropped.
// Checking the checksum follows the system's package format; the reaction
// to a bad package is this design's choice.
module master_frame_rx
  import fps_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  link_t      rx,
  output logic       pkt_valid,
  output slave_pkt_t pkt,
  output logic       cks_err,
  output logic       frame_err
);

  typedef enum logic [2:0] {S_HUNT, S_SOF, S_DATA, S_CKS, S_EOF} rx_state_t;

  rx_state_t                    st_q;
  logic [4:0]                   cnt_q;
  logic [7:0]                   sum_q;
  logic                         cks_bad_q;
  logic [8*PAYLOAD_LEN-1:0]     sh_q;   // payload, first byte in the top

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q      <= S_HUNT;
      cnt_q     <= '0;
      sum_q     <= '0;
      cks_bad_q <= 1'b0;
      sh_q      <= '0;
      pkt_valid <= 1'b0;
      cks_err   <= 1'b0;
      frame_err <= 1'b0;
      pkt       <= '0;
    end else begin
      pkt_valid <= 1'b0;
      cks_err   <= 1'b0;
      frame_err <= 1'b0;
      if (rx.valid) begin
        unique case (st_q)
          S_HUNT: if (rx.k && rx.data == K_SYNC) st_q <= S_SOF;
          S_SOF: begin
            if (rx.k && rx.data == K_SOF) begin
              st_q  <= S_DATA;
              cnt_q <= '0;
              sum_q <= '0;
            end else if (!(rx.k && rx.data == K_SYNC)) begin
              st_q      <= S_HUNT;
              frame_err <= 1'b1;
            end
          end
          S_DATA: begin
            if (rx.k) begin
              st_q      <= S_HUNT;
              frame_err <= 1'b1;
            end else begin
              sh_q  <= {sh_q[8*PAYLOAD_LEN-9:0], rx.data};
              sum_q <= sum_q + rx.data;
              cnt_q <= cnt_q + 1'b1;
              if (cnt_q == 5'(PAYLOAD_LEN - 1)) st_q <= S_CKS;
            end
          end
          S_CKS: begin
            if (rx.k) begin
              st_q      <= S_HUNT;
              frame_err <= 1'b1;
            end else begin
              cks_bad_q <= (rx.data != sum_q);
              st_q      <= S_EOF;
            end
          end
          S_EOF: begin
            st_q <= S_HUNT;
            if (rx.k && rx.data == K_EOF) begin
              if (cks_bad_q) cks_err <= 1'b1;
              else begin
                pkt_valid   <= 1'b1;
                pkt.addr    <= sh_q[8*PAYLOAD_LEN-1 -: 8];
                pkt.version <= sh_q[8*PAYLOAD_LEN-9 -: 8];
                pkt.evt     <= sh_q[8*PAYLOAD_LEN-17 -: 8];
                pkt.ts      <= sh_q[8*PAYLOAD_LEN-25 -: TS_BITS];
                for (int i = 0; i < IO_BYTES; i++)
                  pkt.io[8*i +: 8] <= sh_q[8*(IO_BYTES-1-i) +: 8];
              end
            end else begin
              frame_err <= 1'b1;
            end
          end
          default: st_q <= S_HUNT;
        endcase
      end
    end
  end

  // At most one outcome per package.
  a_one_outcome: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({pkt_valid, cks_err, frame_err}));

endmodule
