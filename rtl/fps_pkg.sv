// fps_pkg: types and constants shared by the fast protection system (FPS)
// master and slave nodes.
//
// The daisy-chain link between nodes is modelled at the byte level, the way
// it looks on the parallel side of a serial transceiver: one byte per clock,
// a flag that marks it as a control (K) character, and a valid flag (an idle
// link has valid = 0). Frame delimiters use the usual 8b/10b control code
// points; the exact codes are a choice of this design.
//
// Query frame (master -> slaves, 4 bytes):
//   SYNC(K) QRY(K) event_code EOF(K)
// Data package (slave -> master, 23 bytes), in the field order the system
// defines: sync code, start of frame, slave address, version, master request
// event code, time stamp, 96 I/O status bits, checksum, end of frame:
//   SYNC(K) SOF(K) addr version event ts[31:24] ts[23:16] ts[15:8] ts[7:0]
//   io[7:0] io[15:8] ... io[95:88] checksum EOF(K)
// The checksum is the 8-bit sum of the 19 payload bytes (addr .. io[95:88]).
// An I/O status bit of 1 means NOK (fault). The time stamp width (32 bits,
// in ticks of the 8 ns system clock) is a choice of this design.
package fps_pkg;

  localparam int IO_BITS     = 96;
  localparam int IO_BYTES    = IO_BITS / 8;
  localparam int TS_BITS     = 32;
  localparam int TS_BYTES    = TS_BITS / 8;
  localparam int PAYLOAD_LEN = 3 + TS_BYTES + IO_BYTES;  // 19
  localparam int PKT_LEN     = 2 + PAYLOAD_LEN + 2;      // 23
  localparam int QRY_LEN     = 4;

  localparam logic [7:0] K_SYNC = 8'hBC;  // K28.5
  localparam logic [7:0] K_QRY  = 8'h3C;  // K28.1
  localparam logic [7:0] K_SOF  = 8'hFB;  // K27.7
  localparam logic [7:0] K_EOF  = 8'hFD;  // K29.7

  // One byte lane of a daisy-chain link.
  typedef struct packed {
    logic       valid;
    logic       k;
    logic [7:0] data;
  } link_t;

  localparam link_t LINK_IDLE = '{valid: 1'b0, k: 1'b0, data: 8'h00};

  // MPS operation states. The master sends the state as the event code of
  // each query so every slave knows it.
  typedef enum logic [1:0] {
    MPS_DISABLED = 2'd0,
    MPS_MONITOR  = 2'd1,
    MPS_ENABLED  = 2'd2,
    MPS_FAULT    = 2'd3
  } mps_state_t;

  // Decoded contents of one slave data package.
  typedef struct packed {
    logic [7:0]         addr;
    logic [7:0]         version;
    logic [7:0]         evt;
    logic [TS_BITS-1:0] ts;
    logic [IO_BITS-1:0] io;   // 1 = NOK
  } slave_pkt_t;

  function automatic link_t k_byte(logic [7:0] code);
    return '{valid: 1'b1, k: 1'b1, data: code};
  endfunction

  function automatic link_t d_byte(logic [7:0] value);
    return '{valid: 1'b1, k: 1'b0, data: value};
  endfunction

  // Payload byte i (0 .. PAYLOAD_LEN-1) of a package.
  function automatic logic [7:0] payload_byte(slave_pkt_t p, int unsigned i);
    logic [7:0] b;
    if (i == 0)                b = p.addr;
    else if (i == 1)           b = p.version;
    else if (i == 2)           b = p.evt;
    else if (i < 3 + TS_BYTES) b = p.ts[8*(TS_BYTES-1-(i-3)) +: 8];
    else                       b = p.io[8*(i-3-TS_BYTES) +: 8];
    return b;
  endfunction

endpackage
