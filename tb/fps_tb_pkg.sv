// fps_tb_pkg: reference model of the FPS link frames, for the testbenches.
//
// Builds the expected byte sequence of a slave data package and of a master
// query straight from the frame layout (sync, SOF, address, version, event,
// time stamp MSB first, I/O status io[7:0] first, 8-bit sum checksum, EOF),
// written separately from the RTL serialiser and parser.
package fps_tb_pkg;
  import fps_pkg::*;

  // {k, data} per byte
  typedef logic [8:0] word_t;
  typedef word_t frame_t [PKT_LEN];

  function automatic frame_t ref_package(logic [7:0] addr, logic [7:0] ver,
                                         logic [7:0] evt, logic [31:0] ts,
                                         logic [95:0] io);
    frame_t     f;
    logic [7:0] sum;
    f[0] = {1'b1, 8'hBC};
    f[1] = {1'b1, 8'hFB};
    f[2] = {1'b0, addr};
    f[3] = {1'b0, ver};
    f[4] = {1'b0, evt};
    f[5] = {1'b0, ts[31:24]};
    f[6] = {1'b0, ts[23:16]};
    f[7] = {1'b0, ts[15:8]};
    f[8] = {1'b0, ts[7:0]};
    for (int b = 0; b < 12; b++) f[9+b] = {1'b0, io[8*b +: 8]};
    sum = 8'd0;
    for (int j = 2; j <= 20; j++) sum = sum + f[j][7:0];
    f[21] = {1'b0, sum};
    f[22] = {1'b1, 8'hFD};
    return f;
  endfunction

  function automatic logic [95:0] rand96();
    return {$urandom(), $urandom(), $urandom()};
  endfunction

endpackage
