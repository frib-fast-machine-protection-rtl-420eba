// slave_fifo: first-word-fall-through FIFO of a slave node.
//
// Holds the bytes that arrive from the downstream slaves while this slave is
// still sending its own data package, so they can be forwarded to the master
// after it. `dout` shows the oldest word whenever `empty` is low; `pop`
// removes it. A push into a full FIFO is dropped and sets the sticky
// `overflow` flag (cleared only by reset). The FIFO is written as a memory
// array with a power-of-two depth. The document names the FIFO; its depth,
// width and overflow handling are this design's choice.
module slave_fifo #(
  parameter int WIDTH = 9,
  parameter int DEPTH = 256
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full,
  output logic             overflow
);

  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wr_q, rd_q;
  logic             do_push, do_pop;

  assign empty   = (wr_q == rd_q);
  assign full    = (wr_q[AW-1:0] == rd_q[AW-1:0]) && (wr_q[AW] != rd_q[AW]);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rd_q[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_q[AW-1:0]] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_q     <= '0;
      rd_q     <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_push) wr_q <= wr_q + 1'b1;
      if (do_pop)  rd_q <= rd_q + 1'b1;
      if (push && full) overflow <= 1'b1;
    end
  end

endmodule
