// arx_fifo: output FIFO of the custom ARX core, between the output adders
// and the OP-Bus.
//
// A push (FIFOC) writes the four words Z0..Z3 of one result at once; the
// FIFO hands them out one word per pop, Z0 first, on op_bus with op_valid
// high while it is not empty.  room is high when four more words fit, and a
// push without room is ignored (the control unit waits for room).  DEPTH
// words, a power of two of at least four.  A FIFO between the adders and the
// OP-Bus is in the published design; its depth, widths and handshake are this
// design's choices.
module arx_fifo
  import pi_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push,
  input  quad_t din,
  input  logic  pop,
  output word_t op_bus,
  output logic  op_valid,
  output logic  room
);
  localparam int unsigned AW = $clog2(DEPTH);

  word_t         mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic [AW:0]   count;
  logic          do_push, do_pop;

  assign room     = (count <= (AW+1)'(DEPTH - 4));
  assign op_valid = (count != '0);
  assign op_bus   = mem[rd_ptr];
  assign do_push  = push & room;
  assign do_pop   = pop & op_valid;

  always_ff @(posedge clk) begin
    if (do_push) begin
      for (int k = 0; k < 4; k++) mem[wr_ptr + AW'(k)] <= din[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= wr_ptr + AW'(4);
      if (do_pop)  rd_ptr <= rd_ptr + AW'(1);
      count <= count + (do_push ? (AW+1)'(4) : '0) - (do_pop ? (AW+1)'(1) : '0);
    end
  end

  initial assert (DEPTH >= 4 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("arx_fifo: DEPTH must be a power of two of at least 4");
endmodule
