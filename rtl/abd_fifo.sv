// abd_fifo: synchronous first-in first-out buffer of DEPTH entries of type T.
//
// push writes din when the buffer is not full; pop removes the head (dout is
// the head whenever empty is low). A push while full is refused, which the
// users of this FIFO treat as a dropped network message. Push and pop in the
// same cycle are allowed. Registered count, read of the head is
// combinational.
module abd_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic flush,
  input  logic push,
  input  T     din,
  input  logic pop,
  output T     dout,
  output logic full,
  output logic empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  T              mem [DEPTH];
  logic [AW-1:0] rd_q, wr_q;
  logic [AW:0]   cnt_q;
  logic          do_push, do_pop;

  assign full    = (cnt_q == (AW+1)'(DEPTH));
  assign empty   = (cnt_q == '0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rd_q];

  always_ff @(posedge clk) if (do_push) mem[wr_q] <= din;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q <= '0; wr_q <= '0; cnt_q <= '0;
    end else if (flush) begin
      rd_q <= '0; wr_q <= '0; cnt_q <= '0;
    end else begin
      if (do_push) wr_q <= (wr_q == AW'(DEPTH-1)) ? '0 : wr_q + AW'(1);
      if (do_pop)  rd_q <= (rd_q == AW'(DEPTH-1)) ? '0 : rd_q + AW'(1);
      cnt_q <= cnt_q + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

endmodule
