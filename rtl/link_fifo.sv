// link_fifo: receive buffer at the end of a valid/credit link.
//
// Every link in the fabric uses credit-based flow control: the sender starts
// with DEPTH credits, spends one per token it sends and may send only while it
// holds a credit; this buffer hands a credit back (a one-cycle pulse on
// credit_o) each time an entry is popped. A token written in cycle t is visible
// at the head in cycle t+1, which gives a switch hop its one cycle of latency.
// Pushing into a full buffer breaks the credit rule and is flagged by an
// assertion. The depth is this design's choice; the document gives none.
module link_fifo
  import dyser_pkg::*;
#(
  parameter int DEPTH = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  link_t in_i,      // valid = push
  input  logic  pop_i,     // consume the head (ignored when empty)
  output link_t head_o,    // valid = not empty
  output logic  credit_o   // one credit returned to the sender
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  link_t             mem [DEPTH];
  logic [AW-1:0]     rd_ptr, wr_ptr;
  logic [AW:0]       count;
  logic              do_pop, do_push;

  assign do_pop  = pop_i && (count != 0);
  assign do_push = in_i.valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) begin
        mem[wr_ptr] <= in_i;
        wr_ptr      <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      end
      if (do_pop) rd_ptr <= (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  always_comb begin
    head_o       = mem[rd_ptr];
    head_o.valid = (count != 0);
  end

  assign credit_o = do_pop;

  // The sender must never send without a credit.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    !(do_push && !do_pop && count == (AW+1)'(DEPTH)));

endmodule
