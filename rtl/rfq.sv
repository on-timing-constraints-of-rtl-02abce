// rfq: Request FIFO Queue of a snooping node.
//
// A small, fast first-in first-out buffer between the snooper and the
// cache/AM controller. Snooped bus requests are written at the tail and the
// controller works on the head entry, so every node handles coherence requests
// in bus order. A full queue makes the snooper answer NAK so the request is
// retried. The buffer and its role follow the source design; the depth (the
// design draws a few slots but gives no number) and the circular-buffer
// implementation are this design's choice.
//
// Interface: push/push_data write the tail when not full; pop removes the
// head when not empty; head is valid whenever empty is low. A push and a pop
// in the same cycle are both performed. count/full/empty are registered
// state, so full can be read in the same cycle the snooper decides ACK/NAK.
module rfq #(
  parameter int unsigned WIDTH = 48,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] push_data,
  input  logic             pop,
  output logic [WIDTH-1:0] head,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    rd_ptr, wr_ptr;

  wire do_push = push && !full;
  wire do_pop  = pop && !empty;

  function automatic logic [PW-1:0] incr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= incr(wr_ptr);
      if (do_pop)  rd_ptr <= incr(rd_ptr);
      if (do_push && !do_pop)      count <= count + 1'b1;
      else if (do_pop && !do_push) count <= count - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= push_data;
  end

  assign head  = mem[rd_ptr];
  assign empty = (count == 0);
  assign full  = (count == ($clog2(DEPTH+1))'(DEPTH));

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) push |-> !full)
    else $error("rfq: push while full");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty)
    else $error("rfq: pop while empty");

endmodule
