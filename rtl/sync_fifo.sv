// sync_fifo: synchronous first-in first-out queue used by the input and
// output FUs to queue descriptors of received and outgoing packets.
//
// DEPTH entries of WIDTH bits. The head entry is visible on dout_o while the
// queue is not empty (first-word fall-through). push_i writes din_i and pop_i
// drops the head on the same rising edge; a push to a full queue and a pop from
// an empty one are ignored (and flagged by assertions). count_o is the fill
// level. Asynchronous active-low reset empties the queue.
module sync_fifo #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 50
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push_i,
  input  logic [WIDTH-1:0]         din_i,
  input  logic                     pop_i,
  output logic [WIDTH-1:0]         dout_o,
  output logic                     empty_o,
  output logic                     full_o,
  output logic [$clog2(DEPTH+1)-1:0] count_o
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd_q, wr_q;
  logic             do_push, do_pop;

  assign empty_o = (count_o == '0);
  assign full_o  = (count_o == ($clog2(DEPTH+1))'(DEPTH));
  assign do_push = push_i && !full_o;
  assign do_pop  = pop_i && !empty_o;
  assign dout_o  = mem[rd_q];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q    <= '0;
      wr_q    <= '0;
      count_o <= '0;
    end else begin
      if (do_push) wr_q <= inc(wr_q);
      if (do_pop)  rd_q <= inc(rd_q);
      if (do_push && !do_pop) count_o <= count_o + 1'b1;
      else if (do_pop && !do_push) count_o <= count_o - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_q] <= din_i;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push_i && full_o))
    else $error("sync_fifo: push to a full queue");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop_i && empty_o))
    else $error("sync_fifo: pop from an empty queue");
endmodule
