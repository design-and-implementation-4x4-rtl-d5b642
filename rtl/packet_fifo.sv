// packet_fifo: synchronous first-in first-out buffer used for the router's
// input and output buffers.
//
// DEPTH entries of WIDTH bits in a register array with read and write
// pointers and an occupancy count. A push and a pop may happen in the same
// cycle, also when the buffer is full (the popped slot is refilled). dout
// shows the oldest entry whenever empty is low (first-word fall-through), so
// a consumer can look at the head and pop it in the same cycle. full, empty
// and count come from registers only. The paper asks for buffers at the
// router's inputs and outputs but gives neither depth nor organisation; the
// depth of 4 is this design's choice. Reset is asynchronous, active low.
module packet_fifo #(
  parameter int WIDTH = noc_pkg::PKT_W,
  parameter int DEPTH = 4
) (
  input  logic             clk,
  input  logic             nreset,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_push, do_pop;

  assign empty   = (count == 0);
  assign full    = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign dout    = mem[rptr];

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge nreset) begin
    if (!nreset) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      if (do_push) begin
        mem[wptr] <= din;
        wptr      <= next_ptr(wptr);
      end
      if (do_pop) rptr <= next_ptr(rptr);
      count <= count + $bits(count)'(do_push) - $bits(count)'(do_pop);
    end
  end

  // A writer must respect full: a push into a full buffer without a
  // simultaneous pop would lose a packet.
  a_no_overflow: assert property (@(posedge clk) disable iff (!nreset)
    !(push && full && !pop))
    else $error("packet_fifo: push into a full buffer");

endmodule
