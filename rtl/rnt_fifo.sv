// rnt_fifo: input-port flit buffer of a 3D RNT switch.
//
// A circular buffer of DEPTH entries of WIDTH bits with separate read and
// write pointers and an occupancy counter. dout shows the oldest entry
// (first-word fall-through); push and pop may happen in the same cycle,
// also when the buffer is full (the pop frees the slot the push takes).
// A push while full without a pop, or a pop while empty, is ignored and
// flagged by an assertion.
//
// Timing: a word pushed at a clock edge is visible on dout after that edge.
// Reset is synchronous and active high and empties the buffer.
//
// The default depth of 4 flits per input gives 20 flits = 200 bytes of
// 10-byte flits for a five-port switch, the switch buffer size used for the
// packet-level simulation; how that total is divided over the inputs is this
// design's choice.
module rnt_fifo #(
  parameter int WIDTH = 82,
  parameter int DEPTH = 4
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             full,
  output logic             empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd_ptr, wr_ptr;
  logic             do_push, do_pop;

  assign full    = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign empty   = (count == '0);
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign dout    = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (reset) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= din;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (reset)
                                  !(push && full && !pop))
    else $error("rnt_fifo: push while full");
  a_no_underflow: assert property (@(posedge clk) disable iff (reset) !(pop && empty))
    else $error("rnt_fifo: pop while empty");

endmodule
