// flit_fifo -- one virtual-channel flit buffer of an input port.
//
// A DEPTH-entry first-in first-out queue of flits, written in the buffer
// write (BW) stage and read when the VC wins switch allocation.  The published design
// shows one such buffer per VC and one for the SVC but gives no depth; the
// depth of 4 and the register-array implementation are this design's choice.
//
// Interface: push writes din at the clock edge; pop removes the entry shown
// on dout (valid while empty is low).  Push and pop may happen in the same
// cycle.  Pushing when full or popping when empty is an error (the credit
// protocol prevents it) and is flagged by assertions.
module flit_fifo
  import slide_pkg::*;
#(
  parameter int unsigned DEPTH = BUF_DEPTH
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push,
  input  flit_t din,
  input  logic  pop,
  output flit_t dout,
  output logic  empty,
  output logic  full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned CW = $clog2(DEPTH+1);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  flit_t         mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;

  assign empty = (count == '0);
  assign full  = (count == CW'(DEPTH));
  assign dout  = mem[rd_ptr];

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= inc(wr_ptr);
      if (pop)  rd_ptr <= inc(rd_ptr);
      count <= count + CW'(push) - CW'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= din;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);
endmodule
