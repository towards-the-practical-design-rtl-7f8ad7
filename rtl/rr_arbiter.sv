// rr_arbiter -- N-input round-robin arbiter.
//
// Used twice in the router: as the (V+1):1 arbiter that picks which VC
// buffer of an input port drives the input multiplexer (SA-I), and as the
// 5:1 arbiter that picks which input port drives an output port (SA-II).
// The published design names both arbiters but not their policy; round robin is this
// implementation's choice.
//
// Interface: req is a request vector, grant is one-hot (or zero) and is
// combinational in req.  When update is high and a grant is given, the
// priority pointer moves to the input after the winner at the next clock,
// so the winner has the lowest priority on the following arbitration.
module rr_arbiter #(
  parameter int unsigned N = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         update,
  output logic [N-1:0] grant
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;
  logic [IW-1:0] ptr;   // input with the highest priority

  always_comb begin
    grant = '0;
    for (int unsigned k = 0; k < N; k++) begin
      logic [IW-1:0] idx;
      idx = IW'((int'(ptr) + k) % N);
      if (grant == '0 && req[idx]) grant[idx] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0;
    end else if (update && grant != '0) begin
      for (int unsigned i = 0; i < N; i++)
        if (grant[i]) ptr <= IW'((i + 1) % N);
    end
  end
endmodule
