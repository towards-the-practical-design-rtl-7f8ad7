// route_select -- minimal fully adaptive route computation with the
// selection unit of a SlideAcross input port.
//
// From the current router position and the destination of a head flit it
// forms the set of productive output ports (at most one in X and one in Y;
// Local when both coordinates match).  When two ports are productive the
// selection unit masks the congested one: a port is congested when the
// packet's VC there is not idle (owned by another packet or out of credits).
// If both or neither are congested, the port with more free credits for the
// packet's VC wins, X on a tie.  Masking congested ports follows the
// document; the credit comparison as tie-break is this design's choice.
//
// Purely combinational.  detour is high when X was productive but Y chosen.
module route_select
  import slide_pkg::*;
(
  input  logic [XW-1:0]  cur_x,
  input  logic [YW-1:0]  cur_y,
  input  logic [XW-1:0]  dst_x,
  input  logic [YW-1:0]  dst_y,
  // state of the packet's VC at each output port
  input  logic [NPORT-1:0]          vc_idle,
  input  logic [NPORT-1:0][CRW-1:0] vc_credits,
  output port_e          out_port,
  output logic           detour
);
  port_e px, py;
  logic  has_x, has_y;

  always_comb begin
    has_x = (dst_x != cur_x);
    has_y = (dst_y != cur_y);
    px    = (dst_x > cur_x) ? P_EAST  : P_WEST;
    py    = (dst_y > cur_y) ? P_NORTH : P_SOUTH;
    detour = 1'b0;
    if (has_x && has_y) begin
      if (vc_idle[px] && !vc_idle[py])       out_port = px;
      else if (vc_idle[py] && !vc_idle[px])  out_port = py;
      else if (vc_credits[py] > vc_credits[px]) out_port = py;
      else                                   out_port = px;
      detour = (out_port == py);
    end else if (has_x) begin
      out_port = px;
    end else if (has_y) begin
      out_port = py;
    end else begin
      out_port = P_LOCAL;
    end
  end
endmodule
