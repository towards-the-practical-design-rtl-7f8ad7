// slide_router -- SlideAcross: adaptive virtual-channel router with
// single-cycle intra-dimension bypass datapaths.
//
// Two datapaths share the output links.  The adaptive datapath is a
// three-stage VC router: buffer write (with bypassing control in front of
// it), switch allocation in two steps (SA-I per input, SA-II per output)
// with VC allocation appended in the same cycle, and switch traversal into
// the output link register.  The crossbar is built, as in the published design, from
// input multiplexers (Mux1) and output multiplexers; minimal fully adaptive
// routing picks the less congested productive port.  The bypass datapath
// connects each directional input straight to the opposite output's Mux2 and
// is used by flits in the slide virtual channel (SVC) when the output is not
// needed by the crossbar: such a flit spends one cycle in the router.
//
// Deadlock freedom, as the published design argues it, rests on three rules this RTL
// enforces: packets keep the VC given at injection (VC0 for destinations to
// the west, VC1 to the east, see net_iface); routing is minimal; and a head
// flit is tagged SVC only when the downstream SVC buffer is empty and
// unowned, so an SVC never holds more than one packet.
//
// Interface: per port an incoming link (valid + flit) with its credit return,
// and an outgoing link with the credits coming back.  Port order is Local,
// North, East, South, West (slide_pkg::port_e).  Latency per hop: 1 cycle on
// the bypass path, 3 cycles on the buffered path (zero load).
module slide_router
  import slide_pkg::*;
#(
  parameter int unsigned X_POS = 0,
  parameter int unsigned Y_POS = 0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  link_t   [NPORT-1:0]   in_link,
  output credit_t [NPORT-1:0]   credit_out,
  output link_t   [NPORT-1:0]   out_link,
  input  credit_t [NPORT-1:0]   credit_in,
  output router_ev_t            ev
);
  localparam logic [XW-1:0] CUR_X = XW'(X_POS);
  localparam logic [YW-1:0] CUR_Y = YW'(Y_POS);

  // output-port state
  logic [NPORT-1:0][NUM_VC-1:0]          o_vc_idle, o_vc_credit_ok;
  logic [NPORT-1:0][NUM_VC-1:0][CRW-1:0] o_vc_credits;
  logic [NPORT-1:0]                      o_svc_idle, o_svc_credit_ok, o_st_busy, o_svc_tag;
  logic [NPORT-1:0][NPORT-1:0]           grant;       // [output][input]
  logic [NPORT-1:0]                      grant_svc;
  // input-port requests
  logic  [NPORT-1:0] i_req_valid, i_alloc_svc, i_byp_valid, i_byp_head;
  port_e [NPORT-1:0] i_req_port;
  flit_t [NPORT-1:0] i_req_flit, i_byp_flit;
  logic  [NPORT-1:0] i_detour, i_buffered, i_stall;

  for (genvar p = 0; p < NPORT; p++) begin : g_in
    logic [NPORT-1:0] grant_col;
    for (genvar o = 0; o < NPORT; o++) begin : g_col
      assign grant_col[o] = grant[o][p];
    end
    input_unit #(.IN_PORT(port_e'(p))) u_in (
      .clk, .rst_n, .cur_x(CUR_X), .cur_y(CUR_Y),
      .in_link(in_link[p]), .credit_out(credit_out[p]),
      .o_vc_idle, .o_vc_credits, .o_vc_credit_ok, .o_svc_idle, .o_svc_credit_ok, .o_st_busy,
      .grant_in(grant_col), .grant_svc_in(grant_svc),
      .req_valid(i_req_valid[p]), .req_port(i_req_port[p]), .req_flit(i_req_flit[p]),
      .req_alloc_svc(i_alloc_svc[p]),
      .byp_valid(i_byp_valid[p]), .byp_head(i_byp_head[p]), .byp_flit(i_byp_flit[p]),
      .ev_detour(i_detour[p]), .ev_buffered(i_buffered[p]), .ev_stall(i_stall[p])
    );
  end

  for (genvar o = 0; o < NPORT; o++) begin : g_out
    localparam port_e OPP = opposite(port_e'(o));
    logic [NPORT-1:0] req;
    for (genvar p = 0; p < NPORT; p++) begin : g_req
      assign req[p] = i_req_valid[p] && (i_req_port[p] == port_e'(o));
    end
    logic byp_v;
    assign byp_v = (o != int'(P_LOCAL)) && i_byp_valid[OPP];
    output_unit #(.OUT_PORT(port_e'(o))) u_out (
      .clk, .rst_n,
      .req, .req_flit(i_req_flit), .req_alloc_svc(i_alloc_svc),
      .grant(grant[o]), .grant_svc(grant_svc[o]),
      .byp_valid(byp_v), .byp_head(i_byp_head[OPP]), .byp_flit(i_byp_flit[OPP]),
      .out_link(out_link[o]), .credit_in(credit_in[o]),
      .vc_idle(o_vc_idle[o]), .vc_credits(o_vc_credits[o]), .vc_credit_ok(o_vc_credit_ok[o]),
      .svc_idle(o_svc_idle[o]), .svc_credit_ok(o_svc_credit_ok[o]), .st_busy(o_st_busy[o]),
      .ev_svc_tag(o_svc_tag[o])
    );
  end

  assign ev.bypass   = |i_byp_valid;
  assign ev.svc_tag  = |o_svc_tag;
  assign ev.buffered = |i_buffered;
  assign ev.detour   = |i_detour;
  assign ev.sa_stall = |i_stall;
endmodule
