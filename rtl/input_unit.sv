// input_unit -- one input port of the SlideAcross router.
//
// Holds the bypassing control (BC), one flit buffer per VC plus the SVC
// buffer, route computation with the selection unit for each buffer, the
// (V+1):1 input-multiplexer arbiter (SA-I), the input multiplexer Mux1 and
// the credit return to the upstream router.
//
// A flit arriving on the link is first offered to the bypass path (only SVC
// flits, see bypass_ctrl); otherwise it is written to the buffer named by its
// SVC tag and VC (BW).  For the flit at the front of each buffer a head flit
// computes its minimal adaptive output port (RC and selection); a body or
// tail flit reuses the port and downstream buffer its head was given.  A
// head flit requests only when its own VC at the chosen output is idle, as
// the published design's deterministic VC assignment requires; a body flit requests
// when the buffer allocated to its packet has a credit.  SA-I picks one
// requesting buffer; its flit goes to the output ports as the request for
// SA-II.  When SA-II grants it, the flit is popped and a credit returned.
// A bypassed flit never occupies a buffer, so its credit is returned at once.
//
// Timing: BW at the end of the arrival cycle t; RC, SA-I, SA-II and VA in
// cycle t+1 (combinational; the published design computes RC alongside BW, which has
// the same cycle count).  credit_out is combinational in the cycle a buffer
// slot is freed.
module input_unit
  import slide_pkg::*;
#(
  parameter port_e IN_PORT = P_WEST
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic [XW-1:0]                     cur_x,
  input  logic [YW-1:0]                     cur_y,
  input  link_t                             in_link,
  output credit_t                           credit_out,
  // state of all output ports
  input  logic [NPORT-1:0][NUM_VC-1:0]          o_vc_idle,
  input  logic [NPORT-1:0][NUM_VC-1:0][CRW-1:0] o_vc_credits,
  input  logic [NPORT-1:0][NUM_VC-1:0]          o_vc_credit_ok,
  input  logic [NPORT-1:0]                      o_svc_idle,
  input  logic [NPORT-1:0]                      o_svc_credit_ok,
  input  logic [NPORT-1:0]                      o_st_busy,
  input  logic [NPORT-1:0]                      grant_in,      // SA-II grant from each output
  input  logic [NPORT-1:0]                      grant_svc_in,  // SVC given by each output
  // request to SA-II
  output logic                              req_valid,
  output port_e                             req_port,
  output flit_t                             req_flit,
  output logic                              req_alloc_svc,
  // bypass path to the opposite output
  output logic                              byp_valid,
  output logic                              byp_head,
  output flit_t                             byp_flit,
  // events
  output logic                              ev_detour,
  output logic                              ev_buffered,
  output logic                              ev_stall
);
  localparam port_e OPP = opposite(IN_PORT);

  typedef struct packed {
    logic  active;    // a packet's head has left, its tail has not
    port_e out_port;
    logic  out_svc;   // the packet holds the downstream SVC
  } vc_state_t;

  vc_state_t [NUM_BUF-1:0] vstate;
  flit_t     [NUM_BUF-1:0] front;
  logic      [NUM_BUF-1:0] empty, push, pop;
  logic      [NUM_BUF-1:0] full_unused;   // the credit protocol keeps buffers from overflowing
  logic      [NUM_BUF-1:0][$clog2(BUF_DEPTH+1)-1:0] count_unused;  // occupancy is tracked by upstream credits
  logic      [NUM_BUF-1:0] cand_ok, cand_detour, sa1_grant;
  port_e     [NUM_BUF-1:0] cand_port, rs_port;
  logic      [NUM_BUF-1:0] rs_detour;
  logic                    granted;
  logic [1:0]              win;

  // ---------------- bypassing control ----------------
  bypass_ctrl #(.IN_PORT(IN_PORT)) u_bc (
    .clk, .rst_n, .in_link, .cur_x, .cur_y,
    .svc_buf_empty(empty[SVC_IDX]),
    .svc_idle_o   (o_svc_idle[OPP]),
    .svc_credit_o (o_svc_credit_ok[OPP]),
    .st_busy_o    (o_st_busy[OPP]),
    .bypass       (byp_valid),
    .bypass_head  (byp_head)
  );
  assign byp_flit = in_link.flit;

  // ---------------- buffers ----------------
  for (genvar b = 0; b < NUM_BUF; b++) begin : g_buf
    logic [NPORT-1:0]          rs_idle;
    logic [NPORT-1:0][CRW-1:0] rs_cred;

    assign push[b] = in_link.valid && !byp_valid &&
                     (in_link.flit.svc ? (b == SVC_IDX) : (b == int'(in_link.flit.vc) && b != SVC_IDX));

    flit_fifo u_fifo (
      .clk, .rst_n, .push(push[b]), .din(in_link.flit), .pop(pop[b]),
      .dout(front[b]), .empty(empty[b]), .full(full_unused[b]), .count(count_unused[b])
    );

    // route computation + selection for the packet's own VC
    always_comb begin
      for (int p = 0; p < NPORT; p++) begin
        rs_idle[p] = o_vc_idle[p][front[b].vc];
        rs_cred[p] = o_vc_credits[p][front[b].vc];
      end
    end

    route_select u_rs (
      .cur_x, .cur_y, .dst_x(front[b].dst_x), .dst_y(front[b].dst_y),
      .vc_idle(rs_idle), .vc_credits(rs_cred),
      .out_port(rs_port[b]), .detour(rs_detour[b])
    );

    always_comb begin
      if (front[b].head) begin
        cand_port[b]   = rs_port[b];
        cand_ok[b]     = !empty[b] && o_vc_idle[rs_port[b]][front[b].vc];
        cand_detour[b] = rs_detour[b];
      end else begin
        cand_port[b]   = vstate[b].out_port;
        cand_ok[b]     = !empty[b] && vstate[b].active &&
                         (vstate[b].out_svc ? o_svc_credit_ok[vstate[b].out_port]
                                            : o_vc_credit_ok[vstate[b].out_port][front[b].vc]);
        cand_detour[b] = 1'b0;
      end
    end
  end

  // ---------------- SA-I and Mux1 ----------------
  rr_arbiter #(.N(NUM_BUF)) u_sa1 (
    .clk, .rst_n, .req(cand_ok), .update(granted), .grant(sa1_grant)
  );

  always_comb begin
    win = 0;
    for (int b = 0; b < NUM_BUF; b++) if (sa1_grant[b]) win = 2'(b);
    req_valid     = (sa1_grant != '0);
    req_port      = cand_port[win];
    req_flit      = front[win];
    req_alloc_svc = vstate[win].out_svc;
  end

  always_comb begin
    granted       = req_valid && grant_in[req_port];
    pop           = '0;
    if (granted) pop[win] = 1'b1;
    credit_out    = pop;
    if (byp_valid) credit_out[SVC_IDX] = 1'b1;
    ev_detour     = granted && req_flit.head && cand_detour[win];
    ev_buffered   = granted;
    ev_stall      = req_valid && !granted;
  end

  // ---------------- per-buffer packet state ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vstate <= '0;
    end else begin
      if (granted) begin
        if (req_flit.head) begin
          vstate[win].active   <= !req_flit.tail;
          vstate[win].out_port <= req_port;
          vstate[win].out_svc  <= grant_svc_in[req_port];
        end else if (req_flit.tail) begin
          vstate[win].active   <= 1'b0;
        end
      end
      if (byp_valid) begin
        if (byp_head) begin
          vstate[SVC_IDX].active   <= !in_link.flit.tail;
          vstate[SVC_IDX].out_port <= OPP;
          vstate[SVC_IDX].out_svc  <= 1'b1;
        end else if (in_link.flit.tail) begin
          vstate[SVC_IDX].active   <= 1'b0;
        end
      end
    end
  end

  a_req_port_valid: assert property (@(posedge clk) disable iff (!rst_n)
                                     req_valid |-> req_port != IN_PORT);
endmodule
