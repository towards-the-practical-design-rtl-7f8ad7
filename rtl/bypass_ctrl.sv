// bypass_ctrl -- bypassing control (BC) of one SlideAcross input port.
//
// Each directional input port has a pre-set-up intra-dimension bypass path
// to the output on the opposite side (West input -> East output, and so on).
// Only flits tagged for the slide virtual channel (SVC) may use it, so the
// decision needs no VC decoding:
//   head flit : svc & (still off target in this dimension) & svc_idle[o]
//               & output o not claimed by the crossbar this cycle
//   body/tail : svc & the packet's head bypassed & output o free & an SVC
//               credit is available downstream
// The first two terms of the head rule are the published design's; "output not
// claimed" realises its rule that the bypass is connected only when the
// output received no switch-allocation request in the previous cycle.  The
// body/tail handling is the small state machine the published design mentions but
// does not give: it is this design's own.  A flit is never bypassed while the
// local SVC buffer holds flits, which keeps flits of a packet in order.
//
// Timing: the decision is combinational from the input link in the cycle the
// flit arrives; a bypassed flit is registered in the output link register at
// the end of that cycle, so it spends one cycle per router.
module bypass_ctrl
  import slide_pkg::*;
#(
  parameter port_e IN_PORT = P_WEST
) (
  input  logic          clk,
  input  logic          rst_n,
  input  link_t         in_link,
  input  logic [XW-1:0] cur_x,
  input  logic [YW-1:0] cur_y,
  input  logic          svc_buf_empty,  // local SVC buffer of this input
  input  logic          svc_idle_o,     // downstream SVC at output o unowned and empty
  input  logic          svc_credit_o,   // at least one SVC credit at output o
  input  logic          st_busy_o,      // crossbar drives output o this cycle
  output logic          bypass,
  output logic          bypass_head     // bypass of a head flit (SVC re-allocated)
);
  typedef enum logic {BC_IDLE, BC_ACTIVE} bc_state_e;
  bc_state_e state;

  localparam logic X_DIM = (IN_PORT == P_EAST) || (IN_PORT == P_WEST);
  localparam logic HAS_BYPASS = (IN_PORT != P_LOCAL);

  logic not_arrived;   // no overshoot: destination not yet reached in this dimension
  logic svc_flit;

  always_comb begin
    not_arrived = X_DIM ? (in_link.flit.dst_x != cur_x) : (in_link.flit.dst_y != cur_y);
    svc_flit    = HAS_BYPASS && in_link.valid && in_link.flit.svc && svc_buf_empty && !st_busy_o;
    bypass_head = svc_flit && in_link.flit.head && (state == BC_IDLE) && not_arrived && svc_idle_o;
    bypass      = bypass_head ||
                  (svc_flit && !in_link.flit.head && (state == BC_ACTIVE) && svc_credit_o);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= BC_IDLE;
    end else if (in_link.valid && in_link.flit.svc) begin
      if (bypass_head && !in_link.flit.tail) state <= BC_ACTIVE;
      else if (in_link.flit.tail)            state <= BC_IDLE;
    end
  end
endmodule
