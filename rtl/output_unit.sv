// output_unit -- one output port of the SlideAcross router.
//
// Holds the 5:1 output arbiter (SA-II), the VC & SVC allocator, the credit
// counters of the downstream input buffers, the switch-traversal register
// and the output multiplexer Mux2 that chooses between the crossbar and the
// bypass path.
//
// Allocation (document): a packet keeps its VC for its whole life, so the
// SA-II winner simply owns its own VC at this output; VA therefore needs no
// search and runs after SA in the same cycle.  In parallel, a winning head
// flit is given the downstream SVC instead when that SVC is idle (unowned
// and its buffer empty), which is what later lets it bypass routers.  The
// SVC is not handed to a crossbar winner in a cycle where a bypassing head
// claims it.  Credit-based flow control, ownership release on the tail
// flit, and the Local (ejection) port having unlimited credits and no SVC
// are this design's choices.
//
// Timing: SA-II and VA are combinational in cycle t (grant, grant_svc); the
// winner's flit is in the switch-traversal register in t+1 and in the output
// link register, i.e. on the link, from t+2.  Mux2 passes a bypass flit to
// the output link register only in a cycle where the switch-traversal
// register is empty (st_busy low); such a flit is on the link the next cycle.
module output_unit
  import slide_pkg::*;
#(
  parameter port_e OUT_PORT = P_EAST
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // SA-I winners requesting this output
  input  logic  [NPORT-1:0]       req,
  input  flit_t [NPORT-1:0]       req_flit,
  input  logic  [NPORT-1:0]       req_alloc_svc,  // body flit of a packet holding the SVC
  output logic  [NPORT-1:0]       grant,
  output logic                    grant_svc,      // head winner was given the SVC
  // bypass path from the opposite input
  input  logic                    byp_valid,
  input  logic                    byp_head,
  input  flit_t                   byp_flit,
  // link
  output link_t                   out_link,
  input  credit_t                 credit_in,
  // state seen by the input ports
  output logic  [NUM_VC-1:0]      vc_idle,
  output logic  [NUM_VC-1:0][CRW-1:0] vc_credits,
  output logic  [NUM_VC-1:0]      vc_credit_ok,
  output logic                    svc_idle,
  output logic                    svc_credit_ok,
  output logic                    st_busy,
  output logic                    ev_svc_tag
);
  localparam logic IS_LOCAL = (OUT_PORT == P_LOCAL);

  logic    [NUM_BUF-1:0]          owned;
  logic    [NUM_BUF-1:0][CRW-1:0] credits;
  link_t                          st_reg;

  logic    [NUM_BUF-1:0]          dec;
  flit_t                          win_flit;
  logic                           win_alloc_svc;
  logic                           any_grant;
  logic [1:0]                     win_buf;

  rr_arbiter #(.N(NPORT)) u_sa2 (
    .clk, .rst_n, .req, .update(1'b1), .grant
  );

  always_comb begin
    for (int v = 0; v < NUM_VC; v++) begin
      vc_credits[v]   = credits[v];
      vc_credit_ok[v] = IS_LOCAL || (credits[v] != 0);
      vc_idle[v]      = !owned[v] && vc_credit_ok[v];
    end
    svc_idle      = !IS_LOCAL && !owned[SVC_IDX] && (credits[SVC_IDX] == CRW'(BUF_DEPTH));
    svc_credit_ok = !IS_LOCAL && (credits[SVC_IDX] != 0);
    st_busy       = st_reg.valid;
  end

  // VC & SVC allocation for the SA-II winner
  always_comb begin
    any_grant     = (grant != '0);
    win_flit      = '0;
    win_alloc_svc = 1'b0;
    for (int p = 0; p < NPORT; p++)
      if (grant[p]) begin
        win_flit      = req_flit[p];
        win_alloc_svc = req_alloc_svc[p];
      end
    grant_svc = any_grant && win_flit.head && svc_idle && !(byp_valid && byp_head);
    win_flit.svc = win_flit.head ? grant_svc : win_alloc_svc;
    win_buf = win_flit.svc ? 2'(SVC_IDX) : 2'(win_flit.vc);
    ev_svc_tag = grant_svc;
    dec = '0;
    if (!IS_LOCAL) begin
      if (any_grant) dec[win_buf] = 1'b1;
      if (byp_valid) dec[SVC_IDX] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      owned    <= '0;
      st_reg   <= '0;
      out_link <= '0;
      for (int b = 0; b < NUM_BUF; b++) credits[b] <= CRW'(BUF_DEPTH);
    end else begin
      // switch traversal
      st_reg.valid <= any_grant;
      st_reg.flit  <= win_flit;
      // Mux2: crossbar has priority, the bypass uses an idle output
      if (st_reg.valid)   out_link <= st_reg;
      else if (byp_valid) out_link <= '{valid: 1'b1, flit: byp_flit};
      else                out_link.valid <= 1'b0;
      // credits
      for (int b = 0; b < NUM_BUF; b++)
        credits[b] <= IS_LOCAL ? CRW'(BUF_DEPTH)
                               : credits[b] + CRW'(credit_in[b]) - CRW'(dec[b]);
      // ownership
      if (any_grant) owned[win_buf] <= !win_flit.tail;
      if (byp_valid) owned[SVC_IDX] <= !byp_flit.tail;
    end
  end

  a_mux2_free:   assert property (@(posedge clk) disable iff (!rst_n) byp_valid |-> !st_reg.valid);
  a_grant_1hot:  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
  a_credit_max:  assert property (@(posedge clk) disable iff (!rst_n)
                                  credits[0] <= CRW'(BUF_DEPTH) && credits[SVC_IDX] <= CRW'(BUF_DEPTH));
endmodule
