// net_iface -- network interface between a core and its SlideAcross router.
//
// Injection: a packet (destination, length in flits, payload word) is
// accepted when inj_ready is high and sent into the router's Local input one
// flit per cycle, as credits for its VC allow.  The VC is chosen once, at
// injection, by the published design's deadlock-avoidance rule: destinations left of
// the source (smaller x) use VC0, destinations to the right use VC1, and a
// destination in the same column takes the VC with more free buffer space at
// the router (a tie alternates).  Every flit carries the destination; the
// data word of flit k is the payload with its low 8 bits replaced by k.  That
// flit format, one packet in flight per interface and the length limit of
// 255 flits are this design's choices.
//
// Ejection: flits from the router's Local output are passed on as they come
// (the Local output never runs out of credits); ej_pkt_done marks a tail.
//
// Timing: the head flit is on to_router the cycle after the packet is
// accepted; credits from the router take effect the next cycle.
module net_iface
  import slide_pkg::*;
#(
  parameter int unsigned X_POS = 0,
  parameter int unsigned Y_POS = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  // core side, injection
  input  logic              inj_valid,
  output logic              inj_ready,
  input  logic [XW-1:0]     inj_dst_x,
  input  logic [YW-1:0]     inj_dst_y,
  input  logic [7:0]        inj_len,
  input  logic [DATA_W-1:0] inj_payload,
  // core side, ejection
  output logic              ej_valid,
  output flit_t             ej_flit,
  output logic              ej_pkt_done,
  // router side
  output link_t             to_router,
  input  credit_t           credit_from_router,
  input  link_t             from_router
);
  localparam logic [XW-1:0] CUR_X = XW'(X_POS);

  logic                          active, alt;
  logic [XW-1:0]                 dst_x;
  logic [YW-1:0]                 dst_y;
  logic [VCW-1:0]                vc;
  logic [7:0]                    len, idx;
  logic [DATA_W-1:0]             payload;
  logic [NUM_VC-1:0][CRW-1:0]    credits;
  logic [VCW-1:0]                new_vc;
  logic                          send;
  logic [NUM_VC-1:0]             used;

  assign inj_ready = !active;

  // VC assignment at injection
  always_comb begin
    if (inj_dst_x < CUR_X)       new_vc = 1'b0;
    else if (inj_dst_x > CUR_X)  new_vc = 1'b1;
    else if (credits[1] > credits[0]) new_vc = 1'b1;
    else if (credits[0] > credits[1]) new_vc = 1'b0;
    else                         new_vc = alt;
  end

  always_comb begin
    send = active && (credits[vc] != '0);
    used = '0;
    if (send) used[vc] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active    <= 1'b0;
      alt       <= 1'b0;
      dst_x     <= '0;
      dst_y     <= '0;
      vc        <= '0;
      len       <= '0;
      idx       <= '0;
      payload   <= '0;
      to_router <= '0;
      for (int v = 0; v < NUM_VC; v++) credits[v] <= CRW'(BUF_DEPTH);
    end else begin
      for (int v = 0; v < NUM_VC; v++)
        credits[v] <= credits[v] + CRW'(credit_from_router[v]) - CRW'(used[v]);
      to_router.valid <= 1'b0;
      if (!active && inj_valid) begin
        active  <= 1'b1;
        dst_x   <= inj_dst_x;
        dst_y   <= inj_dst_y;
        vc      <= new_vc;
        len     <= (inj_len == 0) ? 8'd1 : inj_len;
        idx     <= '0;
        payload <= inj_payload;
        if (inj_dst_x == CUR_X) alt <= !alt;
      end else if (send) begin
        to_router.valid      <= 1'b1;
        to_router.flit.head  <= (idx == 0);
        to_router.flit.tail  <= (idx == len - 1);
        to_router.flit.svc   <= 1'b0;
        to_router.flit.vc    <= vc;
        to_router.flit.dst_x <= dst_x;
        to_router.flit.dst_y <= dst_y;
        to_router.flit.data  <= {payload[DATA_W-1:8], idx};
        idx <= idx + 1'b1;
        if (idx == len - 1) active <= 1'b0;
      end
    end
  end

  assign ej_valid    = from_router.valid;
  assign ej_flit     = from_router.flit;
  assign ej_pkt_done = from_router.valid && from_router.flit.tail;
endmodule
