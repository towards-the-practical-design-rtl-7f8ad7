// winoc_mesh -- wireline layer of a surface-wave hybrid WiNoC built from
// SlideAcross routers.
//
// A MESH_X x MESH_Y mesh (8 x 8, 64 cores, by default) in which every node
// has a slide_router and a net_iface.  Neighbouring routers are joined by a
// link in each direction with credit return; the bypass datapaths of the
// routers chain along rows and columns, so a packet tagged for the slide
// virtual channel can cross a free row in one cycle per router.  Links at the
// mesh edge are left idle and their credit inputs tied off.
//
// The surface-wave transceivers of the 5 wireless nodes and the wireless
// layer itself are not part of this RTL: this module is the wireline layer
// the published design proposes to rebuild with SlideAcross routers, and its
// injection and ejection ports are where cores, or a wireless interface,
// attach.  Node n is at x = n % MESH_X, y = n / MESH_X.
//
// Ports, one entry per node: the injection and ejection signals of
// net_iface, plus per-router event pulses for statistics.
module winoc_mesh
  import slide_pkg::*;
#(
  parameter int unsigned KX = MESH_X,
  parameter int unsigned KY = MESH_Y
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic       [KX*KY-1:0]              inj_valid,
  output logic       [KX*KY-1:0]              inj_ready,
  input  logic       [KX*KY-1:0][XW-1:0]      inj_dst_x,
  input  logic       [KX*KY-1:0][YW-1:0]      inj_dst_y,
  input  logic       [KX*KY-1:0][7:0]         inj_len,
  input  logic       [KX*KY-1:0][DATA_W-1:0]  inj_payload,
  output logic       [KX*KY-1:0]              ej_valid,
  output flit_t      [KX*KY-1:0]              ej_flit,
  output logic       [KX*KY-1:0]              ej_pkt_done,
  output router_ev_t [KX*KY-1:0]              ev
);
  localparam int unsigned N = KX * KY;

  link_t   [N-1:0][NPORT-1:0] r_in, r_out;
  credit_t [N-1:0][NPORT-1:0] r_cin, r_cout;

  for (genvar y = 0; y < KY; y++) begin : g_y
    for (genvar x = 0; x < KX; x++) begin : g_x
      localparam int unsigned n = y * KX + x;

      slide_router #(.X_POS(x), .Y_POS(y)) u_router (
        .clk, .rst_n,
        .in_link(r_in[n]), .credit_out(r_cout[n]),
        .out_link(r_out[n]), .credit_in(r_cin[n]),
        .ev(ev[n])
      );

      net_iface #(.X_POS(x), .Y_POS(y)) u_ni (
        .clk, .rst_n,
        .inj_valid(inj_valid[n]), .inj_ready(inj_ready[n]),
        .inj_dst_x(inj_dst_x[n]), .inj_dst_y(inj_dst_y[n]),
        .inj_len(inj_len[n]), .inj_payload(inj_payload[n]),
        .ej_valid(ej_valid[n]), .ej_flit(ej_flit[n]), .ej_pkt_done(ej_pkt_done[n]),
        .to_router(r_in[n][P_LOCAL]), .credit_from_router(r_cout[n][P_LOCAL]),
        .from_router(r_out[n][P_LOCAL])
      );
      assign r_cin[n][P_LOCAL] = '0;   // ejection never back-pressures

      // East / West neighbours
      if (x + 1 < KX) begin : g_e
        assign r_in[n][P_EAST]  = r_out[n+1][P_WEST];
        assign r_cin[n][P_EAST] = r_cout[n+1][P_WEST];
      end else begin : g_e_edge
        assign r_in[n][P_EAST]  = '0;
        assign r_cin[n][P_EAST] = '0;
      end
      if (x > 0) begin : g_w
        assign r_in[n][P_WEST]  = r_out[n-1][P_EAST];
        assign r_cin[n][P_WEST] = r_cout[n-1][P_EAST];
      end else begin : g_w_edge
        assign r_in[n][P_WEST]  = '0;
        assign r_cin[n][P_WEST] = '0;
      end
      // North / South neighbours (North = y + 1)
      if (y + 1 < KY) begin : g_n
        assign r_in[n][P_NORTH]  = r_out[n+KX][P_SOUTH];
        assign r_cin[n][P_NORTH] = r_cout[n+KX][P_SOUTH];
      end else begin : g_n_edge
        assign r_in[n][P_NORTH]  = '0;
        assign r_cin[n][P_NORTH] = '0;
      end
      if (y > 0) begin : g_s
        assign r_in[n][P_SOUTH]  = r_out[n-KX][P_NORTH];
        assign r_cin[n][P_SOUTH] = r_cout[n-KX][P_NORTH];
      end else begin : g_s_edge
        assign r_in[n][P_SOUTH]  = '0;
        assign r_cin[n][P_SOUTH] = '0;
      end
    end
  end
endmodule
