// tb_slide_router -- self-checking test of one SlideAcross router at (3,3).
// The testbench plays the four neighbours and the network interface: it
// sends packets into every input while honouring the router's credits (and
// the SVC rule: a packet is sent on the SVC only when that buffer is empty),
// and it absorbs every output flit, returning a credit one cycle later.
// Checked: an SVC flit crossing West->East appears on the East link one cycle
// after it arrives (bypass) while a normal flit takes three; under random
// traffic every flit leaves through a productive output (Local on arrival),
// the flits of a packet stay in order and together within their VC, the VC id
// is never changed, and every packet comes out exactly once.
module tb_slide_router;
  import slide_pkg::*;
  localparam int CX = 3, CY = 3;
  logic clk = 0, rst_n = 0;
  link_t   [NPORT-1:0] in_link, out_link;
  credit_t [NPORT-1:0] credit_out, credit_in;
  router_ev_t ev;
  int checks = 0, failures = 0;

  slide_router #(.X_POS(CX), .Y_POS(CY)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void fail(string s);
    failures++;
    if (failures < 20) $display("FAIL @%0t: %s", $time, s);
  endfunction

  // ---- upstream credit state (towards the router's inputs) ----
  int up_cred[NPORT][NUM_BUF];
  always @(posedge clk) if (rst_n)
    for (int p = 0; p < NPORT; p++) for (int b = 0; b < NUM_BUF; b++)
      up_cred[p][b] += int'(credit_out[p][b]);

  // ---- downstream: absorb flits, return credits next cycle, scoreboard ----
  int open_id[NPORT][NUM_BUF], open_idx[NPORT][NUM_BUF];
  int exp_len[int]; bit got[int]; int exp_vc[int];
  int n_out = 0, n_pkts_out = 0;
  always @(posedge clk) begin
    credit_in <= '0;
    if (rst_n) for (int o = 0; o < NPORT; o++) if (out_link[o].valid) begin
      flit_t f; int b, id, k; bit ok;
      f  = out_link[o].flit;
      b  = f.svc ? SVC_IDX : int'(f.vc);
      id = int'(f.data[39:8]); k = int'(f.data[7:0]);
      if (o != int'(P_LOCAL)) credit_in[o][b] <= 1'b1;
      n_out++;
      // productive port
      case (port_e'(o))
        P_LOCAL: ok = (f.dst_x == CX && f.dst_y == CY);
        P_EAST:  ok = (f.dst_x > CX);
        P_WEST:  ok = (f.dst_x < CX);
        P_NORTH: ok = (f.dst_y > CY);
        default: ok = (f.dst_y < CY);
      endcase
      checks++; if (!ok) fail($sformatf("flit to %0d,%0d left through port %0d", f.dst_x, f.dst_y, o));
      checks++; if (exp_vc.exists(id) && exp_vc[id] != int'(f.vc)) fail("VC changed");
      if (f.head) begin
        if (open_id[o][b] != 0) fail("head inside an open packet");
        open_id[o][b] = id; open_idx[o][b] = 0;
      end
      checks++;
      if (id != open_id[o][b] || k != open_idx[o][b]) fail($sformatf("out of order: id %0d k %0d", id, k));
      open_idx[o][b]++;
      if (f.tail) begin
        checks++;
        if (!exp_len.exists(id) || open_idx[o][b] != exp_len[id] || got[id]) fail("bad packet end");
        got[id] = 1; n_pkts_out++;
        open_id[o][b] = 0;
      end
    end
  end

  // ---- senders ----
  int next_id = 1, n_pkts_in = 0;
  int s_id[NPORT], s_len[NPORT], s_idx[NPORT], s_buf[NPORT], s_dx[NPORT], s_dy[NPORT], s_vc[NPORT];

  function automatic void new_packet(int p, bit allow_svc);
    int dx, dy;
    do begin
      dx = $urandom % MESH_X; dy = $urandom % MESH_Y;
      case (port_e'(p))
        P_WEST:  dx = CX + ($urandom % (MESH_X - CX));  // travelling east
        P_EAST:  dx = $urandom % (CX + 1);
        P_SOUTH: dy = CY + ($urandom % (MESH_Y - CY));
        P_NORTH: dy = $urandom % (CY + 1);
        default: ;
      endcase
    end while (p == int'(P_LOCAL) && dx == CX && dy == CY);
    s_id[p] = next_id++; s_len[p] = 1 + $urandom % 4; s_idx[p] = 0;
    s_dx[p] = dx; s_dy[p] = dy;
    s_vc[p] = (dx < CX) ? 0 : (dx > CX) ? 1 : int'($urandom % 2);
    s_buf[p] = (allow_svc && p != int'(P_LOCAL) && up_cred[p][SVC_IDX] == BUF_DEPTH && $urandom % 2)
               ? SVC_IDX : s_vc[p];
    exp_len[s_id[p]] = s_len[p]; exp_vc[s_id[p]] = s_vc[p];
    n_pkts_in++;
  endfunction

  function automatic flit_t mkflit(int p);
    flit_t f = '0;
    f.head = (s_idx[p] == 0); f.tail = (s_idx[p] == s_len[p] - 1);
    f.svc = (s_buf[p] == SVC_IDX); f.vc = VCW'(s_vc[p]);
    f.dst_x = XW'(s_dx[p]); f.dst_y = YW'(s_dy[p]);
    f.data = DATA_W'({32'(s_id[p]), 8'(s_idx[p])});
    return f;
  endfunction

  task automatic send_one(int p, int dx, int dy, bit svc, output int lat);
    int t;
    s_id[p] = next_id++; s_len[p] = 1; s_idx[p] = 0; s_dx[p] = dx; s_dy[p] = dy;
    s_vc[p] = 1; s_buf[p] = svc ? SVC_IDX : 1;
    exp_len[s_id[p]] = 1; exp_vc[s_id[p]] = 1; n_pkts_in++;
    @(negedge clk);
    in_link[p] = '{valid: 1'b1, flit: mkflit(p)};
    up_cred[p][s_buf[p]]--;
    t = 0;
    @(negedge clk); in_link[p] = '0;
    while (!out_link[int'(P_EAST)].valid && t < 20) begin @(negedge clk); t++; end
    lat = t + 1;
    repeat (6) @(negedge clk);
  endtask

  initial begin
    int lat;
    in_link = '0;
    for (int p = 0; p < NPORT; p++) begin
      for (int b = 0; b < NUM_BUF; b++) begin up_cred[p][b] = BUF_DEPTH; open_id[p][b] = 0; end
      s_idx[p] = 0; s_len[p] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // directed latency: bypass 1 cycle, buffered 3 cycles
    send_one(int'(P_WEST), 6, CY, 1, lat);
    checks++; if (lat != 1) fail($sformatf("bypass latency %0d, expected 1", lat));
    send_one(int'(P_WEST), 6, CY, 0, lat);
    checks++; if (lat != 3) fail($sformatf("buffered latency %0d, expected 3", lat));
    // random traffic on all inputs
    for (int p = 0; p < NPORT; p++) new_packet(p, 1);
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      for (int p = 0; p < NPORT; p++) begin
        in_link[p] = '0;
        if (s_idx[p] == s_len[p]) begin
          if (t < 3800 && $urandom % 3 == 0) new_packet(p, 1);
        end else if (up_cred[p][s_buf[p]] > 0 && $urandom % 4 != 0) begin
          in_link[p] = '{valid: 1'b1, flit: mkflit(p)};
          up_cred[p][s_buf[p]]--;
          s_idx[p]++;
        end
      end
    end
    @(negedge clk); in_link = '0;
    repeat (100) @(negedge clk);
    checks++;
    if (n_pkts_out != n_pkts_in) fail($sformatf("%0d packets in, %0d out", n_pkts_in, n_pkts_out));
    $display("router: %0d packets, %0d flits out", n_pkts_out, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
