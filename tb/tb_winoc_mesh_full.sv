// tb_winoc_mesh_full -- the end-to-end test of tb_winoc_mesh, run on the
// mesh at its default parameters (8 x 8, 64 routers).
//
// Phase 1, zero load: a 4-flit packet crosses a whole row and one crosses a
// whole column.  The first router buffers the packet and tags it for the SVC;
// every router in between forwards it on the bypass path in one cycle; the
// last router buffers it again and ejects it.  The head must be on the
// ejection port 1 + 3 + (K - 2) * 1 + 3 cycles after the clock edge that
// accepts the packet (1 cycle in the interface, 3 per buffered router, 1 per
// bypassed router, K routers on the path), so it is sampled K + 6 edges
// after that edge.
// Phase 2, uniform random traffic with packets of 1..5 flits; phase 3, a
// hotspot burst that congests the network.  A scoreboard checks that every
// packet reaches its destination exactly once, with its flits in order,
// with the VC the injection rule prescribes (VC0 westwards, VC1 eastwards).
// Each mechanism -- bypass, SVC tagging, buffered traversal, adaptive detour,
// switch-allocation stall, both VCs used for same-column traffic -- must
// occur at least once.
module tb_winoc_mesh_full;
  import slide_pkg::*;
  localparam int KX = MESH_X, KY = MESH_Y, N = KX * KY;
  localparam int HOT0 = (KY / 2 - 1) * KX + KX / 2 - 1, HOT1 = (KY / 2) * KX + KX / 2;

  logic clk = 0, rst_n = 0;
  logic       [N-1:0]             inj_valid, inj_ready, ej_valid, ej_pkt_done;
  logic       [N-1:0][XW-1:0]     inj_dst_x;
  logic       [N-1:0][YW-1:0]     inj_dst_y;
  logic       [N-1:0][7:0]        inj_len;
  logic       [N-1:0][DATA_W-1:0] inj_payload;
  flit_t      [N-1:0]             ej_flit;
  router_ev_t [N-1:0]             ev;

  winoc_mesh dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // scoreboard
  typedef struct { int src; int dst; int len; longint t_acc; bit done; } pkt_t;
  pkt_t pkts[int];
  int   next_id = 1, n_sent = 0, n_recv = 0;
  int   cur_id [N][NUM_VC];
  int   cur_idx[N][NUM_VC];
  longint last_head_time;
  int   n_bypass = 0, n_svc = 0, n_buf = 0, n_detour = 0, n_stall = 0, n_col_vc0 = 0, n_col_vc1 = 0;

  function automatic void fail(string s);
    failures++;
    if (failures < 20) $display("FAIL @%0d: %s", cycle, s);
  endfunction

  // event counters and ejection checks
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < N; n++) begin
      n_bypass += int'(ev[n].bypass);
      n_svc    += int'(ev[n].svc_tag);
      n_buf    += int'(ev[n].buffered);
      n_detour += int'(ev[n].detour);
      n_stall  += int'(ev[n].sa_stall);
      if (ej_valid[n]) begin
        flit_t f;
        int v, id, k;
        f  = ej_flit[n];
        v  = int'(f.vc);
        id = int'(f.data[39:8]);
        k  = int'(f.data[7:0]);
        checks++;
        if (int'(f.dst_x) + KX * int'(f.dst_y) != n) fail($sformatf("flit for %0d,%0d ejected at node %0d", f.dst_x, f.dst_y, n));
        if (f.head) begin
          last_head_time = cycle;
          if (cur_id[n][v] != 0) fail("head while a packet is open");
          if (!pkts.exists(id)) fail($sformatf("unknown packet %0d", id));
          else begin
            int sx, dx;
            sx = pkts[id].src % KX; dx = pkts[id].dst % KX;
            if (pkts[id].done) fail("packet delivered twice");
            if (dx < sx && v != 0) fail("westward packet not in VC0");
            if (dx > sx && v != 1) fail("eastward packet not in VC1");
            if (dx == sx) begin if (v == 0) n_col_vc0++; else n_col_vc1++; end
          end
          cur_id[n][v] = id; cur_idx[n][v] = 0;
        end
        if (id != cur_id[n][v]) fail("flit of another packet inside a VC stream");
        if (k != cur_idx[n][v]) fail($sformatf("flit %0d out of order, expected %0d", k, cur_idx[n][v]));
        cur_idx[n][v]++;
        if (f.tail) begin
          if (pkts.exists(id)) begin
            if (cur_idx[n][v] != pkts[id].len) fail("wrong packet length");
            pkts[id].done = 1;
          end
          n_recv++;
          cur_id[n][v] = 0;
        end
      end
    end
  end

  task automatic clear_inj();
    inj_valid = '0; inj_dst_x = '0; inj_dst_y = '0; inj_len = '0; inj_payload = '0;
  endtask

  // offer a packet at node s; returns 1 when it was accepted this cycle
  function automatic bit offer(int s, int d, int len);
    if (!inj_ready[s] || inj_valid[s]) return 0;
    inj_valid[s]   = 1;
    inj_dst_x[s]   = XW'(d % KX);
    inj_dst_y[s]   = YW'(d / KX);
    inj_len[s]     = 8'(len);
    inj_payload[s] = DATA_W'({32'(next_id), 8'h00});
    pkts[next_id]  = '{src: s, dst: d, len: len, t_acc: cycle, done: 0};
    next_id++; n_sent++;
    return 1;
  endfunction

  task automatic wait_drain(int max_cycles);
    int t = 0;
    while (n_recv < n_sent && t < max_cycles) begin @(posedge clk); t++; end
    if (n_recv < n_sent) fail($sformatf("%0d packets not delivered", n_sent - n_recv));
    repeat (10) @(posedge clk);
  endtask

  task automatic zero_load(int s, int d, int exp_lat);
    longint t0;
    int b0;
    @(negedge clk);
    void'(offer(s, d, 4));
    t0 = cycle;
    b0 = n_bypass;
    @(negedge clk); clear_inj();
    wait_drain(200);
    checks++;
    if (last_head_time - t0 != longint'(exp_lat))
      fail($sformatf("zero-load head latency %0d, expected %0d", last_head_time - t0, exp_lat));
    checks++;
    if (n_bypass - b0 != 4 * (exp_lat - 8)) fail($sformatf("expected %0d bypass hops, saw %0d", 4 * (exp_lat - 8), n_bypass - b0));
  endtask

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear_inj();
    for (int n = 0; n < N; n++) for (int v = 0; v < NUM_VC; v++) begin cur_id[n][v] = 0; cur_idx[n][v] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // ---- phase 1: zero-load latency along a row and a column ----
    zero_load(0, KX - 1, KX + 6);                        // along row 0, eastwards
    zero_load(KX - 1, (KY - 1) * KX + KX - 1, KY + 6);   // along the last column, northwards
    zero_load(N - 1, (KY - 1) * KX, KX + 6);             // along the last row, westwards

    // ---- phase 2: uniform random traffic ----
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      clear_inj();
      for (int s = 0; s < N; s++)
        if ($urandom % 100 < 8) begin
          int d;
          d = $urandom % N;
          if (d != s) void'(offer(s, d, 1 + $urandom % 5));
        end
    end
    @(negedge clk); clear_inj();
    wait_drain(20000);

    // ---- phase 3: hotspot burst towards the centre ----
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      clear_inj();
      for (int s = 0; s < N; s++)
        if ($urandom % 100 < 40) begin
          int d;
          d = ($urandom % 2 == 1) ? HOT0 : HOT1;
          if (d != s) void'(offer(s, d, 1 + $urandom % 4));
        end
    end
    @(negedge clk); clear_inj();
    wait_drain(30000);

    // ---- every packet delivered, every mechanism exercised ----
    checks++;
    foreach (pkts[i]) if (!pkts[i].done) begin fail($sformatf("packet %0d lost", i)); break; end
    $display("packets: %0d sent %0d received; bypass %0d svc_tag %0d buffered %0d detour %0d stall %0d col_vc0 %0d col_vc1 %0d",
             n_sent, n_recv, n_bypass, n_svc, n_buf, n_detour, n_stall, n_col_vc0, n_col_vc1);
    checks += 6;
    if (n_bypass == 0)  fail("bypass never happened");
    if (n_svc == 0)     fail("SVC tagging never happened");
    if (n_buf == 0)     fail("buffered traversal never happened");
    if (n_detour == 0)  fail("adaptive detour never happened");
    if (n_stall == 0)   fail("switch-allocation stall never happened");
    if (n_col_vc0 == 0 || n_col_vc1 == 0) fail("same-column packets did not use both VCs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
