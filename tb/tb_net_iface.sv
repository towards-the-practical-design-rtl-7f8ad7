// tb_net_iface -- self-checking test of the network interface at (3,3).
// Checks the injection-time VC rule (VC0 west, VC1 east, same column by free
// space and then alternating), the flit sequence of a packet (head, body,
// tail, index in the low data bits, destination on every flit), that the
// head is on the link the cycle after the packet is accepted, that sending
// stops when the router's credits for the VC are used up and resumes when
// a credit returns, and the ejection pass-through.
module tb_net_iface;
  import slide_pkg::*;
  logic clk = 0, rst_n = 0;
  logic inj_valid, inj_ready, ej_valid, ej_pkt_done;
  logic [XW-1:0] inj_dst_x;
  logic [YW-1:0] inj_dst_y;
  logic [7:0] inj_len;
  logic [DATA_W-1:0] inj_payload;
  flit_t ej_flit;
  link_t to_router, from_router;
  credit_t credit_from_router;
  int checks = 0, failures = 0;

  net_iface #(.X_POS(3), .Y_POS(3)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // send one packet, collect its flits, return its VC; credits returned
  // after each flit unless hold_credits
  task automatic run_pkt(int dx, int dy, int len, bit hold_credits, output int vc);
    int k, t;
    @(negedge clk);
    chk(inj_ready, "ready when idle");
    inj_valid = 1; inj_dst_x = XW'(dx); inj_dst_y = YW'(dy); inj_len = 8'(len);
    inj_payload = {$urandom, $urandom, $urandom, $urandom};
    @(negedge clk);          // accepted at the edge before this point
    inj_valid = 0;
    chk(!to_router.valid, "nothing sent in the accept cycle");
    @(negedge clk);
    k = 0; t = 0;
    chk(to_router.valid && to_router.flit.head, "head one cycle after accept");
    while (k < len && t < 50) begin
      credit_from_router = '0;
      if (to_router.valid) begin
        flit_t f = to_router.flit;
        chk(f.head == (k == 0) && f.tail == (k == len - 1) && !f.svc, "head/tail marks");
        chk(f.dst_x == XW'(dx) && f.dst_y == YW'(dy), "destination");
        chk(f.data[7:0] == 8'(k) && f.data[DATA_W-1:8] == inj_payload[DATA_W-1:8], "data");
        vc = int'(f.vc);
        if (!hold_credits) credit_from_router[f.vc] = 1'b1;
        k++;
      end
      @(negedge clk); t++;
    end
    credit_from_router = '0;
    chk(k == len, "all flits sent");
  endtask

  initial begin
    int vc, vc2, cnt;
    inj_valid = 0; inj_dst_x = '0; inj_dst_y = '0; inj_len = '0; inj_payload = '0;
    credit_from_router = '0; from_router = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_pkt(1, 5, 3, 0, vc); chk(vc == 0, "westward packet in VC0");
    run_pkt(6, 0, 2, 0, vc); chk(vc == 1, "eastward packet in VC1");
    run_pkt(3, 7, 1, 0, vc); run_pkt(3, 0, 1, 0, vc2);
    chk(vc != vc2, "same-column packets alternate on a tie");
    // credit stall: 6-flit packet on VC1 with no credits returned
    @(negedge clk);
    inj_valid = 1; inj_dst_x = 3'd7; inj_dst_y = 3'd3; inj_len = 8'd6; inj_payload = '0;
    @(negedge clk); inj_valid = 0;
    cnt = 0;
    repeat (12) begin if (to_router.valid) cnt++; @(negedge clk); end
    chk(cnt == BUF_DEPTH, "sending stops after BUF_DEPTH flits without credits");
    // same-column packet now prefers VC0, which has more free space
    credit_from_router = 2'b10; @(negedge clk); credit_from_router = '0;
    repeat (3) begin if (to_router.valid) cnt++; @(negedge clk); end
    chk(cnt == BUF_DEPTH + 1, "one credit, one more flit");
    credit_from_router = 3'b010; @(negedge clk); credit_from_router = '0;
    repeat (3) @(negedge clk);
    chk(inj_ready, "packet finished after credits");
    run_pkt(3, 1, 1, 0, vc); chk(vc == 0, "same column goes to the VC with more credits");
    // ejection
    from_router.valid = 1; from_router.flit = '0; from_router.flit.tail = 1; from_router.flit.data = 128'hABC;
    #1 chk(ej_valid && ej_pkt_done && ej_flit.data == 128'hABC, "ejection pass-through");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
