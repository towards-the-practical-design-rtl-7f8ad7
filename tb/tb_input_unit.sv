// tb_input_unit -- self-checking test of a West input port at router (3,3).
// The testbench plays the output ports: it sets their VC/SVC state and grants
// whatever the port requests.  Checked: a normal head flit is buffered and
// requests East one cycle after arrival; the grant pops it and returns a
// credit for its VC; body flits follow the head's port; the selection unit
// avoids a port whose VC is busy; an SVC flit with a free output bypasses in
// its arrival cycle and returns its SVC credit at once; an SVC flit whose
// output is busy is buffered in the SVC buffer instead.
module tb_input_unit;
  import slide_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [XW-1:0] cur_x = 3'd3;
  logic [YW-1:0] cur_y = 3'd3;
  link_t in_link;
  credit_t credit_out;
  logic [NPORT-1:0][NUM_VC-1:0] o_vc_idle, o_vc_credit_ok;
  logic [NPORT-1:0][NUM_VC-1:0][CRW-1:0] o_vc_credits;
  logic [NPORT-1:0] o_svc_idle, o_svc_credit_ok, o_st_busy, grant_in, grant_svc_in;
  logic req_valid, req_alloc_svc, byp_valid, byp_head, ev_detour, ev_buffered, ev_stall;
  port_e req_port;
  flit_t req_flit, byp_flit;
  int checks = 0, failures = 0;
  logic grant_en;

  input_unit #(.IN_PORT(P_WEST)) dut (.*);

  always #5 clk = ~clk;

  // the "output ports": grant the request if enabled
  always_comb begin
    grant_in = '0;
    if (req_valid && grant_en) grant_in[req_port] = 1'b1;
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic link_t mk(logic h, logic t, logic s, logic v, int dx, int dy, int d);
    link_t l = '0;
    l.valid = 1; l.flit.head = h; l.flit.tail = t; l.flit.svc = s; l.flit.vc = v;
    l.flit.dst_x = XW'(dx); l.flit.dst_y = YW'(dy); l.flit.data = DATA_W'(d);
    return l;
  endfunction

  initial begin
    in_link = '0; grant_en = 0; grant_svc_in = '0;
    o_vc_idle = '1; o_vc_credit_ok = '1; o_svc_idle = '1; o_svc_credit_ok = '1; o_st_busy = '0;
    for (int p = 0; p < NPORT; p++) for (int v = 0; v < NUM_VC; v++) o_vc_credits[p][v] = CRW'(BUF_DEPTH);
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 1. normal 2-flit packet to (6,3), VC1
    @(negedge clk);
    in_link = mk(1, 0, 0, 1, 6, 3, 10);
    #1 chk(!byp_valid && credit_out == '0, "non-SVC head is buffered");
    @(negedge clk);
    in_link = mk(0, 1, 0, 1, 6, 3, 11);
    #1 chk(req_valid && req_port == P_EAST && req_flit.data == DATA_W'(10), "head requests East one cycle after arrival");
    grant_en = 1;
    #1 chk(credit_out == 3'b010, "grant returns a VC1 credit");
    @(negedge clk);
    in_link = '0;
    #1 chk(req_valid && req_port == P_EAST && req_flit.tail && !req_alloc_svc, "tail follows the head");
    @(negedge clk);
    #1 chk(!req_valid, "buffers drained");
    grant_en = 0;
    // 2. adaptive selection: to (6,6), VC0 busy at East -> North
    o_vc_idle[P_EAST][0] = 0;
    in_link = mk(1, 1, 0, 0, 6, 6, 20);
    @(negedge clk); in_link = '0;
    #1 chk(req_valid && req_port == P_NORTH, "selection masks the congested East port");
    grant_en = 1;
    #1 chk(ev_detour, "detour event");
    @(negedge clk); grant_en = 0; o_vc_idle[P_EAST][0] = 1;
    // 3. SVC head with free East: bypass in the arrival cycle
    in_link = mk(1, 0, 1, 0, 5, 3, 30);
    #1 chk(byp_valid && byp_head && byp_flit.data == DATA_W'(30), "SVC head bypasses");
    chk(credit_out == 3'b100, "bypass returns SVC credit at once");
    @(negedge clk);
    o_svc_idle[P_EAST] = 0;           // now owned by this packet
    in_link = mk(0, 0, 1, 0, 5, 3, 31);
    #1 chk(byp_valid && !byp_head, "body follows bypassed head");
    // 4. output busy: the next body flit is buffered and uses SA with the SVC
    @(negedge clk);
    o_st_busy[P_EAST] = 1;
    in_link = mk(0, 1, 1, 0, 5, 3, 32);
    #1 chk(!byp_valid, "busy output: SVC flit is buffered");
    @(negedge clk); in_link = '0; o_st_busy[P_EAST] = 0;
    #1 chk(req_valid && req_port == P_EAST && req_alloc_svc && req_flit.data == DATA_W'(32), "buffered SVC tail requests East on the SVC");
    grant_en = 1;
    #1 chk(credit_out == 3'b100, "SVC credit on pop");
    @(negedge clk); grant_en = 0;
    // 5. SVC head that has arrived in X (dst_x == cur_x) is not bypassed
    o_svc_idle[P_EAST] = 1;
    in_link = mk(1, 1, 1, 0, 3, 5, 40);
    #1 chk(!byp_valid, "no overshoot bypass");
    @(negedge clk); in_link = '0;
    #1 chk(req_valid && req_port == P_NORTH, "turns North through the buffer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
