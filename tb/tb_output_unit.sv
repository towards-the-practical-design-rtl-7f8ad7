// tb_output_unit -- self-checking test of an East output port: SA-II,
// VC & SVC allocation, credit counting, the switch-traversal stage and Mux2.
// Directed sequences check: a head winner receives the idle SVC and its flit
// reaches the link two cycles after the grant with the SVC tag set; while the
// SVC is owned the next head keeps its own VC; VC ownership is released by
// the tail; credits count down per flit and up per returned credit; two
// simultaneous requests are served round robin; a bypass flit passes Mux2
// only when the switch-traversal register is empty and reaches the link one
// cycle later; a bypassing head takes the SVC away from a crossbar winner.
module tb_output_unit;
  import slide_pkg::*;
  logic clk = 0, rst_n = 0;
  logic  [NPORT-1:0] req, req_alloc_svc, grant;
  flit_t [NPORT-1:0] req_flit;
  logic grant_svc, byp_valid, byp_head;
  flit_t byp_flit;
  link_t out_link;
  credit_t credit_in;
  logic [NUM_VC-1:0] vc_idle, vc_credit_ok;
  logic [NUM_VC-1:0][CRW-1:0] vc_credits;
  logic svc_idle, svc_credit_ok, st_busy, ev_svc_tag;
  int checks = 0, failures = 0;

  output_unit #(.OUT_PORT(P_EAST)) dut (.*);

  always #5 clk = ~clk;

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

  function automatic flit_t mk(logic h, logic t, logic v, int d);
    flit_t f = '0;
    f.head = h; f.tail = t; f.vc = v; f.dst_x = 3'd7; f.data = DATA_W'(d);
    return f;
  endfunction

  task automatic idle_inputs();
    req = '0; req_alloc_svc = '0; byp_valid = 0; byp_head = 0; credit_in = '0;
  endtask

  initial begin
    idle_inputs(); req_flit = '0; byp_flit = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(svc_idle && vc_idle == 2'b11 && vc_credits[0] == CRW'(BUF_DEPTH), "reset state");
    // 1. head (not tail) of input North, VC1: gets SVC
    req[P_NORTH] = 1; req_flit[P_NORTH] = mk(1, 0, 1, 100);
    #1 chk(grant == (5'b1 << P_NORTH) && grant_svc, "head granted with SVC");
    @(negedge clk); idle_inputs();
    chk(st_busy && !out_link.valid, "flit in ST stage");
    chk(!svc_idle && vc_idle[1], "SVC owned, VC1 still idle");
    @(negedge clk);
    chk(out_link.valid && out_link.flit.svc && out_link.flit.data == DATA_W'(100), "head on link 2 cycles after grant, SVC tag");
    // 2. head of input South, VC1 (single flit): SVC busy -> own VC
    req[P_SOUTH] = 1; req_flit[P_SOUTH] = mk(1, 1, 1, 200);
    #1 chk(grant == (5'b1 << P_SOUTH) && !grant_svc, "second head keeps its VC");
    @(negedge clk); idle_inputs();
    chk(vc_idle[1], "single-flit packet does not keep VC1");
    chk(vc_credits[1] == CRW'(BUF_DEPTH - 1), "VC1 credit used");
    @(negedge clk);
    chk(out_link.valid && !out_link.flit.svc && out_link.flit.vc == 1'b1, "VC1 flit on link");
    // 3. tail of the SVC packet (body flit holding the SVC)
    req[P_NORTH] = 1; req_alloc_svc[P_NORTH] = 1; req_flit[P_NORTH] = mk(0, 1, 1, 101);
    #1 chk(grant[P_NORTH], "tail granted");
    @(negedge clk); idle_inputs();
    chk(svc_credit_ok && !svc_idle, "SVC released but not yet empty");
    @(negedge clk);
    chk(out_link.valid && out_link.flit.svc && out_link.flit.tail, "tail keeps SVC tag");
    // return the two SVC credits and the VC1 credit
    credit_in = 3'b110;
    @(negedge clk); credit_in = 3'b100;
    @(negedge clk); credit_in = '0;
    chk(svc_idle && vc_credits[1] == CRW'(BUF_DEPTH), "credits returned, SVC idle again");
    // 4. two requests at once: round robin
    begin
      int first;
      req[P_WEST] = 1; req_flit[P_WEST] = mk(1, 1, 0, 300);
      req[P_LOCAL] = 1; req_flit[P_LOCAL] = mk(1, 1, 0, 301);
      #1 chk($onehot(grant), "one winner");
      first = grant[P_WEST] ? P_WEST : P_LOCAL;
      @(negedge clk);
      #1 chk($onehot(grant) && !grant[first], "other input wins next");
      @(negedge clk); idle_inputs();
    end
    // 5. bypass through Mux2: wait until ST is empty
    while (st_busy || out_link.valid) @(negedge clk);
    // step 4: the first winner took the SVC, the second VC0
    credit_in = 3'b101; @(negedge clk); credit_in = '0;
    chk(svc_idle, "SVC idle before bypass");
    byp_valid = 1; byp_head = 1; byp_flit = mk(1, 0, 0, 400); byp_flit.svc = 1;
    req[P_SOUTH] = 1; req_flit[P_SOUTH] = mk(1, 1, 0, 500);
    #1 chk(grant[P_SOUTH] && !grant_svc, "crossbar winner does not get SVC taken by bypass");
    @(negedge clk); idle_inputs();
    chk(out_link.valid && out_link.flit.data == DATA_W'(400) && out_link.flit.svc, "bypass flit on link one cycle later");
    chk(!svc_idle, "SVC owned by bypassing packet");
    @(negedge clk);
    chk(out_link.valid && out_link.flit.data == DATA_W'(500), "crossbar flit follows");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
