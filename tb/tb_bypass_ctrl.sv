// tb_bypass_ctrl -- self-checking test of the bypassing control of a West
// input (bypass to East).  Random link flits and output states are applied
// each cycle; the bypass decision is compared with an independent model of
// the head rule (svc & dst.x != cur.x & svc_idle & output free & SVC buffer
// empty) and of the per-packet state that lets body and tail flits follow a
// bypassed head.  A directed part checks that a packet whose head bypassed
// keeps bypassing, and that a non-SVC flit never does.
module tb_bypass_ctrl;
  import slide_pkg::*;
  logic clk = 0, rst_n = 0;
  link_t in_link;
  logic [XW-1:0] cur_x = 3'd3;
  logic [YW-1:0] cur_y = 3'd2;
  logic svc_buf_empty, svc_idle_o, svc_credit_o, st_busy_o;
  logic bypass, bypass_head;
  logic m_active, exp_byp, exp_head;
  int checks = 0, failures = 0, n_byp = 0;

  bypass_ctrl #(.IN_PORT(P_WEST)) dut (
    .clk, .rst_n, .in_link, .cur_x, .cur_y, .svc_buf_empty, .svc_idle_o,
    .svc_credit_o, .st_busy_o, .bypass, .bypass_head);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now();
    logic base;
    base     = in_link.valid && in_link.flit.svc && svc_buf_empty && !st_busy_o;
    exp_head = base && in_link.flit.head && !m_active && (in_link.flit.dst_x != cur_x) && svc_idle_o;
    exp_byp  = exp_head || (base && !in_link.flit.head && m_active && svc_credit_o);
    checks++;
    if (bypass !== exp_byp || bypass_head !== exp_head) begin
      failures++;
      if (failures < 10) $display("t=%0t mismatch byp=%b exp=%b", $time, bypass, exp_byp);
    end
    if (bypass) n_byp++;
  endtask

  task automatic update_model();
    if (in_link.valid && in_link.flit.svc) begin
      if (exp_head && !in_link.flit.tail) m_active = 1;
      else if (in_link.flit.tail) m_active = 0;
    end
  endtask

  initial begin
    in_link = '0; svc_buf_empty = 1; svc_idle_o = 1; svc_credit_o = 1; st_busy_o = 0;
    m_active = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // directed: a 3-flit SVC packet with free output bypasses entirely
    for (int k = 0; k < 3; k++) begin
      @(negedge clk);
      in_link = '0;
      in_link.valid = 1; in_link.flit.svc = 1;
      in_link.flit.head = (k == 0); in_link.flit.tail = (k == 2);
      in_link.flit.dst_x = 3'd6;
      svc_idle_o = (k == 0);   // owned by this packet after its head
      #1; check_now();
      checks++; if (!bypass) failures++;
      @(posedge clk); update_model();
    end
    // directed: arrived in X, or not SVC -> no bypass
    @(negedge clk);
    in_link = '0; in_link.valid = 1; in_link.flit.svc = 1; in_link.flit.head = 1;
    in_link.flit.tail = 1; in_link.flit.dst_x = cur_x; svc_idle_o = 1;
    #1; check_now(); checks++; if (bypass) failures++;
    @(posedge clk); update_model();
    @(negedge clk);
    in_link.flit.svc = 0; in_link.flit.dst_x = 3'd7;
    #1; check_now(); checks++; if (bypass) failures++;
    @(posedge clk); update_model();
    // random
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      in_link.valid      = $urandom % 4 != 0;
      in_link.flit.svc   = $urandom % 4 != 0;
      in_link.flit.head  = $urandom % 3 == 0;
      in_link.flit.tail  = $urandom % 3 == 0;
      in_link.flit.dst_x = XW'($urandom);
      in_link.flit.dst_y = YW'($urandom);
      svc_buf_empty      = $urandom % 5 != 0;
      svc_idle_o         = $urandom % 3 != 0;
      svc_credit_o       = $urandom % 5 != 0;
      st_busy_o          = $urandom % 4 == 0;
      #1; check_now();
      @(posedge clk); update_model();
    end
    checks++; if (n_byp < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
