// tb_route_select -- self-checking test of route computation and selection.
// Random positions, destinations and output-port states are applied; the
// result must be a productive (minimal) port, Local on arrival, the idle
// port when exactly one of two productive ports is idle, and otherwise the
// port with more credits (X on a tie).
module tb_route_select;
  import slide_pkg::*;
  logic [XW-1:0] cur_x, dst_x;
  logic [YW-1:0] cur_y, dst_y;
  logic [NPORT-1:0] vc_idle;
  logic [NPORT-1:0][CRW-1:0] vc_credits;
  port_e out_port, exp_port, px, py;
  logic detour;
  int checks = 0, failures = 0;

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  route_select dut (.cur_x, .cur_y, .dst_x, .dst_y, .vc_idle, .vc_credits, .out_port, .detour);

  initial begin
    for (int t = 0; t < 5000; t++) begin
      cur_x = XW'($urandom); cur_y = YW'($urandom);
      dst_x = XW'($urandom); dst_y = YW'($urandom);
      vc_idle = NPORT'($urandom);
      for (int p = 0; p < NPORT; p++) vc_credits[p] = CRW'($urandom % (BUF_DEPTH + 1));
      px = (dst_x > cur_x) ? P_EAST : P_WEST;
      py = (dst_y > cur_y) ? P_NORTH : P_SOUTH;
      if (dst_x == cur_x && dst_y == cur_y) exp_port = P_LOCAL;
      else if (dst_x == cur_x) exp_port = py;
      else if (dst_y == cur_y) exp_port = px;
      else if (vc_idle[px] != vc_idle[py]) exp_port = vc_idle[px] ? px : py;
      else exp_port = (vc_credits[py] > vc_credits[px]) ? py : px;
      #1;
      checks++;
      if (out_port !== exp_port) begin
        failures++;
        if (failures < 10) $display("cur=%0d,%0d dst=%0d,%0d got %s exp %s", cur_x, cur_y, dst_x, dst_y, out_port.name(), exp_port.name());
      end
      checks++;
      if (detour !== (dst_x != cur_x && dst_y != cur_y && exp_port == py)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
