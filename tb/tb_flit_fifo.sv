// tb_flit_fifo -- self-checking test of the VC flit buffer.
// Random pushes and pops (never overflowing or underflowing, as the credit
// protocol guarantees) are mirrored in a queue; the front flit, empty, full
// and count are compared every cycle.
module tb_flit_fifo;
  import slide_pkg::*;
  logic clk = 0, rst_n = 0;
  logic push, pop, empty, full;
  flit_t din, dout;
  logic [$clog2(BUF_DEPTH+1)-1:0] count;
  flit_t q[$];
  int checks = 0, failures = 0;

  flit_fifo dut (.clk, .rst_n, .push, .din, .pop, .dout, .empty, .full, .count);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      checks++;
      if (empty !== (q.size() == 0) || full !== (q.size() == BUF_DEPTH) || int'(count) != q.size()) begin
        failures++;
        $display("flag mismatch size=%0d empty=%b full=%b count=%0d", q.size(), empty, full, count);
      end
      if (q.size() > 0) begin
        checks++;
        if (dout !== q[0]) failures++;
      end
      pop  = (q.size() > 0) && ($urandom % 2);
      push = ((q.size() < BUF_DEPTH) || pop) && ($urandom % 2);
      din  = flit_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      @(posedge clk);
      #1;
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
