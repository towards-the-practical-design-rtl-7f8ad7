// tb_rr_arbiter -- self-checking test of the round-robin switch arbiter.
// Drives random request vectors into a 5-input arbiter and compares the
// grant with a reference model that scans from the input after the last
// winner.  Also checks that a constantly requesting input is served within
// N grants (fairness).
module tb_rr_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, grant;
  logic update;
  int checks = 0, failures = 0;
  int ref_ptr;

  rr_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .update, .grant);

  always #5 clk = ~clk;

  function automatic logic [N-1:0] model(logic [N-1:0] r, int p);
    for (int k = 0; k < N; k++)
      if (r[(p + k) % N]) return N'(1) << ((p + k) % N);
    return '0;
  endfunction

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int since_served;
    req = '0; update = 0; ref_ptr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      req    = N'($urandom);
      update = ($urandom % 4) != 0;
      #1;
      checks++;
      if (grant !== model(req, ref_ptr)) begin
        failures++;
        if (failures < 10) $display("mismatch req=%b grant=%b exp=%b", req, grant, model(req, ref_ptr));
      end
      if (update && grant != 0)
        for (int i = 0; i < N; i++) if (grant[i]) ref_ptr = (i + 1) % N;
    end
    // fairness: all inputs request, input 3 must win within N cycles
    since_served = 0;
    for (int t = 0; t < 3 * N; t++) begin
      @(negedge clk);
      req = '1; update = 1; #1;
      if (grant[3]) since_served = 0; else since_served++;
      checks++;
      if (since_served >= N) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
