// Self-checking testbench of the round-robin arbiter (8 requesters).
// Random request vectors and a random ready (idle) input are applied for
// many cycles.  The testbench keeps its own record of who was granted last
// and checks that: no grant is given while not ready; at most one grant is
// given, only to a requester, and whenever someone requests while ready;
// the winner is the first requester after the last one granted (cyclic
// order); and no requester that keeps requesting waits through more than
// seven grants to others.
module tb_rr_arbiter;
  localparam int N = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] req = '0, gnt;
  logic ready = 1'b0, gnt_valid;
  logic [2:0] gnt_idx;
  int checks = 0, failures = 0;
  int last = N - 1;
  int waited [N];

  always #5 clk = ~clk;

  rr_arbiter #(.N_REQ(N)) dut (
    .clk_i(clk), .rst_ni(rst_n), .req_i(req), .ready_i(ready),
    .gnt_o(gnt), .gnt_valid_o(gnt_valid), .gnt_idx_o(gnt_idx)
  );

  initial begin
    repeat (30000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int want, served = -1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 20000; n++) begin
      @(posedge clk); #1;
      if (served >= 0) req[served] = 1'b0;   // the granted requester is served
      served = -1;
      // keep waiting requesters requesting, add new ones at random
      for (int i = 0; i < N; i++)
        if (!req[i] || $urandom_range(0, 9) == 0) req[i] = $urandom_range(0, 2) == 0;
      ready = $urandom_range(0, 3) != 0;
      #1;
      want = -1;
      if (ready)
        for (int k = 1; k <= N; k++)
          if (want < 0 && req[(last + k) % N]) want = (last + k) % N;
      checks++;
      if (want < 0 ? (gnt != '0 || gnt_valid) :
                     (gnt != (N'(1) << want) || !gnt_valid || int'(gnt_idx) != want)) begin
        failures++;
        if (failures < 10) $display("MISMATCH req=%b ready=%0d last=%0d got %b want %0d", req, ready, last, gnt, want);
      end
      if (want >= 0) begin
        for (int i = 0; i < N; i++) begin
          if (i == want) waited[i] = 0;
          else if (req[i]) waited[i]++;
          else waited[i] = 0;
          checks++;
          if (waited[i] > N - 1) begin failures++; $display("requester %0d starved", i); end
        end
        last = want;
        served = want;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
