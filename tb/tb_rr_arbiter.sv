// tb_rr_arbiter: random request patterns; the grant must be the first
// requester at or after the rotating priority pointer, which moves past
// each winner. Also checks that a requester held high is served within N
// grants.
module tb_rr_arbiter;
  localparam int N = 6;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [N-1:0] req = 0, gnt;
  logic advance = 1;
  logic [$clog2(N)-1:0] gnt_idx;
  int checks = 0, failures = 0;
  int ptr = 0;

  rr_arbiter #(.N(N)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp, wait_cnt;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      req = N'($urandom);
      if (i % 7 == 0) req = 0;
      #1;
      exp = -1;
      for (int j = 0; j < N; j++) if (exp < 0 && req[(ptr + j) % N]) exp = (ptr + j) % N;
      checks++;
      if (exp < 0) begin
        if (gnt != 0) begin failures++; $display("FAIL grant without request"); end
      end else if (gnt != (N'(1) << exp) || gnt_idx != exp) begin
        failures++;
        $display("FAIL req %b ptr %0d gnt %b exp %0d", req, ptr, gnt, exp);
      end
      if (exp >= 0) ptr = (exp + 1) % N;
    end
    // fairness: requester 2 plus random others; served within N grants
    wait_cnt = 0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      req = N'($urandom) | N'(4);
      #1;
      if (gnt[2]) wait_cnt = 0; else wait_cnt++;
      checks++;
      if (wait_cnt >= N) begin failures++; $display("FAIL starvation"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
