// tb_sync_fifo: random pushes and pops against a queue model; checks data
// order, empty/full/used/free and the write-error pulse on overflow.
module tb_sync_fifo;
  localparam int W = 16, AW = 3;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic wr_en = 0, rd_en = 0, empty, full, wr_err;
  logic [W-1:0] wr_data = 0, rd_data;
  logic [AW:0] used, free;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];
  int overflows = 0;

  sync_fifo #(.W(W), .AW(AW)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_err;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == 2**AW) || used != q.size() ||
          free != 2**AW - q.size()) begin
        failures++;
        $display("FAIL flags at %0d: size %0d used %0d empty %0b full %0b", i, q.size(), used, empty, full);
      end
      if (q.size() != 0) begin
        checks++;
        if (rd_data != q[0]) begin failures++; $display("FAIL data %h exp %h", rd_data, q[0]); end
      end
      wr_en = ($urandom % 100) < (i < 1500 ? 60 : 40);
      rd_en = ($urandom % 100) < (i < 1500 ? 40 : 60);
      wr_data = 16'($urandom);
      exp_err = wr_en && q.size() == 2**AW;
      @(posedge clk);
      #1;
      if (rd_en && q.size() != 0) void'(q.pop_front());
      if (wr_en && !exp_err) q.push_back(wr_data);
      checks++;
      if (wr_err != exp_err) begin failures++; $display("FAIL wr_err"); end
      if (exp_err) overflows++;
    end
    checks++;
    if (overflows == 0) begin failures++; $display("FAIL no overflow exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
