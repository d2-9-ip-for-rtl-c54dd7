// tb_perf_counter: the generator's output is looped through two FIFOs back
// into the consumer (a local loop). Checks test ok, the status field
// encoding and the TxRx clock counter: with no stalls one packet of n
// payload words takes n+2 cycles, so the count must be close to
// npkts*(n+2). Then a generator-only run stops the counter at the last
// footer.
module tb_perf_counter;
  import comm_pkg::*;
  localparam int DW = 256;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic gen_en = 0, cons_en = 0;
  logic [31:0] pktgen_cfg0;
  coord_t pktgen_dest = '0;
  logic gen_hdr_wr, gen_dat_wr, cons_hdr_rd, cons_dat_rd;
  logic [127:0] gen_hdr_data, rx_hdr_data;
  logic [DW-1:0] gen_dat_data, rx_dat_data;
  logic tx_hdr_full, tx_dat_full, rx_hdr_empty, rx_dat_empty, test_ok;
  logic [7:0] status;
  logic [31:0] clk_count;
  int checks = 0, failures = 0;
  logic [4:0] hu, hf;
  logic [8:0] du, df;
  logic e1, e2;

  perf_counter #(.DW(DW), .PORT(1)) dut (.*);
  sync_fifo #(.W(128), .AW(4)) u_h (.clk, .rst, .wr_en(gen_hdr_wr), .wr_data(gen_hdr_data),
    .rd_en(cons_hdr_rd), .rd_data(rx_hdr_data), .empty(rx_hdr_empty), .full(tx_hdr_full),
    .used(hu), .free(hf), .wr_err(e1));
  sync_fifo #(.W(DW), .AW(8)) u_d (.clk, .rst, .wr_en(gen_dat_wr), .wr_data(gen_dat_data),
    .rd_en(cons_dat_rd), .rd_data(rx_dat_data), .empty(rx_dat_empty), .full(tx_dat_full),
    .used(du), .free(df), .wr_err(e2));

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  task automatic loop_run(input int n, input int len);
    int t, nw, expc;
    nw = (len + 31) / 32;
    expc = n * (nw + 2);
    pktgen_cfg0 = {2'b00, 14'(len), 16'(n)};
    gen_en = 0; cons_en = 0;
    repeat (2) @(negedge clk);
    chk(status == 8'h00, "status OFF/OFF");
    gen_en = 1; cons_en = 1;
    t = 0;
    while (!test_ok && t < 50000) begin @(negedge clk); t++; end
    repeat (5) @(negedge clk);
    chk(test_ok, $sformatf("loop %0dx%0d test ok", n, len));
    chk(status == {3'(CHK_COUNT), 1'b1, 4'(GEN_IDLE)}, $sformatf("status %h", status));
    chk(clk_count >= 32'(expc) && clk_count <= 32'(expc + 6), $sformatf("clock count %0d expected about %0d", clk_count, expc));
  endtask

  initial begin
    int t;
    repeat (3) @(negedge clk);
    rst = 0;
    loop_run(10, 1024);
    loop_run(4, 4096);
    loop_run(20, 16);
    // generator only: counter stops at the last footer write
    gen_en = 0; cons_en = 0;
    @(negedge clk);
    rst = 1;
    @(negedge clk);
    rst = 0;
    pktgen_cfg0 = {2'b00, 14'd64, 16'd3};
    gen_en = 1;
    repeat (100) @(negedge clk);
    chk(clk_count == 32'd11, $sformatf("generator-only count %0d (12 writes, 11 cycles apart)", clk_count));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
