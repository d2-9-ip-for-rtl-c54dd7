// tb_intranode_port: moves words through both directions of an intra-node
// port and checks order, fill levels, the eight read/write counters, the
// write-exception pulse on a full FIFO, and that the performance generator
// and consumer take over the TX and RX sides when enabled.
module tb_intranode_port;
  import comm_pkg::*;
  localparam int DW = 128, HAW = 2, DAW = 3;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic tx_hdr_wr = 0, tx_dat_wr = 0, rx_hdr_rd = 0, rx_dat_rd = 0;
  logic [127:0] tx_hdr_data = 0, rx_hdr_data, sw_tx_hdr_data, sw_rx_hdr_data = 0;
  logic [DW-1:0] tx_dat_data = 0, rx_dat_data, sw_tx_dat_data, sw_rx_dat_data = 0;
  logic tx_hdr_full, tx_dat_full, rx_hdr_empty, rx_dat_empty;
  logic sw_tx_hdr_rd = 0, sw_tx_dat_rd = 0, sw_tx_hdr_empty, sw_tx_dat_empty;
  logic sw_rx_hdr_wr = 0, sw_rx_dat_wr = 0;
  logic [HAW:0] sw_rx_hdr_free;
  logic [DAW:0] sw_rx_dat_free;
  logic gen_en = 0, cons_en = 0, test_ok;
  logic [31:0] pktgen_cfg0 = 0;
  coord_t pktgen_dest = '0;
  logic [7:0] perf_status;
  logic [31:0] perf_count, fifo_sts_rx, fifo_sts_tx;
  logic [31:0] cnt [8];
  logic [3:0] wr_exc;
  int checks = 0, failures = 0;
  int exc_seen = 0;

  intranode_port #(.DW(DW), .PORT(0), .HAW(HAW), .DAW(DAW)) dut (.*);

  always @(posedge clk) if (wr_exc[0]) exc_seen++;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    // TX: task writes 3 headers and 5 data words; switch side reads them.
    for (int i = 0; i < 5; i++) begin
      @(negedge clk);
      tx_hdr_wr = (i < 3); tx_hdr_data = 128'(100 + i);
      tx_dat_wr = 1; tx_dat_data = DW'(200 + i);
    end
    @(negedge clk);
    tx_hdr_wr = 0; tx_dat_wr = 0;
    chk(fifo_sts_tx == {16'd5, 16'd3}, "TX fill levels");
    for (int i = 0; i < 5; i++) begin
      if (i < 3) chk(sw_tx_hdr_data == 128'(100 + i), "TX header order");
      chk(sw_tx_dat_data == DW'(200 + i), "TX data order");
      sw_tx_hdr_rd = (i < 3); sw_tx_dat_rd = 1;
      @(negedge clk);
    end
    sw_tx_hdr_rd = 0; sw_tx_dat_rd = 0;
    chk(sw_tx_hdr_empty && sw_tx_dat_empty, "TX drained");
    // overflow the TX header FIFO (depth 4)
    for (int i = 0; i < 6; i++) begin
      tx_hdr_wr = 1;
      @(negedge clk);
    end
    tx_hdr_wr = 0;
    @(negedge clk);
    chk(tx_hdr_full && exc_seen == 2, "write exception on full FIFO");
    for (int i = 0; i < 4; i++) begin sw_tx_hdr_rd = 1; @(negedge clk); end
    sw_tx_hdr_rd = 0;
    // RX: switch writes, task reads
    for (int i = 0; i < 4; i++) begin
      sw_rx_hdr_wr = (i < 2); sw_rx_hdr_data = 128'(300 + i);
      sw_rx_dat_wr = 1; sw_rx_dat_data = DW'(400 + i);
      @(negedge clk);
    end
    sw_rx_hdr_wr = 0; sw_rx_dat_wr = 0;
    chk(sw_rx_hdr_free == 3'd2 && sw_rx_dat_free == 4'd4, "RX free places");
    chk(fifo_sts_rx == {16'd4, 16'd2}, "RX fill levels");
    for (int i = 0; i < 4; i++) begin
      if (i < 2) chk(rx_hdr_data == 128'(300 + i), "RX header order");
      chk(rx_dat_data == DW'(400 + i), "RX data order");
      rx_hdr_rd = (i < 2); rx_dat_rd = 1;
      @(negedge clk);
    end
    rx_hdr_rd = 0; rx_dat_rd = 0;
    // counters: hd tx rd, hd tx wr, hd rx rd, hd rx wr, dt tx rd, dt tx wr, dt rx rd, dt rx wr
    chk(cnt[0] == 7 && cnt[1] == 7 && cnt[2] == 2 && cnt[3] == 2, "header counters");
    chk(cnt[4] == 5 && cnt[5] == 5 && cnt[6] == 4 && cnt[7] == 4, "data counters");
    // generator takes the TX side: user writes are ignored
    pktgen_cfg0 = {2'b00, 14'd32, 16'd1};
    gen_en = 1;
    tx_dat_wr = 1; tx_dat_data = '1;
    repeat (6) @(negedge clk);
    tx_dat_wr = 0;
    chk(fifo_sts_tx == {16'd2, 16'd2}, "generator wrote header, 2 words, footer");
    chk(sw_tx_dat_data != '1, "user write ignored while generator enabled");
    gen_en = 0;
    // loop the generated packet back to RX by hand, consumer reads it
    cons_en = 1;
    for (int i = 0; i < 4; i++) begin
      sw_rx_hdr_wr = (i == 0 || i == 3) && !sw_tx_hdr_empty;
      sw_rx_hdr_data = sw_tx_hdr_data;
      sw_tx_hdr_rd = sw_rx_hdr_wr;
      sw_rx_dat_wr = (i == 1 || i == 2);
      sw_rx_dat_data = sw_tx_dat_data;
      sw_tx_dat_rd = sw_rx_dat_wr;
      @(negedge clk);
    end
    sw_rx_hdr_wr = 0; sw_rx_dat_wr = 0; sw_tx_hdr_rd = 0; sw_tx_dat_rd = 0;
    repeat (6) @(negedge clk);
    chk(test_ok && rx_hdr_empty && rx_dat_empty, "consumer drained and checked the packet");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
