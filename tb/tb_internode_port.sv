// tb_internode_port: checks that the link side's writes are steered to the
// VCH0 or VCH1 receive FIFOs by the virtual-channel bit, that both virtual
// channels are read independently by the switch side, that the TX FIFOs pass
// switch writes to the link side in order, and the twelve counters.
module tb_internode_port;
  localparam int DW = 64, HAW = 3, DAW = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic sw_tx_hdr_wr = 0, sw_tx_dat_wr = 0;
  logic [127:0] sw_tx_hdr_data = 0;
  logic [DW-1:0] sw_tx_dat_data = 0;
  logic [HAW:0] sw_tx_hdr_free;
  logic [DAW:0] sw_tx_dat_free;
  logic sw_rx_hdr_rd [2], sw_rx_hdr_empty [2], sw_rx_dat_rd [2], sw_rx_dat_empty [2];
  logic [127:0] sw_rx_hdr_data [2];
  logic [DW-1:0] sw_rx_dat_data [2];
  logic lk_tx_hdr_rd = 0, lk_tx_dat_rd = 0, lk_tx_hdr_empty, lk_tx_dat_empty;
  logic [127:0] lk_tx_hdr_data;
  logic [DW-1:0] lk_tx_dat_data;
  logic lk_rx_hdr_wr = 0, lk_rx_dat_wr = 0, lk_rx_vc = 0;
  logic [127:0] lk_rx_hdr_data = 0;
  logic [DW-1:0] lk_rx_dat_data = 0;
  logic [HAW:0] lk_rx_hdr_free [2];
  logic [DAW:0] lk_rx_dat_free [2];
  logic [31:0] cnt [12];
  int checks = 0, failures = 0;

  internode_port #(.DW(DW), .HAW(HAW), .DAW(DAW)) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    for (int v = 0; v < 2; v++) begin sw_rx_hdr_rd[v] = 0; sw_rx_dat_rd[v] = 0; end
    repeat (3) @(negedge clk);
    rst = 0;
    // link writes: VC0 gets 2 headers + 3 data, VC1 gets 1 header + 2 data
    for (int i = 0; i < 8; i++) begin
      lk_rx_vc = (i >= 5);
      lk_rx_hdr_wr = (i == 0 || i == 4 || i == 5);
      lk_rx_hdr_data = 128'(10 + i);
      lk_rx_dat_wr = (i >= 1 && i <= 3) || (i >= 6);
      lk_rx_dat_data = DW'(50 + i);
      @(negedge clk);
    end
    lk_rx_hdr_wr = 0; lk_rx_dat_wr = 0;
    chk(lk_rx_hdr_free[0] == 4'd6 && lk_rx_hdr_free[1] == 4'd7, "header free per VC");
    chk(lk_rx_dat_free[0] == 5'd13 && lk_rx_dat_free[1] == 5'd14, "data free per VC");
    chk(sw_rx_hdr_data[1] == 128'd15 && sw_rx_dat_data[1] == DW'(56), "VC1 head");
    chk(sw_rx_hdr_data[0] == 128'd10 && sw_rx_dat_data[0] == DW'(51), "VC0 head");
    sw_rx_hdr_rd[1] = 1; sw_rx_dat_rd[1] = 1;
    @(negedge clk);
    sw_rx_hdr_rd[1] = 0;
    chk(sw_rx_hdr_empty[1] && sw_rx_dat_data[1] == DW'(57), "VC1 read independently");
    chk(sw_rx_hdr_data[0] == 128'd10, "VC0 untouched");
    @(negedge clk);
    sw_rx_dat_rd[1] = 0;
    sw_rx_hdr_rd[0] = 1;
    @(negedge clk);
    sw_rx_hdr_rd[0] = 0;
    chk(sw_rx_hdr_data[0] == 128'd14, "VC0 second header");
    // TX path
    for (int i = 0; i < 3; i++) begin
      sw_tx_hdr_wr = 1; sw_tx_hdr_data = 128'(70 + i);
      sw_tx_dat_wr = (i < 2); sw_tx_dat_data = DW'(90 + i);
      @(negedge clk);
    end
    sw_tx_hdr_wr = 0; sw_tx_dat_wr = 0;
    chk(sw_tx_hdr_free == 4'd5 && sw_tx_dat_free == 5'd14, "TX free");
    chk(lk_tx_hdr_data == 128'd70 && lk_tx_dat_data == DW'(90), "TX head");
    lk_tx_hdr_rd = 1; lk_tx_dat_rd = 1;
    @(negedge clk);
    lk_tx_hdr_rd = 0; lk_tx_dat_rd = 0;
    chk(lk_tx_hdr_data == 128'd71 && lk_tx_dat_data == DW'(91), "TX order");
    // counters
    chk(cnt[0] == 1 && cnt[1] == 1 && cnt[2] == 3 && cnt[3] == 2, "TX counters");
    chk(cnt[4] == 3 && cnt[5] == 2 && cnt[6] == 0 && cnt[7] == 1, "VCH0 counters");
    chk(cnt[8] == 2 && cnt[9] == 1 && cnt[10] == 2 && cnt[11] == 1, "VCH1 counters");
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
