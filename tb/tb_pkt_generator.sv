// tb_pkt_generator: enables the generator with random FIFO-full stalls and
// checks every word it writes: header fields, payload pattern, footer with
// packet number, the number of packets, the state codes and header-only mode.
module tb_pkt_generator;
  import comm_pkg::*;
  localparam int DW = 128;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic en = 0, cfg_hdr_only = 0, hdr_full = 0, dat_full = 0;
  logic [15:0] cfg_npkts;
  logic [13:0] cfg_len;
  coord_t cfg_dest;
  logic hdr_wr, dat_wr, first_wr, done;
  logic [127:0] hdr_data;
  logic [DW-1:0] dat_data;
  gen_state_t state;
  int checks = 0, failures = 0;

  pkt_generator #(.DW(DW), .DEST_PORT(2)) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // Stream checker
  int pkts, words, firsts;
  bit in_pkt;
  pkt_hdr_t h;
  always @(posedge clk) if (!rst) begin
    if (first_wr) firsts++;
    if (hdr_wr && !hdr_full) begin
      if (!in_pkt) begin
        h = hdr_data;
        chk(h.length == (cfg_hdr_only ? 14'd0 : cfg_len) && h.coord == cfg_dest && h.intratile_port == 4'd2 &&
            h.pid_chid == 16'(pkts), "header fields");
        chk(state == GEN_TX_HEADER, "state TX_HEADER");
        in_pkt = 1;
        words = 0;
      end else begin
        chk(words == payload_words(h.length, DW/8), "payload word count");
        chk(hdr_data == {16'hF007, 96'h0, 16'(pkts)}, "footer");
        chk(state == GEN_TX_FOOTER, "state TX_FOOTER");
        in_pkt = 0;
        pkts++;
      end
    end
    if (dat_wr && !dat_full) begin
      for (int l = 0; l < DW/32; l++)
        chk(dat_data[32*l +: 32] == test_lane(h.length, words, l), "payload pattern");
      chk(state == GEN_TX_PAYLOAD && in_pkt, "state TX_PAYLOAD");
      words++;
    end
  end

  always @(negedge clk) begin
    hdr_full <= ($urandom % 4) == 0;
    dat_full <= ($urandom % 3) == 0;
  end

  task automatic run(input int n, input int len, input bit ho);
    int t;
    cfg_npkts = 16'(n); cfg_len = 14'(len); cfg_hdr_only = ho;
    cfg_dest = '0; cfg_dest.x = 6'd3; cfg_dest.y = 5'd1;
    pkts = 0; firsts = 0; in_pkt = 0;
    @(negedge clk);
    chk(state == GEN_OFF, "state OFF while disabled");
    en = 1;
    t = 0;
    while (!done && t < 20000) begin @(negedge clk); t++; end
    repeat (3) @(negedge clk);
    chk(done && pkts == n && firsts == 1, $sformatf("run %0d x %0d: %0d packets", n, len, pkts));
    chk(state == GEN_IDLE, "state IDLE after run");
    en = 0;
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    run(5, 100, 0);
    run(3, 16, 0);
    run(4, 512, 1);
    run(2, 4096, 0);
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
