// tb_pkt_consumer: the testbench plays the RX FIFOs (header/footer and data
// queues with random gaps), feeds correct and corrupted packets and checks
// that the consumer pops exactly the packet words, counts packets, reports
// state codes, raises test ok only for error-free runs and counts payload
// errors.
module tb_pkt_consumer;
  import comm_pkg::*;
  localparam int DW = 128;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic en = 0;
  logic [15:0] cfg_npkts;
  logic hdr_rd, dat_rd, hdr_empty, dat_empty, test_ok, last_rd;
  logic [127:0] hdr_data;
  logic [DW-1:0] dat_data;
  chk_state_t state;
  logic [15:0] pkts_rcvd, errors;
  int checks = 0, failures = 0;
  logic [127:0] hq[$];
  logic [DW-1:0] dq[$];
  bit gap_h, gap_d;
  int footers;

  pkt_consumer #(.DW(DW)) dut (.*);

  assign hdr_empty = hq.size() == 0 || gap_h;
  assign dat_empty = dq.size() == 0 || gap_d;
  assign hdr_data = hq.size() ? hq[0] : '0;
  assign dat_data = dq.size() ? dq[0] : '0;

  // Pops are applied just after the clock edge, once the DUT has sampled.
  always @(posedge clk) begin
    bit ph, pd;
    ph = hdr_rd && !hdr_empty;
    pd = dat_rd && !dat_empty;
    #1;
    if (ph) void'(hq.pop_front());
    if (pd) void'(dq.pop_front());
    if (last_rd) footers++;
  end
  always @(negedge clk) begin
    gap_h = ($urandom % 4) == 0;
    gap_d = ($urandom % 4) == 0;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  task automatic push_pkt(input int len, input int bad_word);
    pkt_hdr_t h;
    logic [DW-1:0] w;
    h = '0;
    h.length = 14'(len);
    hq.push_back(h);
    for (int i = 0; i < payload_words(14'(len), DW/8); i++) begin
      for (int l = 0; l < DW/32; l++) w[32*l +: 32] = test_lane(14'(len), i, l);
      if (i == bad_word) w[5] = ~w[5];
      dq.push_back(w);
    end
    hq.push_back({16'hF007, 112'h0});
  endtask

  task automatic wait_empty;
    int t;
    t = 0;
    while ((hq.size() || dq.size()) && t < 10000) begin @(negedge clk); t++; end
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    cfg_npkts = 6;
    push_pkt(40, -1);
    @(negedge clk);
    chk(state == CHK_OFF && hq.size() == 2, "disabled: nothing read");
    en = 1;
    repeat (2) @(negedge clk);
    wait_empty();
    chk(state == CHK_COUNT && pkts_rcvd == 1 && !test_ok, "one packet counted, run not complete");
    push_pkt(0, -1);
    push_pkt(16, -1);
    push_pkt(4096, -1);
    push_pkt(33, -1);
    push_pkt(1, -1);
    wait_empty();
    chk(pkts_rcvd == 6 && errors == 0 && test_ok, $sformatf("6 packets, test ok (%0d, %0d)", pkts_rcvd, errors));
    chk(footers == 6, "footer pulses");
    chk(dq.size() == 0 && hq.size() == 0, "exactly the packet words consumed");
    // new run with a corrupted word
    en = 0;
    @(negedge clk);
    chk(state == CHK_OFF && !test_ok, "OFF after disable");
    en = 1;
    cfg_npkts = 2;
    repeat (2) @(negedge clk);
    chk(state == CHK_IDLE, "IDLE before first packet");
    push_pkt(200, 3);
    push_pkt(64, -1);
    wait_empty();
    chk(pkts_rcvd == 2 && errors == 1 && !test_ok, "payload error detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
