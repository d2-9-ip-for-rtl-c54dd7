// tb_eth_test_mac: the generator runs against a model of the IPv4
// transmitter's datagram input (busy for a random time after each start,
// random in_ready); every datagram is compared with an independently
// computed header and LFSR sequence, and the number of datagrams and words
// is checked. The collected datagrams are then played into the checker,
// together with corrupted copies (one flipped bit, a missing word), and
// a datagram that is not a test packet; the data, error and packet
// counters must match what was sent.
module tb_eth_test_mac;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int PW = 16;
  logic start = 0, gen_busy, udp_start, udp_busy = 0, in_valid, in_ready = 0;
  logic [15:0] npkts = 0, udp_len;
  logic [31:0] udp_dst_ip;
  logic [63:0] in_data;
  logic rx_valid = 0, rx_last = 0;
  logic [63:0] rx_data = 0;
  logic [3:0] rx_bytes = 0;
  logic [31:0] rx_data_cnt, rx_err_cnt, rx_pkt_cnt;

  eth_test_mac #(.PAY_WORDS(PW), .SEED(64'hFEED_0000_0000_0001)) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // reference sequence: 64-bit shift register, XNOR of taps 64, 63, 61, 60
  logic [63:0] ref_w [PW];
  initial begin
    logic [63:0] v;
    v = 64'hFEED_0000_0000_0001;
    for (int i = 0; i < PW; i++) begin
      ref_w[i] = v;
      v = {v[62:0], !(v[63] ^ v[62] ^ v[60] ^ v[59])};
    end
  end

  // IPv4 transmitter model: takes the start, then words with random ready
  logic [63:0] dg [$][$];
  logic [63:0] cur [$];
  int n_starts = 0, words_left = 0;
  initial forever begin
    @(posedge clk);
    if (!rst && udp_start && !udp_busy) begin
      @(negedge clk);
      n_starts++;
      chk(udp_len == 16'(8 + 8 * PW) && udp_dst_ip == 32'hC0A8_0002, "datagram length and destination IP");
      udp_busy = 1;
      words_left = PW + 1;
      cur.delete();
      while (words_left > 0) begin
        in_ready = ($urandom_range(0, 3) != 0);
        @(posedge clk);
        if (in_valid && in_ready) begin cur.push_back(in_data); words_left--; end
        @(negedge clk);
        in_ready = 0;
      end
      dg.push_back(cur);
      repeat ($urandom_range(0, 12)) @(negedge clk);
      udp_busy = 0;
    end
  end

  task automatic play(input logic [63:0] w [$]);
    foreach (w[i]) begin
      @(negedge clk);
      rx_valid = 1; rx_data = w[i]; rx_bytes = 8; rx_last = (i == w.size() - 1);
      if ($urandom_range(0, 3) == 0) begin @(negedge clk); rx_valid = 0; rx_last = 0; end
    end
    @(negedge clk); rx_valid = 0; rx_last = 0;
  endtask

  int t;
  initial begin
    repeat (4) @(negedge clk);
    rst = 0;
    repeat (4) @(negedge clk);
    chk(!gen_busy, "idle after reset");
    npkts = 5;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    chk(gen_busy, "busy after start");
    t = 0;
    while ((gen_busy || udp_busy) && t < 5000) begin @(negedge clk); t++; end
    chk(!gen_busy && n_starts == 5 && dg.size() == 5, $sformatf("five datagrams sent (%0d)", dg.size()));
    foreach (dg[p]) begin
      bit same;
      chk(dg[p].size() == PW + 1, "datagram word count");
      chk(dg[p][0] == {16'hFA62, 16'hFA62, 16'(8 + 8 * PW), 16'h0000}, "UDP header: ports 0xfa62, length, checksum 0");
      same = 1;
      for (int i = 0; i < PW; i++) if (dg[p].size() == PW + 1 && dg[p][i + 1] != ref_w[i]) same = 0;
      chk(same, "LFSR payload");
    end
    // checker: the generated packets, then faulty ones and a foreign one
    foreach (dg[p]) play(dg[p]);
    repeat (5) @(negedge clk);
    chk(rx_pkt_cnt == 5 && rx_data_cnt == 5 * PW && rx_err_cnt == 0,
        $sformatf("checker: 5 packets, %0d words, no errors (%0d/%0d/%0d)", 5 * PW, rx_pkt_cnt, rx_data_cnt, rx_err_cnt));
    begin
      logic [63:0] bad [$];
      bad = dg[0];
      bad[1 + $urandom_range(0, PW - 1)][$urandom_range(0, 63)] ^= 1'b1;
      play(bad);
      bad = dg[1];
      void'(bad.pop_back());
      play(bad);
      bad = dg[2];
      bad[0][63:48] = 16'h1234;                  // another port: not a test packet
      play(bad);
    end
    repeat (5) @(negedge clk);
    chk(rx_pkt_cnt == 7 && rx_data_cnt == 7 * PW - 1 && rx_err_cnt == 2,
        $sformatf("checker: flipped bit and missing word counted, foreign packet ignored (%0d/%0d/%0d)",
                  rx_pkt_cnt, rx_data_cnt, rx_err_cnt));
    // a second run restarts cleanly
    npkts = 2;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    t = 0;
    while ((gen_busy || udp_busy) && t < 5000) begin @(negedge clk); t++; end
    chk(dg.size() == 7 && dg[6].size() == PW + 1 && dg[6][1] == ref_w[0], "second run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
