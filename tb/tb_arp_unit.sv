// tb_arp_unit: drives arp_unit with lookups and received ARP packets and
// collects what it transmits, with a random-delay grant and random
// tx_ready. Checks: a lookup miss sends a broadcast request with the right
// fields and repeats it after the retry interval; a reply for my IP fills
// the table and answers the waiting lookup; a table hit answers without
// traffic; a request for my IP is answered by a unicast reply and its
// sender is learned; packets for another IP or with a wrong hardware type
// are ignored. A random phase compares the table against a model with the
// same round-robin replacement, using a pool of addresses larger than the
// table.
module tb_arp_unit;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int ENTRIES = 4, RETRY = 64;
  logic [31:0] my_ip = 32'hC0A8_0A05;
  logic [47:0] my_mac = 48'h0200_1122_3344;
  logic arp_req = 0, arp_valid;
  logic [31:0] arp_ip = 0;
  logic [47:0] arp_mac;
  logic rx_valid = 0, rx_last = 0;
  logic [63:0] rx_data = 0;
  logic tx_req, tx_gnt = 0, tx_valid, tx_last, tx_ready = 0;
  logic [63:0] tx_data;
  logic [3:0] tx_bytes;
  logic [47:0] tx_dst_mac;
  logic [15:0] tx_ethertype;

  arp_unit #(.ENTRIES(ENTRIES), .RETRY(RETRY)) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // grant model: one-cycle grant after a random delay
  initial forever begin
    @(negedge clk);
    tx_gnt = 0;
    tx_ready = !rst && ($urandom_range(0, 3) != 0);
    if (!rst && tx_req) begin
      repeat ($urandom_range(0, 3)) @(negedge clk);
      tx_gnt = 1;
      @(negedge clk);
      tx_gnt = 0;
    end
  end

  // transmitted packets: 4 words, destination, and word-level checks
  typedef struct { logic [63:0] w [4]; logic [47:0] dst; int n; } pkt_t;
  pkt_t txq [$];
  pkt_t cur;
  always @(posedge clk) if (!rst && tx_valid && tx_ready) begin
    if (cur.n < 4) cur.w[cur.n] = tx_data;
    cur.n++;
    cur.dst = tx_dst_mac;
    chk(tx_ethertype == 16'h0806, "ARP EtherType");
    chk(tx_bytes == (tx_last ? 4'd4 : 4'd8), "word byte count");
    if (tx_last) begin
      chk(cur.n == 4, $sformatf("ARP packet is 4 words (%0d)", cur.n));
      txq.push_back(cur);
      cur.n = 0;
    end
  end

  task automatic send_arp(input logic [15:0] htype, input logic [15:0] oper,
                          input logic [47:0] sha, input logic [31:0] spa,
                          input logic [47:0] tha, input logic [31:0] tpa);
    logic [63:0] w [4];
    w[0] = {htype, 16'h0800, 8'h06, 8'h04, oper};
    w[1] = {sha, spa[31:16]};
    w[2] = {spa[15:0], tha};
    w[3] = {tpa, 32'h0};
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      rx_valid = 1; rx_data = w[i]; rx_last = (i == 3);
      if ($urandom_range(0, 2) == 0) begin
        @(negedge clk); rx_valid = 0; rx_last = 0;
      end
    end
    @(negedge clk); rx_valid = 0; rx_last = 0;
  endtask

  // check a transmitted packet as request (oper 1) or reply (oper 2)
  task automatic chk_pkt(input pkt_t p, input logic [15:0] oper, input logic [47:0] tha,
                         input logic [31:0] tpa, input logic [47:0] dst, input string s);
    chk(p.w[0] == {16'h0001, 16'h0800, 8'h06, 8'h04, oper}, {s, ": htype/ptype/hlen/plen/oper"});
    chk(p.w[1] == {my_mac, my_ip[31:16]}, {s, ": sender MAC/IP"});
    chk(p.w[2] == {my_ip[15:0], tha}, {s, ": target MAC"});
    chk(p.w[3] == {tpa, 32'h0}, {s, ": target IP"});
    chk(p.dst == dst, {s, ": frame destination"});
  endtask

  task automatic wait_tx(input int n, output bit ok);
    int t = 0;
    while (txq.size() < n && t < 400) begin @(negedge clk); t++; end
    ok = (txq.size() >= n);
  endtask

  // start a lookup; returns after arp_valid (or a timeout) with the MAC and latency
  logic [47:0] got_mac;
  int got_lat;
  bit got;
  bit lk_busy = 0;
  task automatic lookup_start(input logic [31:0] ip);
    @(negedge clk); arp_ip = ip; arp_req = 1; lk_busy = 1;
  endtask
  always @(posedge clk) if (!rst && lk_busy) begin
    got_lat++;
    if (arp_valid) begin
      got = 1; got_mac = arp_mac; lk_busy = 0;
      #1 arp_req = 0;
    end
  end
  task automatic lookup_wait(input int limit);
    int t = 0;
    while (!got && t < limit) begin @(negedge clk); t++; end
  endtask

  // table model
  logic [31:0] m_ip [ENTRIES];
  logic [47:0] m_mac [ENTRIES];
  bit m_val [ENTRIES];
  int m_repl = 0;
  task automatic m_learn(input logic [31:0] ip, input logic [47:0] mac);
    for (int e = 0; e < ENTRIES; e++)
      if (m_val[e] && m_ip[e] == ip) begin m_mac[e] = mac; return; end
    m_val[m_repl] = 1; m_ip[m_repl] = ip; m_mac[m_repl] = mac;
    m_repl = (m_repl + 1) % ENTRIES;
  endtask
  function automatic bit m_find(input logic [31:0] ip, output logic [47:0] mac);
    for (int e = 0; e < ENTRIES; e++)
      if (m_val[e] && m_ip[e] == ip) begin mac = m_mac[e]; return 1; end
    return 0;
  endfunction

  logic [31:0] pool [8];
  logic [47:0] mac_of [8];
  bit ok;
  logic [47:0] mm;
  int nreq = 0, nrep = 0, nhit = 0, nmiss = 0;

  initial begin
    for (int i = 0; i < ENTRIES; i++) m_val[i] = 0;
    for (int i = 0; i < 8; i++) begin
      pool[i] = 32'hC0A8_0A10 + i;
      mac_of[i] = {16'h0A00, $urandom()};
    end
    repeat (4) @(negedge clk);
    rst = 0;
    repeat (4) @(negedge clk);

    // 1. miss: broadcast request, then retry after RETRY cycles
    got = 0; got_lat = 0;
    lookup_start(pool[0]);
    wait_tx(1, ok);
    chk(ok, "miss sends a request");
    if (ok) chk_pkt(txq.pop_front(), 16'h0001, 48'h0, pool[0], 48'hFFFF_FFFF_FFFF, "request");
    wait_tx(1, ok);
    chk(ok && got_lat > RETRY, $sformatf("request repeated after the retry interval (%0d)", got_lat));
    if (ok) chk_pkt(txq.pop_front(), 16'h0001, 48'h0, pool[0], 48'hFFFF_FFFF_FFFF, "retry");
    chk(!got, "no answer before a reply");

    // 2. reply for my IP fills the table and answers the lookup
    send_arp(16'h0001, 16'h0002, mac_of[0], pool[0], my_mac, my_ip);
    lookup_wait(20);
    chk(got && got_mac == mac_of[0], "reply answers the lookup");
    m_learn(pool[0], mac_of[0]);
    repeat (RETRY + 20) @(negedge clk);
    while (txq.size() > 0) void'(txq.pop_front());   // a retry may already have been queued

    // 3. hit: answered quickly, no traffic
    got = 0; got_lat = 0;
    lookup_start(pool[0]);
    lookup_wait(10);
    chk(got && got_mac == mac_of[0] && got_lat <= 3, $sformatf("hit answered in %0d cycles", got_lat));
    repeat (20) @(negedge clk);
    chk(txq.size() == 0, "hit sends nothing");

    // 4. request for my IP: unicast reply, sender learned
    send_arp(16'h0001, 16'h0001, mac_of[1], pool[1], 48'h0, my_ip);
    wait_tx(1, ok);
    chk(ok, "request for my IP is answered");
    if (ok) chk_pkt(txq.pop_front(), 16'h0002, mac_of[1], pool[1], mac_of[1], "reply");
    m_learn(pool[1], mac_of[1]);
    got = 0; got_lat = 0;
    lookup_start(pool[1]);
    lookup_wait(10);
    chk(got && got_mac == mac_of[1] && got_lat <= 3, "requester learned");

    // 5. ignored packets: other target IP, wrong hardware type
    send_arp(16'h0001, 16'h0001, mac_of[2], pool[2], 48'h0, my_ip + 1);
    send_arp(16'h0006, 16'h0001, mac_of[3], pool[3], 48'h0, my_ip);
    send_arp(16'h0001, 16'h0002, mac_of[4], pool[4], my_mac, my_ip ^ 32'h100);
    repeat (40) @(negedge clk);
    chk(txq.size() == 0, "packets for another IP or hardware type not answered");
    for (int k = 2; k <= 4; k++) begin
      got = 0; got_lat = 0;
      lookup_start(pool[k]);
      lookup_wait(10);
      chk(!got, $sformatf("ignored packet %0d not learned", k));
      wait_tx(1, ok);
      // answer the request that the miss produced, so the table keeps the model's order
      if (ok) chk_pkt(txq.pop_front(), 16'h0001, 48'h0, pool[k], 48'hFFFF_FFFF_FFFF, "request");
      send_arp(16'h0001, 16'h0002, mac_of[k], pool[k], my_mac, my_ip);
      lookup_wait(20);
      chk(got && got_mac == mac_of[k], "reply after ignored packet");
      m_learn(pool[k], mac_of[k]);
      repeat (RETRY + 20) @(negedge clk);
      while (txq.size() > 0) void'(txq.pop_front());
    end

    // 6. random: lookups, replies and requests over 8 addresses, 4 entries
    for (int it = 0; it < 150; it++) begin
      int k;
      k = $urandom_range(0, 7);
      if ($urandom_range(0, 4) == 0) begin
        mac_of[k] = {16'h0B00, $urandom()};
        send_arp(16'h0001, 16'h0001, mac_of[k], pool[k], 48'h0, my_ip);
        wait_tx(1, ok);
        chk(ok, "random request answered");
        if (ok) chk_pkt(txq.pop_front(), 16'h0002, mac_of[k], pool[k], mac_of[k], "random reply");
        m_learn(pool[k], mac_of[k]);
        nrep++;
      end else begin
        got = 0; got_lat = 0;
        lookup_start(pool[k]);
        if (m_find(pool[k], mm)) begin
          lookup_wait(10);
          chk(got && got_mac == mm && got_lat <= 3, $sformatf("random hit %0d", k));
          nhit++;
        end else begin
          wait_tx(1, ok);
          chk(ok, "random miss sends a request");
          if (ok) chk_pkt(txq.pop_front(), 16'h0001, 48'h0, pool[k], 48'hFFFF_FFFF_FFFF, "random request");
          chk(!got, "random miss not answered early");
          send_arp(16'h0001, 16'h0002, mac_of[k], pool[k], my_mac, my_ip);
          lookup_wait(20);
          chk(got && got_mac == mac_of[k], $sformatf("random miss answered %0d", k));
          m_learn(pool[k], mac_of[k]);
          nmiss++;
          repeat (RETRY + 10) @(negedge clk);
          while (txq.size() > 0) begin
            pkt_t p;
            p = txq.pop_front();
            chk(p.w[3][63:32] == pool[k], "only retries of the same request");
          end
        end
        repeat (2) @(negedge clk);
      end
      nreq++;
    end
    $display("arp: %0d operations, %0d hits, %0d misses, %0d replies", nreq, nhit, nmiss, nrep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
