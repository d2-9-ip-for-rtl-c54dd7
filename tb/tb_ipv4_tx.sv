// tb_ipv4_tx: random UDP datagrams (lengths 8..1600 bytes, unicast and
// broadcast destinations) are offered to ipv4_tx with random input gaps,
// random ARP and arbiter latencies and random output back-pressure. The
// output bytes are collected and checked: IPv4 header fields (0x45, total
// length, TTL 0x80, protocol 0x11, addresses), a header checksum that sums
// to 0xffff, the destination MAC (from ARP or broadcast), EtherType 0x0800
// and every datagram byte. Datagrams over 1480 bytes must raise err, be
// discarded entirely and produce no output; the ARP block must not be asked
// about broadcast packets.
module tb_ipv4_tx;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [31:0] src_ip = 32'hC0A8_0002, udp_dst_ip = 0, arp_ip;
  logic udp_start = 0, udp_busy, in_valid = 0, in_ready, arp_req, arp_valid = 0, ch_req, ch_gnt = 0;
  logic [15:0] udp_len = 0, ethertype;
  logic [63:0] in_data = 0, out_data;
  logic [47:0] arp_mac = 0, dst_mac;
  logic out_valid, out_last, out_ready = 0, err;
  logic [3:0] out_bytes;

  ipv4_tx dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // ARP responder: MAC derived from the IP; counts requests
  int arp_asks = 0;
  initial forever begin
    @(negedge clk);
    arp_valid = 0;
    if (arp_req) begin
      arp_asks++;
      repeat ($urandom_range(0, 6)) @(negedge clk);
      arp_valid = 1; arp_mac = {16'hD00D, arp_ip ^ 32'h1234_5678};
      @(negedge clk);
      arp_valid = 0;
      while (arp_req) @(negedge clk);
    end
  end
  // arbiter
  initial forever begin
    @(negedge clk);
    ch_gnt = 0;
    if (ch_req) begin
      repeat ($urandom_range(0, 4)) @(negedge clk);
      ch_gnt = 1;
      @(negedge clk);
      ch_gnt = 0;
      while (ch_req) @(negedge clk);
    end
  end
  // output collector
  byte unsigned obuf [$];
  int frames = 0, errs = 0;
  logic [47:0] seen_mac;
  always @(posedge clk) if (err) errs++;
  always @(negedge clk) out_ready = ($urandom_range(0, 3) != 0);
  always @(posedge clk) if (out_valid && out_ready) begin
    for (int b = 0; b < int'(out_bytes); b++) obuf.push_back(out_data[63 - 8*b -: 8]);
    seen_mac = dst_mac;
    if (out_last) frames++;
  end

  task automatic send(input int L, input logic [31:0] dip);
    byte unsigned d [$];
    logic [63:0] w;
    int nw, f0, e0, a0, t;
    bit bad;
    logic [31:0] s;
    for (int i = 0; i < L; i++) d.push_back(8'($urandom));
    nw = (L + 7) / 8;
    f0 = frames; e0 = errs; a0 = arp_asks;
    obuf.delete();
    @(negedge clk);
    udp_start = 1; udp_len = 16'(L); udp_dst_ip = dip;
    @(negedge clk);
    udp_start = 0;
    for (int k = 0; k < nw; k++) begin
      while ($urandom_range(0, 4) == 0) @(negedge clk);
      w = '0;
      for (int b = 0; b < 8; b++) if (8*k + b < L) w[63 - 8*b -: 8] = d[8*k + b];
      in_valid = 1; in_data = w;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
      in_valid = 0;
    end
    t = 0;
    while (udp_busy && t < 5000) begin @(negedge clk); t++; end
    repeat (2) @(negedge clk);
    if (L > 1480) begin
      chk(errs == e0 + 1 && frames == f0 && obuf.size() == 0, $sformatf("oversize %0d refused", L));
      return;
    end
    chk(errs == e0 && frames == f0 + 1, $sformatf("one frame for len %0d", L));
    chk(obuf.size() == 20 + L, $sformatf("frame size %0d for len %0d", obuf.size(), L));
    if (obuf.size() != 20 + L) return;
    chk(obuf[0] == 8'h45 && obuf[1] == 8'h00 && {obuf[2], obuf[3]} == 16'(L + 20), "version/IHL/TOS/length");
    chk(obuf[8] == 8'h80 && obuf[9] == 8'h11, "TTL/protocol");
    chk({obuf[12], obuf[13], obuf[14], obuf[15]} == src_ip && {obuf[16], obuf[17], obuf[18], obuf[19]} == dip, "addresses");
    s = 0;
    for (int i = 0; i < 20; i += 2) s += {obuf[i], obuf[i+1]};
    s = (s & 32'hFFFF) + (s >> 16);
    s = (s & 32'hFFFF) + (s >> 16);
    chk(s == 32'hFFFF, "header checksum");
    bad = 0;
    for (int i = 0; i < L; i++) if (obuf[20 + i] != d[i]) bad = 1;
    chk(!bad, "datagram bytes");
    chk(ethertype == 16'h0800, "EtherType");
    if (dip == 32'hFFFF_FFFF)
      chk(seen_mac == 48'hFFFF_FFFF_FFFF && arp_asks == a0, "broadcast: no ARP, MAC all ones");
    else
      chk(seen_mac == {16'hD00D, dip ^ 32'h1234_5678} && arp_asks == a0 + 1, "unicast MAC from ARP");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    send(8, 32'hC0A8_0003);
    send(1480, 32'hFFFF_FFFF);
    send(1481, 32'hC0A8_0009);
    for (int it = 0; it < 60; it++)
      send($urandom_range(8, 1600), ($urandom_range(0, 3) == 0) ? 32'hFFFF_FFFF : $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
