// tb_mac_rx: feeds mac_rx random Ethernet frames as the core delivers them
// (64-bit words, byte 0 in tdata[7:0], tkeep on the last word, random gaps
// and back-to-back frames) and compares every output packet with a model:
// ARP packets for this node (own or broadcast MAC) come out as their 28
// bytes, UDP/IPv4 packets for this node's IP or broadcast come out as the
// datagram with padding removed and the source IP; frames with another MAC,
// another EtherType, another destination IP, another protocol, IHL other
// than 5, or a fragment produce nothing.
module tb_mac_rx;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [47:0] my_mac = 48'hD00B_ACC0_AAAA;
  logic [31:0] my_ip = 32'hC0A8_0002;
  logic [63:0] s_tdata = 0;
  logic [7:0]  s_tkeep = 0;
  logic        s_tlast = 0, s_tvalid = 0;
  logic        out_valid, out_last, out_arp;
  logic [63:0] out_data;
  logic [3:0]  out_bytes;
  logic [31:0] src_ip;

  mac_rx dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  typedef struct { bit arp; logic [31:0] sip; byte unsigned b [$]; } exp_t;
  exp_t expq [$];
  byte unsigned got [$];
  int npk = 0, narp = 0, nudp = 0, ndrop = 0;

  always @(posedge clk) if (!rst && out_valid) begin
    chk(out_bytes >= 1 && out_bytes <= 8 && (out_last || out_bytes == 8), "word byte count");
    for (int b = 0; b < int'(out_bytes); b++) got.push_back(out_data[63 - 8*b -: 8]);
    if (out_last) begin
      exp_t e;
      if (expq.size() == 0) chk(0, $sformatf("unexpected packet at %0t: %0d bytes arp=%0d", $time, got.size(), out_arp));
      else begin
        e = expq.pop_front();
        chk(out_arp == e.arp, "ARP/UDP side");
        chk(got.size() == e.b.size(), $sformatf("packet length %0d, expected %0d", got.size(), e.b.size()));
        if (got.size() == e.b.size()) begin
          bit same = 1;
          foreach (got[i]) if (got[i] != e.b[i]) same = 0;
          chk(same, "packet bytes");
        end
        if (!e.arp) chk(src_ip == e.sip, "source IP");
      end
      got.delete();
      npk++;
    end
  end

  task automatic send_frame(input byte unsigned f [$]);
    int nw = (f.size() + 7) / 8;
    for (int w = 0; w < nw; w++) begin
      @(negedge clk);
      s_tvalid = 1;
      s_tdata = 0;
      s_tkeep = 0;
      for (int b = 0; b < 8; b++) if (8*w + b < f.size()) begin
        s_tdata[8*b +: 8] = f[8*w + b];
        s_tkeep[b] = 1;
      end
      s_tlast = (w == nw - 1);
    end
    @(negedge clk);
    s_tvalid = 0; s_tlast = 0;
    repeat ($urandom_range(0, 2) == 0 ? 0 : $urandom_range(0, 4)) @(negedge clk);
  endtask

  // kind: 0 ARP, 1 UDP; fault: 0 none, 1 MAC, 2 EtherType, 3 IP, 4 protocol, 5 IHL, 6 fragment
  task automatic one(input int kind, input int fault);
    byte unsigned f [$], p [$];
    logic [47:0] dm;
    logic [31:0] dip, sip;
    logic [15:0] et;
    int len;
    exp_t e;
    dm = ($urandom_range(0, 1) == 0) ? my_mac : 48'hFFFF_FFFF_FFFF;
    if (fault == 1) dm = my_mac ^ (48'h1 << $urandom_range(0, 47));
    et = kind == 0 ? 16'h0806 : 16'h0800;
    if (fault == 2) et = 16'h86DD;
    for (int i = 5; i >= 0; i--) f.push_back(dm[8*i +: 8]);
    for (int i = 0; i < 6; i++) f.push_back($urandom_range(0, 255));
    f.push_back(et[15:8]); f.push_back(et[7:0]);
    if (kind == 0) begin
      for (int i = 0; i < 28; i++) p.push_back($urandom_range(0, 255));
      foreach (p[i]) f.push_back(p[i]);
    end else begin
      len = ($urandom_range(0, 3) == 0) ? $urandom_range(1480, 1480) : $urandom_range(8, 200);
      if ($urandom_range(0, 3) == 0) len = $urandom_range(8, 20);   // short: frame gets padding
      dip = ($urandom_range(0, 3) == 0) ? 32'hFFFF_FFFF : my_ip;
      if (fault == 3) dip = my_ip + 1;
      sip = $urandom();
      f.push_back(fault == 5 ? 8'h46 : 8'h45); f.push_back(8'h00);
      f.push_back(8'((len + 20) >> 8)); f.push_back(8'(len + 20));
      f.push_back($urandom_range(0, 255)); f.push_back($urandom_range(0, 255));
      f.push_back(fault == 6 ? 8'h20 : 8'h40); f.push_back(8'h00);
      f.push_back(8'h80); f.push_back(fault == 4 ? 8'h06 : 8'h11);
      f.push_back($urandom_range(0, 255)); f.push_back($urandom_range(0, 255));
      for (int i = 3; i >= 0; i--) f.push_back(sip[8*i +: 8]);
      for (int i = 3; i >= 0; i--) f.push_back(dip[8*i +: 8]);
      for (int i = 0; i < len; i++) p.push_back($urandom_range(0, 255));
      foreach (p[i]) f.push_back(p[i]);
    end
    while (f.size() < 60) f.push_back(8'h00);
    if (fault == 0) begin
      e.arp = (kind == 0); e.sip = sip; e.b = p;
      expq.push_back(e);
      if (kind == 0) narp++; else nudp++;
    end else ndrop++;
    send_frame(f);
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst = 0;
    repeat (4) @(negedge clk);
    for (int it = 0; it < 400; it++) begin
      int fault, kind;
      kind = ($urandom_range(0, 2) == 0) ? 0 : 1;
      fault = ($urandom_range(0, 3) == 0) ? $urandom_range(1, kind == 0 ? 2 : 6) : 0;
      one(kind, fault);
    end
    repeat (20) @(negedge clk);
    chk(expq.size() == 0, $sformatf("all expected packets delivered (%0d left)", expq.size()));
    chk(narp > 0 && nudp > 0 && ndrop > 0, "ARP, UDP and dropped frames all exercised");
    $display("mac_rx: %0d ARP, %0d UDP delivered, %0d frames dropped", narp, nudp, ndrop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
