// tb_mac_tx: both sources offer random packets (1..1500 bytes, random word
// gaps) to mac_tx while the core side applies random back-pressure. Each
// output frame is reassembled from tdata/tkeep (byte 0 in tdata[7:0]) and
// compared with the packet its source sent: destination and source MAC,
// EtherType, payload, zero padding to a 60-byte frame (64 with the FCS the
// core appends), tkeep contiguous and tlast on the last word. With both
// sources always requesting, grants must alternate.
module tb_mac_tx;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [47:0] src_mac = 48'hD00B_ACC0_AAAA;
  logic [1:0] req = 0, gnt;
  logic [47:0] dst_mac [2];
  logic [15:0] ethertype [2];
  logic s_valid [2], s_last [2], s_ready [2];
  logic [63:0] s_data [2];
  logic [3:0] s_bytes [2];
  logic [63:0] m_tdata;
  logic [7:0] m_tkeep;
  logic m_tlast, m_tvalid, m_tready = 1;
  bit bp = 1, gaps = 1;

  mac_tx dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // expected frames, in grant order
  typedef byte unsigned bq_t [$];
  bq_t expq [$];
  int grants [$];
  int nsent [2] = '{0, 0};

  for (genvar s = 0; s < 2; s++) begin : g_src
    initial begin
      byte unsigned d [$];
      byte unsigned f [$];
      int L;
      logic [63:0] w;
      req[s] = 0; s_valid[s] = 0; s_last[s] = 0; s_data[s] = 0; s_bytes[s] = 0;
      dst_mac[s] = 0; ethertype[s] = 0;
      @(negedge clk);
      while (rst) @(negedge clk);
      forever begin
        if (nsent[s] >= 40) begin @(negedge clk); continue; end
        L = ($urandom_range(0, 3) == 0) ? $urandom_range(1, 45) : $urandom_range(1, 1500);
        d.delete();
        for (int i = 0; i < L; i++) d.push_back(8'($urandom));
        dst_mac[s] = {$urandom, 16'($urandom)};
        ethertype[s] = s ? 16'h0806 : 16'h0800;
        req[s] = 1;
        @(posedge clk);
        while (!gnt[s]) @(posedge clk);
        f.delete();
        for (int i = 0; i < 6; i++) f.push_back(dst_mac[s][47 - 8*i -: 8]);
        for (int i = 0; i < 6; i++) f.push_back(src_mac[47 - 8*i -: 8]);
        f.push_back(ethertype[s][15:8]); f.push_back(ethertype[s][7:0]);
        foreach (d[i]) f.push_back(d[i]);
        while (f.size() < 60) f.push_back(8'h00);
        expq.push_back(f);
        grants.push_back(s);
        @(negedge clk);
        req[s] = 0;
        for (int k = 0; k < (L + 7) / 8; k++) begin
          while (gaps && $urandom_range(0, 5) == 0) @(negedge clk);
          w = '0;
          for (int b = 0; b < 8; b++) if (8*k + b < L) w[63 - 8*b -: 8] = d[8*k + b];
          s_valid[s] = 1; s_data[s] = w;
          s_bytes[s] = (8*k + 8 <= L) ? 4'd8 : 4'(L - 8*k);
          s_last[s] = (8*k + 8 >= L);
          @(posedge clk);
          while (!s_ready[s]) @(posedge clk);
          @(negedge clk);
          s_valid[s] = 0; s_last[s] = 0;
        end
        nsent[s]++;
      end
    end
  end

  always @(negedge clk) m_tready = bp ? ($urandom_range(0, 3) != 0) : 1'b1;

  // collector
  byte unsigned cur [$];
  int frames = 0;
  always @(posedge clk) if (!rst && m_tvalid && m_tready) begin
    bit contig;
    int nk;
    contig = 1; nk = 0;
    for (int i = 0; i < 8; i++) begin
      if (m_tkeep[i]) begin nk++; if (i > 0 && !m_tkeep[i-1]) contig = 0; end
    end
    if (!contig || nk == 0 || (!m_tlast && nk != 8)) begin failures++; checks++; $display("FAIL tkeep %b", m_tkeep); end
    for (int i = 0; i < 8; i++) if (m_tkeep[i]) cur.push_back(m_tdata[8*i +: 8]);
    if (m_tlast) begin
      bq_t e;
      bit bad;
      checks++;
      if (expq.size() == 0) begin failures++; $display("FAIL frame with none expected"); end
      else begin
        e = expq.pop_front();
        bad = (e.size() != cur.size());
        if (!bad) foreach (e[i]) if (e[i] != cur[i]) bad = 1;
        if (bad) begin failures++; $display("FAIL frame %0d: size %0d exp %0d", frames, cur.size(), e.size()); end
      end
      cur.delete();
      frames++;
    end
  end

  int t, alt_bad, t0, t1;
  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    t = 0;
    while ((nsent[0] < 40 || nsent[1] < 40) && t < 300000) begin @(negedge clk); t++; end
    repeat (100) @(negedge clk);
    chk(frames == 80 && expq.size() == 0, $sformatf("all 80 frames out (%0d)", frames));
    alt_bad = 0;
    for (int i = 1; i < grants.size(); i++) if (grants[i] == grants[i-1]) alt_bad++;
    chk(alt_bad < 4, $sformatf("grants alternate while both request (%0d repeats)", alt_bad));
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
