// tb_comm_ip_top: end-to-end test of four Communication IP nodes in a ring.
//
// Four comm_ip_top instances, at their default parameters (4 intra-node
// ports, 2 inter-node ports, 256-bit datapath), form a 1-D torus of size 4:
// the + port of node k is wired through a delay model of the serial channel
// to the - port of node k+1. The testbench plays the role of the tasks: it
// writes packets into intra-node TX FIFOs and drains the RX FIFOs, checking
// every header, payload word and footer against what was sent.
// Mechanisms exercised and counted: local loop through the internal
// generator/consumer with its clock counter, local trip between two ports,
// one- and two-hop inter-node transfers in both directions, the dateline
// switch to virtual channel 1, switch arbitration (contention for one
// output), virtual cut-through back-pressure (an undrained receiver turning
// its link red), credit words, header single-error correction and
// double-error drop, the destination override, out-of-lattice delivery and
// the register soft reset, the Ethernet core configuration sequence with a
// statistics tick read back through the ETH_*_BYTE registers, and the
// Ethernet transmit side: a broadcast UDP datagram framed as IPv4/Ethernet,
// an ARP reply to a host's request, a unicast datagram to that learned host,
// a datagram to an unknown address that waits for ARP request/reply, and
// node 0's Ethernet port facing node 1's: node 1 receives the broadcast
// datagram, answers node 0's ARP request and receives a unicast datagram,
// then runs the TEST_MAC check of one 512-byte LFSR datagram from node 0.
module tb_comm_ip_top;
  import comm_pkg::*;
  localparam int NN = 4;     // nodes
  localparam int M  = 4;
  localparam int N  = 2;
  localparam int DW = 256;
  localparam int BPW = DW / 8;

  logic clk = 0;
  logic rst = 1;
  always #2.5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- node signals ----------------
  logic          reg_wr [NN], reg_rd [NN], reg_rvalid [NN];
  logic [11:0]   reg_addr [NN];
  logic [31:0]   reg_wdata [NN], reg_rdata [NN];
  logic          tx_hdr_wr [NN][M], tx_hdr_full [NN][M], tx_dat_wr [NN][M], tx_dat_full [NN][M];
  logic [127:0]  tx_hdr_data [NN][M], rx_hdr_data [NN][M];
  logic [DW-1:0] tx_dat_data [NN][M], rx_dat_data [NN][M];
  logic          rx_hdr_rd [NN][M], rx_hdr_empty [NN][M], rx_dat_rd [NN][M], rx_dat_empty [NN][M];
  logic [M-1:0]  test_ok [NN];
  lk_kind_t      phy_tx_kind [NN][N], phy_rx_kind [NN][N];
  logic [DW-1:0] phy_tx_data [NN][N], phy_rx_data [NN][N];
  logic          flip_arm [NN][N], flip_done [NN][N];
  logic [127:0]  flip_mask [NN][N];
  logic [31:0]   ip_a [NN];
  logic [47:0]   mac_a [NN];
  logic          tick [NN];
  // Ethernet side
  logic          e_wr_req [NN], e_rd_req [NN], e_ok [NN], e_busy [NN], e_in_ready [NN];
  logic [15:0]   e_wr_addr [NN], e_rd_addr [NN], e_type [NN];
  logic [31:0]   e_wr_data [NN], e_arp_ip [NN];
  logic          e_tvalid [NN], e_tlast [NN], e_err [NN];
  logic [63:0]   e_tdata [NN];
  logic [7:0]    e_tkeep [NN];
  logic          e_udp_start = 0, e_in_valid = 0, e_sync = 0;
  logic [63:0]   e_in_data = 0;
  logic [31:0]   e_dst_ip = 32'hFFFF_FFFF;
  logic          e_inj_valid = 0, e_inj_last = 0;   // frames injected into node 0
  logic [63:0]   e_inj_data = 0;
  logic [7:0]    e_inj_keep = 0;
  logic [63:0]   e_rx_tdata [NN];
  logic [7:0]    e_rx_tkeep [NN];
  logic          e_rx_tlast [NN], e_rx_tvalid [NN];
  logic          e_urx_valid [NN], e_urx_last [NN];
  logic [63:0]   e_urx_data [NN];
  logic [3:0]    e_urx_bytes [NN];
  logic [31:0]   e_urx_src [NN];
  logic          e_test_start = 0, e_test_busy [NN];
  logic [31:0]   e_t_data [NN], e_t_err [NN], e_t_pkts [NN];
  int            e_writes [NN];

  for (genvar k = 0; k < NN; k++) begin : g_node
    comm_ip_top dut (
      .clk, .rst,
      .reg_wr(reg_wr[k]), .reg_rd(reg_rd[k]), .reg_addr(reg_addr[k]), .reg_wdata(reg_wdata[k]),
      .reg_rdata(reg_rdata[k]), .reg_rvalid(reg_rvalid[k]),
      .tx_hdr_wr(tx_hdr_wr[k]), .tx_hdr_data(tx_hdr_data[k]), .tx_hdr_full(tx_hdr_full[k]),
      .tx_dat_wr(tx_dat_wr[k]), .tx_dat_data(tx_dat_data[k]), .tx_dat_full(tx_dat_full[k]),
      .rx_hdr_rd(rx_hdr_rd[k]), .rx_hdr_data(rx_hdr_data[k]), .rx_hdr_empty(rx_hdr_empty[k]),
      .rx_dat_rd(rx_dat_rd[k]), .rx_dat_data(rx_dat_data[k]), .rx_dat_empty(rx_dat_empty[k]),
      .test_ok(test_ok[k]),
      .phy_up(2'b11), .phy_err(2'b00), .phy_tx_ready(2'b11),
      .phy_tx_kind(phy_tx_kind[k]), .phy_tx_data(phy_tx_data[k]),
      .phy_rx_kind(phy_rx_kind[k]), .phy_rx_data(phy_rx_data[k]),
      .eth_ip_address(ip_a[k]), .eth_mac_address(mac_a[k]), .eth_tick(tick[k]),
      .eth_chan_sync(e_sync), .eth_channel_ok(e_ok[k]),
      .eth_cfg_wr_req(e_wr_req[k]), .eth_cfg_wr_addr(e_wr_addr[k]), .eth_cfg_wr_data(e_wr_data[k]),
      .eth_cfg_wr_ack(e_wr_req[k]),
      .eth_cfg_rd_req(e_rd_req[k]), .eth_cfg_rd_addr(e_rd_addr[k]), .eth_cfg_rd_ack(e_rd_req[k]),
      .eth_cfg_rd_data({16'(k), e_rd_addr[k]}),
      .eth_udp_start(k == 0 ? e_udp_start : 1'b0), .eth_udp_len(16'd64), .eth_udp_dst_ip(e_dst_ip),
      .eth_udp_busy(e_busy[k]), .eth_in_valid(k == 0 ? e_in_valid : 1'b0), .eth_in_data(e_in_data),
      .eth_in_ready(e_in_ready[k]),
      .eth_rx_tdata(e_rx_tdata[k]), .eth_rx_tkeep(e_rx_tkeep[k]), .eth_rx_tlast(e_rx_tlast[k]),
      .eth_rx_tvalid(e_rx_tvalid[k]),
      .eth_udp_rx_valid(e_urx_valid[k]), .eth_udp_rx_data(e_urx_data[k]), .eth_udp_rx_bytes(e_urx_bytes[k]),
      .eth_udp_rx_last(e_urx_last[k]), .eth_udp_rx_src_ip(e_urx_src[k]),
      .eth_test_start(k == 0 ? e_test_start : 1'b0), .eth_test_busy(e_test_busy[k]),
      .eth_test_rx_data_cnt(e_t_data[k]), .eth_test_rx_err_cnt(e_t_err[k]), .eth_test_rx_pkt_cnt(e_t_pkts[k]),
      .eth_tx_tdata(e_tdata[k]), .eth_tx_tkeep(e_tkeep[k]), .eth_tx_tlast(e_tlast[k]),
      .eth_tx_tvalid(e_tvalid[k]), .eth_tx_tready(1'b1), .eth_err(e_err[k]));
    initial e_writes[k] = 0;
    always @(posedge clk) if (e_wr_req[k]) e_writes[k]++;
    // + port (0) of node k feeds the - port (1) of node k+1
    aurora_link_model #(.DW(DW), .LAT(8)) u_plus (
      .clk, .tx_kind(phy_tx_kind[k][0]), .tx_data(phy_tx_data[k][0]),
      .rx_kind(phy_rx_kind[(k+1)%NN][1]), .rx_data(phy_rx_data[(k+1)%NN][1]),
      .flip_arm(flip_arm[k][0]), .flip_mask(flip_mask[k][0]), .flip_done(flip_done[k][0]));
    aurora_link_model #(.DW(DW), .LAT(8)) u_minus (
      .clk, .tx_kind(phy_tx_kind[k][1]), .tx_data(phy_tx_data[k][1]),
      .rx_kind(phy_rx_kind[(k+NN-1)%NN][0]), .rx_data(phy_rx_data[(k+NN-1)%NN][0]),
      .flip_arm(flip_arm[k][1]), .flip_mask(flip_mask[k][1]), .flip_done(flip_done[k][1]));
  end

  // ---------------- mechanism counters ----------------
  int n_wait = 0, n_red_block = 0, n_credit = 0;
  for (genvar k = 0; k < NN; k++) begin : g_mon
    always @(posedge clk) if (!rst) begin
      if (g_node[k].dut.u_routing.wait_evt != '0) n_wait++;
      for (int n = 0; n < N; n++) if (phy_tx_kind[k][n] == LK_CREDIT) n_credit++;
    end
    for (genvar n = 0; n < N; n++) begin : g_l
      always @(posedge clk) if (!rst)
        if (g_node[k].dut.g_link[n].u_link.tst == 2'd0 && !g_node[k].dut.lk_tx_hdr_empty[n] &&
            g_node[k].dut.g_link[n].u_link.peer_red != 2'b00) n_red_block++;
    end
  end

  // Ethernet frames of node 0 (byte 0 in tdata[7:0])
  byte unsigned e_obuf [$];
  int e_frames = 0, e_arp_frames = 0;
  always @(posedge clk) if (!rst && e_tvalid[0]) begin
    for (int b = 0; b < 8; b++) if (e_tkeep[0][b]) e_obuf.push_back(e_tdata[0][8*b +: 8]);
    if (e_tlast[0]) e_frames++;
  end
  function automatic logic [47:0] obuf_mac(input int at);
    return {e_obuf[at], e_obuf[at+1], e_obuf[at+2], e_obuf[at+3], e_obuf[at+4], e_obuf[at+5]};
  endfunction

  // Ethernet ports of nodes 0 and 1 face each other; the testbench can also
  // inject frames from other hosts into node 0
  always_comb
    for (int k = 0; k < NN; k++) begin
      e_rx_tdata[k] = '0; e_rx_tkeep[k] = '0; e_rx_tlast[k] = 1'b0; e_rx_tvalid[k] = 1'b0;
      if (k == 0) begin
        e_rx_tdata[k] = e_inj_valid ? e_inj_data : e_tdata[1];
        e_rx_tkeep[k] = e_inj_valid ? e_inj_keep : e_tkeep[1];
        e_rx_tlast[k] = e_inj_valid ? e_inj_last : e_tlast[1];
        e_rx_tvalid[k] = e_inj_valid || e_tvalid[1];
      end else if (k == 1) begin
        e_rx_tdata[k] = e_tdata[0]; e_rx_tkeep[k] = e_tkeep[0];
        e_rx_tlast[k] = e_tlast[0]; e_rx_tvalid[k] = e_tvalid[0];
      end
    end

  // UDP datagrams received by node 1
  byte unsigned e_rbuf [$];
  int e_rx_dgrams = 0;
  logic [31:0] e_rx_src;
  always @(posedge clk) if (!rst && e_urx_valid[1]) begin
    for (int b = 0; b < int'(e_urx_bytes[1]); b++) e_rbuf.push_back(e_urx_data[1][63 - 8*b -: 8]);
    if (e_urx_last[1]) begin e_rx_dgrams++; e_rx_src = e_urx_src[1]; end
  end

  // an ARP frame from another host into node 0 (28-byte packet padded to 60)
  task automatic arp_in(input logic [15:0] oper, input logic [47:0] sha, input logic [31:0] spa,
                        input logic [47:0] tha, input logic [31:0] tpa);
    byte unsigned f [$];
    logic [47:0] dm;
    logic [8*28-1:0] ap;
    dm = (oper == 16'h0001) ? 48'hFFFF_FFFF_FFFF : mac_a[0];
    ap = {16'h0001, 16'h0800, 8'h06, 8'h04, oper, sha, spa, tha, tpa};
    for (int i = 5; i >= 0; i--) f.push_back(dm[8*i +: 8]);
    for (int i = 5; i >= 0; i--) f.push_back(sha[8*i +: 8]);
    f.push_back(8'h08); f.push_back(8'h06);
    for (int i = 27; i >= 0; i--) f.push_back(ap[8*i +: 8]);
    while (f.size() < 60) f.push_back(8'h00);
    for (int w = 0; w < 8; w++) begin
      @(negedge clk);
      e_inj_valid = 1; e_inj_last = (w == 7);
      e_inj_keep = (w == 7) ? 8'h0F : 8'hFF;
      for (int b = 0; b < 8; b++) e_inj_data[8*b +: 8] = (8*w + b < 60) ? f[8*w + b] : 8'h00;
    end
    @(negedge clk); e_inj_valid = 0; e_inj_last = 0;
  endtask

  // one 64-byte datagram into node 0's IPv4 transmitter
  task automatic udp_send;
    @(negedge clk);
    e_udp_start = 1;
    @(negedge clk);
    e_udp_start = 0;
    for (int w = 0; w < 8; w++) begin
      e_in_valid = 1; e_in_data = {32'hFA62_FA62, 32'(w)};
      @(posedge clk);
      while (!e_in_ready[0]) @(posedge clk);
      @(negedge clk);
    end
    e_in_valid = 0;
  endtask

  // ---------------- receivers (the tasks' dispatchers) ----------------
  bit       drain [NN][M];
  int       rcvd  [NN][M];
  int       perr  [NN][M];
  pkt_hdr_t last_hdr [NN][M];
  logic [127:0] last_ftr [NN][M];

  for (genvar k = 0; k < NN; k++) begin : g_rxk
    for (genvar p = 0; p < M; p++) begin : g_rxp
      initial begin
        pkt_hdr_t h;
        int nw;
        rx_hdr_rd[k][p] = 0;
        rx_dat_rd[k][p] = 0;
        forever begin
          @(negedge clk);
          rx_hdr_rd[k][p] = 0;
          if (drain[k][p] && !rx_hdr_empty[k][p]) begin
            h = rx_hdr_data[k][p];
            last_hdr[k][p] = h;
            rx_hdr_rd[k][p] = 1;
            @(negedge clk);
            rx_hdr_rd[k][p] = 0;
            nw = payload_words(h.length, BPW);
            for (int w = 0; w < nw; w++) begin
              while (rx_dat_empty[k][p]) @(negedge clk);
              for (int l = 0; l < DW/32; l++)
                if (rx_dat_data[k][p][32*l +: 32] != test_lane(h.length, w, l)) perr[k][p]++;
              rx_dat_rd[k][p] = 1;
              @(negedge clk);
              rx_dat_rd[k][p] = 0;
            end
            while (rx_hdr_empty[k][p]) @(negedge clk);
            last_ftr[k][p] = rx_hdr_data[k][p];
            rx_hdr_rd[k][p] = 1;
            rcvd[k][p]++;
          end
        end
      end
    end
  end

  // ---------------- senders (the tasks' aggregators) ----------------
  task automatic send_pkt(input int k, input int p, input int dx, input int dport,
                          input int len, input int seq);
    pkt_hdr_t h;
    h = '0;
    h.coord.x = 6'(dx);
    h.intratile_port = 4'(dport);
    h.length = 14'(len);
    h.pid_chid = 16'(seq);
    @(negedge clk);
    while (tx_hdr_full[k][p]) @(negedge clk);
    tx_hdr_wr[k][p] = 1; tx_hdr_data[k][p] = h;
    @(negedge clk);
    tx_hdr_wr[k][p] = 0;
    for (int w = 0; w < payload_words(14'(len), BPW); w++) begin
      while (tx_dat_full[k][p]) @(negedge clk);
      for (int l = 0; l < DW/32; l++) tx_dat_data[k][p][32*l +: 32] = test_lane(14'(len), w, l);
      tx_dat_wr[k][p] = 1;
      @(negedge clk);
      tx_dat_wr[k][p] = 0;
    end
    while (tx_hdr_full[k][p]) @(negedge clk);
    tx_hdr_wr[k][p] = 1; tx_hdr_data[k][p] = {16'hF00D, 96'h0, 16'(seq)};
    @(negedge clk);
    tx_hdr_wr[k][p] = 0;
  endtask

  // ---------------- register access ----------------
  task automatic wr_reg(input int k, input logic [11:0] a, input logic [31:0] d);
    @(negedge clk);
    reg_wr[k] = 1; reg_addr[k] = a; reg_wdata[k] = d;
    @(negedge clk);
    reg_wr[k] = 0;
  endtask
  task automatic rd_reg(input int k, input logic [11:0] a, output logic [31:0] d);
    @(negedge clk);
    reg_rd[k] = 1; reg_addr[k] = a;
    @(negedge clk);
    reg_rd[k] = 0;
    d = reg_rdata[k];
  endtask

  task automatic wait_rcvd(input int k, input int p, input int n, input int limit);
    int t;
    t = 0;
    while (rcvd[k][p] < n && t < limit) begin
      @(negedge clk);
      t++;
    end
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- test sequence ----------------
  initial begin
    logic [31:0] r;
    int t0, c_before;
    for (int k = 0; k < NN; k++) begin
      reg_wr[k] = 0; reg_rd[k] = 0; reg_addr[k] = 0; reg_wdata[k] = 0;
      for (int p = 0; p < M; p++) begin
        tx_hdr_wr[k][p] = 0; tx_dat_wr[k][p] = 0; tx_hdr_data[k][p] = 0; tx_dat_data[k][p] = 0;
        drain[k][p] = 1; rcvd[k][p] = 0; perr[k][p] = 0;
      end
      for (int n = 0; n < N; n++) begin
        flip_arm[k][n] = 0; flip_mask[k][n] = 0;
      end
    end
    repeat (5) @(negedge clk);
    rst = 0;

    // Configuration, as the host does it: coordinates, lattice, EDAC,
    // thresholds, credit and waiting cycles.
    for (int k = 0; k < NN; k++) begin
      wr_reg(k, REG_COORDME, 32'(k));
      wr_reg(k, REG_LATTICESIZE, {16'h0, 5'd1, 5'd1, 6'(NN)});
      wr_reg(k, REG_LINK0, 32'hFF00_0000);                          // EDAC on both links
      wr_reg(k, REG_LINK0 + 12'h4, {6'd0, 10'd170, 8'd0, 8'd6});    // red thresholds
      wr_reg(k, REG_LINK0 + 12'h8, {16'd0, 8'd16, 8'd2});           // credit period, wait
    end
    rd_reg(2, REG_COORDME, r);
    check(r == 32'd2, "COORDME readback");
    rd_reg(0, REG_IP_ADDRESS, r);
    check(r == 32'hC0A8_0002, "IP_ADDRESS reset value");
    rd_reg(0, REG_MAC_HIGH, r);
    check(r == 32'h0000_D00B && mac_a[0] == 48'hD00B_ACC0_AAAA, "MAC reset value");

    // 1. Local loop with the internal generator and consumer of node 0
    //    port 0: 8 packets of 4 KB to itself.
    wr_reg(0, REG_PKTGEN_CONFIG_0, {2'b00, 14'd4096, 16'd8});
    wr_reg(0, REG_PKTGEN_CONFIG_1, 32'd0);
    wr_reg(0, REG_PERF_INTRA_CF, 32'h0000_0101);
    t0 = 0;
    while (!test_ok[0][0] && t0 < 5000) begin @(negedge clk); t0++; end
    check(test_ok[0][0], "local loop: consumer test ok");
    rd_reg(0, REG_PERF_INTRA_ST, r);
    check(r[0 +: 4] == 4'(GEN_IDLE) && r[4] == 1'b1 && r[7:5] == 3'(CHK_COUNT), "PERF_INTRANODE_ST after local loop");
    rd_reg(0, REG_PERF_INTRA_CNT0, r);
    $display("local loop: 8 x 4KB in %0d cycles (%0d payload words)", r, 8*128);
    // one 256-bit word per cycle at the port: 8*(128+2) cycles plus pipeline
    check(r >= 32'd1040 && r <= 32'd1040 + 32'd40, "local loop bandwidth: about one data word per cycle");
    rd_reg(0, REG_INTRA_FIFO0 + 12'h0C, r);     // header TX write counter
    check(r == 32'd16, "header TX write counter = 8 headers + 8 footers");
    wr_reg(0, REG_PERF_INTRA_CF, 32'h0);

    // 2. Local trip: node 1 port 0 -> node 1 port 1, plus contention:
    //    ports 2 and 3 of node 1 send to port 1 at the same time.
    c_before = n_wait;
    fork
      send_pkt(1, 0, 1, 1, 512, 100);
      send_pkt(1, 2, 1, 1, 512, 101);
      send_pkt(1, 3, 1, 1, 512, 102);
    join
    wait_rcvd(1, 1, 3, 3000);
    check(rcvd[1][1] == 3 && perr[1][1] == 0, "local trip with contention: 3 packets intact");
    check(n_wait > c_before, "contention caused switch waits");

    // 3. One hop, + direction: node 0 port 1 -> node 1 port 2.
    send_pkt(0, 1, 1, 2, 64, 7);
    wait_rcvd(1, 2, 1, 2000);
    check(rcvd[1][2] == 1 && perr[1][2] == 0, "one hop delivered");
    check(last_hdr[1][2].num_hops == 10'd1 && last_hdr[1][2].vc[0] == 1'b0, "one hop: hop count 1, VC0");
    check(last_ftr[1][2] == {16'hF00D, 96'h0, 16'd7}, "one hop: footer intact");

    // 4. Two hops: node 0 port 1 -> node 2 port 3 (tie goes the + way).
    send_pkt(0, 1, 2, 3, 1000, 8);
    wait_rcvd(2, 3, 1, 2000);
    check(rcvd[2][3] == 1 && perr[2][3] == 0, "two hops delivered");
    check(last_hdr[2][3].num_hops == 10'd2, "two hops: hop count 2");

    // 5. Dateline: node 3 -> node 1 goes 3->0->1 over the wrap link, so it
    //    must arrive on VC1.
    send_pkt(3, 0, 1, 0, 256, 9);
    wait_rcvd(1, 0, 1, 2000);
    check(rcvd[1][0] == 1 && perr[1][0] == 0, "dateline packet delivered");
    check(last_hdr[1][0].vc[0] == 1'b1 && last_hdr[1][0].num_hops == 10'd2, "dateline packet on VC1 after 2 hops");
    rd_reg(0, REG_LINK0_RDWR + 12'(48 + 4*9), r);   // node 0, link 1, RX VCH1 header write
    check(r == 32'd2, "node 0 link 1 VCH1 header+footer written");

    // 6. - direction: node 0 -> node 3 (one hop backwards over the wrap).
    send_pkt(0, 2, 3, 2, 32, 10);
    wait_rcvd(3, 2, 1, 2000);
    check(rcvd[3][2] == 1 && last_hdr[3][2].num_hops == 10'd1 && last_hdr[3][2].vc[0] == 1'b1,
          "minus direction over the wrap link on VC1");

    // 7. Back-pressure: node 2 port 0 stops reading; node 0 sends 12 packets
    //    of 4 KB there. The receive FIFOs fill, the link turns red, and all
    //    packets arrive once the port drains again.
    drain[2][0] = 0;
    c_before = n_red_block;
    fork
      for (int i = 0; i < 12; i++) send_pkt(0, 0, 2, 0, 4096, 200 + i);
      begin
        repeat (6000) @(negedge clk);
        drain[2][0] = 1;
      end
    join
    wait_rcvd(2, 0, 12, 20000);
    check(rcvd[2][0] == 12 && perr[2][0] == 0, "back-pressure: 12 x 4KB packets intact");
    check(n_red_block > c_before, "back-pressure: link held by red flow control");
    check(last_ftr[2][0][15:0] == 16'd211, "back-pressure: packets in order");
    rd_reg(0, REG_FIFO_INTRA_EXC, r);
    check(r == 32'd0, "no FIFO write exception");

    // 8. Header EDAC: single-bit error corrected, double-bit error dropped.
    flip_mask[0][0] = 128'h1 << 77;
    flip_arm[0][0] = 1;
    send_pkt(0, 1, 1, 3, 128, 300);
    wait_rcvd(1, 3, 1, 2000);
    flip_arm[0][0] = 0;
    check(rcvd[1][3] == 1 && perr[1][3] == 0 && last_hdr[1][3].pid_chid == 16'd300, "single header error corrected");
    rd_reg(1, REG_LINK0_STATUS + 12'd40 + 12'd4, r);   // node 1 link 1 error register
    check(r == 32'h0001_0000, "single error counted");
    flip_mask[0][0] = (128'h1 << 30) | (128'h1 << 90);
    flip_arm[0][0] = 1;
    send_pkt(0, 1, 1, 3, 128, 301);
    repeat (300) @(negedge clk);
    flip_arm[0][0] = 0;
    check(rcvd[1][3] == 1, "double header error: packet dropped");
    rd_reg(1, REG_LINK0_STATUS + 12'd40 + 12'd4, r);
    check(r == 32'h0001_0001, "fatal error counted");
    send_pkt(0, 1, 1, 3, 128, 302);
    wait_rcvd(1, 3, 2, 2000);
    check(rcvd[1][3] == 2 && last_hdr[1][3].pid_chid == 16'd302, "link recovers after dropped packet");

    // 9. Destination override on node 0 link 0: a packet for node 1 port 2
    //    ends at node 2 port 2.
    wr_reg(0, REG_LINK0, 32'hFF01_0002);
    send_pkt(0, 3, 1, 2, 64, 400);
    wait_rcvd(2, 2, 1, 2000);
    check(rcvd[2][2] == 1 && rcvd[1][2] == 1, "new destination applied on the link");
    wr_reg(0, REG_LINK0, 32'hFF00_0000);

    // 10. Out of lattice: destination x = 9 in a lattice of 4.
    send_pkt(3, 1, 9, 1, 32, 500);
    wait_rcvd(3, 1, 1, 2000);
    check(rcvd[3][1] == 1 && last_hdr[3][1].out_of_lattice, "out-of-lattice packet delivered locally and flagged");

    // Credits flowed.
    check(n_credit > 0, "credit words sent");
    rd_reg(1, REG_LINK0_STATUS + 12'd8, r);   // node 1 link 0 TX magic counter
    check(r != 32'd0, "TX magic counter counts credits");

    // 11. Ethernet: core configuration, statistics tick, framed datagrams and ARP.
    check(e_writes[0] == 5 && !e_ok[0], "ETH config: five writes, then waits for channel sync");
    e_sync = 1;
    repeat (5) @(negedge clk);
    check(e_ok[0] && e_writes[0] == 6, "ETH config: TICK_REG written, init done");
    wr_reg(0, REG_LINK0 + 12'h8, 32'h0000_1042);   // tick bit
    wr_reg(0, REG_LINK0 + 12'h8, 32'h0000_1002);
    repeat (10) @(negedge clk);
    rd_reg(0, REG_ETH_TX_BYTE_LSB, r);
    check(r == 32'h0000_0710, "ETH TX byte statistics (LSB) read through the register file");
    rd_reg(0, REG_ETH_RX_BYTE_MSB, r);
    check(r == 32'h0000_081C, "ETH RX byte statistics (MSB) read through the register file");
    wr_reg(1, REG_IP_ADDRESS, 32'hC0A8_0003);
    wr_reg(1, REG_MAC_LOW, 32'hACC0_AAAB);
    udp_send();
    repeat (20) @(negedge clk);
    check(e_rx_dgrams == 1 && e_rbuf.size() == 64 && e_rx_src == ip_a[0] && e_rbuf[0] == 8'hFA && e_rbuf[63] == 8'h07,
          "ETH: node 1 receives node 0's broadcast datagram");
    check(e_frames == 1 && e_obuf.size() == 98, $sformatf("ETH: one 98-byte frame for a 64-byte datagram (%0d)", e_obuf.size()));
    if (e_obuf.size() == 98)
      check(obuf_mac(0) == 48'hFFFF_FFFF_FFFF && obuf_mac(6) == mac_a[0] && {e_obuf[12], e_obuf[13]} == 16'h0800
            && e_obuf[14] == 8'h45 && {e_obuf[26], e_obuf[27], e_obuf[28], e_obuf[29]} == ip_a[0]
            && {e_obuf[34], e_obuf[35]} == 16'hFA62,
            "ETH: broadcast frame, source MAC and IP from registers, IPv4 header, datagram start");
    // ARP: a host asks for node 0's MAC; the reply is a padded 60-byte frame
    e_obuf.delete();
    arp_in(16'h0001, 48'h0A0B_0C0D_0E0F, 32'hC0A8_004D, 48'h0, ip_a[0]);
    repeat (20) @(negedge clk);
    check(e_frames == 2 && e_obuf.size() == 60, $sformatf("ARP: one 60-byte reply frame (%0d)", e_obuf.size()));
    if (e_obuf.size() == 60) begin
      check(obuf_mac(0) == 48'h0A0B_0C0D_0E0F && {e_obuf[12], e_obuf[13]} == 16'h0806
            && {e_obuf[20], e_obuf[21]} == 16'h0002 && obuf_mac(22) == mac_a[0] && obuf_mac(32) == 48'h0A0B_0C0D_0E0F,
            "ARP: unicast reply with node 0's MAC");
      e_arp_frames++;
    end
    // a datagram to that host uses the learned MAC
    e_obuf.delete();
    e_dst_ip = 32'hC0A8_004D;
    udp_send();
    repeat (20) @(negedge clk);
    check(e_frames == 3 && e_obuf.size() == 98 && obuf_mac(0) == 48'h0A0B_0C0D_0E0F,
          "ETH: unicast datagram to the host learned from its ARP request");
    // a datagram to an unknown address waits for ARP: request out, reply in
    e_obuf.delete();
    e_dst_ip = 32'hC0A8_0063;
    fork udp_send(); join_none
    repeat (40) @(negedge clk);
    check(e_frames == 4 && e_obuf.size() == 60 && obuf_mac(0) == 48'hFFFF_FFFF_FFFF
          && {e_obuf[20], e_obuf[21]} == 16'h0001 && {e_obuf[38], e_obuf[39], e_obuf[40], e_obuf[41]} == 32'hC0A8_0063,
          "ARP: broadcast request for an unknown destination");
    e_arp_frames++;
    e_obuf.delete();
    arp_in(16'h0002, 48'h0A0B_0C0D_0E63, 32'hC0A8_0063, mac_a[0], ip_a[0]);
    repeat (40) @(negedge clk);
    check(e_frames == 5 && e_obuf.size() == 98 && obuf_mac(0) == 48'h0A0B_0C0D_0E63,
          "ETH: datagram sent after the ARP reply");
    // node 0 to node 1: ARP resolution between the two nodes, then the datagram
    e_obuf.delete();
    e_rbuf.delete();
    e_dst_ip = ip_a[1];
    udp_send();
    repeat (60) @(negedge clk);
    check(e_frames == 7 && e_rx_dgrams == 2 && e_rbuf.size() == 64 && e_rx_src == ip_a[0],
          $sformatf("ETH: node 1 resolves by ARP and receives a unicast datagram (frames %0d, datagrams %0d)", e_frames, e_rx_dgrams));
    if (e_obuf.size() == 60 + 98)
      check(obuf_mac(60) == mac_a[1] && ip_a[1] == 32'hC0A8_0003 && mac_a[1] == 48'hD00B_ACC0_AAAB,
            "ETH: datagram framed with node 1's MAC from its ARP reply");
    e_arp_frames++;
    e_dst_ip = 32'hFFFF_FFFF;
    // TEST_MAC: node 1 takes back the address 192.168.0.2 the generator
    // sends to; node 0 resolves it by ARP and sends one 512-byte datagram
    wr_reg(1, REG_IP_ADDRESS, 32'hC0A8_0002);
    e_obuf.delete();
    @(negedge clk); e_test_start = 1; @(negedge clk); e_test_start = 0;
    check(e_test_busy[0], "TEST_MAC generator running");
    for (int t = 0; t < 3000 && e_t_pkts[1] == 0; t++) @(negedge clk);
    repeat (5) @(negedge clk);
    check(!e_test_busy[0] && e_t_pkts[1] == 1 && e_t_data[1] == 64 && e_t_err[1] == 0,
          $sformatf("TEST_MAC: node 1 checks 64 payload words without errors (%0d pkts, %0d words, %0d errors)",
                    e_t_pkts[1], e_t_data[1], e_t_err[1]));
    check(e_obuf.size() == 60 + 14 + 20 + 520, $sformatf("TEST_MAC: ARP request and a 554-byte frame (%0d)", e_obuf.size()));
    e_arp_frames++;

    // 12. Soft reset: RESET_REG holds for 200 cycles then clears itself.
    wr_reg(2, REG_RESET, 32'd1);
    rd_reg(2, REG_RESET, r);
    check(r == 32'd1, "soft reset active");
    repeat (210) @(negedge clk);
    rd_reg(2, REG_RESET, r);
    check(r == 32'd0, "soft reset cleared itself");
    rd_reg(2, REG_COORDME, r);
    check(r == 32'd2, "soft reset keeps the registers");
    rd_reg(2, REG_INTRA_FIFO0 + 12'(40*3 + 8 + 12), r);   // node 2 port 3 HD RX WR counter
    check(r == 32'd0, "soft reset cleared datapath counters");

    $display("mechanisms: switch waits=%0d red-blocked cycles=%0d credit words=%0d eth config writes=%0d eth frames=%0d arp frames=%0d udp received=%0d test_mac words=%0d",
             n_wait, n_red_block, n_credit, e_writes[0], e_frames, e_arp_frames, e_rx_dgrams, e_t_data[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
