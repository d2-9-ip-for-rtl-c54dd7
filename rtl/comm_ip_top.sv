// comm_ip_top: the Communication IP of one FPGA node.
//
// A direct-network router for FPGA accelerators. Tasks on the same FPGA
// exchange packets through M intra-node ports; tasks on other FPGAs are
// reached through N inter-node ports, each driven by a link controller
// towards a serial physical layer. Packets are a 128-bit header, a payload of
// up to 4 KB carried in DW-bit words, and a 128-bit footer; the Routing IP
// forwards them with dimension-order routing, two virtual channels per link
// and virtual cut-through. A register file configures the node's coordinate,
// lattice size, performance generators/checkers and link settings, and
// reports FIFO levels and counters.
//
// Interfaces: the register port (see csr_regs), per intra-node port the TX
// header/data FIFO write side and RX header/data FIFO read side (the
// aggregator/dispatcher side), per inter-node port the link-word stream to
// and from the physical layer (which is outside this RTL), and two parts of
// the Ethernet port: the register port of the Ethernet MAC core driven by
// eth_reg_config (its byte statistics land in the ETH_*_BYTE registers,
// refreshed by the tick bit of LINK_0_CONFIG_2), and the transmit side:
// datagrams enter ipv4_tx through its UDP input, their destination MAC comes
// from arp_unit (which sends ARP requests and answers ARP requests for this
// node), and mac_tx frames both sources into the AXI4-Stream towards the
// Ethernet core (eth_tx_*); on the receive side mac_rx takes the core's
// frames (eth_rx_*), hands ARP packets to arp_unit and brings received UDP
// datagrams out on eth_udp_rx_* (valid only with eth_udp_rx_valid). The UDP
// converter and the Ethernet core itself are outside this RTL. The TEST_MAC
// generator (eth_test_mac, started by eth_test_start, TEST_MAC_PKTS
// datagrams of 512 bytes to 192.168.0.2) takes over the datagram input
// while it runs, and its checker counts the test datagrams received. The upper
// bits of eth_cfg_wr_addr and eth_cfg_rd_addr stay constant because the
// configuration sequence only uses the offsets listed in eth_reg_config.
// Defaults are the document's high-performance configuration: 4 intra-node
// ports, 2 inter-node ports, 256-bit datapath. The register soft reset
// (RESET_REG) resets everything but the register file.
module comm_ip_top
  import comm_pkg::*;
#(
  parameter int M   = 4,
  parameter int N   = 2,
  parameter int DW  = 256,
  parameter int HAW = 4,
  parameter int DAW = 8,
  parameter int TEST_MAC_PKTS = 1
) (
  input  logic          clk,
  input  logic          rst,
  // register port
  input  logic          reg_wr,
  input  logic          reg_rd,
  input  logic [11:0]   reg_addr,
  input  logic [31:0]   reg_wdata,
  output logic [31:0]   reg_rdata,
  output logic          reg_rvalid,
  // intra-node ports
  input  logic          tx_hdr_wr   [M],
  input  logic [127:0]  tx_hdr_data [M],
  output logic          tx_hdr_full [M],
  input  logic          tx_dat_wr   [M],
  input  logic [DW-1:0] tx_dat_data [M],
  output logic          tx_dat_full [M],
  input  logic          rx_hdr_rd   [M],
  output logic [127:0]  rx_hdr_data [M],
  output logic          rx_hdr_empty[M],
  input  logic          rx_dat_rd   [M],
  output logic [DW-1:0] rx_dat_data [M],
  output logic          rx_dat_empty[M],
  output logic [M-1:0]  test_ok,
  // physical layer of the inter-node ports
  input  logic [N-1:0]  phy_up,
  input  logic [N-1:0]  phy_err,
  input  logic [N-1:0]  phy_tx_ready,
  output lk_kind_t      phy_tx_kind [N],
  output logic [DW-1:0] phy_tx_data [N],
  input  lk_kind_t      phy_rx_kind [N],
  input  logic [DW-1:0] phy_rx_data [N],
  // Ethernet port configuration and statistics
  output logic [31:0]   eth_ip_address,
  output logic [47:0]   eth_mac_address,
  output logic          eth_tick,
  input  logic          eth_chan_sync,
  output logic          eth_channel_ok,
  output logic          eth_cfg_wr_req,
  output logic [15:0]   eth_cfg_wr_addr,
  output logic [31:0]   eth_cfg_wr_data,
  input  logic          eth_cfg_wr_ack,
  output logic          eth_cfg_rd_req,
  output logic [15:0]   eth_cfg_rd_addr,
  input  logic          eth_cfg_rd_ack,
  input  logic [31:0]   eth_cfg_rd_data,
  // Ethernet port IPv4 transmit stage
  input  logic          eth_udp_start,
  input  logic [15:0]   eth_udp_len,
  input  logic [31:0]   eth_udp_dst_ip,
  output logic          eth_udp_busy,
  input  logic          eth_in_valid,
  input  logic [63:0]   eth_in_data,
  output logic          eth_in_ready,
  // Ethernet frames from the MAC core (AXI4-Stream, byte 0 in tdata[7:0])
  input  logic [63:0]   eth_rx_tdata,
  input  logic [7:0]    eth_rx_tkeep,
  input  logic          eth_rx_tlast,
  input  logic          eth_rx_tvalid,
  // received UDP datagrams (byte 0 in 63:56) and their source IP
  output logic          eth_udp_rx_valid,
  output logic [63:0]   eth_udp_rx_data,
  output logic [3:0]    eth_udp_rx_bytes,
  output logic          eth_udp_rx_last,
  output logic [31:0]   eth_udp_rx_src_ip,
  // TEST_MAC generator and checker
  input  logic          eth_test_start,
  output logic          eth_test_busy,
  output logic [31:0]   eth_test_rx_data_cnt,
  output logic [31:0]   eth_test_rx_err_cnt,
  output logic [31:0]   eth_test_rx_pkt_cnt,
  // Ethernet frames towards the MAC core (AXI4-Stream, byte 0 in tdata[7:0])
  output logic [63:0]   eth_tx_tdata,
  output logic [7:0]    eth_tx_tkeep,
  output logic          eth_tx_tlast,
  output logic          eth_tx_tvalid,
  input  logic          eth_tx_tready,
  output logic          eth_err
);
  logic   soft_rst, drst;
  coord_t coord_me, lattice, pktgen_dest, link_new_dest;
  logic [M-1:0] gen_en, cons_en;
  logic [31:0]  pktgen_cfg0;
  logic [3:0]   link_edac [N];
  logic         link_new_dest_en [N];
  logic [7:0]   red_hdr_thr, credit_period, wait_cycles;
  logic [9:0]   red_dat_thr;
  logic [7:0]   perf_status [M];
  logic [31:0]  perf_count [M], fifo_sts_rx [M], fifo_sts_tx [M];
  logic [31:0]  intra_cnt [M][8];
  logic [3:0]   intra_exc [M];
  logic [15:0]  link_status [N], link_err_single [N], link_err_fatal [N];
  logic [31:0]  link_cnt [N][8];
  logic [31:0]  link_fifo_cnt [N][12];
  logic [M+2*N-1:0] wait_evt;

  logic          lk_tx_hdr_rd [N], lk_tx_hdr_empty [N], lk_tx_dat_rd [N], lk_tx_dat_empty [N];
  logic [127:0]  lk_tx_hdr_data [N], lk_rx_hdr_data [N];
  logic [DW-1:0] lk_tx_dat_data [N], lk_rx_dat_data [N];
  logic          lk_rx_hdr_wr [N], lk_rx_dat_wr [N], lk_rx_vc [N];
  logic [HAW:0]  lk_rx_hdr_free [N][2];
  logic [DAW:0]  lk_rx_dat_free [N][2];

  logic [63:0]   eth_tx_bytes, eth_rx_bytes;
  logic          arp_req, arp_valid;
  logic [31:0]   arp_ip;
  logic [47:0]   arp_mac;
  logic [1:0]    mac_req, mac_gnt;
  logic [47:0]   mac_dst [2];
  logic [15:0]   mac_type [2];
  logic          mac_valid [2], mac_last [2], mac_ready [2];
  logic [63:0]   mac_data [2];
  logic [3:0]    mac_bytes [2];
  logic          rx_valid, rx_last, rx_arp;
  logic          t_udp_start, t_in_valid, ip_udp_start, ip_in_valid, ip_in_ready, ip_udp_busy;
  logic [15:0]   t_udp_len, ip_udp_len;
  logic [31:0]   t_udp_dst_ip, ip_udp_dst_ip;
  logic [63:0]   t_in_data, ip_in_data;

  assign drst = rst || soft_rst;

  csr_regs #(.M(M), .N(N), .HAW(HAW), .DAW(DAW)) u_csr (
    .clk, .rst, .reg_wr, .reg_rd, .reg_addr, .reg_wdata, .reg_rdata, .reg_rvalid,
    .soft_rst, .coord_me, .lattice, .gen_en, .cons_en, .pktgen_cfg0, .pktgen_dest,
    .link_edac, .link_new_dest_en, .link_new_dest, .red_hdr_thr, .red_dat_thr,
    .credit_period, .wait_cycles, .ip_address(eth_ip_address), .mac_address(eth_mac_address),
    .eth_tick, .perf_status, .perf_count, .fifo_sts_rx, .fifo_sts_tx, .intra_cnt, .intra_exc,
    .link_status, .link_err_single, .link_err_fatal, .link_cnt, .link_fifo_cnt,
    .chan_up(phy_up), .chan_err(phy_err), .eth_tx_bytes, .eth_rx_bytes);

  routing_ip #(.M(M), .N(N), .DW(DW), .HAW(HAW), .DAW(DAW)) u_routing (
    .clk, .rst(drst), .my_coord(coord_me), .lattice,
    .tx_hdr_wr, .tx_hdr_data, .tx_hdr_full, .tx_dat_wr, .tx_dat_data, .tx_dat_full,
    .rx_hdr_rd, .rx_hdr_data, .rx_hdr_empty, .rx_dat_rd, .rx_dat_data, .rx_dat_empty,
    .lk_tx_hdr_rd, .lk_tx_hdr_data, .lk_tx_hdr_empty, .lk_tx_dat_rd, .lk_tx_dat_data, .lk_tx_dat_empty,
    .lk_rx_hdr_wr, .lk_rx_dat_wr, .lk_rx_vc, .lk_rx_hdr_data, .lk_rx_dat_data,
    .lk_rx_hdr_free, .lk_rx_dat_free,
    .gen_en, .cons_en, .pktgen_cfg0, .pktgen_dest, .perf_status, .perf_count, .test_ok,
    .fifo_sts_rx, .fifo_sts_tx, .intra_cnt, .intra_exc, .link_fifo_cnt, .wait_evt);

  eth_reg_config u_eth_cfg (
    .clk, .rst(drst), .chan_sync(eth_chan_sync), .tick(eth_tick), .channel_ok(eth_channel_ok),
    .wr_req(eth_cfg_wr_req), .wr_addr(eth_cfg_wr_addr), .wr_data(eth_cfg_wr_data), .wr_ack(eth_cfg_wr_ack),
    .rd_req(eth_cfg_rd_req), .rd_addr(eth_cfg_rd_addr), .rd_ack(eth_cfg_rd_ack), .rd_data(eth_cfg_rd_data),
    .tx_bytes(eth_tx_bytes), .rx_bytes(eth_rx_bytes));

  ipv4_tx u_ipv4_tx (
    .clk, .rst(drst), .src_ip(eth_ip_address),
    .udp_start(ip_udp_start), .udp_len(ip_udp_len), .udp_dst_ip(ip_udp_dst_ip), .udp_busy(ip_udp_busy),
    .in_valid(ip_in_valid), .in_data(ip_in_data), .in_ready(ip_in_ready),
    .arp_req, .arp_ip, .arp_valid, .arp_mac,
    .ch_req(mac_req[0]), .ch_gnt(mac_gnt[0]),
    .out_valid(mac_valid[0]), .out_data(mac_data[0]), .out_bytes(mac_bytes[0]), .out_last(mac_last[0]),
    .out_ready(mac_ready[0]), .dst_mac(mac_dst[0]), .ethertype(mac_type[0]), .err(eth_err));

  arp_unit u_arp (
    .clk, .rst(drst), .my_ip(eth_ip_address), .my_mac(eth_mac_address),
    .arp_req, .arp_ip, .arp_valid, .arp_mac,
    .rx_valid(rx_valid && rx_arp), .rx_data(eth_udp_rx_data), .rx_last(rx_last),
    .tx_req(mac_req[1]), .tx_gnt(mac_gnt[1]),
    .tx_valid(mac_valid[1]), .tx_data(mac_data[1]), .tx_bytes(mac_bytes[1]), .tx_last(mac_last[1]),
    .tx_ready(mac_ready[1]), .tx_dst_mac(mac_dst[1]), .tx_ethertype(mac_type[1]));

  mac_tx u_mac_tx (
    .clk, .rst(drst), .src_mac(eth_mac_address), .req(mac_req), .gnt(mac_gnt),
    .dst_mac(mac_dst), .ethertype(mac_type),
    .s_valid(mac_valid), .s_data(mac_data), .s_bytes(mac_bytes), .s_last(mac_last), .s_ready(mac_ready),
    .m_tdata(eth_tx_tdata), .m_tkeep(eth_tx_tkeep), .m_tlast(eth_tx_tlast),
    .m_tvalid(eth_tx_tvalid), .m_tready(eth_tx_tready));

  mac_rx u_mac_rx (
    .clk, .rst(drst), .my_mac(eth_mac_address), .my_ip(eth_ip_address),
    .s_tdata(eth_rx_tdata), .s_tkeep(eth_rx_tkeep), .s_tlast(eth_rx_tlast), .s_tvalid(eth_rx_tvalid),
    .out_valid(rx_valid), .out_data(eth_udp_rx_data), .out_bytes(eth_udp_rx_bytes), .out_last(rx_last),
    .out_arp(rx_arp), .src_ip(eth_udp_rx_src_ip));
  assign eth_udp_rx_valid = rx_valid && !rx_arp;

  // TEST_MAC: while its generator runs it owns the IPv4 transmitter's input
  eth_test_mac u_test_mac (
    .clk, .rst(drst), .start(eth_test_start), .npkts(16'(TEST_MAC_PKTS)), .gen_busy(eth_test_busy),
    .udp_start(t_udp_start), .udp_len(t_udp_len), .udp_dst_ip(t_udp_dst_ip), .udp_busy(ip_udp_busy),
    .in_valid(t_in_valid), .in_data(t_in_data), .in_ready(ip_in_ready && eth_test_busy),
    .rx_valid(eth_udp_rx_valid), .rx_data(eth_udp_rx_data), .rx_bytes(eth_udp_rx_bytes), .rx_last(rx_last),
    .rx_data_cnt(eth_test_rx_data_cnt), .rx_err_cnt(eth_test_rx_err_cnt), .rx_pkt_cnt(eth_test_rx_pkt_cnt));
  assign ip_udp_start  = eth_test_busy ? t_udp_start  : eth_udp_start;
  assign ip_udp_len    = eth_test_busy ? t_udp_len    : eth_udp_len;
  assign ip_udp_dst_ip = eth_test_busy ? t_udp_dst_ip : eth_udp_dst_ip;
  assign ip_in_valid   = eth_test_busy ? t_in_valid   : eth_in_valid;
  assign ip_in_data    = eth_test_busy ? t_in_data    : eth_in_data;
  assign eth_in_ready  = ip_in_ready && !eth_test_busy;
  assign eth_udp_busy  = ip_udp_busy || eth_test_busy;
  assign eth_udp_rx_last  = rx_last;

  for (genvar n = 0; n < N; n++) begin : g_link
    link_ctrl #(.DW(DW), .HAW(HAW), .DAW(DAW)) u_link (
      .clk, .rst(drst),
      .tx_hdr_rd(lk_tx_hdr_rd[n]), .tx_hdr_data(lk_tx_hdr_data[n]), .tx_hdr_empty(lk_tx_hdr_empty[n]),
      .tx_dat_rd(lk_tx_dat_rd[n]), .tx_dat_data(lk_tx_dat_data[n]), .tx_dat_empty(lk_tx_dat_empty[n]),
      .rx_hdr_wr(lk_rx_hdr_wr[n]), .rx_dat_wr(lk_rx_dat_wr[n]), .rx_vc(lk_rx_vc[n]),
      .rx_hdr_data(lk_rx_hdr_data[n]), .rx_dat_data(lk_rx_dat_data[n]),
      .rx_hdr_free(lk_rx_hdr_free[n]), .rx_dat_free(lk_rx_dat_free[n]),
      .phy_up(phy_up[n]), .phy_tx_ready(phy_tx_ready[n]),
      .phy_tx_kind(phy_tx_kind[n]), .phy_tx_data(phy_tx_data[n]),
      .phy_rx_kind(phy_rx_kind[n]), .phy_rx_data(phy_rx_data[n]),
      .cfg_edac(link_edac[n]), .cfg_use_new_dest(link_new_dest_en[n]), .cfg_new_dest(link_new_dest),
      .cfg_red_hdr_thr(red_hdr_thr), .cfg_red_dat_thr(red_dat_thr),
      .cfg_credit_period(credit_period), .cfg_wait_cycles(wait_cycles),
      .status(link_status[n]), .err_single(link_err_single[n]), .err_fatal(link_err_fatal[n]),
      .tx_magic(link_cnt[n][0]), .tx_start(link_cnt[n][1]), .tx_hdr(link_cnt[n][2]), .tx_ftr(link_cnt[n][3]),
      .rx_magic(link_cnt[n][4]), .rx_start(link_cnt[n][5]), .rx_hdr(link_cnt[n][6]), .rx_ftr(link_cnt[n][7]));
  end
endmodule
