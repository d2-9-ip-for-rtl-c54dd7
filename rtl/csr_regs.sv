// csr_regs: configuration and status registers of the Communication IP.
//
// A simple synchronous register port: reg_wr writes reg_wdata to the 32-bit
// register at byte offset reg_addr; reg_rd returns the register in reg_rdata
// on the next cycle with reg_rvalid. Offsets, fields and reset values follow
// the document's register table: RESET_REG (writing bit 0 holds the soft
// reset for 200 cycles, then the bit clears itself), REVISION, COORDME,
// LATTICESIZE (reset 0xffffffff), the performance block configuration,
// generator configuration, status and TxRx clock counters, the per-port
// intra-node FIFO fill levels and counters, LINK_0_CONFIG_0..2, the per-link
// status/error/counter blocks (link 1 at +0x28), the per-link FIFO counters
// (link 1 at +0x30), FIFO write exceptions (sticky until reset), FIFO depth
// exponents, transceiver status, and the Ethernet IP/MAC address registers
// and byte counters.
// LINK_0_CONFIG_1/2 (thresholds, credit period, waiting cycles) serve both
// links. Bit 6 of LINK_0_CONFIG_2 is documented both as part of the waiting-
// cycle field and as the Ethernet statistics tick: it is kept in the field,
// and a write with it set also pulses eth_tick. Unlisted offsets read 0.
// The register port protocol is this implementation's choice (the original
// is an AXI4-Lite kernel interface).
module csr_regs
  import comm_pkg::*;
#(
  parameter int M = 4,
  parameter int N = 2,
  parameter int HAW = 4,
  parameter int DAW = 8,
  parameter logic [31:0] REVISION = 32'h0002_0000
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         reg_wr,
  input  logic         reg_rd,
  input  logic [11:0]  reg_addr,
  input  logic [31:0]  reg_wdata,
  output logic [31:0]  reg_rdata,
  output logic         reg_rvalid,
  // configuration out
  output logic         soft_rst,
  output coord_t       coord_me,
  output coord_t       lattice,
  output logic [M-1:0] gen_en,
  output logic [M-1:0] cons_en,
  output logic [31:0]  pktgen_cfg0,
  output coord_t       pktgen_dest,
  output logic [3:0]   link_edac     [N],
  output logic         link_new_dest_en [N],
  output coord_t       link_new_dest,
  output logic [7:0]   red_hdr_thr,
  output logic [9:0]   red_dat_thr,
  output logic [7:0]   credit_period,
  output logic [7:0]   wait_cycles,
  output logic [31:0]  ip_address,
  output logic [47:0]  mac_address,
  output logic         eth_tick,
  // status in
  input  logic [7:0]   perf_status [M],
  input  logic [31:0]  perf_count  [M],
  input  logic [31:0]  fifo_sts_rx [M],
  input  logic [31:0]  fifo_sts_tx [M],
  input  logic [31:0]  intra_cnt   [M][8],
  input  logic [3:0]   intra_exc   [M],
  input  logic [15:0]  link_status [N],
  input  logic [15:0]  link_err_single [N],
  input  logic [15:0]  link_err_fatal  [N],
  input  logic [31:0]  link_cnt    [N][8],   // tx magic,start,hdr,ftr, rx magic,start,hdr,ftr
  input  logic [31:0]  link_fifo_cnt [N][12],
  input  logic [N-1:0] chan_up,
  input  logic [N-1:0] chan_err,
  input  logic [63:0]  eth_tx_bytes,
  input  logic [63:0]  eth_rx_bytes
);
  logic [31:0] coordme_r, lattice_r, intra_cf, inter_cf, cfg0, cfg1;
  logic [31:0] link_cfg0, link_cfg1, link_cfg2;
  logic [31:0] ip_r, mac_lo, mac_hi;
  logic [7:0]  rst_cnt;
  logic [31:0] exc_sticky;

  assign soft_rst = (rst_cnt != 8'd0);
  assign coord_me = coordme_r[15:0];
  assign lattice  = lattice_r[15:0];
  assign gen_en   = intra_cf[M-1:0];
  assign cons_en  = intra_cf[8 +: M];
  assign pktgen_cfg0 = cfg0;
  assign pktgen_dest = cfg1[15:0];
  assign link_new_dest = link_cfg0[15:0];
  always_comb
    for (int l = 0; l < N; l++) begin
      link_edac[l] = link_cfg0[24 + 4*l +: 4];
      link_new_dest_en[l] = link_cfg0[16 + l];
    end
  assign red_hdr_thr   = link_cfg1[7:0];
  assign red_dat_thr   = link_cfg1[25:16];
  assign credit_period = link_cfg2[15:8];
  assign wait_cycles   = link_cfg2[7:0];
  assign ip_address    = ip_r;
  assign mac_address   = {mac_hi[15:0], mac_lo};

  always_ff @(posedge clk) begin
    if (rst) begin
      coordme_r <= '0;
      lattice_r <= 32'hFFFF_FFFF;
      intra_cf <= '0;
      inter_cf <= '0;
      cfg0 <= '0;
      cfg1 <= '0;
      link_cfg0 <= '0;
      link_cfg1 <= '0;
      link_cfg2 <= '0;
      ip_r   <= 32'hC0A8_0002;
      mac_lo <= 32'hACC0_AAAA;
      mac_hi <= 32'h0000_D00B;
      rst_cnt <= '0;
      eth_tick <= 1'b0;
      exc_sticky <= '0;
    end else begin
      eth_tick <= 1'b0;
      if (rst_cnt != 8'd0) rst_cnt <= rst_cnt - 8'd1;
      for (int p = 0; p < M; p++)
        for (int k = 0; k < 4; k++)
          if (intra_exc[p][k]) exc_sticky[8*k + p] <= 1'b1;
      if (reg_wr) begin
        case (reg_addr)
          REG_RESET:           if (reg_wdata[0]) rst_cnt <= 8'd200;
          REG_COORDME:         coordme_r <= reg_wdata;
          REG_LATTICESIZE:     lattice_r <= reg_wdata;
          REG_PERF_INTRA_CF:   intra_cf <= reg_wdata;
          REG_PERF_INTER_CF:   inter_cf <= reg_wdata;
          REG_PKTGEN_CONFIG_0: cfg0 <= reg_wdata;
          REG_PKTGEN_CONFIG_1: cfg1 <= reg_wdata;
          REG_LINK0:           link_cfg0 <= reg_wdata;
          REG_LINK0 + 12'h4:   link_cfg1 <= reg_wdata;
          REG_LINK0 + 12'h8: begin
            link_cfg2 <= reg_wdata;
            eth_tick <= reg_wdata[6];
          end
          REG_IP_ADDRESS:      ip_r <= reg_wdata;
          REG_MAC_LOW:         mac_lo <= reg_wdata;
          REG_MAC_HIGH:        mac_hi <= reg_wdata;
          default: ;
        endcase
      end
    end
  end

  function automatic logic [31:0] read_reg(input logic [11:0] a);
    logic [31:0] r;
    r = '0;
    case (a)
      REG_RESET:           r = {31'd0, rst_cnt != 8'd0};
      REG_REVISION:        r = REVISION;
      REG_COORDME:         r = coordme_r;
      REG_LATTICESIZE:     r = lattice_r;
      REG_PERF_INTRA_CF:   r = intra_cf;
      REG_PERF_INTER_CF:   r = inter_cf;
      REG_PKTGEN_CONFIG_0: r = cfg0;
      REG_PKTGEN_CONFIG_1: r = cfg1;
      REG_PERF_INTRA_ST:   for (int p = 0; p < M; p++) r[8*p +: 8] = perf_status[p];
      REG_LINK0:           r = link_cfg0;
      REG_LINK0 + 12'h4:   r = link_cfg1;
      REG_LINK0 + 12'h8:   r = link_cfg2;
      REG_FIFO_INTRA_EXC:  r = exc_sticky;
      REG_FIFO_REGISTER:   r = {8'(HAW), 8'(DAW), 8'(HAW), 8'(DAW)};
      REG_TRANSCEIVER_ST:  r = {14'd0, 2'(chan_err), 14'd0, 2'(chan_up)};
      REG_IP_ADDRESS:      r = ip_r;
      REG_MAC_LOW:         r = mac_lo;
      REG_MAC_HIGH:        r = mac_hi;
      REG_ETH_TX_BYTE_LSB: r = eth_tx_bytes[31:0];
      REG_ETH_TX_BYTE_MSB: r = eth_tx_bytes[63:32];
      REG_ETH_RX_BYTE_LSB: r = eth_rx_bytes[31:0];
      REG_ETH_RX_BYTE_MSB: r = eth_rx_bytes[63:32];
      default: begin
        for (int p = 0; p < M; p++) begin
          if (a == REG_PERF_INTRA_CNT0 + 12'(4*p)) r = perf_count[p];
          if (a == REG_INTRA_FIFO0 + 12'(40*p))     r = fifo_sts_rx[p];
          if (a == REG_INTRA_FIFO0 + 12'(40*p + 4)) r = fifo_sts_tx[p];
          for (int k = 0; k < 8; k++)
            if (a == REG_INTRA_FIFO0 + 12'(40*p + 8 + 4*k)) r = intra_cnt[p][k];
        end
        for (int l = 0; l < N; l++) begin
          if (a == REG_LINK0_STATUS + 12'(40*l))     r = {16'd0, link_status[l]};
          if (a == REG_LINK0_STATUS + 12'(40*l + 4)) r = {link_err_single[l], link_err_fatal[l]};
          for (int k = 0; k < 8; k++)
            if (a == REG_LINK0_STATUS + 12'(40*l + 8 + 4*k)) r = link_cnt[l][k];
          for (int k = 0; k < 12; k++)
            if (a == REG_LINK0_RDWR + 12'(48*l + 4*k)) r = link_fifo_cnt[l][k];
        end
      end
    endcase
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      reg_rdata <= '0;
      reg_rvalid <= 1'b0;
    end else begin
      reg_rvalid <= reg_rd;
      if (reg_rd) reg_rdata <= read_reg(reg_addr);
    end
  end
endmodule
