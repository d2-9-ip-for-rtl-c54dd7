// internode_port: one port of the InterNode interface.
//
// TX side: a header/footer FIFO and a data FIFO that the switch fills and the
// link controller drains. RX side: one header/footer FIFO and one data FIFO
// per virtual channel (VCH0, VCH1), filled by the link controller according
// to the virtual channel bit of each packet header and drained by the switch.
// The RX FIFO fill levels go to the link controller for its flow control.
// cnt[] holds the twelve LINKx_RD_WR_CNT counters of the register table:
// TX header read, TX data read, TX header write, TX data write, then for
// VCH0 and VCH1 each: data write, header write, data read, header read.
// The split into header/footer and data FIFOs, the two receive virtual
// channels and the counter list follow the document; FIFO depths and the
// per-VC steering are this implementation's choice (see intranode_port).
module internode_port #(
  parameter int DW  = 256,
  parameter int HAW = 4,
  parameter int DAW = 8
) (
  input  logic          clk,
  input  logic          rst,
  // switch side, TX
  input  logic          sw_tx_hdr_wr,
  input  logic [127:0]  sw_tx_hdr_data,
  output logic [HAW:0]  sw_tx_hdr_free,
  input  logic          sw_tx_dat_wr,
  input  logic [DW-1:0] sw_tx_dat_data,
  output logic [DAW:0]  sw_tx_dat_free,
  // switch side, RX (per virtual channel)
  input  logic          sw_rx_hdr_rd   [2],
  output logic [127:0]  sw_rx_hdr_data [2],
  output logic          sw_rx_hdr_empty[2],
  input  logic          sw_rx_dat_rd   [2],
  output logic [DW-1:0] sw_rx_dat_data [2],
  output logic          sw_rx_dat_empty[2],
  // link side, TX
  input  logic          lk_tx_hdr_rd,
  output logic [127:0]  lk_tx_hdr_data,
  output logic          lk_tx_hdr_empty,
  input  logic          lk_tx_dat_rd,
  output logic [DW-1:0] lk_tx_dat_data,
  output logic          lk_tx_dat_empty,
  // link side, RX
  input  logic          lk_rx_hdr_wr,
  input  logic          lk_rx_dat_wr,
  input  logic          lk_rx_vc,
  input  logic [127:0]  lk_rx_hdr_data,
  input  logic [DW-1:0] lk_rx_dat_data,
  output logic [HAW:0]  lk_rx_hdr_free [2],
  output logic [DAW:0]  lk_rx_dat_free [2],
  output logic [31:0]   cnt [12]
);
  logic txh_full, txd_full;
  logic [HAW:0] txh_used, rxh_used [2];
  logic [DAW:0] txd_used, rxd_used [2];
  logic rxh_full [2], rxd_full [2];
  logic unused_err [6];

  sync_fifo #(.W(128), .AW(HAW)) u_txh (
    .clk, .rst, .wr_en(sw_tx_hdr_wr), .wr_data(sw_tx_hdr_data), .rd_en(lk_tx_hdr_rd),
    .rd_data(lk_tx_hdr_data), .empty(lk_tx_hdr_empty), .full(txh_full),
    .used(txh_used), .free(sw_tx_hdr_free), .wr_err(unused_err[0]));
  sync_fifo #(.W(DW), .AW(DAW)) u_txd (
    .clk, .rst, .wr_en(sw_tx_dat_wr), .wr_data(sw_tx_dat_data), .rd_en(lk_tx_dat_rd),
    .rd_data(lk_tx_dat_data), .empty(lk_tx_dat_empty), .full(txd_full),
    .used(txd_used), .free(sw_tx_dat_free), .wr_err(unused_err[1]));

  for (genvar v = 0; v < 2; v++) begin : g_vc
    sync_fifo #(.W(128), .AW(HAW)) u_rxh (
      .clk, .rst, .wr_en(lk_rx_hdr_wr && (lk_rx_vc == 1'(v))), .wr_data(lk_rx_hdr_data),
      .rd_en(sw_rx_hdr_rd[v]), .rd_data(sw_rx_hdr_data[v]), .empty(sw_rx_hdr_empty[v]),
      .full(rxh_full[v]), .used(rxh_used[v]), .free(lk_rx_hdr_free[v]), .wr_err(unused_err[2+2*v]));
    sync_fifo #(.W(DW), .AW(DAW)) u_rxd (
      .clk, .rst, .wr_en(lk_rx_dat_wr && (lk_rx_vc == 1'(v))), .wr_data(lk_rx_dat_data),
      .rd_en(sw_rx_dat_rd[v]), .rd_data(sw_rx_dat_data[v]), .empty(sw_rx_dat_empty[v]),
      .full(rxd_full[v]), .used(rxd_used[v]), .free(lk_rx_dat_free[v]), .wr_err(unused_err[3+2*v]));
  end

  logic [11:0] ev;
  always_comb begin
    ev[0] = lk_tx_hdr_rd && !lk_tx_hdr_empty;
    ev[1] = lk_tx_dat_rd && !lk_tx_dat_empty;
    ev[2] = sw_tx_hdr_wr && !txh_full;
    ev[3] = sw_tx_dat_wr && !txd_full;
    for (int v = 0; v < 2; v++) begin
      ev[4+4*v] = lk_rx_dat_wr && (lk_rx_vc == 1'(v)) && !rxd_full[v];
      ev[5+4*v] = lk_rx_hdr_wr && (lk_rx_vc == 1'(v)) && !rxh_full[v];
      ev[6+4*v] = sw_rx_dat_rd[v] && !sw_rx_dat_empty[v];
      ev[7+4*v] = sw_rx_hdr_rd[v] && !sw_rx_hdr_empty[v];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) for (int k = 0; k < 12; k++) cnt[k] <= '0;
    else for (int k = 0; k < 12; k++) if (ev[k]) cnt[k] <= cnt[k] + 32'd1;
  end
endmodule
