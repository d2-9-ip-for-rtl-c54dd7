// intranode_port: one port of the IntraNode interface.
//
// Each direction has a header/footer FIFO (128 bit) and a data FIFO (DW
// bit), as the document describes: the task (through its aggregator) writes
// TX FIFOs that the switch drains, the switch fills RX FIFOs that the task
// (through its dispatcher) reads. The port's performance counter can take
// over either side: with gen_en its generator writes the TX FIFOs and user
// writes are ignored; with cons_en its consumer drains the RX FIFOs and user
// reads are ignored.
// Status outputs feed the register file: used words of every FIFO, read and
// write counters of all four FIFOs, and a one-cycle pulse per FIFO when a
// write hits a full FIFO (write exception).
// FIFO depths (2**HAW headers, 2**DAW data words) are this implementation's
// choice: 2**8 words hold the document's largest payload, 4 KB, at either
// datapath width.
module intranode_port
  import comm_pkg::*;
#(
  parameter int DW   = 256,
  parameter int PORT = 0,
  parameter int HAW  = 4,
  parameter int DAW  = 8
) (
  input  logic          clk,
  input  logic          rst,
  // task side, TX
  input  logic          tx_hdr_wr,
  input  logic [127:0]  tx_hdr_data,
  output logic          tx_hdr_full,
  input  logic          tx_dat_wr,
  input  logic [DW-1:0] tx_dat_data,
  output logic          tx_dat_full,
  // task side, RX
  input  logic          rx_hdr_rd,
  output logic [127:0]  rx_hdr_data,
  output logic          rx_hdr_empty,
  input  logic          rx_dat_rd,
  output logic [DW-1:0] rx_dat_data,
  output logic          rx_dat_empty,
  // switch side
  input  logic          sw_tx_hdr_rd,
  output logic [127:0]  sw_tx_hdr_data,
  output logic          sw_tx_hdr_empty,
  input  logic          sw_tx_dat_rd,
  output logic [DW-1:0] sw_tx_dat_data,
  output logic          sw_tx_dat_empty,
  input  logic          sw_rx_hdr_wr,
  input  logic [127:0]  sw_rx_hdr_data,
  output logic [HAW:0]  sw_rx_hdr_free,
  input  logic          sw_rx_dat_wr,
  input  logic [DW-1:0] sw_rx_dat_data,
  output logic [DAW:0]  sw_rx_dat_free,
  // performance counter
  input  logic          gen_en,
  input  logic          cons_en,
  input  logic [31:0]   pktgen_cfg0,
  input  coord_t        pktgen_dest,
  output logic [7:0]    perf_status,
  output logic [31:0]   perf_count,
  output logic          test_ok,
  // statistics
  output logic [31:0]   fifo_sts_rx,   // 31:16 data used, 15:0 header used
  output logic [31:0]   fifo_sts_tx,
  output logic [31:0]   cnt [8],       // hd tx rd, hd tx wr, hd rx rd, hd rx wr, dt tx rd, dt tx wr, dt rx rd, dt rx wr
  output logic [3:0]    wr_exc         // tx hd, tx dt, rx hd, rx dt
);
  logic          g_hdr_wr, g_dat_wr, c_hdr_rd, c_dat_rd;
  logic [127:0]  g_hdr_data;
  logic [DW-1:0] g_dat_data;
  logic          txh_wr, txd_wr, rxh_rd, rxd_rd;
  logic [127:0]  txh_data;
  logic [DW-1:0] txd_data;
  logic [HAW:0]  txh_used, rxh_used, txh_free_u;
  logic [DAW:0]  txd_used, rxd_used, txd_free_u;
  logic          rxh_full, rxd_full;

  assign txh_wr   = gen_en ? g_hdr_wr   : tx_hdr_wr;
  assign txh_data = gen_en ? g_hdr_data : tx_hdr_data;
  assign txd_wr   = gen_en ? g_dat_wr   : tx_dat_wr;
  assign txd_data = gen_en ? g_dat_data : tx_dat_data;
  assign rxh_rd   = cons_en ? c_hdr_rd : rx_hdr_rd;
  assign rxd_rd   = cons_en ? c_dat_rd : rx_dat_rd;

  sync_fifo #(.W(128), .AW(HAW)) u_txh (
    .clk, .rst, .wr_en(txh_wr), .wr_data(txh_data), .rd_en(sw_tx_hdr_rd),
    .rd_data(sw_tx_hdr_data), .empty(sw_tx_hdr_empty), .full(tx_hdr_full),
    .used(txh_used), .free(txh_free_u), .wr_err(wr_exc[0]));
  sync_fifo #(.W(DW), .AW(DAW)) u_txd (
    .clk, .rst, .wr_en(txd_wr), .wr_data(txd_data), .rd_en(sw_tx_dat_rd),
    .rd_data(sw_tx_dat_data), .empty(sw_tx_dat_empty), .full(tx_dat_full),
    .used(txd_used), .free(txd_free_u), .wr_err(wr_exc[1]));
  sync_fifo #(.W(128), .AW(HAW)) u_rxh (
    .clk, .rst, .wr_en(sw_rx_hdr_wr), .wr_data(sw_rx_hdr_data), .rd_en(rxh_rd),
    .rd_data(rx_hdr_data), .empty(rx_hdr_empty), .full(rxh_full),
    .used(rxh_used), .free(sw_rx_hdr_free), .wr_err(wr_exc[2]));
  sync_fifo #(.W(DW), .AW(DAW)) u_rxd (
    .clk, .rst, .wr_en(sw_rx_dat_wr), .wr_data(sw_rx_dat_data), .rd_en(rxd_rd),
    .rd_data(rx_dat_data), .empty(rx_dat_empty), .full(rxd_full),
    .used(rxd_used), .free(sw_rx_dat_free), .wr_err(wr_exc[3]));

  perf_counter #(.DW(DW), .PORT(PORT)) u_perf (
    .clk, .rst, .gen_en, .cons_en, .pktgen_cfg0, .pktgen_dest,
    .gen_hdr_wr(g_hdr_wr), .gen_hdr_data(g_hdr_data), .tx_hdr_full,
    .gen_dat_wr(g_dat_wr), .gen_dat_data(g_dat_data), .tx_dat_full,
    .cons_hdr_rd(c_hdr_rd), .rx_hdr_data, .rx_hdr_empty,
    .cons_dat_rd(c_dat_rd), .rx_dat_data, .rx_dat_empty,
    .status(perf_status), .clk_count(perf_count), .test_ok);

  assign fifo_sts_rx = {16'(rxd_used), 16'(rxh_used)};
  assign fifo_sts_tx = {16'(txd_used), 16'(txh_used)};

  logic [7:0] ev;
  assign ev = {rxd_rd && !rx_dat_empty, sw_rx_dat_wr && !rxd_full,
               sw_tx_dat_rd && !sw_tx_dat_empty, txd_wr && !tx_dat_full,
               rxh_rd && !rx_hdr_empty, sw_rx_hdr_wr && !rxh_full,
               sw_tx_hdr_rd && !sw_tx_hdr_empty, txh_wr && !tx_hdr_full};
  // ev bit order: hd tx wr, hd tx rd, hd rx wr, hd rx rd, dt tx wr, dt tx rd, dt rx wr, dt rx rd
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < 8; k++) cnt[k] <= '0;
    end else begin
      for (int k = 0; k < 4; k++) begin
        if (ev[2*k+1]) cnt[2*k]   <= cnt[2*k]   + 32'd1;   // reads
        if (ev[2*k])   cnt[2*k+1] <= cnt[2*k+1] + 32'd1;   // writes
      end
    end
  end
endmodule
