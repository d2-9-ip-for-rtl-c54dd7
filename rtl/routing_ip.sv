// routing_ip: the Routing IP — switch component plus the IntraNode and
// InterNode interfaces.
//
// M intra-node ports connect local tasks (through the aggregator and
// dispatcher of the software library) and N inter-node ports connect the
// link controllers. Every port keeps separate header/footer and data FIFOs;
// inter-node ports keep one receive FIFO pair per virtual channel. The switch
// component routes packets between all ports with dimension-order routing
// and virtual cut-through. Latency through the switch from a header at the
// head of an input FIFO to the header in an output FIFO is one cycle when
// the output is free; payload then streams at one DW-bit word per cycle.
// Port sizes are the document's (M up to 4, N = 2); FIFO depths are this
// implementation's choice.
module routing_ip
  import comm_pkg::*;
#(
  parameter int M   = 4,
  parameter int N   = 2,
  parameter int DW  = 256,
  parameter int HAW = 4,
  parameter int DAW = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  coord_t        my_coord,
  input  coord_t        lattice,
  // intra-node ports, task side
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
  // inter-node ports, link side
  input  logic          lk_tx_hdr_rd   [N],
  output logic [127:0]  lk_tx_hdr_data [N],
  output logic          lk_tx_hdr_empty[N],
  input  logic          lk_tx_dat_rd   [N],
  output logic [DW-1:0] lk_tx_dat_data [N],
  output logic          lk_tx_dat_empty[N],
  input  logic          lk_rx_hdr_wr   [N],
  input  logic          lk_rx_dat_wr   [N],
  input  logic          lk_rx_vc       [N],
  input  logic [127:0]  lk_rx_hdr_data [N],
  input  logic [DW-1:0] lk_rx_dat_data [N],
  output logic [HAW:0]  lk_rx_hdr_free [N][2],
  output logic [DAW:0]  lk_rx_dat_free [N][2],
  // performance blocks
  input  logic [M-1:0]  gen_en,
  input  logic [M-1:0]  cons_en,
  input  logic [31:0]   pktgen_cfg0,
  input  coord_t        pktgen_dest,
  output logic [7:0]    perf_status [M],
  output logic [31:0]   perf_count  [M],
  output logic [M-1:0]  test_ok,
  // statistics
  output logic [31:0]   fifo_sts_rx [M],
  output logic [31:0]   fifo_sts_tx [M],
  output logic [31:0]   intra_cnt   [M][8],
  output logic [3:0]    intra_exc   [M],
  output logic [31:0]   link_fifo_cnt [N][12],
  output logic [M+2*N-1:0] wait_evt
);
  localparam int PI = M + 2*N;
  localparam int PO = M + N;

  logic [127:0]  in_hdr_data  [PI];
  logic          in_hdr_empty [PI];
  logic          in_hdr_rd    [PI];
  logic [DW-1:0] in_dat_data  [PI];
  logic          in_dat_empty [PI];
  logic          in_dat_rd    [PI];
  logic          out_hdr_wr   [PO];
  logic [127:0]  out_hdr_data [PO];
  logic [HAW:0]  out_hdr_free [PO];
  logic          out_dat_wr   [PO];
  logic [DW-1:0] out_dat_data [PO];
  logic [DAW:0]  out_dat_free [PO];

  switch_component #(.M(M), .N(N), .DW(DW), .HAW(HAW), .DAW(DAW)) u_switch (
    .clk, .rst, .my_coord, .lattice,
    .in_hdr_data, .in_hdr_empty, .in_hdr_rd, .in_dat_data, .in_dat_empty, .in_dat_rd,
    .out_hdr_wr, .out_hdr_data, .out_hdr_free, .out_dat_wr, .out_dat_data, .out_dat_free,
    .wait_evt);

  for (genvar p = 0; p < M; p++) begin : g_intra
    intranode_port #(.DW(DW), .PORT(p), .HAW(HAW), .DAW(DAW)) u_port (
      .clk, .rst,
      .tx_hdr_wr(tx_hdr_wr[p]), .tx_hdr_data(tx_hdr_data[p]), .tx_hdr_full(tx_hdr_full[p]),
      .tx_dat_wr(tx_dat_wr[p]), .tx_dat_data(tx_dat_data[p]), .tx_dat_full(tx_dat_full[p]),
      .rx_hdr_rd(rx_hdr_rd[p]), .rx_hdr_data(rx_hdr_data[p]), .rx_hdr_empty(rx_hdr_empty[p]),
      .rx_dat_rd(rx_dat_rd[p]), .rx_dat_data(rx_dat_data[p]), .rx_dat_empty(rx_dat_empty[p]),
      .sw_tx_hdr_rd(in_hdr_rd[p]), .sw_tx_hdr_data(in_hdr_data[p]), .sw_tx_hdr_empty(in_hdr_empty[p]),
      .sw_tx_dat_rd(in_dat_rd[p]), .sw_tx_dat_data(in_dat_data[p]), .sw_tx_dat_empty(in_dat_empty[p]),
      .sw_rx_hdr_wr(out_hdr_wr[p]), .sw_rx_hdr_data(out_hdr_data[p]), .sw_rx_hdr_free(out_hdr_free[p]),
      .sw_rx_dat_wr(out_dat_wr[p]), .sw_rx_dat_data(out_dat_data[p]), .sw_rx_dat_free(out_dat_free[p]),
      .gen_en(gen_en[p]), .cons_en(cons_en[p]), .pktgen_cfg0, .pktgen_dest,
      .perf_status(perf_status[p]), .perf_count(perf_count[p]), .test_ok(test_ok[p]),
      .fifo_sts_rx(fifo_sts_rx[p]), .fifo_sts_tx(fifo_sts_tx[p]), .cnt(intra_cnt[p]),
      .wr_exc(intra_exc[p]));
  end

  for (genvar n = 0; n < N; n++) begin : g_inter
    logic          rxh_rd [2], rxd_rd [2], rxh_empty [2], rxd_empty [2];
    logic [127:0]  rxh_data [2];
    logic [DW-1:0] rxd_data [2];
    for (genvar v = 0; v < 2; v++) begin : g_vc
      assign rxh_rd[v] = in_hdr_rd[M + 2*n + v];
      assign rxd_rd[v] = in_dat_rd[M + 2*n + v];
      assign in_hdr_data[M + 2*n + v]  = rxh_data[v];
      assign in_hdr_empty[M + 2*n + v] = rxh_empty[v];
      assign in_dat_data[M + 2*n + v]  = rxd_data[v];
      assign in_dat_empty[M + 2*n + v] = rxd_empty[v];
    end
    internode_port #(.DW(DW), .HAW(HAW), .DAW(DAW)) u_port (
      .clk, .rst,
      .sw_tx_hdr_wr(out_hdr_wr[M+n]), .sw_tx_hdr_data(out_hdr_data[M+n]), .sw_tx_hdr_free(out_hdr_free[M+n]),
      .sw_tx_dat_wr(out_dat_wr[M+n]), .sw_tx_dat_data(out_dat_data[M+n]), .sw_tx_dat_free(out_dat_free[M+n]),
      .sw_rx_hdr_rd(rxh_rd), .sw_rx_hdr_data(rxh_data), .sw_rx_hdr_empty(rxh_empty),
      .sw_rx_dat_rd(rxd_rd), .sw_rx_dat_data(rxd_data), .sw_rx_dat_empty(rxd_empty),
      .lk_tx_hdr_rd(lk_tx_hdr_rd[n]), .lk_tx_hdr_data(lk_tx_hdr_data[n]), .lk_tx_hdr_empty(lk_tx_hdr_empty[n]),
      .lk_tx_dat_rd(lk_tx_dat_rd[n]), .lk_tx_dat_data(lk_tx_dat_data[n]), .lk_tx_dat_empty(lk_tx_dat_empty[n]),
      .lk_rx_hdr_wr(lk_rx_hdr_wr[n]), .lk_rx_dat_wr(lk_rx_dat_wr[n]), .lk_rx_vc(lk_rx_vc[n]),
      .lk_rx_hdr_data(lk_rx_hdr_data[n]), .lk_rx_dat_data(lk_rx_dat_data[n]),
      .lk_rx_hdr_free(lk_rx_hdr_free[n]), .lk_rx_dat_free(lk_rx_dat_free[n]),
      .cnt(link_fifo_cnt[n]));
  end
endmodule
