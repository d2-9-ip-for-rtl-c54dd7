// perf_counter: performance block of one intra-node port.
//
// Holds the port's internal generator and internal consumer and the TxRx
// clock counter: the counter starts when the generator writes the first
// header of a run and stops when the run is over, that is when the consumer
// reports test ok (if it is enabled) or else when the generator has written
// its last footer. The counter value (PERF_INTRANODE_CNTx) and the two state
// fields (PERF_INTRANODE_ST) are outputs. FIFO-side signals pass to the
// generator and consumer; the port multiplexes them with the user interface.
// The block split and the state codes follow the document; the exact start
// and stop points of the clock counter are this implementation's choice.
module perf_counter
  import comm_pkg::*;
#(
  parameter int DW = 256,
  parameter int PORT = 0
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           gen_en,
  input  logic           cons_en,
  input  logic [31:0]    pktgen_cfg0,   // 15:0 npkts, 29:16 length, 31 header only
  input  coord_t         pktgen_dest,
  output logic           gen_hdr_wr,
  output logic [127:0]   gen_hdr_data,
  input  logic           tx_hdr_full,
  output logic           gen_dat_wr,
  output logic [DW-1:0]  gen_dat_data,
  input  logic           tx_dat_full,
  output logic           cons_hdr_rd,
  input  logic [127:0]   rx_hdr_data,
  input  logic           rx_hdr_empty,
  output logic           cons_dat_rd,
  input  logic [DW-1:0]  rx_dat_data,
  input  logic           rx_dat_empty,
  output logic [7:0]     status,        // 3:0 generator state, 7:4 {checker state, test ok}
  output logic [31:0]    clk_count,
  output logic           test_ok
);
  gen_state_t gst;
  chk_state_t cst;
  logic first_wr, gen_done, last_rd, running;
  logic [15:0] pkts_rcvd, errors;

  pkt_generator #(.DW(DW), .DEST_PORT(PORT)) u_gen (
    .clk, .rst, .en(gen_en),
    .cfg_npkts(pktgen_cfg0[15:0]), .cfg_len(pktgen_cfg0[29:16]), .cfg_hdr_only(pktgen_cfg0[31]),
    .cfg_dest(pktgen_dest),
    .hdr_wr(gen_hdr_wr), .hdr_data(gen_hdr_data), .hdr_full(tx_hdr_full),
    .dat_wr(gen_dat_wr), .dat_data(gen_dat_data), .dat_full(tx_dat_full),
    .state(gst), .first_wr, .done(gen_done));

  pkt_consumer #(.DW(DW)) u_cons (
    .clk, .rst, .en(cons_en), .cfg_npkts(pktgen_cfg0[15:0]),
    .hdr_rd(cons_hdr_rd), .hdr_data(rx_hdr_data), .hdr_empty(rx_hdr_empty),
    .dat_rd(cons_dat_rd), .dat_data(rx_dat_data), .dat_empty(rx_dat_empty),
    .state(cst), .test_ok, .last_rd, .pkts_rcvd, .errors);

  assign status = {cst, test_ok, gst};

  always_ff @(posedge clk) begin
    if (rst) begin
      running <= 1'b0;
      clk_count <= '0;
    end else begin
      if (first_wr) begin
        running <= 1'b1;
        clk_count <= 32'd1;
      end else if (running) begin
        if (cons_en ? test_ok : gen_done) running <= 1'b0;
        else clk_count <= clk_count + 32'd1;
      end
    end
  end
endmodule
