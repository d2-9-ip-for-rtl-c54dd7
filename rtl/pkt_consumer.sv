// pkt_consumer: internal packet consumer (checker) of a port's performance
// counter.
//
// While enabled it drains the port's RX header/footer and data FIFOs, one
// word per cycle: header, the payload words the header's length calls for,
// footer. Every payload word is compared with the comm_pkg::test_lane
// pattern the generator writes. test_ok rises once cfg_npkts packets have been
// received with no payload error. state follows the PERF_INTRANODE_ST codes
// OFF, IDLE (enabled, nothing received yet) and COUNT. last_rd pulses when a
// footer is read. Counting restarts when 'en' rises. The document gives the
// status codes and the test-ok meaning; the checking rule is this
// implementation's.
module pkt_consumer
  import comm_pkg::*;
#(
  parameter int DW = 256
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           en,
  input  logic [15:0]    cfg_npkts,
  output logic           hdr_rd,
  input  logic [127:0]   hdr_data,
  input  logic           hdr_empty,
  output logic           dat_rd,
  input  logic [DW-1:0]  dat_data,
  input  logic           dat_empty,
  output chk_state_t     state,
  output logic           test_ok,
  output logic           last_rd,
  output logic [15:0]    pkts_rcvd,
  output logic [15:0]    errors
);
  localparam int BPW = DW / 8;
  typedef enum logic [1:0] {P_HDR, P_DATA, P_FTR} phase_t;
  phase_t      phase;
  logic [13:0] len;
  logic [9:0]  word_cnt, nwords;
  logic [DW-1:0] expect_w;
  pkt_hdr_t    hdr_in;

  assign hdr_in = hdr_data;
  always_comb
    for (int l = 0; l < DW/32; l++) expect_w[32*l +: 32] = test_lane(len, int'(word_cnt), l);

  assign hdr_rd = (state != CHK_OFF) && !hdr_empty && (phase == P_HDR || phase == P_FTR);
  assign dat_rd = (state != CHK_OFF) && !dat_empty && (phase == P_DATA);
  assign test_ok = (state != CHK_OFF) && (pkts_rcvd == cfg_npkts) && (errors == 16'd0) && (cfg_npkts != 16'd0);

  always_ff @(posedge clk) begin
    if (rst || !en) begin
      state <= CHK_OFF;
      phase <= P_HDR;
      len <= '0;
      nwords <= '0;
      word_cnt <= '0;
      pkts_rcvd <= '0;
      errors <= '0;
      last_rd <= 1'b0;
    end else begin
      last_rd <= 1'b0;
      if (state == CHK_OFF) state <= CHK_IDLE;
      if (hdr_rd && phase == P_HDR) begin
        state <= CHK_COUNT;
        len <= hdr_in.length;
        nwords <= 10'(payload_words(hdr_in.length, BPW));
        word_cnt <= '0;
        phase <= (hdr_in.length == 14'd0) ? P_FTR : P_DATA;
      end
      if (dat_rd) begin
        if (dat_data != expect_w) errors <= errors + 16'd1;
        word_cnt <= word_cnt + 10'd1;
        if (word_cnt == nwords - 10'd1) phase <= P_FTR;
      end
      if (hdr_rd && phase == P_FTR) begin
        pkts_rcvd <= pkts_rcvd + 16'd1;
        last_rd <= 1'b1;
        phase <= P_HDR;
      end
    end
  end
endmodule
