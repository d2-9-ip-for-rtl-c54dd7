// pkt_generator: internal packet generator of a port's performance counter.
//
// When 'en' rises the generator writes cfg_npkts packets into the port's TX
// header/footer FIFO and TX data FIFO: header, ceil(len/bytes-per-word)
// payload words, footer. The destination is cfg_dest (PKTGEN_CONFIG_1) with
// intra-tile port DEST_PORT; cfg_hdr_only sends header-only packets (length
// 0, no payload). A write happens only in a cycle where the target FIFO is
// not full, so the generator injects one word per cycle when nothing stalls.
// state follows the PERF_INTRANODE_ST codes: OFF, IDLE, TX_HEADER,
// TX_PAYLOAD, TX_FOOTER. The payload is comm_pkg::test_lane, the footer holds
// a marker 0xF007 in bits 127:112 and the packet number in bits 15:0; both
// are this implementation's choice, as is starting a new run on each rising
// edge of 'en'.
module pkt_generator
  import comm_pkg::*;
#(
  parameter int DW = 256,
  parameter int DEST_PORT = 0
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           en,
  input  logic [15:0]    cfg_npkts,
  input  logic [13:0]    cfg_len,
  input  logic           cfg_hdr_only,
  input  coord_t         cfg_dest,
  output logic           hdr_wr,
  output logic [127:0]   hdr_data,
  input  logic           hdr_full,
  output logic           dat_wr,
  output logic [DW-1:0]  dat_data,
  input  logic           dat_full,
  output gen_state_t     state,
  output logic           first_wr,   // pulse: first header of a run written
  output logic           done        // run complete
);
  localparam int BPW = DW / 8;
  logic [15:0] pkt_cnt;
  logic [13:0] len;
  logic [9:0]  word_cnt, nwords;
  pkt_hdr_t    hdr;

  assign len    = cfg_hdr_only ? 14'd0 : cfg_len;
  assign nwords = 10'(payload_words(len, BPW));

  always_comb begin
    hdr = '0;
    hdr.length = len;
    hdr.coord = cfg_dest;
    hdr.intratile_port = 4'(DEST_PORT);
    hdr.pid_chid = pkt_cnt;
  end

  always_comb begin
    hdr_wr = 1'b0;
    hdr_data = hdr;
    dat_wr = 1'b0;
    for (int l = 0; l < DW/32; l++) dat_data[32*l +: 32] = test_lane(len, int'(word_cnt), l);
    case (state)
      GEN_TX_HEADER:  hdr_wr = !hdr_full;
      GEN_TX_PAYLOAD: dat_wr = !dat_full;
      GEN_TX_FOOTER: begin
        hdr_wr = !hdr_full;
        hdr_data = {16'hF007, 96'h0, pkt_cnt};
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= GEN_OFF;
      pkt_cnt <= '0;
      word_cnt <= '0;
      first_wr <= 1'b0;
      done <= 1'b0;
    end else begin
      first_wr <= 1'b0;
      if (!en) begin
        state <= GEN_OFF;
        done <= 1'b0;
      end else begin
        case (state)
          GEN_OFF: begin
            // en has just risen: start a new run
            pkt_cnt <= '0;
            done <= (cfg_npkts == 16'd0);
            state <= (cfg_npkts == 16'd0) ? GEN_IDLE : GEN_TX_HEADER;
          end
          GEN_IDLE: ;   // run finished, wait for en to drop
          GEN_TX_HEADER:
            if (!hdr_full) begin
              if (pkt_cnt == 16'd0) first_wr <= 1'b1;
              word_cnt <= '0;
              state <= (nwords == 10'd0) ? GEN_TX_FOOTER : GEN_TX_PAYLOAD;
            end
          GEN_TX_PAYLOAD:
            if (!dat_full) begin
              word_cnt <= word_cnt + 10'd1;
              if (word_cnt == nwords - 10'd1) state <= GEN_TX_FOOTER;
            end
          GEN_TX_FOOTER:
            if (!hdr_full) begin
              pkt_cnt <= pkt_cnt + 16'd1;
              if (pkt_cnt == cfg_npkts - 16'd1) begin
                state <= GEN_IDLE;
                done <= 1'b1;
              end else begin
                state <= GEN_TX_HEADER;
              end
            end
          default: state <= GEN_OFF;
        endcase
      end
    end
  end
endmodule
