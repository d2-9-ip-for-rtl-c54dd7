// eth_test_mac: TEST_MAC mode of the Ethernet port. GEN_TX_STATE_0 sends
// npkts UDP datagrams through the IPv4 transmitter, each with the constant
// UDP header (destination and source port 0xfa62, checksum 0) and a
// pseudo-random payload of PAY_WORDS 64-bit words from an LFSR, to
// DST_IP. LFSR_check takes the received datagrams, checks the same header
// and the payload against its own copy of the LFSR, and counts payload
// words, errored words and packets.
// The LFSR is 64 bits, x^64 + x^63 + x^61 + x^60 + 1 (XNOR feedback), one
// step per word, restarted from SEED at the start of every packet, so the
// checker stays in step whatever packets were lost.
// Generator side: start (one cycle) with npkts latched; gen_busy while
// sending. udp_start/udp_len/udp_dst_ip and in_valid/in_data/in_ready follow
// the IPv4 transmitter's datagram input; a datagram is started only when
// udp_busy is low. Checker side: rx_valid/rx_data/rx_bytes/rx_last are the
// received datagram words (byte 0 in bits 63:56). A datagram whose first
// word is not this test header (ports 0xfa62, length 8 + 8*PAY_WORDS,
// checksum 0) is not a test packet and is ignored.
// From the document: the constant header, LFSR payload, destination IP
// 192.168.0.2, a 512-byte payload (64 words) and counting received data
// and errors. This implementation's choices: the polynomial and seed, the
// UDP length value (bytes, see the block's notes), restarting per packet.
module eth_test_mac #(
  parameter int          PAY_WORDS = 64,
  parameter logic [31:0] DST_IP    = 32'hC0A8_0002,
  parameter logic [63:0] SEED      = 64'h0123_4567_89AB_CDEF
) (
  input  logic        clk,
  input  logic        rst,
  // generator control
  input  logic        start,
  input  logic [15:0] npkts,
  output logic        gen_busy,
  // towards the IPv4 transmitter
  output logic        udp_start,
  output logic [15:0] udp_len,
  output logic [31:0] udp_dst_ip,
  input  logic        udp_busy,
  output logic        in_valid,
  output logic [63:0] in_data,
  input  logic        in_ready,
  // received datagrams
  input  logic        rx_valid,
  input  logic [63:0] rx_data,
  input  logic [3:0]  rx_bytes,
  input  logic        rx_last,
  // LFSR_check counters
  output logic [31:0] rx_data_cnt,
  output logic [31:0] rx_err_cnt,
  output logic [31:0] rx_pkt_cnt
);
  localparam logic [15:0] ULEN = 16'(8 + 8 * PAY_WORDS);
  localparam logic [63:0] HDR  = {16'hFA62, 16'hFA62, ULEN, 16'h0000};

  function automatic logic [63:0] lfsr_next(input logic [63:0] v);
    return {v[62:0], ~(v[63] ^ v[62] ^ v[60] ^ v[59])};
  endfunction

  // ---------------- generator ----------------
  typedef enum logic [1:0] {G_IDLE, G_START, G_HDR, G_PAY} gstate_t;
  gstate_t gst;
  logic [15:0] left;
  logic [15:0] wcnt;
  logic [63:0] glfsr;

  assign gen_busy   = (gst != G_IDLE);
  assign udp_start  = (gst == G_START) && !udp_busy;
  assign udp_len    = ULEN;
  assign udp_dst_ip = DST_IP;
  assign in_valid   = (gst == G_HDR) || (gst == G_PAY);
  assign in_data    = (gst == G_HDR) ? HDR : glfsr;

  always_ff @(posedge clk) begin
    if (rst) begin
      gst <= G_IDLE;
      left <= '0;
      wcnt <= '0;
      glfsr <= SEED;
    end else begin
      case (gst)
        G_IDLE: if (start && npkts != 16'd0) begin
          left <= npkts;
          gst <= G_START;
        end
        G_START: if (!udp_busy) begin
          glfsr <= SEED;
          wcnt <= '0;
          left <= left - 16'd1;
          gst <= G_HDR;
        end
        G_HDR: if (in_ready) gst <= G_PAY;
        default: if (in_ready) begin            // G_PAY
          glfsr <= lfsr_next(glfsr);
          wcnt <= wcnt + 16'd1;
          if (int'(wcnt) == PAY_WORDS - 1) gst <= (left == 16'd0) ? G_IDLE : G_START;
        end
      endcase
    end
  end

  // ---------------- checker ----------------
  logic        in_pkt, is_test;
  logic [15:0] rcnt;
  logic [63:0] clfsr;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_pkt <= 1'b0;
      is_test <= 1'b0;
      rcnt <= '0;
      clfsr <= SEED;
      rx_data_cnt <= '0;
      rx_err_cnt <= '0;
      rx_pkt_cnt <= '0;
    end else if (rx_valid) begin
      if (!in_pkt) begin
        // first word: the UDP header decides whether this is a test packet
        is_test <= (rx_data == HDR) && rx_bytes == 4'd8;
        clfsr <= SEED;
        rcnt <= '0;
        in_pkt <= !rx_last;
      end else begin
        if (is_test) begin
          rx_data_cnt <= rx_data_cnt + 32'd1;
          if (rx_data != clfsr || rx_bytes != 4'd8 || int'(rcnt) >= PAY_WORDS)
            rx_err_cnt <= rx_err_cnt + 32'd1;
          if (rx_last) begin
            rx_pkt_cnt <= rx_pkt_cnt + 32'd1;
            if (int'(rcnt) != PAY_WORDS - 1) rx_err_cnt <= rx_err_cnt + 32'd1;
          end
        end
        clfsr <= lfsr_next(clfsr);
        rcnt <= rcnt + 16'd1;
        if (rx_last) in_pkt <= 1'b0;
      end
    end
  end
endmodule
