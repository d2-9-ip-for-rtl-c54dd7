// ipv4_tx: the IPV4_TX state machine of the Ethernet port. Wraps one UDP
// datagram in an IPv4 packet and streams it to the MAC transmitter.
//
// States: IDLE -> (length check) -> WAIT_MAC (unicast: ask the ARP block for
// the destination MAC and wait for the answer) -> WAIT_CH (wait for the
// grant of the MAC transmit arbiter; broadcast packets come here directly
// with MAC ff:ff:ff:ff:ff:ff) -> IP_HDR0 -> IP_HDR1 -> DATA -> IDLE.
// A datagram longer than MAX_UDP bytes is refused: err pulses for one cycle
// and its words are read and discarded (state DROP).
//
// Interfaces (64-bit words, byte 0 of the word in bits 63:56):
//  - request: udp_start (one cycle, with udp_len = UDP length in bytes
//    including its 8-byte header, and udp_dst_ip); the datagram words then
//    follow on in_valid/in_data with in_ready; udp_busy is high until the
//    last word has been sent.
//  - ARP: arp_req/arp_ip held until arp_valid returns arp_mac.
//  - arbiter: ch_req held until ch_gnt.
//  - output: out_valid/out_data/out_bytes (1..8 valid bytes)/out_last with
//    out_ready, plus dst_mac and ethertype (0x0800), stable for the packet.
// IP_HDR0 carries version/IHL (0x45), TOS 0, total length, identification
// and flags/fragment offset; IP_HDR1 carries TTL 0x80, protocol 0x11, the
// header checksum and the source address; the destination address then
// leads the first data word, so the datagram is shifted by four bytes. The
// checksum is computed from the registered fields before IP_HDR0.
// From the document: the state sequence, the length limit, the broadcast
// shortcut, IHL = 5, TTL, protocol. This implementation's choices: the
// identification field (a packet counter), flags = 0, the word layout and
// handshakes, and counting a datagram of exactly MAX_UDP bytes as legal.
module ipv4_tx #(
  parameter int MAX_UDP = 1480
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] src_ip,
  input  logic        udp_start,
  input  logic [15:0] udp_len,
  input  logic [31:0] udp_dst_ip,
  output logic        udp_busy,
  input  logic        in_valid,
  input  logic [63:0] in_data,
  output logic        in_ready,
  output logic        arp_req,
  output logic [31:0] arp_ip,
  input  logic        arp_valid,
  input  logic [47:0] arp_mac,
  output logic        ch_req,
  input  logic        ch_gnt,
  output logic        out_valid,
  output logic [63:0] out_data,
  output logic [3:0]  out_bytes,
  output logic        out_last,
  input  logic        out_ready,
  output logic [47:0] dst_mac,
  output logic [15:0] ethertype,
  output logic        err
);
  typedef enum logic [2:0] {
    I_IDLE, I_WAIT_MAC, I_WAIT_CH, I_HDR0, I_HDR1, I_DATA, I_DROP
  } istate_t;
  istate_t st;
  logic [15:0] len, ident, csum, rem, in_left;
  logic [31:0] dst_ip, carry;
  logic [19:0] sum;
  logic [16:0] fold;

  assign ethertype = 16'h0800;
  assign udp_busy  = (st != I_IDLE);
  assign arp_req   = (st == I_WAIT_MAC);
  assign arp_ip    = dst_ip;
  assign ch_req    = (st == I_WAIT_CH);

  // one's-complement sum of the header with the checksum field at zero
  always_comb begin
    sum = 20'h4500 + 20'(len + 16'd20) + 20'(ident) + 20'h8011
        + 20'(src_ip[31:16]) + 20'(src_ip[15:0]) + 20'(dst_ip[31:16]) + 20'(dst_ip[15:0]);
    fold = 17'(sum[15:0]) + 17'(sum[19:16]);
  end

  always_comb begin
    out_valid = 1'b0;
    out_data  = 64'h0;
    out_bytes = 4'd8;
    out_last  = 1'b0;
    in_ready  = 1'b0;
    case (st)
      I_HDR0: begin
        out_valid = 1'b1;
        out_data  = {8'h45, 8'h00, len + 16'd20, ident, 16'h0000};
      end
      I_HDR1: begin
        out_valid = 1'b1;
        out_data  = {8'h80, 8'h11, csum, src_ip};
      end
      I_DATA: begin
        out_valid = (in_left != 16'd0) ? in_valid : 1'b1;
        in_ready  = (in_left != 16'd0) && out_ready;
        out_data  = {carry, (in_left != 16'd0) ? in_data[63:32] : 32'h0};
        out_last  = (rem <= 16'd8);
        out_bytes = (rem <= 16'd8) ? rem[3:0] : 4'd8;
      end
      I_DROP: in_ready = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= I_IDLE;
      len <= '0;
      ident <= '0;
      csum <= '0;
      rem <= '0;
      in_left <= '0;
      dst_ip <= '0;
      carry <= '0;
      dst_mac <= '0;
      err <= 1'b0;
    end else begin
      err <= 1'b0;
      case (st)
        I_IDLE: if (udp_start) begin
          len     <= udp_len;
          dst_ip  <= udp_dst_ip;
          in_left <= (udp_len + 16'd7) >> 3;
          if (int'(udp_len) > MAX_UDP) begin
            err <= 1'b1;
            st  <= I_DROP;
          end else if (udp_dst_ip == 32'hFFFF_FFFF) begin
            dst_mac <= 48'hFFFF_FFFF_FFFF;
            st <= I_WAIT_CH;
          end else
            st <= I_WAIT_MAC;
        end
        I_WAIT_MAC: if (arp_valid) begin
          dst_mac <= arp_mac;
          st <= I_WAIT_CH;
        end
        I_WAIT_CH: if (ch_gnt) begin
          csum <= ~(fold[15:0] + 16'(fold[16]));
          st <= I_HDR0;
        end
        I_HDR0: if (out_ready) st <= I_HDR1;
        I_HDR1: if (out_ready) begin
          carry <= dst_ip;
          rem <= len + 16'd4;
          st <= I_DATA;
        end
        I_DATA: if (out_valid && out_ready) begin
          if (in_left != 16'd0) begin
            carry <= in_data[31:0];
            in_left <= in_left - 16'd1;
          end
          rem <= rem - 16'd8;
          if (rem <= 16'd8) begin
            ident <= ident + 16'd1;
            st <= I_IDLE;
          end
        end
        I_DROP: if (in_valid) begin
          in_left <= in_left - 16'd1;
          if (in_left <= 16'd1) st <= I_IDLE;
        end
        default: st <= I_IDLE;
      endcase
    end
  end
endmodule
