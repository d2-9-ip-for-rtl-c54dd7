// mac_rx: MAC_RX and IPV4_RX of the Ethernet port. Takes the frames the
// Ethernet core receives (FCS already removed by the core, as configured by
// CONFIGURATION_RX_REG1 = 0x33) and dispatches them by EtherType: an ARP
// packet (0x0806) goes to the ARP block, an IPv4 packet (0x0800) carrying
// UDP is stripped of its IPv4 header and its datagram (UDP header and
// payload) goes to the UDP side. Frames for another MAC address (neither
// my_mac nor broadcast), other EtherTypes, IPv4 packets that are not plain
// UDP (version 4, IHL 5, protocol 17) or not addressed to my_ip or to
// 255.255.255.255 are dropped. Padding after the ARP packet or after the
// IPv4 total length is removed.
// Input: 64-bit AXI4-Stream from the core, byte 0 in tdata[7:0], tkeep,
// tlast, tvalid; no back-pressure (the core's receive side has none).
// Output: out_valid/out_data/out_bytes/out_last words with byte 0 in bits
// 63:56, out_arp telling which side the packet is for, and src_ip (the
// IPv4 source address) stable while a datagram is output. Output words are
// registered and follow the input by one to two cycles.
// How it works: header fields are captured as their words pass; the
// payload bytes of each word (from offset 14 for ARP, 34 for IPv4, up to
// the packet's end) are appended to a 16-byte packing buffer that emits 8
// bytes whenever it holds 8, and the remainder at the packet's end. The
// IPv4 destination check is complete with the first payload word, before
// the buffer can emit.
// From the document: dispatch by EtherType to IPV4 RX or ARP RX, IPv4
// de-encapsulation to UDP. This implementation's choices: the address and
// header checks, the word format and the packing buffer; the IPv4 header
// checksum is not verified and IPv4 options and fragments are not handled.
module mac_rx (
  input  logic        clk,
  input  logic        rst,
  input  logic [47:0] my_mac,
  input  logic [31:0] my_ip,
  // from the Ethernet core
  input  logic [63:0] s_tdata,
  input  logic [7:0]  s_tkeep,
  input  logic        s_tlast,
  input  logic        s_tvalid,
  // dispatched packets
  output logic        out_valid,
  output logic [63:0] out_data,
  output logic [3:0]  out_bytes,
  output logic        out_last,
  output logic        out_arp,
  output logic [31:0] src_ip
);
  logic [13:0] pos;                    // frame offset of the current word
  logic        act;                    // packet of this frame still being collected
  logic        mac_ok, is_arp, is_ip, ip_ok, ip_hdr_ok;
  logic [13:0] end_r;
  logic [15:0] dip_hi;
  logic [7:0]  buf_q [16];
  logic [4:0]  cnt;
  logic        fl_pend;                // remainder to emit as the last word

  logic [7:0]  wb [8];                 // input bytes, frame order
  always_comb for (int b = 0; b < 8; b++) wb[b] = s_tdata[8*b +: 8];

  // packet type and bounds, including fields arriving in this word
  logic        arp_now, ip_now, keep_now;
  logic [13:0] start_now, end_now;
  logic [15:0] etype_w;
  assign etype_w = {wb[4], wb[5]};
  always_comb begin
    arp_now = (pos == 14'd8) ? (etype_w == 16'h0806) : is_arp;
    ip_now  = (pos == 14'd8) ? (etype_w == 16'h0800) : is_ip;
    start_now = arp_now ? 14'd14 : 14'd34;
    if (pos == 14'd8 && arp_now)        end_now = 14'd42;
    else if (pos == 14'd16 && ip_now)   end_now = 14'd14 + {wb[0][5:0], wb[1]};
    else                                end_now = end_r;
    keep_now = mac_ok && (arp_now || (ip_now && ip_ok));
  end

  // bytes of this word that belong to the packet: a contiguous run
  int first, n;
  always_comb begin
    first = 0;
    n = 0;
    for (int b = 7; b >= 0; b--)
      if (s_tkeep[b] && int'(pos) + b >= int'(start_now) && int'(pos) + b < int'(end_now)) begin
        first = b;
        n++;
      end
    if (!act || !(arp_now || ip_now)) n = 0;
  end

  // while the remainder is flushed the buffer counts as empty (the word
  // then arriving carries no packet bytes: header or padding)
  logic [7:0] nb [16];
  int cnt_eff, total;
  logic fin;
  always_comb begin
    cnt_eff = fl_pend ? 0 : int'(cnt);
    for (int i = 0; i < 16; i++)
      if (i < cnt_eff) nb[i] = buf_q[i];
      else if (i - cnt_eff < n) nb[i] = wb[(first + i - cnt_eff) & 7];
      else nb[i] = 8'h00;
    total = cnt_eff + n;
    fin = act && (int'(pos) + 8 >= int'(end_now) || s_tlast);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pos <= '0;
      act <= 1'b1;
      mac_ok <= 1'b0;
      is_arp <= 1'b0;
      is_ip <= 1'b0;
      ip_ok <= 1'b0;
      ip_hdr_ok <= 1'b0;
      end_r <= '1;
      dip_hi <= '0;
      src_ip <= '0;
      cnt <= '0;
      fl_pend <= 1'b0;
      for (int i = 0; i < 16; i++) buf_q[i] <= '0;
      out_valid <= 1'b0;
      out_data <= '0;
      out_bytes <= '0;
      out_last <= 1'b0;
      out_arp <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_last <= 1'b0;
      if (fl_pend) begin
        // remainder of the previous packet (at most 8 bytes)
        out_valid <= 1'b1;
        out_last <= 1'b1;
        out_bytes <= 4'(cnt);
        out_data <= {buf_q[0], buf_q[1], buf_q[2], buf_q[3], buf_q[4], buf_q[5], buf_q[6], buf_q[7]};
        cnt <= '0;
        fl_pend <= 1'b0;
      end
      if (s_tvalid) begin
        pos <= s_tlast ? 14'd0 : pos + 14'd8;
        case (pos)
          14'd0: mac_ok <= ({wb[0], wb[1], wb[2], wb[3], wb[4], wb[5]} == my_mac) ||
                           ({wb[0], wb[1], wb[2], wb[3], wb[4], wb[5]} == 48'hFFFF_FFFF_FFFF);
          14'd8: begin
            is_arp <= arp_now;
            is_ip <= ip_now;
            ip_hdr_ok <= (wb[6] == 8'h45);
          end
          // protocol UDP, room for the UDP header, not a fragment
          14'd16: ip_hdr_ok <= ip_hdr_ok && wb[7] == 8'h11 && {wb[0], wb[1]} >= 16'd28 &&
                               {wb[4][5:0], wb[5]} == 14'd0;
          14'd24: begin
            src_ip <= {wb[2], wb[3], wb[4], wb[5]};
            dip_hi <= {wb[6], wb[7]};
          end
          14'd32: ip_ok <= ip_hdr_ok && ({dip_hi, wb[0], wb[1]} == my_ip ||
                                         {dip_hi, wb[0], wb[1]} == 32'hFFFF_FFFF);
          default: ;
        endcase
        end_r <= end_now;
        if (fin || !act) begin
          // packet complete: emit what is left (two words at most)
          if (keep_now && total > 0) begin
            out_valid <= 1'b1;
            out_arp <= arp_now;
            out_data <= {nb[0], nb[1], nb[2], nb[3], nb[4], nb[5], nb[6], nb[7]};
            out_bytes <= (total >= 8) ? 4'd8 : 4'(total);
            out_last <= (total <= 8);
            fl_pend <= (total > 8);
            for (int i = 0; i < 8; i++) buf_q[i] <= nb[i + 8];
            cnt <= (total > 8) ? 5'(total - 8) : 5'd0;
          end else
            cnt <= '0;
          act <= 1'b0;
        end else if (total >= 8) begin
          if (keep_now) begin
            out_valid <= 1'b1;
            out_arp <= arp_now;
            out_data <= {nb[0], nb[1], nb[2], nb[3], nb[4], nb[5], nb[6], nb[7]};
            out_bytes <= 4'd8;
          end
          for (int i = 0; i < 8; i++) buf_q[i] <= nb[i + 8];
          cnt <= 5'(total - 8);
        end else begin
          for (int i = 0; i < 16; i++) buf_q[i] <= nb[i];
          cnt <= 5'(total);
        end
        if (s_tlast) begin
          // next frame starts
          act <= 1'b1;
          mac_ok <= 1'b0;
          is_arp <= 1'b0;
          is_ip <= 1'b0;
          ip_ok <= 1'b0;
          end_r <= '1;
        end
      end
    end
  end
endmodule
