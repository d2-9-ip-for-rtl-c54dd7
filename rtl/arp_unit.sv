// arp_unit: ARPv2 TX and RX of the Ethernet port, with a small ARP table.
//
// Lookup (for the IPv4 transmitter): arp_req/arp_ip are held until
// arp_valid, which returns arp_mac. A table hit answers two cycles after the
// request. On a miss a broadcast ARP request for arp_ip is sent, and sent
// again every RETRY cycles, until a reply fills the table; the lookup is
// then answered.
// Receive: the 28-byte ARP packet (the Ethernet payload of a frame with
// EtherType 0x0806) arrives as four 64-bit words on rx_valid/rx_data/rx_last
// (byte 0 in bits 63:56; the last word holds 4 bytes). Packets that are not
// Ethernet/IPv4 (HTYPE 1, PTYPE 0x0800, HLEN 6, PLEN 4) or whose target
// address is not my_ip are ignored. A reply (operation 2) stores its sender
// IP/MAC in the table. A request (operation 1) stores its sender too and
// queues a unicast reply carrying my_mac.
// Transmit: requests and replies go to the MAC transmitter as a source of
// its arbiter: tx_req held until tx_gnt, then four words on tx_valid/
// tx_data/tx_bytes/tx_last with tx_ready; tx_dst_mac is ff:ff:ff:ff:ff:ff
// for a request and the requester's MAC for a reply; tx_ethertype 0x0806.
// A pending reply is sent before a pending request.
// From the document: the packet fields and values, broadcast requests on a
// table miss, unicast replies to requests for my_ip, learning from replies.
// This implementation's choices: table size and round-robin replacement,
// the retry interval, learning from requests, and the handshakes.
module arp_unit #(
  parameter int ENTRIES = 4,
  parameter int RETRY   = 4096
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] my_ip,
  input  logic [47:0] my_mac,
  // lookup
  input  logic        arp_req,
  input  logic [31:0] arp_ip,
  output logic        arp_valid,
  output logic [47:0] arp_mac,
  // received ARP packets
  input  logic        rx_valid,
  input  logic [63:0] rx_data,
  input  logic        rx_last,
  // transmitted ARP packets
  output logic        tx_req,
  input  logic        tx_gnt,
  output logic        tx_valid,
  output logic [63:0] tx_data,
  output logic [3:0]  tx_bytes,
  output logic        tx_last,
  input  logic        tx_ready,
  output logic [47:0] tx_dst_mac,
  output logic [15:0] tx_ethertype
);
  localparam int EW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  logic [31:0] t_ip  [ENTRIES];
  logic [47:0] t_mac [ENTRIES];
  logic        t_val [ENTRIES];
  logic [EW-1:0] repl;

  // table search for the lookup address
  logic        hit;
  logic [47:0] hit_mac;
  always_comb begin
    hit = 1'b0;
    hit_mac = '0;
    for (int e = 0; e < ENTRIES; e++)
      if (t_val[e] && t_ip[e] == arp_ip) begin
        hit = 1'b1;
        hit_mac = t_mac[e];
      end
  end

  // ---------------- lookup ----------------
  typedef enum logic [1:0] {L_IDLE, L_WAIT, L_ACK} lstate_t;
  lstate_t lst;
  logic req_pend;                      // broadcast request to send
  logic [31:0] req_ip;
  logic [$clog2(RETRY+1)-1:0] retry_cnt;

  // ---------------- receive ----------------
  logic [1:0]  rx_idx;
  logic [63:0] rw0, rw1;
  logic [15:0] rw2;                    // sender IP low half
  logic        learn, l_found;
  logic [EW-1:0] l_idx;
  logic        rep_pend;
  logic [47:0] rep_mac;
  logic [31:0] rep_ip;
  logic        rx_ok, rx_is_req, rx_is_rep;
  logic [47:0] rx_sha;
  logic [31:0] rx_spa, rx_tpa;

  assign rx_sha = rw1[63:16];
  assign rx_spa = {rw1[15:0], rw2};
  assign rx_tpa = rx_data[63:32];
  assign rx_ok  = rx_valid && rx_last && rx_idx == 2'd3 &&
                  rw0[63:48] == 16'h0001 && rw0[47:32] == 16'h0800 &&
                  rw0[31:24] == 8'h06 && rw0[23:16] == 8'h04 && rx_tpa == my_ip;
  assign rx_is_req = rx_ok && rw0[15:0] == 16'h0001;
  assign rx_is_rep = rx_ok && rw0[15:0] == 16'h0002;
  assign learn     = rx_is_req || rx_is_rep;

  // an existing entry for the sender is updated, otherwise one is replaced
  always_comb begin
    l_found = 1'b0;
    l_idx = repl;
    for (int e = 0; e < ENTRIES; e++)
      if (t_val[e] && t_ip[e] == rx_spa) begin
        l_found = 1'b1;
        l_idx = EW'(e);
      end
  end

  // ---------------- transmit ----------------
  typedef enum logic [1:0] {X_IDLE, X_REQ, X_SEND} xstate_t;
  xstate_t xst;
  logic        x_rep;                  // 1: sending a reply
  logic [1:0]  x_idx;
  logic [47:0] x_tha;
  logic [31:0] x_tpa;

  assign tx_req       = (xst == X_REQ);
  assign tx_ethertype = 16'h0806;
  assign tx_dst_mac   = x_rep ? x_tha : 48'hFFFF_FFFF_FFFF;
  assign tx_valid     = (xst == X_SEND);
  assign tx_last      = (x_idx == 2'd3);
  assign tx_bytes     = (x_idx == 2'd3) ? 4'd4 : 4'd8;
  always_comb begin
    case (x_idx)
      2'd0: tx_data = {16'h0001, 16'h0800, 8'h06, 8'h04, x_rep ? 16'h0002 : 16'h0001};
      2'd1: tx_data = {my_mac, my_ip[31:16]};
      2'd2: tx_data = {my_ip[15:0], x_rep ? x_tha : 48'h0};
      default: tx_data = {x_tpa, 32'h0};
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int e = 0; e < ENTRIES; e++) begin
        t_val[e] <= 1'b0;
        t_ip[e]  <= '0;
        t_mac[e] <= '0;
      end
      repl <= '0;
      lst <= L_IDLE;
      req_pend <= 1'b0;
      req_ip <= '0;
      retry_cnt <= '0;
      arp_valid <= 1'b0;
      arp_mac <= '0;
      rx_idx <= '0;
      rw0 <= '0; rw1 <= '0; rw2 <= '0;
      rep_pend <= 1'b0;
      rep_mac <= '0;
      rep_ip <= '0;
      xst <= X_IDLE;
      x_rep <= 1'b0;
      x_idx <= '0;
      x_tha <= '0;
      x_tpa <= '0;
    end else begin
      arp_valid <= 1'b0;
      // receive
      if (rx_valid) begin
        case (rx_idx)
          2'd0: rw0 <= rx_data;
          2'd1: rw1 <= rx_data;
          2'd2: rw2 <= rx_data[63:48];
          default: ;
        endcase
        rx_idx <= rx_last ? 2'd0 : rx_idx + 2'd1;
      end
      if (learn) begin
        t_val[l_idx] <= 1'b1;
        t_ip[l_idx]  <= rx_spa;
        t_mac[l_idx] <= rx_sha;
        if (!l_found) repl <= (int'(repl) == ENTRIES - 1) ? '0 : repl + 1'b1;
      end
      if (rx_is_req) begin
        rep_pend <= 1'b1;
        rep_mac <= rx_sha;
        rep_ip <= rx_spa;
      end
      // lookup
      case (lst)
        L_IDLE: if (arp_req) begin
          if (hit) begin
            arp_valid <= 1'b1;
            arp_mac <= hit_mac;
            lst <= L_ACK;
          end else begin
            req_pend <= 1'b1;
            req_ip <= arp_ip;
            retry_cnt <= '0;
            lst <= L_WAIT;
          end
        end
        L_WAIT: begin
          if (!arp_req) lst <= L_IDLE;
          else if (hit) begin
            arp_valid <= 1'b1;
            arp_mac <= hit_mac;
            req_pend <= 1'b0;
            lst <= L_ACK;
          end else if (int'(retry_cnt) == RETRY) begin
            retry_cnt <= '0;
            req_pend <= 1'b1;
          end else
            retry_cnt <= retry_cnt + 1'b1;
        end
        default: lst <= L_IDLE;       // L_ACK: one cycle for the requester to drop arp_req
      endcase
      // transmit
      case (xst)
        X_IDLE: if (rep_pend || req_pend) begin
          x_rep <= rep_pend;
          x_tha <= rep_pend ? rep_mac : 48'h0;
          x_tpa <= rep_pend ? rep_ip : req_ip;
          if (rep_pend) rep_pend <= 1'b0;
          else req_pend <= 1'b0;
          x_idx <= '0;
          xst <= X_REQ;
        end
        X_REQ: if (tx_gnt) xst <= X_SEND;
        X_SEND: if (tx_ready) begin
          x_idx <= x_idx + 2'd1;
          if (tx_last) xst <= X_IDLE;
        end
        default: xst <= X_IDLE;
      endcase
    end
  end
endmodule
