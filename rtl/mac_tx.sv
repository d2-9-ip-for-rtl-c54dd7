// mac_tx: MAC_TX_ARB and MAC_TX of the Ethernet port. Two sources (0: the
// IPv4 transmitter, 1: the ARP transmitter) request the Ethernet
// transmitter; the arbiter grants one at a time, alternating priority after
// each frame. The granted source's packet is framed as Ethernet II:
// destination MAC (6 bytes), source MAC (6), EtherType (2), payload, with
// zero padding up to the 46-byte minimum payload. The frame check sequence
// is left to the Ethernet core (its FCS insertion is enabled by the
// configuration value 0x3003 written to CONFIGURATION_TX_REG1).
//
// Source side (per source s): req[s] held until gnt[s] (one cycle); then
// words on s_valid/s_data/s_bytes/s_last with s_ready; dst_mac[s] and
// ethertype[s] must be stable from req to the last word. Words are 64 bits
// with byte 0 in bits 63:56 and s_bytes (1..8) valid bytes, all 8 except on
// the last word.
// Core side: a 64-bit AXI4-Stream as the Ethernet core takes it: byte 0 in
// tdata[7:0], tkeep one bit per byte, tlast on the frame's last word.
// How it works: a 16-byte packing buffer receives the 14 header bytes (one
// push of 8 and one of 6), then the payload words and padding bytes, and
// emits 8 bytes per cycle whenever it holds 8 (or the rest at frame end),
// so the payload is shifted by 6 bytes with no bubbles. Throughput is one
// word per cycle; the header adds two cycles per frame.
// From the document: the arbiter's role, the frame layout, EtherType 0x0800
// / 0x0806, the 64-byte minimum frame and 46-byte padding, the 64-bit core
// datapath. This implementation's choices: alternating priority, the
// handshakes and the packing buffer; payloads above 1500 bytes are passed on
// unchecked (the IPv4 transmitter already limits them).
module mac_tx (
  input  logic        clk,
  input  logic        rst,
  input  logic [47:0] src_mac,
  input  logic [1:0]  req,
  output logic [1:0]  gnt,
  input  logic [47:0] dst_mac   [2],
  input  logic [15:0] ethertype [2],
  input  logic        s_valid   [2],
  input  logic [63:0] s_data    [2],
  input  logic [3:0]  s_bytes   [2],
  input  logic        s_last    [2],
  output logic        s_ready   [2],
  output logic [63:0] m_tdata,
  output logic [7:0]  m_tkeep,
  output logic        m_tlast,
  output logic        m_tvalid,
  input  logic        m_tready
);
  typedef enum logic [2:0] {M_IDLE, M_HDR0, M_HDR1, M_PAY, M_PAD, M_FLUSH} mstate_t;
  mstate_t st;
  logic        cur, prio;
  logic [127:0] buf_q;
  logic [4:0]  cnt;                // valid bytes in buf_q, from bit 127 down
  logic [10:0] paylen;

  // emission: 8 bytes, or the remainder at the end of the frame
  logic       emit, room;
  logic [4:0] cnt_e;
  logic       push;
  logic [63:0] pv;
  logic [3:0] pn;
  logic [63:0] word;
  logic [3:0] nbytes;

  assign emit   = m_tvalid && m_tready;
  assign m_tvalid = (cnt >= 5'd8) || (st == M_FLUSH && cnt != 5'd0);
  assign nbytes = (cnt >= 5'd8) ? 4'd8 : cnt[3:0];
  assign m_tlast = (st == M_FLUSH) && (cnt <= 5'd8);
  assign word   = buf_q[127:64];
  always_comb
    for (int i = 0; i < 8; i++) begin
      m_tdata[8*i +: 8] = word[63 - 8*i -: 8];
      m_tkeep[i] = (4'(i) < nbytes);
    end
  assign cnt_e = emit ? cnt - 5'(nbytes) : cnt;
  assign room  = (cnt_e <= 5'd8);

  // what is pushed this cycle
  always_comb begin
    push = 1'b0;
    pv = 64'h0;
    pn = 4'd0;
    s_ready[0] = 1'b0;
    s_ready[1] = 1'b0;
    case (st)
      M_HDR0: begin push = room; pv = {dst_mac[cur], src_mac[47:32]}; pn = 4'd8; end
      M_HDR1: begin push = room; pv = {src_mac[31:0], ethertype[cur], 16'h0}; pn = 4'd6; end
      M_PAY: begin
        s_ready[cur] = room;
        push = room && s_valid[cur];
        pv = s_data[cur];
        pn = s_bytes[cur];
      end
      M_PAD: begin
        push = room;
        pn = (11'd46 - paylen >= 11'd8) ? 4'd8 : 4'(11'd46 - paylen);
      end
      default: ;
    endcase
  end

  always_comb begin
    gnt = 2'b00;
    if (st == M_IDLE && req != 2'b00) begin
      if (req[prio]) gnt[prio] = 1'b1;
      else gnt[!prio] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= M_IDLE;
      cur <= 1'b0;
      prio <= 1'b0;
      buf_q <= '0;
      cnt <= '0;
      paylen <= '0;
    end else begin
      // buffer update: shift out, then place the pushed bytes after the rest
      begin
        logic [127:0] b;
        b = emit ? (buf_q << 64) : buf_q;
        if (push) b = b | (({pv, 64'h0} & ~(128'hFFFF_FFFF_FFFF_FFFF_FFFF_FFFF_FFFF_FFFF >> (8*int'(pn)))) >> (8*int'(cnt_e)));
        buf_q <= b;
        cnt <= cnt_e + (push ? 5'(pn) : 5'd0);
      end
      case (st)
        M_IDLE: if (gnt != 2'b00) begin
          cur <= gnt[1];
          prio <= !gnt[1];
          paylen <= '0;
          st <= M_HDR0;
        end
        M_HDR0: if (push) st <= M_HDR1;
        M_HDR1: if (push) st <= M_PAY;
        M_PAY: if (push) begin
          paylen <= paylen + 11'(pn);
          if (s_last[cur]) st <= (paylen + 11'(pn) < 11'd46) ? M_PAD : M_FLUSH;
        end
        M_PAD: if (push) begin
          paylen <= paylen + 11'(pn);
          if (paylen + 11'(pn) >= 11'd46) st <= M_FLUSH;
        end
        M_FLUSH: if (emit && m_tlast) st <= M_IDLE;
        default: st <= M_IDLE;
      endcase
    end
  end
endmodule
