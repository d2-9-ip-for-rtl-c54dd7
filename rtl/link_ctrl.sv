// link_ctrl: link controller of one inter-node channel.
//
// Sits between an internode_port and the serial physical layer (Aurora
// 64B/66B in the original system, outside this RTL). The link carries one
// DW-bit word per cycle tagged with a kind (comm_pkg::lk_kind_t): IDLE,
// CREDIT, HEADER, DATA, FOOTER.
//
// TX: a packet is taken from the port's TX FIFOs and sent header, payload
// words, footer, one word per cycle while the physical layer is ready.
// A packet starts only if the peer last reported its receive FIFOs of the
// packet's virtual channel as not "red". Between packets the controller sends
// a CREDIT word every cfg_credit_period cycles ("Tx new credit cycle")
// carrying the red flags of its own receive FIFOs, and waits
// cfg_wait_cycles idle cycles after each packet ("Tx waiting cycle").
// A receive FIFO is red when its free places drop below the red threshold
// (header and data thresholds of LINK_x_CONFIG_1). With cfg_use_new_dest the
// header's destination is replaced by cfg_new_dest. With EDAC enabled
// (cfg_edac = 4'hF) the header's ECC_CR field is filled by hdr_ecc.
//
// RX: CREDIT words update the peer's red flags (reset value: red, so nothing
// is sent until the first credit arrives). Headers are checked and corrected
// when EDAC is enabled: a corrected header counts in err_single, an
// uncorrectable one in err_fatal and its packet is dropped. Header, payload
// and footer are written to the receive FIFOs of the virtual channel named by
// header bit 0; the receiver never back-pressures, flow control is by
// credits only, so thresholds must leave room for what is in flight.
// The document names the link controller, its EDAC, threshold, credit and
// waiting-cycle settings and its counters; the link protocol itself is
// this implementation's.
module link_ctrl
  import comm_pkg::*;
#(
  parameter int DW  = 256,
  parameter int HAW = 4,
  parameter int DAW = 8
) (
  input  logic          clk,
  input  logic          rst,
  // port TX FIFOs
  output logic          tx_hdr_rd,
  input  logic [127:0]  tx_hdr_data,
  input  logic          tx_hdr_empty,
  output logic          tx_dat_rd,
  input  logic [DW-1:0] tx_dat_data,
  input  logic          tx_dat_empty,
  // port RX FIFOs
  output logic          rx_hdr_wr,
  output logic          rx_dat_wr,
  output logic          rx_vc,
  output logic [127:0]  rx_hdr_data,
  output logic [DW-1:0] rx_dat_data,
  input  logic [HAW:0]  rx_hdr_free [2],
  input  logic [DAW:0]  rx_dat_free [2],
  // physical layer
  input  logic          phy_up,
  input  logic          phy_tx_ready,
  output lk_kind_t      phy_tx_kind,
  output logic [DW-1:0] phy_tx_data,
  input  lk_kind_t      phy_rx_kind,
  input  logic [DW-1:0] phy_rx_data,
  // configuration
  input  logic [3:0]    cfg_edac,
  input  logic          cfg_use_new_dest,
  input  coord_t        cfg_new_dest,
  input  logic [7:0]    cfg_red_hdr_thr,
  input  logic [9:0]    cfg_red_dat_thr,
  input  logic [7:0]    cfg_credit_period,
  input  logic [7:0]    cfg_wait_cycles,
  // status and counters
  output logic [15:0]   status,
  output logic [15:0]   err_single,
  output logic [15:0]   err_fatal,
  output logic [31:0]   tx_magic, tx_start, tx_hdr, tx_ftr,
  output logic [31:0]   rx_magic, rx_start, rx_hdr, rx_ftr
);
  localparam int BPW = DW / 8;
  typedef enum logic [1:0] {T_IDLE, T_DATA, T_FTR} tst_t;
  typedef enum logic [1:0] {R_HDR, R_DATA, R_FTR, R_DROP} rst_t;

  tst_t        tst;
  rst_t        rstate;
  logic [1:0]  peer_red, own_red;
  logic [7:0]  credit_cnt, wait_cnt;
  logic        credit_due;
  logic [9:0]  tx_left;
  logic        edac;
  pkt_hdr_t    hdr_tx, hdr_rx;
  logic [127:0] enc_out, dec_out;
  logic        dec_single, dec_double;
  logic        start_ok;
  logic        rx_cur_vc;
  logic [9:0]  rx_left;

  assign edac = (cfg_edac == 4'hF);

  always_comb
    for (int v = 0; v < 2; v++)
      own_red[v] = (int'(rx_hdr_free[v]) < int'(cfg_red_hdr_thr)) ||
                   (int'(rx_dat_free[v]) < int'(cfg_red_dat_thr));

  // Header rewrite on TX
  always_comb begin
    hdr_tx = tx_hdr_data;
    if (cfg_use_new_dest) hdr_tx.coord = cfg_new_dest;
  end

  hdr_ecc u_ecc (
    .enc_in(hdr_tx), .enc_out,
    .dec_in(phy_rx_data[127:0]), .dec_out, .dec_single, .dec_double);

  // ---------------- TX ----------------
  assign start_ok = !tx_hdr_empty && phy_up && !peer_red[hdr_tx.vc[0]] && (wait_cnt == 8'd0);

  always_comb begin
    phy_tx_kind = LK_IDLE;
    phy_tx_data = '0;
    tx_hdr_rd = 1'b0;
    tx_dat_rd = 1'b0;
    if (phy_tx_ready && phy_up) begin
      case (tst)
        T_IDLE:
          if (credit_due) begin
            phy_tx_kind = LK_CREDIT;
            phy_tx_data = DW'(own_red);
          end else if (start_ok) begin
            phy_tx_kind = LK_HEADER;
            phy_tx_data = DW'(edac ? enc_out : 128'(hdr_tx));
            tx_hdr_rd = 1'b1;
          end
        T_DATA:
          if (!tx_dat_empty) begin
            phy_tx_kind = LK_DATA;
            phy_tx_data = tx_dat_data;
            tx_dat_rd = 1'b1;
          end
        T_FTR:
          if (!tx_hdr_empty) begin
            phy_tx_kind = LK_FOOTER;
            phy_tx_data = DW'(tx_hdr_data);
            tx_hdr_rd = 1'b1;
          end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      tst <= T_IDLE;
      credit_cnt <= '0;
      credit_due <= 1'b1;
      wait_cnt <= '0;
      tx_left <= '0;
      tx_magic <= '0; tx_start <= '0; tx_hdr <= '0; tx_ftr <= '0;
    end else begin
      if (credit_cnt >= cfg_credit_period) begin
        credit_cnt <= '0;
        credit_due <= 1'b1;
      end else begin
        credit_cnt <= credit_cnt + 8'd1;
      end
      if (wait_cnt != 8'd0 && tst == T_IDLE) wait_cnt <= wait_cnt - 8'd1;
      case (phy_tx_kind)
        LK_CREDIT: begin
          credit_due <= 1'b0;
          tx_magic <= tx_magic + 32'd1;
        end
        LK_HEADER: begin
          tx_start <= tx_start + 32'd1;
          tx_hdr <= tx_hdr + 32'd1;
          tx_left <= 10'(payload_words(hdr_tx.length, BPW));
          tst <= (hdr_tx.length == 14'd0) ? T_FTR : T_DATA;
        end
        LK_DATA: begin
          tx_left <= tx_left - 10'd1;
          if (tx_left == 10'd1) tst <= T_FTR;
        end
        LK_FOOTER: begin
          tx_ftr <= tx_ftr + 32'd1;
          wait_cnt <= cfg_wait_cycles;
          tst <= T_IDLE;
        end
        default: ;
      endcase
    end
  end

  // ---------------- RX ----------------
  always_comb begin
    hdr_rx = edac ? dec_out : phy_rx_data[127:0];
    rx_hdr_wr = 1'b0;
    rx_dat_wr = 1'b0;
    rx_hdr_data = phy_rx_data[127:0];
    rx_dat_data = phy_rx_data;
    rx_vc = 1'b0;
    case (phy_rx_kind)
      LK_HEADER: begin
        rx_vc = hdr_rx.vc[0];
        rx_hdr_data = hdr_rx;
        rx_hdr_wr = !(edac && dec_double);
      end
      LK_DATA: begin
        rx_vc = rx_cur_vc;
        rx_dat_wr = (rstate == R_DATA);
      end
      LK_FOOTER: begin
        rx_vc = rx_cur_vc;
        rx_hdr_wr = (rstate == R_FTR);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rstate <= R_HDR;
      rx_cur_vc <= 1'b0;
      rx_left <= '0;
      peer_red <= 2'b11;
      err_single <= '0;
      err_fatal <= '0;
      rx_magic <= '0; rx_start <= '0; rx_hdr <= '0; rx_ftr <= '0;
    end else begin
      if (!phy_up) peer_red <= 2'b11;
      case (phy_rx_kind)
        LK_CREDIT: begin
          peer_red <= phy_rx_data[1:0];
          rx_magic <= rx_magic + 32'd1;
        end
        LK_HEADER: begin
          rx_hdr <= rx_hdr + 32'd1;
          rx_cur_vc <= hdr_rx.vc[0];
          rx_left <= 10'(payload_words(hdr_rx.length, BPW));
          if (edac && dec_single) err_single <= err_single + 16'd1;
          if (edac && dec_double) begin
            err_fatal <= err_fatal + 16'd1;
            rstate <= R_DROP;
          end else begin
            rx_start <= rx_start + 32'd1;
            rstate <= (hdr_rx.length == 14'd0) ? R_FTR : R_DATA;
          end
        end
        LK_DATA:
          if (rstate == R_DATA) begin
            rx_left <= rx_left - 10'd1;
            if (rx_left == 10'd1) rstate <= R_FTR;
          end
        LK_FOOTER: begin
          rx_ftr <= rx_ftr + 32'd1;
          rstate <= R_HDR;
        end
        default: ;
      endcase
    end
  end

  assign status = {2'(rstate), 2'b00, 2'b00, own_red, 2'b00, peer_red, 2'b00, 2'(tst)};
endmodule
