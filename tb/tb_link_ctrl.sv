// tb_link_ctrl: two link controllers, A and B, joined by a delay model of
// the serial channel in each direction, each with an internode_port for its
// FIFOs. Packets written into A's TX FIFOs must appear in B's receive FIFOs
// of the right virtual channel with header, payload and footer intact.
// Also checked: the waiting cycles between packets on the wire, credit words
// and red-threshold flow control (B's receiver is not drained for a while,
// A must stop and no word may be lost), header EDAC (single error
// corrected and counted, double error counted and the packet dropped), the
// destination override and the link counters.
module tb_link_ctrl;
  import comm_pkg::*;
  localparam int DW = 128, HAW = 4, DAW = 6, BPW = DW/8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // A side port (TX used), B side port (RX used)
  logic a_sw_hdr_wr = 0, a_sw_dat_wr = 0;
  logic [127:0] a_sw_hdr_data = 0;
  logic [DW-1:0] a_sw_dat_data = 0;
  logic [HAW:0] a_hfree; logic [DAW:0] a_dfree;
  logic b_rd_h [2], b_rd_d [2], b_eh [2], b_ed [2];
  logic [127:0] b_hd [2];
  logic [DW-1:0] b_dd [2];
  // unused directions
  logic a_rd_h [2], a_rd_d [2], a_eh [2], a_ed [2];
  logic [127:0] a_hd [2];
  logic [DW-1:0] a_dd [2];
  logic [HAW:0] b_hfree; logic [DAW:0] b_dfree;
  logic [31:0] a_cnt [12], b_cnt [12];

  // link wiring
  logic a_tx_hdr_rd, a_tx_dat_rd, a_tx_hdr_empty, a_tx_dat_empty;
  logic [127:0] a_tx_hdr_data; logic [DW-1:0] a_tx_dat_data;
  logic a_rx_hdr_wr, a_rx_dat_wr, a_rx_vc; logic [127:0] a_rx_hdr_data; logic [DW-1:0] a_rx_dat_data;
  logic [HAW:0] a_rx_hfree [2]; logic [DAW:0] a_rx_dfree [2];
  logic b_tx_hdr_rd, b_tx_dat_rd, b_tx_hdr_empty, b_tx_dat_empty;
  logic [127:0] b_tx_hdr_data; logic [DW-1:0] b_tx_dat_data;
  logic b_rx_hdr_wr, b_rx_dat_wr, b_rx_vc; logic [127:0] b_rx_hdr_data; logic [DW-1:0] b_rx_dat_data;
  logic [HAW:0] b_rx_hfree [2]; logic [DAW:0] b_rx_dfree [2];
  lk_kind_t ab_kind, ab_kind_d, ba_kind, ba_kind_d;
  logic [DW-1:0] ab_data, ab_data_d, ba_data, ba_data_d;
  logic flip_arm = 0, flip_done, fd2;
  logic [127:0] flip_mask = 0;
  logic [3:0] edac = 4'hF;
  logic new_dest_en = 0;
  coord_t new_dest = '0;
  logic [15:0] a_status, b_status, a_es, a_ef, b_es, b_ef;
  logic [31:0] a_c [8], b_c [8];

  internode_port #(.DW(DW), .HAW(HAW), .DAW(DAW)) pa (.clk, .rst,
    .sw_tx_hdr_wr(a_sw_hdr_wr), .sw_tx_hdr_data(a_sw_hdr_data), .sw_tx_hdr_free(a_hfree),
    .sw_tx_dat_wr(a_sw_dat_wr), .sw_tx_dat_data(a_sw_dat_data), .sw_tx_dat_free(a_dfree),
    .sw_rx_hdr_rd(a_rd_h), .sw_rx_hdr_data(a_hd), .sw_rx_hdr_empty(a_eh),
    .sw_rx_dat_rd(a_rd_d), .sw_rx_dat_data(a_dd), .sw_rx_dat_empty(a_ed),
    .lk_tx_hdr_rd(a_tx_hdr_rd), .lk_tx_hdr_data(a_tx_hdr_data), .lk_tx_hdr_empty(a_tx_hdr_empty),
    .lk_tx_dat_rd(a_tx_dat_rd), .lk_tx_dat_data(a_tx_dat_data), .lk_tx_dat_empty(a_tx_dat_empty),
    .lk_rx_hdr_wr(a_rx_hdr_wr), .lk_rx_dat_wr(a_rx_dat_wr), .lk_rx_vc(a_rx_vc),
    .lk_rx_hdr_data(a_rx_hdr_data), .lk_rx_dat_data(a_rx_dat_data),
    .lk_rx_hdr_free(a_rx_hfree), .lk_rx_dat_free(a_rx_dfree), .cnt(a_cnt));
  internode_port #(.DW(DW), .HAW(HAW), .DAW(DAW)) pb (.clk, .rst,
    .sw_tx_hdr_wr(1'b0), .sw_tx_hdr_data(128'h0), .sw_tx_hdr_free(b_hfree),
    .sw_tx_dat_wr(1'b0), .sw_tx_dat_data(DW'(0)), .sw_tx_dat_free(b_dfree),
    .sw_rx_hdr_rd(b_rd_h), .sw_rx_hdr_data(b_hd), .sw_rx_hdr_empty(b_eh),
    .sw_rx_dat_rd(b_rd_d), .sw_rx_dat_data(b_dd), .sw_rx_dat_empty(b_ed),
    .lk_tx_hdr_rd(b_tx_hdr_rd), .lk_tx_hdr_data(b_tx_hdr_data), .lk_tx_hdr_empty(b_tx_hdr_empty),
    .lk_tx_dat_rd(b_tx_dat_rd), .lk_tx_dat_data(b_tx_dat_data), .lk_tx_dat_empty(b_tx_dat_empty),
    .lk_rx_hdr_wr(b_rx_hdr_wr), .lk_rx_dat_wr(b_rx_dat_wr), .lk_rx_vc(b_rx_vc),
    .lk_rx_hdr_data(b_rx_hdr_data), .lk_rx_dat_data(b_rx_dat_data),
    .lk_rx_hdr_free(b_rx_hfree), .lk_rx_dat_free(b_rx_dfree), .cnt(b_cnt));

  link_ctrl #(.DW(DW), .HAW(HAW), .DAW(DAW)) la (.clk, .rst,
    .tx_hdr_rd(a_tx_hdr_rd), .tx_hdr_data(a_tx_hdr_data), .tx_hdr_empty(a_tx_hdr_empty),
    .tx_dat_rd(a_tx_dat_rd), .tx_dat_data(a_tx_dat_data), .tx_dat_empty(a_tx_dat_empty),
    .rx_hdr_wr(a_rx_hdr_wr), .rx_dat_wr(a_rx_dat_wr), .rx_vc(a_rx_vc),
    .rx_hdr_data(a_rx_hdr_data), .rx_dat_data(a_rx_dat_data),
    .rx_hdr_free(a_rx_hfree), .rx_dat_free(a_rx_dfree),
    .phy_up(1'b1), .phy_tx_ready(1'b1), .phy_tx_kind(ab_kind), .phy_tx_data(ab_data),
    .phy_rx_kind(ba_kind_d), .phy_rx_data(ba_data_d),
    .cfg_edac(edac), .cfg_use_new_dest(new_dest_en), .cfg_new_dest(new_dest),
    .cfg_red_hdr_thr(8'd4), .cfg_red_dat_thr(10'd40), .cfg_credit_period(8'd8), .cfg_wait_cycles(8'd3),
    .status(a_status), .err_single(a_es), .err_fatal(a_ef),
    .tx_magic(a_c[0]), .tx_start(a_c[1]), .tx_hdr(a_c[2]), .tx_ftr(a_c[3]),
    .rx_magic(a_c[4]), .rx_start(a_c[5]), .rx_hdr(a_c[6]), .rx_ftr(a_c[7]));
  link_ctrl #(.DW(DW), .HAW(HAW), .DAW(DAW)) lb (.clk, .rst,
    .tx_hdr_rd(b_tx_hdr_rd), .tx_hdr_data(b_tx_hdr_data), .tx_hdr_empty(b_tx_hdr_empty),
    .tx_dat_rd(b_tx_dat_rd), .tx_dat_data(b_tx_dat_data), .tx_dat_empty(b_tx_dat_empty),
    .rx_hdr_wr(b_rx_hdr_wr), .rx_dat_wr(b_rx_dat_wr), .rx_vc(b_rx_vc),
    .rx_hdr_data(b_rx_hdr_data), .rx_dat_data(b_rx_dat_data),
    .rx_hdr_free(b_rx_hfree), .rx_dat_free(b_rx_dfree),
    .phy_up(1'b1), .phy_tx_ready(1'b1), .phy_tx_kind(ba_kind), .phy_tx_data(ba_data),
    .phy_rx_kind(ab_kind_d), .phy_rx_data(ab_data_d),
    .cfg_edac(edac), .cfg_use_new_dest(1'b0), .cfg_new_dest(new_dest),
    .cfg_red_hdr_thr(8'd4), .cfg_red_dat_thr(10'd40), .cfg_credit_period(8'd8), .cfg_wait_cycles(8'd3),
    .status(b_status), .err_single(b_es), .err_fatal(b_ef),
    .tx_magic(b_c[0]), .tx_start(b_c[1]), .tx_hdr(b_c[2]), .tx_ftr(b_c[3]),
    .rx_magic(b_c[4]), .rx_start(b_c[5]), .rx_hdr(b_c[6]), .rx_ftr(b_c[7]));

  aurora_link_model #(.DW(DW), .LAT(5)) ch_ab (.clk, .tx_kind(ab_kind), .tx_data(ab_data),
    .rx_kind(ab_kind_d), .rx_data(ab_data_d), .flip_arm, .flip_mask, .flip_done);
  aurora_link_model #(.DW(DW), .LAT(5)) ch_ba (.clk, .tx_kind(ba_kind), .tx_data(ba_data),
    .rx_kind(ba_kind_d), .rx_data(ba_data_d), .flip_arm(1'b0), .flip_mask(128'h0), .flip_done(fd2));

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // wire monitor: gap between footer and next header, red-blocked cycles
  int last_ftr_t = -100, min_gap = 1000, t_now = 0, red_cycles = 0;
  always @(posedge clk) begin
    t_now++;
    if (ab_kind == LK_FOOTER) last_ftr_t = t_now;
    if (ab_kind == LK_HEADER && t_now - last_ftr_t < min_gap) min_gap = t_now - last_ftr_t;
    if (!rst && !a_tx_hdr_empty && la.tst == 2'd0 && la.peer_red != 2'b00) red_cycles++;
  end

  // B-side receiver per VC
  bit drain = 1;
  int rcvd [2] = '{0, 0}, perr = 0;
  pkt_hdr_t last_h [2];
  for (genvar v = 0; v < 2; v++) begin : g_rx
    initial begin
      pkt_hdr_t h;
      b_rd_h[v] = 0; b_rd_d[v] = 0;
      forever begin
        @(negedge clk);
        b_rd_h[v] = 0;
        if (drain && !b_eh[v]) begin
          h = b_hd[v];
          last_h[v] = h;
          b_rd_h[v] = 1;
          @(negedge clk);
          b_rd_h[v] = 0;
          for (int w = 0; w < payload_words(h.length, BPW); w++) begin
            while (b_ed[v]) @(negedge clk);
            if (b_dd[v] != {h.pid_chid, 16'h0, 32'(w), 64'h0}) perr++;
            b_rd_d[v] = 1;
            @(negedge clk);
            b_rd_d[v] = 0;
          end
          while (b_eh[v]) @(negedge clk);
          if (b_hd[v] != {112'h0, h.pid_chid}) perr++;
          b_rd_h[v] = 1;
          rcvd[v]++;
        end
      end
    end
  end

  task automatic send(input int id, input int vc, input int len);
    pkt_hdr_t h;
    h = '0;
    h.vc = 5'(vc);
    h.length = 14'(len);
    h.pid_chid = 16'(id);
    h.coord.x = 6'd5;
    @(negedge clk);
    while (a_hfree < 2) @(negedge clk);
    a_sw_hdr_wr = 1; a_sw_hdr_data = h;
    @(negedge clk);
    a_sw_hdr_wr = 0;
    for (int w = 0; w < payload_words(14'(len), BPW); w++) begin
      while (a_dfree == 0) @(negedge clk);
      a_sw_dat_wr = 1; a_sw_dat_data = {16'(id), 16'h0, 32'(w), 64'h0};
      @(negedge clk);
      a_sw_dat_wr = 0;
    end
    while (a_hfree == 0) @(negedge clk);
    a_sw_hdr_wr = 1; a_sw_hdr_data = {112'h0, 16'(id)};
    @(negedge clk);
    a_sw_hdr_wr = 0;
  endtask

  task automatic wait_rcvd(input int v, input int n);
    int t;
    t = 0;
    while (rcvd[v] < n && t < 20000) begin @(negedge clk); t++; end
  endtask

  initial begin
    for (int v = 0; v < 2; v++) begin a_rd_h[v] = 0; a_rd_d[v] = 0; end
    repeat (3) @(negedge clk);
    rst = 0;
    send(1, 0, 100);
    send(2, 1, 16);
    send(3, 0, 0);
    wait_rcvd(0, 2);
    wait_rcvd(1, 1);
    chk(rcvd[0] == 2 && rcvd[1] == 1 && perr == 0, "packets on both VCs delivered intact");
    chk(last_h[1].pid_chid == 16'd2 && last_h[0].pid_chid == 16'd3, "VC steering");
    chk(min_gap >= 4, $sformatf("waiting cycles respected (gap %0d)", min_gap));
    chk(a_c[0] > 0 && b_c[4] > 0 && a_c[4] > 0, "credit words sent and received");
    chk(a_c[2] == 3 && a_c[3] == 3 && b_c[6] == 3 && b_c[7] == 3, "header/footer counters");
    // flow control: B stops draining; A sends 6 packets of 256 B (16 words)
    drain = 0;
    for (int i = 0; i < 6; i++) send(100 + i, 0, 256);
    repeat (300) @(negedge clk);
    chk(red_cycles > 0, "A held by red flow control");
    chk(rcvd[0] == 2, "nothing read while B blocked");
    drain = 1;
    wait_rcvd(0, 8);
    chk(rcvd[0] == 8 && perr == 0, "all packets after back-pressure, intact");
    chk(b_cnt[4] == b_cnt[6] && b_cnt[4] == 7 + 6 * 16, $sformatf("no data word lost (%0d %0d)", b_cnt[4], b_cnt[6]));
    // EDAC
    flip_mask = 128'h1 << 100;
    flip_arm = 1;
    send(200, 1, 48);
    wait_rcvd(1, 2);
    flip_arm = 0;
    chk(rcvd[1] == 2 && last_h[1].pid_chid == 16'd200 && perr == 0, "single header error corrected");
    chk(b_es == 16'd1 && b_ef == 16'd0, "single error counted");
    @(negedge clk);
    flip_mask = (128'h1 << 3) | (128'h1 << 64);
    flip_arm = 1;
    send(201, 1, 48);
    repeat (100) @(negedge clk);
    flip_arm = 0;
    chk(rcvd[1] == 2 && b_ef == 16'd1, "double header error dropped and counted");
    send(202, 1, 48);
    wait_rcvd(1, 3);
    chk(rcvd[1] == 3 && last_h[1].pid_chid == 16'd202, "next packet delivered after drop");
    // destination override
    new_dest_en = 1;
    new_dest = '0; new_dest.x = 6'd9; new_dest.z = 5'd2;
    send(300, 0, 32);
    wait_rcvd(0, 9);
    chk(last_h[0].coord == new_dest, "destination overridden on the link");
    new_dest_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
