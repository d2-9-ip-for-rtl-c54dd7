// tb_routing_ip: Routing IP check with 4 intra-node and 2 inter-node ports.
// The node sits at X=1 of a 4x1x1 torus. Random packets are injected one at
// a time either into an intra-node TX FIFO (as a local task would) or into
// an inter-node receive FIFO on a random virtual channel (as a link
// controller would). The testbench computes where dimension-order routing
// must send each packet (local port for its own coordinate, otherwise the
// shorter way round the X ring), reads it from that output and compares
// header fields, the hop count and virtual channel added on inter-node
// outputs, every payload word and the footer. All other outputs must stay
// empty. Finally the generator/consumer pair of port 2 runs a loop-back test
// and its test-ok flag and clock counter are checked.
module tb_routing_ip;
  import comm_pkg::*;
  localparam int M = 4, N = 2, DW = 128, HAW = 4, DAW = 8, BPW = DW/8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  coord_t my_coord, lattice;
  logic tx_hdr_wr [M], tx_hdr_full [M], tx_dat_wr [M], tx_dat_full [M];
  logic [127:0] tx_hdr_data [M], rx_hdr_data [M];
  logic [DW-1:0] tx_dat_data [M], rx_dat_data [M];
  logic rx_hdr_rd [M], rx_hdr_empty [M], rx_dat_rd [M], rx_dat_empty [M];
  logic lk_tx_hdr_rd [N], lk_tx_hdr_empty [N], lk_tx_dat_rd [N], lk_tx_dat_empty [N];
  logic [127:0] lk_tx_hdr_data [N], lk_rx_hdr_data [N];
  logic [DW-1:0] lk_tx_dat_data [N], lk_rx_dat_data [N];
  logic lk_rx_hdr_wr [N], lk_rx_dat_wr [N], lk_rx_vc [N];
  logic [HAW:0] lk_rx_hdr_free [N][2];
  logic [DAW:0] lk_rx_dat_free [N][2];
  logic [M-1:0] gen_en = 0, cons_en = 0, test_ok;
  logic [31:0] pktgen_cfg0 = 0;
  coord_t pktgen_dest;
  logic [7:0] perf_status [M];
  logic [31:0] perf_count [M], fifo_sts_rx [M], fifo_sts_tx [M];
  logic [31:0] intra_cnt [M][8];
  logic [3:0] intra_exc [M];
  logic [31:0] link_fifo_cnt [N][12];
  logic [M+2*N-1:0] wait_evt;

  routing_ip #(.M(M), .N(N), .DW(DW), .HAW(HAW), .DAW(DAW)) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // output o: 0..M-1 intra-node, M+n inter-node port n
  function automatic bit out_empty(input int o);
    return (o < M) ? rx_hdr_empty[o] : lk_tx_hdr_empty[o-M];
  endfunction
  function automatic logic [127:0] out_hdr(input int o);
    return (o < M) ? rx_hdr_data[o] : lk_tx_hdr_data[o-M];
  endfunction
  function automatic logic [DW-1:0] out_dat(input int o);
    return (o < M) ? rx_dat_data[o] : lk_tx_dat_data[o-M];
  endfunction
  function automatic bit out_dat_empty(input int o);
    return (o < M) ? rx_dat_empty[o] : lk_tx_dat_empty[o-M];
  endfunction
  task automatic pop(input int o, input bit hdr);
    if (o < M) begin if (hdr) rx_hdr_rd[o] = 1; else rx_dat_rd[o] = 1; end
    else begin if (hdr) lk_tx_hdr_rd[o-M] = 1; else lk_tx_dat_rd[o-M] = 1; end
    @(negedge clk);
    for (int i = 0; i < M; i++) begin rx_hdr_rd[i] = 0; rx_dat_rd[i] = 0; end
    for (int i = 0; i < N; i++) begin lk_tx_hdr_rd[i] = 0; lk_tx_dat_rd[i] = 0; end
  endtask

  logic [DW-1:0] pay [$];
  int npkt_out [M+N];

  task automatic one_packet(input int it);
    pkt_hdr_t h, g;
    int src_inter, src, vc, exp_o, dx, nw, t;
    logic [127:0] ftr, f;
    logic [DW-1:0] w;
    h = '0;
    h.coord.x = 6'($urandom_range(0, 3));
    h.intratile_port = 4'($urandom_range(0, M-1));
    h.length = 14'($urandom_range(0, 256));
    h.pid_chid = 16'(it);
    h.num_hops = 10'($urandom_range(0, 5));
    h.dest_vaddr = {$urandom, 16'($urandom)};
    src_inter = $urandom_range(0, 1);
    src = src_inter ? $urandom_range(0, N-1) : $urandom_range(0, M-1);
    vc = src_inter ? $urandom_range(0, 1) : 0;
    h.vc = 5'(vc);
    ftr = {$urandom, $urandom, $urandom, $urandom};
    nw = payload_words(h.length, BPW);
    pay.delete();
    for (int i = 0; i < nw; i++) begin
      for (int l = 0; l < DW/32; l++) w[32*l +: 32] = $urandom;
      pay.push_back(w);
    end
    // expected output
    dx = (int'(h.coord.x) - 1 + 4) % 4;
    if (dx == 0) exp_o = int'(h.intratile_port);
    else if (dx <= 2) exp_o = M + 0;
    else exp_o = M + 1;
    // inject header, payload, footer
    @(negedge clk);
    if (src_inter) begin
      lk_rx_vc[src] = 1'(vc);
      lk_rx_hdr_wr[src] = 1; lk_rx_hdr_data[src] = h;
      @(negedge clk); lk_rx_hdr_wr[src] = 0;
      foreach (pay[i]) begin
        lk_rx_dat_wr[src] = 1; lk_rx_dat_data[src] = pay[i];
        @(negedge clk); lk_rx_dat_wr[src] = 0;
      end
      lk_rx_hdr_wr[src] = 1; lk_rx_hdr_data[src] = ftr;
      @(negedge clk); lk_rx_hdr_wr[src] = 0;
    end else begin
      tx_hdr_wr[src] = 1; tx_hdr_data[src] = h;
      @(negedge clk); tx_hdr_wr[src] = 0;
      foreach (pay[i]) begin
        tx_dat_wr[src] = 1; tx_dat_data[src] = pay[i];
        @(negedge clk); tx_dat_wr[src] = 0;
      end
      tx_hdr_wr[src] = 1; tx_hdr_data[src] = ftr;
      @(negedge clk); tx_hdr_wr[src] = 0;
    end
    t = 0;
    while (out_empty(exp_o) && t < 200) begin @(negedge clk); t++; end
    chk(!out_empty(exp_o), $sformatf("pkt %0d reached output %0d", it, exp_o));
    for (int o = 0; o < M+N; o++)
      if (o != exp_o) chk(out_empty(o), $sformatf("pkt %0d not on output %0d", it, o));
    if (out_empty(exp_o)) return;
    npkt_out[exp_o]++;
    g = out_hdr(exp_o);
    chk(g.pid_chid == h.pid_chid && g.length == h.length && g.coord == h.coord
        && g.dest_vaddr == h.dest_vaddr && g.intratile_port == h.intratile_port, "header fields kept");
    if (exp_o >= M) begin
      chk(g.num_hops == h.num_hops + 10'd1, "hop count incremented on inter-node output");
      // from an intra-node port VC0; on the same dimension VC kept; no wrap link from X=1
      chk(g.vc[0] == (src_inter ? 1'(vc) : 1'b0), "virtual channel");
    end else
      chk(g.num_hops == h.num_hops, "hop count kept on local delivery");
    pop(exp_o, 1);
    foreach (pay[i]) begin
      t = 0;
      while (out_dat_empty(exp_o) && t < 50) begin @(negedge clk); t++; end
      chk(out_dat(exp_o) == pay[i], "payload word");
      pop(exp_o, 0);
    end
    t = 0;
    while (out_empty(exp_o) && t < 50) begin @(negedge clk); t++; end
    f = out_hdr(exp_o);
    chk(f == ftr, "footer");
    pop(exp_o, 1);
    chk(out_dat_empty(exp_o) && out_empty(exp_o), "output drained");
  endtask

  int t;
  initial begin
    my_coord = '0; my_coord.x = 6'd1;
    lattice = '0; lattice.x = 6'd4; lattice.y = 5'd1; lattice.z = 5'd1;
    pktgen_dest = my_coord;
    for (int i = 0; i < M; i++) begin
      tx_hdr_wr[i] = 0; tx_dat_wr[i] = 0; rx_hdr_rd[i] = 0; rx_dat_rd[i] = 0;
      tx_hdr_data[i] = 0; tx_dat_data[i] = 0;
    end
    for (int i = 0; i < N; i++) begin
      lk_tx_hdr_rd[i] = 0; lk_tx_dat_rd[i] = 0; lk_rx_hdr_wr[i] = 0; lk_rx_dat_wr[i] = 0;
      lk_rx_vc[i] = 0; lk_rx_hdr_data[i] = 0; lk_rx_dat_data[i] = 0;
    end
    for (int o = 0; o < M+N; o++) npkt_out[o] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (2) @(negedge clk);
    for (int it = 0; it < 300; it++) one_packet(it);
    for (int o = 0; o < M+N; o++) chk(npkt_out[o] > 10, $sformatf("output %0d exercised (%0d)", o, npkt_out[o]));
    // generator/consumer loop on port 2: 5 packets of 512 bytes
    pktgen_cfg0 = {2'b00, 14'd512, 16'd5};
    cons_en[2] = 1;
    gen_en[2] = 1;
    t = 0;
    while (!test_ok[2] && t < 3000) begin @(negedge clk); t++; end
    chk(test_ok[2], "port 2 loop-back test ok");
    repeat (5) @(negedge clk);
    chk(perf_count[2] >= 5 * 33 && perf_count[2] < 5 * 33 + 40,
        $sformatf("clock counter %0d", perf_count[2]));
    chk(perf_status[2][4] == 1'b1, "status test-ok bit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
