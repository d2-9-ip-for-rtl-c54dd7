// tb_csr_regs: register block check. Reset values (LATTICESIZE, Ethernet IP
// and MAC addresses, REVISION, FIFO depth exponents) are read back; random
// values are written to every writable register and read back, and the
// decoded configuration outputs are compared with the written fields.
// Status inputs are driven with random values and read at their offsets.
// RESET_REG must hold soft_rst for 200 cycles and then clear itself; FIFO
// write exceptions must be sticky; a write of LINK_0_CONFIG_2 with bit 6 set
// must pulse eth_tick for one cycle.
module tb_csr_regs;
  import comm_pkg::*;
  localparam int M = 4, N = 2, HAW = 4, DAW = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic reg_wr = 0, reg_rd = 0, reg_rvalid;
  logic [11:0] reg_addr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  logic soft_rst, eth_tick;
  coord_t coord_me, lattice, pktgen_dest, link_new_dest;
  logic [M-1:0] gen_en, cons_en;
  logic [31:0] pktgen_cfg0, ip_address;
  logic [3:0] link_edac [N];
  logic link_new_dest_en [N];
  logic [7:0] red_hdr_thr, credit_period, wait_cycles;
  logic [9:0] red_dat_thr;
  logic [47:0] mac_address;
  logic [7:0] perf_status [M];
  logic [31:0] perf_count [M], fifo_sts_rx [M], fifo_sts_tx [M];
  logic [31:0] intra_cnt [M][8];
  logic [3:0] intra_exc [M];
  logic [15:0] link_status [N], link_err_single [N], link_err_fatal [N];
  logic [31:0] link_cnt [N][8], link_fifo_cnt [N][12];
  logic [N-1:0] chan_up = 0, chan_err = 0;
  logic [63:0] eth_tx_bytes = 0, eth_rx_bytes = 0;

  csr_regs #(.M(M), .N(N), .HAW(HAW), .DAW(DAW)) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  task automatic wr(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk);
    reg_wr = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk);
    reg_wr = 0;
  endtask

  task automatic rd(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk);
    reg_rd = 1; reg_addr = a;
    @(negedge clk);
    reg_rd = 0;
    chk(reg_rvalid, "rvalid one cycle after read");
    d = reg_rdata;
  endtask

  task automatic rd_chk(input logic [11:0] a, input logic [31:0] exp, input string s);
    logic [31:0] d;
    rd(a, d);
    chk(d == exp, $sformatf("%s @%03h got %08h exp %08h", s, a, d, exp));
  endtask

  logic [31:0] d, v;
  int t, pulses;
  always @(posedge clk) if (eth_tick) pulses++;

  initial begin
    pulses = 0;
    for (int p = 0; p < M; p++) begin
      perf_status[p] = 0; perf_count[p] = 0; fifo_sts_rx[p] = 0; fifo_sts_tx[p] = 0; intra_exc[p] = 0;
      for (int k = 0; k < 8; k++) intra_cnt[p][k] = 0;
    end
    for (int l = 0; l < N; l++) begin
      link_status[l] = 0; link_err_single[l] = 0; link_err_fatal[l] = 0;
      for (int k = 0; k < 8; k++) link_cnt[l][k] = 0;
      for (int k = 0; k < 12; k++) link_fifo_cnt[l][k] = 0;
    end
    repeat (3) @(negedge clk);
    rst = 0;
    pulses = 0;
    // reset values
    rd_chk(REG_LATTICESIZE, 32'hFFFF_FFFF, "LATTICESIZE reset");
    rd_chk(REG_IP_ADDRESS, 32'hC0A8_0002, "IP reset");
    rd_chk(REG_MAC_LOW, 32'hACC0_AAAA, "MAC low reset");
    rd_chk(REG_MAC_HIGH, 32'h0000_D00B, "MAC high reset");
    rd_chk(REG_REVISION, 32'h0002_0000, "REVISION");
    rd_chk(REG_FIFO_REGISTER, {8'(HAW), 8'(DAW), 8'(HAW), 8'(DAW)}, "FIFO_REGISTER");
    chk(mac_address == 48'hD00B_ACC0_AAAA, "MAC output");
    // writable registers, random values
    for (int it = 0; it < 20; it++) begin
      v = $urandom; wr(REG_COORDME, v); rd_chk(REG_COORDME, v, "COORDME");
      chk(coord_me == v[15:0], "coord_me out");
      v = $urandom; wr(REG_LATTICESIZE, v); rd_chk(REG_LATTICESIZE, v, "LATTICESIZE");
      chk(lattice == v[15:0], "lattice out");
      v = $urandom; wr(REG_PERF_INTRA_CF, v); rd_chk(REG_PERF_INTRA_CF, v, "INTRA_CF");
      chk(gen_en == v[M-1:0] && cons_en == v[8 +: M], "gen/cons enables");
      v = $urandom; wr(REG_PKTGEN_CONFIG_0, v); rd_chk(REG_PKTGEN_CONFIG_0, v, "PKTGEN_CONFIG_0");
      chk(pktgen_cfg0 == v, "pktgen cfg0 out");
      v = $urandom; wr(REG_PKTGEN_CONFIG_1, v); rd_chk(REG_PKTGEN_CONFIG_1, v, "PKTGEN_CONFIG_1");
      chk(pktgen_dest == v[15:0], "pktgen dest out");
      v = $urandom; wr(REG_LINK0, v); rd_chk(REG_LINK0, v, "LINK_0_CONFIG_0");
      chk(link_edac[0] == v[27:24] && link_edac[1] == v[31:28] && link_new_dest_en[0] == v[16]
          && link_new_dest_en[1] == v[17] && link_new_dest == v[15:0], "link cfg0 fields");
      v = $urandom; wr(REG_LINK0 + 12'h4, v); rd_chk(REG_LINK0 + 12'h4, v, "LINK_0_CONFIG_1");
      chk(red_hdr_thr == v[7:0] && red_dat_thr == v[25:16], "thresholds");
      v = $urandom & 32'hFFFF_FFBF; wr(REG_LINK0 + 12'h8, v); rd_chk(REG_LINK0 + 12'h8, v, "LINK_0_CONFIG_2");
      chk(credit_period == v[15:8] && wait_cycles == v[7:0], "credit/wait");
      v = $urandom; wr(REG_IP_ADDRESS, v); rd_chk(REG_IP_ADDRESS, v, "IP");
      chk(ip_address == v, "ip out");
      v = $urandom; wr(REG_MAC_LOW, v); rd_chk(REG_MAC_LOW, v, "MAC low");
      v = $urandom; wr(REG_MAC_HIGH, v); rd_chk(REG_MAC_HIGH, v, "MAC high");
      chk(mac_address == {v[15:0], dut.mac_lo}, "mac out");
    end
    chk(pulses == 0, $sformatf("no tick without bit 6 (%0d)", pulses));
    wr(REG_LINK0 + 12'h8, 32'h0000_1040);
    repeat (3) @(negedge clk);
    chk(pulses == 1, $sformatf("one eth_tick pulse per write with bit 6 (%0d)", pulses));
    // status inputs
    for (int it = 0; it < 5; it++) begin
      for (int p = 0; p < M; p++) begin
        perf_status[p] = 8'($urandom); perf_count[p] = $urandom;
        fifo_sts_rx[p] = $urandom; fifo_sts_tx[p] = $urandom;
        for (int k = 0; k < 8; k++) intra_cnt[p][k] = $urandom;
      end
      for (int l = 0; l < N; l++) begin
        link_status[l] = 16'($urandom); link_err_single[l] = 16'($urandom); link_err_fatal[l] = 16'($urandom);
        for (int k = 0; k < 8; k++) link_cnt[l][k] = $urandom;
        for (int k = 0; k < 12; k++) link_fifo_cnt[l][k] = $urandom;
      end
      chan_up = 2'($urandom); chan_err = 2'($urandom);
      eth_tx_bytes = {$urandom, $urandom}; eth_rx_bytes = {$urandom, $urandom};
      rd_chk(REG_PERF_INTRA_ST, {perf_status[3], perf_status[2], perf_status[1], perf_status[0]}, "PERF_INTRA_ST");
      for (int p = 0; p < M; p++) begin
        rd_chk(REG_PERF_INTRA_CNT0 + 12'(4*p), perf_count[p], "perf count");
        rd_chk(REG_INTRA_FIFO0 + 12'(40*p), fifo_sts_rx[p], "fifo rx status");
        rd_chk(REG_INTRA_FIFO0 + 12'(40*p + 4), fifo_sts_tx[p], "fifo tx status");
        for (int k = 0; k < 8; k++)
          rd_chk(REG_INTRA_FIFO0 + 12'(40*p + 8 + 4*k), intra_cnt[p][k], "intra fifo counter");
      end
      for (int l = 0; l < N; l++) begin
        rd_chk(REG_LINK0_STATUS + 12'(40*l), {16'd0, link_status[l]}, "link status");
        rd_chk(REG_LINK0_STATUS + 12'(40*l + 4), {link_err_single[l], link_err_fatal[l]}, "link errors");
        for (int k = 0; k < 8; k++)
          rd_chk(REG_LINK0_STATUS + 12'(40*l + 8 + 4*k), link_cnt[l][k], "link counter");
        for (int k = 0; k < 12; k++)
          rd_chk(REG_LINK0_RDWR + 12'(48*l + 4*k), link_fifo_cnt[l][k], "link fifo counter");
      end
      rd_chk(REG_TRANSCEIVER_ST, {14'd0, chan_err, 14'd0, chan_up}, "transceiver status");
      rd_chk(REG_ETH_TX_BYTE_LSB, eth_tx_bytes[31:0], "eth tx lsb");
      rd_chk(REG_ETH_TX_BYTE_MSB, eth_tx_bytes[63:32], "eth tx msb");
      rd_chk(REG_ETH_RX_BYTE_LSB, eth_rx_bytes[31:0], "eth rx lsb");
      rd_chk(REG_ETH_RX_BYTE_MSB, eth_rx_bytes[63:32], "eth rx msb");
    end
    rd_chk(12'h3F0, 32'h0, "unlisted offset reads 0");
    // sticky exceptions
    rd_chk(REG_FIFO_INTRA_EXC, 32'h0, "no exceptions yet");
    @(negedge clk);
    intra_exc[2] = 4'b0100;
    @(negedge clk);
    intra_exc[2] = 4'b0000;
    intra_exc[1] = 4'b0001;
    @(negedge clk);
    intra_exc[1] = 4'b0000;
    repeat (3) @(negedge clk);
    rd_chk(REG_FIFO_INTRA_EXC, (32'h1 << 18) | (32'h1 << 1), "sticky exception bits");
    // soft reset: 200 cycles
    wr(REG_RESET, 32'h1);
    t = 0;
    while (soft_rst && t < 1000) begin @(negedge clk); t++; end
    chk(t >= 197 && t <= 200, $sformatf("soft reset length %0d", t));
    rd_chk(REG_RESET, 32'h0, "RESET_REG cleared itself");
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
