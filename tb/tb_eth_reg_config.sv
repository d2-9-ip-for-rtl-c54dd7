// tb_eth_reg_config: drives eth_reg_config against a model of the Ethernet
// core's register port that answers each access after a random delay,
// records every write and returns statistics values. Checks the order,
// offsets and values of the configuration writes, the transceiver reset
// hold time, that initialisation waits for channel sync, channel_ok, and
// that each tick writes TICK_REG and then reads back both 64-bit byte
// counters (including a tick arriving while reads are in progress).
module tb_eth_reg_config;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic chan_sync = 0, tick = 0, channel_ok, wr_req, wr_ack = 0, rd_req, rd_ack = 0;
  logic [15:0] wr_addr, rd_addr;
  logic [31:0] wr_data, rd_data = 0;
  logic [63:0] tx_bytes, rx_bytes;

  eth_reg_config #(.RESET_HOLD(16)) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  logic [15:0] wa [$];
  logic [31:0] wd [$];
  int wt [$];
  logic [15:0] ra [$];
  logic [31:0] stat_mem [logic [15:0]];
  int cyc = 0;
  always @(posedge clk) cyc++;

  // register port model: random latency, one access at a time
  initial begin
    forever begin
      @(negedge clk);
      wr_ack = 0; rd_ack = 0;
      if (wr_req) begin
        repeat ($urandom_range(0, 3)) @(negedge clk);
        wa.push_back(wr_addr); wd.push_back(wr_data); wt.push_back(cyc);
        wr_ack = 1;
      end else if (rd_req) begin
        repeat ($urandom_range(0, 3)) @(negedge clk);
        ra.push_back(rd_addr);
        rd_data = stat_mem.exists(rd_addr) ? stat_mem[rd_addr] : 32'hDEAD_0000;
        rd_ack = 1;
      end
    end
  end

  task automatic pulse_tick;
    @(negedge clk); tick = 1; @(negedge clk); tick = 0;
  endtask

  int t;
  logic [63:0] tx_v, rx_v;
  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (80) @(negedge clk);
    chk(wa.size() == 5, $sformatf("five writes before channel sync (%0d)", wa.size()));
    chk(!channel_ok, "not ok before sync");
    if (wa.size() == 5) begin
      chk(wa[0] == 16'h0008 && wd[0] == 32'h4000_0000, "MODE_REG");
      chk(wa[1] == 16'h0014 && wd[1] == 32'h0000_0033, "CONFIGURATION_RX_REG1");
      chk(wa[2] == 16'h000C && wd[2] == 32'h0000_3003, "CONFIGURATION_TX_REG1");
      chk(wa[3] == 16'h0000 && wd[3] == 32'h1, "GT reset set");
      chk(wa[4] == 16'h0000 && wd[4] == 32'h0, "GT reset cleared");
      chk(wt[4] - wt[3] >= 16, $sformatf("reset held %0d cycles", wt[4] - wt[3]));
    end
    chan_sync = 1;
    t = 0;
    while (!channel_ok && t < 100) begin @(negedge clk); t++; end
    chk(channel_ok, "channel_ok after sync");
    chk(wa.size() == 6 && wa[5] == 16'h0020 && wd[5] == 32'h1, "TICK_REG written at init");
    for (int it = 0; it < 6; it++) begin
      tx_v = {$urandom, $urandom}; rx_v = {$urandom, $urandom};
      stat_mem[16'h0710] = tx_v[31:0]; stat_mem[16'h0714] = tx_v[63:32];
      stat_mem[16'h0818] = rx_v[31:0]; stat_mem[16'h081C] = rx_v[63:32];
      ra.delete();
      pulse_tick();
      if (it == 3) begin repeat (3) @(negedge clk); pulse_tick(); end
      repeat (60) @(negedge clk);
      chk(wa[wa.size()-1] == 16'h0020, "tick writes TICK_REG");
      chk(tx_bytes == tx_v && rx_bytes == rx_v, $sformatf("statistics read back (it %0d)", it));
      chk(ra.size() == (it == 3 ? 8 : 4), $sformatf("reads per tick (%0d)", ra.size()));
      chk(ra[0] == 16'h0710 && ra[1] == 16'h0714 && ra[2] == 16'h0818 && ra[3] == 16'h081C, "read order");
      chk(channel_ok, "channel_ok stays");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
