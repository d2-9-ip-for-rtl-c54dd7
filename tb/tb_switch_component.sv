// tb_switch_component: random traffic through a 2+2 port switch
// (M=2 intra-node, N=2 inter-node ports, so 6 inputs and 4 outputs). The
// testbench models the port FIFOs as queues, injects packets of random
// length and destination at random inputs, drains the outputs at random
// rates and checks: each packet appears whole and unmixed at the output the
// routing rules give, its header is routed (hop count, virtual channel),
// payload words and footer are intact, no output FIFO ever overflows
// (virtual cut-through only starts a packet that fits), and every packet
// arrives. It also checks the one-cycle header latency through an idle
// switch.
module tb_switch_component;
  import comm_pkg::*;
  localparam int M = 2, N = 2, DW = 64, HAW = 3, DAW = 4;
  localparam int PI = M + 2*N, PO = M + N;
  localparam int HCAP = 2**HAW, DCAP = 2**DAW;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  coord_t my_coord, lattice;
  logic [127:0] in_hdr_data [PI];
  logic in_hdr_empty [PI], in_hdr_rd [PI], in_dat_empty [PI], in_dat_rd [PI];
  logic [DW-1:0] in_dat_data [PI];
  logic out_hdr_wr [PO], out_dat_wr [PO];
  logic [127:0] out_hdr_data [PO];
  logic [DW-1:0] out_dat_data [PO];
  logic [HAW:0] out_hdr_free [PO];
  logic [DAW:0] out_dat_free [PO];
  logic [PI-1:0] wait_evt;
  int checks = 0, failures = 0;

  switch_component #(.M(M), .N(N), .DW(DW), .HAW(HAW), .DAW(DAW)) dut (.*);

  logic [127:0] ihq [PI][$];
  logic [DW-1:0] idq [PI][$];
  logic [127:0] ohq [PO][$];
  logic [DW-1:0] odq [PO][$];
  int exp_out [int];       // packet id -> expected output
  int exp_len [int];
  int exp_hops [int];
  int delivered = 0, waits = 0;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  always_comb
    for (int i = 0; i < PI; i++) begin
      in_hdr_empty[i] = ihq[i].size() == 0;
      in_hdr_data[i]  = ihq[i].size() ? ihq[i][0] : '0;
      in_dat_empty[i] = idq[i].size() == 0;
      in_dat_data[i]  = idq[i].size() ? idq[i][0] : '0;
    end
  always_comb
    for (int o = 0; o < PO; o++) begin
      out_hdr_free[o] = (HAW+1)'(HCAP - ohq[o].size());
      out_dat_free[o] = (DAW+1)'(DCAP - odq[o].size());
    end

  // FIFO updates just after each clock edge
  always @(posedge clk) begin
    bit hr [PI], dr [PI], hw [PO], dw [PO];
    logic [127:0] hd [PO];
    logic [DW-1:0] dd [PO];
    for (int i = 0; i < PI; i++) begin
      hr[i] = in_hdr_rd[i] && ihq[i].size() != 0;
      dr[i] = in_dat_rd[i] && idq[i].size() != 0;
    end
    for (int o = 0; o < PO; o++) begin
      hw[o] = out_hdr_wr[o]; hd[o] = out_hdr_data[o];
      dw[o] = out_dat_wr[o]; dd[o] = out_dat_data[o];
    end
    if (!rst && wait_evt != 0) waits++;
    #1;
    for (int i = 0; i < PI; i++) begin
      if (hr[i]) void'(ihq[i].pop_front());
      if (dr[i]) void'(idq[i].pop_front());
    end
    for (int o = 0; o < PO; o++) begin
      if (hw[o]) begin
        chk(ohq[o].size() < HCAP, "output header FIFO overflow");
        ohq[o].push_back(hd[o]);
      end
      if (dw[o]) begin
        chk(odq[o].size() < DCAP, "output data FIFO overflow");
        odq[o].push_back(dd[o]);
      end
    end
  end

  // Output consumers
  bit drain_en = 1;
  for (genvar o = 0; o < PO; o++) begin : g_cons
    initial begin
      pkt_hdr_t h;
      int id, nw;
      forever begin
        @(negedge clk);
        if (drain_en && ohq[o].size() && ($urandom % 3 != 0)) begin
          h = ohq[o].pop_front();
          id = int'(h.pid_chid);
          chk(exp_out.exists(id) && exp_out[id] == o, $sformatf("packet %0d at output %0d", id, o));
          chk(exp_len.exists(id) && h.length == 14'(exp_len[id]), "length");
          chk(exp_hops.exists(id) && h.num_hops == 10'(exp_hops[id]), "hop count");
          if (o >= M) chk(h.vc[0] == 1'b0, "VC0: no wrap link from node 1");
          nw = payload_words(h.length, DW/8);
          for (int w = 0; w < nw; w++) begin
            @(negedge clk);
            while (!odq[o].size() || ($urandom % 4 == 0)) @(negedge clk);
            chk(odq[o].pop_front() == {32'(id), 32'(w)}, "payload word");
          end
          @(negedge clk);
          while (!ohq[o].size()) @(negedge clk);
          chk(ohq[o].pop_front() == {96'h0, 32'(id)}, "footer follows payload");
          delivered++;
        end
      end
    end
  end

  task automatic inject(input int i, input int id, input int dx, input int dport, input int len);
    pkt_hdr_t h;
    h = '0;
    h.coord.x = 6'(dx);
    h.intratile_port = 4'(dport);
    h.length = 14'(len);
    h.pid_chid = 16'(id);
    exp_len[id] = len;
    if (dx == 1) begin exp_out[id] = dport % M; exp_hops[id] = 0; end
    else if (dx == 0) begin exp_out[id] = M + 1; exp_hops[id] = 1; end
    else begin exp_out[id] = M + 0; exp_hops[id] = 1; end
    ihq[i].push_back(h);
    for (int w = 0; w < payload_words(14'(len), DW/8); w++) idq[i].push_back({32'(id), 32'(w)});
    ihq[i].push_back({96'h0, 32'(id)});
  endtask

  initial begin
    int id, t;
    my_coord = '0; my_coord.x = 6'd1;
    lattice = '0; lattice.x = 6'd4; lattice.y = 5'd1; lattice.z = 5'd1;
    repeat (3) @(negedge clk);
    rst = 0;
    // latency: one header through an idle switch
    drain_en = 0;
    inject(0, 0, 1, 1, 8);
    @(posedge clk);
    #2;
    chk(ohq[1].size() == 1, "header in output FIFO one cycle after it was at the input");
    drain_en = 1;
    id = 1;
    // random traffic, only intra-node inputs inject (inter-node RX inputs
    // carry transit traffic too: inject there with packets not for this node)
    for (int r = 0; r < 300; r++) begin
      int i, dx, len;
      @(negedge clk);
      i = $urandom % PI;
      dx = $urandom % 4;
      len = (($urandom % 4) == 0) ? 0 : 1 + $urandom % 120;
      if (ihq[i].size() < 6) begin
        if (i >= M) begin
          // from a link: VC 0, and it must not go back the way it came
          inject(i, id, 1, $urandom % 4, len);
        end else begin
          inject(i, id, dx, $urandom % 4, len);
        end
        id++;
      end
    end
    t = 0;
    while (delivered < id && t < 50000) begin @(negedge clk); t++; end
    chk(delivered == id, $sformatf("all %0d packets delivered (%0d)", id, delivered));
    chk(waits > 0, "contention occurred");
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
