// tb_dor_router: checks the routing decision against an independent model.
// 1-D (two inter-node ports): every source/destination pair on rings of
// size 1..8, for packets injected locally and arriving on either direction's
// VC0/VC1, checking output port, virtual channel, hop count and the
// out-of-lattice flag. 2-D (four ports): X is corrected before Y.
module tb_dor_router;
  import comm_pkg::*;
  localparam int M = 4;
  pkt_hdr_t hdr_in, hdr_out, hdr_in2, hdr_out2;
  logic from_inter, from_inter2;
  logic [1:0] in_dim, in_dim2;
  coord_t my_coord, lattice, my_coord2, lattice2;
  logic [$clog2(M+2)-1:0] out_port;
  logic [$clog2(M+4)-1:0] out_port2;
  int checks = 0, failures = 0;

  dor_router #(.M(M), .N(2)) dut (.hdr_in, .from_inter, .in_dim, .my_coord, .lattice, .out_port, .hdr_out);
  dor_router #(.M(M), .N(4)) dut2 (.hdr_in(hdr_in2), .from_inter(from_inter2), .in_dim(in_dim2),
    .my_coord(my_coord2), .lattice(lattice2), .out_port(out_port2), .hdr_out(hdr_out2));

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    int exp_port, exp_vc, fwd, bwd;
    bit plus;
    for (int L = 1; L <= 8; L++)
      for (int me = 0; me < L; me++)
        for (int dst = 0; dst < L + 2; dst++)
          for (int src = 0; src < 3; src++)     // 0 local, 1 from + link, 2 from - link
            for (int vcin = 0; vcin < 2; vcin++) begin
              hdr_in = '0;
              hdr_in.coord.x = 6'(dst);
              hdr_in.intratile_port = 4'($urandom % 4);
              hdr_in.vc = 5'(src == 0 ? 0 : vcin);
              hdr_in.num_hops = 10'($urandom % 100);
              from_inter = (src != 0);
              in_dim = 0;
              my_coord = '0; my_coord.x = 6'(me);
              lattice = '0; lattice.x = 6'(L); lattice.y = 5'd1; lattice.z = 5'd1;
              #1;
              if (dst >= L || dst == me) begin
                chk(out_port == hdr_in.intratile_port, $sformatf("local port L%0d me%0d dst%0d", L, me, dst));
                chk(hdr_out.out_of_lattice == (dst >= L), "ool flag");
                chk(hdr_out.num_hops == hdr_in.num_hops, "hops unchanged locally");
              end else begin
                fwd = (dst - me + L) % L;
                bwd = L - fwd;
                plus = fwd <= bwd;
                exp_port = M + (plus ? 0 : 1);
                exp_vc = (src != 0) ? vcin : 0;
                if (plus && me == L - 1) exp_vc = 1;
                if (!plus && me == 0) exp_vc = 1;
                chk(out_port == exp_port, $sformatf("port L%0d me%0d dst%0d got %0d", L, me, dst, out_port));
                chk(hdr_out.vc[0] == 1'(exp_vc), $sformatf("vc L%0d me%0d dst%0d src%0d", L, me, dst, src));
                chk(hdr_out.num_hops == hdr_in.num_hops + 1, "hop increment");
              end
            end
    // 2-D: X first, then Y; a Y hop entered from an X link starts on VC0.
    lattice2 = '0; lattice2.x = 6'd4; lattice2.y = 5'd4; lattice2.z = 5'd1;
    my_coord2 = '0; my_coord2.x = 6'd1; my_coord2.y = 5'd1;
    hdr_in2 = '0; hdr_in2.coord.x = 6'd2; hdr_in2.coord.y = 5'd3;
    from_inter2 = 1; in_dim2 = 0; hdr_in2.vc = 5'd1;
    #1;
    chk(out_port2 == M + 0, "2D: X first");
    chk(hdr_out2.vc[0] == 1'b1, "2D: VC kept within X");
    hdr_in2.coord.x = 6'd1; hdr_in2.coord.y = 5'd0;
    #1;
    chk(out_port2 == M + 3, "2D: then Y, - direction");
    chk(hdr_out2.vc[0] == 1'b0, "2D: VC0 on entering Y");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
