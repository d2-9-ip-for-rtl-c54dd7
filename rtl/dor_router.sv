// dor_router: routing decision for one packet header (combinational).
//
// Dimension-order routing on an N-dimensional torus: the offset along X is
// reduced to zero first, then Y, then Z. Along a dimension the packet takes
// the shorter way round the ring (ties go in the + direction). When every
// used coordinate matches the local node, the packet goes to the intra-node
// port named by the header's intra-tile port field.
//
// Output port numbering: 0..M-1 are the intra-node ports, M+2d and M+2d+1 are
// the inter-node ports of dimension d in the + and - direction. With the
// document's two inter-node ports (N=2) only X is routed.
//
// Deadlock avoidance uses two virtual channels per physical channel with a
// dateline: a packet enters a dimension on VC0 and moves to VC1 when it
// crosses the ring's wrap-around link, staying there until it leaves the
// dimension. The hop count is incremented on every inter-node hop. A
// destination outside the lattice size is delivered locally with its
// out-of-lattice flag set. DOR and the two virtual channels follow the
// document; the shortest-way choice, the dateline rule, X-first order and
// the out-of-lattice handling are this implementation's choices.
module dor_router
  import comm_pkg::*;
#(
  parameter int M = 4,          // intra-node ports
  parameter int N = 2           // inter-node ports (2 per dimension)
) (
  input  pkt_hdr_t hdr_in,
  input  logic     from_inter,   // packet arrived on an inter-node port
  input  logic [1:0] in_dim,     // dimension of that port
  input  coord_t   my_coord,
  input  coord_t   lattice,      // ring size per dimension
  output logic [$clog2(M+N)-1:0] out_port,
  output pkt_hdr_t hdr_out
);
  localparam int DIMS = N / 2;
  localparam int PW = $clog2(M+N);

  function automatic logic [5:0] get_dim(input coord_t c, input int d);
    case (d)
      0: return c.x;
      1: return {1'b0, c.y};
      default: return {1'b0, c.z};
    endcase
  endfunction

  always_comb begin
    logic [5:0] me, dst, sz, fwd, bwd;
    logic done, ool, wrap, plus;
    int unsigned sel_dim;
    hdr_out = hdr_in;
    fwd = '0;
    bwd = '0;
    me = '0;
    dst = '0;
    sz = '0;
    done = 1'b0;
    ool  = 1'b0;
    wrap = 1'b0;
    plus = 1'b1;
    sel_dim = 0;
    out_port = '0;
    for (int d = 0; d < 3; d++) begin
      me  = get_dim(my_coord, d);
      dst = get_dim(hdr_in.coord, d);
      sz  = get_dim(lattice, d);
      if (d < DIMS) begin
        if (dst >= sz) ool = 1'b1;
      end else if (dst != me) begin
        ool = 1'b1;               // no links along this dimension
      end
    end
    for (int d = 0; d < DIMS; d++) begin
      me  = get_dim(my_coord, d);
      dst = get_dim(hdr_in.coord, d);
      sz  = get_dim(lattice, d);
      if (!done && !ool && dst != me) begin
        done = 1'b1;
        sel_dim = d;
        fwd = (dst >= me) ? dst - me : dst + sz - me;
        bwd = sz - fwd;
        plus = (fwd <= bwd);
        wrap = plus ? (me == sz - 6'd1) : (me == 6'd0);
      end
    end
    if (done) begin
      out_port = PW'(M + 2*sel_dim + (plus ? 0 : 1));
      hdr_out.vc[0] = ((from_inter && int'(in_dim) == int'(sel_dim)) ? hdr_in.vc[0] : 1'b0) | wrap;
      hdr_out.num_hops = hdr_in.num_hops + 10'd1;
    end else begin
      out_port = (M > 1) ? PW'(int'(hdr_in.intratile_port) % M) : '0;
      hdr_out.out_of_lattice = hdr_in.out_of_lattice | ool;
    end
  end
endmodule
