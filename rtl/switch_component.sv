// switch_component: crossbar of the Routing IP with virtual cut-through.
//
// Inputs are the heads of the port FIFOs that feed the switch: the TX FIFOs of
// the M intra-node ports (inputs 0..M-1) and the RX FIFOs of both virtual
// channels of the N inter-node ports (input M+2n+v is port n, channel v).
// Outputs are the RX FIFOs of the intra-node ports (outputs 0..M-1) and the
// TX FIFOs of the inter-node ports (M+n). A dor_router per input decides the
// output of the packet at its head, and a rr_arbiter per output picks among
// the inputs that want it.
//
// Virtual cut-through: an input may request an output only when the output's
// FIFOs have room for the whole packet (two header-FIFO places for header
// and footer, ceil(length/bytes per word) data places). Once granted, the
// header moves in the grant cycle, then one payload word per cycle as soon
// as it is in the input FIFO (the packet is forwarded while it is still
// arriving), then the footer. Each output moves one packet at a time; all
// outputs work in parallel. The routed header (virtual channel, hop count,
// out-of-lattice flag updated) is what is written to the output.
// wait_evt[i] is high in a cycle where input i holds a packet that is not
// granted (output busy, lost arbitration or not enough room).
// Structure and timing are this implementation's; the document gives the
// switching technique, routing algorithm and the router/arbiter split.
module switch_component
  import comm_pkg::*;
#(
  parameter int M  = 4,
  parameter int N  = 2,
  parameter int DW = 256,
  parameter int HAW = 4,
  parameter int DAW = 8,
  localparam int PI = M + 2*N,
  localparam int PO = M + N
) (
  input  logic          clk,
  input  logic          rst,
  input  coord_t        my_coord,
  input  coord_t        lattice,
  // inputs
  input  logic [127:0]  in_hdr_data  [PI],
  input  logic          in_hdr_empty [PI],
  output logic          in_hdr_rd    [PI],
  input  logic [DW-1:0] in_dat_data  [PI],
  input  logic          in_dat_empty [PI],
  output logic          in_dat_rd    [PI],
  // outputs
  output logic          out_hdr_wr   [PO],
  output logic [127:0]  out_hdr_data [PO],
  input  logic [HAW:0]  out_hdr_free [PO],
  output logic          out_dat_wr   [PO],
  output logic [DW-1:0] out_dat_data [PO],
  input  logic [DAW:0]  out_dat_free [PO],
  output logic [PI-1:0] wait_evt
);
  localparam int PIW = $clog2(PI);
  localparam int POW = $clog2(PO);
  localparam int BPW = DW / 8;

  typedef enum logic [1:0] {S_IDLE, S_DATA, S_FTR} ost_t;

  logic [POW-1:0] route   [PI];
  pkt_hdr_t       hdr_rt  [PI];
  logic [9:0]     nwords  [PI];
  logic [PI-1:0]  busy;
  logic [PI-1:0]  req     [PO];
  logic [PI-1:0]  gnt     [PO];
  logic [PIW-1:0] gnt_idx [PO];
  ost_t           ost     [PO];
  logic [PIW-1:0] sel     [PO];
  logic [9:0]     left    [PO];

  for (genvar i = 0; i < PI; i++) begin : g_rt
    localparam bit INTER = (i >= M);
    localparam int DIM = INTER ? ((i - M) / 2) / 2 : 0;
    pkt_hdr_t h;
    assign h = in_hdr_data[i];
    dor_router #(.M(M), .N(N)) u_rt (
      .hdr_in(h), .from_inter(INTER), .in_dim(2'(DIM)),
      .my_coord, .lattice, .out_port(route[i]), .hdr_out(hdr_rt[i]));
    assign nwords[i] = 10'(payload_words(h.length, BPW));
  end

  for (genvar o = 0; o < PO; o++) begin : g_out
    always_comb begin
      for (int i = 0; i < PI; i++)
        req[o][i] = (ost[o] == S_IDLE) && !in_hdr_empty[i] && !busy[i] &&
                    (route[i] == POW'(o)) &&
                    (out_hdr_free[o] >= (HAW+1)'(2)) &&
                    (int'(out_dat_free[o]) >= int'(nwords[i]));
    end
    rr_arbiter #(.N(PI)) u_arb (
      .clk, .rst, .req(req[o]), .advance(1'b1), .gnt(gnt[o]), .gnt_idx(gnt_idx[o]));

    always_comb begin
      out_hdr_wr[o] = 1'b0;
      out_hdr_data[o] = hdr_rt[gnt_idx[o]];
      out_dat_wr[o] = 1'b0;
      out_dat_data[o] = in_dat_data[sel[o]];
      case (ost[o])
        S_IDLE: out_hdr_wr[o] = |gnt[o];
        S_DATA: out_dat_wr[o] = !in_dat_empty[sel[o]];
        S_FTR: begin
          out_hdr_data[o] = in_hdr_data[sel[o]];
          out_hdr_wr[o] = !in_hdr_empty[sel[o]];
        end
        default: ;
      endcase
    end
  end

  // Input pops: an input is served by at most one output at a time.
  always_comb begin
    for (int i = 0; i < PI; i++) begin
      in_hdr_rd[i] = 1'b0;
      in_dat_rd[i] = 1'b0;
      wait_evt[i]  = !in_hdr_empty[i] && !busy[i];
    end
    for (int o = 0; o < PO; o++) begin
      if (ost[o] == S_IDLE && |gnt[o]) begin
        in_hdr_rd[gnt_idx[o]] = 1'b1;
        wait_evt[gnt_idx[o]] = 1'b0;
      end
      if (ost[o] == S_DATA && !in_dat_empty[sel[o]]) in_dat_rd[sel[o]] = 1'b1;
      if (ost[o] == S_FTR && !in_hdr_empty[sel[o]]) in_hdr_rd[sel[o]] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= '0;
      for (int o = 0; o < PO; o++) begin
        ost[o] <= S_IDLE;
        sel[o] <= '0;
        left[o] <= '0;
      end
    end else begin
      for (int o = 0; o < PO; o++) begin
        case (ost[o])
          S_IDLE:
            if (|gnt[o]) begin
              sel[o] <= gnt_idx[o];
              busy[gnt_idx[o]] <= 1'b1;
              left[o] <= nwords[gnt_idx[o]];
              ost[o] <= (nwords[gnt_idx[o]] == 10'd0) ? S_FTR : S_DATA;
            end
          S_DATA:
            if (!in_dat_empty[sel[o]]) begin
              left[o] <= left[o] - 10'd1;
              if (left[o] == 10'd1) ost[o] <= S_FTR;
            end
          S_FTR:
            if (!in_hdr_empty[sel[o]]) begin
              busy[sel[o]] <= 1'b0;
              ost[o] <= S_IDLE;
            end
          default: ost[o] <= S_IDLE;
        endcase
      end
    end
  end

  // An input FIFO is never popped by two outputs in the same cycle.
  always_ff @(posedge clk) begin
    if (!rst) begin
      for (int i = 0; i < PI; i++) begin
        int n;
        n = 0;
        for (int o = 0; o < PO; o++) if (ost[o] != S_IDLE && sel[o] == PIW'(i)) n++;
        assert (n <= 1) else $error("input %0d served by %0d outputs", i, n);
      end
    end
  end
endmodule
