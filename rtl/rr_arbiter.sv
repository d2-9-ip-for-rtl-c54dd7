// rr_arbiter: round-robin arbiter of the switch component.
//
// One arbiter sits on each output port and picks among the input ports whose
// packet wants that output. gnt is combinational and one-hot (or zero when
// nothing requests). When 'advance' is high the priority pointer moves past
// the granted requester, so every requester is served within N grants.
// The document says only that the arbiter resolves contention; the
// round-robin policy is this implementation's choice.
module rr_arbiter #(
  parameter int N = 6
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] gnt,
  output logic [$clog2(N)-1:0] gnt_idx
);
  logic [$clog2(N)-1:0] ptr;   // highest-priority requester

  localparam int IW = $clog2(N);

  always_comb begin
    logic [IW:0] k;
    logic        found;
    gnt = '0;
    gnt_idx = '0;
    found = 1'b0;
    for (int i = 0; i < N; i++) begin
      k = {1'b0, ptr} + (IW+1)'(i);
      if (k >= (IW+1)'(N)) k = k - (IW+1)'(N);
      if (!found && req[k[IW-1:0]]) begin
        found = 1'b1;
        gnt[k[IW-1:0]] = 1'b1;
        gnt_idx = k[IW-1:0];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) ptr <= '0;
    else if (advance && |gnt) ptr <= (gnt_idx == ($clog2(N))'(N-1)) ? '0 : gnt_idx + 1'b1;
  end
endmodule
