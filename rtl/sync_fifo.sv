// sync_fifo: single-clock first-word-fall-through FIFO.
//
// Every header/footer queue and data queue of the Communication IP is one of
// these. rd_data shows the oldest word whenever empty is low; a read (rd_en)
// pops it. A write to a full FIFO is dropped and pulses wr_err, a read of an
// empty one is ignored. used counts stored words, free the empty places.
// Depth is 2**AW. Storage is a plain array (block RAM on an FPGA); the
// structure is this implementation's choice, the document only names the FIFOs.
module sync_fifo #(
  parameter int W  = 128,
  parameter int AW = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         empty,
  output logic         full,
  output logic [AW:0]  used,
  output logic [AW:0]  free,
  output logic         wr_err
);
  logic [W-1:0] mem [2**AW];
  logic [AW:0]  wp, rp;
  logic do_wr, do_rd;

  assign used   = wp - rp;
  assign free   = (AW+1)'(2**AW) - used;
  assign empty  = (wp == rp);
  assign full   = (used == (AW+1)'(2**AW));
  assign do_wr  = wr_en && !full;
  assign do_rd  = rd_en && !empty;
  assign rd_data = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0;
      rp <= '0;
      wr_err <= 1'b0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
      wr_err <= wr_en && full;
    end
  end
endmodule
