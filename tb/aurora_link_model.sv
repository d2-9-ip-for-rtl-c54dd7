// aurora_link_model: behavioural model of one direction of a serial channel
// (the Aurora 64B/66B link and cable between two nodes), for simulation only.
// It delays the link-word stream by LAT cycles and can corrupt bits of the
// next header word that passes (for testing the header EDAC): when flip_arm
// is high, the next LK_HEADER word is XORed with flip_mask and flip_done
// pulses.
module aurora_link_model
  import comm_pkg::*;
#(
  parameter int DW  = 256,
  parameter int LAT = 8
) (
  input  logic          clk,
  input  lk_kind_t      tx_kind,
  input  logic [DW-1:0] tx_data,
  output lk_kind_t      rx_kind,
  output logic [DW-1:0] rx_data,
  input  logic          flip_arm,
  input  logic [127:0]  flip_mask,
  output logic          flip_done
);
  lk_kind_t      k_pipe [LAT];
  logic [DW-1:0] d_pipe [LAT];

  initial begin
    for (int i = 0; i < LAT; i++) begin
      k_pipe[i] = LK_IDLE;
      d_pipe[i] = '0;
    end
    flip_done = 1'b0;
  end

  always @(posedge clk) begin
    flip_done <= 1'b0;
    k_pipe[0] <= tx_kind;
    d_pipe[0] <= tx_data;
    if (flip_arm && tx_kind == LK_HEADER && !flip_done) begin
      d_pipe[0] <= tx_data ^ DW'(flip_mask);
      flip_done <= 1'b1;
    end
    for (int i = 1; i < LAT; i++) begin
      k_pipe[i] <= k_pipe[i-1];
      d_pipe[i] <= d_pipe[i-1];
    end
  end

  assign rx_kind = k_pipe[LAT-1];
  assign rx_data = d_pipe[LAT-1];
endmodule
