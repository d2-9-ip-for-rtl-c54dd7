// eth_reg_config: the CONFIG state machine that sets up the 10G/25G Ethernet
// MAC core through its control register port and then collects its byte
// statistics.
//
// Sequence after reset (one register access at a time):
//   IDLE -> write MODE_REG (0x0008) = 0x40000000 (statistics pushed on tick)
//        -> write CONFIGURATION_RX_REG1 (0x0014) = 0x00000033
//        -> write CONFIGURATION_TX_REG1 (0x000C) = 0x00003003
//        -> write GT_RESET_REG (0x0000) = 1, hold RESET_HOLD cycles,
//           write GT_RESET_REG = 0
//        -> wait for channel sync (rx block lock) -> write TICK_REG (0x0020)
//           = 1, which clears the statistics -> INIT_DONE (channel_ok = 1).
// In INIT_DONE a tick request (from the Communication IP register block)
// writes TICK_REG = 1, which pushes the accumulated counts to the readable
// statistics registers, then the four byte counters (TX LSB/MSB, RX LSB/MSB)
// are read and presented on tx_bytes/rx_bytes; the machine returns to
// INIT_DONE. A tick that arrives during the reads is remembered.
//
// Register port: a write is requested with wr_req/wr_addr/wr_data held until
// wr_ack; a read with rd_req/rd_addr held until rd_ack, which returns rd_data.
// This is a simplified form of the core's AXI4-Lite port (one handshake per
// access, no response codes).
// The states, register offsets and written values follow the document. The
// reset hold time and the statistics register offsets (parameters) are this
// implementation's choice; the document gives neither.
module eth_reg_config #(
  parameter int          RESET_HOLD   = 16,
  parameter logic [15:0] STAT_TX_LSB  = 16'h0710,
  parameter logic [15:0] STAT_RX_LSB  = 16'h0818
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        chan_sync,     // receiver locked to word boundaries
  input  logic        tick,          // one-cycle request to read statistics
  output logic        channel_ok,
  output logic        wr_req,
  output logic [15:0] wr_addr,
  output logic [31:0] wr_data,
  input  logic        wr_ack,
  output logic        rd_req,
  output logic [15:0] rd_addr,
  input  logic        rd_ack,
  input  logic [31:0] rd_data,
  output logic [63:0] tx_bytes,
  output logic [63:0] rx_bytes
);
  localparam logic [15:0] GT_RESET_REG = 16'h0000;
  localparam logic [15:0] MODE_REG     = 16'h0008;
  localparam logic [15:0] CONFIG_TX1   = 16'h000C;
  localparam logic [15:0] CONFIG_RX1   = 16'h0014;
  localparam logic [15:0] TICK_REG     = 16'h0020;

  typedef enum logic [3:0] {
    C_IDLE, C_MODE, C_CFG_RX, C_CFG_TX, C_RST1, C_HOLD, C_RST0, C_SYNC,
    C_TICK0, C_DONE, C_TICK, C_STATS
  } cstate_t;
  cstate_t st;
  logic [$clog2(RESET_HOLD+1)-1:0] hold;
  logic [1:0] ridx;
  logic tick_pend;

  always_comb begin
    wr_req  = 1'b0;
    wr_addr = 16'h0;
    wr_data = 32'h0;
    case (st)
      C_MODE:   begin wr_req = 1'b1; wr_addr = MODE_REG;     wr_data = 32'h4000_0000; end
      C_CFG_RX: begin wr_req = 1'b1; wr_addr = CONFIG_RX1;   wr_data = 32'h0000_0033; end
      C_CFG_TX: begin wr_req = 1'b1; wr_addr = CONFIG_TX1;   wr_data = 32'h0000_3003; end
      C_RST1:   begin wr_req = 1'b1; wr_addr = GT_RESET_REG; wr_data = 32'h0000_0001; end
      C_RST0:   begin wr_req = 1'b1; wr_addr = GT_RESET_REG; wr_data = 32'h0000_0000; end
      C_TICK0, C_TICK:
                begin wr_req = 1'b1; wr_addr = TICK_REG;     wr_data = 32'h0000_0001; end
      default: ;
    endcase
  end

  assign rd_req  = (st == C_STATS);
  assign rd_addr = ridx[1] ? STAT_RX_LSB + {13'd0, ridx[0], 2'b00} : STAT_TX_LSB + {13'd0, ridx[0], 2'b00};
  assign channel_ok = (st == C_DONE) || (st == C_TICK) || (st == C_STATS);

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= C_IDLE;
      hold <= '0;
      ridx <= 2'd0;
      tick_pend <= 1'b0;
      tx_bytes <= '0;
      rx_bytes <= '0;
    end else begin
      if (tick) tick_pend <= 1'b1;
      case (st)
        C_IDLE:   st <= C_MODE;
        C_MODE:   if (wr_ack) st <= C_CFG_RX;
        C_CFG_RX: if (wr_ack) st <= C_CFG_TX;
        C_CFG_TX: if (wr_ack) st <= C_RST1;
        C_RST1:   if (wr_ack) begin st <= C_HOLD; hold <= '0; end
        C_HOLD: begin
          hold <= hold + 1'b1;
          if (int'(hold) == RESET_HOLD - 1) st <= C_RST0;
        end
        C_RST0:   if (wr_ack) st <= C_SYNC;
        C_SYNC:   if (chan_sync) st <= C_TICK0;
        C_TICK0:  if (wr_ack) begin st <= C_DONE; tick_pend <= 1'b0; end
        C_DONE:   if (tick_pend || tick) begin st <= C_TICK; tick_pend <= 1'b0; end
        C_TICK:   if (wr_ack) begin st <= C_STATS; ridx <= 2'd0; end
        C_STATS:  if (rd_ack) begin
          case (ridx)
            2'd0: tx_bytes[31:0]  <= rd_data;
            2'd1: tx_bytes[63:32] <= rd_data;
            2'd2: rx_bytes[31:0]  <= rd_data;
            default: rx_bytes[63:32] <= rd_data;
          endcase
          ridx <= ridx + 2'd1;
          if (ridx == 2'd3) st <= C_DONE;
        end
        default: st <= C_IDLE;
      endcase
    end
  end
endmodule
