// comm_pkg: types and constants shared by the Communication IP.
//
// The 128-bit TEXTAROSSA packet header follows the bit map of the header
// format figure: virtual channel in bits 4:0, PID/channel id 20:5,
// destination coordinate 36:21, intra-tile port 40:37, out-of-lattice flag 42,
// packet type 47:43, payload length in bytes 61:48, destination virtual
// address 109:62, hop count 119:110 and the 8-bit header ECC 127:120.
// The coordinate layout (X 5:0, Y 10:6, Z 15:11) is the one of the
// PKTGEN_CONFIG_1 and LINK_x_CONFIG_0 registers.
// The link-word kinds, the payload test pattern and the footer contents are
// choices of this implementation.
package comm_pkg;

  localparam int HDR_W = 128;

  typedef struct packed {
    logic [4:0] z;
    logic [4:0] y;
    logic [5:0] x;
  } coord_t;

  typedef struct packed {
    logic [7:0]  ecc_cr;
    logic [9:0]  num_hops;
    logic [47:0] dest_vaddr;
    logic [13:0] length;        // payload length in bytes
    logic [4:0]  pkt_type;
    logic        out_of_lattice;
    logic        rsvd;
    logic [3:0]  intratile_port;
    coord_t      coord;         // destination node
    logic [15:0] pid_chid;
    logic [4:0]  vc;
  } pkt_hdr_t;

  // Kind of a word on the inter-node link.
  typedef enum logic [2:0] {
    LK_IDLE   = 3'd0,
    LK_CREDIT = 3'd1,   // "magic" word carrying the receiver's FIFO status
    LK_HEADER = 3'd2,
    LK_DATA   = 3'd3,
    LK_FOOTER = 3'd4
  } lk_kind_t;

  // Packet generator state codes (PERF_INTRANODE_ST).
  typedef enum logic [3:0] {
    GEN_OFF = 4'd0, GEN_IDLE = 4'd1, GEN_TX_HEADER = 4'd2,
    GEN_TX_PAYLOAD = 4'd3, GEN_TX_FOOTER = 4'd4
  } gen_state_t;

  // Packet checker state codes (PERF_INTRANODE_ST).
  typedef enum logic [2:0] {
    CHK_OFF = 3'd0, CHK_IDLE = 3'd1, CHK_COUNT = 3'd2
  } chk_state_t;

  // Number of datapath words carrying a payload of len bytes.
  function automatic int unsigned payload_words(input logic [13:0] len, input int unsigned bytes_per_word);
    return (int'(len) + bytes_per_word - 1) / bytes_per_word;
  endfunction

  // Test payload: 32-bit lane 'lane' of payload word 'idx' of a packet of
  // length 'len'. Self-describing, so a checker needs only the header.
  function automatic logic [31:0] test_lane(input logic [13:0] len, input int unsigned idx, input int unsigned lane);
    logic [31:0] v;
    v = (32'(idx) * 32'h9E37_79B9) ^ {2'b00, len, 16'h0000} ^ (32'(lane) * 32'h0101_0101) ^ 32'h5A5A_0000;
    return v;
  endfunction

  // Register byte offsets (configuration/status register table).
  localparam logic [11:0] REG_RESET            = 12'h010;
  localparam logic [11:0] REG_REVISION         = 12'h014;
  localparam logic [11:0] REG_COORDME          = 12'h018;
  localparam logic [11:0] REG_LATTICESIZE      = 12'h020;
  localparam logic [11:0] REG_PERF_INTRA_CF    = 12'h030;
  localparam logic [11:0] REG_PERF_INTER_CF    = 12'h034;
  localparam logic [11:0] REG_PKTGEN_CONFIG_0  = 12'h038;
  localparam logic [11:0] REG_PKTGEN_CONFIG_1  = 12'h040;
  localparam logic [11:0] REG_PERF_INTRA_ST    = 12'h050;
  localparam logic [11:0] REG_PERF_INTER_ST    = 12'h054;
  localparam logic [11:0] REG_PERF_INTRA_CNT0  = 12'h058;
  localparam logic [11:0] REG_PERF_INTER_CNT0  = 12'h068;
  localparam logic [11:0] REG_INTRA_FIFO0      = 12'h070;  // 10 words per port
  localparam logic [11:0] REG_LINK0            = 12'h110;  // 10 words per link
  localparam logic [11:0] REG_LINK0_STATUS     = 12'h140;  // 10 words per link
  localparam logic [11:0] REG_LINK0_RDWR       = 12'h1B8;  // 12 words per link
  localparam logic [11:0] REG_FIFO_INTRA_EXC   = 12'h258;
  localparam logic [11:0] REG_FIFO_REGISTER    = 12'h260;
  localparam logic [11:0] REG_TRANSCEIVER_ST   = 12'h264;
  localparam logic [11:0] REG_IP_ADDRESS       = 12'h320;
  localparam logic [11:0] REG_MAC_LOW          = 12'h324;
  localparam logic [11:0] REG_MAC_HIGH         = 12'h328;
  localparam logic [11:0] REG_ETH_TX_BYTE_LSB  = 12'h32C;
  localparam logic [11:0] REG_ETH_TX_BYTE_MSB  = 12'h330;
  localparam logic [11:0] REG_ETH_RX_BYTE_LSB  = 12'h334;
  localparam logic [11:0] REG_ETH_RX_BYTE_MSB  = 12'h338;

endpackage
