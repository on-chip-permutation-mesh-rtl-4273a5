// noc_pkg: types and constants shared by the permutation network.
//
// The network connects 16 nodes, so a destination address is 4 bits. Data
// words are 32 bits wide. The width is a design choice: the published design
// quotes about 30 Gbit/s at 100 MHz, which 16 nodes reach only with words of
// at least 19 bits; 32 bits give 16 x 32 x 100 MHz = 51.2 Gbit/s.
//
// Handshake codes between an upstream Output Control (or node interface) and
// a downstream Input Control:
//   Req (downstream):  00 Idle (release / nothing), 01 Probe (set up and hold)
//   Ans (upstream):    00 none, 01 Ack, 10 Back (backtrack), 11 nAck
// Ack = 01 and nAck = 11 follow the published encoding; Back on the answer
// wires (10) and Probe = 01 on the request wires are this design's reading,
// chosen because a backtrack is sent toward the upstream switch.
package noc_pkg;

  localparam int unsigned ADDR_W = 4;   // 16 nodes
  localparam int unsigned DATA_W = 32;  // data word width

  typedef enum logic [1:0] {
    REQ_IDLE  = 2'b00,
    REQ_PROBE = 2'b01
  } req_e;

  typedef enum logic [1:0] {
    ANS_NONE = 2'b00,
    ANS_ACK  = 2'b01,
    ANS_BACK = 2'b10,
    ANS_NACK = 2'b11
  } ans_e;

  // What travels forward on a link: the probe header (destination address)
  // next to the data word and its valid bit.
  typedef struct packed {
    logic              valid;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] data;
  } flit_t;


  typedef enum logic [1:0] {
    ARB_ROUND_ROBIN = 2'd0,
    ARB_DYNAMIC     = 2'd1,
    ARB_FIXED       = 2'd2
  } arb_scheme_e;

  typedef enum logic [2:0] {
    IC_IDLE      = 3'd0,
    IC_PROBING   = 3'd1,
    IC_ACK       = 3'd2,
    IC_TRANSMIT  = 3'd3,
    IC_BACKTRACK = 3'd4,
    IC_NACK      = 3'd5
  } ic_state_e;

  typedef enum logic [1:0] {
    STAGE_FIRST  = 2'd0,
    STAGE_MIDDLE = 2'd1,
    STAGE_LAST   = 2'd2
  } stage_e;

endpackage
