// net_iface: network interface (wrapper) between a node and the network.
//
// Transmit side. tx_start (with tx_dest and tx_len) begins a transfer. The
// interface drives Req = Probe with the destination in the probe header and
// waits for the first-stage switch's answer:
//   Ack        -> the circuit is set up; tx_len words are sent, one per
//                 clock (tx_pop marks the cycle that takes tx_data), and the
//                 circuit is released (Req = Idle) once all are sent;
//   nAck, Back -> the attempt failed (tx_nack / tx_back pulse); it releases,
//                 waits RETRY_GAP + NODE_ID clocks and probes again.
// After a release it waits for the answer to return to none before it
// finishes (tx_done pulse) or retries. tx_busy is high from start to done.
// A transfer of zero words sets up and releases a circuit.
//
// Receive side. When the last-stage switch presents Req = Probe the
// interface answers nAck if the node says rx_busy, Ack otherwise, and keeps
// that answer until Req returns to Idle. While it answers Ack, every valid
// word arriving is passed on with rx_valid.
//
// Holding the circuit until the whole transfer is done follows the published
// design; the interface's timing, the retry rule and the status pulses are
// this design's choices, since only the interface's role is published.
module net_iface
  import noc_pkg::*;
#(
  parameter int unsigned NODE_ID   = 0,
  parameter int unsigned LEN_W     = 8,
  parameter int unsigned RETRY_GAP = 4
) (
  input  logic              clk,
  input  logic              rst,
  // node, transmit
  input  logic              tx_start,
  input  logic [ADDR_W-1:0] tx_dest,
  input  logic [LEN_W-1:0]  tx_len,
  input  logic [DATA_W-1:0] tx_data,
  output logic              tx_pop,
  output logic              tx_busy,
  output logic              tx_done,
  output logic              tx_nack,
  output logic              tx_back,
  // link to the first-stage switch
  output req_e              net_req,
  output flit_t             net_flit,
  input  ans_e              net_ans,
  // link from the last-stage switch
  input  req_e              sink_req,
  input  flit_t             sink_flit,
  output ans_e              sink_ans,
  // node, receive
  input  logic              rx_busy,
  output logic              rx_valid,
  output logic [DATA_W-1:0] rx_data
);

  typedef enum logic [2:0] {
    TX_IDLE, TX_PROBE, TX_SEND, TX_RELEASE, TX_BACKOFF
  } tx_state_e;

  localparam int unsigned GAP   = RETRY_GAP + NODE_ID;
  localparam int unsigned GAP_W = $clog2(GAP + 2);

  tx_state_e         tx_state;
  logic [ADDR_W-1:0] dest_q;
  logic [LEN_W-1:0]  len_q, cnt_q;
  logic              ok_q;
  logic [GAP_W-1:0]  gap_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      tx_state <= TX_IDLE;
      dest_q   <= '0;
      len_q    <= '0;
      cnt_q    <= '0;
      ok_q     <= 1'b0;
      gap_q    <= '0;
      tx_done  <= 1'b0;
      tx_nack  <= 1'b0;
      tx_back  <= 1'b0;
    end else begin
      tx_done <= 1'b0;
      tx_nack <= 1'b0;
      tx_back <= 1'b0;
      unique case (tx_state)
        TX_IDLE: if (tx_start) begin
          dest_q   <= tx_dest;
          len_q    <= tx_len;
          tx_state <= TX_PROBE;
        end
        TX_PROBE: begin
          cnt_q <= '0;
          unique case (net_ans)
            ANS_ACK: begin
              ok_q     <= 1'b1;
              tx_state <= (len_q == '0) ? TX_RELEASE : TX_SEND;
            end
            ANS_NACK, ANS_BACK: begin
              ok_q     <= 1'b0;
              tx_nack  <= net_ans == ANS_NACK;
              tx_back  <= net_ans == ANS_BACK;
              tx_state <= TX_RELEASE;
            end
            default: ;
          endcase
        end
        TX_SEND: begin
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == len_q - 1'b1) tx_state <= TX_RELEASE;
        end
        TX_RELEASE: if (net_ans == ANS_NONE) begin
          if (ok_q) begin
            tx_done  <= 1'b1;
            tx_state <= TX_IDLE;
          end else begin
            gap_q    <= GAP_W'(GAP);
            tx_state <= TX_BACKOFF;
          end
        end
        default: begin
          if (gap_q == '0) tx_state <= TX_PROBE;
          else gap_q <= gap_q - 1'b1;
        end
      endcase
    end
  end

  assign tx_busy        = tx_state != TX_IDLE;
  assign tx_pop         = tx_state == TX_SEND;
  assign net_req        = (tx_state == TX_PROBE || tx_state == TX_SEND) ? REQ_PROBE : REQ_IDLE;
  assign net_flit.valid = tx_pop;
  assign net_flit.addr  = dest_q;
  assign net_flit.data  = tx_pop ? tx_data : '0;

  // Receive side.
  always_ff @(posedge clk) begin
    if (rst) begin
      sink_ans <= ANS_NONE;
    end else if (sink_req == REQ_IDLE) begin
      sink_ans <= ANS_NONE;
    end else if (sink_ans == ANS_NONE) begin
      sink_ans <= rx_busy ? ANS_NACK : ANS_ACK;
    end
  end

  assign rx_valid = sink_ans == ANS_ACK && sink_flit.valid;
  assign rx_data  = sink_flit.data;

  // A word delivered here must have been addressed to this node.
  a_right_node: assert property (@(posedge clk) disable iff (rst)
    rx_valid |-> sink_flit.addr == ADDR_W'(NODE_ID));

endmodule
