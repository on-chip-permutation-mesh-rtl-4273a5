// input_ctrl: Input Control (IC) of one switch input; runs backtracking probes.
//
// State machine (rising clock edge):
//   Idle      --Req=Probe--> Probing; the probe header's destination is
//             decoded into the route-probing table (outputs still worth trying)
//   Probing   no probe outstanding: asks the arbiter for any table entry that
//             is free. When none is free: in the last stage the destination
//             port is taken, so -> nACK ("busy destination"); elsewhere the
//             network is blocked with no port left -> Backtrack.
//             probe outstanding on an output: waits for its answer
//               Ack  -> ACK
//               nAck -> nACK (destination busy)
//               Back -> that output is struck from the table; the IC stays
//                       in Probing and tries what is left
//   ACK       -> Transmit after one cycle
//   Transmit, Backtrack, nACK --Req=Idle (release)--> Idle
// The answer sent upstream is Ack in ACK/Transmit, Back in Backtrack, nAck in
// nACK and none otherwise (Moore outputs of the state register).
//
// Release on Back or nAck: `hold` drops as soon as the retimed answer of the
// owned output shows Back or nAck, so the arbiter frees the link on the next
// falling edge, in the clock after the answer reached this switch. The IC
// remembers the output it probed (port_q) so that it can still act on that
// answer on the following rising edge, after the arbiter has taken the
// output back.
//
// The states and their arcs follow the published state diagram, as does the
// release of a backtracked link in the next clock. Reading a Back answer as
// "net blocked" and the one-cycle ACK state are this design's choices.
//
// Interface with the arbiter: req_mask = free table entries while probing
// with nothing outstanding; hold = keep the owned output; granted/grant_port
// come back from the arbiter (falling edge); oc_ans are the registered
// answers of all this switch's Output Controls.
module input_ctrl
  import noc_pkg::*;
#(
  parameter stage_e      STAGE   = STAGE_FIRST,
  parameter int unsigned NUM_OUT = 4,
  parameter int unsigned N       = 4,
  parameter int unsigned SW_IDX  = 0
) (
  input  logic               clk,
  input  logic               rst,
  input  req_e               req_in,
  input  logic [ADDR_W-1:0]  dest,
  output ans_e               ans_up,
  input  logic [NUM_OUT-1:0] port_busy,
  input  logic               granted,
  input  logic [NUM_OUT-1:0] grant_port,
  input  ans_e [NUM_OUT-1:0] oc_ans,
  output logic [NUM_OUT-1:0] req_mask,
  output logic               hold,
  output ic_state_e          state
);

  logic [NUM_OUT-1:0] cand, table_q, avail, port_q, cur_port;
  logic               have_q, pending;
  ans_e               ans_dn;

  route_decoder #(
    .STAGE  (STAGE),
    .NUM_OUT(NUM_OUT),
    .N      (N),
    .SW_IDX (SW_IDX)
  ) u_dec (
    .dest(dest),
    .cand(cand)
  );

  assign avail = table_q & ~port_busy;

  // The output probed: the granted one, or the one just taken back after a
  // Back or nAck. Its registered answer is the downstream answer.
  assign cur_port = granted ? grant_port : port_q;
  assign pending  = granted || have_q;
  always_comb begin
    ans_dn = ANS_NONE;
    for (int unsigned o = 0; o < NUM_OUT; o++)
      if (cur_port[o]) ans_dn = oc_ans[o];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= IC_IDLE;
      table_q <= '0;
      port_q  <= '0;
      have_q  <= 1'b0;
    end else begin
      if (granted) port_q <= grant_port;
      unique case (state)
        IC_IDLE: begin
          have_q <= 1'b0;
          if (req_in == REQ_PROBE) begin
            state   <= IC_PROBING;
            table_q <= cand;
          end
        end
        IC_PROBING: begin
          if (pending) begin
            unique case (ans_dn)
              ANS_ACK:  begin state <= IC_ACK;  have_q <= 1'b0; end
              ANS_NACK: begin state <= IC_NACK; have_q <= 1'b0; end
              ANS_BACK: begin
                table_q <= table_q & ~cur_port;
                have_q  <= 1'b0;
              end
              default: have_q <= 1'b1;
            endcase
          end else if (avail == '0) begin
            state <= (STAGE == STAGE_LAST) ? IC_NACK : IC_BACKTRACK;
          end
        end
        IC_ACK: state <= IC_TRANSMIT;
        default: if (req_in == REQ_IDLE) state <= IC_IDLE;
      endcase
    end
  end

  always_comb begin
    unique case (state)
      IC_ACK, IC_TRANSMIT: ans_up = ANS_ACK;
      IC_BACKTRACK:        ans_up = ANS_BACK;
      IC_NACK:             ans_up = ANS_NACK;
      default:             ans_up = ANS_NONE;
    endcase
  end

  assign hold     = (state == IC_PROBING && ans_dn != ANS_BACK && ans_dn != ANS_NACK) ||
                    state == IC_ACK || state == IC_TRANSMIT;
  assign req_mask = (state == IC_PROBING && !pending) ? avail : '0;

  // Upstream keeps probing until it has an answer: no release while probing.
  a_no_abort: assert property (@(posedge clk) disable iff (rst)
    state == IC_PROBING |-> req_in == REQ_PROBE);

endmodule
