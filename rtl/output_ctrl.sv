// output_ctrl: Output Control (OC) of one switch output.
//
// A retiming stage between the arbiter and the downstream switch: on each
// rising edge it registers the request it sends downstream (Probe while an
// input owns this output, Idle otherwise) and the answer coming back up
// (ans_q, read by the owning Input Control). port_free tells the arbiter the
// output may be given out: nobody owns it, the registered request is Idle
// and the registered answer has returned to none. That last rule makes the
// downstream Input Control see at least one Idle (a release) between two
// circuits and keeps a stale answer from reaching the next owner; it is this
// design's choice, the retiming role itself follows the published design.
module output_ctrl
  import noc_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic owned,
  input  ans_e ans_in,
  output req_e req_out,
  output ans_e ans_q,
  output logic port_free
);

  always_ff @(posedge clk) begin
    if (rst) begin
      req_out <= REQ_IDLE;
      ans_q   <= ANS_NONE;
    end else begin
      req_out <= owned ? REQ_PROBE : REQ_IDLE;
      ans_q   <= ans_in;
    end
  end

  assign port_free = !owned && req_out == REQ_IDLE && ans_q == ANS_NONE;

endmodule
