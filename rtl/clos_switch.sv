// clos_switch: one circuit switch of the three-stage network.
//
// Control part: one Input Control per input (probe FSM with its address
// decoder), one Output Control per output (retiming of Req/Ans), and one
// arbiter that gives outputs to probing inputs on the falling clock edge.
// Data part: a crossbar of muxes whose selects come from the arbiter's
// one-hot ownership through grant encoders. The block set (ICs, OCs, arbiter,
// muxes, encoder/decoder) follows the published switch; the generic input and
// output counts are this design's, so the module serves every stage.
//
// Links: each input has Req in / Ans out / flit in; each output has Req out /
// Ans in / flit out (see noc_pkg for the codes). A probe takes one rising
// edge to be seen by an IC, half a cycle to be granted, and one more rising
// edge to leave through the OC. Established circuits pass data
// combinationally.
module clos_switch
  import noc_pkg::*;
#(
  parameter stage_e      STAGE   = STAGE_FIRST,
  parameter int unsigned NUM_IN  = 4,
  parameter int unsigned NUM_OUT = 4,
  parameter int unsigned N       = 4,
  parameter int unsigned SW_IDX  = 0
) (
  input  logic                    clk,
  input  logic                    rst,
  input  arb_scheme_e             scheme,
  input  req_e  [NUM_IN-1:0]      req_in,
  output ans_e  [NUM_IN-1:0]      ans_up,
  input  flit_t [NUM_IN-1:0]      flit_in,
  output req_e  [NUM_OUT-1:0]     req_out,
  input  ans_e  [NUM_OUT-1:0]     ans_dn,
  output flit_t [NUM_OUT-1:0]     flit_out,
  output ic_state_e [NUM_IN-1:0]  ic_state
);

  localparam int unsigned SW = (NUM_IN > 1) ? $clog2(NUM_IN) : 1;

  logic [NUM_IN-1:0][NUM_OUT-1:0] req_mask, grant_port;
  logic [NUM_IN-1:0]              hold, granted;
  logic [NUM_OUT-1:0][NUM_IN-1:0] owner;
  logic [NUM_OUT-1:0]             port_free, owned;
  logic [NUM_OUT-1:0][SW-1:0]     sel;
  ans_e [NUM_OUT-1:0]             oc_ans;

  switch_arbiter #(
    .NUM_IN (NUM_IN),
    .NUM_OUT(NUM_OUT)
  ) u_arb (
    .clk       (clk),
    .rst       (rst),
    .scheme    (scheme),
    .req_mask  (req_mask),
    .hold      (hold),
    .port_free (port_free),
    .owner     (owner),
    .granted   (granted),
    .grant_port(grant_port)
  );

  for (genvar o = 0; o < NUM_OUT; o++) begin : g_out
    grant_encoder #(.N(NUM_IN)) u_enc (
      .onehot(owner[o]),
      .idx   (sel[o]),
      .any   (owned[o])
    );
    output_ctrl u_oc (
      .clk      (clk),
      .rst      (rst),
      .owned    (owned[o]),
      .ans_in   (ans_dn[o]),
      .req_out  (req_out[o]),
      .ans_q    (oc_ans[o]),
      .port_free(port_free[o])
    );
  end

  for (genvar i = 0; i < NUM_IN; i++) begin : g_in
    input_ctrl #(
      .STAGE  (STAGE),
      .NUM_OUT(NUM_OUT),
      .N      (N),
      .SW_IDX (SW_IDX)
    ) u_ic (
      .clk       (clk),
      .rst       (rst),
      .req_in    (req_in[i]),
      .dest      (flit_in[i].addr),
      .ans_up    (ans_up[i]),
      .port_busy (~port_free),
      .granted   (granted[i]),
      .grant_port(grant_port[i]),
      .oc_ans    (oc_ans),
      .req_mask  (req_mask[i]),
      .hold      (hold[i]),
      .state     (ic_state[i])
    );
  end

  crossbar #(
    .NUM_IN (NUM_IN),
    .NUM_OUT(NUM_OUT)
  ) u_xbar (
    .flit_in (flit_in),
    .sel     (sel),
    .en      (owned),
    .flit_out(flit_out)
  );

endmodule
