// switch_arbiter: output allocator of one switch.
//
// Every Input Control (IC) that is probing and holds no output presents the
// set of outputs it would accept (req_mask). On each falling clock edge the
// arbiter (1) frees every output whose owning IC has dropped `hold`, and
// (2) picks one winner among the ICs whose request meets a free output and
// gives it the lowest-numbered such output. An output counts as free when no
// IC owns it and its Output Control reports the link idle (port_free).
//
// The winner is chosen by the scheme on the `scheme` input, which can be
// changed at run time:
//   ARB_ROUND_ROBIN : search starts at the IC after the previous winner;
//   ARB_DYNAMIC     : each IC that asks and is not served ages by one per
//                     cycle (also while its outputs are busy); the oldest
//                     eligible IC wins, ties to the lowest index;
//   ARB_FIXED       : the lowest IC index wins.
// The three schemes and the falling-edge timing follow the published design;
// the age counters, one grant per cycle and the lowest-free-output rule are
// this design's choices.
//
// Outputs: owner[o] is the one-hot owner of output o; grant_port[i] is the
// one-hot output held by IC i, granted[i] says it holds one. All registered
// on the falling edge, so ICs (rising edge) see a grant half a cycle later.
module switch_arbiter
  import noc_pkg::*;
#(
  parameter int unsigned NUM_IN  = 4,
  parameter int unsigned NUM_OUT = 4,
  parameter int unsigned AGE_W   = 4
) (
  input  logic                             clk,
  input  logic                             rst,
  input  arb_scheme_e                      scheme,
  input  logic [NUM_IN-1:0][NUM_OUT-1:0]   req_mask,
  input  logic [NUM_IN-1:0]                hold,
  input  logic [NUM_OUT-1:0]               port_free,
  output logic [NUM_OUT-1:0][NUM_IN-1:0]   owner,
  output logic [NUM_IN-1:0]                granted,
  output logic [NUM_IN-1:0][NUM_OUT-1:0]   grant_port
);

  localparam int unsigned IW = (NUM_IN > 1) ? $clog2(NUM_IN) : 1;

  logic [NUM_OUT-1:0][NUM_IN-1:0] owner_q;
  logic [IW-1:0]                  rr_ptr_q;
  logic [NUM_IN-1:0][AGE_W-1:0]   age_q;

  logic [NUM_OUT-1:0] owned, avail;
  logic [NUM_IN-1:0]  eligible;
  logic               win_valid;
  logic [IW-1:0]      win;
  logic [NUM_OUT-1:0] win_port;      // one-hot output given to the winner

  always_comb begin
    for (int unsigned o = 0; o < NUM_OUT; o++) owned[o] = |owner_q[o];
    avail = port_free & ~owned;
    for (int unsigned i = 0; i < NUM_IN; i++)
      eligible[i] = |(req_mask[i] & avail) && !(|grant_port[i]);
  end

  // Winner selection.
  always_comb begin
    logic [AGE_W-1:0] best_age;
    logic [IW-1:0]    k;
    win_valid = 1'b0;
    win       = '0;
    best_age  = '0;
    k         = '0;
    unique case (scheme)
      ARB_ROUND_ROBIN: begin
        for (int unsigned n = 0; n < NUM_IN; n++) begin
          k = IW'((32'(rr_ptr_q) + n) % NUM_IN);
          if (!win_valid && eligible[k]) begin
            win_valid = 1'b1;
            win       = k;
          end
        end
      end
      ARB_DYNAMIC: begin
        for (int unsigned i = 0; i < NUM_IN; i++)
          if (eligible[i] && (!win_valid || age_q[i] > best_age)) begin
            win_valid = 1'b1;
            win       = IW'(i);
            best_age  = age_q[i];
          end
      end
      default: begin
        for (int unsigned i = 0; i < NUM_IN; i++)
          if (!win_valid && eligible[i]) begin
            win_valid = 1'b1;
            win       = IW'(i);
          end
      end
    endcase
  end

  // Lowest free output in the winner's request.
  always_comb begin
    logic [NUM_OUT-1:0] cand;
    logic               found;
    cand     = req_mask[win] & avail;
    win_port = '0;
    found    = 1'b0;
    for (int unsigned o = 0; o < NUM_OUT; o++)
      if (!found && cand[o]) begin
        win_port[o] = 1'b1;
        found       = 1'b1;
      end
  end

  always_ff @(negedge clk) begin
    if (rst) begin
      owner_q  <= '0;
      rr_ptr_q <= '0;
      age_q    <= '0;
    end else begin
      for (int unsigned o = 0; o < NUM_OUT; o++) begin
        if ((owner_q[o] & ~hold) != '0) owner_q[o] <= '0;
        if (win_valid && win_port[o]) owner_q[o] <= NUM_IN'(1) << win;
      end
      if (win_valid)
        rr_ptr_q <= IW'((32'(win) + 1) % NUM_IN);
      for (int unsigned i = 0; i < NUM_IN; i++) begin
        if (req_mask[i] == '0 || (|grant_port[i]) || (win_valid && win == IW'(i)))
          age_q[i] <= '0;
        else if (age_q[i] != '1)
          age_q[i] <= age_q[i] + 1'b1;
      end
    end
  end

  always_comb begin
    owner = owner_q;
    for (int unsigned i = 0; i < NUM_IN; i++) begin
      for (int unsigned o = 0; o < NUM_OUT; o++) grant_port[i][o] = owner_q[o][i];
      granted[i] = |grant_port[i];
    end
  end

  // An output has at most one owner and an IC holds at most one output.
  for (genvar o = 0; o < NUM_OUT; o++) begin : g_chk_out
    a_one_owner: assert property (@(posedge clk) disable iff (rst) $onehot0(owner_q[o]));
  end
  for (genvar i = 0; i < NUM_IN; i++) begin : g_chk_in
    a_one_port: assert property (@(posedge clk) disable iff (rst) $onehot0(grant_port[i]));
  end

endmodule
