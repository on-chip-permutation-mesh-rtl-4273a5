// crossbar: data path of a switch.
//
// One multiplexer per output; output o carries input sel[o] while en[o] (the
// output is owned by an input) and all zeros otherwise. It is combinational,
// so words go straight through an established circuit without being stored
// in the switch: a word leaves the source and reaches the destination in the
// same clock cycle. The mux-per-output structure follows the published switch
// diagram; the zero value of an unowned output is this design's choice.
module crossbar
  import noc_pkg::*;
#(
  parameter int unsigned NUM_IN  = 4,
  parameter int unsigned NUM_OUT = 4,
  localparam int unsigned SW = (NUM_IN > 1) ? $clog2(NUM_IN) : 1
) (
  input  flit_t [NUM_IN-1:0]          flit_in,
  input  logic  [NUM_OUT-1:0][SW-1:0] sel,
  input  logic  [NUM_OUT-1:0]         en,
  output flit_t [NUM_OUT-1:0]         flit_out
);

  always_comb begin
    for (int unsigned o = 0; o < NUM_OUT; o++) begin
      flit_out[o] = '0;
      for (int unsigned i = 0; i < NUM_IN; i++)
        if (en[o] && sel[o] == SW'(i)) flit_out[o] = flit_in[i];
    end
  end

endmodule
