// route_decoder: address decoder of an Input Control.
//
// From the stage of the switch, the switch's index within its stage and the
// destination address carried by the probe header, it gives the set of
// outputs the probe may take (the initial route-probing table):
//   first stage  : every output, i.e. any middle-stage switch;
//   middle stage : the single output leading to output switch dest / N;
//   last stage   : output dest % N, and only if dest / N is this switch's
//                  own index (otherwise the set is empty).
// N is the number of nodes per edge switch. Combinational. The rule follows
// the wiring of the three-stage network; node address bits [3:2] select the
// output switch and bits [1:0] its port.
module route_decoder
  import noc_pkg::*;
#(
  parameter stage_e      STAGE   = STAGE_MIDDLE,
  parameter int unsigned NUM_OUT = 4,
  parameter int unsigned N       = 4,
  parameter int unsigned SW_IDX  = 0
) (
  input  logic [ADDR_W-1:0]  dest,
  output logic [NUM_OUT-1:0] cand
);

  int unsigned grp, off;

  always_comb begin
    grp  = 32'(dest) / N;
    off  = 32'(dest) % N;
    cand = '0;
    unique case (STAGE)
      STAGE_FIRST:  cand = '1;
      STAGE_MIDDLE: begin
        for (int unsigned o = 0; o < NUM_OUT; o++)
          if (grp == o) cand[o] = 1'b1;
      end
      default: begin
        for (int unsigned o = 0; o < NUM_OUT; o++)
          if (grp == SW_IDX && off == o) cand[o] = 1'b1;
      end
    endcase
  end

endmodule
