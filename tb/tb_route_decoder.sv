// tb_route_decoder: all 16 destinations through a first-, a middle- and a
// last-stage decoder (last stage = output switch 2). Expected sets come from
// the address bits: [3:2] = output switch, [1:0] = its port.
module tb_route_decoder;
  import noc_pkg::*;
  int checks = 0, failures = 0;

  logic [3:0] dest;
  logic [3:0] c_first, c_mid, c_last;

  route_decoder #(.STAGE(STAGE_FIRST))              d_first (.dest(dest), .cand(c_first));
  route_decoder #(.STAGE(STAGE_MIDDLE))             d_mid   (.dest(dest), .cand(c_mid));
  route_decoder #(.STAGE(STAGE_LAST), .SW_IDX(2))   d_last  (.dest(dest), .cand(c_last));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 16; d++) begin
      logic [3:0] exp_mid, exp_last;
      dest = 4'(d); #1;
      exp_mid  = 4'b0001 << dest[3:2];
      exp_last = (dest[3:2] == 2'd2) ? (4'b0001 << dest[1:0]) : 4'b0000;
      check(c_first == 4'b1111, $sformatf("first d=%0d got %b", d, c_first));
      check(c_mid == exp_mid,   $sformatf("middle d=%0d got %b", d, c_mid));
      check(c_last == exp_last, $sformatf("last d=%0d got %b", d, c_last));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
