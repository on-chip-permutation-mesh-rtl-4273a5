// tb_output_ctrl: random ownership and answers; Req out and the answer to
// the owning input must be the inputs delayed by one rising edge, and the
// output may only be offered (port_free) when it is unowned, its request is
// Idle and its answer is none.
module tb_output_ctrl;
  import noc_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst = 1;
  logic owned;
  ans_e ans_in;
  req_e req_out;
  ans_e ans_q;
  logic port_free;

  output_ctrl dut (.clk, .rst, .owned, .ans_in, .req_out, .ans_q, .port_free);

  always #5 clk = ~clk;

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
    logic prev_owned;
    ans_e prev_ans;
    int   frees = 0;
    owned = 0; ans_in = ANS_NONE;
    @(posedge clk); #1 rst = 0;
    check(req_out == REQ_IDLE && ans_q == ANS_NONE && port_free, "after reset");
    prev_owned = 0; prev_ans = ANS_NONE;
    for (int t = 0; t < 300; t++) begin
      owned  = ($urandom % 3) != 0;
      ans_in = ans_e'($urandom % 4);
      prev_owned = owned; prev_ans = ans_in;
      @(posedge clk); #1;
      check(req_out == (prev_owned ? REQ_PROBE : REQ_IDLE), $sformatf("t=%0d req_out", t));
      check(ans_q == prev_ans, $sformatf("t=%0d ans_q", t));
      owned = 0; #1;
      check(port_free == (req_out == REQ_IDLE && ans_q == ANS_NONE), $sformatf("t=%0d free", t));
      if (port_free) frees++;
      owned = 1; #1;
      check(!port_free, $sformatf("t=%0d owned but free", t));
    end
    check(frees > 0, "port was never free");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
