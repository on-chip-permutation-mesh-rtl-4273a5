// tb_input_ctrl: walks the Input Control through every arc of its state
// machine, playing the arbiter and the downstream switch by hand:
//   first stage : probe -> request all outputs -> granted output 0 answers
//                 Back -> output 0 struck, release -> granted output 1 answers
//                 Ack -> ACK -> Transmit -> release -> Idle
//   first stage : probe with every output busy -> Backtrack -> Idle
//   first stage : granted output answers nAck -> nACK -> Idle
//   first stage : two Backs until the table is empty -> Backtrack
//   last stage  : destination port busy -> nACK; wrong switch -> nACK
// It checks the state, the answer sent upstream, the request mask and hold
// at every step, including that hold drops in the same clock a Back or nAck
// answer appears, before the next rising edge.
module tb_input_ctrl;
  import noc_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst = 1;

  req_e       req_in, req_l;
  logic [3:0] dest;
  logic [3:0] port_busy, grant_port, req_mask_f, req_mask_l;
  logic       granted;
  ans_e       ans_dn, ans_up_f, ans_up_l;
  logic [3:0] dn_port;          // output whose Output Control carries ans_dn
  ans_e [3:0] oc_ans;
  always_comb
    for (int o = 0; o < 4; o++) oc_ans[o] = dn_port[o] ? ans_dn : ANS_NONE;
  logic       hold_f, hold_l;
  ic_state_e  st_f, st_l;

  input_ctrl #(.STAGE(STAGE_FIRST)) dut_f (
    .clk, .rst, .req_in, .dest, .ans_up(ans_up_f), .port_busy, .granted,
    .grant_port, .oc_ans, .req_mask(req_mask_f), .hold(hold_f), .state(st_f));
  input_ctrl #(.STAGE(STAGE_LAST), .SW_IDX(1)) dut_l (
    .clk, .rst, .req_in(req_l), .dest, .ans_up(ans_up_l), .port_busy, .granted(1'b0),
    .grant_port(4'b0), .oc_ans('0), .req_mask(req_mask_l), .hold(hold_l), .state(st_l));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (state f=%s l=%s)", what, st_f.name(), st_l.name()); end
  endtask

  task automatic step();
    @(posedge clk); #1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req_in = REQ_IDLE; req_l = REQ_IDLE; dest = 4'd6; port_busy = '0; grant_port = '0; granted = 0; ans_dn = ANS_NONE; dn_port = '0;
    step(); step(); rst = 0;
    check(st_f == IC_IDLE && ans_up_f == ANS_NONE && req_mask_f == 0, "idle after reset");

    // --- Back, retry, Ack, Transmit, release
    req_in = REQ_PROBE;
    step();
    check(st_f == IC_PROBING, "probing after request");
    check(req_mask_f == 4'b1111, "first stage asks for every output");
    port_busy = 4'b0001;  #1;
    check(req_mask_f == 4'b1110, "busy output not asked for");
    port_busy = 4'b0000;
    granted = 1; grant_port = 4'b0001; dn_port = 4'b0001; #1;
    check(req_mask_f == 0 && hold_f, "holding output 0, no new request");
    step();
    check(st_f == IC_PROBING && ans_up_f == ANS_NONE, "waiting for answer");
    ans_dn = ANS_BACK; #1;
    check(!hold_f && req_mask_f == 0, "Back: output 0 given up before the next edge");
    granted = 0; grant_port = 0;     // arbiter takes it back on the falling edge
    step();
    check(st_f == IC_PROBING && req_mask_f == 4'b1110, "after Back: output 0 struck from table");
    ans_dn = ANS_NONE;
    granted = 1; grant_port = 4'b0010; dn_port = 4'b0010;
    step();
    ans_dn = ANS_ACK;
    step();
    check(st_f == IC_ACK && ans_up_f == ANS_ACK && hold_f, "ACK state");
    step();
    check(st_f == IC_TRANSMIT && ans_up_f == ANS_ACK && hold_f, "Transmit state");
    step();
    check(st_f == IC_TRANSMIT, "Transmit holds while requested");
    req_in = REQ_IDLE;
    step();
    check(st_f == IC_IDLE && !hold_f && ans_up_f == ANS_NONE, "release from Transmit");
    granted = 0; grant_port = 0; ans_dn = ANS_NONE;

    // --- all outputs busy -> Backtrack
    port_busy = 4'b1111; req_in = REQ_PROBE;
    step();
    check(st_f == IC_PROBING, "probing (all busy)");
    step();
    check(st_f == IC_BACKTRACK && ans_up_f == ANS_BACK && !hold_f, "backtrack when no output available");
    step();
    check(st_f == IC_BACKTRACK, "backtrack held until release");
    req_in = REQ_IDLE; port_busy = 0;
    step();
    check(st_f == IC_IDLE, "release from Backtrack");

    // --- nAck from downstream
    req_in = REQ_PROBE;
    step();
    granted = 1; grant_port = 4'b0100; dn_port = 4'b0100;
    step();
    ans_dn = ANS_NACK; #1;
    check(!hold_f, "nAck: output given up before the next edge");
    granted = 0; grant_port = 0;
    step();
    check(st_f == IC_NACK && ans_up_f == ANS_NACK && !hold_f, "nACK on busy destination");
    req_in = REQ_IDLE; ans_dn = ANS_NONE;
    step();
    check(st_f == IC_IDLE, "release from nACK");

    // --- Backs on the only two free outputs -> Backtrack
    port_busy = 4'b1100; req_in = REQ_PROBE;
    step();
    for (int p = 0; p < 2; p++) begin
      granted = 1; grant_port = 4'b1 << p; dn_port = 4'b1 << p; ans_dn = ANS_NONE;
      step();
      ans_dn = ANS_BACK; #1;
      granted = 0; grant_port = 0;
      step();
      ans_dn = ANS_NONE;
    end
    step();
    check(st_f == IC_BACKTRACK, "backtrack after every free output backed off");
    req_in = REQ_IDLE; port_busy = 0;
    step();

    // --- last stage (switch 1): dest 6 -> output 2
    dest = 4'd6; port_busy = 4'b0000; req_l = REQ_PROBE;
    step();
    check(st_l == IC_PROBING && req_mask_l == 4'b0100, "last stage asks for output 2 only");
    port_busy = 4'b0100;
    step();
    check(st_l == IC_NACK && ans_up_l == ANS_NACK, "last stage: busy destination port -> nACK");
    req_l = REQ_IDLE; port_busy = 0;
    step();
    check(st_l == IC_IDLE, "last stage release");
    dest = 4'd13; req_l = REQ_PROBE;
    step(); step();
    check(st_l == IC_NACK, "last stage: address of another switch -> nACK");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
