// tb_clos_switch: one switch of each stage, with upstream requests driven by
// hand and every downstream link played by a model that answers a Probe one
// clock later with a per-output programmed answer and withdraws it when the
// request returns to Idle.
//   first stage : two simultaneous probes get two different outputs and both
//                 acknowledge; data passes straight through to the owned
//                 outputs; a probe whose first outputs answer Back moves on to
//                 the next output (network blocked, ports left); with every
//                 output answering Back it backtracks; nAck is passed up.
//                 The probe leaves the switch two rising edges after it
//                 arrives.
//   middle stage: two probes for the same output switch: one Ack, one Back.
//   last stage  : two probes for the same node: one Ack, one nAck.
module tb_clos_switch;
  import noc_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst = 1;
  arb_scheme_e scheme = ARB_ROUND_ROBIN;

  req_e  [2:0][3:0] req_in, req_out;
  ans_e  [2:0][3:0] ans_up, ans_dn;
  flit_t [2:0][3:0] flit_in, flit_out;
  ans_e  [2:0][3:0] dn_answer;        // what each downstream link answers

  clos_switch #(.STAGE(STAGE_FIRST), .SW_IDX(0)) sw_first (
    .clk, .rst, .scheme, .req_in(req_in[0]), .ans_up(ans_up[0]), .flit_in(flit_in[0]),
    .req_out(req_out[0]), .ans_dn(ans_dn[0]), .flit_out(flit_out[0]), .ic_state());
  clos_switch #(.STAGE(STAGE_MIDDLE), .SW_IDX(2)) sw_mid (
    .clk, .rst, .scheme, .req_in(req_in[1]), .ans_up(ans_up[1]), .flit_in(flit_in[1]),
    .req_out(req_out[1]), .ans_dn(ans_dn[1]), .flit_out(flit_out[1]), .ic_state());
  clos_switch #(.STAGE(STAGE_LAST), .SW_IDX(3)) sw_last (
    .clk, .rst, .scheme, .req_in(req_in[2]), .ans_up(ans_up[2]), .flit_in(flit_in[2]),
    .req_out(req_out[2]), .ans_dn(ans_dn[2]), .flit_out(flit_out[2]), .ic_state());

  always #5 clk = ~clk;

  // Downstream models.
  always_ff @(posedge clk) begin
    for (int s = 0; s < 3; s++)
      for (int o = 0; o < 4; o++)
        if (rst || req_out[s][o] == REQ_IDLE) ans_dn[s][o] <= ANS_NONE;
        else if (ans_dn[s][o] == ANS_NONE)    ans_dn[s][o] <= dn_answer[s][o];
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic step(input int n = 1);
    repeat (n) @(posedge clk);
    #1;
  endtask

  // Wait until input i of switch s answers something; return the answer.
  task automatic wait_ans(input int s, input int i, output ans_e a, output int cycles);
    cycles = 0;
    while (ans_up[s][i] == ANS_NONE && cycles < 100) begin step(); cycles++; end
    a = ans_up[s][i];
  endtask

  function automatic int count_probe(input int s);
    int n = 0;
    for (int o = 0; o < 4; o++) if (req_out[s][o] == REQ_PROBE) n++;
    return n;
  endfunction

  task automatic release_all();
    req_in = '0;
    step(8);
    for (int s = 0; s < 3; s++) check(count_probe(s) == 0, $sformatf("switch %0d released", s));
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ans_e a, b;
    int   c, d;
    req_in = '0; flit_in = '0;
    for (int s = 0; s < 3; s++) for (int o = 0; o < 4; o++) dn_answer[s][o] = ANS_ACK;
    step(3); rst = 0; step();

    // --- first stage: two probes at once, both acknowledged
    flit_in[0][0] = '{valid: 1'b0, addr: 4'd9,  data: 32'h0};
    flit_in[0][1] = '{valid: 1'b0, addr: 4'd10, data: 32'h0};
    req_in[0][0] = REQ_PROBE; req_in[0][1] = REQ_PROBE;
    step(2);
    check(count_probe(0) >= 1, "a probe leaves the switch two edges after arriving");
    wait_ans(0, 0, a, c);
    wait_ans(0, 1, b, d);
    check(a == ANS_ACK && b == ANS_ACK, "both probes acknowledged");
    check(count_probe(0) == 2, "two outputs in use");
    // data straight through, each input on its own output
    flit_in[0][0] = '{valid: 1'b1, addr: 4'd9,  data: 32'hA5A5_1234};
    flit_in[0][1] = '{valid: 1'b1, addr: 4'd10, data: 32'h5A5A_8765};
    #1;
    begin
      int n0, n1;
      n0 = 0; n1 = 0;
      for (int o = 0; o < 4; o++) begin
        if (flit_out[0][o] == flit_in[0][0]) n0++;
        if (flit_out[0][o] == flit_in[0][1]) n1++;
        if (req_out[0][o] == REQ_IDLE) check(flit_out[0][o] == '0, "idle output carries zero");
      end
      check(n0 == 1 && n1 == 1, "each input's data on exactly one output");
    end
    release_all();
    check(ans_up[0][0] == ANS_NONE && ans_up[0][1] == ANS_NONE, "inputs idle after release");

    // --- first stage: outputs 0 and 1 answer Back, output 2 Ack
    dn_answer[0] = '{ANS_ACK, ANS_ACK, ANS_BACK, ANS_BACK};   // index 3..0
    flit_in[0][2] = '{valid: 1'b0, addr: 4'd7, data: 32'h0};
    req_in[0][2] = REQ_PROBE;
    wait_ans(0, 2, a, c);
    check(a == ANS_ACK, "probe moves on after Backs and is acknowledged");
    check(req_out[0][2] == REQ_PROBE && req_out[0][0] == REQ_IDLE && req_out[0][1] == REQ_IDLE,
          "path uses output 2 after outputs 0 and 1 backed off");
    release_all();

    // --- first stage: every output Back -> backtrack upstream
    dn_answer[0] = {4{ANS_BACK}};
    req_in[0][3] = REQ_PROBE;
    wait_ans(0, 3, a, c);
    check(a == ANS_BACK, "backtrack when every output backs off");
    release_all();

    // --- first stage: nAck passed up
    dn_answer[0] = {4{ANS_NACK}};
    req_in[0][0] = REQ_PROBE;
    wait_ans(0, 0, a, c);
    check(a == ANS_NACK, "nAck passed upstream");
    release_all();

    // --- middle stage (switch 2): two probes for output switch 1
    flit_in[1][0] = '{valid: 1'b0, addr: 4'd5, data: 32'h0};
    flit_in[1][3] = '{valid: 1'b0, addr: 4'd6, data: 32'h0};
    req_in[1][0] = REQ_PROBE; req_in[1][3] = REQ_PROBE;
    wait_ans(1, 0, a, c);
    wait_ans(1, 3, b, d);
    check((a == ANS_ACK && b == ANS_BACK) || (a == ANS_BACK && b == ANS_ACK),
          "middle stage: one Ack, one Back for the same output");
    check(req_out[1] == {REQ_IDLE, REQ_IDLE, REQ_PROBE, REQ_IDLE}, "middle stage uses output 1 only");
    release_all();

    // --- last stage (switch 3): two probes for node 14
    flit_in[2][1] = '{valid: 1'b0, addr: 4'd14, data: 32'h0};
    flit_in[2][2] = '{valid: 1'b0, addr: 4'd14, data: 32'h0};
    req_in[2][1] = REQ_PROBE; req_in[2][2] = REQ_PROBE;
    wait_ans(2, 1, a, c);
    wait_ans(2, 2, b, d);
    check((a == ANS_ACK && b == ANS_NACK) || (a == ANS_NACK && b == ANS_ACK),
          "last stage: one Ack, one nAck for the same node");
    check(req_out[2][2] == REQ_PROBE, "last stage drives output 2 for node 14");
    release_all();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
