// tb_net_iface: the network side is played by the testbench.
//   transmit: a 4-word transfer is refused once with nAck and once with Back
//             (each attempt is released and retried after the back-off),
//             then acknowledged; the four words must go out on four
//             consecutive clocks with the right data, the circuit must be
//             released and tx_done must pulse once.
//   receive : a probe while the node is busy gets nAck; after release and
//             with the node ready it gets Ack; valid words are delivered.
module tb_net_iface;
  import noc_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst = 1;
  logic tx_start, tx_pop, tx_busy, tx_done, tx_nack, tx_back;
  logic [3:0]  tx_dest;
  logic [7:0]  tx_len;
  logic [DATA_W-1:0] tx_data, rx_data;
  req_e  net_req, sink_req;
  flit_t net_flit, sink_flit;
  ans_e  net_ans, sink_ans;
  logic  rx_busy, rx_valid;

  net_iface #(.NODE_ID(3)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic step(input int n = 1);
    repeat (n) @(posedge clk);
    #1;
  endtask

  // Node-side data source: word k of the transfer is 32'hC0DE_0000 + k.
  int word_k;
  assign tx_data = 32'hC0DE_0000 + 32'(word_k);
  always @(posedge clk) if (tx_pop) word_k <= word_k + 1;

  int dones = 0, nacks = 0, backs = 0;
  always @(posedge clk) if (!rst) begin
    if (tx_done) dones++;
    if (tx_nack) nacks++;
    if (tx_back) backs++;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, first_pop, last_pop, pops;
    word_k = 0;
    tx_start = 0; tx_dest = 0; tx_len = 0; net_ans = ANS_NONE;
    sink_req = REQ_IDLE; sink_flit = '0; rx_busy = 0;
    step(3); rst = 0; step();
    check(!tx_busy && net_req == REQ_IDLE, "idle after reset");

    tx_start = 1; tx_dest = 4'd11; tx_len = 8'd4;
    step();
    tx_start = 0;
    check(tx_busy && net_req == REQ_PROBE && net_flit.addr == 4'd11 && !net_flit.valid,
          "probe with destination in the header");
    // refuse with nAck
    step(2); net_ans = ANS_NACK;
    step();
    check(net_req == REQ_IDLE, "released after nAck");
    step(); net_ans = ANS_NONE;
    t = 0;
    while (net_req != REQ_PROBE && t < 50) begin step(); t++; end
    check(t >= 4 + 3, $sformatf("retry waits the back-off (%0d cycles)", t));
    // refuse with Back
    net_ans = ANS_BACK;
    step();
    check(net_req == REQ_IDLE, "released after Back");
    step(); net_ans = ANS_NONE;
    t = 0;
    while (net_req != REQ_PROBE && t < 50) begin step(); t++; end
    check(net_req == REQ_PROBE, "probes again");
    // accept
    net_ans = ANS_ACK;
    pops = 0; first_pop = -1; last_pop = -1; t = 0;
    while (net_req == REQ_PROBE && t < 50) begin
      step(); t++;
      if (tx_pop) begin
        check(net_flit.valid && net_flit.data == 32'hC0DE_0000 + 32'(pops),
              $sformatf("word %0d is %h", pops, net_flit.data));
        if (first_pop < 0) first_pop = t;
        last_pop = t;
        pops++;
      end
    end
    check(pops == 4, $sformatf("four words sent (%0d)", pops));
    check(last_pop - first_pop == 3, "one word per clock");
    step(2);
    check(tx_busy, "waits for the answer to clear before finishing");
    net_ans = ANS_NONE;
    step(2);
    check(!tx_busy && dones == 1 && nacks == 1 && backs == 1,
          $sformatf("done once after one nAck and one Back (%0d %0d %0d)", dones, nacks, backs));

    // receive side
    rx_busy = 1; sink_req = REQ_PROBE;
    step();
    check(sink_ans == ANS_NACK, "busy node answers nAck");
    sink_flit = '{valid: 1'b1, addr: 4'd3, data: 32'h1234_5678};
    #1 check(!rx_valid, "nothing delivered without a circuit");
    sink_req = REQ_IDLE; sink_flit = '0;
    step();
    check(sink_ans == ANS_NONE, "answer withdrawn on release");
    rx_busy = 0; sink_req = REQ_PROBE;
    step();
    check(sink_ans == ANS_ACK, "ready node answers Ack");
    rx_busy = 1;  // busy after the circuit is accepted changes nothing
    sink_flit = '{valid: 1'b1, addr: 4'd3, data: 32'hDEAD_BEEF};
    #1 check(rx_valid && rx_data == 32'hDEAD_BEEF, "word delivered");
    step();
    check(sink_ans == ANS_ACK, "Ack held for the whole circuit");
    sink_flit.valid = 0;
    #1 check(!rx_valid, "no word without valid");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
