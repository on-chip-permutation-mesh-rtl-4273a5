// tb_perm_network: end-to-end test of the 16-node network at its default
// size, c(4,4,4).
//
// Each node's data source sends 32-bit words whose low half is {source[3:0],
// destination[3:0], word index[7:0]} and whose high half is the inverse of
// the low half; every receiver checks that words are addressed to it and
// arrive in order, and that every word is delivered in the same clock it is
// sent (circuits carry data straight through the switches).
// Phases:
//   1 one transfer 0 -> 5; its words must arrive on consecutive clocks
//   2 in-network backtrack: 4 -> 4 holds middle switch 0's link to output
//     switch 1, so 0 -> 5 is backed out of middle switch 0 and rerouted
//   3 backtrack to the source: 8,9,10,11 -> 4,5,6,7 hold all four links into
//     output switch 1, so 0 -> 4 backtracks to node 0 until they finish
//   4 busy destination: 1 and 2 both -> 12 (one gets nAck), and node 13
//     refusing (rx_busy) a transfer from 3 until it becomes ready
//   5 a random full permutation of all 16 nodes under each of the three
//     arbitration schemes
// Each mechanism is counted and must have happened at least once.
module tb_perm_network;
  import noc_pkg::*;
  int checks = 0, failures = 0;

  localparam int NODES = 16;

  logic clk = 0, rst = 1;
  arb_scheme_e scheme = ARB_ROUND_ROBIN;
  logic [NODES-1:0]        tx_start, tx_pop, tx_busy, tx_done, tx_nack, tx_back;
  logic [NODES-1:0][3:0]   tx_dest;
  logic [NODES-1:0][7:0]   tx_len;
  logic [NODES-1:0][31:0]  tx_data, rx_data;
  logic [NODES-1:0]        rx_busy, rx_valid;

  perm_network dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic step(input int n = 1);
    repeat (n) @(posedge clk);
    #1;
  endtask

  // ---------------------------------------------------------------- sources
  logic [7:0] wcnt [NODES];
  for (genvar a = 0; a < NODES; a++) begin : g_src
    assign tx_data[a] = {~{4'(a), tx_dest[a], wcnt[a]}, {4'(a), tx_dest[a], wcnt[a]}};
  end
  always @(posedge clk)
    for (int a = 0; a < NODES; a++)
      if (tx_start[a]) wcnt[a] <= 0;
      else if (tx_pop[a]) wcnt[a] <= wcnt[a] + 1;

  // -------------------------------------------------------------- receivers
  int rx_next [NODES];       // next expected word index per source
  int rx_words, tx_words;
  int n_done, n_nack, n_back, n_rxbusy_nack, n_streams;
  always @(posedge clk) if (!rst) begin
    int npop, nval;
    npop = 0; nval = 0;
    for (int a = 0; a < NODES; a++) begin
      if (tx_start[a]) rx_next[a] = 0;
      if (tx_pop[a]) begin npop++; tx_words++; end
      if (tx_done[a]) n_done++;
      if (tx_nack[a]) n_nack++;
      if (tx_back[a]) n_back++;
      if (rx_valid[a]) begin
        int s;
        nval++; rx_words++;
        s = int'(rx_data[a][15:12]);
        checks++;
        if (rx_data[a][11:8] != 4'(a) || rx_data[a][31:16] != ~rx_data[a][15:0] || int'(rx_data[a][7:0]) != rx_next[s]) begin
          failures++;
          $display("FAIL node %0d received %h, expected word %0d from %0d", a, rx_data[a], rx_next[s], s);
        end
        rx_next[s]++;
      end
    end
    checks++;
    if (npop != nval) begin
      failures++;
      $display("FAIL %0d words sent but %0d received in the same clock", npop, nval);
    end
  end

  // ------------------------------------------------- mechanisms in the network
  int n_mid_backtrack, n_contend [3];
  for (genvar j = 0; j < 4; j++) begin : g_mon
    for (genvar i = 0; i < 4; i++) begin : g_ic
      ic_state_e prev;
      always @(posedge clk) begin
        if (!rst && dut.g_middle[j].u_sw.g_in[i].u_ic.state == IC_BACKTRACK && prev != IC_BACKTRACK)
          n_mid_backtrack++;
        prev <= dut.g_middle[j].u_sw.g_in[i].u_ic.state;
      end
    end
    always @(negedge clk)
      if (!rst && $countones(dut.g_first[j].u_sw.u_arb.eligible) > 1) n_contend[scheme]++;
  end

  // ------------------------------------------------------------- helpers
  task automatic start(input int a, input int d, input int len);
    while (tx_busy[a]) step();
    tx_dest[a] = 4'(d); tx_len[a] = 8'(len); tx_start[a] = 1'b1;
    step();
    tx_start[a] = 1'b0;
  endtask

  task automatic wait_idle(input int limit, input string what);
    int t = 0;
    step(2);
    while (tx_busy != 0 && t < limit) begin step(); t++; end
    step(2);                 // let the last tx_done pulse be counted
    check(tx_busy == 0, $sformatf("%s: all transfers finished", what));
  endtask

  task automatic wait_rx(input int a);
    int t = 0;
    while (!rx_valid[a] && t < 1000) begin step(); t++; end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int first, last, done0, back0, nack0;
    tx_start = '0; tx_dest = '0; tx_len = '0; rx_busy = '0;
    rx_words = 0; tx_words = 0; n_done = 0; n_nack = 0; n_back = 0;
    n_rxbusy_nack = 0; n_streams = 0; n_mid_backtrack = 0;
    for (int s = 0; s < 3; s++) n_contend[s] = 0;
    for (int a = 0; a < NODES; a++) begin rx_next[a] = 0; wcnt[a] = 0; end
    step(4); rst = 0; step();

    // 1: single transfer, consecutive words
    start(0, 5, 8);
    first = -1; last = -1;
    for (int t = 0; t < 200; t++) begin
      if (rx_valid[5]) begin if (first < 0) first = t; last = t; end
      step();
    end
    check(first >= 0 && last - first == 7, $sformatf("8 words on consecutive clocks (%0d..%0d)", first, last));
    $display("setup: first word at node 5 %0d clocks after the start", first + 1);
    if (last - first == 7) n_streams++;
    wait_idle(100, "phase 1");

    // 2: rerouting after an in-network backtrack
    start(4, 4, 200);
    wait_rx(4);
    start(0, 5, 8);
    wait_idle(2000, "phase 2");
    check(n_mid_backtrack > 0, "middle switch backtracked in phase 2");

    // 3: backtrack to the source
    back0 = n_back;
    fork
      start(8, 4, 250);
      start(9, 5, 250);
      start(10, 6, 250);
      start(11, 7, 250);
    join
    for (int a = 4; a < 8; a++) wait_rx(a);
    start(0, 4, 4);
    wait_idle(5000, "phase 3");
    check(n_back > back0, "probe backtracked to the source in phase 3");

    // 4: busy destinations
    nack0 = n_nack;
    fork
      start(1, 12, 40);
      start(2, 12, 40);
    join
    wait_idle(5000, "phase 4a");
    check(n_nack > nack0, "second probe for node 12 refused with nAck");
    nack0 = n_nack;
    rx_busy[13] = 1'b1;
    start(3, 13, 10);
    step(100);
    check(tx_busy[3] && n_nack > nack0, "busy receiver refuses with nAck");
    n_rxbusy_nack = n_nack - nack0;
    rx_busy[13] = 1'b0;
    wait_idle(2000, "phase 4b");

    // 5: full permutations under each scheme
    for (int s = 0; s < 3; s++) begin
      int perm [NODES];
      done0 = n_done;
      scheme = arb_scheme_e'(s);
      for (int a = 0; a < NODES; a++) perm[a] = a;
      for (int a = NODES - 1; a > 0; a--) begin
        int r, tmp;
        r = int'($urandom % (a + 1));
        tmp = perm[a]; perm[a] = perm[r]; perm[r] = tmp;
      end
      for (int a = 0; a < NODES; a++) begin
        tx_dest[a] = 4'(perm[a]);
        tx_len[a]  = 8'(1 + $urandom % 32);
      end
      tx_start = '1;
      step();
      tx_start = '0;
      wait_idle(20000, $sformatf("permutation, scheme %0d", s));
      check(n_done - done0 == NODES, $sformatf("scheme %0d: %0d of 16 transfers done", s, n_done - done0));
    end

    check(rx_words == tx_words && tx_words > 0, $sformatf("words sent %0d received %0d", tx_words, rx_words));

    // Every mechanism must have occurred.
    check(n_done > 0,          "mechanism: circuit acknowledged and released");
    check(n_streams > 0,       "mechanism: multi-word streaming on a held circuit");
    check(n_mid_backtrack > 0, "mechanism: backtrack inside the network / reroute");
    check(n_back > 0,          "mechanism: backtrack to the source");
    check(n_nack > 0,          "mechanism: busy destination nAck");
    check(n_rxbusy_nack > 0,   "mechanism: receiver-busy nAck");
    for (int s = 0; s < 3; s++)
      check(n_contend[s] > 0, $sformatf("mechanism: contended arbitration under scheme %0d", s));
    $display("counts: done=%0d nack=%0d back_to_source=%0d middle_backtracks=%0d contention rr/dyn/fixed=%0d/%0d/%0d words=%0d",
             n_done, n_nack, n_back, n_mid_backtrack, n_contend[0], n_contend[1], n_contend[2], rx_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
