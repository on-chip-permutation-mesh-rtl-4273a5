// tb_perm_bandwidth: bandwidth workload on the default 16-node network.
// Rounds of full permutations are sent, every node moving 255 words per
// round; a new round starts when the previous one has ended. Round 0 is the
// permutation a -> a, which probing routes without any conflict, so all 16
// circuits stream at once; the other rounds are random.
// The testbench converts words per clock to bit/s at a 100 MHz clock:
//   peak      : most words delivered in one clock; must reach 30 Gbit/s,
//               i.e. 30e9 / (32 bit x 100e6) = 9.375 words per clock;
//   sustained : all words over all clocks of the random rounds, set-up,
//               backtracking and retries included; reported only (a blocked
//               transfer waits for another circuit to end, so this falls
//               well below the peak).
// Every word is also checked for its destination and order.
module tb_perm_bandwidth;
  import noc_pkg::*;
  int checks = 0, failures = 0;

  localparam int NODES  = 16;
  localparam int ROUNDS = 6;
  localparam int LEN    = 255;

  logic clk = 0, rst = 1;
  arb_scheme_e scheme = ARB_ROUND_ROBIN;
  logic [NODES-1:0]        tx_start, tx_pop, tx_busy, tx_done, tx_nack, tx_back;
  logic [NODES-1:0][3:0]   tx_dest;
  logic [NODES-1:0][7:0]   tx_len;
  logic [NODES-1:0][31:0]  tx_data, rx_data;
  logic [NODES-1:0]        rx_busy, rx_valid;

  perm_network dut (.*);

  always #5 clk = ~clk;

  logic [7:0] wcnt [NODES];
  for (genvar a = 0; a < NODES; a++) begin : g_src
    assign tx_data[a] = {~{4'(a), tx_dest[a], wcnt[a]}, {4'(a), tx_dest[a], wcnt[a]}};
  end
  always @(posedge clk)
    for (int a = 0; a < NODES; a++)
      if (tx_start[a]) wcnt[a] <= 0;
      else if (tx_pop[a]) wcnt[a] <= wcnt[a] + 1;

  int rx_next [NODES];
  int rx_words, peak;
  always @(posedge clk) if (!rst) begin
    if ($countones(rx_valid) > peak) peak = $countones(rx_valid);
    for (int a = 0; a < NODES; a++) begin
      if (tx_start[a]) rx_next[a] = 0;
      if (rx_valid[a]) begin
        int s;
        rx_words++;
        s = int'(rx_data[a][15:12]);
        checks++;
        if (rx_data[a][11:8] != 4'(a) || rx_data[a][31:16] != ~rx_data[a][15:0] ||
            int'(rx_data[a][7:0]) != rx_next[s]) begin
          failures++;
          $display("FAIL node %0d received %h", a, rx_data[a]);
        end
        rx_next[s]++;
      end
    end
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint cycles;
    int     words0;
    real    words_per_clk, gbps;
    tx_start = '0; tx_dest = '0; tx_len = '0; rx_busy = '0; rx_words = 0; peak = 0; words0 = 0;
    for (int a = 0; a < NODES; a++) begin rx_next[a] = 0; wcnt[a] = 0; end
    repeat (4) @(posedge clk);
    #1 rst = 0;
    cycles = 0;
    for (int r = 0; r < ROUNDS; r++) begin
      int perm [NODES];
      for (int a = 0; a < NODES; a++) perm[a] = a;
      for (int a = NODES - 1; a > 0; a--) begin
        int k, tmp;
        k = int'($urandom % (a + 1));
        tmp = perm[a]; perm[a] = perm[k]; perm[k] = tmp;
      end
      if (r == 0) for (int a = 0; a < NODES; a++) perm[a] = a;
      for (int a = 0; a < NODES; a++) begin
        tx_dest[a] = 4'(perm[a]);
        tx_len[a]  = 8'(LEN);
      end
      tx_start = '1;
      @(posedge clk); #1 cycles++;
      tx_start = '0;
      @(posedge clk); #1 cycles++;
      while (tx_busy != 0) begin @(posedge clk); #1 cycles++; end
      if (r == 0) begin
        words0 = rx_words;
        cycles = 0;
      end
    end
    checks++;
    if (rx_words != ROUNDS * NODES * LEN) begin
      failures++;
      $display("FAIL delivered %0d words, expected %0d", rx_words, ROUNDS * NODES * LEN);
    end
    words_per_clk = real'(rx_words - words0) / real'(cycles);
    gbps = words_per_clk * 32.0 * 0.1;
    $display("sustained, random permutations: %0d words in %0d clocks: %0.2f words/clock = %0.1f Gbit/s at 100 MHz",
             rx_words - words0, cycles, words_per_clk, gbps);
    $display("peak: %0d words in one clock = %0.1f Gbit/s at 100 MHz", peak, real'(peak) * 3.2);
    checks++;
    if (real'(peak) * 3.2 < 30.0) begin
      failures++;
      $display("FAIL peak throughput below 30 Gbit/s");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
