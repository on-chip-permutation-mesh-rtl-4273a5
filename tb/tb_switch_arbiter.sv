// tb_switch_arbiter: directed and random checks of the output allocator.
//
// Directed: with all four inputs asking for every output, fixed priority
// hands out outputs in input order 0,1,2,3 one per falling edge, each the
// lowest free output; dropping hold frees an output; round robin rotates the
// winner; dynamic priority serves the input that has waited longest.
// Random: a reference model written here (same published rules, separate
// code) predicts the ownership after every falling edge for random requests,
// holds, free flags and schemes.
module tb_switch_arbiter;
  import noc_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 1, rst = 1;
  arb_scheme_e scheme;
  logic [3:0][3:0] req_mask, grant_port, owner;
  logic [3:0]      hold, port_free, granted;

  switch_arbiter dut (.clk, .rst, .scheme, .req_mask, .hold, .port_free,
                      .owner, .granted, .grant_port);

  always #5 clk = ~clk;   // falling edges at 10, 20, ...

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Reference model state.
  logic [3:0][3:0] m_owner;
  int              m_ptr;
  int              m_age[4];

  function automatic int m_lowest(input logic [3:0] v);
    for (int o = 0; o < 4; o++) if (v[o]) return o;
    return -1;
  endfunction

  task automatic model_step();
    logic [3:0] owned, avail, elig, waiting;
    int         w, best;
    for (int o = 0; o < 4; o++) owned[o] = m_owner[o] != 0;
    avail = port_free & ~owned;
    for (int i = 0; i < 4; i++) begin
      logic has;
      has = 0;
      for (int o = 0; o < 4; o++) if (m_owner[o][i]) has = 1;
      elig[i] = ((req_mask[i] & avail) != 0) && !has;
      waiting[i] = (req_mask[i] != 0) && !has;
    end
    w = -1;
    if (scheme == ARB_FIXED) begin
      for (int i = 3; i >= 0; i--) if (elig[i]) w = i;
    end else if (scheme == ARB_ROUND_ROBIN) begin
      for (int n = 3; n >= 0; n--) if (elig[(m_ptr + n) % 4]) w = (m_ptr + n) % 4;
    end else begin
      best = -1;
      for (int i = 0; i < 4; i++) if (elig[i] && m_age[i] > best) begin best = m_age[i]; w = i; end
    end
    for (int o = 0; o < 4; o++) if ((m_owner[o] & ~hold) != 0) m_owner[o] = 0;
    if (w >= 0) begin
      int p;
      p = m_lowest(req_mask[w] & avail);
      m_owner[p] = 4'b1 << w;
      m_ptr = (w + 1) % 4;
    end
    for (int i = 0; i < 4; i++)
      if (!waiting[i] || i == w) m_age[i] = 0;
      else if (m_age[i] < 15) m_age[i]++;
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    scheme = ARB_FIXED; req_mask = '0; hold = '0; port_free = '1;
    @(negedge clk); @(negedge clk); #1 rst = 0;

    // Fixed priority: all ask for everything and keep what they get.
    hold = '1;
    for (int n = 0; n < 4; n++) begin
      for (int i = 0; i < 4; i++) req_mask[i] = granted[i] ? 4'b0 : 4'b1111;
      @(negedge clk); #1;
      check(grant_port[n] == (4'b1 << n), $sformatf("fixed: input %0d got %b", n, grant_port[n]));
      check(owner[n] == (4'b1 << n), $sformatf("fixed: owner of %0d is %b", n, owner[n]));
    end
    req_mask = '0;
    // Input 2 releases output 2.
    hold[2] = 0;
    @(negedge clk); #1;
    check(owner[2] == 0 && !granted[2] && granted[1], "release of output 2");
    // A busy link (port_free low) is not given out.
    hold = '1; port_free[2] = 0; req_mask[2] = 4'b0100;
    @(negedge clk); #1;
    check(!granted[2], "port not free but granted");
    port_free[2] = 1;
    @(negedge clk); #1;
    check(grant_port[2] == 4'b0100, "grant once free");

    // Round robin: all inputs ask for output 0; each grant is dropped again.
    hold = '0; req_mask = '0;
    @(negedge clk); @(negedge clk); #1;
    scheme = ARB_ROUND_ROBIN;
    begin
      int seen[4];
      int prev;
      prev = -1;
      for (int i = 0; i < 4; i++) seen[i] = 0;
      for (int n = 0; n < 8; n++) begin
        hold = '0; req_mask = {4{4'b0001}};
        @(negedge clk); #1;
        req_mask = '0;
        for (int i = 0; i < 4; i++) if (granted[i]) begin
          seen[i]++;
          check(i != prev, "round robin repeated a winner");
          prev = i;
        end
        @(negedge clk); #1;          // release
      end
      for (int i = 0; i < 4; i++) check(seen[i] == 2, $sformatf("round robin: input %0d won %0d times", i, seen[i]));
    end

    // Dynamic priority: input 3 waits for output 0 while input 0 keeps
    // winning it under fixed priority; then the scheme switches and input 3,
    // now the oldest waiter, wins over input 0.
    scheme = ARB_FIXED; hold = '0; req_mask = '0;
    @(negedge clk); #1;
    req_mask[0] = 4'b0001; req_mask[3] = 4'b0001; hold[0] = 1;
    @(negedge clk); #1;
    check(granted[0] && !granted[3], "fixed priority picks input 0");
    hold[0] = 0; req_mask[0] = 4'b0000;
    @(negedge clk); #1;               // output 0 released, input 3 ages
    req_mask[0] = 4'b0001;
    scheme = ARB_DYNAMIC;
    hold = 4'b1001;
    @(negedge clk); #1;
    check(granted[3] && !granted[0], "dynamic priority serves the oldest waiter");

    // Random against the reference model.
    hold = '0; req_mask = '0;
    @(negedge clk); @(negedge clk); @(negedge clk); @(negedge clk); #1;
    m_owner = owner; m_ptr = 0; for (int i = 0; i < 4; i++) m_age[i] = 0;
    // Align the model's pointer and ages by a quiet period.
    for (int i = 0; i < 4; i++) m_age[i] = 0;
    scheme = ARB_FIXED;
    @(negedge clk); #1;
    for (int t = 0; t < 2000; t++) begin
      if (t % 200 == 0) scheme = arb_scheme_e'(t / 200 % 3);
      for (int i = 0; i < 4; i++) req_mask[i] = 4'($urandom);
      hold      = 4'($urandom) | 4'($urandom);
      port_free = 4'($urandom) | 4'($urandom);
      if (t == 0) begin
        // round-robin pointer after the directed part is unknown to the model
        m_ptr = 0;
      end
      model_step();
      @(negedge clk); #1;
      if (scheme != ARB_ROUND_ROBIN || t >= 4) begin
        check(owner == m_owner, $sformatf("random t=%0d scheme %0d owner %h model %h", t, scheme, owner, m_owner));
      end
      m_owner = owner;   // resynchronise after a mismatch or the pointer warm-up
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
