// perm_network: 16-node three-stage circuit-switched permutation network.
//
// A c(M, N, P) three-stage network (defaults c(4,4,4)): P input switches of
// N inputs and M outputs, M middle switches of P x P, and P output switches
// of M inputs and N outputs. Input switch i's output j feeds middle switch j
// at its input i; middle switch j's output k feeds output switch k at its
// input j. Node a (0..N*P-1) attaches to input switch a / N, port a % N, and
// is reached through output switch a / N, port a % N. With M = N the network
// can realise any permutation of sources to destinations.
//
// Paths are set up at run time: a node's interface sends a probe with the
// destination; each switch's Input Control asks its arbiter for an output
// (any middle switch in the first stage, the one fixed output afterwards),
// backs off from a blocked middle switch to try another (backtracking), and
// reports a busy destination with nAck. Once the destination acknowledges,
// the whole path is held while the source streams its words, one per clock,
// through the switches' combinational crossbars, and then released.
//
// Every node has a transmit port (tx_*) and a receive port (rx_*); `scheme`
// selects the arbitration scheme of all switches. ICs, OCs and interfaces use
// the rising edge of clk, the arbiters its falling edge; rst is synchronous
// and active high. The topology, switch structure and probe protocol follow
// the published design; widths, the interface protocol and the retry rule are
// this design's choices (see the module headers below).
module perm_network
  import noc_pkg::*;
#(
  parameter int unsigned M         = 4,
  parameter int unsigned N         = 4,
  parameter int unsigned P         = 4,
  parameter int unsigned LEN_W     = 8,
  parameter int unsigned RETRY_GAP = 4,
  localparam int unsigned NODES    = N * P
) (
  input  logic                           clk,
  input  logic                           rst,
  input  arb_scheme_e                    scheme,
  input  logic [NODES-1:0]               tx_start,
  input  logic [NODES-1:0][ADDR_W-1:0]   tx_dest,
  input  logic [NODES-1:0][LEN_W-1:0]    tx_len,
  input  logic [NODES-1:0][DATA_W-1:0]   tx_data,
  output logic [NODES-1:0]               tx_pop,
  output logic [NODES-1:0]               tx_busy,
  output logic [NODES-1:0]               tx_done,
  output logic [NODES-1:0]               tx_nack,
  output logic [NODES-1:0]               tx_back,
  input  logic [NODES-1:0]               rx_busy,
  output logic [NODES-1:0]               rx_valid,
  output logic [NODES-1:0][DATA_W-1:0]   rx_data
);

  if (NODES > (1 << ADDR_W)) begin : g_size_err
    $error("perm_network: N*P exceeds the address space of noc_pkg::ADDR_W");
  end

  // Node-side links.
  req_e  [NODES-1:0] src_req,  dst_req;
  ans_e  [NODES-1:0] src_ans,  dst_ans;
  flit_t [NODES-1:0] src_flit, dst_flit;

  // Inter-stage links, indexed [sending switch][its output] and
  // [receiving switch][its input].
  req_e  [P-1:0][M-1:0] s1_req_o;   ans_e [P-1:0][M-1:0] s1_ans_i;   flit_t [P-1:0][M-1:0] s1_flit_o;
  req_e  [M-1:0][P-1:0] s2_req_i;   ans_e [M-1:0][P-1:0] s2_ans_o;   flit_t [M-1:0][P-1:0] s2_flit_i;
  req_e  [M-1:0][P-1:0] s2_req_o;   ans_e [M-1:0][P-1:0] s2_ans_i;   flit_t [M-1:0][P-1:0] s2_flit_o;
  req_e  [P-1:0][M-1:0] s3_req_i;   ans_e [P-1:0][M-1:0] s3_ans_o;   flit_t [P-1:0][M-1:0] s3_flit_i;

  for (genvar i = 0; i < P; i++) begin : g_wire12
    for (genvar j = 0; j < M; j++) begin : g_j
      assign s2_req_i[j][i]  = s1_req_o[i][j];
      assign s2_flit_i[j][i] = s1_flit_o[i][j];
      assign s1_ans_i[i][j]  = s2_ans_o[j][i];
      assign s3_req_i[i][j]  = s2_req_o[j][i];
      assign s3_flit_i[i][j] = s2_flit_o[j][i];
      assign s2_ans_i[j][i]  = s3_ans_o[i][j];
    end
  end

  for (genvar a = 0; a < NODES; a++) begin : g_ni
    net_iface #(
      .NODE_ID  (a),
      .LEN_W    (LEN_W),
      .RETRY_GAP(RETRY_GAP)
    ) u_ni (
      .clk      (clk),
      .rst      (rst),
      .tx_start (tx_start[a]),
      .tx_dest  (tx_dest[a]),
      .tx_len   (tx_len[a]),
      .tx_data  (tx_data[a]),
      .tx_pop   (tx_pop[a]),
      .tx_busy  (tx_busy[a]),
      .tx_done  (tx_done[a]),
      .tx_nack  (tx_nack[a]),
      .tx_back  (tx_back[a]),
      .net_req  (src_req[a]),
      .net_flit (src_flit[a]),
      .net_ans  (src_ans[a]),
      .sink_req (dst_req[a]),
      .sink_flit(dst_flit[a]),
      .sink_ans (dst_ans[a]),
      .rx_busy  (rx_busy[a]),
      .rx_valid (rx_valid[a]),
      .rx_data  (rx_data[a])
    );
  end

  for (genvar i = 0; i < P; i++) begin : g_first
    clos_switch #(
      .STAGE  (STAGE_FIRST),
      .NUM_IN (N),
      .NUM_OUT(M),
      .N      (N),
      .SW_IDX (i)
    ) u_sw (
      .clk     (clk),
      .rst     (rst),
      .scheme  (scheme),
      .req_in  (src_req[i*N +: N]),
      .ans_up  (src_ans[i*N +: N]),
      .flit_in (src_flit[i*N +: N]),
      .req_out (s1_req_o[i]),
      .ans_dn  (s1_ans_i[i]),
      .flit_out(s1_flit_o[i]),
      .ic_state()
    );
  end

  for (genvar j = 0; j < M; j++) begin : g_middle
    clos_switch #(
      .STAGE  (STAGE_MIDDLE),
      .NUM_IN (P),
      .NUM_OUT(P),
      .N      (N),
      .SW_IDX (j)
    ) u_sw (
      .clk     (clk),
      .rst     (rst),
      .scheme  (scheme),
      .req_in  (s2_req_i[j]),
      .ans_up  (s2_ans_o[j]),
      .flit_in (s2_flit_i[j]),
      .req_out (s2_req_o[j]),
      .ans_dn  (s2_ans_i[j]),
      .flit_out(s2_flit_o[j]),
      .ic_state()
    );
  end

  for (genvar k = 0; k < P; k++) begin : g_last
    clos_switch #(
      .STAGE  (STAGE_LAST),
      .NUM_IN (M),
      .NUM_OUT(N),
      .N      (N),
      .SW_IDX (k)
    ) u_sw (
      .clk     (clk),
      .rst     (rst),
      .scheme  (scheme),
      .req_in  (s3_req_i[k]),
      .ans_up  (s3_ans_o[k]),
      .flit_in (s3_flit_i[k]),
      .req_out (dst_req[k*N +: N]),
      .ans_dn  (dst_ans[k*N +: N]),
      .flit_out(dst_flit[k*N +: N]),
      .ic_state()
    );
  end

endmodule
