// system_bench: the MPSoC fabric running the data-flow graph of the
// art-authentication algorithm, with behavioural processors around it. Used
// by the system testbenches, which choose the sizes and report the result.
//
// The top is used with its default parameters (4x4 mesh). Fifteen nodes hold
// behavioural task PEs placed as in the design's task mapping (row 0 at the
// bottom):
//     row 3:  Dist_RGB  RGB2     XYZ2     Average2
//     row 2:  RGB1      Dist_Lab Lab2     (idle)
//     row 1:  XYZ1      Lab1     Dist_RMS Dist_GFC
//     row 0:  Average1  master   Dist_WRMS Dist_XYZ
// and the testbench itself plays the master processor at node 10. For every
// region the master sends the original image window to Average1 and the
// compared image window to Average2, pixel by pixel in alternation, one packet
// of NL wavelength samples per pixel. Results flow along the data-flow graph:
// averages to XYZ and to the spectral distances (RMS, WRMS, GFC), XYZ to RGB,
// Lab and Dist_XYZ, RGB to Dist_RGB, Lab to Dist_Lab, and the six distances
// back to the master, which compares them with a reference computed here.
// Compute times of the task models are the per-function cycle counts of the
// design's software profile (16 wavelengths, 8x8 window) divided by 100;
// Dist_Lab, absent from that profile, is given the time of Dist_RGB.
//
// Mechanisms that must each occur at least once: several regions in flight
// at once (pipelining), the two image paths computing at the same time (task
// parallelism), an adaptor held back by a full router buffer (network
// back-pressure) and a PE not taking a delivered word (receive back-pressure).
module system_bench #(
  parameter int unsigned NL = 16,         // wavelengths
  parameter int unsigned NP = 64,         // pixels in the window (8x8)
  parameter int unsigned NR = 4           // regions
) (
  output bit done,
  output int checks,
  output int failures
);
  import noc_pkg::*;
  import task_model_pkg::*;

  localparam int unsigned NN = 16;
  localparam logic [7:0]  MASTER = 8'h10;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NN-1:0] pe_tx_valid, pe_tx_ready, pe_rx_valid, pe_rx_ready, pe_rx_last;
  logic [31:0]   pe_tx_data [NN];
  addr_t         pe_tx_dst  [NN];
  logic [14:0]   pe_tx_len  [NN];
  logic [31:0]   pe_rx_data [NN];
  addr_t         pe_rx_src  [NN];
  logic [14:0]   pe_rx_len  [NN];

  mpsoc_top dut (.*);

  initial begin
    done = 0; checks = 0; failures = 0;
  end
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- task PEs ----------------
`define PE(N, KIND_, NSRC_, SRCS_, NPKT_, INLEN_, NDST_, DSTS_, DELAY_)                 \
  pe_task_model #(.KIND(KIND_), .NSRC(NSRC_), .SRCS(SRCS_), .NPKT_IN(NPKT_),          \
                  .IN_LEN(INLEN_), .NDST(NDST_), .DSTS(DSTS_), .NL(NL), .NP(NP),       \
                  .DELAY(DELAY_)) u_pe``N (                                             \
    .clk(clk), .rst_n(rst_n),                                                           \
    .tx_valid(pe_tx_valid[N]), .tx_ready(pe_tx_ready[N]), .tx_data(pe_tx_data[N]),     \
    .tx_dst(pe_tx_dst[N]), .tx_len(pe_tx_len[N]),                                       \
    .rx_valid(pe_rx_valid[N]), .rx_ready(pe_rx_ready[N]), .rx_data(pe_rx_data[N]),     \
    .rx_src(pe_rx_src[N]), .rx_len(pe_rx_len[N]), .rx_last(pe_rx_last[N]));

  // node index n = 4*y + x, address byte {x, y}
  `PE(0,  K_AVG,  1, 64'h10,   NP, NL, 4, 64'h31_20_21_01, 303)     // Average1
  `PE(15, K_AVG,  1, 64'h10,   NP, NL, 4, 64'h31_20_21_23, 303)     // Average2
  `PE(4,  K_XYZ,  1, 64'h00,   1,  NL, 3, 64'h30_11_02,    245)     // XYZ1
  `PE(14, K_XYZ,  1, 64'h33,   1,  NL, 3, 64'h13_22_30,    245)     // XYZ2
  `PE(8,  K_RGB,  1, 64'h01,   1,  3,  1, 64'h03,          58)     // RGB1
  `PE(13, K_RGB,  1, 64'h23,   1,  3,  1, 64'h03,          58)     // RGB2
  `PE(5,  K_LAB,  1, 64'h01,   1,  3,  1, 64'h12,          940)    // Lab1
  `PE(10, K_LAB,  1, 64'h23,   1,  3,  1, 64'h12,          940)    // Lab2
  `PE(3,  K_DIST, 2, 64'h23_01, 1, 3,  1, 64'h10,          296)    // Dist_XYZ
  `PE(12, K_DIST, 2, 64'h13_02, 1, 3,  1, 64'h10,          295)    // Dist_RGB
  `PE(9,  K_DIST, 2, 64'h22_11, 1, 3,  1, 64'h10,          295)    // Dist_Lab
  `PE(6,  K_DIST, 2, 64'h33_00, 1, NL, 1, 64'h10,          897)    // Dist_RMS
  `PE(2,  K_DIST, 2, 64'h33_00, 1, NL, 1, 64'h10,          11175)  // Dist_WRMS
  `PE(7,  K_DIST, 2, 64'h33_00, 1, NL, 1, 64'h10,          1180)   // Dist_GFC
`undef PE

  // idle node 32
  assign pe_tx_valid[11] = 1'b0;
  assign pe_tx_data[11]  = '0;
  assign pe_tx_dst[11]   = '0;
  assign pe_tx_len[11]   = '0;
  assign pe_rx_ready[11] = 1'b1;

  // ---------------- image data ----------------
  function automatic int unsigned oi(input int r, input int p, input int l);
    return 1000 + ((r * 7919 + p * 104729 + l * 1299709) % 50000);
  endfunction
  function automatic int unsigned ci(input int r, input int p, input int l);
    return oi(r, p, l) + ((p + l * 3 + r) % 17) * 20;
  endfunction

  // ---------------- master (node 1) ----------------
  localparam int unsigned M = 1;
  bit          m_send = 0;
  logic [31:0] m_data = '0;
  logic [7:0]  m_dst  = '0;
  assign pe_tx_valid[M] = m_send;
  assign pe_tx_data[M]  = m_data;
  assign pe_tx_dst[M]   = addr_t'(m_dst);
  assign pe_tx_len[M]   = 15'(NL);
  assign pe_rx_ready[M] = 1'b1;

  // results received: [distance node][region]
  localparam logic [7:0] DIST_ADDR [6] = '{8'h30, 8'h03, 8'h12, 8'h21, 8'h20, 8'h31};
  localparam string      DIST_NAME [6] = '{"Dist_XYZ", "Dist_RGB", "Dist_Lab", "Dist_RMS",
                                           "Dist_WRMS", "Dist_GFC"};
  int unsigned got [6][NR];
  int          got_n [6];
  int          results = 0;
  int          regions_sent = 0;

  always @(posedge clk) begin
    if (pe_rx_valid[M] && pe_rx_ready[M]) begin
      int d;
      d = -1;
      for (int i = 0; i < 6; i++) if (DIST_ADDR[i] == pe_rx_src[M]) d = i;
      if (d < 0 || got_n[d] >= NR) begin
        failures++;
        $display("FAIL: unexpected word from %h", pe_rx_src[M]);
      end else begin
        got[d][got_n[d]] = pe_rx_data[M];
        got_n[d]++;
        results++;
      end
    end
  end

  task automatic send_pixel(input logic [7:0] dst, input int r, input int p, input bit orig);
    @(negedge clk);
    m_dst = dst;
    m_send = 1;
    for (int l = 0; l < NL; l++) begin
      m_data = orig ? oi(r, p, l) : ci(r, p, l);
      while (!pe_tx_ready[M]) @(negedge clk);
      @(posedge clk);
      #1;
    end
    m_send = 0;
  endtask

  // ---------------- mechanism counters ----------------
  int pipeline_cycles = 0, parallel_cycles = 0, net_bp_cycles = 0, rx_bp_cycles = 0;
  int max_regions_in_flight = 0;
  int tx_wait [NN] = '{default: 0};
  always @(posedge clk) begin
    int lo, hi;
    lo = 1 << 30; hi = -1;
    // regions being computed by the task PEs
    if (u_pe0.busy)  begin lo = (u_pe0.region  < lo) ? u_pe0.region  : lo; hi = (u_pe0.region  > hi) ? u_pe0.region  : hi; end
    if (u_pe15.busy) begin lo = (u_pe15.region < lo) ? u_pe15.region : lo; hi = (u_pe15.region > hi) ? u_pe15.region : hi; end
    if (u_pe4.busy)  begin lo = (u_pe4.region  < lo) ? u_pe4.region  : lo; hi = (u_pe4.region  > hi) ? u_pe4.region  : hi; end
    if (u_pe5.busy)  begin lo = (u_pe5.region  < lo) ? u_pe5.region  : lo; hi = (u_pe5.region  > hi) ? u_pe5.region  : hi; end
    if (u_pe2.busy)  begin lo = (u_pe2.region  < lo) ? u_pe2.region  : lo; hi = (u_pe2.region  > hi) ? u_pe2.region  : hi; end
    if (u_pe6.busy)  begin lo = (u_pe6.region  < lo) ? u_pe6.region  : lo; hi = (u_pe6.region  > hi) ? u_pe6.region  : hi; end
    if (hi > lo) begin
      pipeline_cycles++;
      if (hi - lo + 1 > max_regions_in_flight) max_regions_in_flight = hi - lo + 1;
    end
    if ((u_pe4.busy && u_pe14.busy) || (u_pe0.busy && u_pe15.busy) ||
        (u_pe5.busy && u_pe10.busy)) parallel_cycles++;
    // a word normally waits at most 4 cycles (packet start) before it is
    // taken; a longer wait means the adaptor is held back by a full router
    for (int n = 0; n < NN; n++) begin
      if (pe_tx_valid[n] && !pe_tx_ready[n]) tx_wait[n]++;
      else tx_wait[n] = 0;
      if (tx_wait[n] > 4) net_bp_cycles++;
    end
    if ((pe_rx_valid & ~pe_rx_ready) != '0) rx_bp_cycles++;
  end

  initial begin
    for (int i = 0; i < 6; i++) got_n[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    for (int r = 0; r < NR; r++) begin
      for (int p = 0; p < NP; p++) begin
        send_pixel(8'h00, r, p, 1'b1);   // original image to Average1
        send_pixel(8'h33, r, p, 1'b0);   // compared image to Average2
      end
      regions_sent++;
    end
    wait (results == 6 * NR);
    repeat (50) @(posedge clk);

    // reference model
    for (int r = 0; r < NR; r++) begin
      word_q so, sc, ao, ac, xo, xc, exp_v [6];
      so = {}; sc = {};
      for (int p = 0; p < NP; p++)
        for (int l = 0; l < NL; l++) begin
          so.push_back(oi(r, p, l));
          sc.push_back(ci(r, p, l));
        end
      ao = f_avg(so, NL, NP);
      ac = f_avg(sc, NL, NP);
      xo = f_xyz(ao);
      xc = f_xyz(ac);
      exp_v[0] = f_dist(xo, xc);
      exp_v[1] = f_dist(f_rgb(xo), f_rgb(xc));
      exp_v[2] = f_dist(f_lab(xo), f_lab(xc));
      exp_v[3] = f_dist(ao, ac);
      exp_v[4] = f_dist(ao, ac);
      exp_v[5] = f_dist(ao, ac);
      for (int d = 0; d < 6; d++)
        check(got[d][r] == exp_v[d][0],
              $sformatf("region %0d %s: got %0d expected %0d", r, DIST_NAME[d],
                        got[d][r], exp_v[d][0]));
    end
    for (int n = 0; n < NN; n++) check(pe_rx_valid[n] == 1'b0, "network drained");
    check(u_pe0.src_errors + u_pe15.src_errors + u_pe4.src_errors + u_pe14.src_errors +
          u_pe8.src_errors + u_pe13.src_errors + u_pe5.src_errors + u_pe10.src_errors +
          u_pe3.src_errors + u_pe12.src_errors + u_pe9.src_errors + u_pe6.src_errors +
          u_pe2.src_errors + u_pe7.src_errors == 0, "every word came from an expected source");
    check(u_pe0.len_errors + u_pe4.len_errors + u_pe3.len_errors + u_pe2.len_errors == 0,
          "packet lengths seen by the PEs");
    if (NR > 1) check(pipeline_cycles > 0, "pipelining: several regions in flight");
    if (NR > 1) check(parallel_cycles > 0, "task parallelism: both image paths busy");
    check(net_bp_cycles > 0, "network back-pressure on an adaptor");
    check(rx_bp_cycles > 0, "receive back-pressure at a PE");
    $display("NL=%0d NP=%0d NR=%0d cycles=%0t results=%0d pipeline_cycles=%0d max_regions_in_flight=%0d",
             NL, NP, NR, $time / 10, results, pipeline_cycles, max_regions_in_flight);
    $display("parallel_cycles=%0d net_backpressure_cycles=%0d rx_backpressure_cycles=%0d",
             parallel_cycles, net_bp_cycles, rx_bp_cycles);
    done = 1;
  end
endmodule
