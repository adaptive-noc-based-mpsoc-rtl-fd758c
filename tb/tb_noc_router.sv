// tb_noc_router: self-checking testbench of one routing node.
//
// The router under test sits at column 1, row 1 of a 4x4 address space.
// Every one of its five inputs sends a series of packets with random
// destinations and random payload lengths (0 to 6 flits); the outputs take
// flits with random back-pressure. The header's upper byte carries the input
// number and a sequence number so that every flit seen on an output can be
// traced to the packet it belongs to. For every packet the testbench checks
// that it leaves on the output that XY routing selects, that its flits stay
// together and in order, that its size and payload are unchanged, and that
// every packet sent arrives. One packet sent alone into an idle router checks
// the latency: a header taken at clock edge t leaves at edge t+2. The number
// of cycles in which two inputs competed for the same output is counted, and
// it must have happened.
module tb_noc_router;
  import noc_pkg::*;

  localparam int unsigned NP   = 5;
  localparam int unsigned NPKT = 30;   // fits the 5-bit sequence field
  localparam int unsigned RX   = 1, RY = 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NP-1:0] in_valid, in_ready, out_valid, out_ready;
  flit_t in_data [NP];
  flit_t out_data[NP];

  noc_router #(.X(RX), .Y(RY), .BUF_DEPTH(4)) dut (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data),
    .out_valid(out_valid), .out_ready(out_ready), .out_data(out_data));

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // reference XY route, written independently of the package function
  function automatic int ref_route(input int dx, input int dy);
    if (dx != RX) return (dx > RX) ? 0 : 1;      // E : W
    if (dy != RY) return (dy > RY) ? 2 : 3;      // N : S
    return 4;                                    // local
  endfunction

  // packet plan
  int pkt_size [NP][NPKT];
  int pkt_dx   [NP][NPKT];
  int pkt_dy   [NP][NPKT];

  function automatic flit_t flit_of(input int i, input int s, input int k);
    if (k == 0) return {3'(i), 5'(s), 4'(pkt_dx[i][s]), 4'(pkt_dy[i][s])};
    if (k == 1) return flit_t'(pkt_size[i][s]);
    return {3'(i), 5'(s), 8'(k - 2)};
  endfunction

  // ---------------- drivers ----------------
  int  tx_pkt [NP];   // packet being sent
  int  tx_k   [NP];   // flit index in that packet
  bit  run_random = 0;
  bit  man_valid  = 0;       // manual drive of input W for the latency check
  flit_t man_data = '0;
  bit  all_ready  = 0;

  always_comb begin
    for (int i = 0; i < NP; i++) begin
      in_valid[i] = run_random && tx_pkt[i] < NPKT;
      in_data[i]  = (tx_pkt[i] < NPKT) ? flit_of(i, tx_pkt[i], tx_k[i]) : '0;
    end
    if (!run_random) begin
      in_valid[1] = man_valid;
      in_data[1]  = man_data;
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < NP; i++) begin
      if (run_random && in_valid[i] && in_ready[i]) begin
        if (tx_k[i] == pkt_size[i][tx_pkt[i]] + 1) begin
          tx_pkt[i] <= tx_pkt[i] + 1;
          tx_k[i]   <= 0;
        end else begin
          tx_k[i] <= tx_k[i] + 1;
        end
      end
    end
  end

  // ---------------- monitors ----------------
  int  rx_k    [NP];          // flit index within current packet, per output
  int  rx_in   [NP];
  int  rx_seq  [NP];
  int  last_seq[NP][NP];      // per output, per input
  int  received = 0;
  int  contention = 0, backpressure = 0;
  int  cycle = 0;
  int  t_first_out = 0;

  always_ff @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      for (int o = 0; o < NP; o++) begin
        if (out_valid[o] && !out_ready[o]) backpressure++;
        if (out_valid[o] && out_ready[o]) begin
          if (rx_k[o] == 0) begin
            if (received == 0) t_first_out = cycle;
            rx_in[o]  = int'(out_data[o][15:13]);
            rx_seq[o] = int'(out_data[o][12:8]);
            check(ref_route(int'(out_data[o][7:4]), int'(out_data[o][3:0])) == o,
                  $sformatf("packet %0d.%0d left on wrong output %0d", rx_in[o], rx_seq[o], o));
            check(rx_seq[o] > last_seq[o][rx_in[o]],
                  $sformatf("packet order on output %0d", o));
            last_seq[o][rx_in[o]] = rx_seq[o];
            check(out_data[o] == flit_of(rx_in[o], rx_seq[o], 0), "header changed");
          end else begin
            check(out_data[o] == flit_of(rx_in[o], rx_seq[o], rx_k[o]),
                  $sformatf("output %0d flit %0d of packet %0d.%0d: got %h", o, rx_k[o],
                            rx_in[o], rx_seq[o], out_data[o]));
          end
          if (rx_k[o] == pkt_size[rx_in[o]][rx_seq[o]] + 1) begin
            rx_k[o] = 0;
            received++;
          end else begin
            rx_k[o] = rx_k[o] + 1;
          end
        end
      end
    end
  end

  // count cycles where packets of two different inputs are waiting for, or
  // passing through, the same output: headers taken in but not yet out
  int pend [NP][NP];          // [output][input]
  always_ff @(posedge clk) begin
    int busy_in;
    for (int i = 0; i < NP; i++)
      if (in_valid[i] && in_ready[i] && ((run_random && tx_k[i] == 0) || (!run_random && man_data == flit_of(1, 0, 0))))
        pend[ref_route(int'(in_data[i][7:4]), int'(in_data[i][3:0]))][i]++;
    for (int o = 0; o < NP; o++)
      if (out_valid[o] && out_ready[o] && rx_k[o] == 0)
        pend[o][int'(out_data[o][15:13])]--;
    for (int o = 0; o < NP; o++) begin
      busy_in = 0;
      for (int i = 0; i < NP; i++) if (pend[o][i] > 0) busy_in++;
      if (busy_in > 1) contention++;
    end
  end

  // random back-pressure on the outputs
  always_ff @(posedge clk) out_ready <= all_ready ? 5'b11111 : (5'($urandom) | 5'($urandom));

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired, %0d packets received", received);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_in, t_out;
    for (int i = 0; i < NP; i++) begin
      tx_pkt[i] = NPKT;   // idle
      tx_k[i]   = 0;
      rx_k[i]   = 0;
      for (int j = 0; j < NP; j++) begin
        last_seq[i][j] = -1;
        pend[i][j] = 0;
      end
      for (int s = 0; s < NPKT; s++) begin
        pkt_size[i][s] = $urandom_range(0, 6);
        pkt_dx[i][s]   = $urandom_range(0, 3);
        pkt_dy[i][s]   = $urandom_range(0, 3);
      end
    end
    // packet used for the latency check: input W (1) to local (1,1), 2 payload flits
    pkt_size[1][0] = 2; pkt_dx[1][0] = 1; pkt_dy[1][0] = 1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // --- latency of a lone packet ---
    all_ready = 1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    man_valid = 1; man_data = flit_of(1, 0, 0);
    @(posedge clk); t_in = cycle;
    for (int k = 1; k <= 3; k++) begin
      @(negedge clk);
      man_data = flit_of(1, 0, k);
    end
    @(negedge clk);
    man_valid = 0;
    wait (received == 1);
    t_out = t_first_out;
    check(t_out - t_in == 2, $sformatf("header latency %0d edges, expected 2", t_out - t_in));
    all_ready = 0;
    repeat (5) @(posedge clk);
    check(received == 1, "lone packet fully delivered");
    check(last_seq[4][1] == 0, "lone packet seen on local output");

    // --- random traffic from all inputs ---
    @(negedge clk);
    for (int i = 0; i < NP; i++) begin
      tx_pkt[i] = (i == 1) ? 1 : 0;
      tx_k[i] = 0;
    end
    run_random = 1;
    wait (received == NP * NPKT);
    repeat (10) @(posedge clk);
    check(received == NP * NPKT, "all packets delivered");
    check(out_valid == '0, "router idle at the end");
    check(contention > 0, "output contention occurred");
    check(backpressure > 0, "back-pressure occurred");
    $display("packets=%0d contention_cycles=%0d backpressure_cycles=%0d",
             received, contention, backpressure);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
