// mesh_bench: random-traffic test of an MX x MY mesh of routing nodes, used
// by the mesh testbenches, which choose the size and report the result.
//
// First a lone packet crosses the mesh corner to corner, from node 00 to the
// opposite corner, to check the latency: a header needs two clock edges per
// router, so with MX+MY-1 routers on its XY path it leaves the mesh
// 2(MX+MY-1) edges after it entered (14 on the 4x4 mesh). Then every local
// port sends NPKT packets (1 to 8 payload flits) to random nodes, itself
// included, and takes flits with random back-pressure. At each node the bench
// checks that every arriving packet is addressed to that node, that it is
// complete and unchanged, and that the packets of one source arrive in the
// order they were sent; at the end every packet must have arrived. Cycles in
// which a node could not inject a flit because the network was full are
// counted and must occur.
module mesh_bench #(
  parameter int unsigned MX   = 4,
  parameter int unsigned MY   = 4,
  parameter int unsigned NPKT = 20        // packets per node
) (
  output bit done,
  output int checks,
  output int failures
);
  import noc_pkg::*;

  localparam int unsigned NN = MX * MY;
  // node 00 sends all its packets, the others skip their packet 0
  localparam int unsigned TOTAL = 1 + NN * (NPKT - 1);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NN-1:0] loc_in_valid, loc_in_ready, loc_out_valid, loc_out_ready;
  flit_t loc_in_data [NN];
  flit_t loc_out_data[NN];

  noc_mesh #(.MESH_X(MX), .MESH_Y(MY), .BUF_DEPTH(4)) dut (.*);

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

  int pkt_dst [NN][NPKT];
  int pkt_size[NN][NPKT];

  function automatic flit_t pay(input int src, input int seq, input int k);
    if (k == 0) return {4'(src), 12'(seq)};
    return flit_t'(src * 4099 + seq * 131 + k * 7);
  endfunction
  function automatic flit_t flit_of(input int src, input int seq, input int k);
    int d = pkt_dst[src][seq];
    if (k == 0) return {make_addr(src % MX, src / MX), make_addr(d % MX, d / MX)};
    if (k == 1) return flit_t'(pkt_size[src][seq]);
    return pay(src, seq, k - 2);
  endfunction

  int cycle = 0;
  always_ff @(posedge clk) cycle <= cycle + 1;

  // ---------------- sources ----------------
  int  sp [NN], sk [NN];
  bit  sgate [NN];
  int  n_send = 0;            // packets each source may send so far
  int  inj_stall = 0;
  always_comb begin
    for (int n = 0; n < NN; n++) begin
      loc_in_valid[n] = rst_n && sp[n] < n_send && sgate[n];
      loc_in_data[n]  = (sp[n] < NPKT) ? flit_of(n, sp[n], sk[n]) : '0;
    end
  end
  always_ff @(posedge clk) begin
    for (int n = 0; n < NN; n++) begin
      if (loc_in_valid[n] && !loc_in_ready[n]) inj_stall++;
      if (loc_in_valid[n] && loc_in_ready[n]) begin
        if (sk[n] == pkt_size[n][sp[n]] + 1) begin
          sp[n] <= sp[n] + 1;
          sk[n] <= 0;
        end else sk[n] <= sk[n] + 1;
        sgate[n] <= ($urandom_range(0, 7) != 0);
      end else if (!sgate[n]) sgate[n] <= ($urandom_range(0, 1) == 0);
    end
  end

  // ---------------- sinks ----------------
  bit  sink_all_ready = 0;
  always_ff @(posedge clk)
    for (int n = 0; n < NN; n++)
      loc_out_ready[n] <= sink_all_ready || ($urandom_range(0, 3) != 0);

  int  dk [NN], dsrc [NN], dseq [NN], dsize [NN];
  int  next_seq [NN][NN];     // [dst][src]: lowest sequence number still possible
  int  delivered = 0;
  int  t_last_hdr = 0;
  always_ff @(posedge clk) begin
    for (int n = 0; n < NN; n++) begin
      if (rst_n && loc_out_valid[n] && loc_out_ready[n]) begin
        if (dk[n] == 0) begin
          dsrc[n] = int'(loc_out_data[n][15:12]) + MX * int'(loc_out_data[n][11:8]);
          check(loc_out_data[n][7:0] == make_addr(n % MX, n / MX),
                $sformatf("node %0d got a packet for %h", n, loc_out_data[n][7:0]));
          t_last_hdr = cycle;
        end else if (dk[n] == 1) begin
          dsize[n] = int'(loc_out_data[n]);
        end else if (dk[n] == 2) begin
          check(int'(loc_out_data[n][15:12]) == dsrc[n], "payload source tag");
          dseq[n] = int'(loc_out_data[n][11:0]);
          check(dseq[n] < NPKT && pkt_dst[dsrc[n]][dseq[n]] == n,
                $sformatf("node %0d: packet %0d.%0d not sent here", n, dsrc[n], dseq[n]));
          check(dseq[n] >= next_seq[n][dsrc[n]],
                $sformatf("node %0d: packets of source %0d out of order", n, dsrc[n]));
          next_seq[n][dsrc[n]] = dseq[n] + 1;
          check(dsize[n] == pkt_size[dsrc[n]][dseq[n] % NPKT], "size flit");
        end else begin
          check(loc_out_data[n] == pay(dsrc[n], dseq[n], dk[n] - 2),
                $sformatf("node %0d: payload flit %0d of %0d.%0d", n, dk[n] - 2,
                          dsrc[n], dseq[n]));
        end
        if (dk[n] >= 1 && dk[n] == dsize[n] + 1) begin
          dk[n] = 0;
          delivered++;
        end else dk[n] = dk[n] + 1;
      end
    end
  end

  initial begin
    int t0;
    for (int n = 0; n < NN; n++) begin
      sp[n] = 0; sk[n] = 0; sgate[n] = 1; dk[n] = 0;
      for (int m = 0; m < NN; m++) next_seq[n][m] = 0;
      for (int s = 0; s < NPKT; s++) begin
        pkt_dst[n][s]  = $urandom_range(0, NN - 1);
        pkt_size[n][s] = $urandom_range(1, 8);
      end
    end
    // latency probe: packet 0 of node 00 goes to node 33
    pkt_dst[0][0] = NN - 1;
    for (int n = 1; n < NN; n++) sp[n] = 1;   // others skip packet 0 for now
    sink_all_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    n_send = 1;
    @(posedge clk); t0 = cycle;
    wait (delivered == 1);
    check(t_last_hdr - t0 == 2 * (MX + MY - 1),
          $sformatf("corner-to-corner header latency %0d, expected %0d", t_last_hdr - t0,
                    2 * (MX + MY - 1)));
    // all nodes, random traffic
    @(negedge clk);
    sink_all_ready = 0;
    for (int n = 1; n < NN; n++) pkt_dst[n][0] = n;   // skipped packets stay unused
    n_send = NPKT;
    wait (delivered == TOTAL);
    repeat (20) @(posedge clk);
    check(delivered == TOTAL && sp[0] == NPKT, "every packet delivered");
    check(loc_out_valid == '0, "mesh idle at the end");
    check(inj_stall > 0, "injection back-pressure occurred");
    $display("mesh %0dx%0d: delivered=%0d injection_stalls=%0d", MX, MY, delivered, inj_stall);
    done = 1;
  end
endmodule
