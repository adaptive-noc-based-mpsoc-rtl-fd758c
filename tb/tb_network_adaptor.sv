// tb_network_adaptor: self-checking testbench of the network adaptor.
//
// Send side: a model PE sends 25 packets of 1 to 6 words to random
// destinations, pausing at random between words, while the router side
// accepts flits with random back-pressure. Every flit is compared with the
// expected packet: header {own address, destination}, size = 2 x words, then
// each word upper half first. A second phase sends packets back to back into
// an always-ready router and checks that a packet of n words takes 2n+3
// cycles.
//
// Receive side: the testbench plays the router and delivers 25 packets with
// random sources and 0 to 9 payload flits (odd sizes included) while the PE
// side takes words with random back-pressure. Every word is checked against
// the pair of flits it is made of, with its source, its length in words and
// the last-word marker.
module tb_network_adaptor;
  import noc_pkg::*;

  localparam int unsigned NX = 2, NY = 3;   // address of the adaptor under test
  localparam int unsigned NPKT = 25;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        pe_tx_valid, pe_tx_ready, pe_rx_valid, pe_rx_ready, pe_rx_last;
  logic [31:0] pe_tx_data, pe_rx_data;
  addr_t       pe_tx_dst, pe_rx_src;
  logic [14:0] pe_tx_len, pe_rx_len;
  logic        net_out_valid, net_out_ready, net_in_valid, net_in_ready;
  flit_t       net_out_data, net_in_data;

  network_adaptor #(.X(NX), .Y(NY)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [31:0] word_of(input int p, input int w);
    return {8'(p), 8'(w), 16'(p * 37 + w * 11 + 5)};
  endfunction
  function automatic flit_t rflit_of(input int p, input int k);
    return {8'(p + 100), 8'(k * 7 + 3)};
  endfunction

  int tx_len [NPKT];
  int tx_dx  [NPKT], tx_dy [NPKT];
  int rx_size[NPKT], rx_src[NPKT];

  int cycle = 0;
  always_ff @(posedge clk) cycle <= cycle + 1;

  // ---------------- send side ----------------
  int  tp = 0, tw = 0;         // packet and word being offered
  bit  tx_gate = 0;
  bit  tx_burst = 0;           // phase 2: no pauses, always ready
  int  tx_total = NPKT;

  assign pe_tx_valid = (tp < tx_total) && (tx_gate || tx_burst);
  assign pe_tx_data  = word_of(tp, tw);
  assign pe_tx_dst   = make_addr(tx_dx[tp % NPKT], tx_dy[tp % NPKT]);
  assign pe_tx_len   = 15'(tx_len[tp % NPKT]);

  always_ff @(posedge clk) begin
    if (rst_n) begin
      if (pe_tx_valid && pe_tx_ready) begin
        if (tw == tx_len[tp % NPKT] - 1) begin
          tp <= tp + 1;
          tw <= 0;
        end else tw <= tw + 1;
        tx_gate <= ($urandom_range(0, 3) != 0);
      end else if (!tx_gate) tx_gate <= ($urandom_range(0, 2) == 0);
    end
  end

  // router side of the send path
  int  op = 0, ok_ = 0;        // packet and flit index expected
  int  hdr_time [2*NPKT];
  always_ff @(posedge clk) begin
    net_out_ready <= tx_burst ? 1'b1 : ($urandom_range(0, 2) != 0);
  end
  always_ff @(posedge clk) begin
    flit_t exp_f;
    int    n;
    if (rst_n && net_out_valid && net_out_ready) begin
      n = tx_len[op % NPKT];
      if (ok_ == 0) begin
        exp_f = {make_addr(NX, NY), make_addr(tx_dx[op % NPKT], tx_dy[op % NPKT])};
        hdr_time[op] = cycle;
      end else if (ok_ == 1) exp_f = flit_t'(2 * n);
      else if (ok_ % 2 == 0) exp_f = word_of(op, (ok_ - 2) / 2) >> 16;
      else exp_f = word_of(op, (ok_ - 2) / 2) & 32'hffff;
      check(net_out_data == exp_f, $sformatf("tx packet %0d flit %0d: got %h expected %h",
                                             op, ok_, net_out_data, exp_f));
      if (ok_ == 2 * n + 1) begin
        op  <= op + 1;
        ok_ <= 0;
      end else ok_ <= ok_ + 1;
    end
  end

  // ---------------- receive side ----------------
  int  rp = 0, rk = 0;         // router-side packet and flit index
  bit  rgate = 0;
  assign net_in_valid = rst_n && (rp < NPKT) && rgate;
  assign net_in_data  = (rk == 0) ? flit_t'({8'(rx_src[rp % NPKT]), make_addr(NX, NY)}) :
                        (rk == 1) ? flit_t'(rx_size[rp % NPKT]) : rflit_of(rp, rk - 2);
  always_ff @(posedge clk) begin
    if (net_in_valid && net_in_ready) begin
      if (rk == rx_size[rp % NPKT] + 1) begin
        rp <= rp + 1;
        rk <= 0;
      end else rk <= rk + 1;
      rgate <= ($urandom_range(0, 3) != 0);
    end else if (!rgate) rgate <= ($urandom_range(0, 1) == 0);
  end
  always_ff @(posedge clk) pe_rx_ready <= ($urandom_range(0, 2) != 0);

  int  cp = 0, cw = 0;         // PE-side expected packet and word
  int  rx_words_seen = 0;
  always_ff @(posedge clk) begin
    logic [31:0] exp_w;
    int sz, nw;
    // skip packets that carry no payload
    sz = rx_size[cp];
    if (pe_rx_valid && pe_rx_ready) begin
      nw = (sz + 1) / 2;
      exp_w[31:16] = rflit_of(cp, 2 * cw);
      exp_w[15:0]  = (2 * cw + 1 < sz) ? rflit_of(cp, 2 * cw + 1) : 16'h0;
      check(pe_rx_data == exp_w, $sformatf("rx packet %0d word %0d: got %h expected %h",
                                           cp, cw, pe_rx_data, exp_w));
      check(pe_rx_src == addr_t'(rx_src[cp]), "rx source address");
      check(int'(pe_rx_len) == nw, "rx length in words");
      check(pe_rx_last == (cw == nw - 1), "rx last-word marker");
      rx_words_seen++;
      if (cw == nw - 1) begin
        cw = 0;
        cp++;
      end else cw++;
    end
    while (cp < NPKT && rx_size[cp] == 0) cp++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NPKT; p++) begin
      tx_len[p]  = $urandom_range(1, 6);
      tx_dx[p]   = $urandom_range(0, 3);
      tx_dy[p]   = $urandom_range(0, 3);
      rx_size[p] = (p == 1) ? 0 : (p == 2) ? 5 : $urandom_range(0, 9);
      rx_src[p]  = $urandom_range(0, 255);
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (op == NPKT && rp == NPKT && cp == NPKT);
    // phase 2: back-to-back packets, no back-pressure
    @(negedge clk);
    tx_burst = 1;
    tx_total = NPKT + 6;
    wait (op == NPKT + 6);
    for (int p = NPKT + 1; p < NPKT + 6; p++)
      check(hdr_time[p] - hdr_time[p-1] == 2 * tx_len[(p-1) % NPKT] + 3,
            $sformatf("packet %0d took %0d cycles, expected %0d", p - 1,
                      hdr_time[p] - hdr_time[p-1], 2 * tx_len[(p-1) % NPKT] + 3));
    repeat (5) @(posedge clk);
    check(rx_words_seen > 0, "words received");
    $display("tx packets=%0d rx words=%0d", op, rx_words_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
