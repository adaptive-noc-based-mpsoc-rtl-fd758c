// pe_task_model: behavioural model of a processing element running one task
// of the authentication algorithm, attached to the PE side of a network
// adaptor. Not synthesizable; used only by the system testbench.
//
// For every region it waits until it holds NPKT_IN packets of IN_LEN words
// from each of its NSRC sources (sources are told apart by the source address
// delivered with every word; packets from one source arrive in order), joins
// them, spends DELAY cycles "computing" the stand-in function of
// task_model_pkg, then sends the result as one packet to each of its NDST
// destinations in turn. Regions are processed one after the other, so a node
// can already receive region r+1 while it computes region r. Incoming words
// are taken with random pauses to exercise back-pressure.
module pe_task_model
  import noc_pkg::*;
  import task_model_pkg::*;
#(
  parameter kind_e        KIND    = K_AVG,
  parameter int unsigned  NSRC    = 1,
  parameter logic [63:0]  SRCS    = '0,   // source addresses, byte i = source i
  parameter int unsigned  NPKT_IN = 1,    // packets per source per region
  parameter int unsigned  IN_LEN  = 3,    // words per input packet
  parameter int unsigned  NDST    = 1,
  parameter logic [63:0]  DSTS    = '0,   // destination addresses
  parameter int unsigned  NL      = 16,   // wavelengths
  parameter int unsigned  NP      = 64,   // pixels in the window
  parameter int unsigned  DELAY   = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        tx_valid,
  input  logic        tx_ready,
  output logic [31:0] tx_data,
  output addr_t       tx_dst,
  output logic [14:0] tx_len,
  input  logic        rx_valid,
  output logic        rx_ready,
  input  logic [31:0] rx_data,
  input  addr_t       rx_src,
  input  logic [14:0] rx_len,
  input  logic        rx_last
);
  word_q inq [NSRC];            // received words, per source
  int    pkts_in [NSRC];        // complete packets held, per source
  int    region = 0;            // region being worked on
  bit    busy = 0;              // computing
  int    len_errors = 0;
  int    src_errors = 0;

  // receive: accept words with random pauses
  always @(posedge clk) rx_ready <= rst_n && ($urandom_range(0, 4) != 0);

  always @(posedge clk) begin
    if (rx_valid && rx_ready) begin
      int s;
      s = -1;
      for (int i = 0; i < NSRC; i++) if (SRCS[8*i +: 8] == rx_src) s = i;
      if (int'(rx_len) != IN_LEN) len_errors++;
      if (s < 0) begin
        src_errors++;
        $display("pe_task_model: word from unexpected source %h", rx_src);
      end else begin
        inq[s].push_back(rx_data);
        if (rx_last) pkts_in[s]++;
      end
    end
  end

  word_q result;
  bit    sending = 0;
  int    dst_i = 0, word_i = 0;

  assign tx_valid = sending;
  assign tx_data  = sending ? result[word_i] : '0;
  assign tx_dst   = addr_t'(DSTS[8*dst_i +: 8]);
  assign tx_len   = 15'(result.size());

  initial begin
    for (int i = 0; i < NSRC; i++) pkts_in[i] = 0;
    wait (rst_n);
    forever begin
      bit ready_all;
      word_q a, b;
      @(negedge clk);
      ready_all = 1;
      for (int i = 0; i < NSRC; i++) if (pkts_in[i] < NPKT_IN) ready_all = 0;
      if (ready_all) begin
        a = {}; b = {};
        for (int i = 0; i < NSRC; i++) pkts_in[i] -= NPKT_IN;
        repeat (NPKT_IN * IN_LEN) a.push_back(inq[0].pop_front());
        if (NSRC > 1) repeat (NPKT_IN * IN_LEN) b.push_back(inq[NSRC - 1].pop_front());
        busy = 1;
        repeat (DELAY) @(negedge clk);
        case (KIND)
          K_AVG:   result = f_avg(a, NL, NP);
          K_XYZ:   result = f_xyz(a);
          K_RGB:   result = f_rgb(a);
          K_LAB:   result = f_lab(a);
          default: result = f_dist(a, b);
        endcase
        busy = 0;
        for (int d = 0; d < NDST; d++) begin
          dst_i = d; word_i = 0; sending = 1;
          while (sending) begin
            // a word moves at the next edge when ready is high now
            if (tx_ready) begin
              if (word_i == result.size() - 1) begin
                @(posedge clk);
                #1 sending = 0;
              end else begin
                @(posedge clk);
                #1 word_i++;
              end
            end
            @(negedge clk);
          end
        end
        region++;
      end
    end
  end
endmodule
