// network_adaptor: connects a 32-bit processing element to the local port of
// its routing node.
//
// Send side: the PE offers a stream of 32-bit words (pe_tx_valid/ready). The
// destination address pe_tx_dst and the packet length pe_tx_len (in words,
// at least 1) are read together with the first word of a packet. The adaptor
// emits a header flit {own address, destination}, a size flit (2 x length)
// and then every word as two flits, upper half first. A word is taken from
// the PE (pe_tx_ready high) when its lower half is accepted by the router.
// One cycle is spent between packets to read the next packet's fields, so a
// packet of n words occupies the link for 2n+3 cycles with no back-pressure.
//
// Receive side: the adaptor takes the header and size flits, then joins every
// two payload flits into a word delivered on pe_rx_* with the packet's source
// address, its length in words and a last-word marker. An odd final flit is
// delivered as the upper half of a word with a zero lower half. The router is
// held back (net_in_ready low) while the PE does not take a word.
//
// The design gives the adaptor's role (letting the 32-bit PE talk to its
// router over 16-bit flits); the packet format, the word split and the
// handshakes are this implementation's choices.
module network_adaptor
  import noc_pkg::*;
#(
  parameter int unsigned X     = 0,   // column of the node
  parameter int unsigned Y     = 0,   // row of the node
  parameter int unsigned LEN_W = 15   // width of the length in words
) (
  input  logic             clk,
  input  logic             rst_n,
  // PE send stream
  input  logic             pe_tx_valid,
  output logic             pe_tx_ready,
  input  logic [31:0]      pe_tx_data,
  input  addr_t            pe_tx_dst,
  input  logic [LEN_W-1:0] pe_tx_len,
  // PE receive stream
  output logic             pe_rx_valid,
  input  logic             pe_rx_ready,
  output logic [31:0]      pe_rx_data,
  output addr_t            pe_rx_src,
  output logic [LEN_W-1:0] pe_rx_len,
  output logic             pe_rx_last,
  // router local port
  output logic             net_out_valid,
  input  logic             net_out_ready,
  output flit_t            net_out_data,
  input  logic             net_in_valid,
  output logic             net_in_ready,
  input  flit_t            net_in_data
);
  localparam addr_t HERE = make_addr(X, Y);

  // ---------------- send side ----------------
  typedef enum logic [2:0] {TX_IDLE, TX_HDR, TX_SIZE, TX_HI, TX_LO} tx_state_e;
  tx_state_e        tx_st;
  addr_t            tx_dst;
  logic [LEN_W-1:0] tx_len, tx_left;

  always_comb begin
    net_out_valid = 1'b0;
    net_out_data  = '0;
    pe_tx_ready   = 1'b0;
    unique case (tx_st)
      TX_HDR:  begin
        net_out_valid = 1'b1;
        net_out_data  = flit_t'({HERE, tx_dst});
      end
      TX_SIZE: begin
        net_out_valid = 1'b1;
        net_out_data  = flit_t'({tx_len, 1'b0});
      end
      TX_HI:   begin
        net_out_valid = pe_tx_valid;
        net_out_data  = pe_tx_data[31:16];
      end
      TX_LO:   begin
        net_out_valid = pe_tx_valid;
        net_out_data  = pe_tx_data[15:0];
        pe_tx_ready   = net_out_ready;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_st   <= TX_IDLE;
      tx_dst  <= '0;
      tx_len  <= '0;
      tx_left <= '0;
    end else begin
      unique case (tx_st)
        TX_IDLE: if (pe_tx_valid) begin
          tx_dst  <= pe_tx_dst;
          tx_len  <= pe_tx_len;
          tx_left <= pe_tx_len;
          tx_st   <= TX_HDR;
        end
        TX_HDR:  if (net_out_ready) tx_st <= TX_SIZE;
        TX_SIZE: if (net_out_ready) tx_st <= TX_HI;
        TX_HI:   if (pe_tx_valid && net_out_ready) tx_st <= TX_LO;
        TX_LO:   if (pe_tx_valid && net_out_ready) begin
          tx_left <= tx_left - 1'b1;
          tx_st   <= (tx_left == LEN_W'(1)) ? TX_IDLE : TX_HI;
        end
        default: tx_st <= TX_IDLE;
      endcase
    end
  end

  // ---------------- receive side ----------------
  typedef enum logic [1:0] {RX_HDR, RX_SIZE, RX_HI, RX_LO} rx_state_e;
  rx_state_e   rx_st;
  flit_t       rx_left;     // payload flits still to come
  logic [15:0] rx_hi;
  header_t     rx_hdr;

  assign rx_hdr = header_t'(net_in_data);

  always_comb begin
    net_in_ready = 1'b0;
    pe_rx_valid  = 1'b0;
    pe_rx_data   = {rx_hi, net_in_data};
    pe_rx_last   = (rx_left == flit_t'(1));
    unique case (rx_st)
      RX_HDR, RX_SIZE: net_in_ready = 1'b1;
      RX_HI: begin
        if (rx_left == flit_t'(1)) begin   // odd final flit
          pe_rx_valid  = net_in_valid;
          pe_rx_data   = {net_in_data, 16'h0};
          net_in_ready = pe_rx_ready;
        end else begin
          net_in_ready = 1'b1;
        end
      end
      RX_LO: begin
        pe_rx_valid  = net_in_valid;
        net_in_ready = pe_rx_ready;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_st     <= RX_HDR;
      rx_left   <= '0;
      rx_hi     <= '0;
      pe_rx_src <= '0;
      pe_rx_len <= '0;
    end else if (net_in_valid && net_in_ready) begin
      unique case (rx_st)
        RX_HDR: begin
          pe_rx_src <= rx_hdr.src;
          rx_st     <= RX_SIZE;
        end
        RX_SIZE: begin
          rx_left   <= net_in_data;
          pe_rx_len <= LEN_W'((net_in_data + 1'b1) >> 1);
          rx_st     <= (net_in_data == '0) ? RX_HDR : RX_HI;
        end
        RX_HI: begin
          rx_hi   <= net_in_data;
          rx_left <= rx_left - 1'b1;
          rx_st   <= (rx_left == flit_t'(1)) ? RX_HDR : RX_LO;
        end
        RX_LO: begin
          rx_left <= rx_left - 1'b1;
          rx_st   <= (rx_left == flit_t'(1)) ? RX_HDR : RX_HI;
        end
        default: rx_st <= RX_HDR;
      endcase
    end
  end

  a_tx_len_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
    (tx_st == TX_IDLE && pe_tx_valid) |-> pe_tx_len != '0)
    else $error("network_adaptor: packet of zero words");
  a_tx_hold: assert property (@(posedge clk) disable iff (!rst_n)
    net_out_valid && !net_out_ready |=> net_out_valid && $stable(net_out_data))
    else $error("network_adaptor: flit withdrawn before it was taken");
endmodule
