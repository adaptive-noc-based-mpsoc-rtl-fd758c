// noc_router: five-port routing node of the 2-D mesh NoC.
//
// Ports E, W, N, S and L (local, towards the network adaptor) each have an
// input buffer (flit_fifo). A packet is switched in wormhole fashion: when the
// header flit reaches the head of an input buffer, the destination is compared
// with this router's own address (XY routing: column first, then row) and the
// input requests one output port. Each output port has its own round-robin
// arbiter that grants one requesting input at a time; the connection then
// stays in place while the header, the size flit and the number of payload
// flits given by the size flit pass, and is released after the last one.
// Flits move at one per cycle per connection; up to five connections are
// active at once.
//
// Link handshake: a flit moves on a link in every cycle where valid and ready
// are both high. in_ready is "input buffer not full" and does not depend on
// in_valid.
//
// Latency: with no contention, a header taken into an empty input buffer at
// clock edge t is granted at edge t+1 and leaves the router at edge t+2; the
// rest of the packet follows at one flit per cycle.
//
// The design names a 16-bit-flit mesh whose routing nodes forward packets to
// the right link; XY routing, wormhole switching, input buffering, per-output
// round-robin arbitration and the buffer depth are this implementation's
// choices.
module noc_router
  import noc_pkg::*;
#(
  parameter int unsigned X         = 0,   // column of this router
  parameter int unsigned Y         = 0,   // row of this router
  parameter int unsigned BUF_DEPTH = 8    // flits per input buffer
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPORTS-1:0] in_valid,
  output logic [NPORTS-1:0] in_ready,
  input  flit_t             in_data  [NPORTS],
  output logic [NPORTS-1:0] out_valid,
  input  logic [NPORTS-1:0] out_ready,
  output flit_t             out_data [NPORTS]
);
  typedef enum logic [1:0] {ST_HDR, ST_SIZE, ST_PAY} in_state_e;

  localparam addr_t HERE = make_addr(X, Y);

  // input side
  flit_t             head     [NPORTS];
  logic [NPORTS-1:0] head_valid;
  logic [NPORTS-1:0] pop;
  in_state_e         st       [NPORTS];
  logic [NPORTS-1:0] alloc;              // input holds an output connection
  port_e             route    [NPORTS];  // output the input is connected to
  flit_t             remaining[NPORTS];  // payload flits still to pass
  logic [NPORTS-1:0] release_in;         // last flit of the packet leaves now

  // output side
  logic [NPORTS-1:0] busy;
  logic [2:0]        owner    [NPORTS];
  logic [2:0]        rr_last  [NPORTS];
  logic [NPORTS-1:0] req      [NPORTS];  // req[o][i]: input i wants output o
  logic [NPORTS-1:0] grant_v;
  logic [2:0]        grant_i  [NPORTS];

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    flit_fifo #(.WIDTH(FLIT_W), .DEPTH(BUF_DEPTH)) u_buf (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (in_valid[i]),
      .in_ready (in_ready[i]),
      .in_data  (in_data[i]),
      .out_valid(head_valid[i]),
      .pop      (pop[i]),
      .out_data (head[i])
    );
  end

  // routing requests
  always_comb begin
    header_t h;
    for (int o = 0; o < NPORTS; o++) req[o] = '0;
    for (int i = 0; i < NPORTS; i++) begin
      h = header_t'(head[i]);
      if (head_valid[i] && st[i] == ST_HDR && !alloc[i])
        req[int'(xy_route(HERE, h.dst))][i] = 1'b1;
    end
  end

  // round-robin arbitration, one arbiter per free output
  always_comb begin
    logic [3:0] cand;
    cand = '0;
    for (int o = 0; o < NPORTS; o++) begin
      grant_v[o] = 1'b0;
      grant_i[o] = '0;
      if (!busy[o]) begin
        for (int k = NPORTS; k >= 1; k--) begin
          cand = {1'b0, rr_last[o]} + 4'(k);
          if (cand >= 4'(NPORTS)) cand = cand - 4'(NPORTS);
          if (req[o][cand[2:0]]) begin
            grant_v[o] = 1'b1;
            grant_i[o] = cand[2:0];
          end
        end
      end
    end
  end

  // crossbar and flit transfer
  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      out_valid[o] = busy[o] && head_valid[owner[o]];
      out_data[o]  = head[owner[o]];
    end
    for (int i = 0; i < NPORTS; i++) begin
      pop[i] = alloc[i] && head_valid[i] && out_ready[route[i]];
      release_in[i] = pop[i] &&
                      ((st[i] == ST_SIZE && head[i] == '0) ||
                       (st[i] == ST_PAY  && remaining[i] == flit_t'(1)));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NPORTS; i++) begin
        st[i]        <= ST_HDR;
        route[i]     <= PORT_L;
        remaining[i] <= '0;
        busy[i]      <= 1'b0;
        owner[i]     <= '0;
        rr_last[i]   <= 3'(NPORTS - 1);
      end
      alloc <= '0;
    end else begin
      // per-input packet tracking
      for (int i = 0; i < NPORTS; i++) begin
        if (pop[i]) begin
          unique case (st[i])
            ST_HDR:  st[i] <= ST_SIZE;
            ST_SIZE: begin
              remaining[i] <= head[i];
              st[i]        <= (head[i] == '0) ? ST_HDR : ST_PAY;
            end
            ST_PAY: begin
              remaining[i] <= remaining[i] - 1'b1;
              if (remaining[i] == flit_t'(1)) st[i] <= ST_HDR;
            end
            default: st[i] <= ST_HDR;
          endcase
        end
        if (release_in[i]) begin
          alloc[i]              <= 1'b0;
          busy[int'(route[i])]  <= 1'b0;
        end
      end
      // new connections (an output is granted only while it is free, so a
      // grant never meets a release of the same output)
      for (int o = 0; o < NPORTS; o++) begin
        if (grant_v[o]) begin
          busy[o]                <= 1'b1;
          owner[o]               <= grant_i[o];
          rr_last[o]             <= grant_i[o];
          alloc[grant_i[o]]      <= 1'b1;
          route[grant_i[o]]      <= port_e'(o);
        end
      end
    end
  end

  // a flit presented on an output stays until it is taken
  for (genvar o = 0; o < NPORTS; o++) begin : g_hold
    a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
      out_valid[o] && !out_ready[o] |=> out_valid[o] && $stable(out_data[o]))
      else $error("noc_router: output %0d dropped a flit", o);
  end
endmodule
