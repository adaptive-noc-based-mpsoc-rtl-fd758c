// mpsoc_top: communication fabric of the NoC-based MPSoC for spectral-image
// art authentication.
//
// A MESH_X x MESH_Y mesh of routing nodes (default 4x4, 16-bit flits) with a
// network adaptor at every node. Each node hosts one processing element: in
// the intended system a 32-bit processor that runs one task of the
// authentication algorithm (window averages, XYZ / RGB / Lab colour
// projections and the colour and multispectral distances), plus one master
// processor for supervision. The processors are not part of this RTL: the
// 32-bit PE side of every adaptor is brought out as element n = y*MESH_X + x
// of the pe_* arrays, node (x, y) being column x, row y from the lower left.
//
// A PE sends a packet by offering words on pe_tx_* with the destination node
// and the word count, and receives words on pe_rx_* tagged with the sending
// node; see network_adaptor and noc_router for the packet format, the
// handshakes and the latencies.
//
// The 4x4 mesh, the 16-bit flits, the adaptor between PE and router and the
// one-task-per-node use follow the design; the packet format and the
// handshakes are this implementation's own.
module mpsoc_top
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X    = 4,
  parameter int unsigned MESH_Y    = 4,
  parameter int unsigned BUF_DEPTH = 8,
  parameter int unsigned LEN_W     = 15,
  localparam int unsigned NODES    = MESH_X * MESH_Y
) (
  input  logic             clk,
  input  logic             rst_n,
  // PE send streams
  input  logic [NODES-1:0] pe_tx_valid,
  output logic [NODES-1:0] pe_tx_ready,
  input  logic [31:0]      pe_tx_data [NODES],
  input  addr_t            pe_tx_dst  [NODES],
  input  logic [LEN_W-1:0] pe_tx_len  [NODES],
  // PE receive streams
  output logic [NODES-1:0] pe_rx_valid,
  input  logic [NODES-1:0] pe_rx_ready,
  output logic [31:0]      pe_rx_data [NODES],
  output addr_t            pe_rx_src  [NODES],
  output logic [LEN_W-1:0] pe_rx_len  [NODES],
  output logic [NODES-1:0] pe_rx_last
);
  logic [NODES-1:0] na_out_valid, na_out_ready, na_in_valid, na_in_ready;
  flit_t            na_out_data [NODES];
  flit_t            na_in_data  [NODES];

  noc_mesh #(.MESH_X(MESH_X), .MESH_Y(MESH_Y), .BUF_DEPTH(BUF_DEPTH)) u_mesh (
    .clk          (clk),
    .rst_n        (rst_n),
    .loc_in_valid (na_out_valid),
    .loc_in_ready (na_out_ready),
    .loc_in_data  (na_out_data),
    .loc_out_valid(na_in_valid),
    .loc_out_ready(na_in_ready),
    .loc_out_data (na_in_data)
  );

  for (genvar n = 0; n < NODES; n++) begin : g_node
    network_adaptor #(.X(n % MESH_X), .Y(n / MESH_X), .LEN_W(LEN_W)) u_na (
      .clk          (clk),
      .rst_n        (rst_n),
      .pe_tx_valid  (pe_tx_valid[n]),
      .pe_tx_ready  (pe_tx_ready[n]),
      .pe_tx_data   (pe_tx_data[n]),
      .pe_tx_dst    (pe_tx_dst[n]),
      .pe_tx_len    (pe_tx_len[n]),
      .pe_rx_valid  (pe_rx_valid[n]),
      .pe_rx_ready  (pe_rx_ready[n]),
      .pe_rx_data   (pe_rx_data[n]),
      .pe_rx_src    (pe_rx_src[n]),
      .pe_rx_len    (pe_rx_len[n]),
      .pe_rx_last   (pe_rx_last[n]),
      .net_out_valid(na_out_valid[n]),
      .net_out_ready(na_out_ready[n]),
      .net_out_data (na_out_data[n]),
      .net_in_valid (na_in_valid[n]),
      .net_in_ready (na_in_ready[n]),
      .net_in_data  (na_in_data[n])
    );
  end
endmodule
