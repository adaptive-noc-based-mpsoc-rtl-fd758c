// noc_mesh: MESH_X x MESH_Y mesh of routing nodes (4x4 by default).
//
// Router (x, y) sits in column x and row y, with node "00" in the lower left
// corner, x growing to the right (east) and y growing upwards (north). Every
// pair of neighbours is joined by two one-way links, one in each direction,
// each a 16-bit flit bus with valid/ready. The local port of every router is
// brought out as element n = y*MESH_X + x of the loc_* arrays, for the
// network adaptor of that node.
//
// Router ports on the border of the mesh have no neighbour: their inputs are
// idle and their outputs are always ready, so a packet addressed outside the
// mesh leaves through the border and is dropped instead of blocking the
// network.
//
// The 4x4 size, the 16-bit flits and the node numbering follow the design;
// the treatment of border ports is this implementation's choice.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X    = 4,
  parameter int unsigned MESH_Y    = 4,
  parameter int unsigned BUF_DEPTH = 8,
  localparam int unsigned NODES    = MESH_X * MESH_Y
) (
  input  logic             clk,
  input  logic             rst_n,
  // local ports: into the network
  input  logic [NODES-1:0] loc_in_valid,
  output logic [NODES-1:0] loc_in_ready,
  input  flit_t            loc_in_data  [NODES],
  // local ports: out of the network
  output logic [NODES-1:0] loc_out_valid,
  input  logic [NODES-1:0] loc_out_ready,
  output flit_t            loc_out_data [NODES]
);
  logic [NPORTS-1:0] in_valid  [MESH_X][MESH_Y];
  logic [NPORTS-1:0] in_ready  [MESH_X][MESH_Y];
  flit_t             in_data   [MESH_X][MESH_Y][NPORTS];
  logic [NPORTS-1:0] out_valid [MESH_X][MESH_Y];
  logic [NPORTS-1:0] out_ready [MESH_X][MESH_Y];
  flit_t             out_data  [MESH_X][MESH_Y][NPORTS];

  for (genvar x = 0; x < MESH_X; x++) begin : g_x
    for (genvar y = 0; y < MESH_Y; y++) begin : g_y
      localparam int unsigned N = y * MESH_X + x;

      noc_router #(.X(x), .Y(y), .BUF_DEPTH(BUF_DEPTH)) u_router (
        .clk      (clk),
        .rst_n    (rst_n),
        .in_valid (in_valid[x][y]),
        .in_ready (in_ready[x][y]),
        .in_data  (in_data[x][y]),
        .out_valid(out_valid[x][y]),
        .out_ready(out_ready[x][y]),
        .out_data (out_data[x][y])
      );

      // local port
      assign in_valid[x][y][PORT_L]  = loc_in_valid[N];
      assign in_data[x][y][PORT_L]   = loc_in_data[N];
      assign loc_in_ready[N]         = in_ready[x][y][PORT_L];
      assign loc_out_valid[N]        = out_valid[x][y][PORT_L];
      assign loc_out_data[N]         = out_data[x][y][PORT_L];
      assign out_ready[x][y][PORT_L] = loc_out_ready[N];

      // east neighbour: our E output feeds its W input
      if (x + 1 < MESH_X) begin : g_e
        assign in_valid[x][y][PORT_E]  = out_valid[x+1][y][PORT_W];
        assign in_data[x][y][PORT_E]   = out_data[x+1][y][PORT_W];
        assign out_ready[x][y][PORT_E] = in_ready[x+1][y][PORT_W];
      end else begin : g_e_border
        assign in_valid[x][y][PORT_E]  = 1'b0;
        assign in_data[x][y][PORT_E]   = '0;
        assign out_ready[x][y][PORT_E] = 1'b1;
      end
      if (x > 0) begin : g_w
        assign in_valid[x][y][PORT_W]  = out_valid[x-1][y][PORT_E];
        assign in_data[x][y][PORT_W]   = out_data[x-1][y][PORT_E];
        assign out_ready[x][y][PORT_W] = in_ready[x-1][y][PORT_E];
      end else begin : g_w_border
        assign in_valid[x][y][PORT_W]  = 1'b0;
        assign in_data[x][y][PORT_W]   = '0;
        assign out_ready[x][y][PORT_W] = 1'b1;
      end
      if (y + 1 < MESH_Y) begin : g_n
        assign in_valid[x][y][PORT_N]  = out_valid[x][y+1][PORT_S];
        assign in_data[x][y][PORT_N]   = out_data[x][y+1][PORT_S];
        assign out_ready[x][y][PORT_N] = in_ready[x][y+1][PORT_S];
      end else begin : g_n_border
        assign in_valid[x][y][PORT_N]  = 1'b0;
        assign in_data[x][y][PORT_N]   = '0;
        assign out_ready[x][y][PORT_N] = 1'b1;
      end
      if (y > 0) begin : g_s
        assign in_valid[x][y][PORT_S]  = out_valid[x][y-1][PORT_N];
        assign in_data[x][y][PORT_S]   = out_data[x][y-1][PORT_N];
        assign out_ready[x][y][PORT_S] = in_ready[x][y-1][PORT_N];
      end else begin : g_s_border
        assign in_valid[x][y][PORT_S]  = 1'b0;
        assign in_data[x][y][PORT_S]   = '0;
        assign out_ready[x][y][PORT_S] = 1'b1;
      end
    end
  end
endmodule
