// noc_pkg: types and constants shared by the NoC of the spectral-imaging MPSoC.
//
// The network is a 2-D mesh of five-port routing nodes carrying 16-bit flits
// (the flit width and the 4x4 size follow the design; everything else here,
// such as the packet format and the port numbering, is this implementation's
// own choice).
//
// Packet format, one flit per line:
//   flit 0  header : [15:8] source address, [7:0] destination address
//                    an address is {x[3:0], y[3:0]}, node "xy" as in the
//                    mesh drawing (x = column from the left, y = row from
//                    the bottom)
//   flit 1  size   : number of payload flits that follow (0 allowed)
//   flit 2..       payload
// Routers look only at the destination byte and at the size flit.
package noc_pkg;

  localparam int unsigned FLIT_W   = 16;   // flit width of the network
  localparam int unsigned COORD_W  = 4;    // bits per mesh coordinate
  localparam int unsigned NPORTS   = 5;

  typedef logic [FLIT_W-1:0] flit_t;

  // Router port numbering
  typedef enum logic [2:0] {
    PORT_E = 3'd0,
    PORT_W = 3'd1,
    PORT_N = 3'd2,
    PORT_S = 3'd3,
    PORT_L = 3'd4
  } port_e;

  typedef struct packed {
    logic [COORD_W-1:0] x;
    logic [COORD_W-1:0] y;
  } addr_t;

  typedef struct packed {
    addr_t src;
    addr_t dst;
  } header_t;

  function automatic addr_t make_addr(input int unsigned x, input int unsigned y);
    addr_t a;
    a.x = COORD_W'(x);
    a.y = COORD_W'(y);
    return a;
  endfunction

  // XY routing: correct the column first, then the row, then deliver locally.
  function automatic port_e xy_route(input addr_t here, input addr_t dst);
    if (dst.x > here.x)      return PORT_E;
    else if (dst.x < here.x) return PORT_W;
    else if (dst.y > here.y) return PORT_N;
    else if (dst.y < here.y) return PORT_S;
    else                     return PORT_L;
  endfunction

endpackage
