// noc_pkg: types and constants shared by the eight-port circuit-switched
// network.
//
// Each switch has eight ports. Ports 0..3 connect the four clustered
// processing elements (PEs); ports 4..7 connect the neighbouring switches in
// the order up, down, left, right. Every port carries a request (valid bit
// plus destination address) and a data channel forward, and a grant and a deny
// bit backward.
//
// The eight-port split (four local, four switch) and the 8-bit data channel
// follow the design description. The destination address format, the port
// numbering and the dimension-ordered (X first, then Y) routing are this
// design's own choices.
package noc_pkg;

  // Port counts of one switch.
  localparam int unsigned N_LOCAL  = 4;
  localparam int unsigned N_SWITCH = 4;
  localparam int unsigned N_PORTS  = N_LOCAL + N_SWITCH;
  localparam int unsigned PORT_W   = $clog2(N_PORTS);

  // Width of the data channel.
  localparam int unsigned DATA_W = 8;

  // Width of one mesh coordinate and of the local PE index in an address.
  localparam int unsigned COORD_W = 2;
  localparam int unsigned LOCAL_W = $clog2(N_LOCAL);

  // Switch port numbers.
  typedef enum logic [PORT_W-1:0] {
    P_PE0   = 3'd0,
    P_PE1   = 3'd1,
    P_PE2   = 3'd2,
    P_PE3   = 3'd3,
    P_UP    = 3'd4,
    P_DOWN  = 3'd5,
    P_LEFT  = 3'd6,
    P_RIGHT = 3'd7
  } port_e;

  // Destination address carried by a request: switch column x, switch row y
  // (row 0 is the top row) and the PE index on that switch.
  typedef struct packed {
    logic [COORD_W-1:0] x;
    logic [COORD_W-1:0] y;
    logic [LOCAL_W-1:0] pe;
  } dest_t;

  // Forward request signal of a port.
  typedef struct packed {
    logic  valid;
    dest_t dest;
  } req_t;

  typedef logic [DATA_W-1:0] data_t;

  // True for ports that face a PE.
  function automatic logic is_local_port(input int unsigned p);
    return p < N_LOCAL;
  endfunction

  // Number of requesters in one arbitration sector of the OBC of port `port`.
  // The sector of the port's own kind has one requester fewer, because a port
  // never requests its own output.
  function automatic int unsigned sector_size(input int unsigned port, input logic local_sector);
    if (local_sector) return is_local_port(port) ? N_LOCAL - 1 : N_LOCAL;
    else              return is_local_port(port) ? N_SWITCH : N_SWITCH - 1;
  endfunction

  // Port number of requester k of a sector of the OBC of port `port`.
  function automatic int unsigned sector_port(input int unsigned port, input logic local_sector,
                                              input int unsigned k);
    int unsigned base;
    int unsigned own;
    base = local_sector ? 0 : N_LOCAL;
    if (local_sector == is_local_port(port)) begin
      own = port - base;
      return base + ((k < own) ? k : k + 1);
    end
    return base + k;
  endfunction

endpackage
