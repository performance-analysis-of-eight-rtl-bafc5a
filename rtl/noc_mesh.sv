// noc_mesh: circuit-switched network on chip, a COLS x ROWS mesh of
// eight-port switches with four processing elements (PEs) clustered on each.
//
// Switch (x, y) sits in column x and row y (row 0 at the top). Its ports 4..7
// (up, down, left, right) connect to the facing ports of the neighbouring
// switches; ports that face the edge of the mesh are tied off, and the switch's
// IBCs deny any request that would leave the mesh. Ports 0..3 are brought out
// as PE ports. PE number n = (y * COLS + x) * 4 + k is PE k of switch (x, y),
// and it is addressed in a request by dest = {x, y, k}.
//
// A PE opens a circuit by holding pe_req_i[n] (valid plus destination). The
// request is locked hop by hop along the dimension-ordered route and appears
// at the destination PE as pe_req_o[m]. The destination answers with
// pe_gnt_i[m] (accept) or pe_dny_i[m] (refuse); the answer travels back one
// clock per switch to pe_gnt_o[n] / pe_dny_o[n]. Once granted, the source
// drives pe_data_i[n] and the same value appears, in the same cycle, on
// pe_data_o[m]: the path holds no register, which gives a guaranteed
// throughput of one word per clock. Dropping pe_req_i[n] releases the path.
// A PE never sends to itself (the request is denied).
//
// The 3 x 3 size and four PEs per switch are the configuration the design
// description shows; the handshake details are this design's own.
//
// The request and grant paths are registered at every hop. The data path is
// combinational through each switch, so the netlist holds structural loops
// through the mesh (a switch output feeds a neighbour's input, whose outputs
// feed back). No such loop is ever active: a locked path follows a
// dimension-ordered route, which never revisits a switch, so the data
// multiplexers that are selected at any time form chains, not cycles.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned COLS = 3,
  parameter int unsigned ROWS = 3
) (
  input  logic   clk,
  input  logic   rst_n,
  // PE side, source direction (PE -> network)
  input  req_t   pe_req_i  [COLS*ROWS*N_LOCAL],
  input  data_t  pe_data_i [COLS*ROWS*N_LOCAL],
  output logic   pe_gnt_o  [COLS*ROWS*N_LOCAL],
  output logic   pe_dny_o  [COLS*ROWS*N_LOCAL],
  // PE side, sink direction (network -> PE)
  output req_t   pe_req_o  [COLS*ROWS*N_LOCAL],
  output data_t  pe_data_o [COLS*ROWS*N_LOCAL],
  input  logic   pe_gnt_i  [COLS*ROWS*N_LOCAL],
  input  logic   pe_dny_i  [COLS*ROWS*N_LOCAL]
);

  localparam int unsigned N_SW = COLS * ROWS;

  // Per-switch port signals.
  req_t  sw_req_i  [N_SW][N_PORTS];
  data_t sw_data_i [N_SW][N_PORTS];
  logic  sw_gnt_o  [N_SW][N_PORTS];
  logic  sw_dny_o  [N_SW][N_PORTS];
  req_t  sw_req_o  [N_SW][N_PORTS];
  data_t sw_data_o [N_SW][N_PORTS];
  logic  sw_gnt_i  [N_SW][N_PORTS];
  logic  sw_dny_i  [N_SW][N_PORTS];

  // Index of the neighbour of switch s through switch port p, or -1 at an edge.
  function automatic int neighbour(input int s, input int p);
    int x;
    int y;
    x = s % COLS;
    y = s / COLS;
    case (p)
      int'(P_UP):    return (y > 0)        ? s - COLS : -1;
      int'(P_DOWN):  return (y < ROWS - 1) ? s + COLS : -1;
      int'(P_LEFT):  return (x > 0)        ? s - 1    : -1;
      int'(P_RIGHT): return (x < COLS - 1) ? s + 1    : -1;
      default: return -1;
    endcase
  endfunction

  // Port of the neighbour that faces port p.
  function automatic int opposite(input int p);
    case (p)
      int'(P_UP):    return int'(P_DOWN);
      int'(P_DOWN):  return int'(P_UP);
      int'(P_LEFT):  return int'(P_RIGHT);
      default: return int'(P_LEFT);
    endcase
  endfunction

  for (genvar s = 0; s < N_SW; s++) begin : g_sw
    // PE ports.
    for (genvar k = 0; k < N_LOCAL; k++) begin : g_pe
      assign sw_req_i[s][k]           = pe_req_i[s*N_LOCAL + k];
      assign sw_data_i[s][k]          = pe_data_i[s*N_LOCAL + k];
      assign pe_gnt_o[s*N_LOCAL + k]  = sw_gnt_o[s][k];
      assign pe_dny_o[s*N_LOCAL + k]  = sw_dny_o[s][k];
      assign pe_req_o[s*N_LOCAL + k]  = sw_req_o[s][k];
      assign pe_data_o[s*N_LOCAL + k] = sw_data_o[s][k];
      assign sw_gnt_i[s][k]           = pe_gnt_i[s*N_LOCAL + k];
      assign sw_dny_i[s][k]           = pe_dny_i[s*N_LOCAL + k];
    end

    // Switch-to-switch links.
    for (genvar p = N_LOCAL; p < N_PORTS; p++) begin : g_link
      localparam int NB = neighbour(s, p);
      localparam int OP = opposite(p);
      if (NB >= 0) begin : g_on
        assign sw_req_i[s][p]  = sw_req_o[NB][OP];
        assign sw_data_i[s][p] = sw_data_o[NB][OP];
        assign sw_gnt_i[s][p]  = sw_gnt_o[NB][OP];
        assign sw_dny_i[s][p]  = sw_dny_o[NB][OP];
      end else begin : g_edge
        assign sw_req_i[s][p]  = '0;
        assign sw_data_i[s][p] = '0;
        assign sw_gnt_i[s][p]  = 1'b0;
        assign sw_dny_i[s][p]  = 1'b0;
      end
    end

    eight_port_switch #(
      .X(s % COLS), .Y(s / COLS), .COLS(COLS), .ROWS(ROWS)
    ) u_switch (
      .clk        (clk),
      .rst_n      (rst_n),
      .req_i      (sw_req_i[s]),
      .data_i     (sw_data_i[s]),
      .gnt_o      (sw_gnt_o[s]),
      .dny_o      (sw_dny_o[s]),
      .req_o      (sw_req_o[s]),
      .data_o     (sw_data_o[s]),
      .gnt_i      (sw_gnt_i[s]),
      .dny_i      (sw_dny_i[s]),
      .sec_data_o ()
    );
  end

  initial begin
    assert (COLS <= 2**COORD_W && ROWS <= 2**COORD_W)
      else $error("mesh larger than the address format allows");
  end

endmodule
