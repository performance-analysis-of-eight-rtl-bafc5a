// eight_port_switch: circuit-switched eight-port switch.
//
// Ports 0..3 connect four clustered PEs, ports 4..7 the neighbouring switches
// (up, down, left, right). Every port has an input block controller (ibc) and
// an output block controller (obc). Each IBC decodes its request and raises the
// request line of one OBC; each OBC sees the request lines of the seven other
// IBCs, arbitrates them in a local and a switch sector and locks its output
// channel to the winner. A locked path passes data combinationally from the
// IBC's data input through the OBC's multiplexers to the port's data output, so
// a circuit once set up carries one data word per clock with no buffering.
//
// Circuit life cycle per port: a requester raises req_i (valid and destination)
// and holds it; after arbitration the path is locked and the request is passed
// to the next hop; the grant (or deny) of the far end comes back one clock per
// switch; the requester then streams data and finally drops req_i, which
// releases the path hop by hop.
//
// The structure (eight ports, IBC/OBC per port, all IBCs wired to all OBCs,
// local/switch sector arbitration) follows the design description; the port
// numbering, the handshake timing and the routing are this design's own.
//
// Parameters: X/Y position of the switch in a COLS x ROWS mesh, used for
// routing. Interface per port p: req_i/data_i/gnt_o/dny_o on the input side,
// req_o/data_o/gnt_i/dny_i on the output side, and the two sector data
// outputs of the port's OBC in sec_data_o.
module eight_port_switch
  import noc_pkg::*;
#(
  parameter int unsigned X    = 1,
  parameter int unsigned Y    = 1,
  parameter int unsigned COLS = 3,
  parameter int unsigned ROWS = 3
) (
  input  logic   clk,
  input  logic   rst_n,
  // Input side of each port (IBC)
  input  req_t   req_i  [N_PORTS],
  input  data_t  data_i [N_PORTS],
  output logic   gnt_o  [N_PORTS],
  output logic   dny_o  [N_PORTS],
  // Output side of each port (OBC)
  output req_t   req_o  [N_PORTS],
  output data_t  data_o [N_PORTS],
  input  logic   gnt_i  [N_PORTS],
  input  logic   dny_i  [N_PORTS],
  // Sector data multiplexer outputs of each OBC ([port][0]: local sector,
  // [port][1]: switch sector); the one holding the channel equals data_o
  output data_t  sec_data_o [N_PORTS][2]
);

  // IBC -> OBC request matrix, indexed [ibc][obc], and its transpose.
  logic  [N_PORTS-1:0] ibc_req [N_PORTS];
  logic  [N_PORTS-1:0] obc_req [N_PORTS];
  // OBC -> IBC answers, indexed [obc][ibc], and their transposes.
  logic  [N_PORTS-1:0] obc_gnt [N_PORTS];
  logic  [N_PORTS-1:0] obc_dny [N_PORTS];
  logic  [N_PORTS-1:0] ibc_gnt [N_PORTS];
  logic  [N_PORTS-1:0] ibc_dny [N_PORTS];
  dest_t               ibc_dest [N_PORTS];
  data_t               ibc_data [N_PORTS];

  always_comb begin
    for (int i = 0; i < N_PORTS; i++) begin
      for (int o = 0; o < N_PORTS; o++) begin
        obc_req[o][i] = ibc_req[i][o];
        ibc_gnt[i][o] = obc_gnt[o][i];
        ibc_dny[i][o] = obc_dny[o][i];
      end
    end
  end

  for (genvar p = 0; p < N_PORTS; p++) begin : g_port
    ibc #(
      .X(X), .Y(Y), .COLS(COLS), .ROWS(ROWS), .PORT(p)
    ) u_ibc (
      .clk    (clk),
      .rst_n  (rst_n),
      .req_i  (req_i[p]),
      .data_i (data_i[p]),
      .gnt_o  (gnt_o[p]),
      .dny_o  (dny_o[p]),
      .req_o  (ibc_req[p]),
      .dest_o (ibc_dest[p]),
      .data_o (ibc_data[p]),
      .gnt_i  (ibc_gnt[p]),
      .dny_i  (ibc_dny[p])
    );

    obc #(
      .PORT(p)
    ) u_obc (
      .clk        (clk),
      .rst_n      (rst_n),
      .req_i      (obc_req[p]),
      .dest_i     (ibc_dest),
      .data_i     (ibc_data),
      .gnt_o      (obc_gnt[p]),
      .dny_o      (obc_dny[p]),
      .req_o      (req_o[p]),
      .data_o     (data_o[p]),
      .gnt_i      (gnt_i[p]),
      .dny_i      (dny_i[p]),
      .sec_data_o (sec_data_o[p])
    );
  end

endmodule
