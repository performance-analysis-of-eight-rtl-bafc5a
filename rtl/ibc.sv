// ibc: input block controller of one switch port.
//
// The IBC receives the request of the PE or neighbour switch on its port,
// works out from the request's destination address which output port of this
// switch leads there, and raises the request line of that port's OBC only.
// Its data input is offered to every OBC; the OBC that locks the path selects
// it. The grant or deny that comes back from the chosen OBC is registered and
// returned upstream. A request that cannot be routed (it would leave the mesh,
// or turn back through the port it came in on) is denied by the IBC itself and
// reaches no OBC.
//
// That the IBC forwards a request to the OBC addressed by it follows the
// design description. The route function is this design's choice: dimension
// ordered, first along x (left/right) to the destination column, then along y
// (up/down) to the row, then to the addressed PE port.
//
// Interface: req_i/data_i from upstream, gnt_o/dny_o back to it; req_o (one
// bit per OBC), dest_o and data_o to the OBCs of this switch, gnt_i/dny_i from
// them. Timing: req_o follows req_i combinationally; gnt_o/dny_o are one clock
// behind the OBC's answer.
module ibc
  import noc_pkg::*;
#(
  parameter int unsigned X    = 0,   // column of this switch
  parameter int unsigned Y    = 0,   // row of this switch (0 = top)
  parameter int unsigned COLS = 3,
  parameter int unsigned ROWS = 3,
  parameter int unsigned PORT = 0    // port this IBC serves
) (
  input  logic                clk,
  input  logic                rst_n,
  // Upstream side
  input  req_t                req_i,
  input  data_t               data_i,
  output logic                gnt_o,
  output logic                dny_o,
  // Towards the OBCs of this switch
  output logic [N_PORTS-1:0]  req_o,
  output dest_t               dest_o,
  output data_t               data_o,
  input  logic [N_PORTS-1:0]  gnt_i,
  input  logic [N_PORTS-1:0]  dny_i
);

  port_e target;
  logic  route_err;

  // Dimension-ordered route decode.
  always_comb begin
    route_err = 1'b0;
    if (int'(req_i.dest.x) > int'(X)) begin
      target    = P_RIGHT;
      route_err = (X == COLS - 1);
    end else if (int'(req_i.dest.x) < int'(X)) begin
      target    = P_LEFT;
      route_err = (X == 0);
    end else if (int'(req_i.dest.y) > int'(Y)) begin
      target    = P_DOWN;
      route_err = (Y == ROWS - 1);
    end else if (int'(req_i.dest.y) < int'(Y)) begin
      target    = P_UP;
      route_err = (Y == 0);
    end else begin
      target    = port_e'({1'b0, req_i.dest.pe});
    end
    if (int'(target) == int'(PORT)) route_err = 1'b1;
  end

  always_comb begin
    req_o = '0;
    if (req_i.valid && !route_err) req_o[target] = 1'b1;
  end

  assign dest_o = req_i.dest;
  assign data_o = data_i;

  // Grant / deny returned upstream, one register stage per switch.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gnt_o <= 1'b0;
      dny_o <= 1'b0;
    end else begin
      gnt_o <= req_i.valid && !route_err && gnt_i[target];
      dny_o <= req_i.valid && (route_err || dny_i[target]);
    end
  end

endmodule
