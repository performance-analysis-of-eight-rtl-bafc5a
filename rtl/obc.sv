// obc: output block controller of one switch port.
//
// The OBC owns the port's outgoing channel. Requests for it arrive from the
// IBCs of the seven other ports and are split into two arbitration sectors:
// the local sector holds the requests of the PE ports, the switch sector those
// of the neighbour-switch ports (3 + 4 requesters for a PE port, 4 + 3 for a
// switch port). Each sector has its own counter/mux round-robin arbiter
// (rr_arbiter), its own request register and its own data multiplexer, as in
// the design description.
//
// The port has a single outgoing channel, so at most one sector's request
// register may hold it. When the channel is free and a sector's arbiter points
// at an active request, that request is loaded into the sector's request
// register (locking the path) on the next clock edge. If both sectors offer a
// request in the same cycle, a one-bit priority flag decides and is then
// handed to the other sector; the losing sector's counter stays on its
// request, which waits. The path is released on the first edge after the
// locked requester drops its request. Resolving the two sectors onto one
// channel with the alternating flag is this design's own choice.
//
// Interface: req_i/dest_i/data_i indexed by requesting port (an entry for the
// port itself is ignored); req_o/data_o to the downstream IBC or PE, gnt_i /
// dny_i back from it; gnt_o/dny_o route that answer to the owning IBC.
// sec_data_o gives the output of each sector's data mux (0 when that sector
// does not hold the channel).
// Timing: request register and req_o are registered; data_o, gnt_o and dny_o
// are combinational through the multiplexers set by the request register.
module obc
  import noc_pkg::*;
#(
  parameter int unsigned PORT = 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // From the IBCs of this switch
  input  logic  [N_PORTS-1:0]  req_i,
  input  dest_t                dest_i [N_PORTS],
  input  data_t                data_i [N_PORTS],
  output logic  [N_PORTS-1:0]  gnt_o,
  output logic  [N_PORTS-1:0]  dny_o,
  // To the downstream port
  output req_t                 req_o,
  output data_t                data_o,
  input  logic                 gnt_i,
  input  logic                 dny_i,
  // Per-sector data outputs (index 0: local sector, 1: switch sector)
  output data_t                sec_data_o [2]
);

  // Sector state: request register (lock, owner port, destination).
  logic  [1:0]        hit;
  logic  [PORT_W-1:0] cand_port [2];
  logic  [1:0]        lock;
  logic  [PORT_W-1:0] lport [2];
  dest_t              ldest [2];
  logic               prio;   // sector that wins a tie

  for (genvar s = 0; s < 2; s++) begin : g_sec
    localparam logic        LOC = (s == 0);
    localparam int unsigned NS  = sector_size(PORT, LOC);
    localparam int unsigned SW  = $clog2(NS > 1 ? NS : 2);

    logic [NS-1:0] sreq;
    logic [SW-1:0] sel;

    for (genvar k = 0; k < NS; k++) begin : g_req
      assign sreq[k] = req_i[sector_port(PORT, LOC, k)];
    end

    rr_arbiter #(.N(NS)) u_arb (
      .clk   (clk),
      .rst_n (rst_n),
      .req   (sreq),
      .sel   (sel),
      .hit   (hit[s])
    );

    // Port number the counter points at.
    always_comb begin
      cand_port[s] = '0;
      for (int unsigned k = 0; k < NS; k++) begin
        if (sel == SW'(k)) cand_port[s] = PORT_W'(sector_port(PORT, LOC, k));
      end
    end

    // Sector data multiplexer, selected by the request register.
    assign sec_data_o[s] = lock[s] ? data_i[lport[s]] : '0;
  end

  // Request registers and sector priority.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lock  <= '0;
      prio  <= 1'b0;
      lport <= '{default: '0};
      ldest <= '{default: '0};
    end else begin
      for (int s = 0; s < 2; s++) begin
        if (lock[s] && !req_i[lport[s]]) lock[s] <= 1'b0;   // release
      end
      if (lock == 2'b00) begin
        if (hit[0] && (!hit[1] || !prio)) begin
          lock[0]  <= 1'b1;
          lport[0] <= cand_port[0];
          ldest[0] <= dest_i[cand_port[0]];
          prio     <= 1'b1;
        end else if (hit[1]) begin
          lock[1]  <= 1'b1;
          lport[1] <= cand_port[1];
          ldest[1] <= dest_i[cand_port[1]];
          prio     <= 1'b0;
        end
      end
    end
  end

  logic               owner_sec;
  logic [PORT_W-1:0]  owner;
  logic               busy;

  assign busy      = |lock;
  assign owner_sec = lock[1];
  assign owner     = lport[owner_sec];

  assign req_o.valid = busy;
  assign req_o.dest  = busy ? ldest[owner_sec] : '0;
  assign data_o      = sec_data_o[0] | sec_data_o[1];

  always_comb begin
    gnt_o = '0;
    dny_o = '0;
    if (busy) begin
      gnt_o[owner] = gnt_i;
      dny_o[owner] = dny_i;
    end
  end

  // Only one sector may hold the channel.
  a_one_owner: assert property (@(posedge clk) !(lock[0] && lock[1]));
  // A port never requests its own output.
  a_no_uturn: assert property (@(posedge clk) !req_i[PORT]);

endmodule
