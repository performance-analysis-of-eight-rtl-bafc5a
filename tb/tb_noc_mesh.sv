// tb_noc_mesh: end-to-end testbench of the 3 x 3 circuit-switched mesh at its
// default size (36 PEs).
//
// The testbench plays all 36 PEs. As a sink a PE grants every circuit that
// reaches it, unless it is set to refuse. As a source a PE runs transactions:
// raise the request with a destination address, wait for grant or deny, on a
// grant stream a number of random words while checking that each one appears,
// in the same cycle, at the destination PE's data output, then drop the
// request and check that the path is released.
//
// Phases:
//  A. one transaction at a time between random PE pairs, with the setup latency
//     (request to grant) checked against the number of switches h on the
//     route: at least 2h clocks (one lock and one grant register per switch)
//     and at most 5h clocks (up to 3 clocks of counter scan in addition);
//  B. corner-to-corner circuits (the longest route, 5 switches) both ways;
//  C. two sources, one on the destination's own switch and one remote, opening
//     circuits to the same PE in the same cycle: one waits for the other;
//  D. all 36 PEs at once: first each to a neighbour PE on its own switch (all
//     36 circuits coexist), then random transactions;
//  E. refusals: a sink that denies, an address outside the mesh, a PE that
//     addresses itself.
// Each mechanism is counted and must occur at least once.
module tb_noc_mesh;
  import noc_pkg::*;

  localparam int COLS = 3;
  localparam int ROWS = 3;
  localparam int NPE  = COLS * ROWS * N_LOCAL;

  logic clk = 1'b0;
  logic rst_n;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  req_t  pe_req_i  [NPE];
  data_t pe_data_i [NPE];
  logic  pe_gnt_o  [NPE];
  logic  pe_dny_o  [NPE];
  req_t  pe_req_o  [NPE];
  data_t pe_data_o [NPE];
  logic  pe_gnt_i  [NPE];
  logic  pe_dny_i  [NPE];
  logic  refuse    [NPE];

  noc_mesh dut (
    .clk(clk), .rst_n(rst_n),
    .pe_req_i(pe_req_i), .pe_data_i(pe_data_i), .pe_gnt_o(pe_gnt_o), .pe_dny_o(pe_dny_o),
    .pe_req_o(pe_req_o), .pe_data_o(pe_data_o), .pe_gnt_i(pe_gnt_i), .pe_dny_i(pe_dny_i)
  );

  // Sink side of every PE.
  always_comb begin
    for (int m = 0; m < NPE; m++) begin
      pe_gnt_i[m] = pe_req_o[m].valid && !refuse[m];
      pe_dny_i[m] = pe_req_o[m].valid && refuse[m];
    end
  end

  // Mechanism counters.
  int n_local;       // circuit inside one switch
  int n_multihop;    // circuit over two or more switches
  int n_longest;     // corner-to-corner circuit (5 switches)
  int n_wait;        // request that had to wait for another circuit's release
  int n_concurrent;  // cycles with 20 or more circuits established at once
  int n_sink_deny;
  int n_route_deny;
  int n_self_deny;
  int n_release;

  int owner [NPE];   // source currently holding a circuit to each PE, -1 if none
  int open_circuits;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic dest_t addr(input int m);
    return '{x: 2'((m / N_LOCAL) % COLS), y: 2'((m / N_LOCAL) / COLS), pe: 2'(m % N_LOCAL)};
  endfunction

  // Number of switches on the route from PE s to PE m.
  function automatic int switches(input int s, input int m);
    int dx;
    int dy;
    dx = ((m / N_LOCAL) % COLS) - ((s / N_LOCAL) % COLS);
    dy = ((m / N_LOCAL) / COLS) - ((s / N_LOCAL) / COLS);
    return (dx < 0 ? -dx : dx) + (dy < 0 ? -dy : dy) + 1;
  endfunction

  // One transaction of source s to PE m. check_lat bounds the setup latency
  // (only meaningful without competing traffic). Returns 1 if granted.
  task automatic transact(input int s, input int m, input int words, input bit check_lat);
    int lat;
    int h;
    h = switches(s, m);
    pe_req_i[s] = '{valid: 1'b1, dest: addr(m)};
    pe_data_i[s] = data_t'($urandom);
    if (owner[m] >= 0) n_wait++;
    lat = 0;
    do begin
      @(negedge clk);
      lat++;
    end while (!pe_gnt_o[s] && !pe_dny_o[s] && lat < 4000);
    check(lat < 4000, $sformatf("PE %0d -> %0d answered", s, m));
    if (pe_gnt_o[s]) begin
      check(owner[m] < 0, "destination held by a single circuit");
      owner[m] = s;
      open_circuits++;
      if (check_lat) check(lat >= 2 * h && lat <= 5 * h,
                           $sformatf("setup latency %0d for %0d switches", lat, h));
      if (h == 1) n_local++;
      else n_multihop++;
      if (h == 5) n_longest++;
      check(pe_req_o[m].valid && pe_req_o[m].dest == addr(m), "request reaches destination");
      for (int w = 0; w < words; w++) begin
        pe_data_i[s] = data_t'($urandom);
        #1;
        check(pe_data_o[m] == pe_data_i[s], $sformatf("data PE %0d -> %0d", s, m));
        @(negedge clk);
      end
      owner[m] = -1;
      open_circuits--;
      pe_req_i[s] = '0;
      repeat (h + 1) @(negedge clk);
      check(!pe_gnt_o[s], "grant dropped after release");
      n_release++;
    end else begin
      pe_req_i[s] = '0;
      @(negedge clk);
    end
  endtask

  // Source s addresses dst; the request must be denied.
  task automatic expect_deny(input int s, input dest_t dst);
    int lat;
    pe_req_i[s] = '{valid: 1'b1, dest: dst};
    lat = 0;
    do begin
      @(negedge clk);
      lat++;
    end while (!pe_gnt_o[s] && !pe_dny_o[s] && lat < 100);
    check(pe_dny_o[s] && !pe_gnt_o[s], $sformatf("PE %0d denied", s));
    pe_req_i[s] = '0;
    repeat (8) @(negedge clk);
  endtask

  int max_open;
  always @(negedge clk) begin
    if (open_circuits > max_open) max_open = open_circuits;
    if (open_circuits >= 20) n_concurrent++;
  end

  initial begin
    // Start high so that the asynchronous reset sees a falling edge.
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    for (int m = 0; m < NPE; m++) begin
      pe_req_i[m]  = '0;
      pe_data_i[m] = '0;
      refuse[m]    = 1'b0;
      owner[m]     = -1;
    end
    {n_local, n_multihop, n_longest, n_wait, n_concurrent} = '0;
    {n_sink_deny, n_route_deny, n_self_deny, n_release, open_circuits, max_open} = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // A. Single transactions.
    for (int t = 0; t < 120; t++) begin
      int s;
      int m;
      s = $urandom_range(NPE - 1);
      do m = $urandom_range(NPE - 1); while (m == s);
      transact(s, m, 4, 1'b1);
    end

    // B. Corner to corner: PE 0 of switch (0,0) and PE 3 of switch (2,2).
    transact(0, NPE - 1, 8, 1'b1);
    transact(NPE - 1, 0, 8, 1'b1);
    transact(3, NPE - 4, 8, 1'b1);

    // C. Local and remote source to the same PE in the same cycle.
    for (int r = 0; r < 4; r++) begin
      fork
        transact(17, 16, 6, 1'b0);   // same switch (1,1)
        transact(0, 16, 6, 1'b0);    // from switch (0,0)
      join
    end

    // D. Everyone at once. First every PE to its neighbour on the same
    // switch (all 36 circuits can coexist), then random destinations.
    for (int s0 = 0; s0 < NPE; s0++) begin
      fork
        automatic int s = s0;
        transact(s, (s / N_LOCAL) * N_LOCAL + (s + 1) % N_LOCAL, 12, 1'b0);
      join_none
    end
    wait fork;

    for (int s0 = 0; s0 < NPE; s0++) begin
      fork
        automatic int s = s0;
        begin
          for (int t = 0; t < 6; t++) begin
            int m;
            do m = $urandom_range(NPE - 1); while (m == s);
            repeat ($urandom_range(3)) @(negedge clk);
            transact(s, m, $urandom_range(1, 6), 1'b0);
          end
        end
      join_none
    end
    wait fork;

    // E. Refusals.
    refuse[20] = 1'b1;
    expect_deny(5, addr(20));
    n_sink_deny++;
    refuse[20] = 1'b0;
    check(!pe_req_o[20].valid, "refused path released");
    expect_deny(10, '{x: 2'd3, y: 2'd0, pe: 2'd1});
    n_route_deny++;
    expect_deny(33, '{x: 2'd0, y: 2'd3, pe: 2'd0});
    n_route_deny++;
    expect_deny(22, addr(22));
    n_self_deny++;
    // The network still works after the refusals.
    transact(5, 20, 4, 1'b1);

    $display("mechanisms: local=%0d multihop=%0d longest=%0d wait=%0d concurrent_cycles=%0d max_open=%0d",
             n_local, n_multihop, n_longest, n_wait, n_concurrent, max_open);
    $display("            sink_deny=%0d route_deny=%0d self_deny=%0d release=%0d",
             n_sink_deny, n_route_deny, n_self_deny, n_release);
    check(n_local > 0, "local circuit happened");
    check(n_multihop > 0, "multi-hop circuit happened");
    check(n_longest > 0, "longest route happened");
    check(n_wait > 0, "arbitration wait happened");
    check(n_concurrent > 0, "many concurrent circuits happened");
    check(n_sink_deny > 0, "sink deny happened");
    check(n_route_deny > 0, "route deny happened");
    check(n_self_deny > 0, "self deny happened");
    check(n_release > 0, "release happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
