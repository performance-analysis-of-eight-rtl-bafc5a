// tb_eight_port_switch: self-checking testbench of one eight-port switch,
// placed at the centre (1,1) of a 3 x 3 mesh so that every port leads
// somewhere. The testbench acts as the PEs and neighbour switches on all eight
// ports: as a sink it grants every request that reaches it unless told to deny.
//
// 1. Ring transfer: input port p (data p, then random words) opens a circuit to
//    output port (p+1) mod 8. All eight circuits must be set up at once; each
//    output must show its source's data, on the sector output that matches the
//    source's kind; setup latency (request to grant) must be at most 5 clocks:
//    up to 3 clocks of counter scan, 1 to lock, 1 to register the grant.
// 2. Contention: the seven other ports all open circuits to PE port 0. They
//    must be served one after the other, each exactly once, each seeing its own
//    data at the output while it holds the path.
// 3. Deny: a sink refusal reaches the source; a PE addressing itself is denied
//    by the switch.
module tb_eight_port_switch;
  import noc_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  req_t  req_i  [N_PORTS];
  data_t data_i [N_PORTS];
  logic  gnt_o  [N_PORTS];
  logic  dny_o  [N_PORTS];
  req_t  req_o  [N_PORTS];
  data_t data_o [N_PORTS];
  logic  gnt_i  [N_PORTS];
  logic  dny_i  [N_PORTS];
  data_t sec    [N_PORTS][2];
  logic  sink_deny [N_PORTS];

  eight_port_switch #(.X(1), .Y(1), .COLS(3), .ROWS(3)) dut (
    .clk(clk), .rst_n(rst_n),
    .req_i(req_i), .data_i(data_i), .gnt_o(gnt_o), .dny_o(dny_o),
    .req_o(req_o), .data_o(data_o), .gnt_i(gnt_i), .dny_i(dny_i),
    .sec_data_o(sec)
  );

  // Sinks answer every request that reaches them.
  always_comb begin
    for (int p = 0; p < N_PORTS; p++) begin
      gnt_i[p] = req_o[p].valid && !sink_deny[p];
      dny_i[p] = req_o[p].valid && sink_deny[p];
    end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Address that makes the centre switch send a request out of port q.
  function automatic dest_t addr_of(input int q);
    case (q)
      4:       return '{x: 2'd1, y: 2'd0, pe: 2'd0};
      5:       return '{x: 2'd1, y: 2'd2, pe: 2'd0};
      6:       return '{x: 2'd0, y: 2'd1, pe: 2'd0};
      7:       return '{x: 2'd2, y: 2'd1, pe: 2'd0};
      default: return '{x: 2'd1, y: 2'd1, pe: 2'(q)};
    endcase
  endfunction

  initial begin
    int lat [N_PORTS];
    int served [N_PORTS];
    int order_cnt;
    int cyc;
    int cur;
    // Start high so that the asynchronous reset sees a falling edge.
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    for (int p = 0; p < N_PORTS; p++) begin
      req_i[p]     = '0;
      data_i[p]    = data_t'(p);
      sink_deny[p] = 1'b0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // 1. Ring transfer.
    for (int p = 0; p < N_PORTS; p++) begin
      req_i[p] = '{valid: 1'b1, dest: addr_of((p + 1) % N_PORTS)};
      lat[p]   = -1;
    end
    for (int c = 1; c <= 10; c++) begin
      @(negedge clk);
      for (int p = 0; p < N_PORTS; p++) if (gnt_o[p] && lat[p] < 0) lat[p] = c;
    end
    for (int p = 0; p < N_PORTS; p++) begin
      int q;
      q = (p + 1) % N_PORTS;
      check(lat[p] >= 2 && lat[p] <= 5, $sformatf("ring setup latency port %0d (%0d)", p, lat[p]));
      check(req_o[q].valid && req_o[q].dest == addr_of(q), "ring request forwarded");
      check(data_o[q] == data_t'(p), $sformatf("ring data at output %0d", q));
      check(sec[q][p < N_LOCAL ? 0 : 1] == data_t'(p) && sec[q][p < N_LOCAL ? 1 : 0] == '0,
            "ring sector output");
    end
    for (int w = 0; w < 16; w++) begin
      for (int p = 0; p < N_PORTS; p++) data_i[p] = data_t'($urandom);
      @(negedge clk);
      for (int p = 0; p < N_PORTS; p++) begin
        check(data_o[(p + 1) % N_PORTS] == data_i[p], "ring streaming data");
      end
    end
    for (int p = 0; p < N_PORTS; p++) req_i[p] = '0;
    repeat (2) @(negedge clk);
    for (int p = 0; p < N_PORTS; p++) check(!req_o[p].valid && !gnt_o[p], "ring released");

    // 2. Contention for PE port 0.
    for (int p = 1; p < N_PORTS; p++) begin
      req_i[p]  = '{valid: 1'b1, dest: addr_of(0)};
      data_i[p] = data_t'(8'h40 + p);
      served[p] = 0;
    end
    order_cnt = 0;
    cur = -1;
    for (cyc = 0; cyc < 100 && order_cnt < 7; cyc++) begin
      @(negedge clk);
      for (int p = 1; p < N_PORTS; p++) begin
        if (gnt_o[p] && req_i[p].valid) begin
          check(data_o[0] == data_i[p], "contention data from the granted source");
          served[p]++;
          if (served[p] == 3) begin
            req_i[p] = '0;   // transaction done
            order_cnt++;
          end
        end
      end
    end
    for (int p = 1; p < N_PORTS; p++) check(served[p] == 3, $sformatf("port %0d served", p));
    repeat (3) @(negedge clk);

    // 3. Deny by the sink, and a PE addressing itself.
    sink_deny[5] = 1'b1;
    req_i[2] = '{valid: 1'b1, dest: addr_of(5)};
    req_i[3] = '{valid: 1'b1, dest: addr_of(3)};
    cyc = 0;
    while (!(dny_o[2] && dny_o[3]) && cyc < 10) begin
      @(negedge clk);
      cyc++;
    end
    check(dny_o[2] && !gnt_o[2], "sink deny reaches source");
    check(dny_o[3] && !gnt_o[3], "self-addressed request denied");
    req_i[2] = '0;
    req_i[3] = '0;
    sink_deny[5] = 1'b0;
    repeat (2) @(negedge clk);
    check(!req_o[5].valid && !dny_o[2], "denied path released");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
