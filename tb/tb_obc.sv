// tb_obc: self-checking testbench of the output block controller.
//
// Instance u_l serves PE port 1 (local sector: ports 0, 2, 3; switch sector:
// ports 4..7); instance u_s serves switch port 6 (local sector: ports 0..3;
// switch sector: ports 4, 5, 7). Checked:
//  - a lone request is locked within (sector size) cycles, its destination is
//    forwarded on req_o, its data passes to data_o and to its sector's data
//    output in the same cycle, and the downstream grant/deny is routed back to
//    that requester only;
//  - the path is released one cycle after the requester drops its request;
//  - with all seven requesters holding their requests, the channel is given
//    once to each, alternating between the local and the switch sector and in
//    counter order inside each sector: ports 0, 4, 2, 5, 3, 6, 7.
module tb_obc;
  import noc_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  logic  [N_PORTS-1:0] req;
  dest_t               dest [N_PORTS];
  data_t               data [N_PORTS];
  logic                gnt_in, dny_in;

  logic  [N_PORTS-1:0] l_gnt, l_dny, s_gnt, s_dny;
  req_t                l_req, s_req;
  data_t               l_data, s_data;
  data_t               l_sec [2];
  data_t               s_sec [2];
  logic  [N_PORTS-1:0] req_l, req_s;

  // A port never requests its own OBC.
  assign req_l = req & ~8'b0000_0010;
  assign req_s = req & ~8'b0100_0000;

  obc #(.PORT(1)) u_l (
    .clk(clk), .rst_n(rst_n), .req_i(req_l), .dest_i(dest), .data_i(data),
    .gnt_o(l_gnt), .dny_o(l_dny), .req_o(l_req), .data_o(l_data),
    .gnt_i(gnt_in), .dny_i(dny_in), .sec_data_o(l_sec)
  );

  obc #(.PORT(6)) u_s (
    .clk(clk), .rst_n(rst_n), .req_i(req_s), .dest_i(dest), .data_i(data),
    .gnt_o(s_gnt), .dny_o(s_dny), .req_o(s_req), .data_o(s_data),
    .gnt_i(gnt_in), .dny_i(dny_in), .sec_data_o(s_sec)
  );

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Port whose data the local-port instance currently passes (-1 if idle),
  // found by giving every port distinct data.
  function automatic int owner_l();
    if (!l_req.valid) return -1;
    for (int p = 0; p < N_PORTS; p++) if (l_data == data[p]) return p;
    return -2;
  endfunction

  initial begin
    int    cyc;
    int    order [$];
    int    expect_order [7] = '{0, 4, 2, 5, 3, 6, 7};
    int    served [N_PORTS];
    int    hold [N_PORTS];
    // Start high so that the asynchronous reset sees a falling edge.
    rst_n  = 1'b1;
    #1 rst_n = 1'b0;
    req    = '0;
    gnt_in = 1'b0;
    dny_in = 1'b0;
    for (int p = 0; p < N_PORTS; p++) begin
      dest[p] = dest_t'(8'h10 + p);
      data[p] = data_t'(8'hA0 + p);
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // Lone requests, one port at a time, seen by both instances.
    for (int p = 0; p < N_PORTS; p++) begin
      req = '0;
      req[p] = 1'b1;
      cyc = 0;
      while (!(p != 1 ? l_req.valid : s_req.valid) && cyc < 10) begin
        @(negedge clk);
        cyc++;
      end
      check(cyc >= 1 && cyc <= 4, "lock within sector size cycles");
      repeat (2) @(negedge clk);   // let the other instance lock too
      if (p != 1) begin
        check(l_req.valid && l_req.dest == dest[p], "u_l forwards destination");
        for (int w = 0; w < 4; w++) begin
          data[p] = data_t'($urandom);
          #1;
          check(l_data == data[p], "u_l data passes");
          check(l_sec[p < N_LOCAL ? 0 : 1] == data[p] && l_sec[p < N_LOCAL ? 1 : 0] == '0,
                "u_l sector data output");
        end
        data[p] = data_t'(8'hA0 + p);
        gnt_in = 1'b1;
        #1;
        check(l_gnt == 8'(1 << p) && l_dny == '0, "u_l grant to owner only");
        gnt_in = 1'b0;
        dny_in = 1'b1;
        #1;
        check(l_dny == 8'(1 << p) && l_gnt == '0, "u_l deny to owner only");
        dny_in = 1'b0;
      end
      if (p != 6) begin
        check(s_req.valid && s_req.dest == dest[p], "u_s forwards destination");
        #1;
        check(s_data == data[p], "u_s data passes");
        check(s_sec[p < N_LOCAL ? 0 : 1] == data[p], "u_s sector data output");
      end
      // Release: one cycle after the request drops the channel is free.
      @(negedge clk);
      req = '0;
      @(negedge clk);
      check(!l_req.valid && !s_req.valid, "release one cycle after drop");
      check(l_data == '0, "idle data output is zero");
      repeat (5) @(negedge clk);
    end

    // Reset the counters, then let all seven requesters of u_l compete.
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    served = '{default: 0};
    hold   = '{default: 0};
    req    = 8'b1111_1101;
    for (int c = 0; c < 60 && order.size() < 7; c++) begin
      @(negedge clk);
      if (owner_l() >= 0) begin
        int o;
        o = owner_l();
        if (hold[o] == 0) order.push_back(o);
        hold[o]++;
        if (hold[o] == 2) req[o] = 1'b0;   // served: leave for good
      end
    end
    check(order.size() == 7, "all seven requesters served");
    for (int i = 0; i < 7 && i < order.size(); i++) begin
      check(order[i] == expect_order[i], $sformatf("service order position %0d", i));
    end
    req = '0;
    repeat (3) @(negedge clk);

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
