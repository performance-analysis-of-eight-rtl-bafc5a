// tb_ibc: self-checking testbench of the input block controller.
//
// Two instances: u_c is PE port 0 of the centre switch (1,1) of a 3 x 3 mesh,
// u_e is the left port of the top-right switch (2,0). Every destination address
// is applied to both. The expected output port is worked out in the testbench
// from the address: column first (right if the destination column is larger,
// left if smaller), then row (down/up), then the PE index; routes that leave
// the mesh or turn back through the incoming port are expected to be denied.
// Checked: exactly the expected OBC request line is raised, the destination and
// data are passed on, and the grant/deny of the chosen OBC comes back upstream
// one clock later (and a grant of any other OBC does not).
module tb_ibc;
  import noc_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  req_t                req;
  data_t               data;
  logic [N_PORTS-1:0]  gnt_in, dny_in;
  logic                c_gnt, c_dny, e_gnt, e_dny;
  logic [N_PORTS-1:0]  c_req, e_req;
  dest_t               c_dest, e_dest;
  data_t               c_data, e_data;

  ibc #(.X(1), .Y(1), .COLS(3), .ROWS(3), .PORT(0)) u_c (
    .clk(clk), .rst_n(rst_n), .req_i(req), .data_i(data), .gnt_o(c_gnt), .dny_o(c_dny),
    .req_o(c_req), .dest_o(c_dest), .data_o(c_data), .gnt_i(gnt_in), .dny_i(dny_in)
  );

  ibc #(.X(2), .Y(0), .COLS(3), .ROWS(3), .PORT(6)) u_e (
    .clk(clk), .rst_n(rst_n), .req_i(req), .data_i(data), .gnt_o(e_gnt), .dny_o(e_dny),
    .req_o(e_req), .dest_o(e_dest), .data_o(e_data), .gnt_i(gnt_in), .dny_i(dny_in)
  );

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Expected request vector (0 when the request must be denied).
  function automatic logic [N_PORTS-1:0] expected(input int sx, input int sy, input int inport,
                                                  input dest_t d);
    int out;
    int dx;
    int dy;
    dx = int'(d.x) - sx;
    dy = int'(d.y) - sy;
    if (dx != 0) begin
      out = (dx > 0) ? 7 : 6;
      if (dx > 0 && sx == 2) return '0;      // past the right edge
    end else if (dy != 0) begin
      out = (dy > 0) ? 5 : 4;
      if (dy > 0 && sy == 2) return '0;      // past the bottom edge
      if (dy < 0 && sy == 0) return '0;
    end else begin
      out = int'(d.pe);
    end
    if (out == inport) return '0;
    return 8'(1 << out);
  endfunction

  initial begin
    logic [N_PORTS-1:0] ec;
    logic [N_PORTS-1:0] ee;
    // Start high so that the asynchronous reset sees a falling edge.
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    req    = '0;
    data   = '0;
    gnt_in = '0;
    dny_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    for (int a = 0; a < 64; a++) begin
      dest_t d;
      d = dest_t'(a);
      ec = expected(1, 1, 0, d);
      ee = expected(2, 0, 6, d);
      req.valid = 1'b1;
      req.dest  = d;
      data      = data_t'($urandom);
      gnt_in    = '0;
      dny_in    = '0;
      #1;
      check(c_req == ec, $sformatf("centre route dest %h", a));
      check(e_req == ee, $sformatf("edge route dest %h", a));
      check(c_dest == d && e_dest == d && c_data == data && e_data == data, "dest/data passed");
      // Grant from the addressed OBC only.
      gnt_in = ec;
      @(negedge clk);
      check(c_gnt == (ec != '0), "centre grant returned one clock later");
      check(c_dny == (ec == '0), "centre deny of unroutable request");
      check(e_dny == (ee == '0), "edge deny of unroutable request");
      check(!e_gnt || ee == ec, "edge grant only from its own OBC");
      // Deny from the addressed OBC, grant from all others.
      gnt_in = ~ee;
      dny_in = ee;
      @(negedge clk);
      check(!e_gnt && e_dny, "edge deny returned, other grants ignored");
      // Idle request: nothing raised, answers drop.
      req.valid = 1'b0;
      gnt_in = '1;
      @(negedge clk);
      check(c_req == '0 && e_req == '0 && !c_gnt && !c_dny && !e_gnt && !e_dny,
            "idle request raises nothing");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
