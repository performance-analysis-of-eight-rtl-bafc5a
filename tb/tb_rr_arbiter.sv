// tb_rr_arbiter: self-checking testbench of the counter/mux round-robin
// arbiter, for a 4-input and a 3-input instance (the two sector sizes of an
// OBC).
//
// A reference counter is kept in the testbench: it starts at 0 after reset,
// steps by one (wrapping at N-1) in every cycle in which the request it points
// at is low and holds otherwise. Each cycle the arbiter's sel and hit are
// compared with it. Random request patterns are mixed with "held" requesters
// that keep their line up until served for a few cycles; for those the waiting
// time is also checked against the bound N-1 cycles.
module tb_rr_arbiter;

  logic clk = 1'b0;
  logic rst_n;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  logic [3:0] req4;
  logic [1:0] sel4;
  logic       hit4;
  logic [2:0] req3;
  logic [1:0] sel3;
  logic       hit3;

  rr_arbiter #(.N(4)) dut4 (.clk(clk), .rst_n(rst_n), .req(req4), .sel(sel4), .hit(hit4));
  rr_arbiter #(.N(3)) dut3 (.clk(clk), .rst_n(rst_n), .req(req3), .sel(sel3), .hit(hit3));

  int ref4;
  int ref3;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Compare both arbiters with the reference counters, then advance them.
  task automatic step();
    #1;
    check(sel4 == 2'(ref4), "sel4");
    check(hit4 == req4[ref4], "hit4");
    check(sel3 == 2'(ref3), "sel3");
    check(hit3 == req3[ref3], "hit3");
    @(posedge clk);
    if (!req4[ref4]) ref4 = (ref4 + 1) % 4;
    if (!req3[ref3]) ref3 = (ref3 + 1) % 3;
    @(negedge clk);
  endtask

  initial begin
    int waited;
    int holder;
    // Start high so that the asynchronous reset sees a falling edge.
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    req4  = '0;
    req3  = '0;
    ref4  = 0;
    ref3  = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // Idle: the counter scans all positions.
    repeat (6) step();

    // A single held requester is reached within N-1 cycles and then kept.
    for (int j = 0; j < 4; j++) begin
      req4 = 4'(1 << j);
      req3 = 3'(1 << (j % 3));
      waited = 0;
      while (!hit4) begin
        step();
        waited++;
      end
      check(waited <= 3, "4-input wait bound");
      repeat (3) begin
        step();
        check(hit4 && sel4 == 2'(j), "held requester keeps the arbiter");
      end
      req4 = '0;
      req3 = '0;
      step();
    end

    // All requesters held: service rotates in order 0,1,2,3,0,...
    req4 = 4'hF;
    step();
    holder = ref4;
    for (int r = 0; r < 8; r++) begin
      repeat (2) step();
      req4[holder] = 1'b0;   // release
      step();
      req4[holder] = 1'b1;
      check(sel4 == 2'((holder + 1) % 4), "rotation to next requester");
      holder = (holder + 1) % 4;
    end

    // Random request patterns.
    for (int i = 0; i < 400; i++) begin
      req4 = 4'($urandom);
      req3 = 3'($urandom);
      step();
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
