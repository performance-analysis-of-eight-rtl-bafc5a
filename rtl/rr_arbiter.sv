// rr_arbiter: round-robin arbiter built from a counter and a multiplexer.
//
// The counter output drives the select lines of an N-to-1 multiplexer over the
// request lines. The multiplexer output is the arbiter's `hit` and also the
// counter's active-low enable: while the selected request is low the counter
// steps to the next requester every clock (wrapping from N-1 to 0); while it is
// high the counter holds, so the selected requester keeps the arbiter until it
// drops its request. The counter then moves on, which gives every requester its
// turn. This counter/mux structure is the one the design description gives;
// the reset value 0 and the wrap at N-1 for sizes that are not a power of two
// are choices of this implementation.
//
// Interface: req[N] in; sel (counter value) and hit (= req[sel]) out.
// Timing: hit and sel follow req combinationally within a cycle; a requester
// that is not being pointed at waits at most N-1 cycles for the counter.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [N-1:0]                  req,
  output logic [$clog2(N > 1 ? N : 2)-1:0] sel,
  output logic                          hit
);

  localparam int unsigned SEL_W = $clog2(N > 1 ? N : 2);

  logic [SEL_W-1:0] cnt;

  // Multiplexer: the counter selects one request line.
  assign hit = req[cnt];
  assign sel = cnt;

  // Counter with active-low enable tied to the multiplexer output.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
    end else if (!hit) begin
      cnt <= (cnt == SEL_W'(N - 1)) ? '0 : cnt + 1'b1;
    end
  end

endmodule
