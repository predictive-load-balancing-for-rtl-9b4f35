// plb_block_hist: block-history counters, one per router output port.
//
// Each counter is a running sum of the blocks seen on its output: it is
// raised once for every internal block (a header that wanted the output but
// could not have it) and every downstream block (a flit of a bound packet
// that the next router could not accept), and lowered once for every header
// routed to the output and every flit forwarded through it. The route logic
// compares two counters to pick between two allowed directions, much as a
// branch predictor consults its history.
//
// Interface: `inc[p]` and `dec[p]` give how many raising and lowering events
// output p saw this cycle (several headers may try the same output in one
// cycle). `hist[p]` is the registered count.
// Timing: the counts are applied at the next rising edge; reset clears all
// counters.
// The event rules follow the published algorithm. That algorithm ignores
// what happens when a count outgrows its width; this hardware saturates each
// counter at 0 and at 2**HIST_W-1 instead of wrapping, and the width of 8
// bits is this design's choice.
module plb_block_hist
  import plb_pkg::*;
#(
  parameter int unsigned PORTS = NPORTS,
  parameter int unsigned W     = HIST_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [PORTS-1:0][EVT_W-1:0] inc,
  input  logic [PORTS-1:0][EVT_W-1:0] dec,
  output logic [PORTS-1:0][W-1:0]     hist
);

  localparam int signed MAXV = (1 << W) - 1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hist <= '0;
    end else begin
      for (int p = 0; p < PORTS; p++) begin
        int signed nxt;
        nxt = int'(hist[p]) + int'(inc[p]) - int'(dec[p]);
        if (nxt < 0)         hist[p] <= '0;
        else if (nxt > MAXV) hist[p] <= W'(MAXV);
        else                 hist[p] <= W'(nxt);
      end
    end
  end

endmodule
