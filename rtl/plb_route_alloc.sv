// plb_route_alloc: output allocation with predictive load balancing.
//
// Every cycle each input port that holds a header flit not yet bound to an
// output ("waiting header") is served, oldest first, so that headers
// competing for one output get it in the order in which they arrived. For
// each waiting header the block:
//   1. takes the allowed directions from the odd-even route logic; with two
//      directions, the one whose block-history count is larger becomes the
//      non-preferred one (dir0 stays preferred on a tie);
//   2. tries the preferred output: it is available if no packet is bound to
//      it, no older header took it this cycle, and the next router can
//      accept a flit. Success binds it and counts one lowering event for it;
//      failure counts one raising event (an internal block);
//   3. on failure, and only if there is a second direction, does the same
//      with the non-preferred output.
// A header that gets no output waits and is tried again the next cycle.
//
// Interface: per input i, `hdr_wait[i]` with its directions (`n_dirs`,
// `dir0`, `dir1`); per output o, `out_busy[o]` (bound), `out_ready[o]` and
// the history count `hist[o]`. Results: `grant[i]` with `grant_dir[i]`, and
// per output the event counts `inc[o]`/`dec[o]` for the history counters.
// `swap[i]` and `fallback[i]` tell that history reordered the two directions
// and that the second direction was taken; they are for observation only.
// Timing: the decisions are combinational; the arrival order is a
// registered age matrix updated at each rising edge (headers arriving in
// the same cycle are ordered by port number).
// The route/record rules are the published load-balancing algorithm and
// the arrival-order service is the published arbitration; the age matrix
// and the tie rules are this design's choices.
module plb_route_alloc
  import plb_pkg::*;
#(
  parameter int unsigned W = HIST_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [NPORTS-1:0]           hdr_wait,
  input  logic [NPORTS-1:0][1:0]      n_dirs,
  input  dir_e [NPORTS-1:0]           dir0,
  input  dir_e [NPORTS-1:0]           dir1,
  input  logic [NPORTS-1:0]           out_busy,
  input  logic [NPORTS-1:0]           out_ready,
  input  logic [NPORTS-1:0][W-1:0]    hist,
  output logic [NPORTS-1:0]           grant,
  output dir_e [NPORTS-1:0]           grant_dir,
  output logic [NPORTS-1:0][EVT_W-1:0] inc,
  output logic [NPORTS-1:0][EVT_W-1:0] dec,
  output logic [NPORTS-1:0]           swap,
  output logic [NPORTS-1:0]           fallback
);

  // older[i][j]: input i's header has waited longer than input j's.
  logic [NPORTS-1:0][NPORTS-1:0] older;
  logic [NPORTS-1:0]             wait_q;
  logic [NPORTS-1:0]             arrive;

  assign arrive = hdr_wait & ~wait_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      older  <= '0;
      wait_q <= '0;
    end else begin
      wait_q <= hdr_wait;
      for (int i = 0; i < NPORTS; i++) begin
        for (int j = 0; j < NPORTS; j++) begin
          if (i != j) begin
            if (arrive[i] && arrive[j]) older[i][j] <= (i < j);
            else if (arrive[j])         older[i][j] <= 1'b1;
            else if (arrive[i])         older[i][j] <= 1'b0;
          end
        end
      end
    end
  end

  function automatic logic avail(logic [NPORTS-1:0] claimed, dir_e d,
                                 logic [NPORTS-1:0] busy,
                                 logic [NPORTS-1:0] rdy);
    return !busy[d] && !claimed[d] && rdy[d];
  endfunction

  // Header j is served before header i: between two waiting headers the
  // one that arrived earlier; a header arriving this cycle is not yet in the
  // age matrix and goes after all older ones; same-cycle arrivals go in port
  // order.
  function automatic logic goes_first(int j, int i);
    if (!arrive[j] && !arrive[i]) return older[j][i];
    else if (!arrive[j])          return 1'b1;
    else if (!arrive[i])          return 1'b0;
    else                          return j < i;
  endfunction

  always_comb begin
    logic [NPORTS-1:0] claimed;
    logic [NPORTS-1:0] done;
    logic              found;
    logic              blocked;
    int unsigned       sel;
    dir_e              pref;
    dir_e              nonpref;

    claimed   = '0;
    done      = '0;
    found     = 1'b0;
    blocked   = 1'b0;
    sel       = 0;
    pref      = DIR_L;
    nonpref   = DIR_L;
    grant     = '0;
    grant_dir = {NPORTS{DIR_L}};
    inc       = '0;
    dec       = '0;
    swap      = '0;
    fallback  = '0;
    for (int step = 0; step < NPORTS; step++) begin
      found = 1'b0;
      sel   = 0;
      for (int i = 0; i < NPORTS; i++) begin
        if (!found && hdr_wait[i] && !done[i]) begin
          blocked = 1'b0;
          for (int j = 0; j < NPORTS; j++) begin
            if (j != i && hdr_wait[j] && !done[j] && goes_first(j, i))
              blocked = 1'b1;
          end
          if (!blocked) begin
            found = 1'b1;
            sel   = i;
          end
        end
      end
      if (found) begin
        done[sel] = 1'b1;
        pref      = dir0[sel];
        nonpref   = dir1[sel];
        if (n_dirs[sel] == 2'd2 && hist[dir0[sel]] > hist[dir1[sel]]) begin
          pref      = dir1[sel];
          nonpref   = dir0[sel];
          swap[sel] = 1'b1;
        end
        if (avail(claimed, pref, out_busy, out_ready)) begin
          grant[sel]     = 1'b1;
          grant_dir[sel] = pref;
          claimed[pref]  = 1'b1;
          dec[pref]      = dec[pref] + 1'b1;
        end else begin
          inc[pref] = inc[pref] + 1'b1;
          if (n_dirs[sel] == 2'd2) begin
            if (avail(claimed, nonpref, out_busy, out_ready)) begin
              grant[sel]     = 1'b1;
              grant_dir[sel] = nonpref;
              claimed[nonpref] = 1'b1;
              dec[nonpref]   = dec[nonpref] + 1'b1;
              fallback[sel]  = 1'b1;
            end else begin
              inc[nonpref] = inc[nonpref] + 1'b1;
            end
          end
        end
      end
    end
  end

endmodule
