// plb_router: five-port wormhole router with odd-even routing and
// predictive load balancing.
//
// Ports 0..3 join the north, east, south and west neighbours; port 4 is the
// local inject/eject channel to the node's processing element. Each input
// has a one-flit buffer. A flit that reaches an unbound input is a header:
// the odd-even logic gives its one or two allowed directions, and the
// allocator binds one output to it, choosing between two directions by the
// outputs' block-history counts and serving waiting headers in arrival
// order. From the next cycle on, the crossbar forwards the packet's flits
// from that input to that output, one per cycle when nothing blocks. The
// binding is released in the cycle the flit marked `last` leaves, so the
// input's next flit is again a header.
//
// Every attempt feeds the history counters: a header that finds an output
// taken or blocked raises its count, and each flit that the downstream
// router cannot accept raises it; each header routed and each flit moved
// lowers it. So an output that has often been blocked is avoided when
// another minimal direction is allowed.
//
// Timing: routing takes one cycle (header in the buffer -> binding
// registered), and each flit then spends one cycle crossing to the next
// router's buffer: an unblocked header advances one hop every two cycles and
// the payload follows at one flit per cycle. `in_ready` depends
// combinationally on `out_ready` through the bound path (see
// plb_input_buffer), so in a mesh the ready signals of a worm form a
// combinational chain; the odd-even rules keep the chain acyclic at run
// time, though the mesh wiring contains structural loops.
// Interface: valid/ready per port; reset is synchronous, active low.
// COL is the router's column; only its parity is used.
// The port set, buffer size, routing rules, history algorithm, arrival
// order and release on the last flit follow the published design; the
// cycle timing and widths are this design's choices.
module plb_router
  import plb_pkg::*;
#(
  parameter int unsigned COL = 0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic  [NPORTS-1:0] in_valid,
  input  flit_t [NPORTS-1:0] in_flit,
  output logic  [NPORTS-1:0] in_ready,
  output logic  [NPORTS-1:0] out_valid,
  output flit_t [NPORTS-1:0] out_flit,
  input  logic  [NPORTS-1:0] out_ready
);

  localparam logic COL_ODD = COL[0];

  logic  [NPORTS-1:0]             buf_valid;
  flit_t [NPORTS-1:0]             buf_flit;
  logic  [NPORTS-1:0]             buf_deq;

  logic  [NPORTS-1:0]             in_bound;
  logic  [NPORTS-1:0]             out_bound;
  dir_e  [NPORTS-1:0]             out_src;
  logic  [NPORTS-1:0]             out_first;

  logic  [NPORTS-1:0][1:0]        n_dirs;
  dir_e  [NPORTS-1:0]             dir0;
  dir_e  [NPORTS-1:0]             dir1;
  logic  [NPORTS-1:0]             hdr_wait;
  logic  [NPORTS-1:0]             grant;
  dir_e  [NPORTS-1:0]             grant_dir;
  logic  [NPORTS-1:0]             swap;
  logic  [NPORTS-1:0]             fallback;
  logic  [NPORTS-1:0][EVT_W-1:0]  r_inc;
  logic  [NPORTS-1:0][EVT_W-1:0]  r_dec;
  logic  [NPORTS-1:0][EVT_W-1:0]  h_inc;
  logic  [NPORTS-1:0][EVT_W-1:0]  h_dec;
  logic  [NPORTS-1:0][HIST_W-1:0] hist;
  logic  [NPORTS-1:0]             fwd_ok;
  logic  [NPORTS-1:0]             fwd_blk;

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    plb_input_buffer u_buf (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (in_valid[p]),
      .in_flit  (in_flit[p]),
      .in_ready (in_ready[p]),
      .out_valid(buf_valid[p]),
      .out_flit (buf_flit[p]),
      .out_ready(buf_deq[p])
    );

    plb_oe_route u_oe (
      .dx     (offset_t'(buf_flit[p].data[ADDR_W-1:0])),
      .dy     (offset_t'(buf_flit[p].data[2*ADDR_W-1:ADDR_W])),
      .in_port(dir_e'(p)),
      .col_odd(COL_ODD),
      .n_dirs (n_dirs[p]),
      .dir0   (dir0[p]),
      .dir1   (dir1[p])
    );

    assign hdr_wait[p] = buf_valid[p] && !in_bound[p];
    assign h_inc[p]    = r_inc[p] + EVT_W'(fwd_blk[p]);
    assign h_dec[p]    = r_dec[p] + EVT_W'(fwd_ok[p]);
  end

  plb_route_alloc u_alloc (
    .clk      (clk),
    .rst_n    (rst_n),
    .hdr_wait (hdr_wait),
    .n_dirs   (n_dirs),
    .dir0     (dir0),
    .dir1     (dir1),
    .out_busy (out_bound),
    .out_ready(out_ready),
    .hist     (hist),
    .grant    (grant),
    .grant_dir(grant_dir),
    .inc      (r_inc),
    .dec      (r_dec),
    .swap     (swap),
    .fallback (fallback)
  );

  plb_block_hist u_hist (
    .clk  (clk),
    .rst_n(rst_n),
    .inc  (h_inc),
    .dec  (h_dec),
    .hist (hist)
  );

  plb_crossbar u_xbar (
    .in_valid (buf_valid),
    .in_flit  (buf_flit),
    .in_deq   (buf_deq),
    .out_bound(out_bound),
    .out_src  (out_src),
    .out_first(out_first),
    .out_valid(out_valid),
    .out_flit (out_flit),
    .out_ready(out_ready),
    .fwd_ok   (fwd_ok),
    .fwd_blk  (fwd_blk)
  );

  // Binding state: set by a grant, cleared when the last flit leaves.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_bound  <= '0;
      out_bound <= '0;
      out_src   <= {NPORTS{DIR_N}};
      out_first <= '0;
    end else begin
      for (int o = 0; o < NPORTS; o++) begin
        if (out_valid[o] && out_ready[o]) begin
          out_first[o] <= 1'b0;
          if (out_flit[o].last) begin
            out_bound[o]         <= 1'b0;
            in_bound[out_src[o]] <= 1'b0;
          end
        end
      end
      for (int i = 0; i < NPORTS; i++) begin
        if (grant[i]) begin
          in_bound[i]            <= 1'b1;
          out_bound[grant_dir[i]] <= 1'b1;
          out_src[grant_dir[i]]   <= dir_e'(i);
          out_first[grant_dir[i]] <= 1'b1;
        end
      end
    end
  end

  // A flit offered on an output stays offered, unchanged, until taken.
  for (genvar o = 0; o < NPORTS; o++) begin : g_chk
    a_hold: assert property (@(posedge clk) disable iff (!rst_n)
      (out_valid[o] && !out_ready[o]) |=> (out_valid[o] && $stable(out_flit[o])));
  end

endmodule
