// tb_plb_mesh: end-to-end test of a 4 x 4 mesh. Every node sends 12
// packets of 20 flits, 30 percent of them to one hot-spot node; all must
// arrive intact at their destinations, and swaps, fall-backs, internal and
// downstream blocks must all occur (see plb_mesh_traffic).
`timescale 1ns/1ps
module tb_plb_mesh;
  import plb_pkg::*;

  localparam int unsigned MX = 4;
  localparam int unsigned MY = 4;
  localparam int unsigned NODES = MX * MY;

  logic                 clk, rst_n;
  logic  [NODES-1:0]    inj_valid, inj_ready, ej_valid, ej_ready;
  flit_t [NODES-1:0]    inj_flit, ej_flit;
  logic  [NODES-1:0]    swap_evt, fb_evt, wait_evt, blk_evt;

  plb_mesh #(.MESH_X(MX), .MESH_Y(MY)) dut (.*);

  plb_mesh_traffic #(.MESH_X(MX), .MESH_Y(MY), .PKTS(12), .HOT_PCT(30)) u_traffic (.*);

  // Event flags of each router, for the mechanism counts.
  for (genvar y = 0; y < MY; y++) begin : g_y
    for (genvar x = 0; x < MX; x++) begin : g_x
      assign swap_evt[y*MX+x] = |(dut.g_y[y].g_x[x].u_router.swap &
                                  dut.g_y[y].g_x[x].u_router.grant);
      assign fb_evt[y*MX+x]   = |dut.g_y[y].g_x[x].u_router.fallback;
      assign wait_evt[y*MX+x] = |(dut.g_y[y].g_x[x].u_router.hdr_wait &
                                  ~dut.g_y[y].g_x[x].u_router.grant);
      assign blk_evt[y*MX+x]  = |dut.g_y[y].g_x[x].u_router.fwd_blk;
    end
  end
endmodule
