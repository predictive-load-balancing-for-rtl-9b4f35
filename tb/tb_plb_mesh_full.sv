// tb_plb_mesh_full: the mesh at its default 16 x 16 size. Every one of the
// 256 nodes sends 4 packets of 20 flits, 20 percent of them to one hot-spot
// node; all must arrive intact (see plb_mesh_traffic).
`timescale 1ns/1ps
module tb_plb_mesh_full;
  import plb_pkg::*;

  localparam int unsigned MX = 16;
  localparam int unsigned MY = 16;
  localparam int unsigned NODES = MX * MY;

  logic                 clk, rst_n;
  logic  [NODES-1:0]    inj_valid, inj_ready, ej_valid, ej_ready;
  flit_t [NODES-1:0]    inj_flit, ej_flit;
  logic  [NODES-1:0]    swap_evt, fb_evt, wait_evt, blk_evt;

  plb_mesh  dut (.*);

  plb_mesh_traffic #(.MESH_X(MX), .MESH_Y(MY), .PKTS(4), .HOT_PCT(20), .MAX_CYC(400000)) u_traffic (.*);

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
