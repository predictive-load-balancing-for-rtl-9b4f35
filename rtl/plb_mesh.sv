// plb_mesh: MESH_X x MESH_Y mesh of predictive load-balancing routers.
//
// This is the interconnect of a multi-FPGA machine in which every node is
// one FPGA holding a router and a processing element (PE). Node n = y *
// MESH_X + x sits in column x and row y; row y+1 lies to the north and column
// x+1 to the east. Each router's north, east, south and west ports are wired
// to its neighbours by a flit channel in each direction; ports on the mesh
// edge are tied off (nothing arrives, nothing may leave). The local port of
// every router is brought out: `inj_*` carries packets from the PE into the
// network and `ej_*` delivers packets to the PE. In the real machine the
// neighbour channels run over the FPGAs' serial transceivers; here they are
// plain one-cycle register-to-buffer links.
//
// A PE sends a packet as a header (make_header in plb_pkg, with dx, dy the
// offset from source to destination node) followed by payload flits, the
// final one flagged `last`. Packets must name a node inside the mesh.
// Flow control is valid/ready on every channel.
//
// The ready signals of neighbouring routers are joined combinationally (a
// one-flit buffer that refills in the cycle it empties), so the wiring holds
// structural combinational loops around each mesh square. Only the links a
// worm holds are active at run time, and the odd-even turn rules keep those
// acyclic, so the logic settles; simulators that order by signal report
// the loop.
//
// The 16 x 16 size is the published system's; the edge handling and the
// node numbering are this design's choices.
module plb_mesh
  import plb_pkg::*;
#(
  parameter int unsigned MESH_X = 16,
  parameter int unsigned MESH_Y = 16
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic  [MESH_X*MESH_Y-1:0]      inj_valid,
  input  flit_t [MESH_X*MESH_Y-1:0]      inj_flit,
  output logic  [MESH_X*MESH_Y-1:0]      inj_ready,
  output logic  [MESH_X*MESH_Y-1:0]      ej_valid,
  output flit_t [MESH_X*MESH_Y-1:0]      ej_flit,
  input  logic  [MESH_X*MESH_Y-1:0]      ej_ready
);

  localparam int unsigned NODES = MESH_X * MESH_Y;

  logic  [NODES-1:0][NPORTS-1:0] r_in_valid;
  flit_t [NODES-1:0][NPORTS-1:0] r_in_flit;
  logic  [NODES-1:0][NPORTS-1:0] r_in_ready;
  logic  [NODES-1:0][NPORTS-1:0] r_out_valid;
  flit_t [NODES-1:0][NPORTS-1:0] r_out_flit;
  logic  [NODES-1:0][NPORTS-1:0] r_out_ready;

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned N = y * MESH_X + x;

      plb_router #(.COL(x)) u_router (
        .clk      (clk),
        .rst_n    (rst_n),
        .in_valid (r_in_valid[N]),
        .in_flit  (r_in_flit[N]),
        .in_ready (r_in_ready[N]),
        .out_valid(r_out_valid[N]),
        .out_flit (r_out_flit[N]),
        .out_ready(r_out_ready[N])
      );

      // Local port.
      assign r_in_valid[N][DIR_L]  = inj_valid[N];
      assign r_in_flit[N][DIR_L]   = inj_flit[N];
      assign inj_ready[N]          = r_in_ready[N][DIR_L];
      assign ej_valid[N]           = r_out_valid[N][DIR_L];
      assign ej_flit[N]            = r_out_flit[N][DIR_L];
      assign r_out_ready[N][DIR_L] = ej_ready[N];

      // North neighbour (y+1): its south output feeds our north input.
      if (y + 1 < MESH_Y) begin : g_n
        assign r_in_valid[N][DIR_N]  = r_out_valid[N+MESH_X][DIR_S];
        assign r_in_flit[N][DIR_N]   = r_out_flit[N+MESH_X][DIR_S];
        assign r_out_ready[N][DIR_N] = r_in_ready[N+MESH_X][DIR_S];
      end else begin : g_n_edge
        assign r_in_valid[N][DIR_N]  = 1'b0;
        assign r_in_flit[N][DIR_N]   = '0;
        assign r_out_ready[N][DIR_N] = 1'b0;
      end

      // South neighbour (y-1).
      if (y > 0) begin : g_s
        assign r_in_valid[N][DIR_S]  = r_out_valid[N-MESH_X][DIR_N];
        assign r_in_flit[N][DIR_S]   = r_out_flit[N-MESH_X][DIR_N];
        assign r_out_ready[N][DIR_S] = r_in_ready[N-MESH_X][DIR_N];
      end else begin : g_s_edge
        assign r_in_valid[N][DIR_S]  = 1'b0;
        assign r_in_flit[N][DIR_S]   = '0;
        assign r_out_ready[N][DIR_S] = 1'b0;
      end

      // East neighbour (x+1).
      if (x + 1 < MESH_X) begin : g_e
        assign r_in_valid[N][DIR_E]  = r_out_valid[N+1][DIR_W];
        assign r_in_flit[N][DIR_E]   = r_out_flit[N+1][DIR_W];
        assign r_out_ready[N][DIR_E] = r_in_ready[N+1][DIR_W];
      end else begin : g_e_edge
        assign r_in_valid[N][DIR_E]  = 1'b0;
        assign r_in_flit[N][DIR_E]   = '0;
        assign r_out_ready[N][DIR_E] = 1'b0;
      end

      // West neighbour (x-1).
      if (x > 0) begin : g_w
        assign r_in_valid[N][DIR_W]  = r_out_valid[N-1][DIR_E];
        assign r_in_flit[N][DIR_W]   = r_out_flit[N-1][DIR_E];
        assign r_out_ready[N][DIR_W] = r_in_ready[N-1][DIR_E];
      end else begin : g_w_edge
        assign r_in_valid[N][DIR_W]  = 1'b0;
        assign r_in_flit[N][DIR_W]   = '0;
        assign r_out_ready[N][DIR_W] = 1'b0;
      end
    end
  end

endmodule
