// plb_oe_route: odd-even turn-model route computation for one header flit.
//
// Given the header's relative offsets (dx, dy), the port it came in by and
// whether the router sits in an odd column, this block returns aval_dirs:
// the one or two minimal output directions that the odd-even turn model
// allows. The model forbids 180-degree turns, forbids a packet that entered
// an even-column router from its west port to turn north or south, and
// forbids any turn to the west in an odd column. A direction that would
// lead the packet into a dead end is dropped as well: a packet may not enter
// the destination column from the west when that column is even, since it
// could not then turn north or south there.
//
// The rules are those of the odd-even turn model (Chiu) in the form given
// in the published work. The original formulation looks at the source
// column; this block uses the input port instead (a packet that did not come
// in from the west has not yet moved east), which gives the same directions
// for every packet the rules can produce.
//
// Output order: when two directions are allowed, dir0 is the north/south
// one and dir1 the east/west one. The load balancer keeps dir0 preferred on
// equal history, so on a tie the packet follows the Y dimension.
// Timing: purely combinational.
module plb_oe_route
  import plb_pkg::*;
(
  input  offset_t    dx,
  input  offset_t    dy,
  input  dir_e       in_port,
  input  logic       col_odd,
  output logic [1:0] n_dirs,
  output dir_e       dir0,
  output dir_e       dir1
);

  dir_e ydir;
  logic dest_odd;
  logic ns_ok;
  logic e_ok;

  assign ydir     = (dy > 0) ? DIR_N : DIR_S;
  // Parity of the destination column: current column plus dx.
  assign dest_odd = col_odd ^ dx[0];

  always_comb begin
    n_dirs = 2'd1;
    dir0   = DIR_L;
    dir1   = DIR_L;
    ns_ok  = 1'b0;
    e_ok   = 1'b0;
    if (dx == 0) begin
      if (dy != 0) dir0 = ydir;
    end else if (dx > 0) begin
      if (dy == 0) begin
        dir0 = DIR_E;
      end else begin
        ns_ok = col_odd || (in_port != DIR_W);
        e_ok  = dest_odd || (dx != offset_t'(1));
        if (ns_ok && e_ok) begin
          n_dirs = 2'd2;
          dir0   = ydir;
          dir1   = DIR_E;
        end else if (ns_ok) begin
          dir0 = ydir;
        end else begin
          dir0 = DIR_E;
        end
      end
    end else begin
      if (dy != 0 && !col_odd) begin
        n_dirs = 2'd2;
        dir0   = ydir;
        dir1   = DIR_W;
      end else begin
        dir0 = DIR_W;
      end
    end
  end

endmodule
