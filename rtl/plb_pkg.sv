// plb_pkg: types and constants shared by the predictive load-balancing mesh.
//
// A router has five ports: the four mesh neighbours and the local port that
// injects packets from, and ejects packets to, the node's processing element.
// A packet is a header flit followed by payload flits. Every flit carries a
// `last` flag; the flit with `last` set closes the packet (for the header of a
// one-flit packet as well). The header's data field holds the packet's
// relative destination as two signed offsets, dx in the low ADDR_W bits and
// dy in the next ADDR_W bits. A router forwarding a header towards a
// neighbour moves the offset one step closer to zero, so a header reaching
// its destination reads dx = dy = 0. East is +x and north is +y.
//
// The five-port router, the one-flit input buffer, the signed relative
// address and the last-flit flag follow the published design. The data
// width (32), the offset width (8 bits, meshes up to 128 x 128), the
// counter width (8 bits) and the port numbering are this design's choices.
package plb_pkg;

  localparam int unsigned NPORTS = 5;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned ADDR_W = 8;
  localparam int unsigned HIST_W = 8;
  // Widest count of block-history events on one output in one cycle:
  // one forward event plus one route event from each input port.
  localparam int unsigned EVT_W  = 3;

  typedef enum logic [2:0] {
    DIR_N = 3'd0,
    DIR_E = 3'd1,
    DIR_S = 3'd2,
    DIR_W = 3'd3,
    DIR_L = 3'd4
  } dir_e;

  typedef logic signed [ADDR_W-1:0] offset_t;

  typedef struct packed {
    logic              last;
    logic [DATA_W-1:0] data;
  } flit_t;

  // Header flit for offsets (dx, dy); the upper data bits are free for the
  // application and are set to `tag`.
  function automatic flit_t make_header(offset_t dx, offset_t dy,
                                        logic [DATA_W-2*ADDR_W-1:0] tag,
                                        logic last);
    flit_t f;
    f.last = last;
    f.data = {tag, dy, dx};
    return f;
  endfunction

  // Header as it leaves a router through output `dir`: one hop nearer.
  function automatic flit_t step_header(flit_t f, dir_e dir);
    flit_t   r;
    offset_t dx;
    offset_t dy;
    dx = offset_t'(f.data[ADDR_W-1:0]);
    dy = offset_t'(f.data[2*ADDR_W-1:ADDR_W]);
    case (dir)
      DIR_N:   dy = dy - offset_t'(1);
      DIR_S:   dy = dy + offset_t'(1);
      DIR_E:   dx = dx - offset_t'(1);
      DIR_W:   dx = dx + offset_t'(1);
      default: ;
    endcase
    r = f;
    r.data[2*ADDR_W-1:0] = {dy, dx};
    return r;
  endfunction

endpackage
