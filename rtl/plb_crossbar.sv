// plb_crossbar: the router's 5 x 5 switch and its forwarding step.
//
// Output o carries the flits of the input port bound to it (`out_src[o]`)
// while `out_bound[o]` is set. A flit moves when the bound input's buffer
// holds one and the next stage is ready; the input buffer is then told to
// release it (`in_deq`). The first flit through a freshly bound output is
// the header, and its relative address is stepped one hop nearer the
// destination on the way out.
//
// The block also carries out the forwarding half of the load-balancing
// algorithm: for every bound output whose input holds a flit, a flit that
// moves counts as a success (`fwd_ok`, lowers the output's history count)
// and a flit that the downstream router cannot take counts as a downstream
// block (`fwd_blk`, raises it). A bound output whose input is momentarily
// empty counts as neither.
//
// Timing: combinational; the binding registers live in the router.
// The forwarding rule follows the published algorithm; the treatment of an
// empty bound input and the header rewrite are this design's choices.
module plb_crossbar
  import plb_pkg::*;
(
  input  logic [NPORTS-1:0] in_valid,
  input  flit_t [NPORTS-1:0] in_flit,
  output logic [NPORTS-1:0] in_deq,
  input  logic [NPORTS-1:0] out_bound,
  input  dir_e [NPORTS-1:0] out_src,
  input  logic [NPORTS-1:0] out_first,
  output logic [NPORTS-1:0] out_valid,
  output flit_t [NPORTS-1:0] out_flit,
  input  logic [NPORTS-1:0] out_ready,
  output logic [NPORTS-1:0] fwd_ok,
  output logic [NPORTS-1:0] fwd_blk
);

  always_comb begin
    in_deq    = '0;
    out_valid = '0;
    out_flit  = '0;
    fwd_ok    = '0;
    fwd_blk   = '0;
    for (int o = 0; o < NPORTS; o++) begin
      if (out_bound[o]) begin
        out_valid[o] = in_valid[out_src[o]];
        out_flit[o]  = out_first[o] ? step_header(in_flit[out_src[o]], dir_e'(o))
                                    : in_flit[out_src[o]];
        if (in_valid[out_src[o]]) begin
          if (out_ready[o]) begin
            fwd_ok[o]            = 1'b1;
            in_deq[out_src[o]]   = 1'b1;
          end else begin
            fwd_blk[o] = 1'b1;
          end
        end
      end
    end
  end

endmodule
