// tb_plb_crossbar: random bindings (each input bound to at most one
// output), random buffer contents and ready signals. The reference
// forwards the bound input's flit, steps the header address when the
// output's first flit goes out, frees the input only when the flit moves,
// and classifies each bound output with a held flit as forwarded or
// blocked.
`timescale 1ns/1ps
module tb_plb_crossbar;
  import plb_pkg::*;

  logic  [NPORTS-1:0] in_valid, in_deq, out_bound, out_first, out_valid, out_ready;
  logic  [NPORTS-1:0] fwd_ok, fwd_blk;
  flit_t [NPORTS-1:0] in_flit, out_flit;
  dir_e  [NPORTS-1:0] out_src;
  int    checks = 0, failures = 0, n_ok = 0, n_blk = 0, n_hdr = 0;

  plb_crossbar dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [NPORTS-1:0] used, exp_deq;
    for (int c = 0; c < 5000; c++) begin
      used = '0;
      for (int o = 0; o < NPORTS; o++) begin
        int s;
        s = $urandom_range(0, NPORTS - 1);
        out_bound[o] = ($urandom_range(0, 3) != 0) && !used[s];
        if (out_bound[o]) used[s] = 1;
        out_src[o]   = dir_e'(s);
        out_first[o] = ($urandom_range(0, 2) == 0);
        out_ready[o] = ($urandom_range(0, 2) != 0);
      end
      for (int i = 0; i < NPORTS; i++) begin
        in_valid[i] = ($urandom_range(0, 3) != 0);
        in_flit[i]  = flit_t'({$urandom_range(0, 1), $urandom()});
      end
      #1;
      exp_deq = '0;
      for (int o = 0; o < NPORTS; o++) begin
        if (out_bound[o]) begin
          flit_t f;
          int    dx, dy;
          f  = in_flit[out_src[o]];
          dx = int'(offset_t'(f.data[7:0]));
          dy = int'(offset_t'(f.data[15:8]));
          if (out_first[o]) begin
            n_hdr++;
            case (o)
              0: dy = dy - 1;
              1: dx = dx - 1;
              2: dy = dy + 1;
              3: dx = dx + 1;
              default: ;
            endcase
            f.data[15:0] = {8'(dy), 8'(dx)};
          end
          check(out_valid[o] == in_valid[out_src[o]], "out_valid");
          if (in_valid[out_src[o]]) begin
            check(out_flit[o] == f, "out_flit");
            check(fwd_ok[o] == out_ready[o] && fwd_blk[o] == !out_ready[o], "events");
            if (out_ready[o]) begin exp_deq[out_src[o]] = 1; n_ok++; end
            else n_blk++;
          end else begin
            check(!fwd_ok[o] && !fwd_blk[o], "no event on empty input");
          end
        end else begin
          check(!out_valid[o] && !fwd_ok[o] && !fwd_blk[o], "unbound output idle");
        end
      end
      check(in_deq == exp_deq, "in_deq");
      #9;
    end
    check(n_ok > 0 && n_blk > 0 && n_hdr > 0, "all cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
