// tb_plb_oe_route: exhaustive check of the odd-even route computation.
// For every offset in a 9 x 9 window, every input port and both column
// parities, the reference builds the set of minimal directions and removes
// those that are forbidden turns (no 180-degree turn, no turn to north or
// south for a packet entering an even column from the west, no turn to the
// west in an odd column) or lead to a dead end (entering an even
// destination column from the west with rows still to go; going north or
// south in an odd column while the destination lies west, which could only
// be left by a forbidden turn). States with no legal direction cannot
// occur under the rules and are skipped. With two directions the
// north/south one must come first.
`timescale 1ns/1ps
module tb_plb_oe_route;
  import plb_pkg::*;

  offset_t    dx, dy;
  dir_e       in_port;
  logic       col_odd;
  logic [1:0] n_dirs;
  dir_e       dir0, dir1;
  int         checks = 0, failures = 0, skipped = 0, twos = 0;

  plb_oe_route dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Direction of travel implied by the input port (the packet moves away
  // from the port it came in by); DIR_L means freshly injected.
  function automatic dir_e travel(dir_e p);
    case (p)
      DIR_N: return DIR_S;
      DIR_S: return DIR_N;
      DIR_E: return DIR_W;
      DIR_W: return DIR_E;
      default: return DIR_L;
    endcase
  endfunction

  function automatic logic legal(dir_e t, dir_e d, logic odd, int ddx, int ddy);
    // 180-degree turns.
    if ((t == DIR_N && d == DIR_S) || (t == DIR_S && d == DIR_N) ||
        (t == DIR_E && d == DIR_W) || (t == DIR_W && d == DIR_E)) return 0;
    if (!odd && t == DIR_E && (d == DIR_N || d == DIR_S)) return 0;
    if (odd && (t == DIR_N || t == DIR_S) && d == DIR_W) return 0;
    // Dead ends.
    if (d == DIR_E && ddx == 1 && ddy != 0 && (((odd ? 1 : 0) + 1) % 2 == 0)) return 0;
    if ((d == DIR_N || d == DIR_S) && ddx < 0 && odd) return 0;
    return 1;
  endfunction

  initial begin
    logic [4:0] want, got;
    for (int odd = 0; odd < 2; odd++)
      for (int p = 0; p < 5; p++)
        for (int ix = -4; ix <= 4; ix++)
          for (int iy = -4; iy <= 4; iy++) begin
            dir_e t;
            t = travel(dir_e'(p));
            // Only inputs consistent with minimal travel.
            if ((t == DIR_E && ix < 0) || (t == DIR_W && ix > 0) ||
                (t == DIR_N && iy < 0) || (t == DIR_S && iy > 0)) continue;
            if (ix == 0 && iy == 0 && p != 4) begin
              want = 5'b10000;
            end else begin
              want = '0;
              if (ix > 0 && legal(t, DIR_E, odd[0], ix, iy)) want[DIR_E] = 1;
              if (ix < 0 && legal(t, DIR_W, odd[0], ix, iy)) want[DIR_W] = 1;
              if (iy > 0 && legal(t, DIR_N, odd[0], ix, iy)) want[DIR_N] = 1;
              if (iy < 0 && legal(t, DIR_S, odd[0], ix, iy)) want[DIR_S] = 1;
              if (ix == 0 && iy == 0) want[DIR_L] = 1;
            end
            if (want == 0) begin skipped++; continue; end
            dx = offset_t'(ix); dy = offset_t'(iy);
            in_port = dir_e'(p); col_odd = odd[0];
            #1;
            got = '0;
            got[dir0] = 1;
            if (n_dirs == 2) got[dir1] = 1;
            checks++;
            if (got != want || (n_dirs == 2 && !(dir0 == DIR_N || dir0 == DIR_S)) ||
                n_dirs != 2'($countones(want))) begin
              failures++;
              $display("FAIL odd=%0d port=%0d dx=%0d dy=%0d want=%b got=%b n=%0d",
                       odd, p, ix, iy, want, got, n_dirs);
            end
            if (n_dirs == 2) twos++;
          end
    checks++;
    if (twos == 0) begin failures++; $display("FAIL no two-direction case"); end
    $display("two-direction cases %0d, unreachable states %0d", twos, skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
