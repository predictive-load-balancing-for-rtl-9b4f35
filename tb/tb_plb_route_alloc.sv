// tb_plb_route_alloc: random waiting headers, history counts, busy and
// ready outputs. The reference keeps each header's arrival cycle, serves
// headers by (arrival cycle, port number) and applies the load-balancing
// route rule to each: order the directions by history, try the preferred
// output, then the other; each try raises or lowers the output's count.
// Grants, chosen outputs, event counts and the swap/fallback flags are
// compared every cycle. The test also counts cases in which arrival order,
// not port number, decided who got a contested output.
`timescale 1ns/1ps
module tb_plb_route_alloc;
  import plb_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [NPORTS-1:0]            hdr_wait, out_busy, out_ready, grant, swap, fallback;
  logic [NPORTS-1:0][1:0]       n_dirs;
  dir_e [NPORTS-1:0]            dir0, dir1, grant_dir;
  logic [NPORTS-1:0][HIST_W-1:0] hist;
  logic [NPORTS-1:0][EVT_W-1:0] inc, dec;
  int   checks = 0, failures = 0;
  int   arr [NPORTS];
  int   n_swap = 0, n_fb = 0, n_order = 0, n_grant = 0;

  plb_route_alloc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic new_dirs(int i);
    int k;
    k = $urandom_range(0, 3);
    dir0[i] = ($urandom_range(0, 1) != 0) ? DIR_N : DIR_S;
    dir1[i] = ($urandom_range(0, 1) != 0) ? DIR_E : DIR_W;
    if (k == 0)      begin n_dirs[i] = 1; dir0[i] = dir_e'($urandom_range(0, 4)); end
    else if (k == 1) begin n_dirs[i] = 1; end
    else             n_dirs[i] = 2;
  endtask

  initial begin
    logic [NPORTS-1:0] e_grant, e_swap, e_fb, claimed, done, cool;
    dir_e [NPORTS-1:0] e_dir;
    int   e_inc [NPORTS];
    int   e_dec [NPORTS];
    hdr_wait = '0; out_busy = '0; out_ready = '0; hist = '0; cool = '0;
    for (int i = 0; i < NPORTS; i++) begin new_dirs(i); arr[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 1; c < 8000; c++) begin
      @(negedge clk);
      for (int i = 0; i < NPORTS; i++) begin
        if (!hdr_wait[i] && !cool[i] && $urandom_range(0, 2) == 0) begin
          hdr_wait[i] = 1; arr[i] = c; new_dirs(i);
        end
      end
      for (int o = 0; o < NPORTS; o++) begin
        out_busy[o]  = ($urandom_range(0, 3) == 0);
        out_ready[o] = ($urandom_range(0, 4) != 0);
        hist[o]      = 8'($urandom_range(0, 3));
      end
      // Reference.
      e_grant = '0; e_swap = '0; e_fb = '0; claimed = '0; done = '0;
      e_dir = {NPORTS{DIR_L}};
      foreach (e_inc[o]) begin e_inc[o] = 0; e_dec[o] = 0; end
      for (int step = 0; step < NPORTS; step++) begin
        int best;
        best = -1;
        for (int i = 0; i < NPORTS; i++)
          if (hdr_wait[i] && !done[i] && (best < 0 || arr[i] < arr[best])) best = i;
        if (best >= 0) begin
          dir_e p, q;
          done[best] = 1;
          p = dir0[best]; q = dir1[best];
          if (n_dirs[best] == 2 && hist[p] > hist[q]) begin
            p = dir1[best]; q = dir0[best]; e_swap[best] = 1;
          end
          if (!out_busy[p] && !claimed[p] && out_ready[p]) begin
            e_grant[best] = 1; e_dir[best] = p; claimed[p] = 1; e_dec[p]++;
            for (int j = 0; j < best; j++)
              if (hdr_wait[j] && arr[j] > arr[best] &&
                  (dir0[j] == p || (n_dirs[j] == 2 && dir1[j] == p))) n_order++;
          end else begin
            e_inc[p]++;
            if (n_dirs[best] == 2) begin
              if (!out_busy[q] && !claimed[q] && out_ready[q]) begin
                e_grant[best] = 1; e_dir[best] = q; claimed[q] = 1; e_dec[q]++;
                e_fb[best] = 1;
              end else e_inc[q]++;
            end
          end
        end
      end
      #1;
      check(grant == e_grant, "grant");
      check(swap == e_swap, "swap");
      check(fallback == e_fb, "fallback");
      for (int i = 0; i < NPORTS; i++)
        if (e_grant[i]) check(grant_dir[i] == e_dir[i], "grant_dir");
      for (int o = 0; o < NPORTS; o++) begin
        check(int'(inc[o]) == e_inc[o], "inc");
        check(int'(dec[o]) == e_dec[o], "dec");
      end
      n_swap += $countones(e_swap & e_grant);
      n_fb   += $countones(e_fb);
      n_grant += $countones(e_grant);
      @(posedge clk);
      // A granted header leaves; its port is then busy with the packet
      // for a cycle before a new header may appear.
      cool = e_grant;
      hdr_wait = hdr_wait & ~e_grant;
    end
    check(n_swap > 0 && n_fb > 0 && n_order > 0, "mechanisms seen");
    $display("grants %0d swaps %0d fallbacks %0d arrival-order wins %0d",
             n_grant, n_swap, n_fb, n_order);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
