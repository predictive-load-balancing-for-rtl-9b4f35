// plb_mesh_traffic: traffic source and checker for the mesh testbenches.
//
// It drives the clock and reset, has every node inject PKTS packets of LEN
// flits (header plus LEN-1 payload flits), and checks every ejected packet:
// it must arrive at the node its source addressed, with the header offsets
// worked down to zero, and with its payload whole and in order. Each
// packet's destination is drawn at random; HOT_PCT percent of them go to a
// single hot-spot node instead, a fan-in pattern that loads the links into
// that node. Injection is gated at random (INJ_PCT percent of cycles) and
// every PE accepts ejected flits on EJ_PCT percent of cycles, so links back
// up and blocks happen.
//
// The mesh's per-router event flags arrive on the *_evt inputs; the test
// counts them and fails if a mechanism never occurred: a history-driven
// swap of the two allowed directions, a fall-back to the second direction,
// an internal block (a header left waiting), a downstream block (a flit
// refused by the next stage), and ejection. It ends with the TB_RESULT line.
`timescale 1ns/1ps
module plb_mesh_traffic
  import plb_pkg::*;
#(
  parameter int unsigned MESH_X  = 4,
  parameter int unsigned MESH_Y  = 4,
  parameter int unsigned PKTS    = 8,
  parameter int unsigned LEN     = 20,
  parameter int unsigned HOT_PCT = 30,
  parameter int unsigned INJ_PCT = 70,
  parameter int unsigned EJ_PCT  = 80,
  parameter int unsigned MAX_CYC = 200000
) (
  output logic                           clk,
  output logic                           rst_n,
  output logic  [MESH_X*MESH_Y-1:0]      inj_valid,
  output flit_t [MESH_X*MESH_Y-1:0]      inj_flit,
  input  logic  [MESH_X*MESH_Y-1:0]      inj_ready,
  input  logic  [MESH_X*MESH_Y-1:0]      ej_valid,
  input  flit_t [MESH_X*MESH_Y-1:0]      ej_flit,
  output logic  [MESH_X*MESH_Y-1:0]      ej_ready,
  input  logic  [MESH_X*MESH_Y-1:0]      swap_evt,
  input  logic  [MESH_X*MESH_Y-1:0]      fb_evt,
  input  logic  [MESH_X*MESH_Y-1:0]      wait_evt,
  input  logic  [MESH_X*MESH_Y-1:0]      blk_evt
);

  localparam int unsigned NODES = MESH_X * MESH_Y;

  int checks = 0, failures = 0;
  int cyc = 0;
  int dest [NODES][PKTS];
  int t_inj [NODES][PKTS];
  int pk [NODES];
  int fi [NODES];
  int ein [NODES];
  int esrc [NODES];
  int eseq [NODES];
  int eidx [NODES];
  int delivered = 0;
  longint lat_sum = 0;
  int n_swap = 0, n_fb = 0, n_wait = 0, n_blk = 0;
  int hot;

  initial clk = 1'b0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  initial begin
    repeat (MAX_CYC) @(posedge clk);
    failures++;
    $display("watchdog expired: %0d of %0d packets delivered", delivered, NODES * PKTS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic flit_t make_flit(int n, int p, int k);
    int dx, dy;
    if (k == 0) begin
      dx = (dest[n][p] % MESH_X) - (n % MESH_X);
      dy = (dest[n][p] / MESH_X) - (n / MESH_X);
      return make_header(offset_t'(dx), offset_t'(dy), 16'({8'(n), 8'(p)}), LEN == 1);
    end
    return flit_t'({(k == LEN - 1), 8'(n), 8'(p), 16'(k)});
  endfunction

  initial begin
    rst_n = 1'b0;
    hot = $urandom_range(0, NODES - 1);
    for (int n = 0; n < NODES; n++) begin
      pk[n] = 0; fi[n] = 0; ein[n] = 0;
      for (int p = 0; p < PKTS; p++)
        dest[n][p] = ($urandom_range(0, 99) < HOT_PCT) ? hot : $urandom_range(0, NODES - 1);
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
  end

  always @(negedge clk) begin
    for (int n = 0; n < NODES; n++) begin
      inj_valid[n] <= rst_n && (pk[n] < PKTS) && ($urandom_range(0, 99) < INJ_PCT);
      inj_flit[n]  <= (pk[n] < PKTS) ? make_flit(n, pk[n], fi[n]) : '0;
      ej_ready[n]  <= ($urandom_range(0, 99) < EJ_PCT);
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      n_swap += $countones(swap_evt);
      n_fb   += $countones(fb_evt);
      n_wait += $countones(wait_evt);
      n_blk  += $countones(blk_evt);
      for (int n = 0; n < NODES; n++) begin
        if (inj_valid[n] && inj_ready[n]) begin
          if (fi[n] == 0) t_inj[n][pk[n]] = cyc;
          if (fi[n] == LEN - 1) begin fi[n] = 0; pk[n]++; end
          else fi[n]++;
        end
        if (ej_valid[n] && ej_ready[n]) begin
          flit_t f;
          f = ej_flit[n];
          if (!ein[n]) begin
            esrc[n] = int'(f.data[31:24]);
            eseq[n] = int'(f.data[23:16]);
            eidx[n] = 1;
            check(f.data[15:0] == 16'h0000, "header offsets zero at destination");
            check(esrc[n] < NODES && eseq[n] < PKTS && dest[esrc[n]][eseq[n]] == n,
                  "packet ejected at its destination");
            ein[n] = 1;
          end else begin
            check(f.data == {8'(esrc[n]), 8'(eseq[n]), 16'(eidx[n])}, "payload in order");
            eidx[n]++;
          end
          if (f.last) begin
            check(eidx[n] == LEN, "packet length");
            ein[n] = 0;
            delivered++;
            if (esrc[n] < NODES && eseq[n] < PKTS)
              lat_sum += longint'(cyc - t_inj[esrc[n]][eseq[n]]);
          end
        end
      end
      if (delivered == NODES * PKTS) begin
        check(n_swap > 0, "history-driven swap occurred");
        check(n_fb > 0, "fall-back to second direction occurred");
        check(n_wait > 0, "internal block occurred");
        check(n_blk > 0, "downstream block occurred");
        $display("%0d x %0d mesh: %0d packets of %0d flits in %0d cycles, mean latency %0d",
                 MESH_X, MESH_Y, delivered, LEN, cyc, int'(lat_sum / delivered));
        $display("events: swaps %0d fall-backs %0d header waits %0d downstream blocks %0d",
                 n_swap, n_fb, n_wait, n_blk);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
