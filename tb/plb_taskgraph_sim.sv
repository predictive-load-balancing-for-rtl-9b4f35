// plb_taskgraph_sim: a 4 x 4 mesh driven by task-graph processing elements.
//
// Behavioural PE model for the task-graph workloads. G applications, each
// a graph of six tasks in one of four shapes, are placed at random on the
// nodes, at most one task of a graph per node:
//   PATTERN 0  linear fan-in: 0->1->2->3->4, and each of 0..4 -> 5
//   PATTERN 1  fan-in:        0..4 -> 5
//   PATTERN 2  diamond:       0 -> 1..4 -> 5
//   PATTERN 3  linear:        0->1->2->3->4->5
// Source tasks (no predecessors) start iteration k at cycle k * PERIOD.
// Any other task starts once the packets of all its predecessors for that
// iteration have arrived and its previous iteration is over. A task runs for
// EXEC cycles and then sends one LEN-flit packet to each successor. An
// application iteration is complete when its sink (task 5) finishes; its
// execution time runs from k * PERIOD to that moment.
//
// The model checks that every packet reaches the node of the task it
// addresses, intact, and that every iteration completes no sooner than the
// longest chain of tasks allows. `done` rises when all ITER iterations of
// all G graphs are complete; `exec_sum` is the sum of their execution times.
`timescale 1ns/1ps
module plb_taskgraph_sim
  import plb_pkg::*;
#(
  parameter int unsigned PATTERN = 0,
  parameter int unsigned PERIOD  = 300,
  parameter int unsigned EXEC    = 200,
  parameter int unsigned ITER    = 6,
  parameter int unsigned G       = 2,
  parameter int unsigned LEN     = 20
) (
  input  logic   clk,
  input  logic   rst_n,
  output logic   done,
  output int     checks,
  output int     failures,
  output longint exec_sum
);

  localparam int unsigned MX = 4;
  localparam int unsigned MY = 4;
  localparam int unsigned NODES = MX * MY;
  localparam int unsigned T = 6;

  logic  [NODES-1:0] inj_valid, inj_ready, ej_valid, ej_ready;
  flit_t [NODES-1:0] inj_flit, ej_flit;

  plb_mesh #(.MESH_X(MX), .MESH_Y(MY)) u_mesh (
    .clk, .rst_n, .inj_valid, .inj_flit, .inj_ready, .ej_valid, .ej_flit, .ej_ready
  );

  logic [T-1:0] succ [T];
  int           npred [T];
  int           depth;
  int           node_of [G][T];
  int           arrived [G][T][ITER];
  logic         started [G][T][ITER];
  logic         finished [G][T][ITER];
  int           t_start [G][T][ITER];
  int           cyc;
  int           completed;

  typedef struct { int dst; logic [15:0] tag; } pkt_t;
  pkt_t q [NODES][$];
  int   fi [NODES];
  logic ein [NODES];
  logic [15:0] etag [NODES];
  int   eidx [NODES];

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL pattern %0d: %s at %0d", PATTERN, what, cyc); end
  endtask

  initial begin
    int perm [NODES];
    checks = 0; failures = 0; exec_sum = 0; done = 0; completed = 0;
    for (int t = 0; t < T; t++) begin succ[t] = '0; npred[t] = 0; end
    case (PATTERN)
      0: begin for (int t = 0; t < 4; t++) succ[t][t+1] = 1;
               for (int t = 0; t < 5; t++) succ[t][5] = 1; depth = 6; end
      1: begin for (int t = 0; t < 5; t++) succ[t][5] = 1; depth = 2; end
      2: begin for (int t = 1; t < 5; t++) begin succ[0][t] = 1; succ[t][5] = 1; end
               depth = 3; end
      default: begin for (int t = 0; t < 5; t++) succ[t][t+1] = 1; depth = 6; end
    endcase
    for (int s = 0; s < T; s++)
      for (int t = 0; t < T; t++) if (succ[s][t]) npred[t]++;
    for (int g = 0; g < G; g++) begin
      for (int n = 0; n < NODES; n++) perm[n] = n;
      for (int n = NODES - 1; n > 0; n--) begin
        int j, tmp;
        j = $urandom_range(0, n);
        tmp = perm[n]; perm[n] = perm[j]; perm[j] = tmp;
      end
      for (int t = 0; t < T; t++) begin
        node_of[g][t] = perm[t];
        for (int k = 0; k < ITER; k++) begin
          arrived[g][t][k] = 0; started[g][t][k] = 0; finished[g][t][k] = 0;
        end
      end
    end
    for (int n = 0; n < NODES; n++) begin fi[n] = 0; ein[n] = 0; end
  end

  function automatic flit_t pkt_flit(int src, pkt_t p, int k);
    if (k == 0)
      return make_header(offset_t'((p.dst % MX) - (src % MX)),
                         offset_t'((p.dst / MX) - (src / MX)), p.tag, LEN == 1);
    return flit_t'({(k == LEN - 1), p.tag, 16'(k)});
  endfunction

  always @(negedge clk) begin
    for (int n = 0; n < NODES; n++) begin
      inj_valid[n] <= rst_n && (q[n].size() > 0);
      inj_flit[n]  <= (q[n].size() > 0) ? pkt_flit(n, q[n][0], fi[n]) : '0;
      ej_ready[n]  <= 1'b1;
    end
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      cyc <= 0;
    end else begin
      cyc <= cyc + 1;
      // Injection.
      for (int n = 0; n < NODES; n++) begin
        if (inj_valid[n] && inj_ready[n]) begin
          if (fi[n] == LEN - 1) begin fi[n] = 0; void'(q[n].pop_front()); end
          else fi[n]++;
        end
      end
      // Ejection: tag = {graph[1:0], task[2:0], iteration[10:0]}.
      for (int n = 0; n < NODES; n++) begin
        if (ej_valid[n] && ej_ready[n]) begin
          flit_t f;
          f = ej_flit[n];
          if (!ein[n]) begin
            int g, t, k;
            etag[n] = f.data[31:16];
            g = int'(etag[n][15:14]); t = int'(etag[n][13:11]); k = int'(etag[n][10:0]);
            check(f.data[15:0] == 16'h0 && g < G && t < T && k < ITER &&
                  node_of[g][t] == n, "packet reaches its task's node");
            ein[n] = 1; eidx[n] = 1;
          end else begin
            check(f.data == {etag[n], 16'(eidx[n])}, "payload intact");
            eidx[n]++;
          end
          if (f.last) begin
            int g, t, k;
            g = int'(etag[n][15:14]); t = int'(etag[n][13:11]); k = int'(etag[n][10:0]);
            check(eidx[n] == LEN, "packet length");
            ein[n] = 0;
            if (g < G && t < T && k < ITER) arrived[g][t][k]++;
          end
        end
      end
      // Tasks.
      for (int g = 0; g < G; g++)
        for (int t = 0; t < T; t++)
          for (int k = 0; k < ITER; k++) begin
            if (!started[g][t][k] && (k == 0 || finished[g][t][k-1]) &&
                (npred[t] == 0 ? cyc >= k * PERIOD : arrived[g][t][k] == npred[t])) begin
              started[g][t][k] = 1;
              t_start[g][t][k] = cyc;
            end else if (started[g][t][k] && !finished[g][t][k] &&
                         cyc >= t_start[g][t][k] + EXEC) begin
              finished[g][t][k] = 1;
              for (int s = 0; s < T; s++)
                if (succ[t][s]) begin
                  pkt_t p;
                  p.dst = node_of[g][s];
                  p.tag = {2'(g), 3'(s), 11'(k)};
                  q[node_of[g][t]].push_back(p);
                end
              if (t == T - 1) begin
                int et;
                et = cyc - k * PERIOD;
                check(et >= depth * EXEC, "iteration no faster than its longest chain");
                exec_sum += longint'(et);
                completed++;
                if (completed == G * ITER) done <= 1'b1;
              end
            end
          end
    end
  end
endmodule
