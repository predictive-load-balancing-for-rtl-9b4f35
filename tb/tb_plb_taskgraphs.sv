// tb_plb_taskgraphs: the four task-graph traffic patterns (linear fan-in,
// fan-in, diamond, linear), each on its own 4 x 4 mesh with two six-task
// applications, task time 200 cycles, 20-flit packets and six iterations.
// Each run must complete every iteration with every packet delivered to the
// right task; the mean application execution time of each pattern is
// printed. Sizes are scaled down from the 16 x 16, 32-task, 2000-cycle
// set-up the design was evaluated with, so that all four run in seconds.
`timescale 1ns/1ps
module tb_plb_taskgraphs;
  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   done [4];
  int     ch [4];
  int     fl [4];
  longint es [4];
  int     checks, failures;
  localparam int unsigned ITER = 6;
  localparam int unsigned G = 2;

  always #5 clk = ~clk;

  plb_taskgraph_sim #(.PATTERN(0), .PERIOD(300)) u_linfanin (.clk, .rst_n, .done(done[0]), .checks(ch[0]), .failures(fl[0]), .exec_sum(es[0]));
  plb_taskgraph_sim #(.PATTERN(1), .PERIOD(250)) u_fanin    (.clk, .rst_n, .done(done[1]), .checks(ch[1]), .failures(fl[1]), .exec_sum(es[1]));
  plb_taskgraph_sim #(.PATTERN(2), .PERIOD(250)) u_diamond  (.clk, .rst_n, .done(done[2]), .checks(ch[2]), .failures(fl[2]), .exec_sum(es[2]));
  plb_taskgraph_sim #(.PATTERN(3), .PERIOD(250)) u_linear   (.clk, .rst_n, .done(done[3]), .checks(ch[3]), .failures(fl[3]), .exec_sum(es[3]));

  function automatic void report(logic timed_out);
    string names [4] = '{"linear fan-in", "fan-in", "diamond", "linear"};
    checks = 0; failures = timed_out ? 1 : 0;
    for (int p = 0; p < 4; p++) begin
      checks += ch[p] + 1;
      failures += fl[p];
      if (!done[p]) failures++;
      else $display("%-14s mean execution time %0d cycles", names[p], int'(es[p] / (G * ITER)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fork
      begin
        wait (done[0] && done[1] && done[2] && done[3]);
        repeat (2) @(posedge clk);
        report(1'b0);
      end
      begin
        repeat (100000) @(posedge clk);
        $display("watchdog expired");
        report(1'b1);
      end
    join_any
    $finish;
  end
endmodule
