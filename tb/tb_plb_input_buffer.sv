// tb_plb_input_buffer: self-checking test of the one-flit input buffer.
// Random valid/ready traffic is compared with a one-entry reference queue:
// order and contents of the flits, the ready rule (free, or emptying this
// cycle), and a full-rate run in which 20 flits pass in 20 cycles.
`timescale 1ns/1ps
module tb_plb_input_buffer;
  import plb_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  in_valid, in_ready, out_valid, out_ready;
  flit_t in_flit, out_flit;
  int    checks = 0, failures = 0;

  plb_input_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic  ref_full;
  flit_t ref_data;
  int    moved;

  initial begin
    in_valid = 0; out_ready = 0; in_flit = '0;
    ref_full = 0; ref_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Random traffic.
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      in_valid  = ($urandom_range(0, 2) != 0);
      out_ready = ($urandom_range(0, 2) != 0);
      in_flit   = flit_t'({$urandom_range(0, 1), $urandom()});
      #1;
      check(out_valid == ref_full, "out_valid");
      if (ref_full) check(out_flit == ref_data, "out_flit");
      check(in_ready == (!ref_full || out_ready), "in_ready rule");
      @(posedge clk);
      if (in_valid && (!ref_full || out_ready)) begin
        ref_full = 1; ref_data = in_flit;
      end else if (out_ready) begin
        ref_full = 0;
      end
    end
    // Full rate: 20 flits in, one per cycle, drained every cycle.
    @(negedge clk);
    in_valid = 0; out_ready = 1;
    @(negedge clk);
    moved = 0;
    for (int c = 0; c < 21; c++) begin
      in_valid = (c < 20);
      in_flit  = flit_t'({(c == 19), 32'(c)});
      out_ready = 1;
      #1;
      if (c > 0) begin
        check(out_valid && out_flit.data == 32'(c - 1), "full-rate flit");
        moved++;
      end
      if (c < 20) check(in_ready, "full-rate ready");
      @(negedge clk);
    end
    check(moved == 20, "20 flits in 21 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
