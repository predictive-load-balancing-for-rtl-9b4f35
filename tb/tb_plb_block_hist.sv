// tb_plb_block_hist: random raise/lower event counts against a saturating
// reference model; includes long runs of raises and of lowers so that both
// saturation limits are reached.
`timescale 1ns/1ps
module tb_plb_block_hist;
  import plb_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [NPORTS-1:0][EVT_W-1:0]  inc, dec;
  logic [NPORTS-1:0][HIST_W-1:0] hist;
  int   model [NPORTS];
  int   checks = 0, failures = 0, sat_hi = 0, sat_lo = 0;

  plb_block_hist dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    inc = '0; dec = '0;
    foreach (model[p]) model[p] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 6000; c++) begin
      @(negedge clk);
      for (int p = 0; p < NPORTS; p++) begin
        for (int q = 0; q < NPORTS; q++) begin
          checks++;
          if (int'(hist[q]) != model[q]) begin
            failures++;
            $display("FAIL port %0d hist %0d model %0d", q, hist[q], model[q]);
          end
        end
        // Phases: mostly raising, mostly lowering, mixed.
        case ((c / 1000) % 3)
          0: begin inc[p] = 3'($urandom_range(0, 6)); dec[p] = 3'($urandom_range(0, 1)); end
          1: begin inc[p] = 3'($urandom_range(0, 1)); dec[p] = 3'($urandom_range(0, 6)); end
          default: begin inc[p] = 3'($urandom_range(0, 6)); dec[p] = 3'($urandom_range(0, 6)); end
        endcase
      end
      @(posedge clk);
      for (int p = 0; p < NPORTS; p++) begin
        int n;
        n = model[p] + int'(inc[p]) - int'(dec[p]);
        if (n > 255) begin n = 255; sat_hi++; end
        if (n < 0)   begin n = 0;   sat_lo++; end
        model[p] = n;
      end
    end
    checks++;
    if (sat_hi == 0 || sat_lo == 0) begin failures++; $display("FAIL saturation not reached"); end
    $display("saturated high %0d, low %0d", sat_hi, sat_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
