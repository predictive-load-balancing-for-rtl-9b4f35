// plb_input_buffer: the one-flit buffer at each router input port.
//
// The published router gives every input port room for exactly one flit.
// This buffer holds that flit and keeps a flit per cycle moving through it:
// it accepts a new flit in the same cycle in which the held one leaves, so
// `in_ready` is `!full || out_ready`. That makes `in_ready` combinational in
// `out_ready`, and a blocked worm stalls back along its whole path in the
// cycle the block happens, as wormhole flow control requires.
//
// Interface: valid/ready on both sides; a flit moves when valid and ready
// are both high at a rising clock edge. `out_valid` is high while a flit is
// held, and the flit stays on `out_flit` until taken.
// Timing: a flit written at edge t is visible on `out_flit` from t on;
// no flit passes through combinationally. Reset (active low, synchronous)
// empties the buffer.
// The single-entry capacity is the published one; the same-cycle refill
// and the handshake are this design's choices.
module plb_input_buffer
  import plb_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  flit_t in_flit,
  output logic  in_ready,
  output logic  out_valid,
  output flit_t out_flit,
  input  logic  out_ready
);

  logic  full;
  flit_t data_q;

  assign in_ready  = !full || out_ready;
  assign out_valid = full;
  assign out_flit  = data_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      full   <= 1'b0;
      data_q <= '0;
    end else if (in_valid && in_ready) begin
      full   <= 1'b1;
      data_q <= in_flit;
    end else if (out_ready) begin
      full   <= 1'b0;
    end
  end

endmodule
