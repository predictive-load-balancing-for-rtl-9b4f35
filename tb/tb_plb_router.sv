// tb_plb_router: self-checking test of one router (even column).
//  1. Timing: a lone 20-flit packet from the local port to the east: the
//     header leaves one cycle after it is buffered (one routing cycle), the
//     payload follows at one flit per cycle, the header address is stepped.
//  2. Tie: with equal history a packet that may go north or east goes north.
//  3. Prediction: the north output is held blocked while a packet is bound
//     to it, raising its history; a later packet that may go north or east
//     must then take the east output.
//  4. Random traffic on all five inputs with random downstream stalls:
//     every packet leaves whole, in order, unmixed, on a minimal direction
//     (or the local port when it has arrived), with its header stepped.
`timescale 1ns/1ps
module tb_plb_router;
  import plb_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  [NPORTS-1:0] in_valid, in_ready, out_valid, out_ready;
  flit_t [NPORTS-1:0] in_flit, out_flit;
  int    checks = 0, failures = 0;
  int    cyc = 0;

  plb_router dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // ---------------- sources ----------------
  flit_t q [NPORTS][$];
  logic  rand_valid = 0;
  int    sent_pk [NPORTS];
  int    recv_pk [NPORTS];

  // Packet: header tag {port, seq}; payload word = {port, seq, index}.
  task automatic push_packet(int p, int seq, int dx, int dy, int len);
    q[p].push_back(make_header(offset_t'(dx), offset_t'(dy),
                               16'({4'(p), 12'(seq)}), len == 1));
    for (int k = 1; k < len; k++)
      q[p].push_back(flit_t'({(k == len - 1), 8'(p), 12'(seq), 12'(k)}));
    sent_pk[p]++;
  endtask

  always @(negedge clk) begin
    for (int p = 0; p < NPORTS; p++) begin
      in_valid[p] <= (q[p].size() > 0) && (!rand_valid || $urandom_range(0, 3) != 0);
      in_flit[p]  <= (q[p].size() > 0) ? q[p][0] : '0;
    end
  end
  int accept_cycle = -1;
  always @(posedge clk) begin
    for (int p = 0; p < NPORTS; p++)
      if (in_valid[p] && in_ready[p]) begin
        if (p == DIR_L && accept_cycle < 0) accept_cycle = cyc;
        void'(q[p].pop_front());
      end
  end

  // ---------------- sinks and monitor ----------------
  logic [NPORTS-1:0] ready_mask = '1;
  logic              rand_ready = 0;
  always @(negedge clk) begin
    for (int o = 0; o < NPORTS; o++)
      out_ready[o] <= ready_mask[o] && (!rand_ready || $urandom_range(0, 2) != 0);
  end

  logic  in_pkt [NPORTS];
  int    cur_src [NPORTS];
  int    cur_seq [NPORTS];
  int    cur_idx [NPORTS];
  int    last_hdr_out [NPORTS];
  int    last_hdr_cycle;
  int    last_flit_cycle;

  always @(posedge clk) begin
    if (rst_n) begin
      for (int o = 0; o < NPORTS; o++) begin
        if (out_valid[o] && out_ready[o]) begin
          flit_t f;
          f = out_flit[o];
          last_flit_cycle = cyc;
          if (!in_pkt[o]) begin
            int dx, dy, pdx, pdy;
            // Header: undo the step and check the direction was minimal.
            dx = int'(offset_t'(f.data[7:0]));
            dy = int'(offset_t'(f.data[15:8]));
            pdx = dx + ((o == DIR_E) ? 1 : (o == DIR_W) ? -1 : 0);
            pdy = dy + ((o == DIR_N) ? 1 : (o == DIR_S) ? -1 : 0);
            case (o)
              DIR_N: check(pdy > 0, "north is minimal");
              DIR_S: check(pdy < 0, "south is minimal");
              DIR_E: check(pdx > 0, "east is minimal");
              DIR_W: check(pdx < 0, "west is minimal");
              default: check(pdx == 0 && pdy == 0, "ejected at destination");
            endcase
            cur_src[o] = int'(f.data[31:28]);
            cur_seq[o] = int'(f.data[27:16]);
            cur_idx[o] = 1;
            last_hdr_out[cur_src[o]] = o;
            last_hdr_cycle = cyc;
            in_pkt[o] = !f.last;
            if (f.last) recv_pk[cur_src[o]]++;
          end else begin
            check(f.data == {8'(cur_src[o]), 12'(cur_seq[o]), 12'(cur_idx[o])},
                  "payload order and content");
            cur_idx[o]++;
            if (f.last) begin
              in_pkt[o] = 0;
              recv_pk[cur_src[o]]++;
            end
          end
        end
      end
    end
  end

  task automatic wait_idle();
    int guard;
    guard = 0;
    while ((q[0].size() + q[1].size() + q[2].size() + q[3].size() + q[4].size() > 0 ||
            (|out_valid) || (|dut.out_bound)) && guard < 20000) begin
      @(posedge clk);
      guard++;
    end
    repeat (3) @(posedge clk);
  endtask

  int seq = 0;
  int t_push;

  initial begin
    for (int p = 0; p < NPORTS; p++) begin
      sent_pk[p] = 0; recv_pk[p] = 0; in_pkt[p] = 0; last_hdr_out[p] = -1;
    end
    in_valid = '0; in_flit = '0; out_ready = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // 1. Timing of a lone packet.
    @(negedge clk);
    push_packet(DIR_L, seq++, 2, 0, 20);
    wait_idle();
    t_push = accept_cycle;  // edge at which the header entered the buffer
    check(last_hdr_out[DIR_L] == DIR_E, "lone packet goes east");
    // Buffered at edge t, routed in the cycle after it, then crosses to the
    // next stage at edge t+2.
    check(last_hdr_cycle == t_push + 2, "header leaves after one routing cycle");
    check(last_flit_cycle == last_hdr_cycle + 19, "payload at one flit per cycle");

    // 2. Tie on fresh history: north or east, north is taken.
    @(negedge clk);
    push_packet(DIR_L, seq++, 2, 2, 4);
    wait_idle();
    check(last_hdr_out[DIR_L] == DIR_N, "tie prefers north");

    // 3. Build up north history with a stalled packet, then choose east.
    @(negedge clk);
    ready_mask[DIR_N] = 0;
    push_packet(DIR_L, seq++, 0, 3, 20);
    repeat (40) @(posedge clk);
    check(dut.hist[DIR_N] > dut.hist[DIR_E], "north history raised by blocks");
    @(negedge clk);
    ready_mask[DIR_N] = 1;
    wait_idle();
    check(dut.hist[DIR_N] > dut.hist[DIR_E], "north history still higher");
    @(negedge clk);
    push_packet(DIR_L, seq++, 2, 2, 4);
    wait_idle();
    check(last_hdr_out[DIR_L] == DIR_E, "history steers to east");

    // 4. Random traffic on all inputs.
    rand_valid = 1;
    rand_ready = 1;
    for (int n = 0; n < 400; n++) begin
      int p, dx, dy;
      @(negedge clk);
      p = $urandom_range(0, NPORTS - 1);
      if (q[p].size() > 40) continue;
      dx = $urandom_range(0, 6) - 3;
      dy = $urandom_range(0, 6) - 3;
      case (p)
        DIR_W: begin   // travelling east
          dx = $urandom_range(0, 3);
          if (dx == 0) dy = 0;
        end
        DIR_E: dx = -$urandom_range(0, 3);
        DIR_N: dy = -$urandom_range(0, 3);
        DIR_S: dy = $urandom_range(0, 3);
        default: if (dx == 0 && dy == 0) dx = 1;
      endcase
      push_packet(p, seq++, dx, dy, $urandom_range(1, 20));
    end
    wait_idle();
    for (int p = 0; p < NPORTS; p++)
      check(sent_pk[p] == recv_pk[p], "every packet delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
