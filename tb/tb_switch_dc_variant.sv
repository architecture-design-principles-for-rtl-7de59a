// tb_switch_dc_variant: the all-dual-clock variant of the switch - a
// dual-clock FIFO on every input (DC_PORTS = 4'b1111) and output buffers cut
// down to 2 flits (OUTBUF_DEPTH = 2), so that the 6-slot input FIFOs carry the
// buffering.
//
// The switch runs at 10 ns; the four senders run at unrelated periods of 7.3,
// 13.1, 9.7 and 10.4 ns. Random packets of 1..4 flits to random outputs,
// under light, heavy and no downstream stall. Checks as in the end-to-end
// test: delivery per input/output pair in order, no packet interleaving, head
// route shifted, nothing lost; the FIFO-full stall, the downstream stall, a
// full output buffer, contention and packet locking must each happen.
module tb_switch_dc_variant;

  import noc_pkg::*;

  localparam int N = 4;

  logic clk_sw = 1'b0, rst = 1'b1;
  logic  [N-1:0] in_clk = '0, in_valid = '0, in_stall;
  flit_t [N-1:0] in_flit;
  logic  [N-1:0] out_valid, out_stall = '0;
  flit_t [N-1:0] out_flit;

  gals_switch_top #(.DC_PORTS(4'b1111), .OUTBUF_DEPTH(2)) dut (
    .clk_sw, .rst, .in_clk, .in_valid, .in_flit, .in_stall,
    .out_valid, .out_flit, .out_stall
  );

  int checks = 0, failures = 0;
  bit run = 1'b0;
  int stall_prob = 0;
  int ev_dc_full = 0, ev_down_stall = 0, ev_ob_full = 0,
      ev_contention = 0, ev_lock_wait = 0;
  int sent_pkts [N], recv_flits = 0, sent_flits = 0;

  flit_t exp_q [N][N][$];      // [input][output]
  int    out_src [N];          // input whose packet is in progress at an output
  bit    out_busy [N];

  task automatic fail(input string m);
    failures++;
    if (failures <= 20) $display("ERROR: %s", m);
  endtask

  // clocks
  always #5 clk_sw = ~clk_sw;
  initial forever #3.65 in_clk[0] = ~in_clk[0];
  initial begin #1.1 forever #6.55 in_clk[1] = ~in_clk[1]; end
  initial begin #2.9 forever #4.85 in_clk[2] = ~in_clk[2]; end
  initial begin #0.7 forever #5.2 in_clk[3] = ~in_clk[3]; end

  // per-input packet generators, each in its own clock domain
  for (genvar i = 0; i < N; i++) begin : g_src
    int left = 0;          // flits still to send in the current packet
    int dst  = 0;
    int seq  = 0;
    always @(posedge in_clk[i]) begin
      if (in_valid[i] && !in_stall[i]) begin
        flit_t e;
        e = in_flit[i];
        if (e.head) e.payload = e.payload >> 2;
        exp_q[i][dst].push_back(e);
        sent_flits++;
        if (in_flit[i].tail) sent_pkts[i]++;
      end
      if (in_valid[i] && in_stall[i]) begin
        ev_dc_full++;
      end
      if (!in_valid[i] || !in_stall[i]) begin
        if (left == 0 && !(in_valid[i] && !in_flit[i].tail) && !(run && $urandom_range(99) < 75)) begin
          in_valid[i] <= 1'b0;
        end else begin
          flit_t f;
          if (in_valid[i] && !in_flit[i].tail) begin
            // continue the packet in progress
            f.head = 1'b0;
            left   = left - 1;
            f.tail = (left == 0);
            f.payload = {4'(i), 4'(dst), 8'(left), 16'(seq)};
          end else begin
            // new packet
            dst  = $urandom_range(N - 1);
            left = $urandom_range(3);    // body flits after the head
            seq++;
            f.head = 1'b1;
            f.tail = (left == 0);
            f.payload = {4'(i), 12'($urandom), 14'(seq), 2'(dst)};
          end
          in_valid[i] <= 1'b1;
          in_flit[i]  <= f;
        end
      end
    end
  end

  logic [N-1:0] arb_locked;
  for (genvar o = 0; o < N; o++) begin : g_lk
    assign arb_locked[o] = dut.g_out[o].u_arb.locked;
  end

  // outputs: downstream stall and scoreboard
  always @(posedge clk_sw) begin
    if (!rst) begin
      for (int o = 0; o < N; o++) begin
        if (out_valid[o] && out_stall[o]) ev_down_stall++;
        if (dut.ob_full[o]) ev_ob_full++;
        if (!$onehot0(dut.req[o])) ev_contention++;
        if (arb_locked[o] && (dut.req[o] & ~dut.gnt[o]) != '0) ev_lock_wait++;
        if (out_valid[o] && !out_stall[o]) begin
          int s;
          flit_t f;
          f = out_flit[o];
          recv_flits++;
          checks++;
          s = -1;
          if (out_busy[o]) s = out_src[o];
          else if (f.head) begin
            for (int i = 0; i < N; i++)
              if (exp_q[i][o].size() > 0 && exp_q[i][o][0] == f) s = i;
          end
          if (s < 0) fail($sformatf("out %0d: unexpected flit %h", o, f));
          else if (exp_q[s][o].size() == 0) fail($sformatf("out %0d: flit %h, input %0d sent none", o, f, s));
          else begin
            flit_t e;
            e = exp_q[s][o].pop_front();
            if (e != f) fail($sformatf("out %0d from %0d: got %h expected %h", o, s, f, e));
            out_busy[o] = !f.tail;
            out_src[o]  = s;
          end
        end
        out_stall[o] <= ($urandom_range(99) < stall_prob);
      end
    end
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      sent_pkts[i] = 0; out_busy[i] = 1'b0; out_src[i] = 0;
    end
    repeat (4) @(posedge clk_sw);
    #1.3 rst = 1'b0;
    repeat (4) @(posedge clk_sw);
    run = 1'b1;
    stall_prob = 10;
    repeat (1500) @(posedge clk_sw);
    stall_prob = 70;
    repeat (1500) @(posedge clk_sw);
    stall_prob = 0;
    repeat (1500) @(posedge clk_sw);
    run = 1'b0;
    repeat (200) @(posedge clk_sw);

    for (int i = 0; i < N; i++)
      for (int o = 0; o < N; o++) begin
        checks++;
        if (exp_q[i][o].size() != 0) fail($sformatf("%0d flits from %0d to %0d lost", exp_q[i][o].size(), i, o));
      end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (sent_pkts[i] < 100) fail($sformatf("input %0d sent only %0d packets", i, sent_pkts[i]));
    end
    checks++; if (ev_dc_full    == 0) fail("dual-clock FIFO never full");
    checks++; if (ev_down_stall == 0) fail("downstream stall never happened");
    checks++; if (ev_ob_full    == 0) fail("output buffer never full");
    checks++; if (ev_contention == 0) fail("no output contention");
    checks++; if (ev_lock_wait  == 0) fail("no packet lock with a waiting input");
    $display("flits sent=%0d received=%0d", sent_flits, recv_flits);
    $display("events: dc_full=%0d down_stall=%0d ob_full=%0d contention=%0d lock_wait=%0d",
             ev_dc_full, ev_down_stall, ev_ob_full, ev_contention, ev_lock_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
