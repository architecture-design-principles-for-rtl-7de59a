// tb_gals_switch_top: end-to-end testbench of the 4-port GALS switch at its
// default parameters.
//
// Clocks: the switch runs at 10 ns. Ports 1..3 are mesochronous links: same
// period, phase offsets of 2.3, 5.7 and 8.1 ns. Port 0 is the IP-core link
// with an unrelated 7.3 ns clock and goes through the dual-clock FIFO.
// Each input sends packets of 1..4 flits to random outputs, obeying stall/go
// in its own clock domain. Downstream stalls are random per output and come in
// three traffic phases (light, heavy, none) so that back-pressure reaches the
// synchronizers.
//
// Checks: every flit leaves at the output its route names, in order per
// (input, output) pair, with the head route shifted by two bits; packets are
// never interleaved at an output; nothing is lost or left over. Mechanisms
// counted, each must happen at least once: mesochronous backward stall, full
// dual-clock FIFO, downstream stall, full output buffer, two inputs competing
// for one output, a packet holding its output while another input waits.
module tb_gals_switch_top;

  import noc_pkg::*;

  localparam int N = 4;

  logic clk_sw = 1'b0, rst = 1'b1;
  logic  [N-1:0] in_clk = '0, in_valid = '0, in_stall;
  flit_t [N-1:0] in_flit;
  logic  [N-1:0] out_valid, out_stall = '0;
  flit_t [N-1:0] out_flit;

  gals_switch_top dut (
    .clk_sw, .rst, .in_clk, .in_valid, .in_flit, .in_stall,
    .out_valid, .out_flit, .out_stall
  );

  int checks = 0, failures = 0;
  bit run = 1'b0;
  int stall_prob = 0;
  int ev_meso_stall = 0, ev_dc_full = 0, ev_down_stall = 0, ev_ob_full = 0,
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
  initial begin #2.3 forever #5 in_clk[1] = ~in_clk[1]; end
  initial begin #5.7 forever #5 in_clk[2] = ~in_clk[2]; end
  initial begin #8.1 forever #5 in_clk[3] = ~in_clk[3]; end

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
        if (i == 0) ev_dc_full++;
        else        ev_meso_stall++;
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
    checks++; if (ev_meso_stall == 0) fail("mesochronous stall never happened");
    checks++; if (ev_dc_full    == 0) fail("dual-clock FIFO never full");
    checks++; if (ev_down_stall == 0) fail("downstream stall never happened");
    checks++; if (ev_ob_full    == 0) fail("output buffer never full");
    checks++; if (ev_contention == 0) fail("no output contention");
    checks++; if (ev_lock_wait  == 0) fail("no packet lock with a waiting input");
    $display("flits sent=%0d received=%0d", sent_flits, recv_flits);
    $display("events: meso_stall=%0d dc_full=%0d down_stall=%0d ob_full=%0d contention=%0d lock_wait=%0d",
             ev_meso_stall, ev_dc_full, ev_down_stall, ev_ob_full, ev_contention, ev_lock_wait);
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
