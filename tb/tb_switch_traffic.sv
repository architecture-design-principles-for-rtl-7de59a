// tb_switch_traffic: the three traffic patterns used to compare switch
// power - idle, random and parallel - run on the 4-port GALS switch at its
// default parameters.
//
// Clocks as in the end-to-end test: switch 10 ns, mesochronous ports 1..3 at
// 10 ns with phase offsets, IP-core port 0 at 7.3 ns. No downstream stall.
//   idle:     no input sends; no output may become valid.
//   random:   every input sends packets of 1..4 flits to random outputs at
//             about 50% load; all flits must arrive in order.
//   parallel: input i streams back-to-back 4-flit packets to output
//             (i+1) mod 4, a permutation without conflicts; every output
//             must carry at least 95% of one flit per switch cycle.
module tb_switch_traffic;

  import noc_pkg::*;

  localparam int N = 4;

  logic clk_sw = 1'b0, rst = 1'b1;
  logic  [N-1:0] in_clk = '0, in_valid = '0, in_stall;
  flit_t [N-1:0] in_flit;
  logic  [N-1:0] out_valid;
  flit_t [N-1:0] out_flit;

  gals_switch_top dut (
    .clk_sw, .rst, .in_clk, .in_valid, .in_flit, .in_stall,
    .out_valid, .out_flit, .out_stall('0)
  );

  typedef enum logic [1:0] {IDLE, RANDOM, PARALLEL} mode_e;
  mode_e mode = IDLE;
  bit    run  = 1'b0;
  int checks = 0, failures = 0;
  int out_cnt [N];
  int spurious = 0;
  flit_t exp_q [N][N][$];
  int    out_src [N];
  bit    out_busy [N];

  task automatic fail(input string m);
    failures++;
    if (failures <= 20) $display("ERROR: %s", m);
  endtask

  always #5 clk_sw = ~clk_sw;
  initial forever #3.65 in_clk[0] = ~in_clk[0];
  initial begin #2.3 forever #5 in_clk[1] = ~in_clk[1]; end
  initial begin #5.7 forever #5 in_clk[2] = ~in_clk[2]; end
  initial begin #8.1 forever #5 in_clk[3] = ~in_clk[3]; end

  for (genvar i = 0; i < N; i++) begin : g_src
    int left = 0, dst = 0, seq = 0;
    always @(posedge in_clk[i]) begin
      if (in_valid[i] && !in_stall[i]) begin
        flit_t e;
        e = in_flit[i];
        if (e.head) e.payload = e.payload >> 2;
        exp_q[i][dst].push_back(e);
      end
      if (!in_valid[i] || !in_stall[i]) begin
        if (in_valid[i] && !in_flit[i].tail) begin
          flit_t f;
          left   = left - 1;
          f.head = 1'b0;
          f.tail = (left == 0);
          f.payload = {4'(i), 4'(dst), 8'(left), 16'(seq)};
          in_valid[i] <= 1'b1;
          in_flit[i]  <= f;
        end else if (run && (mode == PARALLEL || (mode == RANDOM && $urandom_range(99) < 50))) begin
          flit_t f;
          dst  = (mode == PARALLEL) ? (i + 1) % N : $urandom_range(N - 1);
          left = (mode == PARALLEL) ? 3 : $urandom_range(3);
          seq++;
          f.head = 1'b1;
          f.tail = (left == 0);
          f.payload = {4'(i), 12'($urandom), 14'(seq), 2'(dst)};
          in_valid[i] <= 1'b1;
          in_flit[i]  <= f;
        end else begin
          in_valid[i] <= 1'b0;
        end
      end
    end
  end

  always @(posedge clk_sw) begin
    if (!rst) begin
      for (int o = 0; o < N; o++) begin
        if (out_valid[o]) begin
          int s;
          flit_t f;
          f = out_flit[o];
          out_cnt[o]++;
          if (mode == IDLE) spurious++;
          checks++;
          s = -1;
          if (out_busy[o]) s = out_src[o];
          else if (f.head) begin
            for (int i = 0; i < N; i++)
              if (exp_q[i][o].size() > 0 && exp_q[i][o][0] == f) s = i;
          end
          if (s < 0 || exp_q[s][o].size() == 0) fail($sformatf("out %0d: unexpected flit %h", o, f));
          else begin
            flit_t e;
            e = exp_q[s][o].pop_front();
            if (e != f) fail($sformatf("out %0d from %0d: got %h expected %h", o, s, f, e));
            out_busy[o] = !f.tail;
            out_src[o]  = s;
          end
        end
      end
    end
  end

  task automatic settle();
    run = 1'b0;
    repeat (100) @(posedge clk_sw);
    for (int i = 0; i < N; i++)
      for (int o = 0; o < N; o++) begin
        checks++;
        if (exp_q[i][o].size() != 0) fail($sformatf("%0d flits from %0d to %0d lost", exp_q[i][o].size(), i, o));
      end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      out_cnt[i] = 0; out_busy[i] = 1'b0; out_src[i] = 0;
    end
    repeat (4) @(posedge clk_sw);
    #1.3 rst = 1'b0;

    // idle
    mode = IDLE;
    repeat (500) @(posedge clk_sw);
    checks++;
    if (spurious != 0) fail("output valid while idle");

    // random
    mode = RANDOM; run = 1'b1;
    repeat (2000) @(posedge clk_sw);
    settle();

    // parallel: measure over a window in steady state
    mode = PARALLEL; run = 1'b1;
    repeat (100) @(posedge clk_sw);
    for (int o = 0; o < N; o++) out_cnt[o] = 0;
    repeat (1000) @(posedge clk_sw);
    for (int o = 0; o < N; o++) begin
      checks++;
      if (out_cnt[o] < 950) fail($sformatf("parallel: output %0d carried %0d flits in 1000 cycles", o, out_cnt[o]));
      $display("parallel: output %0d carried %0d flits in 1000 cycles", o, out_cnt[o]);
    end
    settle();
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
