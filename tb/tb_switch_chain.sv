// tb_switch_chain: two switches in a row, joined by a mesochronous link.
//
// Output 1 of switch A drives input 1 of switch B; A's clock is B's strobe on
// that link, and B's clock has the same 10 ns period with a 3.7 ns phase
// offset. B's stall for that link goes back to A's output buffer. Traffic
// enters A on port 0 (IP-core clock 7.3 ns) and ports 2, 3 (mesochronous).
// Packets either leave A directly (outputs 0, 2, 3) or cross the link and
// leave B at a random output, with a two-hop source route.
// Checks: every flit arrives at its final output in order per source, with
// the route shifted once per hop; nothing is lost; the link back-pressure
// (B's stall towards A) happened at least once.
module tb_switch_chain;

  import noc_pkg::*;

  localparam int N = 4;

  logic clk_a = 1'b0, clk_b = 1'b0, clk_ip = 1'b0, rst = 1'b1;
  logic  [N-1:0] a_in_clk, a_in_valid = '0, a_in_stall, a_out_valid, a_out_stall;
  flit_t [N-1:0] a_in_flit, a_out_flit;
  logic  [N-1:0] b_in_clk, b_in_valid, b_in_stall, b_out_valid, b_out_stall = '0;
  flit_t [N-1:0] b_in_flit, b_out_flit;
  logic  [N-1:0] ext_stall = '0;
  logic  [N-1:0] mclk = '0;

  always #5 clk_a = ~clk_a;
  initial begin #3.7 forever #5 clk_b = ~clk_b; end
  initial forever #3.65 clk_ip = ~clk_ip;
  initial begin #2.3 forever #5 mclk[2] = ~mclk[2]; end
  initial begin #8.1 forever #5 mclk[3] = ~mclk[3]; end

  assign a_in_clk = {mclk[3], mclk[2], clk_a, clk_ip};

  // link A.out[1] -> B.in[1]; other B inputs idle
  assign b_in_clk   = {clk_b, clk_b, clk_a, clk_ip};
  assign b_in_valid = {1'b0, 1'b0, a_out_valid[1], 1'b0};
  assign b_in_flit  = {flit_t'('0), flit_t'('0), a_out_flit[1], flit_t'('0)};
  assign a_out_stall = {ext_stall[3], ext_stall[2], b_in_stall[1], ext_stall[0]};

  gals_switch_top u_a (
    .clk_sw(clk_a), .rst, .in_clk(a_in_clk), .in_valid(a_in_valid), .in_flit(a_in_flit),
    .in_stall(a_in_stall), .out_valid(a_out_valid), .out_flit(a_out_flit), .out_stall(a_out_stall)
  );
  gals_switch_top u_b (
    .clk_sw(clk_b), .rst, .in_clk(b_in_clk), .in_valid(b_in_valid), .in_flit(b_in_flit),
    .in_stall(b_in_stall), .out_valid(b_out_valid), .out_flit(b_out_flit), .out_stall(b_out_stall)
  );

  int checks = 0, failures = 0, link_stalls = 0, hop2 = 0;
  bit run = 1'b0;
  // expected flits: [source][final port], final port 0..3 = A out, 4..7 = B out
  flit_t exp_q [N][2*N][$];
  int    out_src [2*N];
  bit    out_busy [2*N];

  task automatic fail(input string m);
    failures++;
    if (failures <= 20) $display("ERROR: %s", m);
  endtask

  for (genvar i = 0; i < N; i++) begin : g_src
    if (i != 1) begin : g_active
      int left = 0, fin = 0, seq = 0;
      always @(posedge a_in_clk[i]) begin
        if (a_in_valid[i] && !a_in_stall[i]) begin
          flit_t e;
          e = a_in_flit[i];
          if (e.head) e.payload = e.payload >> ((fin >= N) ? 4 : 2);
          exp_q[i][fin].push_back(e);
        end
        if (!a_in_valid[i] || !a_in_stall[i]) begin
          flit_t f;
          if (a_in_valid[i] && !a_in_flit[i].tail) begin
            left   = left - 1;
            f.head = 1'b0;
            f.tail = (left == 0);
            f.payload = {4'(i), 4'(fin), 8'(left), 16'(seq)};
            a_in_valid[i] <= 1'b1;
            a_in_flit[i]  <= f;
          end else if (run && $urandom_range(99) < 60) begin
            int a_out;
            fin  = $urandom_range(2 * N - 1);
            if (fin < N && fin == 1) fin = 0;     // output 1 of A is the link
            left = $urandom_range(3);
            seq++;
            f.head = 1'b1;
            f.tail = (left == 0);
            a_out  = (fin >= N) ? 1 : fin;
            f.payload = {4'(i), 10'($urandom), 14'(seq), 2'(fin - ((fin >= N) ? N : 0)), 2'(a_out)};
            if (fin < N) f.payload[3:2] = 2'($urandom);
            a_in_valid[i] <= 1'b1;
            a_in_flit[i]  <= f;
          end else begin
            a_in_valid[i] <= 1'b0;
          end
        end
      end
    end
  end

  task automatic take(input int p, input flit_t f);
    int s;
    checks++;
    s = -1;
    if (out_busy[p]) s = out_src[p];
    else if (f.head) begin
      for (int i = 0; i < N; i++)
        if (exp_q[i][p].size() > 0 && exp_q[i][p][0] == f) s = i;
    end
    if (s < 0 || exp_q[s][p].size() == 0) fail($sformatf("port %0d: unexpected flit %h", p, f));
    else begin
      flit_t e;
      e = exp_q[s][p].pop_front();
      if (e != f) fail($sformatf("port %0d from %0d: got %h expected %h", p, s, f, e));
      out_busy[p] = !f.tail;
      out_src[p]  = s;
      if (p >= N) hop2++;
    end
  endtask

  always @(posedge clk_a) begin
    if (!rst) begin
      for (int o = 0; o < N; o++)
        if (o != 1 && a_out_valid[o] && !ext_stall[o]) take(o, a_out_flit[o]);
      if (a_out_valid[1] && b_in_stall[1]) link_stalls++;
      ext_stall <= N'($urandom) & N'($urandom);
    end
  end

  always @(posedge clk_b) begin
    if (!rst) begin
      for (int o = 0; o < N; o++)
        if (b_out_valid[o] && !b_out_stall[o]) take(N + o, b_out_flit[o]);
      b_out_stall <= run ? (N'($urandom) & N'($urandom) & N'($urandom)) | N'($urandom) & 4'b0011 : '0;
    end
  end

  initial begin
    for (int p = 0; p < 2 * N; p++) begin
      out_busy[p] = 1'b0; out_src[p] = 0;
    end
    repeat (4) @(posedge clk_a);
    #1.3 rst = 1'b0;
    repeat (4) @(posedge clk_a);
    run = 1'b1;
    repeat (3000) @(posedge clk_a);
    run = 1'b0;
    repeat (300) @(posedge clk_a);
    for (int i = 0; i < N; i++)
      for (int p = 0; p < 2 * N; p++) begin
        checks++;
        if (exp_q[i][p].size() != 0) fail($sformatf("%0d flits from %0d to port %0d lost", exp_q[i][p].size(), i, p));
      end
    checks++;
    if (link_stalls == 0) fail("link back-pressure never happened");
    checks++;
    if (hop2 < 500) fail($sformatf("only %0d flits crossed two switches", hop2));
    $display("two-hop flits=%0d link_stall_cycles=%0d", hop2, link_stalls);
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
