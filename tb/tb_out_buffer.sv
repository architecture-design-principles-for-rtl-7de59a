// tb_out_buffer: self-checking testbench of the switch output buffer.
//
// Checks: it holds exactly DEPTH (6) flits before full_o rises; a flit pushed
// into an empty buffer appears one cycle later; under random push and
// downstream stall all flits leave in order and none is lost or duplicated;
// with no stall it drains one flit per cycle.
module tb_out_buffer;

  localparam int W = 34;
  localparam int DEPTH = 6;

  logic clk = 1'b0, rst = 1'b1;
  logic push = 1'b0, full, valid, stall = 1'b1;
  logic [W-1:0] din = '0, dout;
  logic [W-1:0] q[$];
  logic [W-1:0] exp_d;
  int checks = 0, failures = 0, full_hits = 0, n;

  out_buffer #(.W(W), .DEPTH(DEPTH)) dut (
    .clk, .rst, .push_i(push), .data_i(din), .full_o(full),
    .valid_o(valid), .data_o(dout), .stall_i(stall)
  );

  always #5 clk = ~clk;

  task automatic fail(input string m);
    failures++;
    if (failures <= 20) $display("ERROR: %s", m);
  endtask

  // scoreboard on the clock edge
  always @(posedge clk) begin
    if (!rst) begin
      if (push && !full) q.push_back(din);
      if (push && full) full_hits++;
      if (valid && !stall) begin
        checks++;
        if (q.size() == 0) fail("output with nothing pushed");
        else begin
          exp_d = q.pop_front();
          if (dout !== exp_d) fail($sformatf("out %h expected %h", dout, exp_d));
        end
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;

    // latency of one flit: visible the cycle after the push
    @(posedge clk); #1;
    push = 1'b1; din = 34'h1_2345_6789;
    @(posedge clk); #1;
    push = 1'b0;
    checks++;
    if (!valid || dout !== 34'h1_2345_6789) fail("pushed flit not visible after one cycle");
    stall = 1'b0;
    @(posedge clk); #1;
    stall = 1'b1;

    // capacity
    n = 0;
    for (int k = 0; k < 10; k++) begin
      push = 1'b1; din = {$urandom, 2'($urandom)};
      if (!full) n++;
      @(posedge clk); #1;
    end
    push = 1'b0;
    checks++;
    if (n != DEPTH || !full) fail($sformatf("capacity %0d", n));

    // full-rate drain
    stall = 1'b0;
    n = 0;
    while (valid) begin
      n++;
      @(posedge clk); #1;
    end
    checks++;
    if (n != DEPTH) fail($sformatf("drain took %0d cycles", n));

    // random traffic
    for (int c = 0; c < 4000; c++) begin
      push  = ($urandom_range(99) < 60);
      din   = {$urandom, 2'($urandom)};
      stall = ($urandom_range(99) < 45);
      @(posedge clk); #1;
    end
    push = 1'b0; stall = 1'b0;
    repeat (10) @(posedge clk);
    #1;
    checks++;
    if (q.size() != 0 || valid) fail("flits left over");
    checks++;
    if (full_hits == 0) fail("buffer never filled under random traffic");
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
