// tb_dc_fifo: self-checking testbench of the tightly coupled dual-clock FIFO
// (6 slots, 5 usable).
//
// Runs with three clock ratios (writer faster, slower, and slightly off the
// reader clock). For each ratio:
//   1. capacity: with the reader stopped, exactly DEPTH-1 flits are accepted
//      before stall rises;
//   2. full-rate drain: the stored flits leave on consecutive reader cycles,
//      so the last one follows the first by DEPTH-2 cycles;
//   3. empty deassertion: a single flit written into an empty FIFO appears at
//      valid_o right after the second clk_rx edge following the write;
//   4. random traffic on both sides, all flits checked in order.
module tb_dc_fifo;

  localparam int unsigned W = 34;
  localparam int unsigned DEPTH = 6;

  logic clk_tx = 1'b0, clk_rx = 1'b0, rst = 1'b1;
  logic valid_i = 1'b0, stall_o, valid_o, pop_i = 1'b0;
  logic [W-1:0] data_i = '0, data_o;

  int checks = 0, failures = 0;
  int sent = 0, recvd = 0, full_hits = 0;
  realtime tx_half = 3.5, rx_half = 5.0;
  int tx_prob = 0, rx_prob = 0;
  int rx_cycle = 0;
  int read_cycles[$];
  logic [W-1:0] q[$];
  logic [W-1:0] exp_d;

  dc_fifo #(.DATA_W(W), .DEPTH(DEPTH)) dut (
    .rst, .clk_tx, .valid_i, .data_i, .stall_o,
    .clk_rx, .valid_o, .data_o, .pop_i
  );

  initial forever #(tx_half) clk_tx = ~clk_tx;
  initial forever #(rx_half) clk_rx = ~clk_rx;

  task automatic fail(input string msg);
    failures++;
    if (failures <= 20) $display("ERROR: %s", msg);
  endtask

  // sender: stall/go, random or forced
  always @(posedge clk_tx) begin
    if (valid_i && !stall_o) begin
      q.push_back(data_i);
      sent++;
    end
    if (valid_i && stall_o) full_hits++;
    if (!valid_i || !stall_o) begin
      if ($urandom_range(99) < tx_prob) begin
        valid_i <= 1'b1;
        data_i  <= {$urandom, 2'($urandom)};
      end else begin
        valid_i <= 1'b0;
      end
    end
  end

  // receiver
  always @(posedge clk_rx) begin
    rx_cycle++;
    if (valid_o && pop_i) begin
      checks++;
      recvd++;
      read_cycles.push_back(rx_cycle);
      if (q.size() == 0) fail("read with nothing sent");
      else begin
        exp_d = q.pop_front();
        if (data_o !== exp_d) fail($sformatf("read %h expected %h", data_o, exp_d));
      end
    end
    pop_i <= ($urandom_range(99) < rx_prob);
  end

  task automatic do_reset();
    tx_prob = 0; rx_prob = 0;
    repeat (3) @(posedge clk_rx);
    rst = 1'b1;
    repeat (3) @(posedge clk_tx);
    repeat (3) @(posedge clk_rx);
    #0.3 rst = 1'b0;
    q.delete();
    repeat (3) @(posedge clk_rx);
  endtask

  task automatic one_ratio(input realtime txh, input realtime rxh);
    int n0, r0, rc;
    tx_half = txh; rx_half = rxh;
    do_reset();

    // 1. capacity
    n0 = sent;
    tx_prob = 100;
    repeat (30) @(posedge clk_tx);
    tx_prob = 0;
    repeat (3) @(posedge clk_tx);
    checks++;
    if (sent - n0 != DEPTH - 1) fail($sformatf("accepted %0d flits before full", sent - n0));
    checks++;
    if (!stall_o) fail("stall low on a full FIFO");

    // 2. full-rate drain
    read_cycles.delete();
    rx_prob = 100;
    repeat (20) @(posedge clk_rx);
    checks++;
    // DEPTH-1 stored flits plus the one the sender held during the stall
    if (read_cycles.size() != DEPTH) fail($sformatf("drained %0d flits", read_cycles.size()));
    else if (read_cycles[DEPTH-2] - read_cycles[0] != DEPTH - 2)
      fail($sformatf("drain took %0d cycles", read_cycles[DEPTH-2] - read_cycles[0]));
    checks++;
    if (valid_o || stall_o) fail("FIFO not empty/free after drain");

    // 3. empty deassertion: one write, count clk_rx edges until valid_o
    rx_prob = 0;
    repeat (4) @(posedge clk_rx);
    for (int k = 0; k < 4; k++) begin
      @(posedge clk_tx);
      #0.1;
      valid_i = 1'b1;
      data_i  = {$urandom, 2'($urandom)};
      @(posedge clk_tx);           // flit written here
      #0.1;
      valid_i = 1'b0;
      rc = 0;
      while (!valid_o && rc < 10) begin
        @(posedge clk_rx);
        #0.05;
        rc++;
      end
      checks++;
      if (rc != 2) fail($sformatf("empty deasserted after %0d clk_rx edges", rc));
      rx_prob = 100;
      repeat (3) @(posedge clk_rx);
      rx_prob = 0;
      repeat (3) @(posedge clk_rx);
      #((k + 1) * 1.7);            // vary the offset between the clocks
    end

    // 4. random traffic
    r0 = recvd;
    tx_prob = 70; rx_prob = 50;
    repeat (500) @(posedge clk_rx);
    tx_prob = 40; rx_prob = 90;
    repeat (500) @(posedge clk_rx);
    tx_prob = 0; rx_prob = 100;
    repeat (30) @(posedge clk_rx);
    checks++;
    if (q.size() != 0) fail($sformatf("%0d flits stuck", q.size()));
    checks++;
    if (recvd - r0 < 100) fail("too little random traffic");
  endtask

  initial begin
    one_ratio(3.5, 5.0);   // writer faster
    one_ratio(7.3, 5.0);   // writer slower
    one_ratio(5.1, 5.0);   // almost equal
    checks++;
    if (full_hits == 0) fail("full never reached under random traffic");
    $display("sent=%0d received=%0d full_stall_cycles=%0d", sent, recvd, full_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
