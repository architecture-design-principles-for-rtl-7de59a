// tb_meso_sync: self-checking testbench of the tightly coupled mesochronous
// synchronizer.
//
// clk_tx and clk_rx have the same 10 ns period. The test runs several rounds,
// each with a different phase offset of clk_tx against clk_rx (0 .. 9.3 ns),
// and in each round:
//   1. streams flits at full rate with the reader always ready and checks that
//      the link sustains one flit per cycle (no stall, at most 2 bubbles);
//   2. sends random traffic against a reader that is often not ready, so the
//      latch banks fill and the backward stall is exercised.
// Every flit read is compared in order with a queue of the flits the sender
// transferred (valid & ~stall); a lost, duplicated or reordered flit fails.
module tb_meso_sync;

  localparam int unsigned W = 34;

  logic clk_tx = 1'b0, clk_rx = 1'b0, rst = 1'b1;
  logic valid_i = 1'b0, stall_o, valid_o, pop_i = 1'b0;
  logic [W-1:0] data_i = '0, data_o;

  int checks = 0, failures = 0;
  int stalls = 0, sent = 0, recvd = 0;
  int tx_prob = 100, rx_prob = 100;   // percent
  bit run = 1'b0;
  realtime shift = 0.0;
  bit shift_req = 1'b0;
  logic [W-1:0] q[$];
  logic [W-1:0] exp_d;

  meso_sync #(.DATA_W(W), .NSLOTS(3)) dut (
    .clk_tx, .valid_i, .data_i, .stall_o,
    .clk_rx, .rst_rx(rst), .valid_o, .data_o, .pop_i
  );

  always #5 clk_rx = ~clk_rx;
  initial forever begin
    if (shift_req) begin
      #(shift);
      shift_req = 1'b0;
    end
    #5 clk_tx = ~clk_tx;
  end

  // the bank opens on the falling clk_tx edge: the flit is visible from then
  always @(negedge clk_tx) begin
    if (valid_i && !stall_o) begin
      q.push_back(data_i);
      sent++;
    end
  end

  // sender: stall/go
  always @(posedge clk_tx) begin
    if (valid_i && stall_o) stalls++;
    if (valid_i && !stall_o || !valid_i) begin
      if (run && ($urandom_range(99) < tx_prob)) begin
        valid_i <= 1'b1;
        data_i  <= {$urandom, 2'($urandom)};
      end else begin
        valid_i <= 1'b0;
      end
    end
  end

  // receiver
  always @(posedge clk_rx) begin
    if (valid_o && pop_i) begin
      checks++;
      recvd++;
      if (q.size() == 0) begin
        failures++;
        if (failures <= 20) $display("ERROR: flit %h read but none sent", data_o);
      end else begin
        exp_d = q.pop_front();
        if (data_o !== exp_d) begin
          failures++;
          if (failures <= 20) $display("ERROR: read %h expected %h", data_o, exp_d);
        end
      end
    end
    pop_i <= ($urandom_range(99) < rx_prob);
  end

  task automatic do_reset();
    run = 1'b0;
    repeat (4) @(posedge clk_rx);
    rst = 1'b1;
    #2.5;
    @(negedge clk_rx);
    #1.1;
    rst = 1'b0;
    q.delete();
    repeat (2) @(posedge clk_rx);
  endtask

  task automatic drain();
    run = 1'b0;
    rx_prob = 100;
    repeat (20) @(posedge clk_rx);
    checks++;
    if (q.size() != 0 || valid_o) begin
      failures++;
      $display("ERROR: %0d flits never came out", q.size());
    end
  endtask

  realtime phases[6] = '{0.0, 1.3, 2.9, 4.9, 6.7, 9.3};

  initial begin
    for (int p = 0; p < 6; p++) begin
      // move clk_tx to the requested phase relative to its previous one
      shift = (p == 0) ? phases[0] : phases[p] - phases[p-1];
      shift_req = (shift > 0.0);
      rst = 1'b1;
      repeat (3) @(posedge clk_rx);
      do_reset();

      // 1. full rate
      tx_prob = 100; rx_prob = 100;
      @(posedge clk_tx);
      run = 1'b1;
      repeat (10) @(posedge clk_tx);
      begin
        int s0, st0;
        s0 = sent; st0 = stalls;
        repeat (100) @(posedge clk_tx);
        checks++;
        if (sent - s0 < 98 || stalls != st0) begin
          failures++;
          $display("ERROR: phase %0.1f: %0d flits in 100 cycles, %0d stalls",
                   phases[p], sent - s0, stalls - st0);
        end
      end
      drain();

      // 2. random traffic, slow reader
      tx_prob = 80; rx_prob = 30;
      run = 1'b1;
      repeat (400) @(posedge clk_tx);
      tx_prob = 60; rx_prob = 70;
      repeat (400) @(posedge clk_tx);
      drain();
    end
    checks++;
    if (stalls == 0) begin
      failures++;
      $display("ERROR: backward stall never asserted");
    end
    $display("sent=%0d received=%0d stall_cycles=%0d", sent, recvd, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
