// tb_rr_arbiter: self-checking testbench of the round-robin, packet-locking
// output arbiter.
//
// A reference model in the testbench keeps its own priority pointer and lock
// and predicts the grant every cycle. Random request patterns and random
// packet lengths are applied; checks: the grant equals the model's, it is
// one-hot or zero, it never moves while a packet is in progress, and with all
// inputs requesting, single-flit packets are served in strict rotation.
module tb_rr_arbiter;

  localparam int N = 4;

  logic clk = 1'b0, rst = 1'b1;
  logic [N-1:0] req = '0, gnt;
  logic xfer = 1'b0, tail = 1'b0;

  int checks = 0, failures = 0, lock_holds = 0;
  int m_prio = 0, m_owner = 0;
  bit m_locked = 1'b0;
  logic [N-1:0] m_gnt;

  rr_arbiter #(.N(N)) dut (
    .clk, .rst, .req_i(req), .xfer_i(xfer), .tail_i(tail), .gnt_o(gnt)
  );

  always #5 clk = ~clk;

  function automatic logic [N-1:0] model_gnt();
    logic [N-1:0] g = '0;
    if (m_locked) return N'(1) << m_owner;
    for (int k = 0; k < N; k++) begin
      int idx = (m_prio + k) % N;
      if (req[idx]) begin
        g[idx] = 1'b1;
        return g;
      end
    end
    return g;
  endfunction

  task automatic check_and_step();
    int w;
    #1;
    m_gnt = model_gnt();
    checks++;
    if (gnt !== m_gnt || !$onehot0(gnt)) begin
      failures++;
      if (failures <= 20) $display("ERROR: req=%b gnt=%b expected %b", req, gnt, m_gnt);
    end
    // update the model for the coming edge
    w = 0;
    for (int i = 0; i < N; i++) if (m_gnt[i]) w = i;
    if (xfer) begin
      if (tail) begin
        m_locked = 1'b0;
        m_prio   = (w + 1) % N;
      end else if (!m_locked) begin
        m_locked = 1'b1;
        m_owner  = w;
      end else lock_holds++;
    end
    @(posedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    @(posedge clk);

    // strict rotation with all requesting and single-flit packets
    req = '1;
    for (int k = 0; k < 8; k++) begin
      #0.5;
      xfer = 1'b1; tail = 1'b1;
      checks++;
      if (gnt !== N'(1) << (k % N)) begin
        failures++;
        $display("ERROR: rotation step %0d gnt=%b", k, gnt);
      end
      check_and_step();
    end

    // random requests and packets of random length
    for (int c = 0; c < 3000; c++) begin
      #0.5;
      req  = N'($urandom);
      // a locked owner keeps requesting until its tail
      if (m_locked) req[m_owner] = 1'b1;
      #0.1;
      xfer = (|gnt) && ($urandom_range(3) != 0);
      tail = ($urandom_range(3) == 0);
      check_and_step();
    end
    xfer = 1'b0;

    checks++;
    if (lock_holds == 0) begin
      failures++;
      $display("ERROR: lock never held across flits");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
