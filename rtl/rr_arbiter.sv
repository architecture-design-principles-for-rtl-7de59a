// rr_arbiter: arbiter of one switch output port, round robin with wormhole
// locking.
//
// Every input port whose current packet heads for this output raises its bit
// of req_i. While the output is free the arbiter grants the first requester
// at or after its priority pointer (combinational, gnt_o is one-hot or zero).
// When a granted non-tail flit is transferred (xfer_i) the grant is locked to
// that input until the tail flit of the packet has been transferred, so the
// flits of a packet are never interleaved with another packet. After a tail
// transfer the priority pointer moves to the input after the winner.
//
// Timing: the grant is combinational from req_i and the lock state; lock and
// pointer change on the rising clk edge. rst is asynchronous, active high.
//
// The reference names the arbiter and its delay but not its policy; round
// robin with packet locking is this design's choice.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] req_i,
  input  logic         xfer_i,   // a flit of the granted input passed this cycle
  input  logic         tail_i,   // ... and it was the tail flit
  output logic [N-1:0] gnt_o
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] prio;    // first input to look at
  logic [IW-1:0] owner;   // input holding the lock
  logic          locked;
  logic [N-1:0]  pick;
  logic [IW-1:0] pick_idx;

  // round-robin pick: first requester at or after prio
  always_comb begin
    pick     = '0;
    pick_idx = '0;
    for (int k = N - 1; k >= 0; k--) begin
      logic [IW-1:0] idx;
      idx = IW'((int'(prio) + k) % N);
      if (req_i[idx]) begin
        pick      = '0;
        pick[idx] = 1'b1;
        pick_idx  = idx;
      end
    end
  end

  always_comb begin
    if (locked) gnt_o = N'(1) << owner;
    else        gnt_o = pick;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      prio   <= '0;
      owner  <= '0;
      locked <= 1'b0;
    end else if (xfer_i) begin
      if (tail_i) begin
        locked <= 1'b0;
        prio   <= ((locked ? owner : pick_idx) == IW'(N - 1)) ? '0 : (locked ? owner : pick_idx) + 1'b1;
      end else if (!locked) begin
        locked <= 1'b1;
        owner  <= pick_idx;
      end
    end
  end

endmodule
