// out_buffer: output buffer of one switch port, a synchronous FIFO in the
// switch clock domain with stall/go flow control towards the next switch.
//
// The crossbar writes a flit with push_i on the rising clk edge; the switch
// only pushes while full_o is low. The oldest flit is presented on
// valid_o/data_o; it leaves on a rising edge when valid_o = 1 and the
// downstream stall_i = 0. A push into an empty buffer is visible at the
// output one cycle later. Push and pop may happen in the same cycle.
// These flops are the first sampling stage of the switch clock domain for
// flits coming from a tightly coupled synchronizer.
//
// Depth follows the reference switch (6-slot output buffers); the circular
// buffer with an occupancy counter is this design's choice. rst is
// asynchronous, active high.
module out_buffer #(
  parameter int unsigned W     = noc_pkg::FLIT_W,
  parameter int unsigned DEPTH = 6
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         push_i,
  input  logic [W-1:0] data_i,
  output logic         full_o,
  output logic         valid_o,
  output logic [W-1:0] data_o,
  input  logic         stall_i
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   cnt;
  logic          push, pop;

  assign full_o  = (cnt == (AW+1)'(DEPTH));
  assign valid_o = (cnt != '0);
  assign data_o  = mem[rp];
  assign push    = push_i & ~full_o;
  assign pop     = valid_o & ~stall_i;

  function automatic logic [AW-1:0] nxt(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else begin
      if (push) wp <= nxt(wp);
      if (pop)  rp <= nxt(rp);
      cnt <= cnt + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= data_i;
  end

endmodule
