// dc_fifo: tightly coupled dual-clock FIFO that doubles as the input buffer of
// a switch port facing an IP core (a link between unrelated clocks).
//
// Structure: DEPTH flip-flop slots written in the clk_tx domain and read
// through a DEPTH-to-1 mux in the clk_rx domain. Where to write and where to
// read is held by two token-ring counters (one-hot rings): the write token
// advances on clk_tx when a flit is enqueued, the read token advances on
// clk_rx when a flit is dequeued. The two interfaces share nothing but the
// slots and the two status detectors.
//
// Full and empty are found by comparing the two tokens asynchronously:
//   empty_tmp = the read token sits on the write token,
//   full_tmp  = the write token sits just behind the read token
//               (one slot is kept free, so DEPTH-1 flits fit).
// empty_tmp can only rise because of a read, i.e. in step with clk_rx, and
// only fall because of a write; full_tmp the other way round. Each is
// therefore passed through a two-flop brute-force synchronizer whose flops
// are set asynchronously by the raw signal: assertion reaches the own domain
// at once, deassertion after two edges of the own clock.
//
// Interface, clk_tx side (stall/go): a flit is enqueued on a rising clk_tx
// edge when valid_i = 1 and stall_o = 0. stall_o is the synchronized full flag.
// Interface, clk_rx side: valid_o = not empty; data_o is the flit under the
// read token; pop_i (with valid_o) dequeues it on the rising clk_rx edge.
// Timing: a write into an empty FIFO shows at valid_o after the clk_tx to
// clk_rx offset plus two clk_rx edges; a full FIFO read at full rate delivers
// its last flit DEPTH-2 clk_rx cycles after its first.
// Reset: rst (active high) asynchronously resets both token rings; equal
// tokens then set the empty synchronizer. The full synchronizer is cleared
// synchronously (its asynchronous input is already taken by full_tmp), so rst
// must be held for at least one clk_tx edge; lint notes rst as used both ways.
//
// Follows the reference: flip-flop slots, token-ring write and read pointers,
// asynchronous full/empty detection, brute-force synchronizers, enqueue on
// valid & not full, dequeue on go & not empty, 6 slots when merged into the
// switch. Own choices: one sacrificed slot to tell full from empty, the
// set-on-assert form of the synchronizers, the reset scheme.
//
// The asynchronous set of the synchronizer flops comes from combinational
// logic that mixes both clock domains; this is the intended detector.
module dc_fifo #(
  parameter int unsigned DATA_W = noc_pkg::FLIT_W,
  parameter int unsigned DEPTH  = 6
) (
  input  logic              rst,
  // TX (writer) domain
  input  logic              clk_tx,
  input  logic              valid_i,
  input  logic [DATA_W-1:0] data_i,
  output logic              stall_o,
  // RX (reader) domain
  input  logic              clk_rx,
  output logic              valid_o,
  output logic [DATA_W-1:0] data_o,
  input  logic              pop_i
);

  logic [DEPTH-1:0]  wr_tok, rd_tok;
  logic [DATA_W-1:0] slot [DEPTH];
  logic              push, pop;
  logic              full_tmp, empty_tmp;
  logic [1:0]        full_sync, empty_sync;

  assign push = valid_i & ~stall_o;
  assign pop  = pop_i & valid_o;

  // ---------------- writer ----------------
  always_ff @(posedge clk_tx or posedge rst) begin
    if (rst)       wr_tok <= DEPTH'(1);
    else if (push) wr_tok <= {wr_tok[DEPTH-2:0], wr_tok[DEPTH-1]};
  end

  // slots are only clocked for a valid enqueue
  always_ff @(posedge clk_tx) begin
    for (int i = 0; i < DEPTH; i++) begin
      if (push && wr_tok[i]) slot[i] <= data_i;
    end
  end

  // ---------------- reader ----------------
  always_ff @(posedge clk_rx or posedge rst) begin
    if (rst)      rd_tok <= DEPTH'(1);
    else if (pop) rd_tok <= {rd_tok[DEPTH-2:0], rd_tok[DEPTH-1]};
  end

  always_comb begin
    data_o = '0;
    for (int i = 0; i < DEPTH; i++) begin
      if (rd_tok[i]) data_o = slot[i];
    end
  end

  // ---------------- asynchronous status detectors ----------------
  assign empty_tmp = |(wr_tok & rd_tok);
  assign full_tmp  = |({wr_tok[DEPTH-2:0], wr_tok[DEPTH-1]} & rd_tok);

  // brute-force synchronizers, set at once by the raw flag
  always_ff @(posedge clk_rx or posedge empty_tmp) begin
    if (empty_tmp) empty_sync <= 2'b11;
    else           empty_sync <= {empty_sync[0], 1'b0};
  end

  always_ff @(posedge clk_tx or posedge full_tmp) begin
    if (full_tmp) full_sync <= 2'b11;
    else if (rst) full_sync <= 2'b00;
    else          full_sync <= {full_sync[0], 1'b0};
  end

  assign valid_o = ~empty_sync[1];
  assign stall_o = full_sync[1];

  // ---------------- protocol checks ----------------
  a_no_overflow: assert property (@(posedge clk_tx) disable iff (rst)
    push |-> (({wr_tok[DEPTH-2:0], wr_tok[DEPTH-1]} & rd_tok) == '0))
    else $error("dc_fifo: write into a full FIFO");

  a_no_underflow: assert property (@(posedge clk_rx) disable iff (rst)
    pop |-> ((rd_tok & wr_tok) == '0))
    else $error("dc_fifo: read from an empty FIFO");

endmodule
