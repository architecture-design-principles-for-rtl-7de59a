// meso_sync: tightly coupled mesochronous synchronizer that doubles as the
// input buffer of a switch port.
//
// The upstream switch sends each flit together with its own clock (clk_tx,
// source synchronous). clk_tx has the frequency of the local switch clock
// clk_rx but an unknown phase. The flit is captured in one of NSLOTS latch
// banks (L_0..L_2). A front-end counter, a ring of one-hot enables clocked by
// clk_tx, selects the bank to write; a back-end counter clocked by clk_rx
// steers the NSLOTSx1 output mux to the bank to read. Data can settle in a
// latch before the receiving side samples it, so no phase detector is needed.
//
// In the tightly coupled form there is no sampling flip-flop after the mux:
// the mux output goes straight to the switch arbiter and crossbar, and the
// switch output buffer is the first flop of the clk_rx domain. The latches
// therefore are the switch input buffer, and flow control acts on them:
//   * forward: a bank is written only for a flit that is transferred
//     (valid_i & ~stall_o). Together with the flit the bank stores the write
//     lap parity of the front-end counter; the reader knows the lap it expects,
//     so a bank holds an unread flit when its stored lap equals the expected one.
//   * backward: stall_o is the single-bit synchronizer of the stall signal,
//     one flip-flop on clk_tx that samples "all banks occupied".
// The back-end counter advances when the switch consumes the flit (pop_i).
//
// Interface, clk_tx side (stall/go): a flit is transferred in every clk_tx
// cycle in which valid_i = 1 and stall_o = 0. valid_i and data_i must be
// stable while clk_tx is low (launched on the rising clk_tx edge); the bank is
// transparent during the low phase and closes on the rising edge.
// Interface, clk_rx side: valid_o/data_o show the oldest unread flit; pop_i
// (only with valid_o) consumes it on the rising clk_rx edge. A flit written in
// a clk_tx cycle is visible at the output from the falling edge of that cycle.
//
// Reset: rst_rx (active high, asynchronous) clears both counters and the lap
// tags; as in the reference scheme the RX reset also bootstraps the front-end
// counter, so it must be released away from clk_tx edges.
//
// Follows the reference: three latch banks, rotating front-end and back-end
// counters, 3x1 mux, latch banks reused as the switch input buffer, stall/go
// flow control with a single-bit backward synchronizer. Own choices: the lap
// tag that marks a bank as full, the stall rule, the reset values.
//
// The latches and the gated latch enable are intentional (latch-based
// synchronizer); tools report them as latches.
module meso_sync #(
  parameter int unsigned DATA_W = noc_pkg::FLIT_W,
  parameter int unsigned NSLOTS = 3
) (
  // TX (upstream strobe) domain
  input  logic              clk_tx,
  input  logic              valid_i,
  input  logic [DATA_W-1:0] data_i,
  output logic              stall_o,
  // RX (local switch) domain
  input  logic              clk_rx,
  input  logic              rst_rx,
  output logic              valid_o,
  output logic [DATA_W-1:0] data_o,
  input  logic              pop_i
);

  // ---------------- front-end (clk_tx) ----------------
  logic [NSLOTS-1:0] wr_tok;   // enable_0 .. enable_N-1
  logic              wr_lap;   // lap parity of the front-end counter
  logic              push;

  assign push = valid_i & ~stall_o;

  always_ff @(posedge clk_tx or posedge rst_rx) begin
    if (rst_rx) begin
      wr_tok <= NSLOTS'(1);
      wr_lap <= 1'b1;
    end else if (push) begin
      wr_tok <= {wr_tok[NSLOTS-2:0], wr_tok[NSLOTS-1]};
      if (wr_tok[NSLOTS-1]) wr_lap <= ~wr_lap;
    end
  end

  // ---------------- latch banks ----------------
  logic [DATA_W-1:0] bank [NSLOTS];
  logic [NSLOTS-1:0] tag;
  logic [NSLOTS-1:0] lat_en;

  assign lat_en = wr_tok & {NSLOTS{push & ~clk_tx}};

  for (genvar i = 0; i < NSLOTS; i++) begin : g_bank
    always_latch begin
      if (rst_rx) begin
        tag[i] = 1'b0;
      end else if (lat_en[i]) begin
        bank[i] = data_i;
        tag[i]  = wr_lap;
      end
    end
  end

  // ---------------- back-end (clk_rx) ----------------
  logic [$clog2(NSLOTS)-1:0] rd_ptr;   // back-end counter, drives the mux
  logic                      rd_lap;

  always_ff @(posedge clk_rx or posedge rst_rx) begin
    if (rst_rx) begin
      rd_ptr <= '0;
      rd_lap <= 1'b1;
    end else if (pop_i && valid_o) begin
      if (rd_ptr == $clog2(NSLOTS)'(NSLOTS-1)) begin
        rd_ptr <= '0;
        rd_lap <= ~rd_lap;
      end else begin
        rd_ptr <= rd_ptr + 1'b1;
      end
    end
  end

  // NSLOTSx1 output mux
  assign data_o  = bank[rd_ptr];
  assign valid_o = (tag[rd_ptr] == rd_lap);

  // ---------------- backward flow control ----------------
  // A bank at or after the read pointer is full when it carries the current
  // read lap, a bank before it when it carries the next lap.
  logic [NSLOTS-1:0] full_bank;
  always_comb begin
    for (int i = 0; i < NSLOTS; i++) begin
      full_bank[i] = (i >= int'(rd_ptr)) ? (tag[i] == rd_lap) : (tag[i] != rd_lap);
    end
  end

  // single-bit synchronizer towards the upstream switch
  always_ff @(posedge clk_tx or posedge rst_rx) begin
    if (rst_rx) stall_o <= 1'b0;
    else        stall_o <= &full_bank;
  end

  // ---------------- protocol checks ----------------
  // a bank is never opened for a new flit while it still holds an unread one
  a_no_overwrite: assert property (@(negedge clk_tx) disable iff (rst_rx)
    push |-> ((wr_tok & full_bank) == '0))
    else $error("meso_sync: flit written into an occupied latch bank");

endmodule
