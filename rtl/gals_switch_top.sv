// gals_switch_top: a wormhole NoC switch whose input buffers are the
// synchronizers themselves.
//
// The switch runs on clk_sw. Each input port receives flits from a sender
// in another clock domain together with the sender's clock (in_clk), and the
// input buffer that stores the flits is also the synchronizer:
//   * a port that faces an IP core with an unrelated clock uses a tightly
//     coupled dual-clock FIFO (dc_fifo, DC_DEPTH slots);
//   * a port that faces a neighbouring switch, whose clock has the switch
//     frequency but any phase (mesochronous), uses the tightly coupled latch
//     synchronizer (meso_sync, NSLOTS latch banks).
// DC_PORTS selects the kind per port. By default port 0 is the IP-core port
// and ports 1..N_PORTS-1 are mesochronous. DC_PORTS = all ones with
// OUTBUF_DEPTH = 2 gives the all-dual-clock switch whose 6-slot input FIFOs
// replace most of the output buffering.
// The synchronizer outputs feed the per-output round-robin arbiters
// (rr_arbiter) and the crossbar directly; the output buffers (out_buffer,
// OUTBUF_DEPTH flits) are the first flops of the clk_sw domain.
//
// Routing: source routing. The lowest PORT_W payload bits of a head flit name
// the output port; the switch shifts the route right by PORT_W bits as the head
// flit crosses the crossbar, and the remaining flits of the packet follow it.
//
// Flow control is stall/go everywhere: a flit moves across a link in a cycle
// of the sender's clock when valid = 1 and stall = 0. in_stall[i] is in the
// in_clk[i] domain; out_valid/out_flit/out_stall are in the clk_sw domain
// (clk_sw is the strobe that travels with them to the next switch).
// rst (active high, asynchronous) resets the whole switch including the
// synchronizer front ends; release it away from all clock edges.
//
// Follows the reference: tightly coupled mesochronous synchronizers in the
// network, tightly coupled dual-clock FIFO at the network boundary, arbiter,
// crossbar and output-buffered switch with stall/go. Own choices: the number
// of ports (four, as drawn), which ports are IP-core ports, the flit format,
// source routing and the round-robin policy.
module gals_switch_top #(
  parameter int unsigned N_PORTS      = 4,
  parameter int unsigned NSLOTS       = 3,
  parameter int unsigned DC_DEPTH     = 6,
  parameter int unsigned OUTBUF_DEPTH = 6,
  // bit i set: input i faces an unrelated clock and uses dc_fifo,
  // bit i clear: input i is mesochronous and uses meso_sync
  parameter logic [N_PORTS-1:0] DC_PORTS = N_PORTS'(1)
) (
  input  logic                            clk_sw,
  input  logic                            rst,
  // input links (port 0: IP core, others: mesochronous switch links)
  input  logic           [N_PORTS-1:0]    in_clk,
  input  logic           [N_PORTS-1:0]    in_valid,
  input  noc_pkg::flit_t [N_PORTS-1:0]    in_flit,
  output logic           [N_PORTS-1:0]    in_stall,
  // output links (clk_sw domain)
  output logic           [N_PORTS-1:0]    out_valid,
  output noc_pkg::flit_t [N_PORTS-1:0]    out_flit,
  input  logic           [N_PORTS-1:0]    out_stall
);

  import noc_pkg::*;

  localparam int unsigned PORT_W = (N_PORTS > 1) ? $clog2(N_PORTS) : 1;

  // ---------------- synchronizing input buffers ----------------
  logic  [N_PORTS-1:0] ib_valid, ib_pop;
  flit_t [N_PORTS-1:0] ib_flit;

  for (genvar i = 0; i < N_PORTS; i++) begin : g_in
    if (DC_PORTS[i]) begin : g_dc
      dc_fifo #(.DATA_W(FLIT_W), .DEPTH(DC_DEPTH)) u_sync (
        .rst     (rst),
        .clk_tx  (in_clk[i]),
        .valid_i (in_valid[i]),
        .data_i  (in_flit[i]),
        .stall_o (in_stall[i]),
        .clk_rx  (clk_sw),
        .valid_o (ib_valid[i]),
        .data_o  (ib_flit[i]),
        .pop_i   (ib_pop[i])
      );
    end else begin : g_meso
      meso_sync #(.DATA_W(FLIT_W), .NSLOTS(NSLOTS)) u_sync (
        .clk_tx  (in_clk[i]),
        .valid_i (in_valid[i]),
        .data_i  (in_flit[i]),
        .stall_o (in_stall[i]),
        .clk_rx  (clk_sw),
        .rst_rx  (rst),
        .valid_o (ib_valid[i]),
        .data_o  (ib_flit[i]),
        .pop_i   (ib_pop[i])
      );
    end
  end

  // ---------------- routing ----------------
  logic  [N_PORTS-1:0][PORT_W-1:0]  route_q, dest;
  logic  [N_PORTS-1:0][N_PORTS-1:0] req;      // [output][input]
  logic  [N_PORTS-1:0][N_PORTS-1:0] gnt;      // [output][input]
  logic  [N_PORTS-1:0][N_PORTS-1:0] xfer;     // [output][input]
  flit_t [N_PORTS-1:0]              xb_in, xb_out;
  logic  [N_PORTS-1:0]              ob_full, ob_push;

  always_comb begin
    for (int i = 0; i < N_PORTS; i++) begin
      dest[i]  = ib_flit[i].head ? ib_flit[i].payload[PORT_W-1:0] : route_q[i];
      xb_in[i] = ib_flit[i];
      if (ib_flit[i].head) xb_in[i].payload = ib_flit[i].payload >> PORT_W;
    end
    for (int o = 0; o < N_PORTS; o++) begin
      for (int i = 0; i < N_PORTS; i++) begin
        req[o][i]  = ib_valid[i] && (dest[i] == PORT_W'(o));
        xfer[o][i] = req[o][i] && gnt[o][i] && !ob_full[o];
      end
    end
    for (int i = 0; i < N_PORTS; i++) begin
      ib_pop[i] = 1'b0;
      for (int o = 0; o < N_PORTS; o++) ib_pop[i] |= xfer[o][i];
    end
  end

  // route of the packet in progress on each input
  always_ff @(posedge clk_sw or posedge rst) begin
    if (rst) route_q <= '0;
    else begin
      for (int i = 0; i < N_PORTS; i++) begin
        if (ib_pop[i] && ib_flit[i].head) route_q[i] <= dest[i];
      end
    end
  end

  // ---------------- arbiters, crossbar, output buffers ----------------
  for (genvar o = 0; o < N_PORTS; o++) begin : g_out
    assign ob_push[o] = |xfer[o];

    rr_arbiter #(.N(N_PORTS)) u_arb (
      .clk      (clk_sw),
      .rst      (rst),
      .req_i    (req[o]),
      .xfer_i   (ob_push[o]),
      .tail_i   (xb_out[o].tail),
      .gnt_o    (gnt[o])
    );

    out_buffer #(.W(FLIT_W), .DEPTH(OUTBUF_DEPTH)) u_obuf (
      .clk     (clk_sw),
      .rst     (rst),
      .push_i  (ob_push[o]),
      .data_i  (xb_out[o]),
      .full_o  (ob_full[o]),
      .valid_o (out_valid[o]),
      .data_o  (out_flit[o]),
      .stall_i (out_stall[o])
    );
  end

  crossbar #(.N_IN(N_PORTS), .N_OUT(N_PORTS), .W(FLIT_W)) u_xbar (
    .in_i  (xb_in),
    .sel_i (xfer),
    .out_o (xb_out)
  );

  // ---------------- protocol checks ----------------
  for (genvar i = 0; i < N_PORTS; i++) begin : g_chk
    logic [N_PORTS-1:0] col;
    for (genvar o = 0; o < N_PORTS; o++) begin : g_col
      assign col[o] = xfer[o][i];
    end
    // an input sends to at most one output per cycle
    a_one_output: assert property (@(posedge clk_sw) disable iff (rst) $onehot0(col))
      else $error("switch: input %0d sent to several outputs", i);
  end

  for (genvar o = 0; o < N_PORTS; o++) begin : g_chk_out
    // output buffers are never written when full, grants are one-hot
    a_no_obuf_overflow: assert property (@(posedge clk_sw) disable iff (rst)
      ob_push[o] |-> !ob_full[o])
      else $error("switch: output buffer %0d overflow", o);
    a_onehot_grant: assert property (@(posedge clk_sw) disable iff (rst) $onehot0(gnt[o]))
      else $error("switch: grant of output %0d not one-hot", o);
  end

endmodule
