// noc_router: wormhole packet router with two virtual channels per port.
//
// Each input port steers arriving flits by their VC bit into one of two
// input FIFOs (virtual channel selection). The head flit at the front of a
// FIFO is routed by dimension order (X first, then Y) from the destination
// coordinates in its header. Every output port has one arbiter per VC; an
// arbiter picks among the inputs whose head flit wants this output in
// round-robin order and then keeps the output for that input until the tail
// flit has passed (wormhole). Per cycle an output sends at most one flit:
// guaranteed traffic (VC 0) goes first and freezes the best-effort arbiter
// (VC 1), which only sends in cycles where VC 0 has nothing to send or is
// blocked downstream. Link flow control is a local handshake: ready of a VC
// is "input FIFO not full", a registered condition, and a sender raises
// valid only in a cycle where ready of the flit's VC is high, so valid means
// the flit is taken at the next clock edge.
//
// Port 0 is the local NI port, port 1 the X-direction neighbour and port 2 the
// Y-direction neighbour, which is all a router of a 2x2 mesh needs (three
// ports). A head flit takes one cycle to win its output; body flits then
// cross in one cycle each. The input/VC/arbiter/flow-control structure and
// the GT-freezes-BE rule follow the published μSpider router model; XY routing, round-robin
// arbitration, FIFO depth and the handshake are this design's choices.
module noc_router
  import noc_pkg::*;
#(
  parameter int unsigned MY_X   = 0,
  parameter int unsigned MY_Y   = 0,
  parameter int unsigned NPORTS = 3,
  parameter int unsigned DEPTH  = 4
) (
  input  logic           clk,
  input  logic           rst,
  input  link_t          in_link   [NPORTS],
  output logic [NVC-1:0] in_ready  [NPORTS],
  output link_t          out_link  [NPORTS],
  input  logic [NVC-1:0] out_ready [NPORTS]
);

  localparam int unsigned FW = $bits(flit_t);
  localparam int unsigned PW = (NPORTS > 1) ? $clog2(NPORTS) : 1;

  // Port a header asks for, dimension-ordered.
  function automatic logic [PW-1:0] route(input flit_t f);
    header_t h;
    h = header_t'(f.data);
    if (h.dst_x != COORD_W'(MY_X))      return PW'(1);
    else if (h.dst_y != COORD_W'(MY_Y)) return PW'(2);
    else                                return PW'(0);
  endfunction

  flit_t          head_flit [NPORTS][NVC];
  logic           fifo_empty[NPORTS][NVC];
  logic           fifo_full [NPORTS][NVC];
  logic           pop       [NPORTS][NVC];

  // Input side: VC selection and buffers.
  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    for (genvar v = 0; v < NVC; v++) begin : g_vc
      logic [FW-1:0] rd_bits;
      chan_fifo #(.WIDTH(FW), .DEPTH(DEPTH)) u_fifo (
        .clk, .rst,
        .wr          (in_link[i].valid && (in_link[i].vc == 1'(v))),
        .wdata       (in_link[i].flit),
        .rd          (pop[i][v]),
        .rdata       (rd_bits),
        .full        (fifo_full[i][v]),
        .empty       (fifo_empty[i][v]),
        .almost_full (),
        .almost_empty(),
        .count       ()
      );
      assign head_flit[i][v] = flit_t'(rd_bits);
      assign in_ready[i][v]  = !fifo_full[i][v];
    end
    // The sender must respect the handshake.
    a_no_overrun: assert property (@(posedge clk) disable iff (rst)
      in_link[i].valid |-> in_ready[i][in_link[i].vc]);
  end

  // Output side: per output and VC, a lock on one input.
  logic          locked [NPORTS][NVC];
  logic [PW-1:0] owner  [NPORTS][NVC];
  logic [PW-1:0] rr     [NPORTS][NVC];
  logic          send   [NPORTS];
  logic          send_vc[NPORTS];
  logic          grant_v[NPORTS][NVC];
  logic [PW-1:0] grant_i[NPORTS][NVC];

  always_comb begin
    for (int i = 0; i < NPORTS; i++)
      for (int v = 0; v < NVC; v++)
        pop[i][v] = 1'b0;

    for (int o = 0; o < NPORTS; o++) begin
      logic can0, can1;
      can0 = locked[o][VC_GT] && !fifo_empty[owner[o][VC_GT]][VC_GT] && out_ready[o][VC_GT];
      can1 = locked[o][VC_BE] && !fifo_empty[owner[o][VC_BE]][VC_BE] && out_ready[o][VC_BE];
      send[o]    = can0 || can1;
      send_vc[o] = can0 ? 1'(VC_GT) : 1'(VC_BE);   // GT freezes BE
      out_link[o].valid = send[o];
      out_link[o].vc    = send_vc[o];
      out_link[o].flit  = can0 ? head_flit[owner[o][VC_GT]][VC_GT]
                               : head_flit[owner[o][VC_BE]][VC_BE];
      if (can0)      pop[owner[o][VC_GT]][VC_GT] = 1'b1;
      else if (can1) pop[owner[o][VC_BE]][VC_BE] = 1'b1;

      // Round-robin search for a new owner on each free VC arbiter.
      for (int v = 0; v < NVC; v++) begin
        grant_v[o][v] = 1'b0;
        grant_i[o][v] = '0;
        for (int k = 1; k <= NPORTS; k++) begin
          int unsigned i;
          i = (int'(rr[o][v]) + k) % NPORTS;
          if (!grant_v[o][v] && !locked[o][v] && !fifo_empty[i][v] &&
              head_flit[i][v].head && route(head_flit[i][v]) == PW'(o)) begin
            grant_v[o][v] = 1'b1;
            grant_i[o][v] = PW'(i);
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int o = 0; o < NPORTS; o++)
        for (int v = 0; v < NVC; v++) begin
          locked[o][v] <= 1'b0;
          owner[o][v]  <= '0;
          rr[o][v]     <= '0;
        end
    end else begin
      for (int o = 0; o < NPORTS; o++)
        for (int v = 0; v < NVC; v++) begin
          if (grant_v[o][v]) begin
            locked[o][v] <= 1'b1;
            owner[o][v]  <= grant_i[o][v];
            rr[o][v]     <= grant_i[o][v];
          end else if (send[o] && send_vc[o] == 1'(v) && out_link[o].flit.tail) begin
            locked[o][v] <= 1'b0;
          end
        end
    end
  end

endmodule
