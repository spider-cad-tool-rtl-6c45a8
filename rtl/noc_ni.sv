// noc_ni: network interface between the wrappers of one cluster and its
// router.
//
// The NI owns NCH channels. Each channel has an outgoing FIFO, filled by a
// wrapper through the NI bus, and an incoming FIFO, emptied by a wrapper.
// Outgoing words are cut into packets: a header flit naming the
// destination node, the destination channel and the payload length, then up
// to MAX_PKT payload flits, the last one marked as tail.
//
// Which channel may send is decided by the GT/BE scheduler. A slot counter
// divides time into TDM_SIZE slots of SLOT_LEN cycles. At the start of a
// slot, the TDM table names the guaranteed-traffic (GT) channel that owns
// it; if that channel holds data, a GT packet starts on VC 0. Best-effort
// (BE) channels are served round-robin whenever the BE packetizer is free, on
// VC 1. Both packetizers share the network port: a GT flit always wins the
// cycle, so a BE packet is interleaved flit by flit around GT packets.
// Channels marked CH_PRIO are "BE with priority": they use VC 0 without
// owning slots, served round-robin whenever the VC 0 packetizer is idle and
// no slot owner starts, and only if the packet (at one flit per cycle) ends
// before the next allocated slot begins, so GT slots are kept free.
//
// The depacketizer takes flits from the router, one per cycle. Per VC it
// remembers the channel named by the last header and writes payload flits
// into that channel's incoming FIFO until the tail. Its ready for a VC is
// low only while a payload is pending for a full incoming FIFO.
//
// Channel routing (destination and class) and the TDM table are constants
// produced when the network is generated, given here as parameters. The
// FIFO channels (extra-NI and intra-NI), slot counter, TDM table, GT/BE
// scheduler, packeting and depacketing follow the published μSpider NI
// model; the packet format, packet length limit, slot length, the rule that
// a GT packet only starts on a slot boundary and the way priority BE avoids
// the slots are this design's choices.
//
// End-to-end flow control is optional (E2E). Without it, a full incoming FIFO
// back-pressures the network. With it, each network channel holds DEPTH
// credits, the size of the remote incoming FIFO. A packet only starts with
// as many words as there are credits, and spends them. The receiver counts
// the words the wrapper reads. Once CR_BATCH have built up it sends them
// back as a one-flit credit packet on VC 1 (header with the credit bit set,
// len = credits, addressed to the feeding channel CH_SRC_*). Credit returns
// go before BE data. Incoming FIFOs then never fill, so the network never
// stalls on a receiver. The credit mechanism follows the "end to end
// credit-based" flow control named for μSpider; packet and batch format are
// this design's choices.
module noc_ni
  import noc_pkg::*;
#(
  parameter int unsigned NCH      = 4,
  parameter int unsigned DEPTH    = 8,
  parameter int unsigned MAX_PKT  = 4,
  parameter int unsigned TDM_SIZE = 4,
  parameter int unsigned SLOT_LEN = MAX_PKT + 1,
  parameter logic [NCH-1:0][COORD_W-1:0] CH_DST_X  = '0,
  parameter logic [NCH-1:0][COORD_W-1:0] CH_DST_Y  = '0,
  parameter logic [NCH-1:0][CHID_W-1:0]  CH_DST_CH = '0,
  parameter logic [NCH-1:0]              CH_GT     = '0,
  // BE-with-priority channels: sent on VC 0 outside the TDM slots.
  parameter logic [NCH-1:0]              CH_PRIO   = '0,
  // Intra-NI channels: their words go straight from the outgoing FIFO to
  // incoming channel CH_DST_CH of this NI, never into the network.
  parameter logic [NCH-1:0]              CH_INTRA  = '0,
  // One entry per slot: bit CHID_W marks the slot as allocated, the lower
  // bits name the GT channel that owns it.
  parameter logic [TDM_SIZE-1:0][CHID_W:0] TDM_TABLE = '0,
  // End-to-end credit flow control. A sender holds DEPTH credits per network
  // channel (the depth of the remote incoming FIFO) and sends no more words
  // than it holds. The receiver returns credits for words read, to the node
  // and channel CH_SRC_* that feeds each incoming channel.
  parameter bit                          E2E       = 1'b0,
  // Credits go back once this many have built up (capped at DEPTH, so a
  // sender out of credits always gets them back once all is read).
  parameter int unsigned                 CR_BATCH  = MAX_PKT,
  parameter logic [NCH-1:0][COORD_W-1:0] CH_SRC_X  = '0,
  parameter logic [NCH-1:0][COORD_W-1:0] CH_SRC_Y  = '0,
  parameter logic [NCH-1:0][CHID_W-1:0]  CH_SRC_CH = '0,
  localparam int unsigned CW = $clog2(DEPTH + 1)
) (
  input  logic           clk,
  input  logic           rst,
  // NI bus, outgoing channels
  input  logic [NCH-1:0] ch_write,
  input  word_t          ch_wdata     [NCH],
  output logic [NCH-1:0] ch_not_full,
  output logic [NCH-1:0] ch_almost_full,
  // NI bus, incoming channels
  input  logic [NCH-1:0] ch_read,
  output word_t          ch_rdata     [NCH],
  output logic [NCH-1:0] ch_not_empty,
  output logic [NCH-1:0] ch_almost_empty,
  // network port
  output link_t          net_out,
  input  logic [NVC-1:0] net_out_ready,
  input  link_t          net_in,
  output logic [NVC-1:0] net_in_ready
);

  localparam int unsigned SW = (TDM_SIZE > 1) ? $clog2(TDM_SIZE) : 1;
  localparam int unsigned LW = (SLOT_LEN > 1) ? $clog2(SLOT_LEN) : 1;
  localparam int unsigned NW = (NCH > 1) ? $clog2(NCH) : 1;

  // ---------------- channel FIFOs ----------------
  word_t          out_head [NCH];
  logic [CW-1:0]  out_count[NCH];
  logic [NCH-1:0] out_pop;
  logic [NCH-1:0] out_full;
  logic [NCH-1:0] in_full, in_empty, in_wr, net_wr;
  word_t          in_wdata [NCH];
  logic [NCH-1:0] intra_mv;      // intra-NI channel c moves a word this cycle
  logic [NCH-1:0] intra_wr;      // incoming channel d receives an intra word
  word_t          intra_data [NCH];

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    chan_fifo #(.WIDTH(DATA_W), .DEPTH(DEPTH)) u_out (
      .clk, .rst,
      .wr(ch_write[c]), .wdata(ch_wdata[c]),
      .rd(out_pop[c]),  .rdata(out_head[c]),
      .full(out_full[c]), .empty(), .almost_full(ch_almost_full[c]),
      .almost_empty(), .count(out_count[c])
    );
    assign ch_not_full[c] = !out_full[c];

    chan_fifo #(.WIDTH(DATA_W), .DEPTH(DEPTH)) u_in (
      .clk, .rst,
      .wr(in_wr[c]), .wdata(in_wdata[c]),
      .rd(ch_read[c]), .rdata(ch_rdata[c]),
      .full(in_full[c]), .empty(in_empty[c]), .almost_full(),
      .almost_empty(ch_almost_empty[c]), .count()
    );
    assign ch_not_empty[c] = !in_empty[c];
  end

  // ---------------- slot counter ----------------
  logic [LW-1:0] slot_cyc;
  logic [SW-1:0] slot;
  logic          slot_start;

  always_ff @(posedge clk) begin
    if (rst) begin
      slot_cyc <= '0;
      slot     <= '0;
    end else if (slot_cyc == LW'(SLOT_LEN - 1)) begin
      slot_cyc <= '0;
      slot     <= (slot == SW'(TDM_SIZE - 1)) ? '0 : slot + 1'b1;
    end else begin
      slot_cyc <= slot_cyc + 1'b1;
    end
  end
  assign slot_start = (slot_cyc == '0);

  // ---------------- packetizers ----------------
  // Engine e (0 = GT, 1 = BE): busy, header still to send, channel, flits left.
  logic             busy  [NVC];
  logic             in_hdr[NVC];
  logic [NW-1:0]    cur   [NVC];
  logic [LEN_W-1:0] left  [NVC];
  logic [NW-1:0]    be_rr;
  logic [NW-1:0]    pr_rr;
  logic [NW-1:0]    cr_rr;
  logic             cr_pkt[NVC];   // engine sends a credit packet (BE only)
  logic             cr_st;         // BE start is a credit packet

  // ---------------- end-to-end credits ----------------
  // IN_INTRA: incoming channels fed by an intra-NI channel (no credits).
  function automatic logic [NCH-1:0] intra_dst();
    intra_dst = '0;
    for (int c = 0; c < NCH; c++)
      if (CH_INTRA[c]) intra_dst[int'(CH_DST_CH[c]) % NCH] = 1'b1;
  endfunction
  localparam logic [NCH-1:0] IN_INTRA = intra_dst();
  localparam int unsigned    CRB = (CR_BATCH > DEPTH) ? DEPTH :
                                   (CR_BATCH < 1) ? 1 : CR_BATCH;

  logic [CW-1:0]  cred  [NCH];   // sender: words the remote FIFO can take
  logic [CW-1:0]  ret   [NCH];   // receiver: words read, credits not yet sent
  logic [CW-1:0]  cr_add[NCH];   // credits arriving this cycle
  logic [CW-1:0]  usable[NCH];   // words that may be packed this cycle

  logic             start [NVC];
  logic [NW-1:0]    st_ch [NVC];
  logic             fire  [NVC];
  flit_t            eflit [NVC];

  function automatic logic [LEN_W-1:0] pkt_len(input logic [CW-1:0] n);
    return (n > CW'(MAX_PKT)) ? LEN_W'(MAX_PKT) : LEN_W'(n);
  endfunction

  logic                prio_st;   // VC 0 start is a BE-with-priority packet
  logic                free [NVC]; // engine idle, or sending its tail now
  logic [CW-1:0]       avail[NCH]; // words left after this cycle's pop

  always_comb begin
    logic [CHID_W:0] ent;
    logic            nxt_alloc;

    // Network port: GT first.
    fire[VC_GT] = busy[VC_GT] && net_out_ready[VC_GT];
    fire[VC_BE] = !fire[VC_GT] && busy[VC_BE] && net_out_ready[VC_BE];
    for (int e = 0; e < NVC; e++)
      free[e] = !busy[e] ||
                (fire[e] && (cr_pkt[e] || (!in_hdr[e] && left[e] == LEN_W'(1))));

    out_pop = '0;
    for (int e = 0; e < NVC; e++)
      if (fire[e] && !in_hdr[e]) out_pop[cur[e]] = 1'b1;
    for (int c = 0; c < NCH; c++) begin
      avail[c]  = out_count[c] - CW'(out_pop[c]);
      usable[c] = (E2E && avail[c] > cred[c]) ? cred[c] : avail[c];
      if (intra_mv[c]) out_pop[c] = 1'b1;
    end

    // GT: the slot owner starts at a slot boundary if it has data. An engine
    // sending its tail may start the next packet in the same cycle.
    ent          = TDM_TABLE[slot];
    start[VC_GT] = 1'b0;
    prio_st      = 1'b0;
    st_ch[VC_GT] = NW'(ent[CHID_W-1:0]);
    if (free[VC_GT] && slot_start && ent[CHID_W] && CH_GT[st_ch[VC_GT]] &&
        !CH_INTRA[st_ch[VC_GT]] && usable[st_ch[VC_GT]] != '0)
      start[VC_GT] = 1'b1;

    // BE with priority: round-robin on VC 0 when no slot owner starts and
    // the packet, at one flit per cycle, ends by the next allocated slot.
    nxt_alloc = TDM_TABLE[(slot == SW'(TDM_SIZE - 1)) ? '0 : slot + 1'b1][CHID_W];
    for (int k = 1; k <= NCH; k++) begin
      int unsigned c;
      c = (int'(pr_rr) + k) % NCH;
      if (free[VC_GT] && !start[VC_GT] && !prio_st && CH_PRIO[c] &&
          !CH_GT[c] && !CH_INTRA[c] && usable[c] != '0 &&
          (!nxt_alloc || 32'(SLOT_LEN) - 32'(slot_cyc) >
                         32'(pkt_len(usable[c])))) begin
        prio_st      = 1'b1;
        st_ch[VC_GT] = NW'(c);
      end
    end
    if (prio_st) start[VC_GT] = 1'b1;

    // BE: credit returns first, round-robin over incoming channels; then
    // round-robin over BE channels with data.
    start[VC_BE] = 1'b0;
    cr_st        = 1'b0;
    st_ch[VC_BE] = '0;
    for (int k = 1; k <= NCH; k++) begin
      int unsigned d;
      d = (int'(cr_rr) + k) % NCH;
      if (E2E && free[VC_BE] && !cr_st && !IN_INTRA[d] && ret[d] >= CW'(CRB)) begin
        cr_st        = 1'b1;
        st_ch[VC_BE] = NW'(d);
      end
    end
    start[VC_BE] = cr_st;
    for (int k = 1; k <= NCH; k++) begin
      int unsigned c;
      c = (int'(be_rr) + k) % NCH;
      if (free[VC_BE] && !start[VC_BE] && !CH_GT[c] && !CH_PRIO[c] &&
          !CH_INTRA[c] && usable[c] != '0) begin
        start[VC_BE] = 1'b1;
        st_ch[VC_BE] = NW'(c);
      end
    end

    for (int e = 0; e < NVC; e++) begin
      header_t h;
      h        = '0;
      h.dst_x  = cr_pkt[e] ? CH_SRC_X[cur[e]]  : CH_DST_X[cur[e]];
      h.dst_y  = cr_pkt[e] ? CH_SRC_Y[cur[e]]  : CH_DST_Y[cur[e]];
      h.dst_ch = cr_pkt[e] ? CH_SRC_CH[cur[e]] : CH_DST_CH[cur[e]];
      h.credit = cr_pkt[e];
      h.len    = left[e];
      eflit[e].head = in_hdr[e];
      eflit[e].tail = cr_pkt[e] || (!in_hdr[e] && (left[e] == LEN_W'(1)));
      eflit[e].data = in_hdr[e] ? word_t'(h) : out_head[cur[e]];
    end

    net_out.valid = fire[VC_GT] || fire[VC_BE];
    net_out.vc    = fire[VC_GT] ? 1'(VC_GT) : 1'(VC_BE);
    net_out.flit  = fire[VC_GT] ? eflit[VC_GT] : eflit[VC_BE];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int e = 0; e < NVC; e++) begin
        busy[e]   <= 1'b0;
        in_hdr[e] <= 1'b0;
        cur[e]    <= '0;
        left[e]   <= '0;
        cr_pkt[e] <= 1'b0;
      end
      be_rr <= NW'(NCH - 1);
      pr_rr <= NW'(NCH - 1);
      cr_rr <= NW'(NCH - 1);
    end else begin
      for (int e = 0; e < NVC; e++) begin
        if (start[e]) begin
          busy[e]   <= 1'b1;
          in_hdr[e] <= 1'b1;
          cur[e]    <= st_ch[e];
          cr_pkt[e] <= (e == VC_BE) && cr_st;
          left[e]   <= ((e == VC_BE) && cr_st) ? LEN_W'(ret[st_ch[e]])
                                               : pkt_len(usable[st_ch[e]]);
        end else if (fire[e]) begin
          if (cr_pkt[e]) begin
            busy[e]   <= 1'b0;
            in_hdr[e] <= 1'b0;
          end else if (in_hdr[e]) in_hdr[e] <= 1'b0;
          else begin
            left[e] <= left[e] - 1'b1;
            if (left[e] == LEN_W'(1)) busy[e] <= 1'b0;
          end
        end
      end
      if (start[VC_BE]) be_rr <= st_ch[VC_BE];
      if (prio_st)      pr_rr <= st_ch[VC_GT];
      if (cr_st)        cr_rr <= st_ch[VC_BE];
    end
  end

  // Credit counters: a sender spends credits when a packet starts and gets
  // them back from credit packets; a receiver counts words read by the
  // wrapper and clears the count it puts into a credit packet.
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int c = 0; c < NCH; c++) begin
        cred[c] <= CW'(DEPTH);
        ret[c]  <= '0;
      end
    end else if (E2E) begin
      for (int c = 0; c < NCH; c++) begin
        logic [CW-1:0] spent, sent;
        spent = '0;
        sent  = '0;
        for (int e = 0; e < NVC; e++)
          if (start[e] && int'(st_ch[e]) == c && !(e == VC_BE && cr_st))
            spent = CW'(pkt_len(usable[c]));
        if (cr_st && int'(st_ch[VC_BE]) == c) sent = ret[c];
        cred[c] <= cred[c] + cr_add[c] - spent;
        ret[c]  <= ret[c] - sent + CW'(ch_read[c] && !in_empty[c] && !IN_INTRA[c]);
      end
    end
  end

  // ---------------- depacketizer ----------------
  logic          rx_busy[NVC];
  logic [NW-1:0] rx_ch  [NVC];
  header_t       rx_hdr;

  assign rx_hdr = header_t'(net_in.flit.data);

  always_comb begin
    for (int v = 0; v < NVC; v++)
      net_in_ready[v] = !rx_busy[v] || !in_full[rx_ch[v]];
    net_wr = '0;
    if (net_in.valid && !net_in.flit.head)
      net_wr[rx_ch[net_in.vc]] = 1'b1;
    for (int c = 0; c < NCH; c++) cr_add[c] = '0;
    if (net_in.valid && net_in.flit.head && rx_hdr.credit)
      cr_add[int'(rx_hdr.dst_ch) % NCH] = CW'(rx_hdr.len);

    // intra-NI moves, after the depacketizer
    intra_mv = '0;
    intra_wr = '0;
    for (int d = 0; d < NCH; d++) intra_data[d] = '0;
    for (int c = 0; c < NCH; c++) begin
      int unsigned d;
      d = int'(CH_DST_CH[c]) % NCH;
      if (CH_INTRA[c] && out_count[c] != '0 && !in_full[d] && !net_wr[d]) begin
        intra_mv[c]   = 1'b1;
        intra_wr[d]   = 1'b1;
        intra_data[d] = out_head[c];
      end
    end

    for (int d = 0; d < NCH; d++) begin
      in_wr[d]    = net_wr[d] || intra_wr[d];
      in_wdata[d] = net_wr[d] ? net_in.flit.data : intra_data[d];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int v = 0; v < NVC; v++) begin
        rx_busy[v] <= 1'b0;
        rx_ch[v]   <= '0;
      end
    end else if (net_in.valid) begin
      if (net_in.flit.head && !rx_hdr.credit) begin
        rx_busy[net_in.vc] <= 1'b1;
        rx_ch[net_in.vc]   <= NW'(rx_hdr.dst_ch);
      end else if (!net_in.flit.head && net_in.flit.tail) begin
        rx_busy[net_in.vc] <= 1'b0;
      end
    end
  end

  a_rx_ready: assert property (@(posedge clk) disable iff (rst)
    net_in.valid |-> net_in_ready[net_in.vc]);
  a_tx_ready: assert property (@(posedge clk) disable iff (rst)
    net_out.valid |-> net_out_ready[net_out.vc]);

endmodule
