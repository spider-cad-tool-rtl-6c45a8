// noc_ni_tb: self-checking test of the network interface with its network
// port looped back through a model of the network.
//
// Channel c of the NI is routed to incoming channel (c+1) mod 5 of the same
// node; channels 0 and 3 are guaranteed traffic (GT), 1 is best effort (BE),
// 2 is an intra-NI channel, whose words must reach channel 3 without
// entering the network, and 4 is BE with priority. The TDM table has four
// slots: 0 -> ch0, 1 -> ch3, 2 unallocated, 3 -> ch0. The loop model buffers each VC separately, takes BE flits only
// when a random ready allows, and always takes GT flits. Writers fill the
// outgoing channels at random; readers drain incoming channels at random,
// so FIFOs fill and the network port is back-pressured.
// Checked: every word arrives once, in order, on the right channel;
// headers carry the right destination and a length of 1..MAX_PKT matching
// the payload; GT and priority channels use VC 0 and BE channels VC 1; every
// GT header leaves in the second cycle of a slot the TDM table gives to its
// channel; a slot owner holding data at the start of its slot always sends
// in it; a priority packet never runs into the next allocated slot.
// End-to-end credits are on: a channel never has more than DEPTH words sent
// and not yet read; credit packets are single flits on VC 1 addressed to
// the feeding channel, at least MAX_PKT (the batch size) at a time; every
// word read is credited back by the end, except a last part batch; the
// incoming side never back-pressures the network.
// Counted: GT packets, BE packets, BE packets interrupted by GT flits,
// credit packets,
// priority packets sent outside slot starts, slots used by their owner,
// and full outgoing FIFOs seen by a writer.
module noc_ni_tb;
  import noc_pkg::*;
  localparam int NCH = 5, DEPTH = 4, MAX_PKT = 4, TDM = 4, SLOT = MAX_PKT + 1;
  localparam int NWORDS = 300;   // per channel

  localparam logic [NCH-1:0][CHID_W-1:0] DST_CH = {4'd0, 4'd4, 4'd3, 4'd2, 4'd1};
  localparam logic [NCH-1:0]             GT     = 5'b01001;
  localparam logic [NCH-1:0]             INTRA  = 5'b00100;
  localparam logic [NCH-1:0]             PRIO   = 5'b10000;
  localparam logic [NCH-1:0][CHID_W-1:0] SRC_CH = {4'd3, 4'd2, 4'd1, 4'd0, 4'd4};
  localparam logic [TDM-1:0][CHID_W:0]   TABLE  = {5'h10, 5'h00, 5'h13, 5'h10};
  // owner of each slot, -1 when free
  int owner[TDM] = '{0, 3, -1, 0};

  logic clk = 0, rst = 1;
  logic [NCH-1:0] ch_write, ch_not_full, ch_almost_full, ch_read, ch_not_empty, ch_almost_empty;
  word_t ch_wdata[NCH], ch_rdata[NCH];
  link_t net_out, net_in;
  logic [NVC-1:0] net_out_ready, net_in_ready;
  int checks = 0, failures = 0;

  noc_ni #(
    .NCH(NCH), .DEPTH(DEPTH), .MAX_PKT(MAX_PKT), .TDM_SIZE(TDM),
    .CH_DST_X('0), .CH_DST_Y('0), .CH_DST_CH(DST_CH), .CH_GT(GT), .CH_PRIO(PRIO),
    .CH_INTRA(INTRA), .E2E(1'b1), .CH_SRC_X('0), .CH_SRC_Y('0), .CH_SRC_CH(SRC_CH), .TDM_TABLE(TABLE)
  ) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------- loop model of the network ----------
  flit_t q[NVC][$];
  int    model_cyc = 0, model_slot = 0;
  logic  be_ready;
  int    n_gt_pkt = 0, n_be_pkt = 0, n_interleave = 0, n_wr_full = 0, n_in_full = 0;
  bit    be_open = 0, gt_open = 0;
  int    tx_len[NVC], tx_cnt[NVC], tx_ch[NVC];
  int    n_pr_pkt = 0, n_pr_off = 0, n_slot_use = 0;
  int    nwr[NCH], nsent[NCH];   // words written / sent per outgoing channel
  int    nread[NCH], ncred[NCH]; // words read per incoming, credited per outgoing
  int    n_cr_pkt = 0;
  int    hsum[NCH], dcr[NCH];    // words in sent headers, credits delivered
  int    expect_gt = -1;         // slot owner that must send a header now

  assign net_out_ready = {be_ready && q[VC_BE].size() < 6, 1'b1};

  always @(negedge clk) begin
    be_ready = ($urandom % 3) != 0;
    // deliver one flit per cycle, GT first, only when the NI is ready
    net_in = '0;
    for (int v = 0; v < NVC; v++)
      if (!net_in.valid && q[v].size() > 0 && net_in_ready[v]) begin
        net_in.valid = 1;
        net_in.vc    = 1'(v);
        net_in.flit  = q[v][0];
      end
  end

  always @(posedge clk) begin
    if (rst) begin
      model_cyc  <= 0;
      model_slot <= 0;
    end else begin
      int o, queued;
      header_t oh;
      model_cyc  <= (model_cyc == SLOT - 1) ? 0 : model_cyc + 1;
      if (model_cyc == SLOT - 1) model_slot <= (model_slot + 1) % TDM;
      o      = owner[model_slot];
      oh     = header_t'(net_out.flit.data);
      for (int c = 0; c < NCH; c++)
        if (!INTRA[c]) begin
          check(nsent[c] - nread[(c + 1) % NCH] <= DEPTH, "in flight within credits");
          check(ncred[c] <= nread[(c + 1) % NCH], "credits only for words read");
        end
      if (expect_gt >= 0) begin
        check(net_out.valid && net_out.vc == 1'(VC_GT) && net_out.flit.head &&
              (int'(oh.dst_ch) + NCH - 1) % NCH == expect_gt,
              "slot owner with data sends in its slot");
        n_slot_use++;
      end
      if (net_in.valid) void'(q[net_in.vc].pop_front());
      for (int v = 0; v < NVC; v++)
        if (q[v].size() > 0 && !net_in_ready[v]) n_in_full++;
      if (net_out.valid) begin
        int v;
        flit_t f;
        header_t fh;
        v  = net_out.vc;
        f  = net_out.flit;
        fh = header_t'(f.data);
        check(net_out_ready[v], "sent without ready");
        q[v].push_back(f);
        if (v == VC_GT && be_open) n_interleave++;
        if (f.head && fh.credit) begin
          header_t h;
          h = header_t'(f.data);
          n_cr_pkt++;
          check(v == VC_BE && f.tail, "credit packet is one flit on VC 1");
          check(int'(h.len) >= MAX_PKT && int'(h.len) <= DEPTH, "credit count");
          check(int'(h.dst_ch) < NCH && !INTRA[int'(h.dst_ch) % NCH],
                "credit for a network channel");
          ncred[int'(h.dst_ch) % NCH] += int'(h.len);
        end else if (f.head) begin
          header_t h;
          int c;
          h = header_t'(f.data);
          check(h.len >= 1 && h.len <= MAX_PKT, "packet length");
          tx_len[v] = int'(h.len);
          tx_cnt[v] = 0;
          // source channel is the one whose destination is h.dst_ch
          c = (int'(h.dst_ch) + NCH - 1) % NCH;
          tx_ch[v] = c;
          hsum[c] += int'(h.len);
          check(h.dst_x == 0 && h.dst_y == 0, "destination node");
          check((GT[c] || PRIO[c]) == (v == VC_GT), "class on right VC");
          check(!INTRA[c], "intra-NI channel kept off the network");
          if (v == VC_GT) begin
            gt_open = 1;
            if (GT[c]) begin
              n_gt_pkt++;
              check(model_cyc == 1 && owner[model_slot] == c, "GT header in its TDM slot");
            end else begin
              n_pr_pkt++;
              if (model_cyc != 1) n_pr_off++;
              check(owner[(model_slot + 1) % TDM] < 0 || model_cyc + int'(h.len) <= SLOT,
                    "priority packet ends before the next allocated slot");
            end
          end else begin
            n_be_pkt++;
            be_open = 1;
          end
        end else begin
          check(f.data[31:28] == 4'(tx_ch[v]), "payload from packet's channel");
          tx_cnt[v]++;
          nsent[tx_ch[v]]++;
          check(f.tail == (tx_cnt[v] == tx_len[v]), "tail at header length");
          if (f.tail) begin
            if (v == VC_GT) gt_open = 0; else be_open = 0;
          end
        end
      end
      // the VC 0 packetizer is free after this cycle: the slot owner must start
      queued    = (o >= 0) ? nwr[o] - nsent[o] : 0;   // after this cycle's send
      // the owner also needs a credit: DEPTH, less words in its packets so
      // far, plus credits delivered before this cycle
      if (o >= 0 && DEPTH - hsum[o] + dcr[o] <= 0) queued = 0;
      expect_gt = (model_cyc == 0 && o >= 0 && queued > 0 && !gt_open) ? o : -1;
      for (int c = 0; c < NCH; c++) begin
        if (ch_write[c]) nwr[c]++;
        if (ch_read[c])  nread[c]++;
      end
      if (net_in.valid && net_in.flit.head) begin
        header_t ih;
        ih = header_t'(net_in.flit.data);
        if (ih.credit) dcr[int'(ih.dst_ch) % NCH] += int'(ih.len);
      end
    end
  end

  // ---------- writers and readers ----------
  int wseq[NCH], rseq[NCH];

  always @(negedge clk) begin
    ch_write = '0;
    ch_read  = '0;
    if (!rst) begin
      for (int c = 0; c < NCH; c++) begin
        ch_wdata[c] = {4'(c), 28'(wseq[c])};
        if (wseq[c] < NWORDS && ($urandom % 4) != 0) begin
          if (ch_not_full[c]) ch_write[c] = 1;
          else n_wr_full++;
        end
        if (ch_not_empty[c] && ($urandom % 3) == 0) ch_read[c] = 1;
        if (!ch_not_full[c]) check(ch_almost_full[c], "almost_full with full");
      end
    end
  end

  always @(posedge clk) begin
    if (!rst)
      for (int c = 0; c < NCH; c++) begin
        if (ch_write[c]) wseq[c]++;
        if (ch_read[c]) begin
          int src;
          src = (c + NCH - 1) % NCH;
          check(ch_rdata[c] == {4'(src), 28'(rseq[c])}, "word content and order");
          rseq[c]++;
        end
      end
  end

  initial begin
    for (int c = 0; c < NCH; c++) begin
      wseq[c] = 0; rseq[c] = 0; nwr[c] = 0; nsent[c] = 0;
      nread[c] = 0; ncred[c] = 0; hsum[c] = 0; dcr[c] = 0;
    end
    ch_write = '0; ch_read = '0;
    net_in = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    wait (rseq[0] == NWORDS && rseq[1] == NWORDS && rseq[2] == NWORDS &&
          rseq[3] == NWORDS && rseq[4] == NWORDS);
    repeat (20) @(posedge clk);
    for (int c = 0; c < NCH; c++) check(wseq[c] == NWORDS && rseq[c] == NWORDS, "all words");
    check(ch_not_empty == '0, "nothing extra");
    $display("GT packets %0d, BE packets %0d, GT flits inside BE packets %0d",
             n_gt_pkt, n_be_pkt, n_interleave);
    $display("writer found channel full %0d times, depacketizer back-pressure %0d cycles",
             n_wr_full, n_in_full);
    $display("words through the intra-NI channel %0d, credit packets %0d", rseq[3], n_cr_pkt);
    $display("priority packets %0d (%0d outside slot starts), owner slots used %0d",
             n_pr_pkt, n_pr_off, n_slot_use);
    check(n_gt_pkt > 0, "GT packets sent");
    check(n_pr_off > 0, "priority BE sent between slots");
    check(n_slot_use > 0, "slot owner started on time");
    check(n_be_pkt > 0, "BE packets sent");
    check(n_interleave > 0, "GT interleaved into BE packet");
    check(n_wr_full > 0, "outgoing FIFO back-pressure");
    check(n_in_full == 0, "credits keep the network free of back-pressure");
    check(n_cr_pkt > 0, "credit packets sent");
    for (int c = 0; c < NCH; c++)
      if (!INTRA[c]) check(NWORDS - ncred[c] < MAX_PKT, "all but the last batch credited back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
