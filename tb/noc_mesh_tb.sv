// noc_mesh_tb: self-checking test of the 2x2 network with its three NIs,
// driven directly on the NI buses, with end-to-end credits off so that the
// link-level back-pressure path is what holds traffic back, and channel 1
// switched to BE with priority (it then rides VC 0 between the GT slots).
//
// All eighteen channels (six per cluster) send numbered words at random
// rates; readers drain the incoming channels at random rates, so FIFOs and
// routers back up. Every word is tagged with its source node, source
// channel and sequence number. Checked: each word arrives exactly once, in
// order, on the incoming channel the routing table names (ch0 of node n to
// ch4 of node n+1, ch1 to ch2 of n+2, ch2 to ch1 of n+1, ch4 to ch0 of n+2,
// and the intra-NI pair ch3 <-> ch5 inside each node), and nothing else
// arrives. Also measured: the cycles between writing a lone
// word on a GT channel of an idle network and that word becoming readable,
// which must not exceed one TDM round plus the path through two routers.
module noc_mesh_tb;
  import noc_pkg::*;
  import noc_cfg_pkg::*;
  localparam int NWORDS = 200;

  logic clk = 0, rst = 1;
  logic [NCH-1:0] ch_write[NCLUST], ch_not_full[NCLUST], ch_almost_full[NCLUST];
  logic [NCH-1:0] ch_read[NCLUST], ch_not_empty[NCLUST], ch_almost_empty[NCLUST];
  word_t ch_wdata[NCLUST][NCH], ch_rdata[NCLUST][NCH];
  int checks = 0, failures = 0;
  int n_prio = 0;   // packets of ch1 (BE with priority) seen on VC 0
  int wseq[NCLUST][NCH], rseq[NCLUST][NCH];
  bit traffic = 0;
  bit all_done = 0;
  always @(posedge clk) begin
    bit d;
    d = 1;
    for (int n = 0; n < NCLUST; n++)
      for (int c = 0; c < NCH; c++)
        if (rseq[n][c] != NWORDS) d = 0;
    all_done <= d;
  end
  int n_full = 0;

  // Credits off: this test keeps the link-level back-pressure path covered;
  // the full-system test runs with credits on. Channel 1 is made BE with
  // priority, so GT, priority BE and plain BE (ch2) all share the network.
  noc_mesh #(.E2E(1'b0), .PRIO_MASK(6'b000010)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ch1 is the only channel routed to incoming ch2: count its headers on VC 0
  for (genvar n = 0; n < NCLUST; n++) begin : g_pmon
    link_t   l;
    header_t h;
    assign l = dut.g_node[n].g_ni.u_ni.net_out;
    assign h = header_t'(l.flit.data);
    always @(posedge clk)
      if (!rst && l.valid && l.flit.head && !h.credit && h.dst_ch == 4'd2) begin
        check(l.vc == 1'(VC_GT), "priority channel on VC 0");
        n_prio++;
      end
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // source of incoming channel c at node n
  function automatic int src_node(int n, int c);
    case (c)
      0: return (n + 1) % 3;   // from ch4 of n+1
      1: return (n + 2) % 3;   // from ch2 of n-1
      2: return (n + 1) % 3;   // from ch1 of n+1 (its n+2 is n)
      4: return (n + 2) % 3;   // from ch0 of n-1
      default: return n;       // intra-NI: ch3 <-> ch5
    endcase
  endfunction
  function automatic int src_ch(int c);
    case (c)
      0: return 4;
      1: return 2;
      2: return 1;
      3: return 5;
      4: return 0;
      default: return 3;
    endcase
  endfunction

  always @(negedge clk) begin
    if (traffic) for (int n = 0; n < NCLUST; n++) begin
      ch_write[n] = '0;
      ch_read[n]  = '0;
      for (int c = 0; c < NCH; c++) begin
        ch_wdata[n][c] = {4'(n), 4'(c), 24'(wseq[n][c])};
        if (wseq[n][c] < NWORDS && ($urandom % 3) == 0) begin
          if (ch_not_full[n][c]) ch_write[n][c] = 1;
          else n_full++;
        end
        if (ch_not_empty[n][c] && ($urandom % 4) == 0) ch_read[n][c] = 1;
      end
    end
  end

  always @(posedge clk)
    if (!rst)
      for (int n = 0; n < NCLUST; n++)
        for (int c = 0; c < NCH; c++) begin
          if (ch_write[n][c]) wseq[n][c]++;
          if (ch_read[n][c]) begin
            check(ch_rdata[n][c] == {4'(src_node(n, c)), 4'(src_ch(c)), 24'(rseq[n][c])},
                  "word source, channel and order");
            rseq[n][c]++;
          end
        end

  initial begin
    int t0, lat;
    for (int n = 0; n < NCLUST; n++) begin
      ch_write[n] = '0; ch_read[n] = '0;
      for (int c = 0; c < NCH; c++) begin wseq[n][c] = 0; rseq[n][c] = 0; end
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (7) @(posedge clk);

    // Lone GT word, node 0 ch0 -> node 1 ch4 (one hop): bounded latency.
    @(negedge clk);
    ch_wdata[0][0] = 32'h0000_0000;
    ch_write[0][0] = 1;
    @(posedge clk);
    t0 = 0;
    #1 ch_write[0][0] = 0;
    while (!ch_not_empty[1][4]) begin @(posedge clk); #1 t0++; end
    lat = t0;
    $display("lone GT word readable after %0d cycles", lat);
    check(lat <= TDM_SIZE * 5 + 8, "GT latency within one TDM round plus path");
    @(negedge clk) ch_read[1][4] = 1;
    @(posedge clk);
    #1 ch_read[1][4] = 0;

    traffic = 1;
    wait (all_done);
    repeat (50) @(posedge clk);
    for (int n = 0; n < NCLUST; n++)
      for (int c = 0; c < NCH; c++) begin
        check(rseq[n][c] == NWORDS, "all words received");
        check(!ch_not_empty[n][c], "nothing extra received");
      end
    $display("writers found a channel full %0d times", n_full);
    check(n_full > 0, "back-pressure reached the writers");
    $display("priority BE packets on VC 0: %0d", n_prio);
    check(n_prio > 0, "BE with priority sent on VC 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
