// noc_ip_tb: end-to-end test of the network IP with all parameters at their
// defaults: three processors and three memories, modelled as bus tasks and
// arrays, exchange traffic through the slave wrappers, the NIs, the router
// mesh and the master wrappers.
//
// Each processor k runs, concurrently with the others, ROUNDS rounds of:
//   1. a remote write (1..8 words) into the memory of cluster k+1: it
//      polls STATUS before every word it writes to channel 0 (waiting while
//      "not full" is low) and sends the write command, address and data;
//   2. a remote read of the same words: it sends a read command and the
//      address on channel 0, waits for the interrupt, then for each word
//      polls STATUS and reads channel 0, and compares with what it wrote;
//   3. message passing: up to 8 words on channel 1 (to cluster k+2) and on
//      channel 2 (to cluster k+1);
//   4. a write and a read-back of its own cluster's memory through channel
//      3, the intra-NI channel to its own master wrapper.
// While waiting, a processor drains the messages arriving on its channels 1
// and 2 and checks their source and order. At the end the memories are
// compared with reference copies, every message must have arrived, and an
// overflow phase writes too many words to a channel whose receiver is not
// draining: STATUS must show the channel full, and the dropped words must
// set the dropped-write error bit; every surviving word
// must still arrive in order. A read of an empty channel must set its error
// bit. A monitor on every router output counts GT packets, BE packets and
// cycles where GT traffic froze a BE packet, and credit packets; no NI may
// ever refuse a flit, as end-to-end credits are on. Counted and required:
// GT and BE packets, credit packets, a frozen BE packet, intra-NI accesses,
// remote writes,
// remote reads,
// interrupts, messages, a full outgoing channel seen in STATUS, a dropped
// write and an empty read.
module noc_ip_tb;
  import noc_pkg::*;
  import noc_cfg_pkg::*;
  localparam int ROUNDS = 60;
  localparam int MEMW   = 1024;
  localparam logic [31:0] SB = 32'h8000_0000;

  logic clk = 0, rst = 1;
  opb_req_t s_req[NCLUST];
  opb_rsp_t s_rsp[NCLUST];
  logic     irq  [NCLUST];
  opb_req_t m_req[NCLUST];
  opb_rsp_t m_rsp[NCLUST];
  int checks = 0, failures = 0;

  noc_ip dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------- memories behind the master wrappers ----------
  word_t mem[NCLUST][MEMW], ref_mem[NCLUST][MEMW];
  always @(posedge clk)
    for (int k = 0; k < NCLUST; k++) begin
      m_rsp[k] <= '0;
      if (!rst && m_req[k].select && !m_rsp[k].xfer_ack) begin
        int a;
        a = int'(m_req[k].addr >> 2) % MEMW;
        m_rsp[k].xfer_ack <= 1'b1;
        if (m_req[k].rnw) m_rsp[k].rdata <= mem[k][a];
        else mem[k][a] = m_req[k].wdata;
      end
    end

  // ---------- network monitor ----------
  // Watches every router output: counts GT and BE packets and the cycles in
  // which a GT flit took an output while a BE packet was in mid-flight there
  // (the BE arbiter frozen).
  int n_gt_pkt = 0, n_be_pkt = 0, n_freeze = 0, n_credit = 0, n_ni_bp = 0;
  for (genvar n = 0; n < NNODE; n++) begin : g_mon
    for (genvar p = 0; p < 3; p++) begin : g_port
      bit be_open = 0;
      link_t l;
      assign l = dut.u_mesh.g_node[n].u_router.out_link[p];
      always @(posedge clk)
        if (!rst && l.valid) begin
          if (l.vc == 1'(VC_GT)) begin
            if (be_open) n_freeze++;
            if (l.flit.head) n_gt_pkt++;
          end else begin
            if (l.flit.head) begin
              header_t h;
              h = header_t'(l.flit.data);
              if (h.credit) n_credit++;
              else n_be_pkt++;
              be_open = !l.flit.tail;
            end else if (l.flit.tail) be_open = 0;
          end
        end
    end
  end

  // With end-to-end credits an NI never refuses a flit from its router.
  for (genvar n = 0; n < NCLUST; n++) begin : g_bp
    always @(posedge clk)
      if (!rst && dut.u_mesh.g_node[n].u_router.out_ready[0] != '1) n_ni_bp++;
  end

  // ---------- processor bus tasks ----------
  task automatic bus(int k, bit rnw, logic [11:0] off, word_t wd, output word_t rd);
    int n;
    @(negedge clk);
    s_req[k].select = 1;
    s_req[k].rnw    = rnw;
    s_req[k].addr   = SB + 32'(k) * 32'h1000 + 32'(off);
    s_req[k].wdata  = wd;
    rd = '0;
    for (n = 0; n < 8; n++) begin
      @(negedge clk);
      if (s_rsp[k].xfer_ack) begin
        rd = s_rsp[k].rdata;
        break;
      end
    end
    check(n == 0, "slave wrapper acknowledges in one cycle");
    @(posedge clk);
    #1 s_req[k] = '0;
  endtask

  task automatic wr(int k, logic [11:0] off, word_t d);
    word_t r;
    bus(k, 0, off, d, r);
  endtask

  task automatic rd(int k, logic [11:0] off, output word_t d);
    bus(k, 1, off, '0, d);
  endtask

  // ---------- message bookkeeping ----------
  // word = {source node, source channel, sequence}
  int msg_sent[NCLUST][3], msg_rcvd[NCLUST][3];
  int n_local = 0, n_write = 0, n_read = 0, n_irq = 0, n_full = 0, n_msg = 0, n_drop = 0, n_empty = 0;
  bit draining[NCLUST];
  bit done[NCLUST] = '{0, 0, 0};
  int total_sent = 0, total_rcvd = 0;

  // Read every message waiting on channels 1 and 2 of cluster k.
  task automatic drain(int k);
    word_t st, d;
    if (!draining[k]) return;
    rd(k, 12'h000, st);
    for (int c = 1; c <= 2; c++)
      if (st[4*c+2]) begin
        int sn, sc;
        sn = (c == 1) ? (k + 2) % 3 : (k + 1) % 3;
        sc = 3 - c;
        rd(k, 12'(12'h100 + 4 * c), d);
        check(d[31:28] == 4'(sn) && d[27:24] == 4'(sc), "message source");
        check(int'(d[23:0]) >= msg_rcvd[k][c], "message order");
        msg_rcvd[k][c] = int'(d[23:0]) + 1;
        total_rcvd++;
      end
  endtask

  task automatic send_word(int k, int c, word_t w);
    word_t st;
    forever begin
      rd(k, 12'h000, st);
      if (st[4*c]) break;
      n_full++;
      drain(k);
    end
    wr(k, 12'(12'h100 + 4 * c), w);
  endtask

  task automatic send_msg(int k, int c);
    send_word(k, c, {4'(k), 4'(c), 24'(msg_sent[k][c])});
    msg_sent[k][c]++;
    total_sent++;
    n_msg++;
  endtask

  task automatic processor(int k);
    int tgt;
    tgt = (k + 1) % 3;
    wr(k, 12'h004, 32'h9);   // interrupt on read replies (channels 0 and 3)
    for (int r = 0; r < ROUNDS; r++) begin
      int n, base;
      word_t d, st;
      n    = 1 + $urandom % 8;
      base = k * 256 + $urandom % (256 - n);
      // 1. remote write
      send_word(k, 0, make_cmd(CMD_WRITE, 16'(n)));
      send_word(k, 0, 32'(base * 4));
      for (int j = 0; j < n; j++) begin
        word_t w;
        w = $urandom;
        ref_mem[tgt][base + j] = w;
        send_word(k, 0, w);
      end
      n_write++;
      // 2. remote read of the same words
      send_word(k, 0, make_cmd(CMD_READ, 16'(n)));
      send_word(k, 0, 32'(base * 4));
      while (!irq[k]) begin
        drain(k);
        @(posedge clk);
      end
      n_irq++;
      for (int j = 0; j < n; j++) begin
        do begin
          rd(k, 12'h000, st);
          if (!st[2]) drain(k);
        end while (!st[2]);
        rd(k, 12'h100, d);
        check(d == ref_mem[tgt][base + j], "remote read data");
      end
      n_read++;
      // 3. messages
      n = 1 + $urandom % 8;
      for (int j = 0; j < n; j++) send_msg(k, 1);
      n = 1 + $urandom % 8;
      for (int j = 0; j < n; j++) send_msg(k, 2);
      drain(k);
      // 4. own memory through the intra-NI channel
      n    = 1 + $urandom % 8;
      base = k * 256 + $urandom % (256 - n);
      send_word(k, 3, make_cmd(CMD_WRITE, 16'(n)));
      send_word(k, 3, 32'(base * 4));
      for (int j = 0; j < n; j++) begin
        word_t w;
        w = $urandom;
        ref_mem[k][base + j] = w;
        send_word(k, 3, w);
      end
      send_word(k, 3, make_cmd(CMD_READ, 16'(n)));
      send_word(k, 3, 32'(base * 4));
      for (int j = 0; j < n; j++) begin
        do begin
          rd(k, 12'h000, st);
          if (!st[14]) drain(k);
        end while (!st[14]);
        rd(k, 12'h10C, d);
        check(d == ref_mem[k][base + j], "local read data");
      end
      n_local++;
    end
  endtask

  initial begin
    word_t d;
    int t0;
    for (int k = 0; k < NCLUST; k++) begin
      s_req[k] = '0;
      draining[k] = 1;
      for (int c = 0; c < 3; c++) begin msg_sent[k][c] = 0; msg_rcvd[k][c] = 0; end
      for (int a = 0; a < MEMW; a++) begin
        mem[k][a] = 32'(k * MEMW + a);
        ref_mem[k][a] = mem[k][a];
      end
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (2) @(posedge clk);

    // Read of an empty channel returns 0 and sets the error bit.
    rd(0, 12'h100, d);
    check(d == 0, "empty read returns 0");
    rd(0, 12'h00C, d);
    check(d == 32'h0001_0000, "empty read error bit");
    if (d[16]) n_empty++;

    // A processor that has finished its rounds keeps draining messages
    // until all have finished.
    fork
      begin processor(0); done[0] = 1; while (!(done[0] && done[1] && done[2])) drain(0); end
      begin processor(1); done[1] = 1; while (!(done[0] && done[1] && done[2])) drain(1); end
      begin processor(2); done[2] = 1; while (!(done[0] && done[1] && done[2])) drain(2); end
    join

    // Let every message arrive.
    t0 = 0;
    while (total_rcvd < total_sent && t0 < 2000) begin
      for (int k = 0; k < NCLUST; k++) drain(k);
      t0++;
    end
    check(total_rcvd == total_sent, "every message received");
    for (int k = 0; k < NCLUST; k++)
      for (int c = 1; c <= 2; c++) begin
        int sn, sc;
        sn = (c == 1) ? (k + 2) % 3 : (k + 1) % 3;
        sc = 3 - c;
        check(msg_rcvd[k][c] == msg_sent[sn][sc], "message count per channel");
      end
    for (int k = 0; k < NCLUST; k++)
      for (int a = 0; a < MEMW; a++)
        check(mem[k][a] == ref_mem[k][a], "memory contents");

    // Overflow: cluster 1 stops draining; cluster 0 sends 40 words on its
    // channel 2 (to cluster 1), reading STATUS before each word but writing
    // even when the channel is full.
    draining[1] = 0;
    for (int j = 0; j < 40; j++) begin
      rd(0, 12'h000, d);
      if (!d[8]) n_full++;
      wr(0, 12'h108, {4'(0), 4'(2), 24'(msg_sent[0][2] + j)});
    end
    rd(0, 12'h00C, d);
    check(d[2], "dropped-write error bit");
    if (d[2]) n_drop++;
    begin
      int got, last;
      word_t st;
      got = 0;
      last = msg_sent[0][2] - 1;
      for (int t = 0; t < 400; t++) begin
        rd(1, 12'h000, st);
        if (st[6]) begin
          rd(1, 12'h104, d);
          check(int'(d[23:0]) > last && d[31:24] == 8'h02, "surviving words in order");
          last = int'(d[23:0]);
          got++;
        end
      end
      $display("overflow: %0d of 40 words survived", got);
      check(got > 0 && got < 40, "some but not all words survived");
    end

    $display("remote writes %0d, remote reads %0d, interrupts %0d, messages %0d",
             n_write, n_read, n_irq, n_msg);
    $display("full channel seen %0d times, dropped-write errors %0d, empty reads %0d",
             n_full, n_drop, n_empty);
    $display("router hops: GT packets %0d, BE packets %0d, BE frozen by GT %0d cycles",
             n_gt_pkt, n_be_pkt, n_freeze);
    check(n_gt_pkt > 0, "GT packets crossed routers");
    check(n_be_pkt > 0, "BE packets crossed routers");
    check(n_freeze > 0, "GT froze BE in a router");
    $display("credit packets %0d, cycles an NI refused a flit %0d", n_credit, n_ni_bp);
    check(n_credit > 0, "credit packets returned");
    check(n_ni_bp == 0, "credits keep NIs from back-pressuring the network");
    $display("local accesses through the intra-NI channel %0d", n_local);
    check(n_local > 0, "intra-NI accesses happened");
    check(n_write > 0, "remote writes happened");
    check(n_read > 0, "remote reads happened");
    check(n_irq > 0, "interrupts happened");
    check(n_msg > 0, "messages happened");
    check(n_full > 0, "full channel seen");
    check(n_drop > 0, "dropped write happened");
    check(n_empty > 0, "empty read happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
