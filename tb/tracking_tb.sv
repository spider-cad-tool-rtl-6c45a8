// tracking_tb: the object-tracking case study run as a three-stage pipeline
// over the whole network IP, configured as in that study for guaranteed
// traffic only: channels 0, 1, 2 and 4 are all GT, one TDM slot each.
//
// Cluster 0 plays the hard processor (PPC), cluster 1 the first soft
// processor (MB0), cluster 2 the second (MB1). Processors are behavioural
// tasks on the slave wrapper bus, memories are arrays behind the master
// wrappers. Images are scaled down to NPIX one-word pixels. Per frame:
//   PPC: loads a new image, filters noise by averaging it with the previous
//        one, subtracts a fixed background, writes the result into MB0's
//        memory (remote write, ch0) and tells MB0 (message, ch2).
//   MB0: woken by its interrupt on ch1, reads the frame from its own memory
//        (intra-NI ch3), thresholds it at the frame mean, writes the binary
//        image into MB1's memory (remote write, ch0), tells MB1 (ch2) and
//        hands the input buffer back to PPC (ch1).
//   MB1: woken on ch1, reads the binary image from its own memory, dilates,
//        erodes, computes the pixel count and the centre of gravity, writes
//        image and result into PPC's memory (remote write, ch0), tells PPC
//        (ch2) and hands its buffer back to MB0 (ch1).
// Each stage has two buffers, so all three work on different frames at once.
// Checked: every stage output in memory and the final result of every frame
// against a reference computed here from the raw images; each processor
// computes only from what it read through the network.
// In the original study MB1 pulls its input from MB0's memory. Here MB0
// pushes it, because this network's channel 0 of MB1 reaches only cluster
// 0's memory; the data crossing the network is the same.
module tracking_tb;
  import noc_pkg::*;
  import noc_cfg_pkg::*;
  localparam int NPIX   = 48;     // pixels per (scaled-down) image
  localparam int FRAMES = 6;
  localparam int MEMW   = 1024;
  localparam logic [31:0] SB = 32'h8000_0000;
  // word addresses
  localparam int IN_BUF  = 0;      // MB0: two input buffers of NPIX
  localparam int BIN_BUF = 128;    // MB1: two binary-image buffers
  localparam int OUT_BUF = 256;    // PPC: one result area per frame
  localparam int OUT_LEN = NPIX + 2;

  logic clk = 0, rst = 1;
  opb_req_t s_req[NCLUST];
  opb_rsp_t s_rsp[NCLUST];
  logic     irq  [NCLUST];
  opb_req_t m_req[NCLUST];
  opb_rsp_t m_rsp[NCLUST];
  int checks = 0, failures = 0;

  // GT-only network (every network channel guaranteed): the four network
  // channels of each NI own one slot each.
  localparam logic [TDM_SIZE-1:0][CHID_W:0] GT_SLOTS = {5'h14, 5'h12, 5'h11, 5'h10};
  noc_ip #(.GT_MASK(6'b010111), .SLOTS(GT_SLOTS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------- memories behind the master wrappers ----------
  word_t mem[NCLUST][MEMW];
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

  // ---------- processor bus access ----------
  task automatic bus(int k, bit rnw, logic [11:0] off, word_t wd, output word_t rd);
    @(negedge clk);
    s_req[k].select = 1;
    s_req[k].rnw    = rnw;
    s_req[k].addr   = SB + 32'(k) * 32'h1000 + 32'(off);
    s_req[k].wdata  = wd;
    do @(negedge clk); while (!s_rsp[k].xfer_ack);
    rd = s_rsp[k].rdata;
    @(posedge clk);
    #1 s_req[k] = '0;
  endtask

  task automatic send(int k, int c, word_t w);
    word_t st, r;
    do bus(k, 1, 12'h000, '0, st); while (!st[4*c]);
    bus(k, 0, 12'(12'h100 + 4 * c), w, r);
  endtask

  task automatic recv(int k, int c, output word_t w);
    word_t st;
    do bus(k, 1, 12'h000, '0, st); while (!st[4*c+2]);
    bus(k, 1, 12'(12'h100 + 4 * c), '0, w);
  endtask

  // remote write through ch0, local read through ch3
  task automatic remote_write(int k, int addr, const ref word_t d[NPIX + 2], input int n);
    send(k, 0, make_cmd(CMD_WRITE, 16'(n)));
    send(k, 0, 32'(addr * 4));
    for (int i = 0; i < n; i++) send(k, 0, d[i]);
  endtask

  task automatic local_read(int k, int addr, ref word_t d[NPIX + 2], input int n);
    send(k, 3, make_cmd(CMD_READ, 16'(n)));
    send(k, 3, 32'(addr * 4));
    for (int i = 0; i < n; i++) recv(k, 3, d[i]);
  endtask

  // wait for a message on ch1, using the interrupt
  task automatic wait_msg(int k, output word_t w);
    while (!irq[k]) @(posedge clk);
    n_irq++;
    recv(k, 1, w);
  endtask

  // ---------- the processing steps (software of each processor) ----------
  word_t raw[FRAMES][NPIX], bg[NPIX];

  function automatic void ppc_step(int f, ref word_t o[NPIX + 2]);
    for (int i = 0; i < NPIX; i++) begin
      int a, b, avg;
      a   = int'(raw[f][i]);
      b   = (f > 0) ? int'(raw[f-1][i]) : a;
      avg = (a + b) / 2;
      o[i] = word_t'((avg > int'(bg[i])) ? avg - int'(bg[i]) : int'(bg[i]) - avg);
    end
  endfunction

  function automatic void mb0_step(const ref word_t d[NPIX + 2], ref word_t o[NPIX + 2]);
    int sum;
    sum = 0;
    for (int i = 0; i < NPIX; i++) sum += int'(d[i]);
    for (int i = 0; i < NPIX; i++) o[i] = word_t'(int'(d[i]) * NPIX > sum);
  endfunction

  function automatic void mb1_step(const ref word_t d[NPIX + 2], ref word_t o[NPIX + 2]);
    bit dil[NPIX], ero[NPIX];
    int cnt, cx;
    for (int i = 0; i < NPIX; i++)
      dil[i] = d[i][0] || (i > 0 && d[i-1][0]) || (i < NPIX - 1 && d[i+1][0]);
    for (int i = 0; i < NPIX; i++)
      ero[i] = dil[i] && (i == 0 || dil[i-1]) && (i == NPIX - 1 || dil[i+1]);
    cnt = 0;
    cx  = 0;
    for (int i = 0; i < NPIX; i++) begin
      o[i] = word_t'(ero[i]);
      cnt += int'(ero[i]);
      cx  += ero[i] ? i : 0;
    end
    o[NPIX]     = word_t'(cnt);
    o[NPIX + 1] = word_t'((cnt > 0) ? cx / cnt : 0);
  endfunction

  // ---------- the three processors ----------
  int n_irq = 0, n_frames = 0, n_overlap = 0;
  int stage_frame[NCLUST] = '{-1, -1, -1};

  task automatic ppc();
    word_t o[NPIX + 2], w;
    int free_in = 2;
    for (int f = 0; f < FRAMES; f++) begin
      stage_frame[0] = f;
      ppc_step(f, o);
      while (free_in == 0) begin
        recv(0, 2, w);               // buffer handed back by MB0
        free_in++;
      end
      free_in--;
      remote_write(0, IN_BUF + (f % 2) * NPIX, o, NPIX);
      send(0, 2, word_t'(f));        // frame ready, to MB0
    end
    stage_frame[0] = -1;
    // wait for MB1 to finish every frame, and collect the buffers back
    for (int f = 0; f < FRAMES; f++) begin
      word_t st;
      do begin
        bus(0, 1, 12'h000, '0, st);
        if (st[4*2+2]) begin recv(0, 2, w); free_in++; end
      end while (!st[4*1+2]);
      recv(0, 1, w);
      check(int'(w) == f, "results arrive in frame order");
      n_frames++;
    end
  endtask

  task automatic mb0();
    word_t d[NPIX + 2], o[NPIX + 2], w;
    int free_out = 2;
    bus(1, 0, 12'h004, 32'h2, w);    // interrupt on messages (ch1)
    for (int f = 0; f < FRAMES; f++) begin
      wait_msg(1, w);
      check(int'(w) == f, "MB0 frame order");
      stage_frame[1] = f;
      if (stage_frame[0] >= 0 && stage_frame[0] != f) n_overlap++;
      local_read(1, IN_BUF + (f % 2) * NPIX, d, NPIX);
      send(1, 1, word_t'(f));        // input buffer free again, to PPC
      mb0_step(d, o);
      while (free_out == 0) begin
        recv(1, 2, w);               // buffer handed back by MB1
        free_out++;
      end
      free_out--;
      remote_write(1, BIN_BUF + (f % 2) * NPIX, o, NPIX);
      send(1, 2, word_t'(f));        // binary image ready, to MB1
    end
    stage_frame[1] = -1;
  endtask

  task automatic mb1();
    word_t d[NPIX + 2], o[NPIX + 2], w;
    bus(2, 0, 12'h004, 32'h2, w);
    for (int f = 0; f < FRAMES; f++) begin
      wait_msg(2, w);
      check(int'(w) == f, "MB1 frame order");
      stage_frame[2] = f;
      if (stage_frame[1] >= 0 && stage_frame[1] != f) n_overlap++;
      local_read(2, BIN_BUF + (f % 2) * NPIX, d, NPIX);
      send(2, 1, word_t'(f));        // buffer free again, to MB0
      mb1_step(d, o);
      remote_write(2, OUT_BUF + f * OUT_LEN, o, OUT_LEN);
      send(2, 2, word_t'(f));        // result stored, to PPC
    end
    stage_frame[2] = -1;
  endtask

  // ---------- reference and run ----------
  initial begin
    word_t a[NPIX + 2], b[NPIX + 2], c[NPIX + 2];
    for (int k = 0; k < NCLUST; k++) begin
      s_req[k] = '0;
      for (int i = 0; i < MEMW; i++) mem[k][i] = '0;
    end
    for (int i = 0; i < NPIX; i++) bg[i] = word_t'($urandom % 64);
    for (int f = 0; f < FRAMES; f++)
      for (int i = 0; i < NPIX; i++)
        // a bright object drifting across a noisy scene
        raw[f][i] = word_t'(((i >= 4 * f + 3 && i < 4 * f + 13) ? 200 : 0) +
                            ($urandom % 64));
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (2) @(posedge clk);
    fork
      ppc();
      mb0();
      mb1();
    join
    repeat (20) @(posedge clk);

    for (int f = 0; f < FRAMES; f++) begin
      ppc_step(f, a);
      mb0_step(a, b);
      mb1_step(b, c);
      for (int i = 0; i < OUT_LEN; i++)
        check(mem[0][OUT_BUF + f * OUT_LEN + i] == c[i], "tracking result in PPC memory");
      if (f >= FRAMES - 2) begin
        for (int i = 0; i < NPIX; i++) begin
          check(mem[1][IN_BUF + (f % 2) * NPIX + i] == a[i], "filtered frame in MB0 memory");
          check(mem[2][BIN_BUF + (f % 2) * NPIX + i] == b[i], "binary frame in MB1 memory");
        end
      end
      $display("frame %0d: object pixels %0d, centre at pixel %0d", f, c[NPIX], c[NPIX + 1]);
      check(c[NPIX] > 0, "object found");
    end
    $display("frames %0d, interrupts %0d, stage overlaps %0d, finished at cycle %0t",
             n_frames, n_irq, n_overlap, $time / 10);
    check(n_frames == FRAMES, "all frames through the pipeline");
    check(n_irq == 2 * FRAMES, "one interrupt per frame per soft processor");
    check(n_overlap > 0, "stages worked on different frames at once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
