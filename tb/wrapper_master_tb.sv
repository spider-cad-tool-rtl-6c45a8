// wrapper_master_tb: self-checking test of the master wrapper between a
// queue model of two NI channels and a bus memory model.
//
// Each channel receives a random stream of whole commands: writes and reads
// of 1..6 words in its own region of the memory, plus a few commands with an
// unknown opcode (command word and address only), which must be dropped.
// The memory answers after a random 1..3 cycles and, like a real slave,
// ignores the bus while reset is held. The reply FIFOs accept a
// word only when a random ready allows, so the wrapper must wait.
// Checked: the final memory equals a reference updated in command order;
// every read command returns its words, in order, on its own channel; the
// master holds select with a stable request until the acknowledge and drops
// it the cycle after; both channels are served.
module wrapper_master_tb;
  import noc_pkg::*;
  localparam int NCH = 2, ODEPTH = 4, NCMD = 60, MEMW = 256;

  logic clk = 0, rst = 1;
  opb_req_t opb_req;
  opb_rsp_t opb_rsp;
  logic [NCH-1:0] ch_write, ch_not_full, ch_almost_full, ch_read, ch_not_empty, ch_almost_empty;
  word_t ch_wdata[NCH], ch_rdata[NCH];
  int checks = 0, failures = 0;
  int n_wr = 0, n_rd = 0, n_bad = 0;

  wrapper_master #(.NCH(NCH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------- NI model ----------
  word_t iq[NCH][$], oq[NCH][$], expq[NCH][$];
  bit    out_rdy[NCH];
  // The model's outputs are refreshed shortly after each clock edge and
  // at the falling edge, never at the rising edge the design samples.
  task automatic upd();
    for (int c = 0; c < NCH; c++) begin
      ch_not_full[c]     = out_rdy[c] && oq[c].size() < ODEPTH;
      ch_almost_full[c]  = oq[c].size() >= ODEPTH - 1;
      ch_not_empty[c]    = iq[c].size() > 0;
      ch_almost_empty[c] = iq[c].size() <= 1;
      ch_rdata[c]        = (iq[c].size() > 0) ? iq[c][0] : 32'hDEAD_BEEF;
    end
  endtask
  always @(posedge clk) #1 upd();
  always @(negedge clk) #1 upd();
  always @(negedge clk)
    for (int c = 0; c < NCH; c++) begin
      out_rdy[c] = ($urandom % 3) != 0;
      if (oq[c].size() > 0 && ($urandom % 2) != 0) begin
        word_t w;
        w = oq[c].pop_front();
        check(expq[c].size() > 0 && w == expq[c][0], "read reply word");
        if (expq[c].size() > 0) void'(expq[c].pop_front());
      end
    end
  always @(posedge clk)
    if (!rst) for (int c = 0; c < NCH; c++) begin
      if (ch_write[c]) begin
        check(ch_not_full[c], "push into full reply FIFO");
        oq[c].push_back(ch_wdata[c]);
      end
      if (ch_read[c]) begin
        check(iq[c].size() > 0, "pop of empty channel");
        void'(iq[c].pop_front());
      end
    end

  // ---------- bus memory model ----------
  word_t mem[MEMW], ref_mem[MEMW];
  int    wait_cnt = -1;
  opb_req_t held;
  bit    ack_prev = 0;
  always @(posedge clk) begin
    opb_rsp <= '0;
    ack_prev <= opb_rsp.xfer_ack;
    if (ack_prev) check(!opb_req.select, "select dropped after acknowledge");
    if (!rst && opb_req.select && !opb_rsp.xfer_ack) begin
      if (wait_cnt < 0) begin
        wait_cnt = $urandom % 3;
        held = opb_req;
      end else begin
        check(opb_req == held, "request stable until acknowledge");
      end
      if (wait_cnt == 0) begin
        int a;
        a = int'(opb_req.addr >> 2) % MEMW;
        opb_rsp.xfer_ack <= 1;
        if (opb_req.rnw) opb_rsp.rdata <= mem[a];
        else mem[a] = opb_req.wdata;
        wait_cnt = -1;
      end else wait_cnt--;
    end
  end

  // ---------- command generator ----------
  task automatic gen(int c);
    for (int k = 0; k < NCMD; k++) begin
      int n, base, kind;
      n = 1 + $urandom % 6;
      base = c * 128 + $urandom % (128 - n);
      kind = $urandom % 10;
      if (kind < 5) begin
        iq[c].push_back(make_cmd(CMD_WRITE, 16'(n)));
        iq[c].push_back(32'(base * 4));
        for (int j = 0; j < n; j++) begin
          word_t w = $urandom;
          iq[c].push_back(w);
          ref_mem[base + j] = w;
        end
        n_wr++;
      end else if (kind < 9) begin
        iq[c].push_back(make_cmd(CMD_READ, 16'(n)));
        iq[c].push_back(32'(base * 4));
        for (int j = 0; j < n; j++) expq[c].push_back(ref_mem[base + j]);
        n_rd++;
      end else begin
        iq[c].push_back(32'hF000_0003);
        iq[c].push_back(32'(base * 4));
        n_bad++;
      end
    end
  endtask

  initial begin
    opb_rsp = '0;
    for (int a = 0; a < MEMW; a++) begin mem[a] = 32'(a) * 32'h0101_0101; ref_mem[a] = mem[a]; end
    for (int c = 0; c < NCH; c++) out_rdy[c] = 1;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int c = 0; c < NCH; c++) gen(c);
    wait (iq[0].size() == 0 && iq[1].size() == 0 && expq[0].size() == 0 && expq[1].size() == 0);
    // the bus side may still be draining its write FIFO
    repeat (100) @(posedge clk);
    for (int a = 0; a < MEMW; a++) check(mem[a] == ref_mem[a], "memory contents");
    for (int c = 0; c < NCH; c++) check(expq[c].size() == 0 && oq[c].size() == 0, "all replies");
    check(!opb_req.select, "bus idle at end");
    $display("write cmds %0d, read cmds %0d, dropped cmds %0d", n_wr, n_rd, n_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
