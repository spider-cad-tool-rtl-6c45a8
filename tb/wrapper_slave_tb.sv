// wrapper_slave_tb: self-checking test of the slave wrapper with a queue
// model of the NI channels behind it and a bus master driven by tasks.
//
// Checked: every access is acknowledged exactly one cycle after select
// (two-cycle access) and addresses outside the window get no acknowledge;
// writes to DATA[c] reach outgoing channel c in order; reads of DATA[c] pop
// incoming channel c in order; a write to a full channel is dropped and a
// read of an empty one returns 0, each setting its ERROR bit, and reading
// ERROR clears it; STATUS shows the four flags of every channel; IRQ_EN,
// IRQ_PEND and the interrupt line follow the incoming data.
module wrapper_slave_tb;
  import noc_pkg::*;
  localparam int NCH = 3, ODEPTH = 4;
  localparam logic [31:0] BASE = 32'h8000_0000;

  logic clk = 0, rst = 1;
  opb_req_t opb_req;
  opb_rsp_t opb_rsp;
  logic irq;
  logic [NCH-1:0] ch_write, ch_not_full, ch_almost_full, ch_read, ch_not_empty, ch_almost_empty;
  word_t ch_wdata, ch_rdata[NCH];
  int checks = 0, failures = 0;
  int n_drop = 0, n_empty_rd = 0, n_irq = 0;

  wrapper_slave #(.NCH(NCH), .BASE_ADDR(BASE), .ADDR_SPAN(12)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------- NI model ----------
  word_t oq[NCH][$], iq[NCH][$];
  // The model's outputs are refreshed shortly after each clock edge and
  // at the falling edge, never at the rising edge the design samples.
  task automatic upd();
    for (int c = 0; c < NCH; c++) begin
      ch_not_full[c]     = oq[c].size() < ODEPTH;
      ch_almost_full[c]  = oq[c].size() >= ODEPTH - 1;
      ch_not_empty[c]    = iq[c].size() > 0;
      ch_almost_empty[c] = iq[c].size() <= 1;
      ch_rdata[c]        = (iq[c].size() > 0) ? iq[c][0] : 32'hDEAD_BEEF;
    end
  endtask
  always @(posedge clk) #1 upd();
  always @(negedge clk) #1 upd();
  always @(posedge clk)
    if (!rst) for (int c = 0; c < NCH; c++) begin
      if (ch_write[c]) begin
        check(oq[c].size() < ODEPTH, "write strobe to full channel");
        oq[c].push_back(ch_wdata);
      end
      if (ch_read[c]) begin
        check(iq[c].size() > 0, "read strobe on empty channel");
        void'(iq[c].pop_front());
      end
    end

  // ---------- bus master ----------
  task automatic bus(input bit rnw, input logic [31:0] a, input word_t wd, output word_t rd,
                     output bit acked);
    int n = 0;
    @(negedge clk);
    opb_req.select = 1; opb_req.rnw = rnw; opb_req.addr = a; opb_req.wdata = wd;
    acked = 0;
    rd = '0;
    // the acknowledge is sampled at the clock edge that ends its cycle;
    // select drops right after that edge
    for (n = 1; n <= 6; n++) begin
      @(negedge clk);
      if (opb_rsp.xfer_ack) begin
        acked = 1;
        rd = opb_rsp.rdata;
        break;
      end
    end
    if (acked) check(n == 1, "acknowledge one cycle after select");
    @(posedge clk);
    #1 opb_req = '0;
  endtask

  task automatic wr(logic [31:0] off, word_t d);
    word_t r; bit a;
    bus(0, BASE + off, d, r, a);
    check(a, "write acknowledged");
  endtask

  task automatic rd(logic [31:0] off, output word_t d);
    bit a;
    bus(1, BASE + off, '0, d, a);
    check(a, "read acknowledged");
  endtask

  function automatic word_t exp_status();
    word_t s = '0;
    for (int c = 0; c < NCH; c++) begin
      s[4*c]   = oq[c].size() < ODEPTH;
      s[4*c+1] = oq[c].size() >= ODEPTH - 1;
      s[4*c+2] = iq[c].size() > 0;
      s[4*c+3] = iq[c].size() <= 1;
    end
    return s;
  endfunction

  initial begin
    word_t d, exp;
    bit a;
    opb_req = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);

    rd(32'h000, d);
    check(d == exp_status(), "status after reset");
    check(!irq, "no interrupt after reset");

    // Write channel 1 until it overflows.
    for (int k = 0; k < ODEPTH + 2; k++) wr(32'h104, 32'h1000 + k);
    check(oq[1].size() == ODEPTH, "channel 1 holds DEPTH words");
    for (int k = 0; k < ODEPTH; k++) check(oq[1][k] == 32'h1000 + k, "out word order");
    n_drop += 2;
    rd(32'h000, d);
    check(d == exp_status(), "status with full channel");
    rd(32'h00C, d);
    check(d == 32'h0000_0002, "error bit for dropped write");
    rd(32'h00C, d);
    check(d == 32'h0, "error cleared by read");

    // Writes to channels 0 and 2.
    wr(32'h100, 32'hA0); wr(32'h108, 32'hA2);
    check(oq[0].size() == 1 && oq[0][0] == 32'hA0, "channel 0 write");
    check(oq[2].size() == 1 && oq[2][0] == 32'hA2, "channel 2 write");

    // Interrupt on incoming data.
    wr(32'h004, 32'h5);          // enable channels 0 and 2
    rd(32'h004, d);
    check(d == 32'h5, "IRQ_EN readback");
    iq[1].push_back(32'h11);
    @(posedge clk); #2;
    check(!irq, "disabled channel does not interrupt");
    iq[2].push_back(32'h21); iq[2].push_back(32'h22);
    @(posedge clk); #2;
    check(irq, "interrupt on enabled channel");
    if (irq) n_irq++;
    rd(32'h008, d);
    check(d == 32'h4, "IRQ_PEND");
    rd(32'h000, d);
    check(d == exp_status(), "status with incoming data");
    rd(32'h108, d); check(d == 32'h21, "read channel 2 first word");
    rd(32'h108, d); check(d == 32'h22, "read channel 2 second word");
    #1 check(!irq, "interrupt drops when channel drained");
    rd(32'h108, d); check(d == 32'h0, "read of empty channel returns 0");
    n_empty_rd++;
    rd(32'h00C, d); check(d == 32'h0004_0000, "error bit for empty read");
    rd(32'h104, d); check(d == 32'h11, "read channel 1");

    // Address outside the window: no acknowledge.
    bus(1, BASE + 32'h1000, '0, d, a);
    check(!a, "no acknowledge outside window");

    // Random traffic against the model.
    for (int k = 0; k < 300; k++) begin
      int c;
      c = $urandom % NCH;
      if ($urandom % 2) begin
        int was; was = oq[c].size();
        wr(32'h100 + 4 * c, $urandom);
        check(oq[c].size() == ((was < ODEPTH) ? was + 1 : was), "random write");
      end else begin
        exp = (iq[c].size() > 0) ? iq[c][0] : 32'h0;
        rd(32'h100 + 4 * c, d);
        check(d == exp, "random read");
      end
      if ($urandom % 3 == 0) void'(oq[$urandom % NCH].pop_front());
      if ($urandom % 2 == 0) iq[$urandom % NCH].push_back($urandom);
    end

    $display("dropped writes %0d, empty reads %0d, interrupts %0d", n_drop, n_empty_rd, n_irq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
