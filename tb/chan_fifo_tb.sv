// chan_fifo_tb: self-checking test of the channel FIFO against a queue
// model. Random writes and reads for 2000 cycles; every cycle the head word,
// the fill count and the four flags are compared with the model, including
// writes to a full FIFO and reads of an empty one, which must be ignored.
module chan_fifo_tb;
  localparam int W = 16, D = 5;
  logic clk = 0, rst = 1;
  logic wr, rd;
  logic [W-1:0] wdata, rdata;
  logic full, empty, af, ae;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];
  int n_full = 0, n_empty = 0;

  chan_fifo #(.WIDTH(W), .DEPTH(D), .AF_MARGIN(1), .AE_MARGIN(1)) dut (
    .clk, .rst, .wr, .wdata, .rd, .rdata, .full, .empty,
    .almost_full(af), .almost_empty(ae), .count);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr = 0; rd = 0; wdata = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      check(count == $bits(count)'(q.size()), "count");
      check(empty == (q.size() == 0), "empty");
      check(full == (q.size() == D), "full");
      check(af == (q.size() >= D - 1), "almost_full");
      check(ae == (q.size() <= 1), "almost_empty");
      if (q.size() > 0) check(rdata == q[0], "head");
      if (full) n_full++;
      if (empty) n_empty++;
      // bias the mix so the FIFO visits both ends
      wr = ($urandom % 100) < ((cyc / 200) % 2 ? 70 : 30);
      rd = ($urandom % 100) < ((cyc / 200) % 2 ? 30 : 70);
      wdata = W'($urandom);
      begin
        int s;
        s = q.size();
        @(posedge clk);
        if (rd && s > 0) void'(q.pop_front());
        if (wr && s < D) q.push_back(wdata);
      end
    end
    $display("full seen %0d, empty seen %0d", n_full, n_empty);
    check(n_full > 0 && n_empty > 0, "both ends visited");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
