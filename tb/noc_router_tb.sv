// noc_router_tb: self-checking test of the router at mesh position (0,0).
//
// Each of the three inputs sends random packets (random VC, destination
// node, 1..4 payload flits) while every output's per-VC ready toggles at
// random. A monitor on each output checks that every flit leaves by the
// dimension-ordered route of its header, that the flits of a packet leave in
// order and without another packet of the same VC cut in between, and
// that every packet sent arrives exactly once. It also checks the timing of a
// lone packet (head out two cycles after it is offered, then one flit per
// cycle) and counts cycles in which guaranteed traffic froze a best-effort
// packet in mid-flight on the same output.
module noc_router_tb;
  import noc_pkg::*;
  localparam int NP = 3;
  localparam int NPKT = 150;  // per input

  logic clk = 0, rst = 1;
  link_t          in_link  [NP];
  logic [NVC-1:0] in_ready [NP];
  link_t          out_link [NP];
  logic [NVC-1:0] out_ready[NP];
  int checks = 0, failures = 0;
  int sent = 0, received = 0, freezes = 0;
  bit random_ready = 0;
  bit drive_en = 0;

  noc_router #(.MY_X(0), .MY_Y(0), .NPORTS(NP), .DEPTH(4)) dut (
    .clk, .rst, .in_link, .in_ready, .out_link, .out_ready);

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

  function automatic int exp_port(int x, int y);
    if (x != 0) return 1;
    if (y != 0) return 2;
    return 0;
  endfunction

  // ready: all high, or random
  always_ff @(posedge clk)
    for (int o = 0; o < NP; o++)
      out_ready[o] <= random_ready ? NVC'($urandom) : '1;

  // ---------- monitors ----------
  int   rx_open [NP][NVC];
  int   rx_src  [NP][NVC];
  int   rx_id   [NP][NVC];
  int   rx_len  [NP][NVC];
  int   rx_idx  [NP][NVC];
  bit   got     [NP][4096];
  int   last_head_cycle;
  int   cycle = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst) begin
      for (int o = 0; o < NP; o++) begin
        if (out_link[o].valid) begin
          int v;
          flit_t f;
          v = out_link[o].vc;
          f = out_link[o].flit;
          check(out_ready[o][v], "sent without ready");
          if (v == VC_GT && rx_open[o][VC_BE]) freezes++;
          if (f.head) begin
            header_t h;
            h = header_t'(f.data);
            check(!rx_open[o][v], "head inside open packet");
            check(exp_port(int'(h.dst_x), int'(h.dst_y)) == o, "XY route");
            rx_open[o][v] = 1;
            rx_src[o][v]  = int'(h.rsvd[14:11]);
            rx_id[o][v]   = int'(h.rsvd[10:0]);
            rx_len[o][v]  = int'(h.len);
            rx_idx[o][v]  = 0;
            last_head_cycle = cycle;
          end else begin
            check(rx_open[o][v] == 1, "body without head");
            check(f.data == {4'(rx_src[o][v]), 1'(v), 11'(rx_id[o][v]), 8'h00, 8'(rx_idx[o][v])},
                  "body flit content/order");
            check(f.tail == (rx_idx[o][v] == rx_len[o][v] - 1), "tail mark");
            rx_idx[o][v]++;
            if (f.tail) begin
              rx_open[o][v] = 0;
              check(!got[rx_src[o][v]][rx_id[o][v]], "duplicate packet");
              got[rx_src[o][v]][rx_id[o][v]] = 1;
              received++;
            end
          end
        end
      end
    end
  end

  // ---------- drivers ----------
  task automatic send_flit(int i, int v, flit_t f);
    // valid means transfer: raise it only in a cycle where ready is high
    @(negedge clk);
    while (!in_ready[i][v]) @(negedge clk);
    in_link[i].valid = 1'b1;
    in_link[i].vc    = 1'(v);
    in_link[i].flit  = f;
    @(posedge clk);
    #1 in_link[i].valid = 1'b0;
  endtask

  task automatic send_pkt(int i, int id, int v, int x, int y, int len);
    header_t h;
    flit_t f;
    h = '0;
    h.dst_x = COORD_W'(x); h.dst_y = COORD_W'(y); h.len = LEN_W'(len);
    h.rsvd  = {4'(i), 11'(id)};
    f.head = 1; f.tail = 0; f.data = word_t'(h);
    send_flit(i, v, f);
    for (int k = 0; k < len; k++) begin
      f.head = 0; f.tail = (k == len - 1);
      f.data = {4'(i), 1'(v), 11'(id), 8'h00, 8'(k)};
      send_flit(i, v, f);
    end
    sent++;
  endtask

  initial begin
    for (int i = 0; i < NP; i++) in_link[i] = '0;
    for (int o = 0; o < NP; o++) for (int v = 0; v < NVC; v++) rx_open[o][v] = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);

    // Lone packet: written into the input FIFO at the first edge after c0,
    // it wins the output at the next edge and is on the output one cycle
    // later: the head leaves in cycle c0+2.
    begin
      int c0, c1, n0;
      #1 c0 = cycle;
      n0 = received;
      send_pkt(0, 2000, VC_BE, 1, 0, 3);
      wait (received == n0 + 1);
      c1 = last_head_cycle;
      $display("lone packet: head out %0d cycles after offer", c1 - c0);
      check(c1 - c0 == 2, "head latency 2 cycles");
    end
    repeat (5) @(posedge clk);

    // Contention test.
    random_ready = 1;
    for (int i = 0; i < NP; i++) begin
      automatic int ii = i;
      fork
        for (int p = 0; p < NPKT; p++)
          send_pkt(ii, p, ($urandom % 2), $urandom % 2, $urandom % 2, 1 + $urandom % 4);
      join_none
    end
    wait fork;
    random_ready = 0;
    repeat (50) @(posedge clk);
    check(received == sent, "all packets delivered");
    for (int i = 0; i < NP; i++)
      for (int p = 0; p < NPKT; p++) check(got[i][p], "packet received");
    $display("sent %0d received %0d GT-freezes-BE cycles %0d", sent, received, freezes);
    check(freezes > 0, "freeze mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
