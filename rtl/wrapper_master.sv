// wrapper_master: bus master that carries out, on its own cluster's bus,
// the memory accesses that remote processors request through the network.
//
// Commands arrive in the incoming FIFOs of the NI channels it serves. A
// command is three parts: a command word (opcode in bits 31:28, word count n
// in bits 15:0), a byte address, and for a write the n data words. For a
// write it issues n bus writes to consecutive word addresses. For a read it
// issues n bus reads and pushes each word read into the outgoing FIFO of the
// same channel, which the network generator routes back to the requester.
// Channels are served round-robin, one whole command at a time; unknown
// opcodes are dropped.
//
// Two state machines share the work, linked by two small FIFOs. The NI-side
// machine (reqNI) takes the command word and the address, hands the job
// (opcode, address, count) to the bus side once that is idle, and then moves
// the n data words: for a write from the NI channel into the write FIFO, for
// a read from the read FIFO into the NI channel. The bus-side machine
// (reqOPB) runs the n bus accesses, popping the write FIFO or filling the
// read FIFO. So bus writes start before all data has arrived, and bus reads
// go on while the network is slow to take the replies. Bus timing: select
// is held until the slave's one-cycle xfer_ack and is low for at least one
// cycle between accesses; a read access only starts with room in the read
// FIFO, a write access only with data in the write FIFO. The two FIFOs and
// the reqNI/reqOPB split follow the published μSpider master wrapper; the
// command word layout and the FIFO depth (FDEPTH) are this design's choices.
module wrapper_master
  import noc_pkg::*;
#(
  parameter int unsigned NCH    = 1,
  parameter int unsigned FDEPTH = 4
) (
  input  logic           clk,
  input  logic           rst,
  // bus master port
  output opb_req_t       opb_req,
  input  opb_rsp_t       opb_rsp,
  // NI bus
  output logic [NCH-1:0] ch_write,
  output word_t          ch_wdata     [NCH],
  input  logic [NCH-1:0] ch_not_full,
  input  logic [NCH-1:0] ch_almost_full,
  output logic [NCH-1:0] ch_read,
  input  word_t          ch_rdata     [NCH],
  input  logic [NCH-1:0] ch_not_empty,
  input  logic [NCH-1:0] ch_almost_empty
);

  localparam int unsigned NW = (NCH > 1) ? $clog2(NCH) : 1;

  logic [NW-1:0] ch;            // channel of the command being served

  // ---------------- FIFOs between the two machines ----------------
  logic  wf_wr, wf_rd, wf_full, wf_empty;
  logic  rf_wr, rf_rd, rf_full, rf_empty;
  word_t wf_q, rf_q;

  chan_fifo #(.WIDTH(DATA_W), .DEPTH(FDEPTH)) u_wfifo (
    .clk, .rst, .wr(wf_wr), .wdata(ch_rdata[ch]), .rd(wf_rd), .rdata(wf_q),
    .full(wf_full), .empty(wf_empty), .almost_full(), .almost_empty(), .count()
  );
  chan_fifo #(.WIDTH(DATA_W), .DEPTH(FDEPTH)) u_rfifo (
    .clk, .rst, .wr(rf_wr), .wdata(opb_rsp.rdata), .rd(rf_rd), .rdata(rf_q),
    .full(rf_full), .empty(rf_empty), .almost_full(), .almost_empty(), .count()
  );

  // ---------------- reqNI: NI-side machine ----------------
  typedef enum logic [1:0] { N_IDLE, N_ADDR, N_WMOVE, N_RMOVE } nstate_e;

  nstate_e          nst;
  logic [NW-1:0]    rr;
  cmd_op_e          op;
  logic [CNT_W-1:0] ncnt;
  logic             pick_v;
  logic [NW-1:0]    pick;
  logic             job;       // reqNI hands a job to reqOPB this cycle
  logic             bbusy;     // reqOPB is running a job

  always_comb begin
    pick_v = 1'b0;
    pick   = '0;
    for (int k = 1; k <= NCH; k++) begin
      int unsigned c;
      c = (int'(rr) + k) % NCH;
      if (!pick_v && ch_not_empty[c]) begin
        pick_v = 1'b1;
        pick   = NW'(c);
      end
    end
  end

  always_comb begin
    ch_read  = '0;
    ch_write = '0;
    for (int c = 0; c < NCH; c++) ch_wdata[c] = rf_q;
    wf_wr = 1'b0;
    rf_rd = 1'b0;
    job   = 1'b0;
    case (nst)
      N_IDLE:  if (pick_v) ch_read[pick] = 1'b1;
      N_ADDR:  if (ch_not_empty[ch] && !bbusy) begin
        ch_read[ch] = 1'b1;
        job = (ncnt != '0) && (op == CMD_WRITE || op == CMD_READ);
      end
      N_WMOVE: if (ch_not_empty[ch] && !wf_full) begin
        ch_read[ch] = 1'b1;
        wf_wr       = 1'b1;
      end
      N_RMOVE: if (ch_not_full[ch] && !rf_empty) begin
        ch_write[ch] = 1'b1;
        rf_rd        = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      nst  <= N_IDLE;
      ch   <= '0;
      rr   <= NW'(NCH - 1);
      op   <= CMD_NONE;
      ncnt <= '0;
    end else begin
      case (nst)
        N_IDLE: if (pick_v) begin
          ch   <= pick;
          rr   <= pick;
          op   <= cmd_op_e'(ch_rdata[pick][31:28]);
          ncnt <= ch_rdata[pick][CNT_W-1:0];
          nst  <= N_ADDR;
        end
        N_ADDR: if (ch_not_empty[ch] && !bbusy) begin
          if (!job)                 nst <= N_IDLE;
          else if (op == CMD_WRITE) nst <= N_WMOVE;
          else                      nst <= N_RMOVE;
        end
        N_WMOVE: if (wf_wr) begin
          ncnt <= ncnt - 1'b1;
          if (ncnt == CNT_W'(1)) nst <= N_IDLE;
        end
        N_RMOVE: if (rf_rd) begin
          ncnt <= ncnt - 1'b1;
          if (ncnt == CNT_W'(1)) nst <= N_IDLE;
        end
        default: nst <= N_IDLE;
      endcase
    end
  end

  // ---------------- reqOPB: bus-side machine ----------------
  logic             bwrite;   // job is a write
  logic [CNT_W-1:0] bcnt;
  word_t            addr;
  logic             gap;      // the cycle after an acknowledge: select low
  logic             go;       // an access may be requested this cycle

  always_comb begin
    go      = bbusy && !gap && (bwrite ? !wf_empty : !rf_full);
    opb_req = '0;
    if (go) begin
      opb_req.select = 1'b1;
      opb_req.rnw    = !bwrite;
      opb_req.addr   = addr;
      opb_req.wdata  = wf_q;
    end
    wf_rd = go && bwrite && opb_rsp.xfer_ack;
    rf_wr = go && !bwrite && opb_rsp.xfer_ack;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      bbusy  <= 1'b0;
      bwrite <= 1'b0;
      bcnt   <= '0;
      addr   <= '0;
      gap    <= 1'b0;
    end else begin
      gap <= go && opb_rsp.xfer_ack;
      if (job) begin
        bbusy  <= 1'b1;
        bwrite <= (op == CMD_WRITE);
        bcnt   <= ncnt;
        addr   <= ch_rdata[ch];
      end else if (go && opb_rsp.xfer_ack) begin
        addr  <= addr + 32'd4;
        bcnt  <= bcnt - 1'b1;
        if (bcnt == CNT_W'(1)) bbusy <= 1'b0;
      end
    end
  end

endmodule
