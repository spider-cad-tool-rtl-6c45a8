// wrapper_slave: bus slave that lets a cluster's processor reach the NI
// channels through memory-mapped registers.
//
// The processor (a bus master) writes words into the outgoing channel FIFOs
// of the NI and reads words out of the incoming ones; it learns the state of
// every FIFO from a status register and can be interrupted when data has
// arrived. Remote writes, remote read requests and message passing are all
// built from these accesses by software: a write sends a write command, an
// address and the data on a channel leading to a remote master wrapper; a
// read sends a read command and an address, and the answer later arrives in
// the incoming FIFO of the same channel, raising the interrupt.
//
// Register map (byte offsets from BASE_ADDR):
//   0x000 STATUS   read-only. For channel c, bit 4c = out FIFO not full,
//                  4c+1 = out almost full, 4c+2 = in FIFO not empty,
//                  4c+3 = in almost empty.
//   0x004 IRQ_EN   read/write, one enable bit per channel.
//   0x008 IRQ_PEND read-only, enabled channels whose in FIFO is not empty.
//   0x00C ERROR    read clears. Bit c: a write to full channel c was
//                  dropped; bit 16+c: a read of empty channel c returned 0.
//   0x100+4c DATA  write pushes into out FIFO c, read pops in FIFO c.
// The interrupt line is the OR of IRQ_PEND, a level for the interrupt
// controller; software may instead poll STATUS.
//
// Bus timing: a transaction is seen when select is high and the address is
// in range; the register access happens that cycle and xfer_ack (with read
// data) is driven on the next cycle, so every access takes two cycles and
// never waits on the network: the bus is never frozen. The NI bus signals
// (write/read strobes and the four FIFO flags per channel) follow the slave
// wrapper of the published μSpider design; the register map, the error
// register and the two-cycle access are this design's choices. The bus write
// data goes to every channel on one shared ch_wdata; only the strobe selects.
module wrapper_slave
  import noc_pkg::*;
#(
  parameter int unsigned NCH       = 4,
  parameter logic [31:0] BASE_ADDR = 32'h8000_0000,
  parameter int unsigned ADDR_SPAN = 12   // 4 KiB window
) (
  input  logic           clk,
  input  logic           rst,
  // bus slave port
  input  opb_req_t       opb_req,
  output opb_rsp_t       opb_rsp,
  output logic           irq,
  // NI bus
  output logic [NCH-1:0] ch_write,
  output word_t          ch_wdata,        // shared by all channels
  input  logic [NCH-1:0] ch_not_full,
  input  logic [NCH-1:0] ch_almost_full,
  output logic [NCH-1:0] ch_read,
  input  word_t          ch_rdata     [NCH],
  input  logic [NCH-1:0] ch_not_empty,
  input  logic [NCH-1:0] ch_almost_empty
);

  localparam logic [11:0] OFF_STATUS = 12'h000;
  localparam logic [11:0] OFF_IRQEN  = 12'h004;
  localparam logic [11:0] OFF_IRQPND = 12'h008;
  localparam logic [11:0] OFF_ERROR  = 12'h00C;
  localparam logic [11:0] OFF_DATA   = 12'h100;

  typedef enum logic {S_IDLE, S_ACK} state_e;

  state_e         state;
  logic [NCH-1:0] irq_en;
  logic [31:0]    err;
  word_t          rdata_q;
  logic           hit;
  logic [11:0]    off, doff;
  logic           is_data;
  int unsigned    dch;
  word_t          status;
  logic           access;

  assign hit     = (opb_req.addr[31:ADDR_SPAN] == BASE_ADDR[31:ADDR_SPAN]);
  assign off     = opb_req.addr[11:0];
  assign access  = (state == S_IDLE) && opb_req.select && hit;
  assign is_data = (off >= OFF_DATA) && (off < OFF_DATA + 12'(4 * NCH));
  assign doff    = off - OFF_DATA;
  assign dch     = int'(doff[11:2]);

  always_comb begin
    status = '0;
    for (int c = 0; c < NCH; c++) begin
      status[4*c]   = ch_not_full[c];
      status[4*c+1] = ch_almost_full[c];
      status[4*c+2] = ch_not_empty[c];
      status[4*c+3] = ch_almost_empty[c];
    end
  end

  assign ch_wdata = opb_req.wdata;

  // FSM reqPap: turn one bus access into one NI strobe.
  always_comb begin
    ch_write = '0;
    ch_read  = '0;
    if (access && is_data) begin
      if (!opb_req.rnw && ch_not_full[dch])  ch_write[dch] = 1'b1;
      if (opb_req.rnw  && ch_not_empty[dch]) ch_read[dch]  = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      irq_en  <= '0;
      err     <= '0;
      rdata_q <= '0;
    end else begin
      case (state)
        S_IDLE: if (access) begin
          state   <= S_ACK;
          rdata_q <= '0;
          if (opb_req.rnw) begin
            if (is_data) begin
              if (ch_not_empty[dch]) rdata_q <= ch_rdata[dch];
              else                   err[16 + dch] <= 1'b1;
            end else begin
              case (off)
                OFF_STATUS: rdata_q <= status;
                OFF_IRQEN:  rdata_q <= 32'(irq_en);
                OFF_IRQPND: rdata_q <= 32'(irq_en & ch_not_empty);
                OFF_ERROR:  begin rdata_q <= err; err <= '0; end
                default:    rdata_q <= '0;
              endcase
            end
          end else begin
            if (is_data) begin
              if (!ch_not_full[dch]) err[dch] <= 1'b1;
            end else if (off == OFF_IRQEN) begin
              irq_en <= opb_req.wdata[NCH-1:0];
            end
          end
        end
        S_ACK: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign opb_rsp.xfer_ack = (state == S_ACK);
  assign opb_rsp.rdata    = (state == S_ACK) ? rdata_q : '0;
  assign irq              = |(irq_en & ch_not_empty);

endmodule
