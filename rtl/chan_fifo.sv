// chan_fifo: synchronous first-word-fall-through FIFO used for every channel
// buffer of the network (router input buffers, NI outgoing and incoming
// channel FIFOs).
//
// The head word is always visible on rdata while not empty; a read strobe
// pops it. A write to a full FIFO and a read of an empty FIFO are ignored.
// Besides full/empty it reports the "almost full" and "almost empty" levels
// that the wrappers show to software as channel status, and the fill count
// the NI packetizer uses to size packets. Both ports act on the rising clock
// edge; a word written is readable the next cycle. Synchronous active-high
// reset empties it. The FIFO depth is sized per design by the generator; the
// default here is this design's choice.
module chan_fifo #(
  parameter int unsigned WIDTH     = 32,
  parameter int unsigned DEPTH     = 8,
  parameter int unsigned AF_MARGIN = 2,   // almost_full when count >= DEPTH-AF_MARGIN
  parameter int unsigned AE_MARGIN = 1,   // almost_empty when count <= AE_MARGIN
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rd,
  output logic [WIDTH-1:0] rdata,
  output logic             full,
  output logic             empty,
  output logic             almost_full,
  output logic             almost_empty,
  output logic [CW-1:0]    count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign do_wr = wr && !full;
  assign do_rd = rd && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  assign rdata        = mem[rptr];
  assign full         = (count == CW'(DEPTH));
  assign empty        = (count == '0);
  assign almost_full  = (count >= CW'(DEPTH - AF_MARGIN));
  assign almost_empty = (count <= CW'(AE_MARGIN));

endmodule
