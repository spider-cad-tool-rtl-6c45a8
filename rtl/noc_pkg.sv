// noc_pkg: types and constants shared by the network-on-chip blocks.
//
// A packet is a header flit followed by one or more payload flits, the last
// of which carries the tail mark. Every flit travels on one of two virtual
// channels: VC 0 carries guaranteed traffic (GT, time-slot scheduled) and
// VC 1 carries best-effort traffic (BE); BE with priority shares VC 0, and
// end-to-end credit returns (one-flit packets with the credit bit set) share
// VC 1. The 32-bit path width is the
// example width named for the design; the header layout, the command word
// layout and the bus records are this design's own choices.
package noc_pkg;

  localparam int unsigned DATA_W  = 32;  // NoC path width
  localparam int unsigned NVC     = 2;   // virtual channels per link
  localparam int unsigned VC_GT   = 0;   // guaranteed-traffic channel (called VC1 in the μSpider router model)
  localparam int unsigned VC_BE   = 1;   // best-effort channel (called VC2 there)
  localparam int unsigned COORD_W = 2;   // bits per mesh coordinate
  localparam int unsigned CHID_W  = 4;   // bits of an NI channel number
  localparam int unsigned LEN_W   = 8;   // bits of a payload length

  typedef logic [DATA_W-1:0] word_t;

  // One flit on a link.
  typedef struct packed {
    logic  head;   // first flit of a packet: data holds a header_t
    logic  tail;   // last flit of a packet
    word_t data;
  } flit_t;

  // Header flit contents (lower bits of the data word).
  typedef struct packed {
    logic [DATA_W-2*COORD_W-CHID_W-LEN_W-2:0] rsvd;
    logic               credit;   // credit return: len credits for dst_ch
    logic [COORD_W-1:0] dst_x;
    logic [COORD_W-1:0] dst_y;
    logic [CHID_W-1:0]  dst_ch;   // input channel FIFO at the destination NI
    logic [LEN_W-1:0]   len;      // number of payload flits
  } header_t;

  // A link from one node to the next: flit plus valid and its VC, and one
  // ready (input FIFO not full) per VC running back.
  typedef struct packed {
    logic  valid;
    logic  vc;
    flit_t flit;
  } link_t;

  // Command words exchanged between a slave wrapper and a remote master
  // wrapper: a command word, then a byte address, then data words for a write.
  typedef enum logic [3:0] {
    CMD_NONE  = 4'h0,
    CMD_WRITE = 4'h1,
    CMD_READ  = 4'h2
  } cmd_op_e;

  localparam int unsigned CNT_W = 16;

  function automatic word_t make_cmd(cmd_op_e op, logic [CNT_W-1:0] n);
    return {op, 12'h000, n};
  endfunction

  // Simplified on-chip peripheral bus transaction: the master holds select
  // with rnw, addr and wdata until the slave answers with a one-cycle
  // xfer_ack (and rdata for a read).
  typedef struct packed {
    logic  select;
    logic  rnw;
    word_t addr;
    word_t wdata;
  } opb_req_t;

  typedef struct packed {
    logic  xfer_ack;
    word_t rdata;
  } opb_rsp_t;

endpackage
