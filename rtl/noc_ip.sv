// noc_ip: the network IP as it is dropped into a multi-processor system of
// three bus-based clusters.
//
// Each cluster connects through two bus wrappers. Its slave wrapper gives the
// cluster's processor NI channels 0..3: remote memory requests and their
// replies (ch0), messages to and from the other processors (ch1, ch2), and
// access to its own memory through the intra-NI channel (ch3). It raises an
// interrupt when data has arrived. Its master wrapper serves NI channels 4
// and 5: it executes the write and read commands arriving there on the
// cluster bus and sends read data back on the same channel. Behind the
// wrappers sit the NIs and the 2x2 router mesh of noc_mesh, with end-to-end
// credits on (E2E) unless overridden. GT_MASK, PRIO_MASK and SLOTS choose
// the channel classes and TDM table (see noc_mesh).
//
// Ports per cluster k (arrays indexed by k): s_req/s_rsp is the slave port
// the cluster's processor drives, m_req/m_rsp the master port that reaches
// the cluster's memory controller, irq the interrupt line. Slave wrapper k
// answers at SLAVE_BASE + k * 0x1000. Everything runs on one clock with a
// synchronous active-high reset. The cluster/wrapper/NI arrangement follows
// the published μSpider architecture model; address windows and channel use
// are this design's choices.
module noc_ip
  import noc_pkg::*;
  import noc_cfg_pkg::*;
#(
  parameter logic [31:0] SLAVE_BASE   = 32'h8000_0000,
  parameter int unsigned FIFO_DEPTH   = 8,
  parameter int unsigned ROUTER_DEPTH = 4,
  parameter int unsigned MAX_PKT      = 4,
  parameter bit          E2E          = noc_cfg_pkg::CFG_E2E,
  // Traffic classes per channel and the TDM table, the same for every NI.
  parameter logic [noc_cfg_pkg::NCH-1:0] GT_MASK   = noc_cfg_pkg::CH_GT,
  parameter logic [noc_cfg_pkg::NCH-1:0] PRIO_MASK = noc_cfg_pkg::CH_PRIO,
  parameter logic [noc_cfg_pkg::TDM_SIZE-1:0][noc_pkg::CHID_W:0] SLOTS =
    noc_cfg_pkg::tdm_table()
) (
  input  logic     clk,
  input  logic     rst,
  input  opb_req_t s_req [NCLUST],
  output opb_rsp_t s_rsp [NCLUST],
  output logic     irq   [NCLUST],
  output opb_req_t m_req [NCLUST],
  input  opb_rsp_t m_rsp [NCLUST]
);

  logic [NCH-1:0] ch_write        [NCLUST];
  word_t          ch_wdata        [NCLUST][NCH];
  logic [NCH-1:0] ch_not_full     [NCLUST];
  logic [NCH-1:0] ch_almost_full  [NCLUST];
  logic [NCH-1:0] ch_read         [NCLUST];
  word_t          ch_rdata        [NCLUST][NCH];
  logic [NCH-1:0] ch_not_empty    [NCLUST];
  logic [NCH-1:0] ch_almost_empty [NCLUST];

  noc_mesh #(
    .FIFO_DEPTH(FIFO_DEPTH), .ROUTER_DEPTH(ROUTER_DEPTH), .MAX_PKT(MAX_PKT),
    .E2E(E2E), .GT_MASK(GT_MASK), .PRIO_MASK(PRIO_MASK), .SLOTS(SLOTS)
  ) u_mesh (
    .clk, .rst,
    .ch_write, .ch_wdata, .ch_not_full, .ch_almost_full,
    .ch_read, .ch_rdata, .ch_not_empty, .ch_almost_empty
  );

  for (genvar k = 0; k < NCLUST; k++) begin : g_cl
    word_t s_wdata;
    word_t s_rdata [NCH_S];
    word_t m_wdata [NCH_M];
    word_t m_rdata [NCH_M];

    for (genvar c = 0; c < NCH_S; c++) begin : g_s
      assign ch_wdata[k][c] = s_wdata;
      assign s_rdata[c]     = ch_rdata[k][c];
    end
    for (genvar c = 0; c < NCH_M; c++) begin : g_m
      assign ch_wdata[k][NCH_S + c] = m_wdata[c];
      assign m_rdata[c]             = ch_rdata[k][NCH_S + c];
    end

    wrapper_slave #(
      .NCH(NCH_S), .BASE_ADDR(SLAVE_BASE + 32'(k) * 32'h1000), .ADDR_SPAN(12)
    ) u_wrs (
      .clk, .rst,
      .opb_req        (s_req[k]),
      .opb_rsp        (s_rsp[k]),
      .irq            (irq[k]),
      .ch_write       (ch_write[k][NCH_S-1:0]),
      .ch_wdata       (s_wdata),
      .ch_not_full    (ch_not_full[k][NCH_S-1:0]),
      .ch_almost_full (ch_almost_full[k][NCH_S-1:0]),
      .ch_read        (ch_read[k][NCH_S-1:0]),
      .ch_rdata       (s_rdata),
      .ch_not_empty   (ch_not_empty[k][NCH_S-1:0]),
      .ch_almost_empty(ch_almost_empty[k][NCH_S-1:0])
    );

    wrapper_master #(.NCH(NCH_M)) u_wrm (
      .clk, .rst,
      .opb_req        (m_req[k]),
      .opb_rsp        (m_rsp[k]),
      .ch_write       (ch_write[k][NCH-1:NCH_S]),
      .ch_wdata       (m_wdata),
      .ch_not_full    (ch_not_full[k][NCH-1:NCH_S]),
      .ch_almost_full (ch_almost_full[k][NCH-1:NCH_S]),
      .ch_read        (ch_read[k][NCH-1:NCH_S]),
      .ch_rdata       (m_rdata),
      .ch_not_empty   (ch_not_empty[k][NCH-1:NCH_S]),
      .ch_almost_empty(ch_almost_empty[k][NCH-1:NCH_S])
    );
  end

endmodule
