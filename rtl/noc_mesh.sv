// noc_mesh: the network component: four routers in a 2x2 mesh and one NI on
// each of the first NCLUST nodes.
//
// Node n sits at x = n mod 2, y = n div 2. Router port 0 goes to the node's
// NI, port 1 to the other router in the same row, port 2 to the other router
// in the same column; links run both ways. A node without an NI has its
// local port tied off: it never receives a flit, since no channel routes to
// it, and it never sends one. The outside world sees, per cluster, the NI bus
// of all its channels (write/read strobes, data and the four FIFO flags).
// Routes and TDM tables come from noc_cfg_pkg. The mesh shape and the
// placement of three clusters follow the published μSpider architecture
// model; which node gets which cluster is this design's choice. With E2E set
// (the default) every NI runs end-to-end credit flow control; credits go
// back to the feeding channel named by noc_cfg_pkg's ch_src_* functions.
// GT_MASK, PRIO_MASK and SLOTS set the channel classes and TDM table of every
// NI; they default to the configuration package, and other settings give the
// GT-only, BE-only or BE-with-priority variants of the same network.
module noc_mesh
  import noc_pkg::*;
  import noc_cfg_pkg::*;
#(
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
  input  logic           clk,
  input  logic           rst,
  input  logic [NCH-1:0] ch_write        [NCLUST],
  input  word_t          ch_wdata        [NCLUST][NCH],
  output logic [NCH-1:0] ch_not_full     [NCLUST],
  output logic [NCH-1:0] ch_almost_full  [NCLUST],
  input  logic [NCH-1:0] ch_read         [NCLUST],
  output word_t          ch_rdata        [NCLUST][NCH],
  output logic [NCH-1:0] ch_not_empty    [NCLUST],
  output logic [NCH-1:0] ch_almost_empty [NCLUST]
);

  localparam int unsigned NP = 3;

  link_t          r_in   [NNODE][NP];
  logic [NVC-1:0] r_in_rd[NNODE][NP];
  link_t          r_out  [NNODE][NP];
  logic [NVC-1:0] r_out_rd[NNODE][NP];

  for (genvar n = 0; n < NNODE; n++) begin : g_node
    localparam int unsigned X  = n % 2;
    localparam int unsigned Y  = n / 2;
    localparam int unsigned NX = (1 - X) + 2 * Y;   // row neighbour
    localparam int unsigned NY = X + 2 * (1 - Y);   // column neighbour

    noc_router #(.MY_X(X), .MY_Y(Y), .NPORTS(NP), .DEPTH(ROUTER_DEPTH)) u_router (
      .clk, .rst,
      .in_link  (r_in[n]),
      .in_ready (r_in_rd[n]),
      .out_link (r_out[n]),
      .out_ready(r_out_rd[n])
    );

    assign r_in[n][1]     = r_out[NX][1];
    assign r_out_rd[n][1] = r_in_rd[NX][1];
    assign r_in[n][2]     = r_out[NY][2];
    assign r_out_rd[n][2] = r_in_rd[NY][2];

    if (n < NCLUST) begin : g_ni
      noc_ni #(
        .NCH      (NCH),
        .DEPTH    (FIFO_DEPTH),
        .MAX_PKT  (MAX_PKT),
        .TDM_SIZE (TDM_SIZE),
        .CH_DST_X (ch_dst_x(n)),
        .CH_DST_Y (ch_dst_y(n)),
        .CH_DST_CH(ch_dst_ch()),
        .CH_GT    (GT_MASK),
        .CH_PRIO  (PRIO_MASK),
        .CH_INTRA (CH_INTRA),
        .TDM_TABLE(SLOTS),
        .E2E      (E2E),
        .CH_SRC_X (ch_src_x(n)),
        .CH_SRC_Y (ch_src_y(n)),
        .CH_SRC_CH(ch_src_ch())
      ) u_ni (
        .clk, .rst,
        .ch_write       (ch_write[n]),
        .ch_wdata       (ch_wdata[n]),
        .ch_not_full    (ch_not_full[n]),
        .ch_almost_full (ch_almost_full[n]),
        .ch_read        (ch_read[n]),
        .ch_rdata       (ch_rdata[n]),
        .ch_not_empty   (ch_not_empty[n]),
        .ch_almost_empty(ch_almost_empty[n]),
        .net_out        (r_in[n][0]),
        .net_out_ready  (r_in_rd[n][0]),
        .net_in         (r_out[n][0]),
        .net_in_ready   (r_out_rd[n][0])
      );
    end else begin : g_no_ni
      assign r_in[n][0]     = '0;
      assign r_out_rd[n][0] = '1;
    end
  end

endmodule
