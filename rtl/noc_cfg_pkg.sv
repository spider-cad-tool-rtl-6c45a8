// noc_cfg_pkg: the generated configuration of the three-cluster network.
//
// Three clusters sit on nodes 0, 1 and 2 of a 2x2 mesh; node 3 is a router
// without an NI. Node n lies at x = n mod 2, y = n div 2. Every NI has six
// channels: channels 0..3 belong to the slave wrapper (the processor side),
// channels 4 and 5 to the master wrapper (the memory side).
//   ch0: GT, to the master wrapper of node n+1 (remote memory access);
//        replies come back into ch0.
//   ch1: BE, messages to the slave wrapper of node n+2 (arriving on its ch2).
//   ch2: BE, messages to the slave wrapper of node n+1 (arriving on its ch1).
//   ch3: intra-NI, to the master wrapper of the same node (arriving on ch5),
//        for access to the cluster's own memory; replies come back into ch3.
//   ch4: GT, replies of the master wrapper to node n+2 (arriving on its ch0).
//   ch5: intra-NI, replies of the master wrapper to ch3 of the same node.
// (n+1 and n+2 are taken modulo 3.) Intra-NI channels never enter the
// network. The TDM table of every NI has four slots, alternating between its
// two GT channels, ch0 and ch4. In the real flow these tables and routes come
// out of the slot and path allocation step; this allocation is a fixed
// example chosen for this design.
package noc_cfg_pkg;
  import noc_pkg::*;

  localparam int unsigned NNODE    = 4;
  localparam int unsigned NCLUST   = 3;
  localparam int unsigned NCH      = 6;
  localparam int unsigned NCH_S    = 4;   // channels 0..3: slave wrapper
  localparam int unsigned NCH_M    = 2;   // channels 4..5: master wrapper
  localparam int unsigned TDM_SIZE = 4;

  localparam logic [NCH-1:0] CH_GT    = 6'b010001;
  localparam logic [NCH-1:0] CH_INTRA = 6'b101000;
  // No BE-with-priority channel in this configuration (it mixes GT and BE).
  localparam logic [NCH-1:0] CH_PRIO  = '0;
  // End-to-end credit flow control on every network channel.
  localparam bit          CFG_E2E  = 1'b1;

  function automatic int unsigned dst_node(int unsigned n, int unsigned c);
    case (c)
      0, 2:    return (n + 1) % NCLUST;
      1, 4:    return (n + 2) % NCLUST;
      default: return n;
    endcase
  endfunction

  function automatic int unsigned dst_ch(int unsigned c);
    case (c)
      0: return 4;
      1: return 2;
      2: return 1;
      3: return 5;
      4: return 0;
      default: return 3;
    endcase
  endfunction

  function automatic logic [NCH-1:0][COORD_W-1:0] ch_dst_x(int unsigned n);
    for (int unsigned c = 0; c < NCH; c++)
      ch_dst_x[c] = COORD_W'(dst_node(n, c) % 2);
  endfunction

  function automatic logic [NCH-1:0][COORD_W-1:0] ch_dst_y(int unsigned n);
    for (int unsigned c = 0; c < NCH; c++)
      ch_dst_y[c] = COORD_W'(dst_node(n, c) / 2);
  endfunction

  // The channel that feeds incoming channel d (for credit returns), and the
  // node it sits on: the inverse of dst_ch and dst_node.
  function automatic int unsigned src_ch(int unsigned d);
    src_ch = 0;
    for (int unsigned c = 0; c < NCH; c++)
      if (dst_ch(c) == d && !CH_INTRA[c]) src_ch = c;
  endfunction

  function automatic int unsigned src_node(int unsigned n, int unsigned d);
    src_node = n;
    for (int unsigned m = 0; m < NCLUST; m++)
      if (dst_node(m, src_ch(d)) == n) src_node = m;
  endfunction

  function automatic logic [NCH-1:0][COORD_W-1:0] ch_src_x(int unsigned n);
    for (int unsigned d = 0; d < NCH; d++)
      ch_src_x[d] = COORD_W'(src_node(n, d) % 2);
  endfunction

  function automatic logic [NCH-1:0][COORD_W-1:0] ch_src_y(int unsigned n);
    for (int unsigned d = 0; d < NCH; d++)
      ch_src_y[d] = COORD_W'(src_node(n, d) / 2);
  endfunction

  function automatic logic [NCH-1:0][CHID_W-1:0] ch_src_ch();
    for (int unsigned d = 0; d < NCH; d++)
      ch_src_ch[d] = CHID_W'(src_ch(d));
  endfunction

  function automatic logic [NCH-1:0][CHID_W-1:0] ch_dst_ch();
    for (int unsigned c = 0; c < NCH; c++)
      ch_dst_ch[c] = CHID_W'(dst_ch(c));
  endfunction


  // Slot s belongs to ch0 for even s, ch4 for odd s.
  function automatic logic [TDM_SIZE-1:0][CHID_W:0] tdm_table();
    for (int unsigned s = 0; s < TDM_SIZE; s++)
      tdm_table[s] = {1'b1, CHID_W'((s % 2 == 0) ? 0 : 4)};
  endfunction

endpackage
