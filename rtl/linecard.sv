// linecard: one DRA linecard (LC) and its fault steering.
//
// A linecard holds a protocol-dependent logic unit (pdlu), a segmentation
// and reassembly unit (sru), a local forwarding engine (lfe) and an EIB bus
// controller (bus_controller). The physical interface unit is outside:
// its framed traffic enters and leaves on the piu_* ports, and cells to
// and from the switching fabric use the cell_* / fab_* ports.
//
// With no fault, traffic takes the usual path: PIU -> PDLU -> SRU (lookup
// in the LFE) -> fabric, and fabric -> SRU -> PDLU -> PIU. When a unit of
// this linecard fails (fault_i, one bit per unit), the failed unit's work
// is handed to a healthy linecard over the enhanced internal bus:
//   * PDLU failed: incoming frames go over the data lines to the PDLU of a
//     linecard with the same protocol;
//   * SRU failed: packets leaving the PDLU go over the data lines to the
//     SRU of any healthy linecard;
//   * LFE failed: each lookup goes out in a REQ_L control packet and the
//     REP_L answer returns the outgoing linecard;
//   * PIU failed: incoming traffic stops.
// A covering linecard merges what arrives for its PDLU or SRU with its own
// traffic at packet boundaries (pkt_merge); frames arriving for its PIU
// (reverse path) are merged into the piu_out stream. The covered traffic
// then continues through the covering linecard's own units and fabric
// port. These routes are the document's ingress-side cases. Buffers for
// traffic arriving over the data lines (RX_DEPTH words per unit) are this
// design's choice. A packet is taken into such a buffer only if there is
// room for a packet of the largest size (BUF_DEPTH words), else the whole
// packet is dropped and counted, as the document lets over-subscribed
// traffic be dropped; RX_DEPTH must be at least BUF_DEPTH.
// Egress-side coverage (faults at the outgoing linecard) is not modelled
// here; the bus controller supports the reverse-path LP it would use.
module linecard
  import dra_pkg::*;
#(
  parameter logic [LC_ID_W-1:0] LC_ID       = '0,
  parameter logic [PROTO_W-1:0] PROTO       = 4'd1,
  parameter int unsigned        N_LC        = 6,
  parameter int unsigned        ENTRIES     = 16,
  parameter int unsigned        CELL_WORDS  = 12,
  parameter int unsigned        BUF_DEPTH   = 512,
  parameter int unsigned        RX_DEPTH    = 1024,
  parameter int unsigned        B_BUS       = 10000
) (
  input  logic               clk,
  input  logic               rst_n,
  // status
  input  fault_vec_t         fault_i,
  input  logic [BW_W-1:0]    avail_bw_i,   // spare bandwidth offered to others
  input  logic [BW_W-1:0]    need_bw_i,    // bandwidth asked when covered (B_LC)
  output fault_vec_t         fault_map_o [N_LC],
  // routing table writes from the route processor
  input  logic                       rt_wr_en_i,
  input  logic [$clog2(ENTRIES)-1:0] rt_wr_idx_i,
  input  logic                       rt_wr_valid_i,
  input  logic [ADDR_W-1:0]          rt_wr_prefix_i,
  input  logic [5:0]                 rt_wr_len_i,
  input  logic [LC_ID_W-1:0]         rt_wr_lc_i,
  // PIU side
  input  logic               piu_in_valid_i,
  input  logic               piu_in_sop_i,
  input  logic               piu_in_eop_i,
  input  logic [DATA_W-1:0]  piu_in_data_i,
  output logic               piu_in_ready_o,
  output logic               piu_out_valid_o,
  output logic               piu_out_sop_o,
  output logic               piu_out_eop_o,
  output logic [DATA_W-1:0]  piu_out_data_o,
  input  logic               piu_out_ready_i,
  // fabric side
  output logic               cell_valid_o,
  output logic               cell_sop_o,
  output logic               cell_eop_o,
  output logic [DATA_W-1:0]  cell_data_o,
  input  logic               cell_ready_i,
  input  logic               fab_valid_i,
  input  logic               fab_sop_i,
  input  logic               fab_eop_i,
  input  logic [DATA_W-1:0]  fab_data_i,
  output logic               fab_ready_o,
  // EIB control lines
  output logic               cl_drive_o,
  output ctrl_pkt_t          cl_pkt_o,
  input  logic               cl_valid_i,
  input  logic               cl_coll_i,
  input  ctrl_pkt_t          cl_pkt_i,
  // EIB data lines and turn lines
  output logic               dl_drive_o,
  output dword_t             dl_word_o,
  input  logic               dl_valid_i,
  input  dword_t             dl_word_i,
  output logic               lt_fall_o,
  input  logic               lt_fall_i,
  output logic               lbeta_o,
  input  logic               lbeta_i,
  // observation
  output logic               lp_up_o,
  output logic [LC_ID_W-1:0] lp_partner_o,
  output logic               grant_o,
  output logic [LC_ID_W-1:0] beta_o,
  output logic [BW_W-1:0]    b_prom_o,
  output logic               remote_lookup_o,   // a REQ_L answer came back
  output logic [15:0]        sru_pkt_cnt_o,
  output logic [15:0]        sru_drop_cnt_o,
  output logic [15:0]        pdlu_drop_cnt_o,
  output logic [15:0]        rx_drop_cnt_o
);
  wire pdlu_bad = fault_i[U_PDLU];
  wire sru_bad  = fault_i[U_SRU];
  wire lfe_bad  = fault_i[U_LFE];
  wire piu_bad  = fault_i[U_PIU];

  // ------------------------------------------------ data-line receive FIFOs
  logic   rx_valid;
  dword_t rx_word;
  localparam int unsigned RW = DATA_W + 2;
  logic [RW-1:0] rxq_rdata [3];
  logic [2:0]    rxq_push, rxq_pop, rxq_full, rxq_empty;
  logic [$clog2(RX_DEPTH):0] rxq_count [3];

  // A packet is admitted at its first word only if the buffer has room for
  // a packet of the largest size (BUF_DEPTH words); otherwise the whole
  // packet is dropped, so that no partial packet enters a unit.
  logic [2:0] rx_for, rx_drop_q, rx_admit;
  for (genvar u = 0; u < 3; u++) begin : g_rxq
    // 0: for the PDLU, 1: for the SRU, 2: for the PIU (reverse path)
    assign rx_for[u] = rx_valid &&
                       ((u == 0 && rx_word.unit == U_PDLU) ||
                        (u == 1 && rx_word.unit == U_SRU)  ||
                        (u == 2 && rx_word.unit == U_PIU));
    assign rx_admit[u] = (int'(RX_DEPTH) - int'(rxq_count[u])) >= int'(BUF_DEPTH);
    assign rxq_push[u] = rx_for[u] && !rxq_full[u] &&
                         (rx_word.sop ? rx_admit[u] : !rx_drop_q[u]);
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) rx_drop_q[u] <= 1'b0;
      else if (rx_for[u] && rx_word.sop) rx_drop_q[u] <= !rx_admit[u];
    end
    sync_fifo #(.WIDTH(RW), .DEPTH(RX_DEPTH)) u_q (
      .clk, .rst_n, .push_i(rxq_push[u]), .wdata_i({rx_word.sop, rx_word.eop, rx_word.data}),
      .pop_i(rxq_pop[u]), .rdata_o(rxq_rdata[u]), .full_o(rxq_full[u]),
      .empty_o(rxq_empty[u]), .count_o(rxq_count[u]));
  end

  // dropped packets, counted at their first word
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rx_drop_cnt_o <= '0;
    else if (|(rx_for & ~rx_admit) && rx_word.sop) rx_drop_cnt_o <= rx_drop_cnt_o + 1'b1;
  end

  // ------------------------------------------------ ingress: PIU -> PDLU
  logic              pm_valid, pm_sop, pm_eop, pm_ready, loc_pdlu_ready;
  logic [DATA_W-1:0] pm_data;
  logic              st_ready;

  pkt_merge u_merge_pdlu (
    .clk, .rst_n,
    .a_valid_i(piu_in_valid_i && !pdlu_bad && !piu_bad), .a_sop_i(piu_in_sop_i),
    .a_eop_i(piu_in_eop_i), .a_data_i(piu_in_data_i), .a_ready_o(loc_pdlu_ready),
    .b_valid_i(!rxq_empty[0]), .b_sop_i(rxq_rdata[0][RW-1]), .b_eop_i(rxq_rdata[0][RW-2]),
    .b_data_i(rxq_rdata[0][DATA_W-1:0]), .b_ready_o(rxq_pop[0]),
    .o_valid_o(pm_valid), .o_sop_o(pm_sop), .o_eop_o(pm_eop), .o_data_o(pm_data),
    .o_ready_i(pm_ready));

  // PDLU failed: frames go to the bus controller instead
  assign piu_in_ready_o = piu_bad ? 1'b0 : (pdlu_bad ? st_ready : loc_pdlu_ready);

  // ------------------------------------------------ PDLU
  logic              ip_valid, ip_sop, ip_eop, ip_ready;
  logic [DATA_W-1:0] ip_data, l2_hdr;
  logic              eg_valid, eg_sop, eg_eop, eg_ready;
  logic [DATA_W-1:0] eg_data;
  logic              po_valid, po_sop, po_eop, po_ready;
  logic [DATA_W-1:0] po_data;

  pdlu #(.PROTO(PROTO)) u_pdlu (
    .clk, .rst_n,
    .in_valid_i(pm_valid), .in_sop_i(pm_sop), .in_eop_i(pm_eop), .in_data_i(pm_data),
    .in_ready_o(pm_ready),
    .ip_valid_o(ip_valid), .ip_sop_o(ip_sop), .ip_eop_o(ip_eop), .ip_data_o(ip_data),
    .l2_hdr_o(l2_hdr), .ip_ready_i(ip_ready), .drop_cnt_o(pdlu_drop_cnt_o),
    .eg_valid_i(eg_valid), .eg_sop_i(eg_sop), .eg_eop_i(eg_eop), .eg_data_i(eg_data),
    .eg_ready_o(eg_ready),
    .out_valid_o(po_valid), .out_sop_o(po_sop), .out_eop_o(po_eop), .out_data_o(po_data),
    .out_ready_i(po_ready));

  // ------------------------------------------------ PDLU -> SRU
  logic              sm_valid, sm_sop, sm_eop, sm_ready, loc_sru_ready;
  logic [DATA_W-1:0] sm_data;

  pkt_merge u_merge_sru (
    .clk, .rst_n,
    .a_valid_i(ip_valid && !sru_bad), .a_sop_i(ip_sop), .a_eop_i(ip_eop), .a_data_i(ip_data),
    .a_ready_o(loc_sru_ready),
    .b_valid_i(!rxq_empty[1]), .b_sop_i(rxq_rdata[1][RW-1]), .b_eop_i(rxq_rdata[1][RW-2]),
    .b_data_i(rxq_rdata[1][DATA_W-1:0]), .b_ready_o(rxq_pop[1]),
    .o_valid_o(sm_valid), .o_sop_o(sm_sop), .o_eop_o(sm_eop), .o_data_o(sm_data),
    .o_ready_i(sm_ready));

  assign ip_ready = sru_bad ? (pdlu_bad ? 1'b0 : st_ready) : loc_sru_ready;

  // ------------------------------------------------ SRU and LFE
  logic              lk_req, lk_resp, lk_hit, a_resp, a_hit, r_resp, r_hit;
  logic [ADDR_W-1:0] lk_addr;
  logic [LC_ID_W-1:0] lk_lc, a_lc, r_lc;
  logic              srv_req, srv_resp, srv_hit;
  logic [ADDR_W-1:0] srv_addr;
  logic [LC_ID_W-1:0] srv_lc;

  sru #(.LC_ID(LC_ID), .CELL_WORDS(CELL_WORDS), .BUF_DEPTH(BUF_DEPTH)) u_sru (
    .clk, .rst_n,
    .in_valid_i(sm_valid), .in_sop_i(sm_sop), .in_eop_i(sm_eop), .in_data_i(sm_data),
    .in_ready_o(sm_ready),
    .lk_req_o(lk_req), .lk_addr_o(lk_addr), .lk_resp_i(lk_resp), .lk_hit_i(lk_hit),
    .lk_lc_i(lk_lc),
    .cell_valid_o(cell_valid_o), .cell_sop_o(cell_sop_o), .cell_eop_o(cell_eop_o),
    .cell_data_o(cell_data_o), .cell_ready_i(cell_ready_i),
    .rc_valid_i(fab_valid_i), .rc_sop_i(fab_sop_i), .rc_eop_i(fab_eop_i),
    .rc_data_i(fab_data_i), .rc_ready_o(fab_ready_o),
    .out_valid_o(eg_valid), .out_sop_o(eg_sop), .out_eop_o(eg_eop), .out_data_o(eg_data),
    .out_ready_i(eg_ready),
    .pkt_cnt_o(sru_pkt_cnt_o), .drop_cnt_o(sru_drop_cnt_o));

  lfe #(.ENTRIES(ENTRIES)) u_lfe (
    .clk, .rst_n,
    .wr_en_i(rt_wr_en_i), .wr_idx_i(rt_wr_idx_i), .wr_valid_i(rt_wr_valid_i),
    .wr_prefix_i(rt_wr_prefix_i), .wr_len_i(rt_wr_len_i), .wr_lc_i(rt_wr_lc_i),
    .a_req_i(lk_req && !lfe_bad), .a_addr_i(lk_addr), .a_resp_o(a_resp), .a_hit_o(a_hit),
    .a_lc_o(a_lc),
    .b_req_i(srv_req), .b_addr_i(srv_addr), .b_resp_o(srv_resp), .b_hit_o(srv_hit),
    .b_lc_o(srv_lc));

  assign lk_resp = lfe_bad ? r_resp : a_resp;
  assign lk_hit  = lfe_bad ? r_hit  : a_hit;
  assign lk_lc   = lfe_bad ? r_lc   : a_lc;
  assign remote_lookup_o = r_resp;

  // ------------------------------------------------ egress to the PIU
  pkt_merge u_merge_piu (
    .clk, .rst_n,
    .a_valid_i(po_valid), .a_sop_i(po_sop), .a_eop_i(po_eop), .a_data_i(po_data),
    .a_ready_o(po_ready),
    .b_valid_i(!rxq_empty[2]), .b_sop_i(rxq_rdata[2][RW-1]), .b_eop_i(rxq_rdata[2][RW-2]),
    .b_data_i(rxq_rdata[2][DATA_W-1:0]), .b_ready_o(rxq_pop[2]),
    .o_valid_o(piu_out_valid_o), .o_sop_o(piu_out_sop_o), .o_eop_o(piu_out_eop_o),
    .o_data_o(piu_out_data_o), .o_ready_i(piu_out_ready_i));

  // ------------------------------------------------ bus controller
  // The stream carried over the data lines: raw frames when the PDLU has
  // failed, IP packets when the SRU has failed. The stream stays open
  // until the packet in progress has been handed over.
  logic st_valid, st_sop, st_eop, mid_q, st_open;
  logic [LC_ID_W-1:0] lp_id;
  logic [7:0]         coll_cnt;
  logic [DATA_W-1:0] st_data;
  unit_e st_unit;
  assign st_unit  = pdlu_bad ? U_PDLU : U_SRU;
  assign st_valid = pdlu_bad ? (piu_in_valid_i && !piu_bad) : (sru_bad && ip_valid);
  assign st_sop   = pdlu_bad ? piu_in_sop_i  : ip_sop;
  assign st_eop   = pdlu_bad ? piu_in_eop_i  : ip_eop;
  assign st_data  = pdlu_bad ? piu_in_data_i : ip_data;
  assign st_open  = ((pdlu_bad || sru_bad) && !piu_bad) || mid_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mid_q <= 1'b0;
    else if (st_valid && st_ready) mid_q <= !st_eop;
  end

  bus_controller #(.LC_ID(LC_ID), .PROTO(PROTO), .N_LC(N_LC), .FIFO_DEPTH(BUF_DEPTH),
                   .B_BUS(B_BUS)) u_bc (
    .clk, .rst_n, .fault_i(fault_i), .avail_bw_i(avail_bw_i), .fault_map_o(fault_map_o),
    .stream_open_i(st_open), .stream_dst_i(LC_BCAST), .stream_unit_i(st_unit),
    .stream_bw_i(need_bw_i), .stream_valid_i(st_valid), .stream_sop_i(st_sop),
    .stream_eop_i(st_eop), .stream_data_i(st_data), .stream_ready_o(st_ready),
    .lp_up_o(lp_up_o), .lp_partner_o(lp_partner_o), .b_prom_o(b_prom_o),
    .rx_valid_o(rx_valid), .rx_word_o(rx_word),
    .lookup_req_i(lk_req && lfe_bad), .lookup_addr_i(lk_addr), .lookup_resp_o(r_resp),
    .lookup_hit_o(r_hit), .lookup_lc_o(r_lc),
    .srv_req_o(srv_req), .srv_addr_o(srv_addr), .srv_resp_i(srv_resp), .srv_hit_i(srv_hit),
    .srv_lc_i(srv_lc),
    .cl_drive_o(cl_drive_o), .cl_pkt_o(cl_pkt_o), .cl_valid_i(cl_valid_i),
    .cl_coll_i(cl_coll_i), .cl_pkt_i(cl_pkt_i),
    .dl_drive_o(dl_drive_o), .dl_word_o(dl_word_o), .dl_valid_i(dl_valid_i),
    .dl_word_i(dl_word_i), .lt_fall_o(lt_fall_o), .lt_fall_i(lt_fall_i),
    .lbeta_o(lbeta_o), .lbeta_i(lbeta_i),
    .grant_o(grant_o), .lp_id_o(lp_id), .beta_o(beta_o), .coll_cnt_o(coll_cnt));

  logic unused;
  assign unused = ^{l2_hdr, rxq_count[0], rxq_count[1], rxq_count[2], lp_id, coll_cnt,
                    rx_word.src, rx_word.dst};
endmodule
