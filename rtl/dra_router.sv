// dra_router: the linecards of a DRA router joined by the enhanced
// internal bus (EIB).
//
// Dependable Router Architecture (DRA) lets healthy linecards cover a
// linecard with a failed unit, without spare linecards: the maintenance bus
// every router already has is upgraded to the EIB, and the failed unit's
// work is sent over it to a unit of the same kind on another linecard.
// This module holds N_LC linecards (linecard), the EIB control lines
// (eib_control_lines), which carry the control packets of the set-up and
// lookup protocol under CSMA/CD, and the EIB data lines (eib_data_lines),
// which logical paths share by round-robin time division. The two shared
// turn lines are formed here: L_t falls when any linecard ends its turn,
// L_beta rises when any linecard raises it.
//
// Linecard i implements protocol 1 + i / M, so groups of M linecards can
// cover each other's protocol-dependent unit; M = 2 and N_LC = 6 are taken
// from configurations the document evaluates. The physical interface units,
// the switching fabric and the route processor are outside this module:
// their signals are ports (piu_*, cell_* / fab_*, rt_*). Per-linecard
// signals are arrays indexed by linecard.
module dra_router
  import dra_pkg::*;
#(
  parameter int unsigned N_LC       = 6,
  parameter int unsigned M          = 2,
  parameter int unsigned ENTRIES    = 16,
  parameter int unsigned CELL_WORDS = 12,
  parameter int unsigned BUF_DEPTH  = 512,
  parameter int unsigned B_BUS      = 10000
) (
  input  logic               clk,
  input  logic               rst_n,
  input  fault_vec_t         fault_i     [N_LC],
  input  logic [BW_W-1:0]    avail_bw_i  [N_LC],
  input  logic [BW_W-1:0]    need_bw_i   [N_LC],
  // route processor: one table write, copied into every LFE
  input  logic                       rt_wr_en_i,
  input  logic [$clog2(ENTRIES)-1:0] rt_wr_idx_i,
  input  logic                       rt_wr_valid_i,
  input  logic [ADDR_W-1:0]          rt_wr_prefix_i,
  input  logic [5:0]                 rt_wr_len_i,
  input  logic [LC_ID_W-1:0]         rt_wr_lc_i,
  // physical interface units
  input  logic [N_LC-1:0]    piu_in_valid_i,
  input  logic [N_LC-1:0]    piu_in_sop_i,
  input  logic [N_LC-1:0]    piu_in_eop_i,
  input  logic [DATA_W-1:0]  piu_in_data_i [N_LC],
  output logic [N_LC-1:0]    piu_in_ready_o,
  output logic [N_LC-1:0]    piu_out_valid_o,
  output logic [N_LC-1:0]    piu_out_sop_o,
  output logic [N_LC-1:0]    piu_out_eop_o,
  output logic [DATA_W-1:0]  piu_out_data_o [N_LC],
  input  logic [N_LC-1:0]    piu_out_ready_i,
  // switching fabric ports
  output logic [N_LC-1:0]    cell_valid_o,
  output logic [N_LC-1:0]    cell_sop_o,
  output logic [N_LC-1:0]    cell_eop_o,
  output logic [DATA_W-1:0]  cell_data_o [N_LC],
  input  logic [N_LC-1:0]    cell_ready_i,
  input  logic [N_LC-1:0]    fab_valid_i,
  input  logic [N_LC-1:0]    fab_sop_i,
  input  logic [N_LC-1:0]    fab_eop_i,
  input  logic [DATA_W-1:0]  fab_data_i [N_LC],
  output logic [N_LC-1:0]    fab_ready_o,
  // observation
  output fault_vec_t         fault_map_o [N_LC][N_LC],
  output logic [N_LC-1:0]    lp_up_o,
  output logic [LC_ID_W-1:0] lp_partner_o [N_LC],
  output logic [N_LC-1:0]    grant_o,
  output logic [LC_ID_W-1:0] beta_o      [N_LC],
  output logic [BW_W-1:0]    b_prom_o    [N_LC],
  output logic [N_LC-1:0]    remote_lookup_o,
  output logic [15:0]        sru_pkt_cnt_o  [N_LC],
  output logic [15:0]        sru_drop_cnt_o [N_LC],
  output logic [15:0]        pdlu_drop_cnt_o[N_LC],
  output logic [15:0]        rx_drop_cnt_o  [N_LC],
  output logic               cl_coll_o,
  output logic               dl_clash_o
);
  logic [N_LC-1:0] cl_drive, dl_drive, lt_fall_v, lbeta_v;
  ctrl_pkt_t       cl_pkt [N_LC];
  dword_t          dl_word [N_LC];
  logic            cl_valid, cl_coll, dl_valid;
  ctrl_pkt_t       cl_bus;
  dword_t          dl_bus;

  eib_control_lines #(.N_LC(N_LC)) u_ctrl_lines (
    .drive_i(cl_drive), .drive_pkt_i(cl_pkt), .bus_valid_o(cl_valid), .coll_o(cl_coll),
    .bus_pkt_o(cl_bus));

  eib_data_lines #(.N_LC(N_LC)) u_data_lines (
    .drive_i(dl_drive), .drive_word_i(dl_word), .valid_o(dl_valid), .clash_o(dl_clash_o),
    .word_o(dl_bus));

  wire lt_fall = |lt_fall_v;
  wire lbeta   = |lbeta_v;
  assign cl_coll_o = cl_coll;

  for (genvar i = 0; i < N_LC; i++) begin : g_lc
    linecard #(
      .LC_ID(LC_ID_W'(i)), .PROTO(PROTO_W'(1 + i / M)), .N_LC(N_LC), .ENTRIES(ENTRIES),
      .CELL_WORDS(CELL_WORDS), .BUF_DEPTH(BUF_DEPTH), .RX_DEPTH(2 * BUF_DEPTH), .B_BUS(B_BUS)
    ) u_lc (
      .clk, .rst_n,
      .fault_i(fault_i[i]), .avail_bw_i(avail_bw_i[i]), .need_bw_i(need_bw_i[i]),
      .fault_map_o(fault_map_o[i]),
      .rt_wr_en_i, .rt_wr_idx_i, .rt_wr_valid_i, .rt_wr_prefix_i, .rt_wr_len_i, .rt_wr_lc_i,
      .piu_in_valid_i(piu_in_valid_i[i]), .piu_in_sop_i(piu_in_sop_i[i]),
      .piu_in_eop_i(piu_in_eop_i[i]), .piu_in_data_i(piu_in_data_i[i]),
      .piu_in_ready_o(piu_in_ready_o[i]),
      .piu_out_valid_o(piu_out_valid_o[i]), .piu_out_sop_o(piu_out_sop_o[i]),
      .piu_out_eop_o(piu_out_eop_o[i]), .piu_out_data_o(piu_out_data_o[i]),
      .piu_out_ready_i(piu_out_ready_i[i]),
      .cell_valid_o(cell_valid_o[i]), .cell_sop_o(cell_sop_o[i]), .cell_eop_o(cell_eop_o[i]),
      .cell_data_o(cell_data_o[i]), .cell_ready_i(cell_ready_i[i]),
      .fab_valid_i(fab_valid_i[i]), .fab_sop_i(fab_sop_i[i]), .fab_eop_i(fab_eop_i[i]),
      .fab_data_i(fab_data_i[i]), .fab_ready_o(fab_ready_o[i]),
      .cl_drive_o(cl_drive[i]), .cl_pkt_o(cl_pkt[i]), .cl_valid_i(cl_valid),
      .cl_coll_i(cl_coll), .cl_pkt_i(cl_bus),
      .dl_drive_o(dl_drive[i]), .dl_word_o(dl_word[i]), .dl_valid_i(dl_valid),
      .dl_word_i(dl_bus), .lt_fall_o(lt_fall_v[i]), .lt_fall_i(lt_fall),
      .lbeta_o(lbeta_v[i]), .lbeta_i(lbeta),
      .lp_up_o(lp_up_o[i]), .lp_partner_o(lp_partner_o[i]), .grant_o(grant_o[i]),
      .beta_o(beta_o[i]), .b_prom_o(b_prom_o[i]), .remote_lookup_o(remote_lookup_o[i]),
      .sru_pkt_cnt_o(sru_pkt_cnt_o[i]), .sru_drop_cnt_o(sru_drop_cnt_o[i]),
      .pdlu_drop_cnt_o(pdlu_drop_cnt_o[i]), .rx_drop_cnt_o(rx_drop_cnt_o[i]));
  end

  // The time-division turns must never put two linecards on the data lines.
  a_one_driver: assert property (@(posedge clk) disable iff (!rst_n) !dl_clash_o);
endmodule
