// bus_controller: the EIB bus controller of one linecard.
//
// It runs the distributed protocol that lets healthy linecards cover a
// faulty one, in five parts:
//
//  * Fault table. Every linecard keeps the fault status of all linecards.
//    When the local status (fault_i) changes, the controller broadcasts an
//    FLT control packet; on hearing one it updates the sender's entry.
//  * Logical paths, initiator side. While stream_open_i is high the
//    linecard needs an LP over the data lines. It broadcasts REQ_D carrying
//    the fault location (the receiving unit), its protocol and its
//    requested bandwidth B_LC; stream_dst_i = LC_BCAST asks any covering
//    linecard (forward path), a specific ID asks that linecard (reverse
//    path). The first REP_D addressed to it establishes the LP with the
//    REP_D's sender. Words pushed into stream_* are buffered and sent in
//    this linecard's data-line turns, whole packets only: a packet is
//    started only when all of it is buffered (so a packet must fit in
//    FIFO_DEPTH words) and is finished in the same turn, so receivers see
//    each packet's words back to back. When stream_open_i falls and the
//    buffer is empty it broadcasts REL_D carrying its LP ID (ID_r). If no
//    reply comes within REQ_TIMEOUT cycles the REQ_D is repeated. If the
//    covering linecard releases the LP, LC_init sends REQ_D again and the
//    buffered packets go to the new partner.
//  * Release by the covering linecard. Every linecard tracks the LP ID of
//    each LC_init. A linecard that receives an LP and then loses the unit
//    it covers with (or its PIU, or, for PDLU cover, its SRU) sends REL_D
//    addressed to that LC_init, carrying that LP's ID. It sends it only
//    while no packet of the LP is half-way across the data lines.
//  * Logical paths, responder side. On a broadcast REQ_D from another
//    linecard it replies REP_D if its own unit of the faulty kind is
//    healthy, its spare bandwidth avail_bw_i covers the request on top of
//    the LPs it already receives, and, for a
//    PDLU fault, it implements the same protocol and its own SRU, which
//    will carry the covered traffic on, is healthy. On a REQ_D addressed to
//    it, it always replies. A pending REP_D is dropped as soon as another
//    linecard's REP_D to the same requester is heard.
//  * Remote lookups. When lookup_req_i arrives (the local LFE has failed)
//    the address goes out in a REQ_L; the first REP_L addressed to it with
//    the matching sequence tag gives the result. A linecard with a healthy
//    LFE answers a REQ_L by looking the address up in its own LFE (port
//    srv_*) and sending REP_L, unless another REP_L for it is heard first.
//  * Data-line turns and bandwidth. A tdm_arbiter holds the turn counters.
//    In its turn the controller sends buffered packets, starting new ones
//    while fewer than max(1, B_prom >> BURST_SHIFT) words have been sent
//    in the turn, then lowers L_t (lt_fall_o).
//    B_prom comes from bw_promise, with B_LCT summed over the bandwidths
//    of all established LPs, which every linecard tracks by LP ID.
//
// The packet kinds, their contents and sequence, the selection rules and
// the counters follow the published protocol. The packet format, the FLT
// announcement's encoding, the retry timer, the sequence tag, the burst
// rule and the order in which pending packets are sent (REP_L, REP_D,
// REL_D of a covering linecard, REL_D of LC_init, REQ_L, REQ_D, FLT) are
// this design's choices, and so is the one
// condition under which a covering linecard releases an LP (its covering
// unit failed); a release by LC_init is a broadcast, a release by the
// covering linecard is addressed to LC_init. A linecard serves as LC_init
// of at most one LP at a time.
//
// Timing: control packets go out through csma_cd_mac, one cycle each plus
// back-off; received packets act on the next clock edge. A data word is on
// the data lines in the cycle it is popped from the buffer.
module bus_controller
  import dra_pkg::*;
#(
  parameter logic [LC_ID_W-1:0] LC_ID       = '0,
  parameter logic [PROTO_W-1:0] PROTO       = '0,
  parameter int unsigned        N_LC        = 6,
  parameter int unsigned        FIFO_DEPTH  = 512,
  parameter int unsigned        REQ_TIMEOUT = 64,
  parameter int unsigned        BURST_SHIFT = 8,
  parameter int unsigned        B_BUS       = 10000
) (
  input  logic               clk,
  input  logic               rst_n,
  // local status
  input  fault_vec_t         fault_i,        // bit per unit_e, 1 = failed
  input  logic [BW_W-1:0]    avail_bw_i,     // spare bandwidth (psi), Mbit/s
  output fault_vec_t         fault_map_o [N_LC],
  // stream to be carried over the data lines (initiator side)
  input  logic               stream_open_i,
  input  logic [LC_ID_W-1:0] stream_dst_i,   // LC_BCAST: any covering LC
  input  unit_e              stream_unit_i,  // unit that must take the data
  input  logic [BW_W-1:0]    stream_bw_i,    // B_LC
  input  logic               stream_valid_i,
  input  logic               stream_sop_i,
  input  logic               stream_eop_i,
  input  logic [DATA_W-1:0]  stream_data_i,
  output logic               stream_ready_o,
  output logic               lp_up_o,
  output logic [LC_ID_W-1:0] lp_partner_o,
  output logic [BW_W-1:0]    b_prom_o,
  // words received over the data lines for this linecard
  output logic               rx_valid_o,
  output dword_t             rx_word_o,
  // remote lookup, requester side
  input  logic               lookup_req_i,
  input  logic [ADDR_W-1:0]  lookup_addr_i,
  output logic               lookup_resp_o,
  output logic               lookup_hit_o,
  output logic [LC_ID_W-1:0] lookup_lc_o,
  // remote lookup, server side (to the local LFE's second port)
  output logic               srv_req_o,
  output logic [ADDR_W-1:0]  srv_addr_o,
  input  logic               srv_resp_i,
  input  logic               srv_hit_i,
  input  logic [LC_ID_W-1:0] srv_lc_i,
  // control lines
  output logic               cl_drive_o,
  output ctrl_pkt_t          cl_pkt_o,
  input  logic               cl_valid_i,
  input  logic               cl_coll_i,
  input  ctrl_pkt_t          cl_pkt_i,
  // data lines and turn lines
  output logic               dl_drive_o,
  output dword_t             dl_word_o,
  input  logic               dl_valid_i,
  input  dword_t             dl_word_i,
  output logic               lt_fall_o,
  input  logic               lt_fall_i,
  output logic               lbeta_o,
  input  logic               lbeta_i,
  // observation
  output logic               grant_o,
  output logic [LC_ID_W-1:0] lp_id_o,
  output logic [LC_ID_W-1:0] beta_o,
  output logic [7:0]         coll_cnt_o
);
  localparam int unsigned MAX_LP = 1 << LC_ID_W;
  // index width of the per-linecard tables (IDs are range-checked first)
  localparam int unsigned IW = (N_LC > 1) ? $clog2(N_LC) : 1;

  // ---------------------------------------------------------------- receive
  ctrl_pkt_t rx;
  logic      rx_ok, rx_other;
  assign rx       = cl_pkt_i;
  assign rx_ok    = cl_valid_i;
  assign rx_other = cl_valid_i && (cl_pkt_i.src != LC_ID);

  // LP ownership as seen by every linecard: lp_own[k] = LC k is an LC_init.
  logic [N_LC-1:0] lp_own_q;
  wire lp_add = rx_ok && rx.kind == CP_REP_D && int'(rx.dst) < N_LC && !lp_own_q[IW'(rx.dst)];
  // An REL_D names the LP's LC_init: its sender for a broadcast release by
  // LC_init, its destination for a release by the covering linecard.
  logic [LC_ID_W-1:0] rel_owner;
  assign rel_owner = (rx.dst == LC_BCAST) ? rx.src : rx.dst;
  wire lp_rel = rx_ok && rx.kind == CP_REL_D && int'(rel_owner) < N_LC && lp_own_q[IW'(rel_owner)];
  // this linecard's own LP released by its covering linecard
  wire rel_by_inter = lp_rel && rel_owner == LC_ID && rx.src != LC_ID;

  // ------------------------------------------------------------ fault table
  fault_vec_t fmap_q [N_LC];
  fault_vec_t fault_q;          // status last announced
  logic       flt_pend_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_LC; i++) fmap_q[i] <= '0;
    end else begin
      if (rx_other && rx.kind == CP_FLT && int'(rx.src) < N_LC)
        fmap_q[IW'(rx.src)] <= fault_vec_t'(rx.payload[3:0]);
      fmap_q[IW'(LC_ID)] <= fault_i;
    end
  end
  assign fault_map_o = fmap_q;

  // ------------------------------------------------------------- TDM turns
  logic               active, grant, my_add;
  logic [LC_ID_W-1:0] my_id, beta;
  logic [LC_ID_W+2:0] ctr_c;

  tdm_arbiter u_arb (
    .clk, .rst_n,
    .lp_add_i(lp_add), .lp_mine_i(my_add), .lp_rel_i(lp_rel), .lp_rel_id_i(rx.id_r),
    .lt_fall_i(lt_fall_i), .lbeta_i(lbeta_i), .lbeta_o(lbeta_o),
    .active_o(active), .grant_o(grant), .id_o(my_id), .beta_o(beta), .ctr_c_o(ctr_c));

  // Bandwidth of every established LP, indexed by LP ID - 1; renumbered on
  // release exactly as the IDs are.
  logic [BW_W-1:0] lp_bw_q [MAX_LP];
  logic [BW_W+3:0] b_lct;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < MAX_LP; k++) lp_bw_q[k] <= '0;
    end else if (lp_rel) begin
      for (int k = 0; k < MAX_LP; k++)
        if (k + 1 >= int'(rx.id_r)) lp_bw_q[k] <= (k + 1 < MAX_LP) ? lp_bw_q[k+1] : '0;
    end else if (lp_add) begin
      lp_bw_q[beta] <= rx.bw;
    end
  end
  always_comb begin
    b_lct = '0;
    for (int k = 0; k < MAX_LP; k++) b_lct = b_lct + (BW_W+4)'(lp_bw_q[k]);
  end

  // Global view of the LPs: LP ID of every LC_init (renumbered on release
  // like Ctr_LC), and the LPs this linecard receives, with the unit each
  // one feeds.
  logic [LC_ID_W-1:0] owner_id_q [N_LC];
  logic [N_LC-1:0]    served_q;
  unit_e              served_unit_q [N_LC];
  unit_e              repd_unit_q;
  logic [N_LC-1:0]    rx_mid_q;     // a packet from LC k to me is in progress

  // A covering linecard whose covering unit (or its PIU, or for PDLU cover
  // its SRU) has failed releases the LP it receives. It waits until no
  // packet of that LP is half-way across the data lines, so that LC_init
  // never stops inside a packet.
  logic [N_LC-1:0]    drop_lp;
  logic               irel_req;
  logic [LC_ID_W-1:0] irel_owner;
  always_comb begin
    irel_req   = 1'b0;
    irel_owner = '0;
    for (int k = N_LC - 1; k >= 0; k--) begin
      drop_lp[k] = served_q[k] && !rx_mid_q[k] &&
                   !(dl_valid_i && int'(dl_word_i.src) == k && dl_word_i.dst == LC_ID &&
                     !dl_word_i.eop) &&
                   (fault_i[served_unit_q[k]] || fault_i[U_PIU] ||
                    (served_unit_q[k] == U_PDLU && fault_i[U_SRU]));
      if (drop_lp[k]) begin
        irel_req   = 1'b1;
        irel_owner = LC_ID_W'(k);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N_LC; k++) begin
        owner_id_q[k]    <= '0;
        served_unit_q[k] <= U_PDLU;
      end
      served_q <= '0;
      rx_mid_q <= '0;
    end else begin
      if (lp_rel) begin
        for (int k = 0; k < N_LC; k++)
          if (owner_id_q[k] > rx.id_r) owner_id_q[k] <= owner_id_q[k] - 1'b1;
        served_q[IW'(rel_owner)] <= 1'b0;
      end else if (lp_add) begin
        owner_id_q[IW'(rx.dst)] <= beta + 1'b1;
        if (rx.src == LC_ID) begin
          served_q[IW'(rx.dst)]      <= 1'b1;
          served_unit_q[IW'(rx.dst)] <= repd_unit_q;
        end
      end
      if (dl_valid_i && dl_word_i.dst == LC_ID && int'(dl_word_i.src) < N_LC)
        rx_mid_q[IW'(dl_word_i.src)] <= !dl_word_i.eop;
    end
  end

  // bandwidth this linecard already carries for the LPs it receives
  logic [BW_W+3:0] served_bw;
  always_comb begin
    served_bw = '0;
    for (int k = 0; k < N_LC; k++)
      if (served_q[k] && owner_id_q[k] != '0)
        served_bw = served_bw + (BW_W+4)'(lp_bw_q[owner_id_q[k] - 1'b1]);
  end

  logic [BW_W-1:0] my_bw;
  logic            scaled;
  assign my_bw = (active && my_id != '0) ? lp_bw_q[my_id - 1'b1] : '0;
  bw_promise #(.B_BUS(B_BUS)) u_bw (.b_lc_i(my_bw), .b_lct_i(b_lct), .b_prom_o(b_prom_o),
                                    .scaled_o(scaled));

  // ----------------------------------------------------- initiator side
  typedef enum logic [1:0] {LP_IDLE, LP_WAIT, LP_UP, LP_REL} lp_state_e;
  lp_state_e          lp_st_q;
  logic [LC_ID_W-1:0] partner_q;
  unit_e              unit_q;
  logic [15:0]        timer_q;
  logic               reqd_pend_q, reld_pend_q;
  logic [BW_W-1:0]    req_bw_q;
  logic [LC_ID_W-1:0] req_dst_q;

  assign my_add = lp_add && rx.dst == LC_ID && lp_st_q == LP_WAIT;

  // data buffer
  localparam int unsigned FW = DATA_W + 2;
  logic            f_push, f_pop, f_full, f_empty;
  logic [FW-1:0]   f_rdata;
  logic [$clog2(FIFO_DEPTH):0] f_count;
  sync_fifo #(.WIDTH(FW), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .push_i(f_push), .wdata_i({stream_sop_i, stream_eop_i, stream_data_i}),
    .pop_i(f_pop), .rdata_o(f_rdata), .full_o(f_full), .empty_o(f_empty), .count_o(f_count));

  assign stream_ready_o = (lp_st_q == LP_UP) && stream_open_i && !f_full;
  assign f_push         = stream_valid_i && stream_ready_o;

  // turn: send up to burst words, then lower L_t
  logic [BW_W-1:0] burst_cap;
  logic [BW_W-1:0] sent_q;
  assign burst_cap = ((b_prom_o >> BURST_SHIFT) == '0) ? BW_W'(1) : (b_prom_o >> BURST_SHIFT);
  // whole packets only: a packet is started only when it is complete in the
  // buffer, and once started it is finished within the same turn
  logic            mid_pkt_q;
  logic [$clog2(FIFO_DEPTH):0] eops_q;
  assign f_pop      = grant && !f_empty &&
                      (mid_pkt_q || (eops_q != '0 && sent_q < burst_cap));
  assign lt_fall_o  = grant && !f_pop;
  assign dl_drive_o = f_pop;
  always_comb begin
    dl_word_o      = '0;
    dl_word_o.src  = LC_ID;
    dl_word_o.dst  = partner_q;
    dl_word_o.unit = unit_q;
    dl_word_o.sop  = f_rdata[FW-1];
    dl_word_o.eop  = f_rdata[FW-2];
    dl_word_o.data = f_rdata[DATA_W-1:0];
    if (!f_pop) dl_word_o = '0;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mid_pkt_q <= 1'b0;
      eops_q    <= '0;
    end else begin
      if (f_pop) mid_pkt_q <= !f_rdata[FW-2];
      eops_q <= eops_q + ($clog2(FIFO_DEPTH)+1)'(f_push && stream_eop_i)
                       - ($clog2(FIFO_DEPTH)+1)'(f_pop && f_rdata[FW-2]);
    end
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          sent_q <= '0;
    else if (!grant)     sent_q <= '0;
    else if (f_pop)      sent_q <= sent_q + 1'b1;
  end

  // receive from data lines
  assign rx_valid_o = dl_valid_i && dl_word_i.dst == LC_ID;
  assign rx_word_o  = dl_word_i;

  // --------------------------------------------------------- responder side
  logic               repd_pend_q;
  logic [LC_ID_W-1:0] repd_to_q;
  logic [BW_W-1:0]    repd_bw_q;
  logic               qualified;
  always_comb begin
    qualified = 1'b0;
    if (rx_other && rx.kind == CP_REQ_D) begin
      if (rx.dst == LC_ID)
        qualified = 1'b1;                               // reverse path: I am LC_out
      else if (rx.dst == LC_BCAST)
        qualified = !fault_i[rx.unit] && !fault_i[U_PIU] &&
                    (rx.unit != U_PDLU || !fault_i[U_SRU]) &&
                    ((BW_W+4)'(avail_bw_i) >= served_bw + (BW_W+4)'(rx.bw)) &&
                    (rx.unit != U_PDLU || rx.proto == PROTO);
    end
  end

  // ----------------------------------------------------------- lookups
  logic               reql_pend_q, reql_wait_q;
  logic [ADDR_W-1:0]  reql_addr_q;
  logic [SEQ_W-1:0]   seq_q;
  logic [15:0]        ltimer_q;
  logic               srv_busy_q, repl_pend_q;
  logic [LC_ID_W-1:0] repl_to_q;
  logic [SEQ_W-1:0]   repl_seq_q;
  logic [ADDR_W-1:0]  repl_res_q;

  assign srv_req_o  = rx_other && rx.kind == CP_REQ_L && !fault_i[U_LFE] &&
                      !srv_busy_q && !repl_pend_q;
  assign srv_addr_o = rx.payload;

  // ------------------------------------------------------- transmit select
  ctrl_pkt_t tx_pkt;
  logic      tx_req, tx_done;
  always_comb begin
    tx_pkt = '0;
    tx_pkt.src = LC_ID;
    tx_pkt.proto = PROTO;
    tx_req = 1'b1;
    if (repl_pend_q) begin
      tx_pkt.kind = CP_REP_L; tx_pkt.dst = repl_to_q; tx_pkt.seq = repl_seq_q;
      tx_pkt.payload = repl_res_q;
    end else if (repd_pend_q) begin
      tx_pkt.kind = CP_REP_D; tx_pkt.dst = repd_to_q; tx_pkt.bw = repd_bw_q;
    end else if (irel_req) begin
      tx_pkt.kind = CP_REL_D; tx_pkt.dst = irel_owner; tx_pkt.id_r = owner_id_q[IW'(irel_owner)];
    end else if (reld_pend_q) begin
      tx_pkt.kind = CP_REL_D; tx_pkt.dst = LC_BCAST; tx_pkt.id_r = my_id;
    end else if (reql_pend_q) begin
      tx_pkt.kind = CP_REQ_L; tx_pkt.dst = LC_BCAST; tx_pkt.seq = seq_q;
      tx_pkt.payload = reql_addr_q;
    end else if (reqd_pend_q) begin
      tx_pkt.kind = CP_REQ_D; tx_pkt.dst = req_dst_q; tx_pkt.unit = unit_q;
      tx_pkt.bw = req_bw_q;
    end else if (flt_pend_q) begin
      tx_pkt.kind = CP_FLT; tx_pkt.dst = LC_BCAST; tx_pkt.payload = ADDR_W'(fault_q);
    end else begin
      tx_req = 1'b0;
    end
  end

  csma_cd_mac #(.LC_ID(LC_ID)) u_mac (
    .clk, .rst_n, .tx_req_i(tx_req), .tx_pkt_i(tx_pkt), .tx_done_o(tx_done),
    .drive_o(cl_drive_o), .drive_pkt_o(cl_pkt_o), .coll_i(cl_coll_i), .coll_cnt_o(coll_cnt_o));

  // my own packet seen alone on the lines
  wire sent_ok = rx_ok && rx.src == LC_ID;

  // ---------------------------------------------------------- state update
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lp_own_q    <= '0;
      fault_q     <= '0;
      flt_pend_q  <= 1'b0;
      lp_st_q     <= LP_IDLE;
      partner_q   <= '0;
      unit_q      <= U_PDLU;
      timer_q     <= '0;
      reqd_pend_q <= 1'b0;
      reld_pend_q <= 1'b0;
      req_bw_q    <= '0;
      req_dst_q   <= '0;
      repd_pend_q <= 1'b0;
      repd_to_q   <= '0;
      repd_bw_q   <= '0;
      repd_unit_q <= U_PDLU;
      reql_pend_q <= 1'b0;
      reql_wait_q <= 1'b0;
      reql_addr_q <= '0;
      seq_q       <= '0;
      ltimer_q    <= '0;
      srv_busy_q  <= 1'b0;
      repl_pend_q <= 1'b0;
      repl_to_q   <= '0;
      repl_seq_q  <= '0;
      repl_res_q  <= '0;
      lookup_resp_o <= 1'b0;
      lookup_hit_o  <= 1'b0;
      lookup_lc_o   <= '0;
    end else begin
      lookup_resp_o <= 1'b0;

      // LP ownership, global view
      if (lp_add) lp_own_q[IW'(rx.dst)] <= 1'b1;
      if (lp_rel) lp_own_q[IW'(rel_owner)] <= 1'b0;

      // fault announcements
      if (fault_i != fault_q) begin
        fault_q    <= fault_i;
        flt_pend_q <= 1'b1;
      end else if (sent_ok && rx.kind == CP_FLT) begin
        flt_pend_q <= 1'b0;
      end

      // initiator
      case (lp_st_q)
        LP_IDLE: if (stream_open_i) begin
          lp_st_q     <= LP_WAIT;
          reqd_pend_q <= 1'b1;
          unit_q      <= stream_unit_i;
          req_bw_q    <= stream_bw_i;
          req_dst_q   <= stream_dst_i;
          timer_q     <= '0;
        end
        LP_WAIT: begin
          if (my_add) begin
            lp_st_q     <= LP_UP;
            partner_q   <= rx.src;
            reqd_pend_q <= 1'b0;
          end else begin
            if (sent_ok && rx.kind == CP_REQ_D) reqd_pend_q <= 1'b0;
            if (!reqd_pend_q) begin
              timer_q <= timer_q + 1'b1;
              if (int'(timer_q) >= REQ_TIMEOUT) begin
                reqd_pend_q <= 1'b1;
                timer_q     <= '0;
              end
            end
            if (!stream_open_i && !reqd_pend_q) lp_st_q <= LP_IDLE;
          end
        end
        LP_UP: if (rel_by_inter) begin
          // the covering linecard gave the LP up: ask again
          lp_st_q     <= LP_WAIT;
          reqd_pend_q <= 1'b1;
          timer_q     <= '0;
        end else if (!stream_open_i && f_empty && !grant) begin
          lp_st_q     <= LP_REL;
          reld_pend_q <= 1'b1;
        end
        LP_REL: if (rel_by_inter || (sent_ok && rx.kind == CP_REL_D && rx.dst == LC_BCAST)) begin
          lp_st_q     <= LP_IDLE;
          reld_pend_q <= 1'b0;
        end
        default: lp_st_q <= LP_IDLE;
      endcase

      // responder
      if (repd_pend_q) begin
        if (rx_ok && rx.kind == CP_REP_D && rx.dst == repd_to_q) repd_pend_q <= 1'b0;
      end else if (qualified) begin
        repd_pend_q <= 1'b1;
        repd_to_q   <= rx.src;
        repd_bw_q   <= rx.bw;
        repd_unit_q <= rx.unit;
      end

      // lookup requester
      if (lookup_req_i && !reql_wait_q) begin
        reql_pend_q <= 1'b1;
        reql_wait_q <= 1'b1;
        reql_addr_q <= lookup_addr_i;
        seq_q       <= seq_q + 1'b1;
        ltimer_q    <= '0;
      end else if (reql_wait_q) begin
        if (sent_ok && rx.kind == CP_REQ_L) reql_pend_q <= 1'b0;
        if (rx_other && rx.kind == CP_REP_L && rx.dst == LC_ID && rx.seq == seq_q) begin
          reql_wait_q   <= 1'b0;
          reql_pend_q   <= 1'b0;
          lookup_resp_o <= 1'b1;
          lookup_hit_o  <= rx.payload[31];
          lookup_lc_o   <= rx.payload[LC_ID_W-1:0];
        end else if (!reql_pend_q) begin
          ltimer_q <= ltimer_q + 1'b1;
          if (int'(ltimer_q) >= REQ_TIMEOUT) begin
            reql_pend_q <= 1'b1;
            ltimer_q    <= '0;
          end
        end
      end

      // lookup server
      if (srv_req_o) begin
        srv_busy_q <= 1'b1;
        repl_to_q  <= rx.src;
        repl_seq_q <= rx.seq;
      end
      if (srv_busy_q && srv_resp_i) begin
        srv_busy_q  <= 1'b0;
        repl_pend_q <= 1'b1;
        repl_res_q  <= {srv_hit_i, (ADDR_W-1-LC_ID_W)'(0), srv_lc_i};
      end
      if (repl_pend_q && rx_ok && rx.kind == CP_REP_L && rx.dst == repl_to_q &&
          rx.seq == repl_seq_q)
        repl_pend_q <= 1'b0;      // sent by me, or answered by another LC
    end
  end

  assign lp_up_o      = (lp_st_q == LP_UP);
  assign lp_partner_o = partner_q;
  assign grant_o      = grant;
  assign lp_id_o      = my_id;
  assign beta_o       = beta;

  // The turn arbitration must give the data lines to one linecard only.
  a_grant_needs_lp: assert property (@(posedge clk) disable iff (!rst_n) grant |-> active);
  // tx_done, ctr_c and scaled are observation-only here.
  logic unused;
  assign unused = ^{tx_done, ctr_c, scaled, f_count};
endmodule
