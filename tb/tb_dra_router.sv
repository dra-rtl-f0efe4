// tb_dra_router: the whole router, six linecards at the default sizes,
// with a behavioural switching fabric. Linecards send IP packets in their
// Layer-2 envelopes to linecards 1 and 3; every packet must come out of
// the right linecard's physical-interface port once, intact, in the
// receiving linecard's envelope. The run goes through these phases:
//   0. no faults: traffic takes the fabric only, the EIB stays idle;
//   1. LC0's PDLU fails: LC1, the only other protocol-1 linecard, covers
//      it; LC2's SRU fails at the same time: any linecard covers it;
//      both requested bandwidths (6000 Mbit/s each) exceed the 10 Gbit/s
//      data lines together, so both promises are scaled to 5000;
//   2. LC4's LFE also fails: its lookups go out over the control lines;
//      then the linecard covering LC2's SRU loses its own SRU: it releases
//      LC2's logical path and LC2 finds another cover;
//   3. LC5's PIU fails: its incoming traffic stalls;
//   4. all faults repaired: the logical paths are released.
// It counts each mechanism (collisions on the control lines, LP set-ups
// and releases, data-line turns, L_beta reloads, scaled promises, remote
// lookups, PIU stall, PDLU and SRU coverage, releases by a covering
// linecard) and fails for one that never
// happened.
module tb_dra_router;
  import dra_pkg::*;
  localparam int N = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  fault_vec_t fault [N];
  logic [BW_W-1:0] avail [N], need [N];
  logic rt_en, rt_valid;
  logic [3:0] rt_idx, rt_lc;
  logic [31:0] rt_prefix;
  logic [5:0] rt_len;
  logic [N-1:0] pi_v, pi_s, pi_e, pi_r, po_v, po_s, po_e, po_r;
  logic [31:0] pi_d [N], po_d [N];
  logic [N-1:0] c_v, c_s, c_e, c_r, f_v, f_s, f_e, f_r;
  logic [31:0] c_d [N], f_d [N];
  fault_vec_t fmap [N][N];
  logic [N-1:0] lp_up, grant, rlook;
  logic [3:0] partner [N], beta [N];
  logic [15:0] b_prom [N], spc [N], sdc [N], pdc [N], rdc [N];
  logic cl_coll, dl_clash;
  int fab_cells;

  dra_router u_dut (
    .clk, .rst_n, .fault_i(fault), .avail_bw_i(avail), .need_bw_i(need),
    .rt_wr_en_i(rt_en), .rt_wr_idx_i(rt_idx), .rt_wr_valid_i(rt_valid),
    .rt_wr_prefix_i(rt_prefix), .rt_wr_len_i(rt_len), .rt_wr_lc_i(rt_lc),
    .piu_in_valid_i(pi_v), .piu_in_sop_i(pi_s), .piu_in_eop_i(pi_e), .piu_in_data_i(pi_d),
    .piu_in_ready_o(pi_r), .piu_out_valid_o(po_v), .piu_out_sop_o(po_s),
    .piu_out_eop_o(po_e), .piu_out_data_o(po_d), .piu_out_ready_i(po_r),
    .cell_valid_o(c_v), .cell_sop_o(c_s), .cell_eop_o(c_e), .cell_data_o(c_d),
    .cell_ready_i(c_r), .fab_valid_i(f_v), .fab_sop_i(f_s), .fab_eop_i(f_e),
    .fab_data_i(f_d), .fab_ready_o(f_r),
    .fault_map_o(fmap), .lp_up_o(lp_up), .lp_partner_o(partner), .grant_o(grant),
    .beta_o(beta), .b_prom_o(b_prom), .remote_lookup_o(rlook), .sru_pkt_cnt_o(spc),
    .sru_drop_cnt_o(sdc), .pdlu_drop_cnt_o(pdc), .rx_drop_cnt_o(rdc),
    .cl_coll_o(cl_coll), .dl_clash_o(dl_clash));

  fabric_model #(.N_LC(N)) u_fab (
    .clk, .rst_n, .cell_valid_i(c_v), .cell_sop_i(c_s), .cell_eop_i(c_e), .cell_data_i(c_d),
    .cell_ready_o(c_r), .fab_valid_o(f_v), .fab_sop_o(f_s), .fab_eop_o(f_e),
    .fab_data_o(f_d), .fab_ready_i(f_r), .cells_o(fab_cells));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask

  function automatic logic [3:0] proto_of(input int lc); return 4'(1 + lc / 2); endfunction

  // ---------------------------------------------------------- scoreboard
  // Word 5 of each packet is a tag {src, sequence}; the expected words of
  // each packet are kept by tag.
  typedef logic [31:0] wq_t [$];
  wq_t exp_pkt [int];
  int  exp_dst [int];
  int  sent_pkts = 0, recv_pkts = 0;
  logic [31:0] rx_buf [N][$];

  always @(posedge clk) if (rst_n) begin
    check(!dl_clash, "two linecards on the data lines");
    for (int d = 0; d < N; d++) if (po_v[d] && po_r[d]) begin
      if (po_s[d]) rx_buf[d].delete();
      rx_buf[d].push_back(po_d[d]);
      if (po_e[d]) begin
        int tag;
        tag = (rx_buf[d].size() > 6) ? int'(rx_buf[d][6]) : -1;
        recv_pkts++;
        if (!exp_pkt.exists(tag)) begin
          check(0, $sformatf("LC%0d: unknown or duplicate packet tag %h", d, tag));
        end else begin
          check(exp_dst[tag] == d, $sformatf("packet %h at LC%0d, expected LC%0d", tag, d, exp_dst[tag]));
          check(rx_buf[d][0] == {proto_of(d), 12'h000, 16'h0800}, "egress envelope");
          check(rx_buf[d].size() == exp_pkt[tag].size() + 1, "packet length");
          for (int k = 0; k < exp_pkt[tag].size() && k + 1 < rx_buf[d].size(); k++)
            check(rx_buf[d][k+1] == exp_pkt[tag][k], "packet word");
          exp_pkt.delete(tag);
        end
      end
    end
  end

  // ---------------------------------------------------------- sources
  logic [31:0] src_q [N][$];
  logic        src_sop [N][$];
  logic        src_eop [N][$];
  int seq [N];
  always_comb for (int i = 0; i < N; i++) begin
    pi_v[i] = src_q[i].size() > 0;
    pi_d[i] = pi_v[i] ? src_q[i][0] : '0;
    pi_s[i] = pi_v[i] ? src_sop[i][0] : 1'b0;
    pi_e[i] = pi_v[i] ? src_eop[i][0] : 1'b0;
  end
  always @(posedge clk) for (int i = 0; i < N; i++) if (pi_v[i] && pi_r[i]) begin
    void'(src_q[i].pop_front()); void'(src_sop[i].pop_front()); void'(src_eop[i].pop_front());
  end

  task automatic send_packet(input int s, input int d);
    int len, tag;
    logic [31:0] w [$];
    len = $urandom_range(7, 40);
    tag = (s << 16) | seq[s];
    seq[s]++;
    w.delete();
    for (int k = 0; k < len; k++) begin
      logic [31:0] x;
      case (k)
        0: x = {4'h4, 4'h5, 8'h00, 16'(len * 4)};
        4: x = {8'd10, 8'(d), 16'($urandom)};             // destination address
        5: x = 32'(tag);
        default: x = $urandom;
      endcase
      w.push_back(x);
    end
    exp_pkt[tag] = w;
    exp_dst[tag] = d;
    sent_pkts++;
    src_q[s].push_back({proto_of(s), 12'h000, 16'h0800});
    src_sop[s].push_back(1'b1); src_eop[s].push_back(1'b0);
    foreach (w[k]) begin
      src_q[s].push_back(w[k]);
      src_sop[s].push_back(1'b0);
      src_eop[s].push_back(k == len - 1);
    end
  endtask

  // ---------------------------------------------------------- mechanism counters
  int n_coll = 0, n_lp_set = 0, n_lp_rel = 0, n_turns = 0, n_lbeta = 0, n_scaled = 0;
  int n_rlook = 0, n_stall = 0, n_pdlu_cover = 0, n_sru_cover = 0, n_cover_rel = 0;
  int prev_beta = 0;
  always @(posedge clk) if (rst_n) begin
    if (cl_coll) n_coll++;
    if (int'(beta[3]) > prev_beta) n_lp_set++;
    if (int'(beta[3]) < prev_beta) n_lp_rel++;
    prev_beta = int'(beta[3]);
    if (|u_dut.lt_fall_v) n_turns++;
    if (|u_dut.lbeta_v) n_lbeta++;
    if (lp_up[0] && lp_up[2] && b_prom[0] < need[0]) n_scaled++;
    n_rlook += $countones(rlook);
    if (pi_v[5] && !pi_r[5]) n_stall++;
    if (u_dut.dl_valid && u_dut.dl_bus.unit == U_PDLU) n_pdlu_cover++;
    if (u_dut.dl_valid && u_dut.dl_bus.unit == U_SRU) n_sru_cover++;
    if (u_dut.cl_valid && u_dut.cl_bus.kind == CP_REL_D && u_dut.cl_bus.dst != LC_BCAST)
      n_cover_rel++;
  end

  task automatic traffic(input int pkts, input logic [N-1:0] srcs);
    for (int p = 0; p < pkts; p++)
      for (int s = 0; s < N; s++) if (srcs[s]) send_packet(s, (p + s) % 2 == 0 ? 1 : 3);
  endtask

  task automatic drain(input int max_cycles, input logic [N-1:0] srcs);
    int c;
    c = 0;
    while (c < max_cycles) begin
      bit busy;
      busy = 0;
      for (int s = 0; s < N; s++) if (srcs[s] && src_q[s].size() > 0) busy = 1;
      if (!busy && exp_pkt.size() == 0) break;
      @(posedge clk);
      c++;
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: %0d packets outstanding", exp_pkt.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      fault[i] = '0; avail[i] = 16'd7000; need[i] = 16'd6000; seq[i] = 0;
    end
    po_r = '1;
    rt_en = 0; rt_idx = 0; rt_valid = 0; rt_prefix = 0; rt_len = 0; rt_lc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // route processor: 10.i.0.0/16 -> LC i, and a default route to LC 3
    for (int i = 0; i <= N; i++) begin
      @(negedge clk);
      rt_en = 1; rt_idx = 4'(i); rt_valid = 1;
      rt_prefix = (i < N) ? {8'd10, 8'(i), 16'h0} : 32'h0;
      rt_len = (i < N) ? 6'd16 : 6'd0;
      rt_lc = (i < N) ? 4'(i) : 4'd3;
    end
    @(negedge clk);
    rt_en = 0;

    // phase 0: no faults
    traffic(8, 6'b111111);
    drain(40000, 6'b111111);
    check(exp_pkt.size() == 0, $sformatf("phase 0: %0d packets lost", exp_pkt.size()));
    check(n_lp_set == 0 && beta[0] == 0, "EIB used without a fault");
    $display("phase 0 done at cycle %0d: %0d packets", $time / 10, recv_pkts);

    // phase 1: PDLU fault at LC0, SRU fault at LC2
    @(negedge clk);
    fault[0] = 4'b0001;
    fault[2] = 4'b0010;
    repeat (400) @(posedge clk);
    check(lp_up[0] && partner[0] == 1, $sformatf("LC0's PDLU covered by LC%0d", partner[0]));
    check(lp_up[2] && partner[2] != 2, "LC2's SRU covered");
    check(b_prom[0] == 5000 && b_prom[2] == 5000,
          $sformatf("promises %0d %0d, expected 5000 each", b_prom[0], b_prom[2]));
    for (int i = 0; i < N; i++) check(fmap[i][0] == 4'b0001 && fmap[i][2] == 4'b0010, "fault tables");
    traffic(10, 6'b111111);
    drain(80000, 6'b111111);
    check(exp_pkt.size() == 0, $sformatf("phase 1: %0d packets lost", exp_pkt.size()));
    $display("phase 1 done at cycle %0d: %0d packets", $time / 10, recv_pkts);

    // phase 2: LFE fault at LC4
    @(negedge clk);
    fault[4] = 4'b0100;
    repeat (200) @(posedge clk);
    traffic(10, 6'b111111);
    drain(80000, 6'b111111);
    check(exp_pkt.size() == 0, $sformatf("phase 2: %0d packets lost", exp_pkt.size()));
    $display("phase 2 done at cycle %0d: %0d packets", $time / 10, recv_pkts);

    // phase 2b: the linecard covering LC2's SRU loses its own SRU; it
    // releases LC2's LP and LC2 finds another cover
    begin
      int p;
      p = int'(partner[2]);
      // LC1 is LC0's only PDLU cover, so it must not be the one that fails
      check(p != 1 && p != 2, $sformatf("LC2 covered by LC%0d", p));
      @(negedge clk);
      fault[p] = fault[p] | 4'b0010;
      repeat (600) @(posedge clk);
      check(lp_up[2] && int'(partner[2]) != p && partner[2] != 2,
            $sformatf("LC2 re-covered by LC%0d after LC%0d failed", partner[2], p));
      check(lp_up[p] && lp_up[0], "the failed cover and LC0 have cover of their own");
      traffic(10, 6'b111111);
      drain(80000, 6'b111111);
      check(exp_pkt.size() == 0, $sformatf("phase 2b: %0d packets lost", exp_pkt.size()));
      $display("phase 2b done at cycle %0d: %0d packets (cover LC%0d failed, now LC%0d)",
               $time / 10, recv_pkts, p, partner[2]);
    end

    // phase 3: PIU fault at LC5: its traffic stops, the rest flows
    @(negedge clk);
    fault[5] = 4'b1000;
    repeat (50) @(posedge clk);
    traffic(4, 6'b100000);
    repeat (2000) @(posedge clk);
    check(src_q[5].size() > 0, "LC5 accepted traffic with a failed PIU");
    // withdraw LC5's stalled packets from the source and the expectations
    src_q[5].delete(); src_sop[5].delete(); src_eop[5].delete();
    foreach (exp_dst[t]) if ((t >> 16) == 5 && exp_pkt.exists(t)) exp_pkt.delete(t);
    traffic(6, 6'b011111);
    drain(80000, 6'b011111);
    check(exp_pkt.size() == 0, $sformatf("phase 3: %0d packets lost", exp_pkt.size()));

    // phase 4: repair
    @(negedge clk);
    for (int i = 0; i < N; i++) fault[i] = '0;
    repeat (600) @(posedge clk);
    check(lp_up == '0 && beta[0] == 0 && beta[5] == 0, "all LPs released after repair");
    traffic(4, 6'b111111);
    drain(40000, 6'b111111);
    check(exp_pkt.size() == 0, $sformatf("phase 4: %0d packets lost", exp_pkt.size()));

    for (int i = 0; i < N; i++)
      check(rdc[i] == 0 && sdc[i] == 0 && pdc[i] == 0, $sformatf("LC%0d dropped packets", i));
    $display("packets sent %0d received %0d, fabric cells %0d", sent_pkts, recv_pkts, fab_cells);
    $display("mechanisms: collisions=%0d lp_setups=%0d lp_releases=%0d turns=%0d lbeta=%0d scaled=%0d",
             n_coll, n_lp_set, n_lp_rel, n_turns, n_lbeta, n_scaled);
    $display("            remote_lookups=%0d piu_stall=%0d pdlu_cover_words=%0d sru_cover_words=%0d",
             n_rlook, n_stall, n_pdlu_cover, n_sru_cover);
    $display("            releases_by_cover=%0d", n_cover_rel);
    check(n_coll > 0, "no control-line collision");
    check(n_lp_set >= 2, "too few LP set-ups");
    check(n_lp_rel >= 2, "too few LP releases");
    check(n_turns > 0, "no data-line turn");
    check(n_lbeta > 0, "no L_beta reload");
    check(n_scaled > 0, "no scaled promise");
    check(n_rlook > 0, "no remote lookup");
    check(n_stall > 0, "no PIU stall");
    check(n_pdlu_cover > 0, "no PDLU coverage");
    check(n_sru_cover > 0, "no SRU coverage");
    check(n_cover_rel > 0, "no release by a covering linecard");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
