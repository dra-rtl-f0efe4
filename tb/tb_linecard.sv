// tb_linecard: two linecards of the same protocol on a two-linecard EIB,
// with the behavioural fabric. LC0 sends packets to LC1 and LC1 to LC0.
// Checks, with every packet compared word by word at the receiving
// physical-interface port:
//   1. fault-free path: PIU -> PDLU -> SRU -> fabric -> SRU -> PDLU -> PIU,
//      and no use of the EIB data lines;
//   2. LC0's PDLU failed: LC0's frames reach LC1's PDLU over the data lines
//      and continue from LC1 (cells with source LC1);
//      (a packet the covering linecard's receive buffer refuses is
//      counted by it and excused; all others must arrive);
//   3. LC0's LFE failed instead: LC0's lookups are answered by LC1 over the
//      control lines (REQ_L / REP_L) and the packets still arrive.
module tb_linecard;
  import dra_pkg::*;
  localparam int N = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  fault_vec_t fault [N];
  fault_vec_t fmap [N][N];
  logic rt_en, rt_valid;
  logic [3:0] rt_idx, rt_lc;
  logic [31:0] rt_prefix;
  logic [5:0] rt_len;
  logic [N-1:0] pi_v, pi_s, pi_e, pi_r, po_v, po_s, po_e;
  logic [31:0] pi_d [N], po_d [N];
  logic [N-1:0] c_v, c_s, c_e, c_r, f_v, f_s, f_e, f_r;
  logic [31:0] c_d [N], f_d [N];
  logic [N-1:0] cl_drive, dl_drive, ltf, lb, lp_up, grant, rlook;
  ctrl_pkt_t cl_pkt [N];
  dword_t dl_word [N];
  logic cl_valid, cl_coll, dl_valid, dl_clash;
  ctrl_pkt_t cl_bus;
  dword_t dl_bus;
  logic [3:0] partner [N], beta [N];
  logic [15:0] b_prom [N], spc [N], sdc [N], pdc [N], rdc [N];
  int fab_cells;

  eib_control_lines #(.N_LC(N)) u_cl (.drive_i(cl_drive), .drive_pkt_i(cl_pkt),
    .bus_valid_o(cl_valid), .coll_o(cl_coll), .bus_pkt_o(cl_bus));
  eib_data_lines #(.N_LC(N)) u_dl (.drive_i(dl_drive), .drive_word_i(dl_word),
    .valid_o(dl_valid), .clash_o(dl_clash), .word_o(dl_bus));
  fabric_model #(.N_LC(N)) u_fab (
    .clk, .rst_n, .cell_valid_i(c_v), .cell_sop_i(c_s), .cell_eop_i(c_e), .cell_data_i(c_d),
    .cell_ready_o(c_r), .fab_valid_o(f_v), .fab_sop_o(f_s), .fab_eop_o(f_e),
    .fab_data_o(f_d), .fab_ready_i(f_r), .cells_o(fab_cells));

  for (genvar i = 0; i < N; i++) begin : g_lc
    linecard #(.LC_ID(4'(i)), .PROTO(4'd1), .N_LC(N), .BUF_DEPTH(64), .RX_DEPTH(256)) u_lc (
      .clk, .rst_n, .fault_i(fault[i]), .avail_bw_i(16'd5000), .need_bw_i(16'd2000),
      .fault_map_o(fmap[i]),
      .rt_wr_en_i(rt_en), .rt_wr_idx_i(rt_idx), .rt_wr_valid_i(rt_valid),
      .rt_wr_prefix_i(rt_prefix), .rt_wr_len_i(rt_len), .rt_wr_lc_i(rt_lc),
      .piu_in_valid_i(pi_v[i]), .piu_in_sop_i(pi_s[i]), .piu_in_eop_i(pi_e[i]),
      .piu_in_data_i(pi_d[i]), .piu_in_ready_o(pi_r[i]),
      .piu_out_valid_o(po_v[i]), .piu_out_sop_o(po_s[i]), .piu_out_eop_o(po_e[i]),
      .piu_out_data_o(po_d[i]), .piu_out_ready_i(1'b1),
      .cell_valid_o(c_v[i]), .cell_sop_o(c_s[i]), .cell_eop_o(c_e[i]), .cell_data_o(c_d[i]),
      .cell_ready_i(c_r[i]), .fab_valid_i(f_v[i]), .fab_sop_i(f_s[i]), .fab_eop_i(f_e[i]),
      .fab_data_i(f_d[i]), .fab_ready_o(f_r[i]),
      .cl_drive_o(cl_drive[i]), .cl_pkt_o(cl_pkt[i]), .cl_valid_i(cl_valid),
      .cl_coll_i(cl_coll), .cl_pkt_i(cl_bus),
      .dl_drive_o(dl_drive[i]), .dl_word_o(dl_word[i]), .dl_valid_i(dl_valid),
      .dl_word_i(dl_bus), .lt_fall_o(ltf[i]), .lt_fall_i(|ltf), .lbeta_o(lb[i]),
      .lbeta_i(|lb),
      .lp_up_o(lp_up[i]), .lp_partner_o(partner[i]), .grant_o(grant[i]), .beta_o(beta[i]),
      .b_prom_o(b_prom[i]), .remote_lookup_o(rlook[i]), .sru_pkt_cnt_o(spc[i]),
      .sru_drop_cnt_o(sdc[i]), .pdlu_drop_cnt_o(pdc[i]), .rx_drop_cnt_o(rdc[i]));
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask

  typedef logic [31:0] wq_t [$];
  wq_t exp_pkt [int];
  int exp_dst [int];
  logic [31:0] rx_buf [N][$];
  int dl_words = 0, src1_cells_from0 = 0, n_rlook = 0;

  always @(posedge clk) if (rst_n) begin
    if (dl_valid) dl_words++;
    n_rlook += $countones(rlook);
    for (int d = 0; d < N; d++) if (po_v[d]) begin
      if (po_s[d]) rx_buf[d].delete();
      rx_buf[d].push_back(po_d[d]);
      if (po_e[d]) begin
        int tag;
        tag = int'(rx_buf[d][6]);
        if (!exp_pkt.exists(tag)) check(0, $sformatf("unknown packet %h", tag));
        else begin
          check(exp_dst[tag] == d, "packet at the wrong linecard");
          check(rx_buf[d].size() == exp_pkt[tag].size() + 1, "length");
          for (int k = 0; k < exp_pkt[tag].size() && k + 1 < rx_buf[d].size(); k++)
            check(rx_buf[d][k+1] == exp_pkt[tag][k], "word");
          exp_pkt.delete(tag);
        end
      end
    end
  end

  logic [31:0] sq [N][$];
  logic ss [N][$];
  logic se [N][$];
  int seq = 0;
  int dropped = 0;
  always_comb for (int i = 0; i < N; i++) begin
    pi_v[i] = sq[i].size() > 0;
    pi_d[i] = pi_v[i] ? sq[i][0] : '0;
    pi_s[i] = pi_v[i] ? ss[i][0] : 1'b0;
    pi_e[i] = pi_v[i] ? se[i][0] : 1'b0;
  end
  always @(posedge clk) for (int i = 0; i < N; i++) if (pi_v[i] && pi_r[i]) begin
    void'(sq[i].pop_front()); void'(ss[i].pop_front()); void'(se[i].pop_front());
  end

  task automatic send(input int s, input int d);
    int len;
    logic [31:0] w [$];
    len = $urandom_range(7, 30);
    for (int k = 0; k < len; k++)
      w.push_back(k == 4 ? {8'd10, 8'(d), 16'($urandom)} : (k == 5 ? 32'(seq) : $urandom));
    exp_pkt[seq] = w; exp_dst[seq] = d; seq++;
    sq[s].push_back({4'd1, 12'h0, 16'h0800}); ss[s].push_back(1); se[s].push_back(0);
    foreach (w[k]) begin sq[s].push_back(w[k]); ss[s].push_back(0); se[s].push_back(k == len-1); end
  endtask

  task automatic run_traffic(input int n);
    int c;
    for (int p = 0; p < n; p++) begin send(0, 1); send(1, 0); end
    c = 0;
    while ((exp_pkt.size() > int'(rdc[0] + rdc[1]) - dropped) && c < 20000) begin
      @(posedge clk); c++;
    end
    repeat (200) @(posedge clk);
    // packets the covering linecard refused (buffer full) are the only loss
    check(exp_pkt.size() == int'(rdc[0] + rdc[1]) - dropped,
          $sformatf("%0d packets lost, %0d refused", exp_pkt.size(), rdc[0] + rdc[1] - dropped));
    dropped = int'(rdc[0] + rdc[1]);
    exp_pkt.delete();
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fault[0] = '0; fault[1] = '0;
    rt_en = 0; rt_idx = 0; rt_valid = 0; rt_prefix = 0; rt_len = 0; rt_lc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      rt_en = 1; rt_idx = 4'(i); rt_valid = 1; rt_prefix = {8'd10, 8'(i), 16'h0};
      rt_len = 6'd16; rt_lc = 4'(i);
    end
    @(negedge clk);
    rt_en = 0;
    // 1. fault-free
    run_traffic(10);
    check(dl_words == 0, "data lines used without a fault");
    check(spc[0] == 10 && spc[1] == 10, "each SRU segmented its own packets");
    // 2. PDLU fault at LC0
    @(negedge clk);
    fault[0] = 4'b0001;
    repeat (200) @(posedge clk);
    check(lp_up[0] && partner[0] == 1, "LP from LC0 to LC1");
    check(fmap[1][0] == 4'b0001, "LC1 knows LC0's fault");
    run_traffic(10);
    check(dl_words > 0, "no words on the data lines");
    check(spc[0] == 10 && int'(spc[1]) == 30 - int'(rdc[1]), "LC1's SRU carried LC0's packets");
    $display("packets refused by LC1's receive buffer: %0d", rdc[1]);
    // 3. LFE fault at LC0 instead
    @(negedge clk);
    fault[0] = 4'b0100;
    repeat (300) @(posedge clk);
    check(!lp_up[0] && beta[1] == 0, "LP released when the PDLU was repaired");
    run_traffic(10);
    check(n_rlook == 10, $sformatf("%0d remote lookups, expected 10", n_rlook));
    check(spc[0] == 20, "LC0's SRU segmented with remote lookups");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
