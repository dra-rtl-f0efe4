// tb_bus_controller: three bus controllers on shared control and data lines.
// LC0 and LC1 implement protocol 1, LC2 protocol 2. Each linecard's LFE is
// modelled in the bench (result = low address bits, hit when bit 31 is 0).
// Scenarios, each checked against values worked out here:
//  1. a fault announcement reaches every fault table;
//  2. a PDLU fault at LC0: only LC1 (same protocol) may cover it; the
//     stream's words arrive at LC1, in order, tagged for its PDLU;
//  3. an SRU fault at LC2 while LC0's LP is up: a second LP, both share
//     the data lines, beta = 2 everywhere, promises equal the requests;
//  4. release of the first LP: beta = 1 and LC2's LP renumbers to ID 1;
//  5. remote lookup for LC2 (failed LFE) answered by another linecard;
//  6. reverse path: LC1 asks LC2 by ID and LC2 answers;
//  7. over-subscription: two LPs asking 8000 Mbit/s get 5000 each;
//  8. the linecard covering LC1's SRU loses its own SRU: it releases the
//     LP with an REL_D addressed to LC1, LC1 asks again, the other healthy
//     linecard takes over, and every word arrives once, in order, with
//     whole packets on each side of the change.
module tb_bus_controller;
  import dra_pkg::*;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  fault_vec_t fault [N];
  logic [BW_W-1:0] avail [N];
  fault_vec_t fmap [N][N];
  logic [N-1:0] s_open, s_valid, s_sop, s_eop, s_ready, lp_up;
  logic [LC_ID_W-1:0] s_dst [N];
  unit_e s_unit [N];
  logic [BW_W-1:0] s_bw [N], b_prom [N];
  logic [DATA_W-1:0] s_data [N];
  logic [LC_ID_W-1:0] partner [N], lp_id [N], beta [N];
  logic [N-1:0] rx_valid, lk_req, lk_resp, lk_hit, srv_req, srv_resp, srv_hit;
  dword_t rx_word [N];
  logic [ADDR_W-1:0] lk_addr [N], srv_addr [N];
  logic [LC_ID_W-1:0] lk_lc [N], srv_lc [N];
  logic [N-1:0] cl_drive, dl_drive, lt_fall_v, lbeta_v, grant;
  ctrl_pkt_t cl_pkt [N];
  dword_t dl_word [N];
  logic cl_valid, cl_coll, dl_valid, dl_clash;
  ctrl_pkt_t cl_bus;
  dword_t dl_bus;
  logic [7:0] coll_cnt [N];

  eib_control_lines #(.N_LC(N)) u_cl (.drive_i(cl_drive), .drive_pkt_i(cl_pkt),
    .bus_valid_o(cl_valid), .coll_o(cl_coll), .bus_pkt_o(cl_bus));
  eib_data_lines #(.N_LC(N)) u_dl (.drive_i(dl_drive), .drive_word_i(dl_word),
    .valid_o(dl_valid), .clash_o(dl_clash), .word_o(dl_bus));

  for (genvar i = 0; i < N; i++) begin : g_lc
    bus_controller #(.LC_ID(LC_ID_W'(i)), .PROTO(i == 2 ? 4'd2 : 4'd1), .N_LC(N)) u_bc (
      .clk, .rst_n, .fault_i(fault[i]), .avail_bw_i(avail[i]), .fault_map_o(fmap[i]),
      .stream_open_i(s_open[i]), .stream_dst_i(s_dst[i]), .stream_unit_i(s_unit[i]),
      .stream_bw_i(s_bw[i]), .stream_valid_i(s_valid[i]), .stream_sop_i(s_sop[i]),
      .stream_eop_i(s_eop[i]), .stream_data_i(s_data[i]), .stream_ready_o(s_ready[i]),
      .lp_up_o(lp_up[i]), .lp_partner_o(partner[i]), .b_prom_o(b_prom[i]),
      .rx_valid_o(rx_valid[i]), .rx_word_o(rx_word[i]),
      .lookup_req_i(lk_req[i]), .lookup_addr_i(lk_addr[i]), .lookup_resp_o(lk_resp[i]),
      .lookup_hit_o(lk_hit[i]), .lookup_lc_o(lk_lc[i]),
      .srv_req_o(srv_req[i]), .srv_addr_o(srv_addr[i]), .srv_resp_i(srv_resp[i]),
      .srv_hit_i(srv_hit[i]), .srv_lc_i(srv_lc[i]),
      .cl_drive_o(cl_drive[i]), .cl_pkt_o(cl_pkt[i]), .cl_valid_i(cl_valid),
      .cl_coll_i(cl_coll), .cl_pkt_i(cl_bus),
      .dl_drive_o(dl_drive[i]), .dl_word_o(dl_word[i]), .dl_valid_i(dl_valid),
      .dl_word_i(dl_bus), .lt_fall_o(lt_fall_v[i]), .lt_fall_i(|lt_fall_v),
      .lbeta_o(lbeta_v[i]), .lbeta_i(|lbeta_v),
      .grant_o(grant[i]), .lp_id_o(lp_id[i]), .beta_o(beta[i]), .coll_cnt_o(coll_cnt[i]));

    // bench model of each linecard's LFE second port
    always_ff @(posedge clk) begin
      srv_resp[i] <= srv_req[i];
      srv_hit[i]  <= !srv_addr[i][31];
      srv_lc[i]   <= srv_addr[i][LC_ID_W-1:0];
    end
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask

  // received words per linecard
  dword_t got [N][$];
  always @(posedge clk) if (rst_n) begin
    check(!dl_clash, "two drivers on the data lines");
    for (int i = 0; i < N; i++) if (rx_valid[i]) got[i].push_back(rx_word[i]);
  end

  // stream sources: send words 0..n-1 tagged with the LC in bits 31:28
  int to_send [N], sent [N];
  always_comb for (int i = 0; i < N; i++) begin
    s_valid[i] = sent[i] < to_send[i];
    s_data[i]  = {4'(i), 28'(sent[i])};
    s_sop[i]   = (sent[i] % 8) == 0;
    s_eop[i]   = (sent[i] % 8) == 7;
  end
  always @(posedge clk) for (int i = 0; i < N; i++) if (s_valid[i] && s_ready[i]) sent[i] <= sent[i] + 1;

  task automatic wait_cycles(input int n); repeat (n) @(posedge clk); endtask

  task automatic open_stream(input int lc, input logic [LC_ID_W-1:0] dst, input unit_e u,
                             input int bw, input int words);
    s_dst[lc] = dst; s_unit[lc] = u; s_bw[lc] = BW_W'(bw);
    to_send[lc] = words; sent[lc] = 0;
    s_open[lc] = 1'b1;
  endtask

  task automatic check_words(input int rcv, input int src, input int n, input unit_e u);
    int k;
    k = 0;
    foreach (got[rcv][j]) if (int'(got[rcv][j].src) == src) begin
      check(got[rcv][j].data == {4'(src), 28'(k)} && got[rcv][j].unit == u,
            $sformatf("LC%0d word %0d from LC%0d wrong", rcv, k, src));
      k++;
    end
    check(k == n, $sformatf("LC%0d got %0d of %0d words from LC%0d", rcv, k, n, src));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      fault[i] = '0; avail[i] = 16'd5000; s_open[i] = 0; s_dst[i] = LC_BCAST;
      s_unit[i] = U_PDLU; s_bw[i] = '0; lk_req[i] = 0; lk_addr[i] = '0;
      to_send[i] = 0; sent[i] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1. fault announcement
    @(negedge clk);
    fault[0] = 4'b0001;        // PDLU of LC0
    wait_cycles(40);
    for (int i = 0; i < N; i++)
      check(fmap[i][0] == 4'b0001, $sformatf("LC%0d fault table lacks LC0's fault", i));
    // 2. PDLU fault at LC0: only LC1 qualifies
    open_stream(0, LC_BCAST, U_PDLU, 3000, 40);
    wait_cycles(100);
    check(lp_up[0] && partner[0] == 1, $sformatf("LC0 LP partner %0d", partner[0]));
    check(lp_id[0] == 1 && beta[1] == 1 && beta[2] == 1, "first LP has ID 1 everywhere");
    // 3. SRU fault at LC2: second LP
    fault[2] = 4'b0010;
    open_stream(2, LC_BCAST, U_SRU, 2000, 40);
    wait_cycles(300);
    check(lp_up[2] && partner[2] != 2, "LC2 LP up");
    check(beta[0] == 2 && beta[1] == 2 && beta[2] == 2, "beta = 2 everywhere");
    check(lp_id[2] == 2, "second LP has ID 2");
    check(b_prom[0] == 3000 && b_prom[2] == 2000, "promises equal requests below capacity");
    check_words(1, 0, 40, U_PDLU);
    check_words(int'(partner[2]), 2, 40, U_SRU);
    // 4. release LC0's LP
    s_open[0] = 0;
    wait_cycles(60);
    check(!lp_up[0] && beta[0] == 1 && beta[1] == 1 && beta[2] == 1, "beta = 1 after release");
    check(lp_id[2] == 1, "LC2's LP renumbered to ID 1");
    s_open[2] = 0;
    wait_cycles(60);
    check(beta[0] == 0 && beta[1] == 0, "no LP left");
    // 5. remote lookup for LC2
    fault[2] = 4'b0100;
    wait_cycles(40);
    @(negedge clk);
    lk_req[2] = 1; lk_addr[2] = 32'h0A00_0005;
    @(negedge clk);
    lk_req[2] = 0;
    fork
      begin wait (lk_resp[2]); end
      begin wait_cycles(300); end
    join_any
    disable fork;
    check(lk_resp[2] && lk_hit[2] && lk_lc[2] == 4'd5, "remote lookup result");
    @(negedge clk);
    lk_req[2] = 1; lk_addr[2] = 32'h8000_0003;
    @(negedge clk);
    lk_req[2] = 0;
    fork
      begin wait (lk_resp[2]); end
      begin wait_cycles(300); end
    join_any
    disable fork;
    check(lk_resp[2] && !lk_hit[2], "remote lookup miss");
    // 6. reverse path to LC2 by ID
    got[2].delete();
    open_stream(1, 4'd2, U_PIU, 1000, 24);
    wait_cycles(200);
    check(lp_up[1] && partner[1] == 2, "reverse-path LP to LC2");
    check_words(2, 1, 24, U_PIU);
    s_open[1] = 0;
    wait_cycles(60);
    // 7. over-subscription
    fault[1] = 4'b0010;
    avail[0] = 16'd9000; avail[2] = 16'd9000;
    open_stream(0, LC_BCAST, U_SRU, 8000, 16);
    wait_cycles(150);
    open_stream(1, LC_BCAST, U_SRU, 8000, 16);
    wait_cycles(300);
    check(lp_up[0] && lp_up[1], "both LPs up");
    check(b_prom[0] == 5000 && b_prom[1] == 5000,
          $sformatf("scaled promises %0d %0d", b_prom[0], b_prom[1]));
    s_open[0] = 0; s_open[1] = 0;
    wait_cycles(100);
    check(beta[0] == 0 && beta[1] == 0 && beta[2] == 0, "LPs released after over-subscription");
    // 8. the covering linecard fails: it releases the LP, LC1 asks again
    fault[0] = '0; avail[0] = 16'd5000; avail[2] = 16'd5000;
    for (int i = 0; i < N; i++) got[i].delete();
    open_stream(1, LC_BCAST, U_SRU, 1000, 400);
    wait_cycles(300);
    begin
      int p, q, k, tot;
      bit whole;
      p = int'(partner[1]);
      q = (p == 0) ? 2 : 0;
      check(lp_up[1] && (p == 0 || p == 2), $sformatf("LC1 covered by LC%0d", p));
      check(sent[1] > 0 && sent[1] < 400, "LC1 stream under way when its cover fails");
      fault[p] = 4'b0010;                      // the covering SRU fails
      wait_cycles(1500);
      check(lp_up[1] && int'(partner[1]) == q,
            $sformatf("LC1 re-covered by LC%0d (expected LC%0d)", partner[1], q));
      check(beta[0] == 1 && beta[1] == 1 && beta[2] == 1, "one LP after the re-cover");
      check(lp_id[1] == 1, "re-established LP has ID 1");
      // every word arrives once, in order, whole packets at each receiver
      k = 0; tot = 0; whole = 1;
      foreach (got[p][j]) if (got[p][j].src == 1) begin
        check(got[p][j].data == {4'd1, 28'(k)}, $sformatf("word %0d at old cover", k));
        k++;
      end
      check(k > 0 && k % 8 == 0, $sformatf("old cover got %0d words, whole packets", k));
      foreach (got[q][j]) if (got[q][j].src == 1) begin
        check(got[q][j].data == {4'd1, 28'(k)}, $sformatf("word %0d at new cover", k));
        k++;
      end
      check(k == 400, $sformatf("%0d of 400 words delivered across the re-cover", k));
    end
    $display("collisions seen: %0d %0d %0d", coll_cnt[0], coll_cnt[1], coll_cnt[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
