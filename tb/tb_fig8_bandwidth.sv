// tb_fig8_bandwidth: bandwidth left to faulty linecards as faults pile up,
// on the full six-linecard router at its default sizes.
//
// For each uniform load L in {15, 30, 50, 70} % of a 10 Gbit/s linecard and
// each number of faulty linecards X = 1..5, linecards 0..X-1 lose their SRU
// and ask for cover of B_LC = L x 10 Gbit/s; every linecard offers
// psi = (1 - L) x 10 Gbit/s of spare capacity. The bench works out what the
// design must do:
//   * a healthy linecard accepts streams while their sum stays within its
//     psi, so n = min(X, (6 - X) * floor(psi / B_LC)) logical paths come up;
//   * each promise is B_LC, or B_LC * B_BUS / (n * B_LC) when the n
//     requests exceed the 10 Gbit/s data lines;
// and checks the number of paths, beta on every linecard and every
// promise. It prints, per configuration, the share of the required
// bandwidth the design promises next to the share of the analytical model
// min(B_BUS, min(X, N - X) * psi) / (X * B_LC), in which a stream may be
// split over several covering linecards. The two agree in 14 of the 20
// configurations. The design falls short where a whole stream no longer
// fits into the spare capacity left on one linecard, because it gives each
// stream exactly one covering linecard: at L = 70 % no linecard can take a
// stream at all, and at L = 30 %, X = 5 the one healthy linecard takes two
// streams of 3 Gbit/s, not 7/3 of one.
// Between configurations all faults are repaired and all paths must be
// released.
module tb_fig8_bandwidth;
  import dra_pkg::*;
  localparam int N = 6;
  localparam int BBUS = 10000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  fault_vec_t fault [N];
  logic [BW_W-1:0] avail [N], need [N];
  logic [N-1:0] pi_r, po_v, po_s, po_e, c_v, c_s, c_e, f_r;
  logic [31:0] pi_d [N], po_d [N], c_d [N], f_d [N];
  fault_vec_t fmap [N][N];
  logic [N-1:0] lp_up, grant, rlook;
  logic [3:0] partner [N], beta [N];
  logic [15:0] b_prom [N], spc [N], sdc [N], pdc [N], rdc [N];
  logic cl_coll, dl_clash;

  always_comb for (int i = 0; i < N; i++) begin
    pi_d[i] = '0;
    f_d[i]  = '0;
  end

  dra_router u_dut (
    .clk, .rst_n, .fault_i(fault), .avail_bw_i(avail), .need_bw_i(need),
    .rt_wr_en_i(1'b0), .rt_wr_idx_i('0), .rt_wr_valid_i(1'b0),
    .rt_wr_prefix_i('0), .rt_wr_len_i('0), .rt_wr_lc_i('0),
    .piu_in_valid_i('0), .piu_in_sop_i('0), .piu_in_eop_i('0), .piu_in_data_i(pi_d),
    .piu_in_ready_o(pi_r), .piu_out_valid_o(po_v), .piu_out_sop_o(po_s),
    .piu_out_eop_o(po_e), .piu_out_data_o(po_d), .piu_out_ready_i('1),
    .cell_valid_o(c_v), .cell_sop_o(c_s), .cell_eop_o(c_e), .cell_data_o(c_d),
    .cell_ready_i('1), .fab_valid_i('0), .fab_sop_i('0), .fab_eop_i('0),
    .fab_data_i(f_d), .fab_ready_o(f_r),
    .fault_map_o(fmap), .lp_up_o(lp_up), .lp_partner_o(partner), .grant_o(grant),
    .beta_o(beta), .b_prom_o(b_prom), .remote_lookup_o(rlook), .sru_pkt_cnt_o(spc),
    .sru_drop_cnt_o(sdc), .pdlu_drop_cnt_o(pdc), .rx_drop_cnt_o(rdc),
    .cl_coll_o(cl_coll), .dl_clash_o(dl_clash));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask

  always @(posedge clk) if (rst_n) check(!dl_clash, "two linecards on the data lines");

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int loads [4] = '{15, 30, 50, 70};

  initial begin
    for (int i = 0; i < N; i++) begin
      fault[i] = '0; avail[i] = '0; need[i] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);
    $display("  L   X  paths  design%%  model%%");
    foreach (loads[li]) begin
      for (int x = 1; x <= N - 1; x++) begin
        int b, psi, per_lc, n, exp_prom, sum_prom, up, model, got_pct, waited;
        b   = loads[li] * BBUS / 100;
        psi = BBUS - b;
        per_lc = psi / b;
        n = (N - x) * per_lc;
        if (n > x) n = x;
        exp_prom = (n * b <= BBUS) ? b : (b * BBUS) / (n * b);
        @(negedge clk);
        for (int i = 0; i < N; i++) begin
          need[i]  = BW_W'(b);
          avail[i] = BW_W'(psi);
          fault[i] = (i < x) ? 4'b0010 : 4'b0000;
        end
        repeat (2500) @(posedge clk);
        up = 0; sum_prom = 0;
        for (int i = 0; i < x; i++) if (lp_up[i]) begin
          up++;
          sum_prom += int'(b_prom[i]);
          check(int'(b_prom[i]) == exp_prom,
                $sformatf("L=%0d X=%0d: LC%0d promise %0d, expected %0d",
                          loads[li], x, i, b_prom[i], exp_prom));
          check(int'(partner[i]) >= x, $sformatf("LC%0d covered by faulty LC%0d", i, partner[i]));
        end
        check(up == n, $sformatf("L=%0d X=%0d: %0d paths, expected %0d", loads[li], x, up, n));
        for (int i = 0; i < N; i++)
          check(int'(beta[i]) == n, $sformatf("L=%0d X=%0d: beta %0d at LC%0d", loads[li], x, beta[i], i));
        got_pct = 100 * sum_prom / (x * b);
        model  = ((N - x < x ? N - x : x) * psi);
        if (model > BBUS) model = BBUS;
        model  = 100 * model / (x * b);
        if (model > 100) model = 100;
        $display("  %2d  %0d  %0d      %3d      %3d", loads[li], x, up, got_pct, model);
        // repair
        @(negedge clk);
        for (int i = 0; i < N; i++) fault[i] = '0;
        waited = 0;
        while (waited < 3000 && (beta[0] != 0 || beta[N-1] != 0 || lp_up != '0)) begin
          @(posedge clk);
          waited++;
        end
        check(beta[0] == 0 && beta[N-1] == 0 && lp_up == '0,
              $sformatf("L=%0d X=%0d: paths not released after repair", loads[li], x));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
