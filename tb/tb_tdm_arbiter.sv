// tb_tdm_arbiter: four linecards' turn counters sharing L_t and L_beta.
// The bench establishes and releases logical paths in random order and
// checks, every cycle, that at most one linecard holds the data lines, that
// all linecards agree on beta, that the active IDs are exactly 1..beta, and
// that in steady state the turns rotate so that every active LP gets one
// turn before any LP gets a second. A directed start checks the two-LP
// alternation of the published example (LP 1, then LP 2, then LP 1 ...).
module tb_tdm_arbiter;
  import dra_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic lp_add, lp_rel, lt_fall;
  logic [LC_ID_W-1:0] lp_rel_id;
  logic [N-1:0] lp_mine, lbeta_v, active, grant;
  logic [LC_ID_W-1:0] id [N];
  logic [LC_ID_W-1:0] beta [N];
  logic [LC_ID_W+2:0] ctr_c [N];
  wire lbeta = |lbeta_v;

  for (genvar i = 0; i < N; i++) begin : g_arb
    tdm_arbiter u_arb (
      .clk, .rst_n, .lp_add_i(lp_add), .lp_mine_i(lp_mine[i]), .lp_rel_i(lp_rel),
      .lp_rel_id_i(lp_rel_id), .lt_fall_i(lt_fall), .lbeta_i(lbeta), .lbeta_o(lbeta_v[i]),
      .active_o(active[i]), .grant_o(grant[i]), .id_o(id[i]), .beta_o(beta[i]),
      .ctr_c_o(ctr_c[i]));
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask

  // Model of the linecards that hold turns: a granted linecard keeps the
  // lines for hold cycles, then pulses L_t.
  int hold;
  int turns_since [N];        // turns by others since this LC's last turn
  int turn_log [$];
  logic [N-1:0] just_added;   // LP added since the last full rotation
  always_ff @(posedge clk) begin
    if (!rst_n) hold <= 0;
    else if (|grant && !lt_fall) begin
      if (hold == 2) hold <= 0; else hold <= hold + 1;
    end
  end
  assign lt_fall = (|grant) && (hold == 2);

  // Per-cycle invariants.
  always @(negedge clk) if (rst_n) begin
    int nact, g;
    logic [15:0] seen;
    check($countones(grant) <= 1, "two linecards hold the data lines");
    nact = $countones(active);
    seen = '0;
    for (int i = 0; i < N; i++) begin
      check(beta[i] == nact, $sformatf("LC%0d beta %0d != %0d active LPs", i, beta[i], nact));
      if (active[i]) begin
        check(id[i] >= 1 && id[i] <= nact && !seen[id[i]], $sformatf("LC%0d bad ID %0d", i, id[i]));
        seen[id[i]] = 1'b1;
      end
      check(!(grant[i] && !active[i]), "grant without an LP");
    end
  end

  // Fairness: between two turns of LC i, every LP that was active through
  // the whole interval had exactly one turn.
  int last_turn [N];
  int turn_no;
  always @(posedge clk) if (rst_n && lt_fall) begin
    for (int i = 0; i < N; i++) if (grant[i]) begin
      turn_log.push_back(i);
      turn_no++;
      last_turn[i] = turn_no;
    end
  end

  task automatic establish(input int lc);
    @(negedge clk);
    lp_add = 1; lp_mine = '0; lp_mine[lc] = 1'b1;
    @(negedge clk);
    lp_add = 0; lp_mine = '0;
  endtask
  task automatic release_lp(input int lc);
    @(negedge clk);
    lp_rel = 1; lp_rel_id = id[lc];
    @(negedge clk);
    lp_rel = 0;
  endtask

  // Watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cnt [N];
    lp_add = 0; lp_rel = 0; lp_mine = '0; lp_rel_id = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Directed: LC0 first (ID 1), LC2 second (ID 2).
    establish(0);
    check(id[0] == 1 && active[0], "first LP gets ID 1");
    repeat (7) @(posedge clk);
    establish(2);
    check(id[2] == 2, "second LP gets ID 2");
    turn_log.delete();
    repeat (60) @(posedge clk);
    for (int k = 1; k < turn_log.size(); k++)
      check(turn_log[k] != turn_log[k-1], "two LPs must alternate");
    check(turn_log.size() >= 10, $sformatf("too few turns (%0d)", turn_log.size()));
    // Third LP: each of the three then gets one turn per rotation.
    establish(3);
    repeat (30) @(posedge clk);
    turn_log.delete();
    repeat (90) @(posedge clk);
    foreach (cnt[i]) cnt[i] = 0;
    for (int k = 0; k + 3 <= turn_log.size(); k += 3) begin
      logic [N-1:0] m;
      m = '0;
      for (int j = 0; j < 3; j++) m[turn_log[k+j]] = 1'b1;
      check(m == 4'b1101, $sformatf("rotation %0d holds LCs %b", k/3, m));
    end
    // Release the middle LP: remaining LCs renumber and keep alternating.
    release_lp(2);
    check(id[0] == 1 && id[3] == 2 && !active[2], "renumbering after release");
    repeat (20) @(posedge clk);
    turn_log.delete();
    repeat (60) @(posedge clk);
    for (int k = 1; k < turn_log.size(); k++)
      check(turn_log[k] != turn_log[k-1] && turn_log[k] != 2, "alternation after release");
    // Random establish / release traffic; the invariants run every cycle.
    for (int r = 0; r < 400; r++) begin
      int lc;
      lc = $urandom_range(0, N-1);
      if (!active[lc]) establish(lc); else release_lp(lc);
      repeat ($urandom_range(0, 12)) @(posedge clk);
    end
    // Every active LP must still get turns.
    foreach (cnt[i]) cnt[i] = 0;
    turn_log.delete();
    repeat (200) @(posedge clk);
    foreach (turn_log[k]) cnt[turn_log[k]]++;
    for (int i = 0; i < N; i++)
      if (active[i]) check(cnt[i] > 0, $sformatf("LC%0d starved", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
