// tdm_arbiter: the data-line turn counters of one linecard's bus controller.
//
// Every linecard keeps three counters. Ctr_beta holds beta, the number of
// logical paths (LPs) sharing the data lines; every linecard updates it when
// any LP is established (+1) or released (-1). A linecard that starts an LP
// (LC_init) also keeps Ctr_LC, its LP ID, and Ctr_c, a turn counter. When
// its own LP is established it sets, in this order, Ctr_LC = Ctr_beta + 1,
// Ctr_c = 4*Ctr_beta + 1, and then Ctr_beta = Ctr_beta + 1. The linecard
// whose Ctr_c equals its Ctr_LC owns the data lines. When it finishes it
// lowers the shared line L_t, which decrements every Ctr_c at once. When a
// Ctr_c reaches zero the linecard raises the shared line L_beta, and every
// LC_init reloads Ctr_c with beta; the newest LP then has the next turn.
// A release of LP ID_r decrements Ctr_beta everywhere and Ctr_LC where it
// is larger than ID_r. All of this follows the published scheme.
//
// Design choices: a release also decrements Ctr_c when Ctr_c >= ID_r (the
// scheme does not say what Ctr_c does on a release; without this the turn
// pointer could name an ID that no longer exists). L_t falling is modelled
// as a one-cycle pulse lt_fall_i; L_beta is the OR of every lbeta_o,
// returned in lbeta_i. An L_beta reload takes one cycle, during which no
// linecard holds the lines.
//
// Timing: all counters update on the rising clock edge; grant_o is a
// registered-state decode, valid in the cycle after the event.
module tdm_arbiter
  import dra_pkg::*;
#(
  parameter int unsigned CNT_W = LC_ID_W + 3   // holds 4*beta+1
) (
  input  logic               clk,
  input  logic               rst_n,
  // control-line events, seen by every linecard
  input  logic               lp_add_i,     // an LP was established (REP_D)
  input  logic               lp_mine_i,    // ... and this linecard is its LC_init
  input  logic               lp_rel_i,     // an LP was released (REL_D)
  input  logic [LC_ID_W-1:0] lp_rel_id_i,  // its ID, ID_r
  // shared turn lines
  input  logic               lt_fall_i,    // L_t lowered: the current turn ended
  input  logic               lbeta_i,      // L_beta raised by any linecard
  output logic               lbeta_o,      // this linecard raises L_beta
  // state
  output logic               active_o,     // this linecard owns an LP
  output logic               grant_o,      // this linecard's turn on the data lines
  output logic [LC_ID_W-1:0] id_o,         // Ctr_LC
  output logic [LC_ID_W-1:0] beta_o,       // Ctr_beta
  output logic [CNT_W-1:0]   ctr_c_o       // Ctr_c
);

  logic               active_q;
  logic [LC_ID_W-1:0] id_q, beta_q;
  logic [CNT_W-1:0]   c_q;

  logic               act_d;
  logic [LC_ID_W-1:0] id_d, beta_d;
  logic [CNT_W-1:0]   c_d;

  always_comb begin
    act_d  = active_q;
    id_d   = id_q;
    beta_d = beta_q;
    c_d    = c_q;
    // 1. turn bookkeeping
    if (lbeta_i)                     c_d = CNT_W'(beta_q);
    else if (lt_fall_i && c_d != '0) c_d = c_d - 1'b1;
    // 2. release of LP ID_r
    if (lp_rel_i) begin
      if (act_d && id_d == lp_rel_id_i) begin
        act_d = 1'b0;
        id_d  = '0;
      end else begin
        if (act_d && id_d > lp_rel_id_i) id_d = id_d - 1'b1;
        if (act_d && c_d != '0 && c_d >= CNT_W'(lp_rel_id_i)) c_d = c_d - 1'b1;
      end
      if (beta_d != '0) beta_d = beta_d - 1'b1;
    end
    // 3. establishment of a new LP (Ctr_LC, then Ctr_c, then Ctr_beta)
    if (lp_add_i) begin
      if (lp_mine_i) begin
        act_d = 1'b1;
        id_d  = beta_d + 1'b1;
        c_d   = (CNT_W'(beta_d) << 2) + 1'b1;
      end
      beta_d = beta_d + 1'b1;
    end
    if (!act_d) c_d = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q <= 1'b0;
      id_q     <= '0;
      beta_q   <= '0;
      c_q      <= '0;
    end else begin
      active_q <= act_d;
      id_q     <= id_d;
      beta_q   <= beta_d;
      c_q      <= c_d;
    end
  end

  assign lbeta_o  = active_q && (c_q == '0);
  assign grant_o  = active_q && !lbeta_i && (c_q == CNT_W'(id_q));
  assign active_o = active_q;
  assign id_o     = id_q;
  assign beta_o   = beta_q;
  assign ctr_c_o  = c_q;

endmodule
