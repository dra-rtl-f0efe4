// pkt_merge: merges two packet streams into one without interleaving.
//
// At a packet boundary the merger picks a source with a word waiting,
// alternating between the two when both wait, and stays with it until that
// packet's end-of-packet word has passed. Words carry start/end marks and
// move under ready/valid handshakes; the merger adds no delay and no
// storage. Used where a linecard unit takes both local traffic and traffic
// another linecard hands it over the EIB data lines.
module pkt_merge
  import dra_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              a_valid_i,
  input  logic              a_sop_i,
  input  logic              a_eop_i,
  input  logic [DATA_W-1:0] a_data_i,
  output logic              a_ready_o,
  input  logic              b_valid_i,
  input  logic              b_sop_i,
  input  logic              b_eop_i,
  input  logic [DATA_W-1:0] b_data_i,
  output logic              b_ready_o,
  output logic              o_valid_o,
  output logic              o_sop_o,
  output logic              o_eop_o,
  output logic [DATA_W-1:0] o_data_o,
  input  logic              o_ready_i
);
  logic locked_q, sel_q, last_q;
  logic sel;

  always_comb begin
    if (locked_q)               sel = sel_q;
    else if (a_valid_i && b_valid_i) sel = !last_q;
    else                        sel = b_valid_i;
    o_valid_o = sel ? b_valid_i : a_valid_i;
    o_sop_o   = sel ? b_sop_i   : a_sop_i;
    o_eop_o   = sel ? b_eop_i   : a_eop_i;
    o_data_o  = sel ? b_data_i  : a_data_i;
    a_ready_o = !sel && o_ready_i;
    b_ready_o =  sel && o_ready_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked_q <= 1'b0;
      sel_q    <= 1'b0;
      last_q   <= 1'b1;
    end else if (o_valid_o && o_ready_i) begin
      locked_q <= !o_eop_o;
      sel_q    <= sel;
      if (o_eop_o) last_q <= sel;
    end
  end
endmodule
