// sru: segmentation and reassembly unit of a linecard.
//
// Ingress: an IP packet arrives from the protocol-dependent unit as 32-bit
// words. The unit stores it, sends the destination address to a
// forwarding engine for lookup, and when the answer (outgoing linecard)
// is back cuts the packet into fixed-length cells for the switching
// fabric. Egress: cells arriving from the fabric are put back together
// into the packet, which goes to the protocol-dependent unit.
//
// The division of work follows the document: the SRU takes the address
// out of the packet, the LFE looks it up, the SRU segments and sends the
// cells to the outgoing linecard, where an SRU reassembles them. The
// document gives no cell size or cell format; here a cell is one header
// word followed by CELL_WORDS payload words, the last cell padded with
// zeros. Header: [31:28] outgoing linecard, [27:24] source linecard,
// [23] first cell, [22] last cell, [7:0] payload words used. The address
// is taken from word DA_WORD of the packet (word 4 of an IPv4 header).
// Segmentation is store-and-forward, one packet at a time; a packet must
// fit in BUF_DEPTH words. Packets with no route, or too short to hold the
// address, are dropped and counted. Reassembly assumes the cells of one
// packet arrive back to back, as the fabric port delivers them.
//
// Timing: the lookup is issued the cycle after the address word is
// accepted; the first cell header follows the cycle after both the end of
// the packet and the lookup answer have arrived. One word per cycle on
// every port, with ready/valid handshakes.
module sru
  import dra_pkg::*;
#(
  parameter logic [LC_ID_W-1:0] LC_ID      = '0,
  parameter int unsigned        CELL_WORDS = 12,
  parameter int unsigned        BUF_DEPTH  = 512,
  parameter int unsigned        DA_WORD    = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  // ingress packet from the PDLU
  input  logic               in_valid_i,
  input  logic               in_sop_i,
  input  logic               in_eop_i,
  input  logic [DATA_W-1:0]  in_data_i,
  output logic               in_ready_o,
  // lookup
  output logic               lk_req_o,
  output logic [ADDR_W-1:0]  lk_addr_o,
  input  logic               lk_resp_i,
  input  logic               lk_hit_i,
  input  logic [LC_ID_W-1:0] lk_lc_i,
  // cells to the fabric
  output logic               cell_valid_o,
  output logic               cell_sop_o,
  output logic               cell_eop_o,
  output logic [DATA_W-1:0]  cell_data_o,
  input  logic               cell_ready_i,
  // cells from the fabric
  input  logic               rc_valid_i,
  input  logic               rc_sop_i,
  input  logic               rc_eop_i,
  input  logic [DATA_W-1:0]  rc_data_i,
  output logic               rc_ready_o,
  // egress packet to the PDLU
  output logic               out_valid_o,
  output logic               out_sop_o,
  output logic               out_eop_o,
  output logic [DATA_W-1:0]  out_data_o,
  input  logic               out_ready_i,
  // statistics
  output logic [15:0]        pkt_cnt_o,
  output logic [15:0]        drop_cnt_o
);
  localparam int unsigned LW = $clog2(BUF_DEPTH) + 1;

  // ------------------------------------------------------------ segmenting
  typedef enum logic [2:0] {S_RX, S_WAIT, S_HDR, S_PAY, S_DROP} seg_state_e;
  seg_state_e         s_q;
  logic [LW-1:0]      len_q;        // words in the stored packet
  logic [LW-1:0]      left_q;       // words still to send
  logic               res_q, hit_q, first_q;
  logic [LC_ID_W-1:0] dst_q;
  logic [7:0]         k_q;          // payload slot within the cell
  logic [7:0]         nw_q;         // payload words used in this cell

  logic               f_push, f_pop, f_full, f_empty;
  logic [DATA_W+1:0]  f_rdata;
  logic [LW-1:0]      f_count;
  sync_fifo #(.WIDTH(DATA_W + 2), .DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst_n, .push_i(f_push), .wdata_i({in_sop_i, in_eop_i, in_data_i}),
    .pop_i(f_pop), .rdata_o(f_rdata), .full_o(f_full), .empty_o(f_empty), .count_o(f_count));

  assign in_ready_o = (s_q == S_RX) && !f_full;
  assign f_push     = in_valid_i && in_ready_o;

  logic [7:0] nw_next;
  assign nw_next = (left_q > LW'(CELL_WORDS)) ? 8'(CELL_WORDS) : 8'(left_q);

  always_comb begin
    cell_valid_o = 1'b0;
    cell_sop_o   = 1'b0;
    cell_eop_o   = 1'b0;
    cell_data_o  = '0;
    f_pop        = 1'b0;
    case (s_q)
      S_HDR: begin
        cell_valid_o = 1'b1;
        cell_sop_o   = 1'b1;
        cell_data_o  = {dst_q, LC_ID, first_q, (left_q <= LW'(CELL_WORDS)), 14'h0, nw_next};
      end
      S_PAY: begin
        cell_valid_o = 1'b1;
        cell_eop_o   = (k_q == 8'(CELL_WORDS - 1));
        cell_data_o  = (k_q < nw_q) ? f_rdata[DATA_W-1:0] : '0;
        f_pop        = cell_ready_i && (k_q < nw_q);
      end
      S_DROP: f_pop = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q        <= S_RX;
      len_q      <= '0;
      left_q     <= '0;
      res_q      <= 1'b0;
      hit_q      <= 1'b0;
      first_q    <= 1'b0;
      dst_q      <= '0;
      k_q        <= '0;
      nw_q       <= '0;
      lk_req_o   <= 1'b0;
      lk_addr_o  <= '0;
      pkt_cnt_o  <= '0;
      drop_cnt_o <= '0;
    end else begin
      lk_req_o <= 1'b0;
      if (lk_resp_i) begin
        res_q <= 1'b1;
        hit_q <= lk_hit_i;
        dst_q <= lk_lc_i;
      end
      case (s_q)
        S_RX: if (f_push) begin
          len_q <= in_sop_i ? LW'(1) : len_q + 1'b1;
          if ((in_sop_i ? 0 : int'(len_q)) == DA_WORD) begin
            lk_req_o  <= 1'b1;
            lk_addr_o <= in_data_i;
            res_q     <= 1'b0;
          end
          if (in_sop_i) res_q <= 1'b0;
          if (in_eop_i) begin
            left_q <= in_sop_i ? LW'(1) : len_q + 1'b1;
            if ((in_sop_i ? 0 : int'(len_q)) < DA_WORD) begin
              s_q        <= S_DROP;            // too short to carry an address
              drop_cnt_o <= drop_cnt_o + 1'b1;
            end else begin
              s_q <= S_WAIT;
            end
          end
        end
        S_WAIT: if (res_q || lk_resp_i) begin
          if (res_q ? hit_q : lk_hit_i) begin
            s_q     <= S_HDR;
            first_q <= 1'b1;
          end else begin
            s_q        <= S_DROP;
            drop_cnt_o <= drop_cnt_o + 1'b1;
          end
        end
        S_HDR: if (cell_ready_i) begin
          s_q  <= S_PAY;
          k_q  <= '0;
          nw_q <= nw_next;
        end
        S_PAY: if (cell_ready_i) begin
          k_q <= k_q + 1'b1;
          if (k_q == 8'(CELL_WORDS - 1)) begin
            first_q <= 1'b0;
            left_q  <= left_q - LW'(nw_q);
            if (left_q == LW'(nw_q)) begin
              s_q       <= S_RX;
              pkt_cnt_o <= pkt_cnt_o + 1'b1;
            end else begin
              s_q <= S_HDR;
            end
          end
        end
        S_DROP: if (f_empty || (f_pop && f_rdata[DATA_W] )) s_q <= S_RX;
        default: s_q <= S_RX;
      endcase
    end
  end

  // ------------------------------------------------------------ reassembly
  typedef enum logic {R_HDR, R_PAY} rs_state_e;
  rs_state_e  r_q;
  logic [7:0] rk_q, rnw_q;
  logic       rfirst_q, rlast_q;

  wire r_use = (r_q == R_PAY) && (rk_q < rnw_q);
  assign out_valid_o = rc_valid_i && r_use;
  assign out_sop_o   = rfirst_q && rk_q == 8'd0;
  assign out_eop_o   = rlast_q && (rk_q == rnw_q - 1'b1);
  assign out_data_o  = rc_data_i;
  assign rc_ready_o  = (r_q == R_HDR) || !r_use || out_ready_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_q      <= R_HDR;
      rk_q     <= '0;
      rnw_q    <= '0;
      rfirst_q <= 1'b0;
      rlast_q  <= 1'b0;
    end else if (rc_valid_i && rc_ready_o) begin
      if (r_q == R_HDR) begin
        if (rc_sop_i) begin
          r_q      <= R_PAY;
          rk_q     <= '0;
          rnw_q    <= rc_data_i[7:0];
          rfirst_q <= rc_data_i[23];
          rlast_q  <= rc_data_i[22];
        end
      end else begin
        rk_q <= rk_q + 1'b1;
        if (rc_eop_i) r_q <= R_HDR;
      end
    end
  end

  logic unused;
  assign unused = ^{f_count, f_rdata[DATA_W+1]};
endmodule
