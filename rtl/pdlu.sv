// pdlu: protocol-dependent logic unit of a linecard.
//
// All the linecard's protocol-specific work sits here, so that every other
// unit is the same on every linecard. Ingress: frames from the physical
// interface arrive as 32-bit words with start/end-of-packet marks. The
// unit checks the Layer-2 envelope, removes it and passes the IP packet
// on, with the envelope word as a side-band header. Egress: packets coming
// from the segmentation and reassembly unit are put back into the
// envelope and handed to the physical interface.
//
// The document gives the unit's duties, not a framing. This design uses a
// one-word envelope: bits 31:28 name the protocol (PROTO), bits 15:0 the
// carried type (16'h0800, IP). A frame with another protocol or type, or
// with no payload, is dropped and counted. Ingress is a pass-through with
// no delay but the envelope word; egress inserts the envelope word ahead
// of each packet, holding the source for one cycle. Ready/valid handshakes
// on all four sides; a word moves when valid and ready are both high.
module pdlu
  import dra_pkg::*;
#(
  parameter logic [PROTO_W-1:0] PROTO = 4'd1
) (
  input  logic              clk,
  input  logic              rst_n,
  // ingress: from the PIU
  input  logic              in_valid_i,
  input  logic              in_sop_i,
  input  logic              in_eop_i,
  input  logic [DATA_W-1:0] in_data_i,
  output logic              in_ready_o,
  // ingress: to the SRU (IP packet)
  output logic              ip_valid_o,
  output logic              ip_sop_o,
  output logic              ip_eop_o,
  output logic [DATA_W-1:0] ip_data_o,
  output logic [DATA_W-1:0] l2_hdr_o,     // envelope of the current packet
  input  logic              ip_ready_i,
  output logic [15:0]       drop_cnt_o,
  // egress: from the SRU (IP packet)
  input  logic              eg_valid_i,
  input  logic              eg_sop_i,
  input  logic              eg_eop_i,
  input  logic [DATA_W-1:0] eg_data_i,
  output logic              eg_ready_o,
  // egress: to the PIU (framed)
  output logic              out_valid_o,
  output logic              out_sop_o,
  output logic              out_eop_o,
  output logic [DATA_W-1:0] out_data_o,
  input  logic              out_ready_i
);
  localparam logic [15:0] TYPE_IP = 16'h0800;
  localparam logic [DATA_W-1:0] ENVELOPE = {PROTO, 12'h000, TYPE_IP};

  // ---------------- ingress
  typedef enum logic [1:0] {I_HDR, I_PASS, I_DROP} in_state_e;
  in_state_e in_st_q;
  logic      first_q;
  logic [DATA_W-1:0] hdr_q;

  wire hdr_ok = in_data_i[31:28] == PROTO && in_data_i[15:0] == TYPE_IP && !in_eop_i;

  always_comb begin
    in_ready_o = 1'b0;
    ip_valid_o = 1'b0;
    ip_sop_o   = 1'b0;
    ip_eop_o   = in_eop_i;
    ip_data_o  = in_data_i;
    case (in_st_q)
      I_HDR:  in_ready_o = 1'b1;                    // envelope word is consumed
      I_PASS: begin
        in_ready_o = ip_ready_i;
        ip_valid_o = in_valid_i;
        ip_sop_o   = first_q;
      end
      default: in_ready_o = 1'b1;                   // discard to end of frame
    endcase
  end
  assign l2_hdr_o = hdr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_st_q    <= I_HDR;
      first_q    <= 1'b0;
      hdr_q      <= '0;
      drop_cnt_o <= '0;
    end else if (in_valid_i && in_ready_o) begin
      case (in_st_q)
        I_HDR: if (in_sop_i) begin
          if (hdr_ok) begin
            in_st_q <= I_PASS;
            first_q <= 1'b1;
            hdr_q   <= in_data_i;
          end else begin
            drop_cnt_o <= drop_cnt_o + 1'b1;
            if (!in_eop_i) in_st_q <= I_DROP;
          end
        end
        I_PASS: begin
          first_q <= 1'b0;
          if (in_eop_i) in_st_q <= I_HDR;
        end
        default: if (in_eop_i) in_st_q <= I_HDR;
      endcase
    end
  end

  // ---------------- egress
  logic in_pkt_q;     // envelope already sent for the current packet
  always_comb begin
    if (eg_valid_i && eg_sop_i && !in_pkt_q) begin
      out_valid_o = 1'b1;
      out_sop_o   = 1'b1;
      out_eop_o   = 1'b0;
      out_data_o  = ENVELOPE;
      eg_ready_o  = 1'b0;
    end else begin
      out_valid_o = eg_valid_i;
      out_sop_o   = 1'b0;
      out_eop_o   = eg_eop_i;
      out_data_o  = eg_data_i;
      eg_ready_o  = out_ready_i;
    end
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) in_pkt_q <= 1'b0;
    else if (eg_valid_i && eg_sop_i && !in_pkt_q && out_ready_i) in_pkt_q <= 1'b1;
    else if (eg_valid_i && eg_ready_o && eg_eop_i) in_pkt_q <= 1'b0;
  end
endmodule
