// csma_cd_mac: one linecard's access to the shared EIB control lines.
//
// The control lines are shared by every bus controller and arbitrated by
// CSMA/CD, as the protocol prescribes; the document names the method but
// not its details, so this is a minimal version. A control packet occupies
// the lines for exactly one clock cycle, so sensing the carrier reduces to
// transmitting only in a cycle that is not reserved by back-off. When two
// or more controllers drive the lines in the same cycle, every driver sees
// coll_i, drops the packet and waits a random number of cycles drawn from
// 0 .. 2^k - 1 after its k-th collision (binary exponential back-off,
// k capped at MAX_EXP), then tries again. The random numbers come from a
// 16-bit LFSR seeded with the linecard ID so that controllers diverge.
//
// Interface: the owner holds tx_req_i with tx_pkt_i stable until tx_done_o
// pulses (the cycle after the packet went out alone). The owner may drop
// tx_req_i at any time to abandon the packet, which also clears the
// back-off state. drive_o/drive_pkt_o go to the control lines; coll_i
// comes back from them in the same cycle.
module csma_cd_mac
  import dra_pkg::*;
#(
  parameter logic [LC_ID_W-1:0] LC_ID   = '0,
  parameter int unsigned        MAX_EXP = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      tx_req_i,
  input  ctrl_pkt_t tx_pkt_i,
  output logic      tx_done_o,
  output logic      drive_o,
  output ctrl_pkt_t drive_pkt_o,
  input  logic      coll_i,
  output logic [7:0] coll_cnt_o     // collisions seen by this linecard
);
  logic [15:0] lfsr_q;
  logic [7:0]  backoff_q;
  logic [3:0]  attempts_q;
  logic        done_q;

  // Drive only when a request is pending, not backing off, and the previous
  // packet's done pulse is not being presented.
  assign drive_o     = tx_req_i && (backoff_q == '0) && !done_q;
  assign drive_pkt_o = drive_o ? tx_pkt_i : '0;
  assign tx_done_o   = done_q;

  logic [7:0] mask;
  always_comb begin
    int unsigned k;
    k    = (32'(attempts_q) + 1 > MAX_EXP) ? MAX_EXP : 32'(attempts_q) + 1;
    mask = 8'((32'd1 << k) - 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr_q     <= 16'hACE1 ^ {12'h0, LC_ID} ^ ({12'h0, LC_ID} << 8);
      backoff_q  <= '0;
      attempts_q <= '0;
      done_q     <= 1'b0;
      coll_cnt_o <= '0;
    end else begin
      lfsr_q <= {lfsr_q[14:0], lfsr_q[15] ^ lfsr_q[13] ^ lfsr_q[12] ^ lfsr_q[10]};
      done_q <= 1'b0;
      if (!tx_req_i) begin
        backoff_q  <= '0;
        attempts_q <= '0;
      end else if (backoff_q != '0) begin
        backoff_q <= backoff_q - 1'b1;
      end else if (drive_o) begin
        if (coll_i) begin
          backoff_q  <= lfsr_q[7:0] & mask;
          attempts_q <= (attempts_q == 4'hF) ? attempts_q : attempts_q + 1'b1;
          coll_cnt_o <= coll_cnt_o + 1'b1;
        end else begin
          done_q     <= 1'b1;
          attempts_q <= '0;
        end
      end
    end
  end
endmodule
