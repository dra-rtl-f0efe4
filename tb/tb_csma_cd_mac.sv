// tb_csma_cd_mac: four MACs contend for the control lines. Each has 50
// numbered packets to send and starts them all in the same cycle, so
// collisions are certain. The bench checks that every packet appears on
// the lines exactly once and in order per sender, that each tx_done pulse
// matches a packet seen alone on the lines, that collisions occurred and
// were resolved, and that all 200 packets get through within a bound.
module tb_csma_cd_mac;
  import dra_pkg::*;
  localparam int N = 4, K = 50;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0] tx_req, tx_done, drive;
  ctrl_pkt_t tx_pkt [N];
  ctrl_pkt_t drive_pkt [N];
  logic [7:0] coll_cnt [N];
  logic bus_valid, coll;
  ctrl_pkt_t bus_pkt;

  for (genvar i = 0; i < N; i++) begin : g_mac
    csma_cd_mac #(.LC_ID(LC_ID_W'(i))) u_mac (
      .clk, .rst_n, .tx_req_i(tx_req[i]), .tx_pkt_i(tx_pkt[i]), .tx_done_o(tx_done[i]),
      .drive_o(drive[i]), .drive_pkt_o(drive_pkt[i]), .coll_i(coll), .coll_cnt_o(coll_cnt[i]));
  end
  eib_control_lines #(.N_LC(N)) u_lines (
    .drive_i(drive), .drive_pkt_i(drive_pkt), .bus_valid_o(bus_valid), .coll_o(coll),
    .bus_pkt_o(bus_pkt));

  int checks = 0, failures = 0;
  int sent [N];     // packets acknowledged per sender
  int seen [N];     // packets observed per sender
  int ncoll = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sender model: request packet sent[i] until done.
  always_comb for (int i = 0; i < N; i++) begin
    tx_req[i] = rst_n && (sent[i] < K);
    tx_pkt[i] = '0;
    tx_pkt[i].kind    = CP_FLT;
    tx_pkt[i].src     = LC_ID_W'(i);
    tx_pkt[i].dst     = LC_BCAST;
    tx_pkt[i].payload = 32'(sent[i]);
  end

  always @(posedge clk) if (rst_n) begin
    if (coll) ncoll++;
    if (bus_valid) begin
      int s;
      s = int'(bus_pkt.src);
      checks++;
      if (bus_pkt.payload != 32'(seen[s])) begin
        failures++;
        $display("FAIL LC%0d sent packet %0d, expected %0d", s, bus_pkt.payload, seen[s]);
      end
      seen[s]++;
    end
    for (int i = 0; i < N; i++) if (tx_done[i]) begin
      sent[i]++;
      checks++;
      if (sent[i] != seen[i]) begin
        failures++;
        $display("FAIL LC%0d done count %0d vs seen %0d", i, sent[i], seen[i]);
      end
    end
  end

  initial begin
    int total;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (sent[0] == K && sent[1] == K && sent[2] == K && sent[3] == K);
    repeat (5) @(posedge clk);
    total = 0;
    for (int i = 0; i < N; i++) begin
      total += seen[i];
      checks++;
      if (seen[i] != K) begin failures++; $display("FAIL LC%0d delivered %0d", i, seen[i]); end
    end
    checks++;
    if (ncoll == 0) begin failures++; $display("FAIL no collision happened"); end
    checks++;
    if (coll_cnt[0] + coll_cnt[1] + coll_cnt[2] + coll_cnt[3] == 0) begin
      failures++; $display("FAIL MACs counted no collision");
    end
    $display("delivered %0d packets, %0d collision cycles, finished at cycle %0d",
             total, ncoll, $time / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
