// tb_sru: segmentation and reassembly. The cell output is looped back into
// the cell input, so every routed packet must come out of the egress port
// unchanged. The bench sends 200 random packets (5 to 60 words); the
// lookup model answers after 1 to 6 cycles with "no route" when address
// bit 31 is set and linecard = address bits 3:0 otherwise. Checks: each
// cell's header (destination, source, first/last, words used), the cell
// count ceil(len/12), every reassembled word, and the drop count.
module tb_sru;
  import dra_pkg::*;
  localparam int CW = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_sop, in_eop, in_ready;
  logic [31:0] in_data;
  logic lk_req, lk_resp, lk_hit;
  logic [31:0] lk_addr;
  logic [3:0] lk_lc;
  logic c_valid, c_sop, c_eop, c_ready;
  logic [31:0] c_data;
  logic o_valid, o_sop, o_eop, o_ready;
  logic [31:0] o_data;
  logic [15:0] pkt_cnt, drop_cnt;

  sru #(.LC_ID(4'd3)) u_dut (
    .clk, .rst_n, .in_valid_i(in_valid), .in_sop_i(in_sop), .in_eop_i(in_eop),
    .in_data_i(in_data), .in_ready_o(in_ready),
    .lk_req_o(lk_req), .lk_addr_o(lk_addr), .lk_resp_i(lk_resp), .lk_hit_i(lk_hit),
    .lk_lc_i(lk_lc),
    .cell_valid_o(c_valid), .cell_sop_o(c_sop), .cell_eop_o(c_eop), .cell_data_o(c_data),
    .cell_ready_i(c_ready),
    .rc_valid_i(c_valid), .rc_sop_i(c_sop), .rc_eop_i(c_eop), .rc_data_i(c_data),
    .rc_ready_o(c_ready),
    .out_valid_o(o_valid), .out_sop_o(o_sop), .out_eop_o(o_eop), .out_data_o(o_data),
    .out_ready_i(o_ready), .pkt_cnt_o(pkt_cnt), .drop_cnt_o(drop_cnt));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask

  // lookup model
  int lk_delay = -1;
  logic [31:0] lk_a;
  always @(posedge clk) begin
    lk_resp <= 1'b0;
    if (lk_req) begin lk_delay <= $urandom_range(0, 5); lk_a <= lk_addr; end
    else if (lk_delay == 0) begin
      lk_resp <= 1'b1; lk_hit <= !lk_a[31]; lk_lc <= lk_a[3:0]; lk_delay <= -1;
    end else if (lk_delay > 0) lk_delay <= lk_delay - 1;
  end

  // expected packets and cells
  logic [31:0] exp_words [$];     // words of routed packets, in order
  int exp_cells [$];              // expected cell count per routed packet
  int exp_dst [$];
  int exp_drops = 0;
  int cell_k = -1, cells_this = 0, words_left = 0, pkt_words_seen = 0;

  always @(posedge clk) if (rst_n) begin
    o_ready <= ($urandom_range(0, 3) != 0);
    if (c_valid && c_ready && c_sop) begin
      int nw;
      nw = c_data[7:0];
      if (cells_this == 0) begin
        words_left = 0;
        check(c_data[23], "first cell flag");
        check(int'(c_data[31:28]) == exp_dst[0], "cell destination");
      end else check(!c_data[23], "first flag on later cell");
      check(c_data[27:24] == 4'd3, "cell source");
      cells_this++;
      if (c_data[22]) begin
        check(cells_this == exp_cells[0], $sformatf("cells %0d expected %0d", cells_this, exp_cells[0]));
        void'(exp_cells.pop_front());
        void'(exp_dst.pop_front());
        cells_this = 0;
      end
    end
    if (o_valid && o_ready) begin
      check(exp_words.size() > 0 && o_data == exp_words[0], "reassembled word");
      if (exp_words.size() > 0) void'(exp_words.pop_front());
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_sop = 0; in_eop = 0; in_data = 0; o_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 200; p++) begin
      int len;
      logic [31:0] da;
      logic [31:0] w [$];
      len = $urandom_range(5, 60);
      if (p % 17 == 3) len = 3;               // too short: dropped
      da = {($urandom_range(0, 9) == 0), 27'($urandom), 4'($urandom)};
      w.delete();
      for (int k = 0; k < len; k++) w.push_back(k == 4 ? da : {8'(p), 24'($urandom)});
      if (len < 5 || da[31]) exp_drops++;
      else begin
        foreach (w[k]) exp_words.push_back(w[k]);
        exp_cells.push_back((len + CW - 1) / CW);
        exp_dst.push_back(int'(da[3:0]));
      end
      for (int k = 0; k < len; k++) begin
        @(negedge clk);
        in_valid = 1; in_sop = (k == 0); in_eop = (k == len - 1); in_data = w[k];
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
      @(negedge clk);
      in_valid = 0;
    end
    repeat (500) @(posedge clk);
    check(exp_words.size() == 0, $sformatf("%0d words never came out", exp_words.size()));
    check(int'(drop_cnt) == exp_drops, $sformatf("drops %0d expected %0d", drop_cnt, exp_drops));
    check(int'(pkt_cnt) == 200 - exp_drops, "packet count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
