// tb_lfe: fills the 16-entry table with random prefixes (lengths 0..32,
// some invalid), then looks up random addresses on both ports, half of
// them chosen to fall inside a stored prefix, and compares hit and
// linecard against a longest-prefix match computed in the bench. Answers
// must come exactly one cycle after the request.
module tb_lfe;
  import dra_pkg::*;
  localparam int E = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wr_en, wr_valid;
  logic [3:0] wr_idx, wr_lc;
  logic [31:0] wr_prefix;
  logic [5:0] wr_len;
  logic a_req, a_resp, a_hit, b_req, b_resp, b_hit;
  logic [31:0] a_addr, b_addr;
  logic [3:0] a_lc, b_lc;

  lfe #(.ENTRIES(E)) u_dut (
    .clk, .rst_n, .wr_en_i(wr_en), .wr_idx_i(wr_idx), .wr_valid_i(wr_valid),
    .wr_prefix_i(wr_prefix), .wr_len_i(wr_len), .wr_lc_i(wr_lc),
    .a_req_i(a_req), .a_addr_i(a_addr), .a_resp_o(a_resp), .a_hit_o(a_hit), .a_lc_o(a_lc),
    .b_req_i(b_req), .b_addr_i(b_addr), .b_resp_o(b_resp), .b_hit_o(b_hit), .b_lc_o(b_lc));

  int checks = 0, failures = 0;
  logic        t_v [E];
  logic [31:0] t_p [E];
  int          t_l [E];
  logic [3:0]  t_c [E];

  function automatic void model(input logic [31:0] a, output logic hit, output logic [3:0] lc);
    int best;
    best = -1; hit = 0; lc = 0;
    for (int i = 0; i < E; i++) begin
      logic [31:0] m;
      m = (t_l[i] == 0) ? 32'h0 : ~(32'hFFFF_FFFF >> t_l[i]);
      if (t_v[i] && (a & m) == (t_p[i] & m) && t_l[i] > best) begin
        best = t_l[i]; hit = 1; lc = t_c[i];
      end
    end
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; a_req = 0; b_req = 0; a_addr = 0; b_addr = 0;
    wr_idx = 0; wr_valid = 0; wr_prefix = 0; wr_len = 0; wr_lc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      for (int i = 0; i < E; i++) begin
        @(negedge clk);
        t_v[i] = ($urandom_range(0, 7) != 0);
        t_l[i] = (round == 0) ? 8 + i : $urandom_range(0, 32);
        if (i == 0 && round % 4 == 1) t_l[i] = 0;       // default route
        t_p[i] = $urandom;
        t_c[i] = 4'($urandom);
        wr_en = 1; wr_idx = 4'(i); wr_valid = t_v[i]; wr_prefix = t_p[i];
        wr_len = 6'(t_l[i]); wr_lc = t_c[i];
      end
      @(negedge clk);
      wr_en = 0;
      for (int q = 0; q < 100; q++) begin
        logic ea, eb;
        logic [3:0] la, lb;
        @(negedge clk);
        a_req = 1; b_req = ($urandom_range(0, 1) == 1);
        a_addr = $urandom; b_addr = $urandom;
        if (q % 2 == 0) a_addr = t_p[$urandom_range(0, E-1)] ^ 32'($urandom_range(0, 255));
        if (q % 3 == 0) b_addr = t_p[$urandom_range(0, E-1)] ^ 32'($urandom_range(0, 15));
        model(a_addr, ea, la);
        model(b_addr, eb, lb);
        @(negedge clk);
        checks++;
        if (!a_resp || a_hit != ea || (ea && a_lc != la)) begin
          failures++; $display("FAIL port A %h: hit %0d lc %0d, expected %0d %0d", a_addr, a_hit, a_lc, ea, la);
        end
        if (b_req) begin
          checks++;
          if (!b_resp || b_hit != eb || (eb && b_lc != lb)) begin
            failures++; $display("FAIL port B %h", b_addr);
          end
        end
        a_req = 0; b_req = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
