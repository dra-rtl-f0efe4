// tb_pdlu: ingress and egress of the protocol-dependent unit (protocol 1).
// Ingress: 150 random frames, some with another protocol's envelope, some
// with a non-IP type; accepted frames must come out without the envelope,
// with sop on the first payload word, and the rest must be counted as
// drops. Egress: 100 random packets must come out with the envelope word
// in front. Both sides see random back-pressure.
module tb_pdlu;
  import dra_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic i_v, i_s, i_e, i_r, p_v, p_s, p_e, p_r;
  logic [31:0] i_d, p_d, hdr;
  logic e_v, e_s, e_e, e_r, o_v, o_s, o_e, o_r;
  logic [31:0] e_d, o_d;
  logic [15:0] drops;

  pdlu #(.PROTO(4'd1)) u_dut (
    .clk, .rst_n, .in_valid_i(i_v), .in_sop_i(i_s), .in_eop_i(i_e), .in_data_i(i_d),
    .in_ready_o(i_r), .ip_valid_o(p_v), .ip_sop_o(p_s), .ip_eop_o(p_e), .ip_data_o(p_d),
    .l2_hdr_o(hdr), .ip_ready_i(p_r), .drop_cnt_o(drops),
    .eg_valid_i(e_v), .eg_sop_i(e_s), .eg_eop_i(e_e), .eg_data_i(e_d), .eg_ready_o(e_r),
    .out_valid_o(o_v), .out_sop_o(o_s), .out_eop_o(o_e), .out_data_o(o_d), .out_ready_i(o_r));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask

  typedef struct {logic [31:0] d; logic s; logic e;} w_t;
  w_t exp_ip [$], exp_out [$];
  int exp_drops = 0;

  always @(posedge clk) if (rst_n) begin
    p_r <= $urandom_range(0, 3) != 0;
    o_r <= $urandom_range(0, 3) != 0;
    if (p_v && p_r) begin
      check(exp_ip.size() > 0 && p_d == exp_ip[0].d && p_s == exp_ip[0].s && p_e == exp_ip[0].e,
            "ingress word");
      if (exp_ip.size() > 0) void'(exp_ip.pop_front());
    end
    if (o_v && o_r) begin
      check(exp_out.size() > 0 && o_d == exp_out[0].d && o_s == exp_out[0].s && o_e == exp_out[0].e,
            "egress word");
      if (exp_out.size() > 0) void'(exp_out.pop_front());
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    i_v = 0; i_s = 0; i_e = 0; i_d = 0; p_r = 1; o_r = 1;
    e_v = 0; e_s = 0; e_e = 0; e_d = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      for (int f = 0; f < 150; f++) begin
        int len, kind;
        logic [31:0] env;
        len = $urandom_range(1, 20);
        kind = $urandom_range(0, 5);
        env = {4'd1, 12'($urandom), 16'h0800};
        if (kind == 0) env[31:28] = 4'd2;
        if (kind == 1) env[15:0] = 16'h86DD;
        for (int k = 0; k <= len; k++) begin
          @(negedge clk);
          i_v = 1; i_s = (k == 0); i_e = (k == len);
          i_d = (k == 0) ? env : {8'(f), 24'($urandom)};
          if (k > 0 && kind > 1) exp_ip.push_back('{d: i_d, s: k == 1, e: k == len});
          @(posedge clk);
          while (!i_r) @(posedge clk);
        end
        if (kind <= 1) exp_drops++;
        @(negedge clk);
        i_v = 0;
      end
      for (int f = 0; f < 100; f++) begin
        int len;
        len = $urandom_range(1, 20);
        exp_out.push_back('{d: {4'd1, 12'h000, 16'h0800}, s: 1'b1, e: 1'b0});
        for (int k = 0; k < len; k++) begin
          @(negedge clk);
          e_v = 1; e_s = (k == 0); e_e = (k == len - 1); e_d = {8'(f), 24'($urandom)};
          exp_out.push_back('{d: e_d, s: 1'b0, e: e_e});
          @(posedge clk);
          while (!e_r) @(posedge clk);
        end
        @(negedge clk);
        e_v = 0;
      end
    join
    repeat (50) @(posedge clk);
    check(exp_ip.size() == 0 && exp_out.size() == 0, "all words delivered");
    check(int'(drops) == exp_drops, $sformatf("drops %0d expected %0d", drops, exp_drops));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
