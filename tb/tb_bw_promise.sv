// tb_bw_promise: checks the promised bandwidth against the formula worked
// out in the bench, first on the degradation example for six linecards
// (10 Gbit/s each, 70 % load, so 3 Gbit/s spare per covering linecard),
// then on random requests.
module tb_bw_promise;
  import dra_pkg::*;
  logic [BW_W-1:0] b_lc, b_prom;
  logic [BW_W+3:0] b_lct;
  logic scaled;
  int checks = 0, failures = 0;

  bw_promise u_dut (.b_lc_i(b_lc), .b_lct_i(b_lct), .b_prom_o(b_prom), .scaled_o(scaled));

  task automatic check(input int lc, input int lct);
    longint exp;
    b_lc = BW_W'(lc); b_lct = (BW_W+4)'(lct);
    #1;
    exp = (lct <= 10000) ? lc : (longint'(lc) * 10000) / lct;
    checks++;
    if (b_prom !== BW_W'(exp) || scaled !== (lct > 10000)) begin
      failures++;
      $display("FAIL B_LC=%0d B_LCT=%0d: got %0d expected %0d", lc, lct, b_prom, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Four faulty LCs, each asking 3000 Mbit/s: 12 Gbit/s > 10 Gbit/s,
    // so each is promised 2500.
    check(3000, 12000);
    checks++; if (b_prom != 2500) failures++;
    // Below capacity: unchanged.
    check(3000, 9000);
    checks++; if (b_prom != 3000) failures++;
    check(10000, 10000);
    check(0, 0);
    for (int i = 0; i < 2000; i++) begin
      int lc, lct;
      lc  = $urandom_range(0, 65535);
      lct = lc + $urandom_range(0, 200000);
      check(lc, lct);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
