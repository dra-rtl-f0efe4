// tb_eib_control_lines: drives random sets of drivers onto the control
// lines and checks valid/collision flags and the delivered packet.
module tb_eib_control_lines;
  import dra_pkg::*;
  localparam int N = 6;
  logic [N-1:0] drive;
  ctrl_pkt_t drive_pkt [N];
  logic bus_valid, coll;
  ctrl_pkt_t bus_pkt;
  int checks = 0, failures = 0;

  eib_control_lines #(.N_LC(N)) u_dut (
    .drive_i(drive), .drive_pkt_i(drive_pkt), .bus_valid_o(bus_valid), .coll_o(coll),
    .bus_pkt_o(bus_pkt));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int n, who;
      drive = N'($urandom_range(0, (1 << N) - 1));
      if (t % 3 == 0) drive = N'(1) << $urandom_range(0, N-1);
      for (int i = 0; i < N; i++) begin
        drive_pkt[i] = '0;
        drive_pkt[i].kind = CP_REQ_L;
        drive_pkt[i].src = LC_ID_W'(i);
        drive_pkt[i].payload = $urandom;
      end
      #1;
      n = $countones(drive);
      who = 0;
      for (int i = 0; i < N; i++) if (drive[i]) who = i;
      checks++;
      if (bus_valid != (n == 1) || coll != (n > 1)) begin
        failures++; $display("FAIL flags for drivers %b", drive);
      end
      if (n == 1) begin
        checks++;
        if (bus_pkt != drive_pkt[who]) begin failures++; $display("FAIL packet for %b", drive); end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
