// tb_eib_data_lines: random sets of drivers on the data lines; checks the
// valid and clash flags and that a lone driver's word is delivered intact.
module tb_eib_data_lines;
  import dra_pkg::*;
  localparam int N = 6;
  logic [N-1:0] drive;
  dword_t words [N];
  logic valid, clash;
  dword_t word;
  int checks = 0, failures = 0;

  eib_data_lines #(.N_LC(N)) u_dut (.drive_i(drive), .drive_word_i(words),
    .valid_o(valid), .clash_o(clash), .word_o(word));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int n, who;
      drive = (t % 2 == 0) ? N'(1) << $urandom_range(0, N-1) : N'($urandom_range(0, 63));
      for (int i = 0; i < N; i++) begin
        words[i] = '0;
        words[i].src = LC_ID_W'(i);
        words[i].dst = LC_ID_W'($urandom_range(0, N-1));
        words[i].unit = unit_e'($urandom_range(0, 3));
        words[i].data = $urandom;
      end
      #1;
      n = $countones(drive);
      who = 0;
      for (int i = 0; i < N; i++) if (drive[i]) who = i;
      checks++;
      if (valid != (n == 1) || clash != (n > 1)) begin failures++; $display("FAIL flags %b", drive); end
      if (n == 1) begin
        checks++;
        if (word != words[who]) begin failures++; $display("FAIL word from %0d", who); end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
