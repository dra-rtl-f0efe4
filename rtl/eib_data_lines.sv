// eib_data_lines: the passive data lines of the enhanced internal bus.
//
// One word (dword_t: source, destination, receiving unit, packet
// delimiters, 32 data bits) crosses the lines per cycle. Only the linecard
// that holds the current time-division turn drives them; every linecard
// sees the word and keeps it if it is the destination. The lines are a
// wired-OR: valid_o is high when exactly one linecard drives, and clash_o
// flags two or more drivers, which the turn arbitration must never allow.
// The document gives the data lines' purpose; their width and the word
// format are this design's choices.
module eib_data_lines
  import dra_pkg::*;
#(
  parameter int unsigned N_LC = 6
) (
  input  logic [N_LC-1:0] drive_i,
  input  dword_t          drive_word_i [N_LC],
  output logic            valid_o,
  output logic            clash_o,
  output dword_t          word_o
);
  always_comb begin
    dword_t acc;
    acc = '0;
    for (int i = 0; i < N_LC; i++)
      if (drive_i[i]) acc = acc | drive_word_i[i];
    word_o  = acc;
    valid_o = $countones(drive_i) == 1;
    clash_o = $countones(drive_i) > 1;
  end
endmodule
