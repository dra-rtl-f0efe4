// eib_control_lines: the passive control lines of the enhanced internal bus.
//
// Every bus controller may drive the lines; every controller listens. The
// lines behave as a wired-OR: with one driver, bus_valid_o is high and
// bus_pkt_o is that driver's packet; with two or more, coll_o is high and
// the packet is invalid (the OR of the drivers), which is how collisions
// are detected for CSMA/CD. The lines hold no state and add no delay.
// The document gives the control lines' purpose, not their electrical
// form; the wired-OR model is this design's choice.
module eib_control_lines
  import dra_pkg::*;
#(
  parameter int unsigned N_LC = 6
) (
  input  logic [N_LC-1:0] drive_i,
  input  ctrl_pkt_t       drive_pkt_i [N_LC],
  output logic            bus_valid_o,
  output logic            coll_o,
  output ctrl_pkt_t       bus_pkt_o
);
  always_comb begin
    ctrl_pkt_t acc;
    acc = '0;
    for (int i = 0; i < N_LC; i++)
      if (drive_i[i]) acc = acc | drive_pkt_i[i];
    bus_pkt_o   = acc;
    coll_o      = $countones(drive_i) > 1;
    bus_valid_o = $countones(drive_i) == 1;
  end
endmodule
