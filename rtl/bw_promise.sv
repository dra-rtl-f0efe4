// bw_promise: the bandwidth a linecard is promised on the EIB data lines.
//
// Given B_LC, the bandwidth one linecard asked for, B_LCT, the total asked
// for by all linecards, and B_BUS, the data lines' capacity, the promise is
//   B_prom = B_LC                      if B_LCT <= B_BUS
//   B_prom = (B_LC / B_LCT) * B_BUS    otherwise,
// as published; linecards that are scaled back drop the excess packets.
// Every linecard sees every LP set-up, so each can compute B_LCT itself.
//
// Design choices: bandwidths are unsigned integers in Mbit/s; the scaled
// value is computed as (B_LC * B_BUS) / B_LCT and rounded down. B_BUS
// defaults to 10 Gbit/s, the value that reproduces the published
// degradation bars for N = 6; the document does not print it. The module is
// combinational.
module bw_promise
  import dra_pkg::*;
#(
  parameter int unsigned B_BUS = 10000   // data-line capacity, Mbit/s
) (
  input  logic [BW_W-1:0]   b_lc_i,      // B_LC
  input  logic [BW_W+3:0]   b_lct_i,     // B_LCT, sum over up to 16 LPs
  output logic [BW_W-1:0]   b_prom_o,    // B_prom
  output logic              scaled_o     // B_LCT > B_BUS
);
  localparam int unsigned PW = 2*BW_W + 4;
  logic [PW-1:0] prod, quot;

  always_comb begin
    scaled_o = (b_lct_i > (BW_W+4)'(B_BUS));
    prod     = PW'(b_lc_i) * PW'(B_BUS);
    quot     = (b_lct_i == '0) ? '0 : prod / PW'(b_lct_i);
    b_prom_o = scaled_o ? quot[BW_W-1:0] : b_lc_i;
  end
  // When scaled, B_LC * B_BUS / B_LCT < B_LC, so the upper quotient bits
  // are always zero.
  logic unused;
  assign unused = ^quot[PW-1:BW_W];
endmodule
