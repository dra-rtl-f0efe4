// fabric_model: behavioural model of the router's switching fabric, for
// simulation only. The fabric itself is part of the existing router and
// not of this design. The model accepts cells on every linecard's fabric
// port at any time, collects each packet's cells per source until the
// cell marked last, and then queues the whole packet's cells for the
// outgoing linecard named in the first cell's header, so that the cells of
// one packet reach the outgoing linecard back to back.
module fabric_model
  import dra_pkg::*;
#(
  parameter int unsigned N_LC = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_LC-1:0]   cell_valid_i,
  input  logic [N_LC-1:0]   cell_sop_i,
  input  logic [N_LC-1:0]   cell_eop_i,
  input  logic [DATA_W-1:0] cell_data_i [N_LC],
  output logic [N_LC-1:0]   cell_ready_o,
  output logic [N_LC-1:0]   fab_valid_o,
  output logic [N_LC-1:0]   fab_sop_o,
  output logic [N_LC-1:0]   fab_eop_o,
  output logic [DATA_W-1:0] fab_data_o [N_LC],
  input  logic [N_LC-1:0]   fab_ready_i,
  output int                cells_o
);
  typedef struct packed {logic sop; logic eop; logic [DATA_W-1:0] d;} w_t;
  w_t pend [N_LC][$];
  w_t outq [N_LC][$];
  int dst_of [N_LC];
  logic last_of [N_LC];

  assign cell_ready_o = '1;
  always_comb for (int i = 0; i < N_LC; i++) begin
    fab_valid_o[i] = outq[i].size() > 0;
    fab_sop_o[i]   = fab_valid_o[i] ? outq[i][0].sop : 1'b0;
    fab_eop_o[i]   = fab_valid_o[i] ? outq[i][0].eop : 1'b0;
    fab_data_o[i]  = fab_valid_o[i] ? outq[i][0].d : '0;
  end

  always @(posedge clk) begin
    if (!rst_n) cells_o <= 0;
    else for (int i = 0; i < N_LC; i++) begin
      if (fab_valid_o[i] && fab_ready_i[i]) void'(outq[i].pop_front());
      if (cell_valid_i[i]) begin
        if (cell_sop_i[i]) begin
          cells_o <= cells_o + 1;
          if (cell_data_i[i][23]) dst_of[i] = int'(cell_data_i[i][31:28]);
          last_of[i] = cell_data_i[i][22];
        end
        pend[i].push_back('{sop: cell_sop_i[i], eop: cell_eop_i[i], d: cell_data_i[i]});
        if (cell_eop_i[i] && last_of[i]) begin
          foreach (pend[i][k]) outq[dst_of[i] % N_LC].push_back(pend[i][k]);
          pend[i].delete();
        end
      end
    end
  end
endmodule
