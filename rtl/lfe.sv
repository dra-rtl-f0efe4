// lfe: local forwarding engine of a linecard.
//
// It holds this linecard's copy of the routing table, written entry by
// entry by the route processor, and answers route lookups: for a 32-bit
// destination address it returns the outgoing linecard of the longest
// matching prefix. It has two lookup ports: port A serves the local
// segmentation and reassembly unit, port B serves lookup requests that
// other linecards send over the EIB control lines when their own LFE has
// failed. Each port takes one request per cycle and answers one cycle
// later (resp valid, hit flag, linecard).
//
// The document states what the LFE does (lookup, classification and
// filtering on a distributed routing-table copy) but not how; a
// longest-prefix match over a small register table searched in parallel is
// this design's choice, as are ENTRIES and the write port. Classification
// and filtering are not modelled.
module lfe
  import dra_pkg::*;
#(
  parameter int unsigned ENTRIES = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // table writes from the route processor
  input  logic                        wr_en_i,
  input  logic [$clog2(ENTRIES)-1:0]  wr_idx_i,
  input  logic                        wr_valid_i,
  input  logic [ADDR_W-1:0]           wr_prefix_i,
  input  logic [5:0]                  wr_len_i,     // prefix length 0..32
  input  logic [LC_ID_W-1:0]          wr_lc_i,
  // lookup port A (local SRU)
  input  logic                        a_req_i,
  input  logic [ADDR_W-1:0]           a_addr_i,
  output logic                        a_resp_o,
  output logic                        a_hit_o,
  output logic [LC_ID_W-1:0]          a_lc_o,
  // lookup port B (remote requests via the bus controller)
  input  logic                        b_req_i,
  input  logic [ADDR_W-1:0]           b_addr_i,
  output logic                        b_resp_o,
  output logic                        b_hit_o,
  output logic [LC_ID_W-1:0]          b_lc_o
);
  typedef struct packed {
    logic               valid;
    logic [ADDR_W-1:0]  prefix;
    logic [5:0]         len;
    logic [LC_ID_W-1:0] lc;
  } route_t;

  route_t tbl [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) tbl[i] <= '0;
    end else if (wr_en_i) begin
      tbl[wr_idx_i] <= '{valid: wr_valid_i, prefix: wr_prefix_i, len: wr_len_i, lc: wr_lc_i};
    end
  end

  // Longest-prefix match over the whole table.
  function automatic logic [LC_ID_W+6:0] lpm(input logic [ADDR_W-1:0] addr);
    logic               hit;
    logic [5:0]         best;
    logic [LC_ID_W-1:0] lc;
    logic [ADDR_W-1:0]  mask;
    hit = 1'b0; best = '0; lc = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      mask = (tbl[i].len == 6'd0) ? '0 : ~(ADDR_W'(32'hFFFF_FFFF) >> tbl[i].len);
      if (tbl[i].valid && ((addr & mask) == (tbl[i].prefix & mask)) &&
          (!hit || tbl[i].len > best)) begin
        hit  = 1'b1;
        best = tbl[i].len;
        lc   = tbl[i].lc;
      end
    end
    return {hit, best, lc};
  endfunction

  logic [LC_ID_W+6:0] a_res, b_res;
  assign a_res = lpm(a_addr_i);
  assign b_res = lpm(b_addr_i);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_resp_o <= 1'b0; a_hit_o <= 1'b0; a_lc_o <= '0;
      b_resp_o <= 1'b0; b_hit_o <= 1'b0; b_lc_o <= '0;
    end else begin
      a_resp_o <= a_req_i;
      b_resp_o <= b_req_i;
      if (a_req_i) begin a_hit_o <= a_res[LC_ID_W+6]; a_lc_o <= a_res[LC_ID_W-1:0]; end
      if (b_req_i) begin b_hit_o <= b_res[LC_ID_W+6]; b_lc_o <= b_res[LC_ID_W-1:0]; end
    end
  end
endmodule
