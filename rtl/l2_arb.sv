// l2_arb: shares the single line-wide port to the L2 cache between the
// stack cache (client 0) and the pseudo set-associative cache (client 1).
//
// One L2 transaction is outstanding at a time. When the port is free, a
// requesting client is granted (client 0 first); after the L2 accepts the
// request the arbiter is locked to that client until the one response
// pulse (read data or write acknowledgement) arrives, which is routed back
// to it. Addresses are physical line addresses.
// The shared port follows the document's organization figure (both caches
// connect to L2); the handshake and the fixed priority are this design's
// choices.
module l2_arb
  import l1_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [1:0]       c_req_valid,
  output logic [1:0]       c_req_ready,
  input  logic [1:0]       c_req_we,
  input  pline_t [1:0]     c_req_line,
  input  line_t [1:0]      c_req_wdata,
  output logic [1:0]       c_rsp_valid,
  output line_t            c_rsp_rdata,
  output logic             l2_req_valid,
  input  logic             l2_req_ready,
  output logic             l2_req_we,
  output pline_t           l2_req_line,
  output line_t            l2_req_wdata,
  input  logic             l2_rsp_valid,
  input  line_t            l2_rsp_rdata
);

  logic busy, owner, grant;

  assign grant        = !c_req_valid[0];
  assign l2_req_valid = !busy && (|c_req_valid);
  assign l2_req_we    = c_req_we[grant];
  assign l2_req_line  = c_req_line[grant];
  assign l2_req_wdata = c_req_wdata[grant];

  always_comb begin
    c_req_ready = '0;
    if (!busy) c_req_ready[grant] = l2_req_ready;
    c_rsp_valid = '0;
    if (busy) c_rsp_valid[owner] = l2_rsp_valid;
  end
  assign c_rsp_rdata = l2_rsp_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      owner <= 1'b0;
    end else if (!busy) begin
      if (l2_req_valid && l2_req_ready) begin
        busy  <= 1'b1;
        owner <= grant;
      end
    end else if (l2_rsp_valid) begin
      busy <= 1'b0;
    end
  end

endmodule
