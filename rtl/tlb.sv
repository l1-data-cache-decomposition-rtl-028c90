// tlb: fully associative translation buffer for the physically tagged part
// of the L1 (the pseudo set-associative cache) and for the L2 traffic of the
// virtually tagged stack cache.
//
// ENTRIES entries map a virtual page number to a physical frame number.
// Two lookup ports compare their page number against every valid entry in
// the same cycle (combinational); a miss is reported, not serviced: the
// entries are loaded through the write port (wr_en, wr_idx), as a software
// refill handler would. Reset clears all valid bits.
// Following the document: 64 entries, fully associative, 40-bit physical
// addresses. This design's choices: 4 KB pages, no address-space
// identifiers, two lookup ports and the refill port.
module tlb
  import l1_pkg::*;
#(
  parameter int unsigned ENTRIES = 64,
  localparam int unsigned IDX_W  = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  vaddr_t           a_va,
  output paddr_t           a_pa,
  output logic             a_hit,
  input  vaddr_t           b_va,
  output paddr_t           b_pa,
  output logic             b_hit,
  input  logic             wr_en,
  input  logic [IDX_W-1:0] wr_idx,
  input  logic             wr_valid,
  input  logic [VPN_W-1:0] wr_vpn,
  input  logic [PFN_W-1:0] wr_pfn
);

  logic [ENTRIES-1:0] valid_q;
  logic [VPN_W-1:0]   vpn_q [ENTRIES];
  logic [PFN_W-1:0]   pfn_q [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_q <= '0;
    else if (wr_en) valid_q[wr_idx] <= wr_valid;
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      vpn_q[wr_idx] <= wr_vpn;
      pfn_q[wr_idx] <= wr_pfn;
    end
  end

  // A match OR-reduces the frame numbers of the matching entries; software
  // keeps at most one valid entry per page.
  always_comb begin
    logic [PFN_W-1:0] pfn_a, pfn_b;
    pfn_a = '0; pfn_b = '0; a_hit = 1'b0; b_hit = 1'b0;
    for (int i = 0; i < int'(ENTRIES); i++) begin
      if (valid_q[i] && vpn_q[i] == a_va[VA_W-1:PAGE_W]) begin
        a_hit = 1'b1;
        pfn_a = pfn_a | pfn_q[i];
      end
      if (valid_q[i] && vpn_q[i] == b_va[VA_W-1:PAGE_W]) begin
        b_hit = 1'b1;
        pfn_b = pfn_b | pfn_q[i];
      end
    end
    a_pa = {pfn_a, a_va[PAGE_W-1:0]};
    b_pa = {pfn_b, b_va[PAGE_W-1:0]};
  end

endmodule
