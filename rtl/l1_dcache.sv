// l1_dcache: an energy-oriented L1 data cache split into two parts that
// sit side by side between the processor and the L2 cache:
//  * a pseudo set-associative cache (psac): WAYS independently probed
//    8 KB ways, probed with the Predictive Phased scheme (or, with
//    PSAC_SCHEME = FALLBACK_PHA, the Fall Back Phased scheme) and steered
//    by a 1024-entry table indexed by the load/store instruction address;
//    PSAC_ADAPTIVE turns on the MRU-avoiding line fill;
//  * a specialized stack cache (ssc): 512 B, direct-mapped, virtually
//    tagged, which uses the top-of-stack and safe-region-bottom registers
//    to drop write backs of dead stack lines and fetches of uninitialized
//    ones.
// A router sends stack references to the stack cache (stack-pointer based
// ones directly, others found by snooping one cycle later) and all other
// references to the pseudo set-associative cache. A TLB translates the
// addresses of the pseudo set-associative cache and, on its second port,
// the line addresses the stack cache sends to L2. An arbiter shares the
// single L2 port.
//
// Processor interface: cpu_req_valid/cpu_req_ready with a cpu_req_t
// request; one request in flight; cpu_resp_valid is a one-cycle pulse with
// the load data (stores are answered too) or cpu_resp_tlb_miss. The stack
// pointer is reported through sched_valid (new process: TOS and SRB set)
// and sp_move_valid (stack pointer changed). TLB entries are loaded through
// the tlb_wr_* port. The L2 port carries whole 32 B lines at physical line
// addresses; each request gets one l2_rsp_valid pulse. ssc_xlate_wait
// (also in events) says the stack cache waits for a TLB entry.
// Latencies (accept edge to response edge): stack cache hit 1, redirected
// stack hit 2, predicted PSAC load hit 2, other-way load hit and store hit
// 4 (PredictPha, the default; see psac for FallBackPha), misses add the
// L2 time.
// The organization follows the document; how the TLB serves the stack
// cache's L2 traffic, the router's ordering and the arbiter are this
// design's choices.
module l1_dcache
  import l1_pkg::*;
#(
  parameter int unsigned PSAC_WAYS     = 4,
  parameter int unsigned WAY_BYTES     = 8192,
  parameter int unsigned STEER_ENTRIES = 1024,
  parameter int unsigned PROBE_CYCLES  = 2,
  parameter psac_scheme_e PSAC_SCHEME  = PREDICT_PHA,
  parameter bit          PSAC_ADAPTIVE = 1'b0,
  parameter int unsigned SSC_BYTES     = 512,
  parameter int unsigned TLB_ENTRIES   = 64,
  parameter vaddr_t      STACK_TOP     = 32'h8000_0000,
  localparam int unsigned TLB_IDX_W    = $clog2(TLB_ENTRIES)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // processor
  input  logic                 cpu_req_valid,
  output logic                 cpu_req_ready,
  input  cpu_req_t             cpu_req,
  output logic                 cpu_resp_valid,
  output word_t                cpu_resp_rdata,
  output logic                 cpu_resp_tlb_miss,
  input  logic                 sched_valid,
  input  vaddr_t               sched_sp,
  input  logic                 sp_move_valid,
  input  vaddr_t               sp_move_sp,
  // TLB refill
  input  logic                 tlb_wr_en,
  input  logic [TLB_IDX_W-1:0] tlb_wr_idx,
  input  logic                 tlb_wr_valid,
  input  logic [VPN_W-1:0]     tlb_wr_vpn,
  input  logic [PFN_W-1:0]     tlb_wr_pfn,
  // L2
  output logic                 l2_req_valid,
  input  logic                 l2_req_ready,
  output logic                 l2_req_we,
  output pline_t               l2_req_line,
  output line_t                l2_req_wdata,
  input  logic                 l2_rsp_valid,
  input  line_t                l2_rsp_rdata,
  // accounting
  output vaddr_t               tos,
  output vline_t               srb_line,
  output logic [PSAC_WAYS-1:0] act_tag,
  output logic [PSAC_WAYS-1:0] act_data,
  output l1_events_t           events
);

  // router <-> caches
  logic     ssc_req_valid, ssc_req_ready, ssc_resp_valid;
  cpu_req_t ssc_req;
  word_t    ssc_resp_rdata;
  logic     psac_req_valid, psac_req_ready, psac_resp_valid, psac_resp_tlb_miss;
  cpu_req_t psac_req;
  word_t    psac_resp_rdata;

  // translation
  paddr_t psac_pa, ssc_pa;
  logic   psac_tlb_hit, ssc_tlb_hit;

  // stack cache L2 side (virtual)
  logic   ssc_l2_req_valid, ssc_l2_req_ready, ssc_l2_req_we, ssc_l2_rsp_valid;
  vline_t ssc_l2_req_line;
  line_t  ssc_l2_req_wdata;

  // PSAC L2 side
  logic   psac_l2_req_valid, psac_l2_req_ready, psac_l2_req_we, psac_l2_rsp_valid;
  pline_t psac_l2_req_line;
  line_t  psac_l2_req_wdata;

  logic [1:0]   arb_req_valid, arb_req_ready, arb_req_we, arb_rsp_valid;
  pline_t [1:0] arb_req_line;
  line_t [1:0]  arb_req_wdata;
  line_t        arb_rsp_rdata;

  stack_router #(.STACK_TOP(STACK_TOP)) u_router (
    .clk, .rst_n,
    .cpu_req_valid, .cpu_req_ready, .cpu_req,
    .cpu_resp_valid, .cpu_resp_rdata, .cpu_resp_tlb_miss,
    .tos,
    .ssc_req_valid, .ssc_req_ready, .ssc_req,
    .ssc_resp_valid, .ssc_resp_rdata,
    .psac_req_valid, .psac_req_ready, .psac_req,
    .psac_resp_valid, .psac_resp_rdata, .psac_resp_tlb_miss,
    .ev_sp_route(events.sp_route), .ev_redirect(events.redirect)
  );

  tlb #(.ENTRIES(TLB_ENTRIES)) u_tlb (
    .clk, .rst_n,
    .a_va(psac_req.va), .a_pa(psac_pa), .a_hit(psac_tlb_hit),
    .b_va({ssc_l2_req_line, OFF_W'(0)}), .b_pa(ssc_pa), .b_hit(ssc_tlb_hit),
    .wr_en(tlb_wr_en), .wr_idx(tlb_wr_idx), .wr_valid(tlb_wr_valid),
    .wr_vpn(tlb_wr_vpn), .wr_pfn(tlb_wr_pfn)
  );

  ssc #(.SIZE_BYTES(SSC_BYTES)) u_ssc (
    .clk, .rst_n,
    .req_valid(ssc_req_valid), .req_ready(ssc_req_ready),
    .req_we(ssc_req.we), .req_va(ssc_req.va),
    .req_wdata(ssc_req.wdata), .req_be(ssc_req.be),
    .resp_valid(ssc_resp_valid), .resp_rdata(ssc_resp_rdata),
    .sched_valid, .sched_sp, .sp_move_valid, .sp_move_sp,
    .tos, .srb_line,
    .l2_req_valid(ssc_l2_req_valid), .l2_req_ready(ssc_l2_req_ready),
    .l2_req_we(ssc_l2_req_we), .l2_req_line(ssc_l2_req_line),
    .l2_req_wdata(ssc_l2_req_wdata),
    .l2_rsp_valid(ssc_l2_rsp_valid), .l2_rsp_rdata(arb_rsp_rdata),
    .ev_hit(events.ssc_hit), .ev_miss(events.ssc_miss),
    .ev_wb(events.ssc_wb), .ev_wb_skipped(events.ssc_wb_skipped),
    .ev_fetch(events.ssc_fetch), .ev_fetch_skipped(events.ssc_fetch_skipped),
    .ev_srb_shrink(events.srb_shrink), .ev_srb_reset(events.srb_reset)
  );

  psac #(
    .WAYS(PSAC_WAYS), .WAY_BYTES(WAY_BYTES),
    .STEER_ENTRIES(STEER_ENTRIES), .PROBE_CYCLES(PROBE_CYCLES),
    .SCHEME(PSAC_SCHEME), .ADAPTIVE(PSAC_ADAPTIVE)
  ) u_psac (
    .clk, .rst_n,
    .req_valid(psac_req_valid), .req_ready(psac_req_ready),
    .req_we(psac_req.we), .req_pa(psac_pa), .req_tlb_miss(!psac_tlb_hit),
    .req_wdata(psac_req.wdata), .req_be(psac_req.be), .req_pc(psac_req.pc),
    .resp_valid(psac_resp_valid), .resp_rdata(psac_resp_rdata),
    .resp_tlb_miss(psac_resp_tlb_miss),
    .l2_req_valid(psac_l2_req_valid), .l2_req_ready(psac_l2_req_ready),
    .l2_req_we(psac_l2_req_we), .l2_req_line(psac_l2_req_line),
    .l2_req_wdata(psac_l2_req_wdata),
    .l2_rsp_valid(psac_l2_rsp_valid), .l2_rsp_rdata(arb_rsp_rdata),
    .act_tag, .act_data,
    .ev_pred_hit(events.psac_pred_hit), .ev_mispred(events.psac_mispred),
    .ev_miss(events.psac_miss), .ev_wb(events.psac_wb),
    .ev_adapt(events.psac_adapt)
  );

  // The stack cache's L2 request waits until its page is in the TLB.
  assign arb_req_valid    = {psac_l2_req_valid, ssc_l2_req_valid && ssc_tlb_hit};
  assign arb_req_we       = {psac_l2_req_we, ssc_l2_req_we};
  assign arb_req_line     = {psac_l2_req_line, ssc_pa[PA_W-1:OFF_W]};
  assign arb_req_wdata    = {psac_l2_req_wdata, ssc_l2_req_wdata};
  assign ssc_l2_req_ready  = arb_req_ready[0] && ssc_tlb_hit;
  assign psac_l2_req_ready = arb_req_ready[1];
  assign ssc_l2_rsp_valid  = arb_rsp_valid[0];
  assign psac_l2_rsp_valid = arb_rsp_valid[1];

  assign events.tlb_miss       = psac_resp_valid && psac_resp_tlb_miss;
  assign events.ssc_xlate_wait = ssc_l2_req_valid && !ssc_tlb_hit;

  l2_arb u_arb (
    .clk, .rst_n,
    .c_req_valid(arb_req_valid), .c_req_ready(arb_req_ready),
    .c_req_we(arb_req_we), .c_req_line(arb_req_line), .c_req_wdata(arb_req_wdata),
    .c_rsp_valid(arb_rsp_valid), .c_rsp_rdata(arb_rsp_rdata),
    .l2_req_valid, .l2_req_ready, .l2_req_we, .l2_req_line, .l2_req_wdata,
    .l2_rsp_valid, .l2_rsp_rdata
  );

endmodule
