// ssc: Specialized Stack Cache. A small direct-mapped, virtually tagged,
// write-back, write-allocate cache that receives every stack reference.
//
// Two pointer registers (ssc_ptr_regs) make it cheaper than a plain stack
// cache:
//  * a dirty line that is displaced while it lies wholly above the top of
//    stack (popped, dead) is dropped instead of being written back;
//  * a store that misses on a line of the safe region (between TOS and SRB)
//    allocates the line without fetching it, because such a line cannot
//    hold initialized data that was ever displaced. Its other bytes are
//    filled with zeros.
// A dirty displacement inside the safe region shrinks that region.
//
// Interface: one request at a time, valid/ready. A hit answers one cycle
// after it is accepted (resp_valid is a one-cycle pulse; stores are
// answered too). A miss goes IDLE -> EVICT -> [write back] -> ALLOC ->
// [fetch] -> answer. The L2 port carries whole lines at virtual line
// addresses; translation for it is done outside. Every L2 request gets one
// l2_rsp_valid pulse (the line data for reads, an acknowledgement for
// writes).
// Following the document: direct mapping, 512 B default size, virtual
// tags, the TOS/SRB rules. This design's choices: 32 B lines from the
// evaluated L1, the zero fill, the extra EVICT/ALLOC cycles, and no flush
// when a new process is scheduled.
module ssc
  import l1_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 512
) (
  input  logic   clk,
  input  logic   rst_n,
  // processor side
  input  logic   req_valid,
  output logic   req_ready,
  input  logic   req_we,
  input  vaddr_t req_va,
  input  word_t  req_wdata,
  input  be_t    req_be,
  output logic   resp_valid,
  output word_t  resp_rdata,
  // stack pointer events from the processor
  input  logic   sched_valid,
  input  vaddr_t sched_sp,
  input  logic   sp_move_valid,
  input  vaddr_t sp_move_sp,
  output vaddr_t tos,
  output vline_t srb_line,
  // L2 side, virtual line addresses
  output logic   l2_req_valid,
  input  logic   l2_req_ready,
  output logic   l2_req_we,
  output vline_t l2_req_line,
  output line_t  l2_req_wdata,
  input  logic   l2_rsp_valid,
  input  line_t  l2_rsp_rdata,
  // one-cycle event pulses
  output logic   ev_hit,
  output logic   ev_miss,
  output logic   ev_wb,            // dirty line written back
  output logic   ev_wb_skipped,    // dirty dead line dropped
  output logic   ev_fetch,         // line fetched from L2
  output logic   ev_fetch_skipped, // store miss allocated without fetch
  output logic   ev_srb_shrink,
  output logic   ev_srb_reset
);

  localparam int unsigned LINES = SIZE_BYTES / LINE_BYTES;
  localparam int unsigned IDX_W = (LINES > 1) ? $clog2(LINES) : 1;
  localparam int unsigned TAG_W = VLINE_W - IDX_W;

  typedef enum logic [2:0] {
    S_IDLE, S_EVICT, S_WB_REQ, S_WB_WAIT, S_ALLOC, S_FILL_REQ, S_FILL_WAIT
  } state_t;

  state_t state;

  logic             valid_q [LINES];
  logic             dirty_q [LINES];
  logic [TAG_W-1:0] tag_q   [LINES];
  line_t            data_q  [LINES];

  // pending miss
  logic   p_we;
  vaddr_t p_va;
  word_t  p_wdata;
  be_t    p_be;

  logic [IDX_W-1:0]  in_idx, p_idx;
  logic [TAG_W-1:0]  in_tag;
  logic [WIDX_W-1:0] in_widx, p_widx;
  logic              in_hit;
  vline_t            victim_line, p_line, q_line;
  logic              q_dead, q_safe, disp_valid;
  logic              victim_dirty;
  vline_t            tos_line_unused;

  assign in_idx  = req_va[OFF_W +: IDX_W];
  assign in_tag  = req_va[VA_W-1 -: TAG_W];
  assign in_widx = req_va[OFF_W-1 -: WIDX_W];
  assign in_hit  = valid_q[in_idx] && (tag_q[in_idx] == in_tag);

  assign p_idx   = p_va[OFF_W +: IDX_W];
  assign p_widx  = p_va[OFF_W-1 -: WIDX_W];
  assign p_line  = p_va[VA_W-1:OFF_W];
  assign victim_line  = {tag_q[p_idx], p_idx};
  assign victim_dirty = valid_q[p_idx] && dirty_q[p_idx];

  assign req_ready  = (state == S_IDLE);
  assign disp_valid = (state == S_EVICT) && victim_dirty;
  assign q_line     = (state == S_EVICT) ? victim_line : p_line;

  ssc_ptr_regs u_ptr (
    .clk, .rst_n,
    .sched_valid, .sched_sp, .sp_move_valid, .sp_move_sp,
    .disp_valid, .disp_line(victim_line),
    .q_line, .q_dead, .q_safe,
    .tos, .tos_line(tos_line_unused), .srb_line,
    .ev_srb_shrink, .ev_srb_reset
  );

  assign l2_req_valid = (state == S_WB_REQ) || (state == S_FILL_REQ);
  assign l2_req_we    = (state == S_WB_REQ);
  assign l2_req_line  = (state == S_WB_REQ) ? victim_line : p_line;
  assign l2_req_wdata = data_q[p_idx];

  always_comb begin
    ev_hit = 1'b0; ev_miss = 1'b0; ev_wb = 1'b0; ev_wb_skipped = 1'b0;
    ev_fetch = 1'b0; ev_fetch_skipped = 1'b0;
    unique case (state)
      S_IDLE:   if (req_valid) begin ev_hit = in_hit; ev_miss = !in_hit; end
      S_EVICT:  begin ev_wb = victim_dirty && !q_dead; ev_wb_skipped = victim_dirty && q_dead; end
      S_ALLOC:  begin ev_fetch_skipped = p_we && q_safe; ev_fetch = !(p_we && q_safe); end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      resp_valid <= 1'b0;
      resp_rdata <= '0;
      p_we <= 1'b0; p_va <= '0; p_wdata <= '0; p_be <= '0;
      for (int i = 0; i < int'(LINES); i++) begin
        valid_q[i] <= 1'b0;
        dirty_q[i] <= 1'b0;
        tag_q[i]   <= '0;
        data_q[i]  <= '0;
      end
    end else begin
      resp_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (req_valid) begin
          if (in_hit) begin
            resp_valid <= 1'b1;
            if (req_we) begin
              data_q[in_idx]  <= merge_word(data_q[in_idx], in_widx, req_wdata, req_be);
              dirty_q[in_idx] <= 1'b1;
            end else begin
              resp_rdata <= get_word(data_q[in_idx], in_widx);
            end
          end else begin
            p_we <= req_we; p_va <= req_va; p_wdata <= req_wdata; p_be <= req_be;
            state <= S_EVICT;
          end
        end
        S_EVICT: begin
          valid_q[p_idx] <= 1'b0;
          state <= (victim_dirty && !q_dead) ? S_WB_REQ : S_ALLOC;
        end
        S_WB_REQ:  if (l2_req_ready) state <= S_WB_WAIT;
        S_WB_WAIT: if (l2_rsp_valid) state <= S_ALLOC;
        S_ALLOC: begin
          if (p_we && q_safe) begin
            valid_q[p_idx] <= 1'b1;
            dirty_q[p_idx] <= 1'b1;
            tag_q[p_idx]   <= p_va[VA_W-1 -: TAG_W];
            data_q[p_idx]  <= merge_word('0, p_widx, p_wdata, p_be);
            resp_valid     <= 1'b1;
            state          <= S_IDLE;
          end else begin
            state <= S_FILL_REQ;
          end
        end
        S_FILL_REQ:  if (l2_req_ready) state <= S_FILL_WAIT;
        S_FILL_WAIT: if (l2_rsp_valid) begin
          valid_q[p_idx] <= 1'b1;
          dirty_q[p_idx] <= p_we;
          tag_q[p_idx]   <= p_va[VA_W-1 -: TAG_W];
          data_q[p_idx]  <= p_we ? merge_word(l2_rsp_rdata, p_widx, p_wdata, p_be) : l2_rsp_rdata;
          if (!p_we) resp_rdata <= get_word(l2_rsp_rdata, p_widx);
          resp_valid <= 1'b1;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
