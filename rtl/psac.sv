// psac: Pseudo Set-Associative Cache. The cache is WAYS small direct-mapped
// caches (psac_way) that can be probed independently, a steering table that
// predicts which way holds the line, and this controller.
//
// Predictive Phased (SCHEME = PREDICT_PHA, the default):
//   Load: the first probe activates the tag arrays of all ways and the data
//   array of the predicted way only. If the predicted way hits, the word is
//   returned at the end of the first probe. If another way hits, the tags
//   have already said which one, so the second probe activates only that
//   way's data array, and the steering entry is retrained to that way.
// Fall Back Phased (SCHEME = FALLBACK_PHA):
//   The first probe activates only the predicted way (tag, and data for a
//   load). If it misses, the second probe activates the other ways' tags and
//   a third probe the data array of the way that hit.
// Stores in both schemes check tags before touching a data array (phased
// write) and write only the hitting way's data array.
// Miss: the line is placed in the predicted way (write back of a dirty
// victim first, then a line fill from L2; write-allocate). With ADAPTIVE
// set, a per-set MRU way is kept; if the predicted way is the MRU way, the
// line goes to a random other way instead and the steering entry is
// pointed at it.
//
// Timing, counted from the clock edge that accepts a request to the edge
// that samples resp_valid, with PROBE_CYCLES = 2:
//   PredictPha:  load 2 (predicted way) or 4 (other way); store hit 4;
//                miss known at 2.
//   FallBackPha: load 2 or 6; store hit 4 or 6; miss known at 4.
// A miss then waits for L2. A request whose translation missed is answered
// after one cycle with resp_tlb_miss and touches no array. One request at a
// time, valid/ready; resp_valid is a one-cycle pulse. req_ready is low while
// the steering table fills itself after reset.
// Following the document: both probing schemes, steering by instruction
// address, fill into the predicted way, the adaptive MRU variant, 4 ways of
// 8 KB, a 1024-entry table and the 2-cycle probe. This design's choices: the
// handshake, write-allocate, the miss sequence, the random generator and
// the FallBackPha store that hits outside the predicted way taking 6 cycles
// (three probes), where the published energy table lists 8.
module psac
  import l1_pkg::*;
#(
  parameter int unsigned WAYS          = 4,
  parameter int unsigned WAY_BYTES     = 8192,
  parameter int unsigned STEER_ENTRIES = 1024,
  parameter int unsigned PROBE_CYCLES  = 2,
  parameter psac_scheme_e SCHEME       = PREDICT_PHA,
  parameter bit          ADAPTIVE      = 1'b0,
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req_valid,
  output logic             req_ready,
  input  logic             req_we,
  input  paddr_t           req_pa,
  input  logic             req_tlb_miss,
  input  word_t            req_wdata,
  input  be_t              req_be,
  input  vaddr_t           req_pc,
  output logic             resp_valid,
  output word_t            resp_rdata,
  output logic             resp_tlb_miss,
  output logic             l2_req_valid,
  input  logic             l2_req_ready,
  output logic             l2_req_we,
  output pline_t           l2_req_line,
  output line_t            l2_req_wdata,
  input  logic             l2_rsp_valid,
  input  line_t            l2_rsp_rdata,
  output logic [WAYS-1:0]  act_tag,     // tag arrays activated this cycle
  output logic [WAYS-1:0]  act_data,    // data arrays activated this cycle
  output logic             ev_pred_hit,
  output logic             ev_mispred,  // hit in a way other than predicted
  output logic             ev_miss,
  output logic             ev_wb,
  output logic             ev_adapt     // fill moved away from the MRU way
);

  localparam int unsigned SETS  = WAY_BYTES / LINE_BYTES;
  localparam int unsigned SET_W = $clog2(SETS);
  localparam int unsigned TAG_W = PA_W - OFF_W - SET_W;

  typedef enum logic [3:0] {
    S_IDLE, S_P1, S_PT, S_PD, S_VRD, S_WB_REQ, S_WB_WAIT, S_FILL_REQ, S_FILL_WAIT
  } state_t;

  state_t     state;
  logic [3:0] cnt;

  // pending request
  logic   p_we;
  paddr_t p_pa;
  word_t  p_wdata;
  be_t    p_be;
  vaddr_t p_pc;
  logic [WAY_W-1:0] pred, hway, victim;
  logic [TAG_W-1:0] v_tag;

  logic [SET_W-1:0]  set;
  logic [TAG_W-1:0]  p_tag;
  logic [WIDX_W-1:0] p_widx;

  // way array controls and outputs
  logic [WAYS-1:0]  tag_rd_en, tag_wr_en, data_rd_en, data_wr_en;
  logic             tag_wr_dirty;
  line_be_t         data_wr_be;
  line_t            data_wr_data;
  logic [WAYS-1:0]  w_valid, w_dirty;
  logic [TAG_W-1:0] w_tag  [WAYS];
  line_t            w_data [WAYS];

  logic [WAYS-1:0]  hitvec;
  logic [WAY_W-1:0] hit_idx;
  logic             any_hit;

  logic [WAY_W-1:0] steer_way;
  logic             steer_busy, steer_wr;

  logic probe_start, probe_end;

  // final hit/miss decision: end of the first probe (PredictPha) or of the
  // second, tag-only probe (FallBackPha, when the predicted way missed)
  logic p1_end, pt_end, decide, pred_hit_now;
  logic [WAY_W-1:0] victim_sel, steer_wr_way;
  logic             adapt_now;
  logic [WAY_W-1:0] mru_way, rand_other;

  assign p_tag  = p_pa[PA_W-1 -: TAG_W];
  assign p_widx = p_pa[OFF_W-1 -: WIDX_W];
  assign set    = (state == S_IDLE) ? req_pa[OFF_W +: SET_W] : p_pa[OFF_W +: SET_W];

  assign req_ready   = (state == S_IDLE) && !steer_busy;
  assign probe_start = (cnt == 4'd0);
  assign probe_end   = (cnt == 4'(PROBE_CYCLES - 1));

  steering_table #(.ENTRIES(STEER_ENTRIES), .WAYS(WAYS)) u_steer (
    .clk, .rst_n,
    .rd_pc(req_pc), .rd_way(steer_way),
    .wr_en(steer_wr), .wr_pc(p_pc), .wr_way(steer_wr_way),
    .busy(steer_busy)
  );

  for (genvar w = 0; w < int'(WAYS); w++) begin : g_way
    psac_way #(.WAY_BYTES(WAY_BYTES)) u_way (
      .clk, .rst_n, .set,
      .tag_rd_en(tag_rd_en[w]), .tag_wr_en(tag_wr_en[w]),
      .tag_wr_valid(1'b1), .tag_wr_dirty, .tag_wr_tag(p_tag),
      .data_rd_en(data_rd_en[w]), .data_wr_en(data_wr_en[w]),
      .data_wr_be, .data_wr_data,
      .tag_valid(w_valid[w]), .tag_dirty(w_dirty[w]),
      .tag_out(w_tag[w]), .data_out(w_data[w])
    );
    // At the end of a FallBackPha first probe only the predicted way's tag
    // has been read; the other ways' outputs are stale and are masked.
    assign hitvec[w] = w_valid[w] && (w_tag[w] == p_tag) &&
                       !(SCHEME == FALLBACK_PHA && state == S_P1 && WAY_W'(w) != pred);
  end

  always_comb begin
    hit_idx = '0;
    for (int w = 0; w < int'(WAYS); w++)
      if (hitvec[w]) hit_idx = WAY_W'(w);
    any_hit = |hitvec;
  end

  // array activations
  always_comb begin
    tag_rd_en    = '0;
    tag_wr_en    = '0;
    data_rd_en   = '0;
    data_wr_en   = '0;
    tag_wr_dirty = 1'b1;
    data_wr_be   = word_be(p_widx, p_be);
    data_wr_data = {WORDS_PER_LINE{p_wdata}};
    unique case (state)
      S_IDLE: if (req_valid && req_ready && !req_tlb_miss) begin
        if (SCHEME == PREDICT_PHA) tag_rd_en = '1;
        else                       tag_rd_en[steer_way] = 1'b1;
        if (!req_we) data_rd_en[steer_way] = 1'b1;
      end
      S_PT: if (probe_start) begin
        tag_rd_en       = '1;
        tag_rd_en[pred] = 1'b0;
      end
      S_PD: if (probe_start) begin
        if (p_we) begin
          data_wr_en[hway] = 1'b1;
          tag_wr_en[hway]  = 1'b1;
        end else begin
          data_rd_en[hway] = 1'b1;
        end
      end
      S_VRD: data_rd_en[victim] = 1'b1;
      S_FILL_WAIT: if (l2_rsp_valid) begin
        tag_wr_en[victim]  = 1'b1;
        data_wr_en[victim] = 1'b1;
        tag_wr_dirty       = p_we;
        data_wr_be         = '1;
        data_wr_data       = p_we ? merge_word(l2_rsp_rdata, p_widx, p_wdata, p_be) : l2_rsp_rdata;
      end
      default: ;
    endcase
  end

  assign act_tag  = tag_rd_en | tag_wr_en;
  assign act_data = data_rd_en | data_wr_en;

  assign p1_end       = (state == S_P1) && probe_end;
  assign pt_end       = (state == S_PT) && probe_end;
  assign pred_hit_now = p1_end && hitvec[pred];
  // In FallBackPha only the predicted way's tag is valid at the end of the
  // first probe; the other ways are judged after the second probe.
  assign decide = (SCHEME == PREDICT_PHA) ? p1_end : (pt_end || pred_hit_now);

  // Adaptive replacement: a fill that would land in the set's most recently
  // used way goes to a random other way, and the steering entry follows.
  assign adapt_now  = ADAPTIVE && (WAYS > 1) && decide && !any_hit && (mru_way == pred);
  assign victim_sel = adapt_now ? rand_other : pred;
  assign ev_adapt   = adapt_now;

  assign steer_wr     = decide && ((any_hit && !hitvec[pred]) || adapt_now);
  assign steer_wr_way = any_hit ? hit_idx : victim_sel;

  assign l2_req_valid = (state == S_WB_REQ) || (state == S_FILL_REQ);
  assign l2_req_we    = (state == S_WB_REQ);
  assign l2_req_line  = (state == S_WB_REQ) ? {v_tag, p_pa[OFF_W +: SET_W]} : p_pa[PA_W-1:OFF_W];
  assign l2_req_wdata = w_data[victim];

  always_comb begin
    ev_pred_hit = pred_hit_now;
    ev_mispred  = decide && any_hit && !hitvec[pred];
    ev_miss     = decide && !any_hit;
    ev_wb       = (state == S_WB_REQ) && l2_req_ready;
  end

  // MRU way of each set and a free-running LFSR, used only when ADAPTIVE.
  if (ADAPTIVE && WAYS > 1) begin : g_adaptive
    logic [WAY_W-1:0] mru_q [SETS];
    logic [15:0]      lfsr;
    logic             mru_wr;
    logic [WAY_W-1:0] mru_wr_way;
    assign mru_way    = mru_q[set];
    assign rand_other = WAY_W'((32'(pred) + 1 + 32'(lfsr) % (WAYS - 1)) % WAYS);
    always_comb begin
      mru_wr     = 1'b0;
      mru_wr_way = hit_idx;
      if (decide && any_hit) mru_wr = 1'b1;
      if (state == S_FILL_WAIT && l2_rsp_valid) begin
        mru_wr     = 1'b1;
        mru_wr_way = victim;
      end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        lfsr <= 16'h1D0F;
        for (int i = 0; i < int'(SETS); i++) mru_q[i] <= '0;
      end else begin
        lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
        if (mru_wr) mru_q[set] <= mru_wr_way;
      end
    end
  end else begin : g_fixed
    assign mru_way    = '0;
    assign rand_other = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      p_we <= 1'b0; p_pa <= '0; p_wdata <= '0; p_be <= '0; p_pc <= '0;
      pred <= '0; hway <= '0; victim <= '0; v_tag <= '0;
      resp_valid <= 1'b0; resp_rdata <= '0; resp_tlb_miss <= 1'b0;
    end else begin
      resp_valid    <= 1'b0;
      resp_tlb_miss <= 1'b0;
      unique case (state)
        S_IDLE: if (req_valid && req_ready) begin
          if (req_tlb_miss) begin
            resp_valid    <= 1'b1;
            resp_tlb_miss <= 1'b1;
          end else begin
            p_we <= req_we; p_pa <= req_pa; p_wdata <= req_wdata;
            p_be <= req_be; p_pc <= req_pc;
            pred  <= steer_way;
            cnt   <= 4'd1;   // the first probe was issued on this edge
            state <= S_P1;
          end
        end
        S_P1, S_PT: if (!probe_end) cnt <= cnt + 1'b1;
        else begin
          cnt <= '0;
          if (!p_we && pred_hit_now) begin
            resp_valid <= 1'b1;
            resp_rdata <= get_word(w_data[pred], p_widx);
            state      <= S_IDLE;
          end else if (!decide) begin
            state <= S_PT;                    // FallBackPha: probe the other tags
          end else if (any_hit) begin
            hway  <= hit_idx;
            state <= S_PD;
          end else begin
            victim <= victim_sel;
            v_tag  <= w_tag[victim_sel];
            // the victim's data is at hand only if a load read it in probe 1
            if (w_valid[victim_sel] && w_dirty[victim_sel])
              state <= (!p_we && victim_sel == pred) ? S_WB_REQ : S_VRD;
            else
              state <= S_FILL_REQ;
          end
        end
        S_PD: if (!probe_end) cnt <= cnt + 1'b1;
        else begin
          cnt        <= '0;
          resp_valid <= 1'b1;
          if (!p_we) resp_rdata <= get_word(w_data[hway], p_widx);
          state <= S_IDLE;
        end
        S_VRD:       state <= S_WB_REQ;
        S_WB_REQ:    if (l2_req_ready) state <= S_WB_WAIT;
        S_WB_WAIT:   if (l2_rsp_valid) state <= S_FILL_REQ;
        S_FILL_REQ:  if (l2_req_ready) state <= S_FILL_WAIT;
        S_FILL_WAIT: if (l2_rsp_valid) begin
          resp_valid <= 1'b1;
          if (!p_we) resp_rdata <= get_word(l2_rsp_rdata, p_widx);
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The controller's timing needs at least two cycles per probe.
  initial assert (PROBE_CYCLES >= 2 && PROBE_CYCLES <= 15)
    else $error("psac: PROBE_CYCLES must be 2..15");

endmodule
