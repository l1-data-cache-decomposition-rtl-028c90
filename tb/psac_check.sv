// psac_check: self-checking run of one pseudo set-associative cache of WAYS
// 8 KB ways, with the given probing scheme and replacement, against a behavioural L2 and a flat reference
// memory. Used by psac_tb; reports its counts and raises done.
// Random loads and stores from 32 instruction addresses over 96 KB (three
// times the cache, so misses and dirty write backs happen) check all data.
// Timing and energy behaviour checked independently of the prediction:
//  * a load repeated at once from the same instruction is a predicted hit:
//    2 cycles, and its first probe activates all tag arrays and exactly
//    one data array;
//  * a store that hits takes 4 cycles and activates no data array before
//    its tags are checked;
//  * a first access to a line takes longer than the L2 round trip;
//  * never more than one data array is active in a cycle;
//  * a request flagged as a TLB miss is answered with resp_tlb_miss.
// Correct predictions, mispredictions, misses and write backs must all occur.
module psac_check
  import l1_pkg::*;
#(
  parameter int unsigned WAYS     = 4,
  parameter psac_scheme_e SCHEME  = PREDICT_PHA,
  parameter bit          ADAPTIVE = 1'b0
) (
  output int checks,
  output int failures,
  output bit done
);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   req_valid = 0, req_ready, req_we = 0, req_tlb_miss = 0;
  paddr_t req_pa = '0;
  word_t  req_wdata = '0, resp_rdata;
  be_t    req_be = '1;
  vaddr_t req_pc = '0;
  logic   resp_valid, resp_tlb_miss;
  logic   l2_req_valid, l2_req_ready, l2_req_we, l2_rsp_valid;
  pline_t l2_req_line;
  line_t  l2_req_wdata, l2_rsp_rdata;
  logic [WAYS-1:0] act_tag, act_data;
  logic   ev_pred_hit, ev_mispred, ev_miss, ev_wb, ev_adapt;
  int unsigned n_reads, n_writes;

  psac #(.WAYS(WAYS), .SCHEME(SCHEME), .ADAPTIVE(ADAPTIVE)) dut (.*);
  l2_model #(.LAT(12), .AW(PLINE_W)) u_l2 (
    .clk, .rst_n, .req_valid(l2_req_valid), .req_ready(l2_req_ready),
    .req_we(l2_req_we), .req_line(l2_req_line), .req_wdata(l2_req_wdata),
    .rsp_valid(l2_rsp_valid), .rsp_rdata(l2_rsp_rdata), .n_reads, .n_writes
  );

  initial begin checks = 0; failures = 0; done = 0; end
  longint unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  localparam bit FBP = (SCHEME == FALLBACK_PHA);
  int n_ph = 0, n_mp = 0, n_miss = 0, n_wb = 0, n_multi = 0, n_adapt = 0;
  bit saw_ph, saw_mp, saw_miss;
  always @(negedge clk) #2 if (rst_n) begin
    if (ev_pred_hit) saw_ph = 1;
    if (ev_mispred) saw_mp = 1;
    if (ev_miss) saw_miss = 1;
    if (ev_adapt) n_adapt++;
    if (ev_pred_hit) n_ph++;
    if (ev_mispred) n_mp++;
    if (ev_miss) n_miss++;
    if (ev_wb) n_wb++;
    if ($countones(act_data) > 1) n_multi++;
  end

  // activations seen on the accepting edge
  logic [WAYS-1:0] first_tag, first_data;
  task automatic access(bit we, paddr_t pa, word_t wd, vaddr_t pc, bit tm,
                        output word_t rd, output int lat, output bit rtm);
    longint unsigned t0;
    @(negedge clk);
    saw_ph = 0; saw_mp = 0; saw_miss = 0;
    req_valid = 1; req_we = we; req_pa = pa; req_wdata = wd; req_pc = pc; req_tlb_miss = tm;
    while (!req_ready) @(negedge clk);
    #1;
    first_tag = act_tag; first_data = act_data;
    @(posedge clk);
    @(negedge clk);
    t0 = cycle;
    req_valid = 0;
    while (!resp_valid) @(negedge clk);
    lat = int'(cycle - t0) + 1;
    rd  = resp_rdata;
    rtm = resp_tlb_miss;
    // hit latencies by outcome, Table-3 style: load 2 / 4 (PredictPha) or
    // 2 / 6 (FallBackPha); store 4 / 4 (PredictPha) or 4 / 6 (FallBackPha)
    if (!tm && saw_ph)
      check(lat == (we ? 4 : 2), $sformatf("predicted hit latency %0d", lat));
    if (!tm && saw_mp)
      check(lat == (FBP ? 6 : 4), $sformatf("other-way hit latency %0d", lat));
  endtask

  word_t mem [paddr_t];
  bit    touched [pline_t];
  function automatic word_t expect_of(paddr_t pa);
    return mem.exists(pa) ? mem[pa] : tb_pkg::init_word(64'(pa[PA_W-1:OFF_W]), int'(pa[OFF_W-1:3]));
  endfunction

  initial begin
    word_t rd; int lat; bit rtm;
    #1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    access(0, 40'h12_3456_7800, '0, 32'h400, 1, rd, lat, rtm);
    check(rtm && lat == 1, "TLB miss answered in one cycle");
    check(first_tag == 0 && first_data == 0, "TLB miss touches no array");
    for (int n = 0; n < 6000; n++) begin
      automatic paddr_t pa = 40'h80_0000_0000 + paddr_t'(($urandom % 12288) * 8);
      automatic vaddr_t pc = 32'h0040_0000 + vaddr_t'(($urandom % 32) * 4);
      automatic bit we = ($urandom % 3) == 0;
      automatic word_t wd = {$urandom, $urandom};
      automatic bit seen = touched.exists(pa[PA_W-1:OFF_W]);
      access(we, pa, wd, pc, 0, rd, lat, rtm);
      check(!rtm, "no TLB miss");
      touched[pa[PA_W-1:OFF_W]] = 1;
      if (we) begin
        check(first_data == 0 && (FBP ? $countones(first_tag) == 1 : first_tag == '1),
              "store first probe: tags only (all, or the predicted one for FallBackPha)");
        mem[pa] = wd;
      end else begin
        check(rd == expect_of(pa), $sformatf("load %h", pa));
        check((FBP ? first_tag == first_data : first_tag == '1) && $countones(first_data) == 1,
              "load first probe: one data array, and all tags (PredictPha) or its own tag (FallBackPha)");
      end
      if (!seen && n < 200) check(lat > 12, $sformatf("first touch of %h took %0d, no L2 trip", pa, lat));
      if (!we && ($urandom % 2) == 0) begin
        access(0, pa, '0, pc, 0, rd, lat, rtm);
        check(rd == expect_of(pa) && lat == 2, $sformatf("repeated load %h latency %0d", pa, lat));
      end
      if (($urandom % 4) == 0) begin
        wd = {$urandom, $urandom};
        access(1, pa, wd, pc, 0, rd, lat, rtm);
        mem[pa] = wd;
        check(lat == 4, $sformatf("store hit latency %0d", lat));
      end
    end
    if (ADAPTIVE) check(n_adapt > 0, "adaptive replacement never moved a fill");
    else          check(n_adapt == 0, "fill moved although not adaptive");
    check(n_ph > 0 && n_mp > 0 && n_miss > 0 && n_wb > 0,
          $sformatf("events pred_hit %0d mispred %0d miss %0d wb %0d", n_ph, n_mp, n_miss, n_wb));
    check(n_multi == 0, "one data array at a time");
    $display("  %0d ways %s adaptive=%0d: adapt %0d pred_hit %0d mispred %0d miss %0d wb %0d", WAYS, SCHEME.name(), ADAPTIVE, n_adapt, n_ph, n_mp, n_miss, n_wb);
    done = 1;
  end

endmodule
