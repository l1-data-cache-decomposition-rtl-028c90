// l1_dcache_run: the random program of the end-to-end test, run against
// one L1 configuration given by parameters (PSAC ways, probe scheme,
// adaptive fill) and a behavioural L2. Used by l1_dcache_cfg_tb to run the
// configurations other than the default through the whole cache.
//
// The program mixes heap loads/stores (64 KB, from 64 instruction
// addresses), calls and returns that move the stack pointer, stack
// loads/stores (mostly stack-pointer based, some redirected by snooping)
// and accesses to an unmapped page. A reference model checks every load.
// An immediately repeated access checks hit latencies, which are the same
// in every configuration: the steering entry was just trained or the line
// just filled into the predicted way, so the repeat is a predicted hit
// (load 2, store 4); stack hits take 1 (marked) or 2 (redirected).
// Every mechanism of the configuration must occur at least once; adaptive
// fills must occur exactly when ADAPTIVE is set.
// Interface: done rises when the program has ended; n_checks and
// n_failures count the checks made so far and those that failed.
module l1_dcache_run
  import l1_pkg::*;
#(
  parameter string        NAME     = "4-way PredictPha",
  parameter int unsigned  WAYS     = 4,
  parameter psac_scheme_e SCHEME   = PREDICT_PHA,
  parameter bit           ADAPTIVE = 1'b0
) (
  output logic done,
  output int   n_checks,
  output int   n_failures
);

  initial done = 1'b0;

  localparam int unsigned NOPS = 4000;
  localparam vaddr_t HEAP   = 32'h1000_0000;
  localparam vaddr_t UNMAP  = 32'h2000_0000;
  localparam vaddr_t SBASE  = 32'h7FFF_F000;   // stack pointer at schedule

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       cpu_req_valid = 0, cpu_req_ready;
  cpu_req_t   cpu_req = '0;
  logic       cpu_resp_valid, cpu_resp_tlb_miss;
  word_t      cpu_resp_rdata;
  logic       sched_valid = 0, sp_move_valid = 0;
  vaddr_t     sched_sp = '0, sp_move_sp = '0;
  logic       tlb_wr_en = 0, tlb_wr_valid = 0;
  logic [5:0] tlb_wr_idx = '0;
  logic [VPN_W-1:0] tlb_wr_vpn = '0;
  logic [PFN_W-1:0] tlb_wr_pfn = '0;
  logic       l2_req_valid, l2_req_ready, l2_req_we, l2_rsp_valid;
  pline_t     l2_req_line;
  line_t      l2_req_wdata, l2_rsp_rdata;
  vaddr_t     tos;
  vline_t     srb_line;
  logic [WAYS-1:0] act_tag, act_data;
  l1_events_t events;
  int unsigned n_reads, n_writes;

  l1_dcache #(.PSAC_WAYS(WAYS), .PSAC_SCHEME(SCHEME), .PSAC_ADAPTIVE(ADAPTIVE)) dut (.*);

  l2_model #(.LAT(12), .AW(PLINE_W)) u_l2 (
    .clk, .rst_n, .req_valid(l2_req_valid), .req_ready(l2_req_ready),
    .req_we(l2_req_we), .req_line(l2_req_line), .req_wdata(l2_req_wdata),
    .rsp_valid(l2_rsp_valid), .rsp_rdata(l2_rsp_rdata), .n_reads, .n_writes
  );

  int checks = 0, failures = 0;
  assign n_checks = checks;
  assign n_failures = failures;
  longint unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s @%0d: %s", NAME, cycle, what);
    end
  endtask

  // mechanism counters
  localparam int NEV = $bits(l1_events_t);
  int unsigned ev_count [NEV];
  string ev_name [NEV] = '{"sp_route", "redirect", "ssc_hit", "ssc_miss", "ssc_wb",
    "ssc_wb_skipped", "ssc_fetch", "ssc_fetch_skipped", "srb_shrink", "srb_reset",
    "psac_pred_hit", "psac_mispred", "psac_miss", "psac_wb", "psac_adapt", "tlb_miss", "ssc_xlate_wait"};
  always @(negedge clk) #2 if (rst_n) begin
    automatic logic [NEV-1:0] v;
    v = events;
    for (int i = 0; i < NEV; i++) if (v[NEV-1-i]) ev_count[i]++;
  end
  int unsigned multi_data = 0;
  always @(negedge clk) #2 if (rst_n && $countones(act_data) > 1) multi_data++;

  // page map: heap pages fixed, stack pages mapped on demand
  function automatic logic [PFN_W-1:0] pfn_of(logic [VPN_W-1:0] vpn);
    return PFN_W'(vpn) ^ 28'h0AB_C000;
  endfunction
  function automatic paddr_t pa_of(vaddr_t va);
    return {pfn_of(va[VA_W-1:PAGE_W]), va[PAGE_W-1:0]};
  endfunction

  int unsigned tlb_next = 0;
  bit refill_lock = 0;
  task automatic tlb_map(vaddr_t va);
    @(negedge clk);
    tlb_wr_en = 1; tlb_wr_valid = 1; tlb_wr_idx = 6'(tlb_next);
    tlb_wr_vpn = va[VA_W-1:PAGE_W]; tlb_wr_pfn = pfn_of(va[VA_W-1:PAGE_W]);
    tlb_next++;
    @(negedge clk);
    tlb_wr_en = 0;
  endtask

  // stack cache waiting for a translation: load the page, as a miss handler would
  always @(negedge clk) if (rst_n && !refill_lock && events.ssc_xlate_wait) begin
    refill_lock = 1;
    tlb_map({dut.ssc_l2_req_line, 5'b0});
    refill_lock = 0;
  end

  task automatic access(bit we, vaddr_t va, word_t wd, vaddr_t pc, bit sp,
                        output word_t rd, output int lat, output bit tmiss);
    longint unsigned t0;
    @(negedge clk);
    cpu_req_valid = 1;
    cpu_req = '{we: we, va: va, wdata: wd, be: '1, pc: pc, sp: sp};
    while (!cpu_req_ready) @(negedge clk);
    @(posedge clk);
    @(negedge clk);
    t0 = cycle;
    cpu_req_valid = 0;
    while (!cpu_resp_valid) @(negedge clk);
    lat   = int'(cycle - t0) + 1;   // edges from acceptance to sampling
    rd    = cpu_resp_rdata;
    tmiss = cpu_resp_tlb_miss;
  endtask

  task automatic move_sp(vaddr_t sp);
    @(negedge clk);
    sp_move_valid = 1; sp_move_sp = sp;
    @(negedge clk);
    sp_move_valid = 0;
  endtask

  word_t  heap [vaddr_t];
  word_t  stk  [vaddr_t];
  vaddr_t sp;
  int unsigned frames [$];

  function automatic word_t heap_expect(vaddr_t va);
    paddr_t pa = pa_of(va);
    return heap.exists(va) ? heap[va] : tb_pkg::init_word(64'(pa[PA_W-1:OFF_W]), int'(va[OFF_W-1:3]));
  endfunction

  initial begin
    word_t rd; int lat; bit tm;
    #1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 16; p++) tlb_map(HEAP + vaddr_t'(p * 4096));
    // the steering table fills itself first
    wait (!dut.u_psac.u_steer.busy);
    @(negedge clk);
    sp = SBASE;
    sched_valid = 1; sched_sp = sp;
    @(negedge clk);
    sched_valid = 0;
    check(tos == SBASE && srb_line == SBASE[VA_W-1:OFF_W], "schedule sets TOS and SRB");

    for (int op = 0; op < int'(NOPS); op++) begin
      automatic int unsigned r = $urandom % 100;
      if (op == NOPS / 2) begin
        // the process is scheduled again
        @(negedge clk);
        sched_valid = 1; sched_sp = sp;
        @(negedge clk);
        sched_valid = 0;
        check(tos == sp && srb_line == sp[VA_W-1:OFF_W], "reschedule sets TOS and SRB");
      end
      if (r < 2) begin
        access(0, UNMAP + vaddr_t'(($urandom % 512) * 8), '0, 32'h0040_0000, 0, rd, lat, tm);
        check(tm, "unmapped page answers with a TLB miss");
      end else if (r < 40) begin
        automatic vaddr_t va = HEAP + vaddr_t'(($urandom % 8192) * 8);
        automatic vaddr_t pc = 32'h0040_0000 + vaddr_t'(($urandom % 64) * 4);
        automatic bit we = ($urandom % 3) == 0;
        automatic word_t wd = {$urandom, $urandom};
        access(we, va, wd, pc, 0, rd, lat, tm);
        check(!tm, "heap access translated");
        if (we) heap[va] = wd;
        else check(rd == heap_expect(va), $sformatf("heap load %h", va));
        if (!we && ($urandom % 3) == 0) begin
          access(0, va, '0, pc, 0, rd, lat, tm);
          check(rd == heap_expect(va) && lat == 2, $sformatf("repeated heap load %h: latency %0d", va, lat));
        end
        if (we && ($urandom % 3) == 0) begin
          wd = {$urandom, $urandom};
          access(1, va, wd, pc, 0, rd, lat, tm);
          heap[va] = wd;
          check(lat == 4, $sformatf("heap store hit latency %0d", lat));
        end
      end else if (r < 52) begin
        if (frames.size() < 40) begin
          automatic int unsigned f = (($urandom % 8) + 1) * 32 + (($urandom % 2) * 8);
          frames.push_back(f);
          sp -= f;
          move_sp(sp);
        end
      end else if (r < 62) begin
        if (frames.size() > 0) begin
          automatic vaddr_t old = sp;
          sp += frames.pop_back();
          move_sp(sp);
          foreach (stk[a]) if (a < sp && a >= old) stk.delete(a);
        end
      end else begin
        automatic int unsigned span = (SBASE - sp) > 1024 ? 1024 : (SBASE - sp);
        if (span >= 8) begin
          automatic vaddr_t va = sp + vaddr_t'(($urandom % (span / 8)) * 8);
          automatic bit spf = ($urandom % 100) < 85;
          automatic bit we = !stk.exists(va) || (($urandom % 2) == 0);
          automatic word_t wd = {$urandom, $urandom};
          access(we, va, wd, 32'h0040_1000, spf, rd, lat, tm);
          if (we) stk[va] = wd;
          else check(rd == stk[va], $sformatf("stack load %h", va));
          access(0, va, '0, 32'h0040_1000, spf, rd, lat, tm);
          check(rd == stk[va] && lat == (spf ? 1 : 2),
                $sformatf("repeated stack load %h sp=%0d: latency %0d", va, spf, lat));
        end
      end
    end

    // read back every live stack word and part of the heap
    foreach (stk[a]) begin
      access(0, a, '0, 32'h0040_1004, 1, rd, lat, tm);
      check(rd == stk[a], $sformatf("final stack load %h", a));
    end
    begin
      automatic int n = 0;
      foreach (heap[a]) if (n++ < 300) begin
        access(0, a, '0, 32'h0040_2000, 0, rd, lat, tm);
        check(rd == heap[a], $sformatf("final heap load %h", a));
      end
    end

    $display("%s:", NAME);
    for (int i = 0; i < NEV; i++) begin
      $display("  %-18s %0d", ev_name[i], ev_count[i]);
      // adaptive fills happen only when enabled, and must happen then
      if (ev_name[i] == "psac_adapt" && !ADAPTIVE) check(ev_count[i] == 0, "adaptive fill while not enabled");
      else check(ev_count[i] > 0, {"mechanism never happened: ", ev_name[i]});
    end
    check(multi_data == 0, "more than one PSAC data array active in a cycle");
    $display("  L2 reads %0d writes %0d, cycles %0d", n_reads, n_writes, cycle);
    done = 1'b1;
  end
endmodule
