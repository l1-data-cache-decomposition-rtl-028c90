// ssc_check: self-checking run of one specialized stack cache of SIZE_BYTES
// against a behavioural L2; used by ssc_tb, reports its counts and raises done.
// A directed program with hand-worked outcomes:
//   store miss in the safe region   -> allocated, no L2 read
//   load hit                        -> 1 cycle, stored data
//   load miss in the old frame      -> L2 read, initial line data
//   conflict evicting a dirty safe line -> write back, SRB pulled in
//   store miss outside safe region  -> L2 read (fetch)
//   pop, then conflict evicting a dirty dead line -> dropped, no write back
//   write-back data visible in L2 and read back after a later eviction
// L2 read/write counts are checked after every step.
module ssc_check
  import l1_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 512
) (
  output int checks,
  output int failures,
  output bit done
);
  localparam vaddr_t S = vaddr_t'(SIZE_BYTES);   // conflict stride

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   req_valid = 0, req_ready, req_we = 0;
  vaddr_t req_va = '0;
  word_t  req_wdata = '0, resp_rdata;
  be_t    req_be = '1;
  logic   resp_valid;
  logic   sched_valid = 0, sp_move_valid = 0;
  vaddr_t sched_sp = '0, sp_move_sp = '0, tos;
  vline_t srb_line, l2_req_line;
  logic   l2_req_valid, l2_req_ready, l2_req_we, l2_rsp_valid;
  line_t  l2_req_wdata, l2_rsp_rdata;
  logic   ev_hit, ev_miss, ev_wb, ev_wb_skipped, ev_fetch, ev_fetch_skipped;
  logic   ev_srb_shrink, ev_srb_reset;
  int unsigned n_reads, n_writes;

  ssc #(.SIZE_BYTES(SIZE_BYTES)) dut (.*);
  l2_model #(.LAT(12), .AW(VLINE_W)) u_l2 (
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

  int n_skip_wb = 0, n_skip_fetch = 0;
  always @(negedge clk) #2 begin
    if (ev_wb_skipped) n_skip_wb++;
    if (ev_fetch_skipped) n_skip_fetch++;
  end

  task automatic access(bit we, vaddr_t va, word_t wd, output word_t rd, output int lat);
    longint unsigned t0;
    @(negedge clk);
    req_valid = 1; req_we = we; req_va = va; req_wdata = wd;
    while (!req_ready) @(negedge clk);
    @(posedge clk);
    @(negedge clk);
    t0 = cycle;
    req_valid = 0;
    while (!resp_valid) @(negedge clk);
    lat = int'(cycle - t0) + 1;
    rd  = resp_rdata;
  endtask

  task automatic move_sp(vaddr_t sp);
    @(negedge clk); sp_move_valid = 1; sp_move_sp = sp;
    @(negedge clk); sp_move_valid = 0;
  endtask

  function automatic word_t init_of(vaddr_t va);
    return tb_pkg::init_word(64'(va[VA_W-1:OFF_W]), int'(va[OFF_W-1:3]));
  endfunction

  initial begin
    word_t rd; int lat;
    #1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    sched_valid = 1; sched_sp = 32'h7000_1000;
    @(negedge clk); sched_valid = 0;
    move_sp(32'h7000_0F00);                     // push 8 lines

    access(1, 32'h7000_0F00, 64'h1111, rd, lat);
    check(n_reads == 0 && n_writes == 0 && n_skip_fetch == 1, "safe store miss needs no fetch");
    access(0, 32'h7000_0F00, '0, rd, lat);
    check(rd == 64'h1111 && lat == 1, $sformatf("load hit: data %h latency %0d", rd, lat));
    access(0, 32'h7000_0F08, '0, rd, lat);
    check(rd == 64'h0, "untouched word of an allocated line reads zero");

    access(0, 32'h7000_1048, '0, rd, lat);
    check(rd == init_of(32'h7000_1048) && n_reads == 1, "old frame load fetches");
    check(lat > 12, $sformatf("miss latency %0d includes L2", lat));

    // same index as 0x0F00 (one cache size apart): evicts the dirty safe line
    access(1, 32'h7000_0F00 + S, 64'h2222, rd, lat);
    check(n_writes == 1 && n_reads == 2, "dirty safe line written back, old-frame store fetched");
    check(srb_line == 27'(32'h7000_0F00 >> 5), "SRB pulled in to the written-back line");

    access(1, 32'h7000_0F20, 64'h3333, rd, lat);
    check(n_reads == 3 && n_skip_fetch == 1, "store outside the shrunk safe region fetches");

    // pop two lines: 0x0F00 and 0x0F20 become dead
    move_sp(32'h7000_0F40);
    check(tos == 32'h7000_0F40, "TOS follows pop");
    access(0, 32'h7000_0F20 + S, '0, rd, lat);  // evicts dirty dead line 0x0F20
    check(n_writes == 1 && n_skip_wb == 1, $sformatf("dirty dead line dropped without write back (writes %0d, dropped %0d)", n_writes, n_skip_wb));
    check(rd == init_of(32'h7000_0F20 + S), "conflicting load data");

    // evict 0x0F00+S (dirty, live, not safe) and read it back from L2
    access(0, 32'h7000_0F00 + 2 * S, '0, rd, lat);
    check(n_writes == 2, "dirty live line written back");
    access(0, 32'h7000_0F00 + S, '0, rd, lat);
    check(rd == 64'h2222, "written-back data read back from L2");
    access(0, 32'h7000_0F00, '0, rd, lat);
    check(rd == 64'h1111, "first written-back line read back");

    $display("  %0d B stack cache: %0d checks, %0d failures", SIZE_BYTES, checks, failures);
    done = 1;
  end
endmodule
