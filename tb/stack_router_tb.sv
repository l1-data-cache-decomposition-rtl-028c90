// stack_router_tb: checks where the router sends each reference. Two
// simple responders stand in for the caches: the stack cache answers one
// cycle after it accepts (data = address ^ 0x55), the pseudo set-associative
// cache two cycles after (data = address ^ 0xAA, TLB miss for page 0).
// Random references, with and without the stack-pointer mark, at addresses
// below, inside, at both ends of and above the live stack [TOS, STACK_TOP): marked ones
// must reach the stack cache in 1 cycle, unmarked stack addresses must be
// redirected there in 2, all others must reach the other cache. The
// request fields must arrive intact.
module stack_router_tb;
  import l1_pkg::*;
  localparam vaddr_t TOP = 32'h8000_0000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     cpu_req_valid = 0, cpu_req_ready, cpu_resp_valid, cpu_resp_tlb_miss;
  cpu_req_t cpu_req = '0, ssc_req, psac_req;
  word_t    cpu_resp_rdata;
  vaddr_t   tos = 32'h7FFF_8000;
  logic     ssc_req_valid, ssc_req_ready, ssc_resp_valid = 0;
  word_t    ssc_resp_rdata = '0, psac_resp_rdata = '0;
  logic     psac_req_valid, psac_req_ready, psac_resp_valid = 0, psac_resp_tlb_miss = 0;
  logic     ev_sp_route, ev_redirect;

  stack_router #(.STACK_TOP(TOP)) dut (.*);

  assign ssc_req_ready  = 1'b1;
  assign psac_req_ready = 1'b1;

  // responders
  cpu_req_t last_ssc, last_psac;
  logic     psac_pend = 0;
  always @(posedge clk) begin
    ssc_resp_valid  <= 1'b0;
    psac_resp_valid <= 1'b0;
    if (ssc_req_valid) begin
      ssc_resp_valid <= 1'b1;
      ssc_resp_rdata <= word_t'(ssc_req.va) ^ 64'h55;
      last_ssc <= ssc_req;
    end
    if (psac_req_valid) begin
      psac_pend <= 1'b1;
      last_psac <= psac_req;
    end
    if (psac_pend) begin
      psac_pend          <= 1'b0;
      psac_resp_valid    <= 1'b1;
      psac_resp_rdata    <= word_t'(last_psac.va) ^ 64'hAA;
      psac_resp_tlb_miss <= last_psac.va[31:12] == 20'h0;
    end
  end

  int checks = 0, failures = 0;
  longint unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_route = 0, n_redir = 0;
  always @(negedge clk) #2 begin
    if (ev_sp_route) n_route++;
    if (ev_redirect) n_redir++;
  end

  initial begin
    #1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      automatic int unsigned k = $urandom % 5;
      automatic cpu_req_t r;
      automatic longint unsigned t0;
      automatic int lat;
      automatic bit to_ssc;
      r.we = $urandom % 2; r.wdata = {$urandom, $urandom}; r.be = 8'($urandom);
      r.pc = $urandom; r.sp = ($urandom % 3) == 0;
      case (k)
        0: r.va = tos + ($urandom % 32768);          // live stack
        1: r.va = tos - 1 - ($urandom % 4096);       // below TOS
        2: r.va = TOP + ($urandom % 4096);           // above the stack segment
        3: r.va = ($urandom % 2) ? tos : TOP - 8;     // the two ends of the live stack
        default: r.va = ($urandom % 2) ? $urandom % 8192 : 32'h1000_0000 + $urandom % 65536;
      endcase
      if (n % 100 == 0) tos = 32'h7000_0000 + ($urandom % 32'h0FFF_0000);
      to_ssc = r.sp || (r.va >= tos && r.va < TOP);
      @(negedge clk);
      cpu_req_valid = 1; cpu_req = r;
      while (!cpu_req_ready) @(negedge clk);
      @(posedge clk);
      @(negedge clk);
      t0 = cycle;
      cpu_req_valid = 0;
      while (!cpu_resp_valid) @(negedge clk);
      lat = int'(cycle - t0) + 1;
      if (to_ssc) begin
        check(cpu_resp_rdata == (word_t'(r.va) ^ 64'h55), $sformatf("stack reference %h went to the stack cache", r.va));
        check(lat == (r.sp ? 1 : 2), $sformatf("stack latency %0d sp=%0d", lat, r.sp));
        check(last_ssc == r, "request fields intact");
      end else begin
        check(cpu_resp_rdata == (word_t'(r.va) ^ 64'hAA), $sformatf("reference %h went to the PSAC", r.va));
        check(cpu_resp_tlb_miss == (r.va[31:12] == 0), "TLB miss passed back");
        check(last_psac == r, "request fields intact");
      end
    end
    check(n_route > 0 && n_redir > 0, "both routing events seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
