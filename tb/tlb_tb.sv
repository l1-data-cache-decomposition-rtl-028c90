// tlb_tb: checks the 64-entry fully associative TLB. All entries are loaded
// with distinct random pages; both lookup ports must translate every mapped
// page (page offset kept, frame substituted, 40-bit result) and miss on
// unmapped ones, including after entries are invalidated and overwritten.
module tlb_tb;
  import l1_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  vaddr_t a_va = '0, b_va = '0;
  paddr_t a_pa, b_pa;
  logic   a_hit, b_hit;
  logic   wr_en = 0, wr_valid = 0;
  logic [5:0] wr_idx = '0;
  logic [VPN_W-1:0] wr_vpn = '0;
  logic [PFN_W-1:0] wr_pfn = '0;

  tlb #(.ENTRIES(64)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [VPN_W-1:0] vpn [64];
  logic [PFN_W-1:0] pfn [64];
  bit               val [64];

  task automatic load(int i, bit v, logic [VPN_W-1:0] vp, logic [PFN_W-1:0] pf);
    @(negedge clk);
    wr_en = 1; wr_idx = 6'(i); wr_valid = v; wr_vpn = vp; wr_pfn = pf;
    @(negedge clk);
    wr_en = 0;
    val[i] = v; vpn[i] = vp; pfn[i] = pf;
  endtask

  function automatic int find(logic [VPN_W-1:0] vp);
    for (int i = 0; i < 64; i++) if (val[i] && vpn[i] == vp) return i;
    return -1;
  endfunction

  initial begin
    #1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    a_va = 32'h1234_5678; #1;
    check(!a_hit && !b_hit, "empty after reset");
    for (int i = 0; i < 64; i++) load(i, 1, VPN_W'(i * 7919 + 3), {$urandom} ^ 28'h8000000);
    for (int n = 0; n < 3000; n++) begin
      automatic int k, ka, kb;
      if (n == 1000) for (int i = 0; i < 64; i += 5) load(i, 0, vpn[i], pfn[i]);
      if (n == 2000) for (int i = 0; i < 64; i += 3) load(i, 1, VPN_W'($urandom), {$urandom});
      k = $urandom % 64;
      a_va = ($urandom % 2) ? {vpn[k], 12'($urandom)} : $urandom;
      b_va = {vpn[$urandom % 64], 12'($urandom)};
      #1;
      ka = find(a_va[31:12]); kb = find(b_va[31:12]);
      check(a_hit == (ka >= 0), "port a hit");
      check(b_hit == (kb >= 0), "port b hit");
      if (ka >= 0) check(a_pa == {pfn[ka], a_va[11:0]}, "port a translation");
      if (kb >= 0) check(b_pa == {pfn[kb], b_va[11:0]}, "port b translation");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
