// l2_arb_tb: two random clients share the L2 port through the arbiter and a
// behavioural L2. Each client writes lines of its own and reads them back;
// every read must return that client's last written data (so responses are
// routed to the right client), only one L2 transaction may be outstanding,
// and both clients must make progress.
module l2_arb_tb;
  import l1_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0]   c_req_valid = '0, c_req_ready, c_req_we = '0, c_rsp_valid;
  pline_t [1:0] c_req_line = '0;
  line_t [1:0]  c_req_wdata = '0;
  line_t        c_rsp_rdata;
  logic         l2_req_valid, l2_req_ready, l2_req_we, l2_rsp_valid;
  pline_t       l2_req_line;
  line_t        l2_req_wdata, l2_rsp_rdata;
  int unsigned  n_reads, n_writes;

  l2_arb dut (.*);
  l2_model #(.LAT(5), .AW(PLINE_W)) u_l2 (
    .clk, .rst_n, .req_valid(l2_req_valid), .req_ready(l2_req_ready),
    .req_we(l2_req_we), .req_line(l2_req_line), .req_wdata(l2_req_wdata),
    .rsp_valid(l2_rsp_valid), .rsp_rdata(l2_rsp_rdata), .n_reads, .n_writes
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int outstanding = 0;
  always @(negedge clk) #2 if (rst_n) begin
    if (l2_req_valid && l2_req_ready) outstanding++;
    if (l2_rsp_valid) outstanding--;
    if (outstanding > 1) begin failures++; $display("FAIL: two outstanding"); end
  end

  int done [2];
  task automatic client(int c);
    line_t mine [8];
    bit    written [8];
    for (int i = 0; i < 8; i++) written[i] = 0;
    for (int n = 0; n < 200; n++) begin
      automatic int l = $urandom % 8;
      automatic bit we = !written[l] || ($urandom % 2);
      automatic line_t d = {8{$urandom}};
      @(negedge clk);
      c_req_valid[c] = 1; c_req_we[c] = we;
      c_req_line[c] = PLINE_W'(c * 1000 + l); c_req_wdata[c] = d;
      #1;  // let the other client drive its request first
      while (!c_req_ready[c]) begin @(negedge clk); #1; end
      @(posedge clk);
      @(negedge clk);
      c_req_valid[c] = 0;
      while (!c_rsp_valid[c]) @(negedge clk);
      if (we) begin mine[l] = d; written[l] = 1; end
      else check(c_rsp_rdata == mine[l], $sformatf("client %0d read line %0d", c, l));
      done[c]++;
    end
  endtask

  initial begin
    #1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    fork
      client(0);
      client(1);
    join
    check(done[0] == 200 && done[1] == 200, "both clients finished");
    check(n_reads + n_writes == 400, "every request reached L2 once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
