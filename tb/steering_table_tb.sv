// steering_table_tb: checks the way predictor. After reset it must be busy
// for exactly ENTRIES cycles; the initial pointers must all be legal way
// numbers and spread close to uniformly over the ways (each way between
// 15% and 35% of the entries for 4 ways). Then random retraining writes
// are compared against a reference table, including that the index is
// taken from instruction-address bits [11:2].
module steering_table_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0] rd_pc = '0, wr_pc = '0;
  logic [1:0]  rd_way, wr_way = '0;
  logic        wr_en = 0, busy;

  steering_table #(.ENTRIES(1024), .WAYS(4)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [1:0] ref_t [1024];
  int hist [4];
  int busy_cycles = 0;

  initial begin
    #1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (busy) begin @(negedge clk); busy_cycles++; end
    check(busy_cycles == 1024, $sformatf("initialization took %0d cycles", busy_cycles));
    for (int i = 0; i < 1024; i++) begin
      rd_pc = 32'(i) << 2; #1;
      ref_t[i] = rd_way;
      hist[rd_way]++;
    end
    for (int w = 0; w < 4; w++)
      check(hist[w] > 154 && hist[w] < 358, $sformatf("way %0d holds %0d initial pointers", w, hist[w]));
    check(hist[0] + hist[1] + hist[2] + hist[3] == 1024, "histogram");
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      wr_en = ($urandom % 2) == 0;
      wr_pc = $urandom;
      wr_way = 2'($urandom);
      rd_pc = $urandom;
      #1;
      check(rd_way == ref_t[rd_pc[11:2]], "read matches reference");
      @(posedge clk);
      if (wr_en) ref_t[wr_pc[11:2]] = wr_way;
    end
    @(negedge clk); wr_en = 0;
    for (int i = 0; i < 1024; i++) begin
      rd_pc = {20'hABCDE, 10'(i), 2'b11}; #1;
      check(rd_way == ref_t[i], "final contents");
    end
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
