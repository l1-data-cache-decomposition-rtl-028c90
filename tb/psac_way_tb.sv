// psac_way_tb: checks one pseudo set-associative cache way (8 KB). Random
// tag and data reads and writes with byte masks are compared with a
// reference array; reads must appear one edge after their enable and hold
// while no read is enabled; valid bits must be clear after reset.
module psac_way_tb;
  import l1_pkg::*;
  localparam int SETS = 256, TAG_W = PA_W - OFF_W - 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0]       set = '0;
  logic             tag_rd_en = 0, tag_wr_en = 0, tag_wr_valid = 0, tag_wr_dirty = 0;
  logic [TAG_W-1:0] tag_wr_tag = '0, tag_out;
  logic             data_rd_en = 0, data_wr_en = 0;
  line_be_t         data_wr_be = '0;
  line_t            data_wr_data = '0, data_out;
  logic             tag_valid, tag_dirty;

  psac_way #(.WAY_BYTES(8192)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic             r_v [SETS], r_d [SETS];
  logic [TAG_W-1:0] r_t [SETS];
  line_t            r_data [SETS];
  logic             e_v, e_d;
  logic [TAG_W-1:0] e_t;
  line_t            e_data;

  initial begin
    #1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < SETS; s++) begin r_v[s] = 0; r_d[s] = 0; r_t[s] = 'x; r_data[s] = 'x; end
    // fill every line so nothing is read uninitialized
    for (int s = 0; s < SETS; s++) begin
      @(negedge clk);
      set = 8'(s); data_wr_en = 1; data_wr_be = '1;
      data_wr_data = {8{$urandom}};
      r_data[s] = data_wr_data;
      tag_rd_en = 1;
      @(negedge clk);
      data_wr_en = 0; tag_rd_en = 0;
      check(!tag_valid, "valid clear after reset");
    end
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      set = 8'($urandom);
      tag_rd_en = $urandom % 2; data_rd_en = $urandom % 2;
      tag_wr_en = ($urandom % 4) == 0; data_wr_en = ($urandom % 4) == 0;
      tag_wr_valid = $urandom % 2; tag_wr_dirty = $urandom % 2; tag_wr_tag = TAG_W'({$urandom, $urandom});
      data_wr_be = {$urandom}; data_wr_data = {8{$urandom}};
      if (tag_rd_en) begin e_v = r_v[set]; e_d = r_d[set]; e_t = r_t[set]; end
      if (data_rd_en) e_data = r_data[set];
      @(posedge clk);
      if (tag_wr_en) begin r_v[set] = tag_wr_valid; r_d[set] = tag_wr_dirty; r_t[set] = tag_wr_tag; end
      if (data_wr_en)
        for (int b = 0; b < 32; b++) if (data_wr_be[b]) r_data[set][b*8 +: 8] = data_wr_data[b*8 +: 8];
      #1;
      if (i > 0) begin
        check(tag_valid == e_v && tag_dirty == e_d, "valid/dirty read");
        if (e_v) check(tag_out == e_t, "tag read");
        check(data_out == e_data, "data read (held when not enabled)");
      end else begin
        e_v = tag_valid; e_d = tag_dirty; e_t = tag_out; e_data = data_out;
      end
    end
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
