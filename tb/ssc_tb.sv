// ssc_tb: runs the stack cache checker (see ssc_check) on the four sizes
// evaluated for the stack cache, 256 B, 512 B (the default), 1 KB and 2 KB,
// side by side, each with its own L2 model. Conflicting addresses are one
// cache size apart, so the same program exercises every size.
module ssc_tb;
  int c [4], f [4];
  bit d [4];

  ssc_check #(.SIZE_BYTES(256))  u_256  (.checks(c[0]), .failures(f[0]), .done(d[0]));
  ssc_check #(.SIZE_BYTES(512))  u_512  (.checks(c[1]), .failures(f[1]), .done(d[1]));
  ssc_check #(.SIZE_BYTES(1024)) u_1k   (.checks(c[2]), .failures(f[2]), .done(d[2]));
  ssc_check #(.SIZE_BYTES(2048)) u_2k   (.checks(c[3]), .failures(f[3]), .done(d[3]));

  initial begin
    wait (d[0] && d[1] && d[2] && d[3]);
    $display("TB_RESULT checks=%0d failures=%0d", c.sum(), f.sum());
    $finish;
  end

  initial begin
    repeat (50000) @(posedge u_512.clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c.sum(), f.sum() + 1);
    $finish;
  end
endmodule
