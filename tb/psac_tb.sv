// psac_tb: runs the pseudo set-associative cache checker (see psac_check)
// on four configurations side by side, each with its own L2 model:
//   4 ways x 8 KB, Predictive Phased          (the default, 32 KB)
//   3 ways x 8 KB, Predictive Phased          (the smaller 24 KB choice)
//   4 ways x 8 KB, Fall Back Phased
//   4 ways x 8 KB, Predictive Phased, adaptive replacement
module psac_tb;
  import l1_pkg::*;
  int c [4], f [4];
  bit d [4];

  psac_check #(.WAYS(4)) u_4way (.checks(c[0]), .failures(f[0]), .done(d[0]));
  psac_check #(.WAYS(3)) u_3way (.checks(c[1]), .failures(f[1]), .done(d[1]));
  psac_check #(.WAYS(4), .SCHEME(FALLBACK_PHA)) u_fbp (.checks(c[2]), .failures(f[2]), .done(d[2]));
  psac_check #(.WAYS(4), .ADAPTIVE(1'b1)) u_adapt (.checks(c[3]), .failures(f[3]), .done(d[3]));

  initial begin
    wait (d[0] && d[1] && d[2] && d[3]);
    $display("TB_RESULT checks=%0d failures=%0d", c.sum(), f.sum());
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge u_4way.clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c.sum(), f.sum() + 1);
    $finish;
  end
endmodule
