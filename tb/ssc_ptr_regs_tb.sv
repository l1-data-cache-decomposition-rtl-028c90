// ssc_ptr_regs_tb: checks the TOS/SRB registers and their address checks.
// A directed sequence (schedule, push, displacement inside and outside the
// safe region, pop past the SRB, push again) with hand-worked values, then
// random events compared every cycle against a reference written from the
// rules: SRB := TOS on schedule; on a dirty displacement of a safe line the
// SRB becomes that line; on a stack-pointer move past the SRB the SRB
// follows the TOS.
module ssc_ptr_regs_tb;
  import l1_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   sched_valid = 0, sp_move_valid = 0, disp_valid = 0;
  vaddr_t sched_sp = '0, sp_move_sp = '0;
  vline_t disp_line = '0, q_line = '0;
  logic   q_dead, q_safe, ev_srb_shrink, ev_srb_reset;
  vaddr_t tos;
  vline_t tos_line, srb_line;

  ssc_ptr_regs dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic step();
    @(negedge clk);
    sched_valid = 0; sp_move_valid = 0; disp_valid = 0;
  endtask

  // reference
  vaddr_t r_tos;
  longint r_srb;

  initial begin
    #1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // schedule: sp = 0x1000, line 0x80
    sched_valid = 1; sched_sp = 32'h1000;
    step();
    check(tos == 32'h1000 && srb_line == 27'h80, "schedule");
    q_line = 27'h80; #1;
    check(!q_safe && !q_dead, "empty safe region at schedule");
    // push 8 lines
    sp_move_valid = 1; sp_move_sp = 32'h0F00;
    step();
    check(tos_line == 27'h78 && srb_line == 27'h80, "push keeps SRB");
    q_line = 27'h79; #1; check(q_safe && !q_dead, "pushed line is safe");
    q_line = 27'h7F; #1; check(q_safe, "last pushed line is safe");
    q_line = 27'h80; #1; check(!q_safe && !q_dead, "old frame line not safe");
    q_line = 27'h77; #1; check(q_dead && !q_safe, "line above TOS is dead");
    // dirty displacement of a safe line
    disp_valid = 1; disp_line = 27'h7C; #1;
    check(ev_srb_shrink, "shrink event");
    step();
    check(srb_line == 27'h7C, "SRB pulled to displaced line");
    q_line = 27'h7C; #1; check(!q_safe, "displaced line no longer safe");
    q_line = 27'h7B; #1; check(q_safe, "line nearer TOS still safe");
    // displacement outside the safe region changes nothing
    disp_valid = 1; disp_line = 27'h90; #1;
    check(!ev_srb_shrink, "no shrink outside region");
    step();
    check(srb_line == 27'h7C, "SRB unchanged");
    // pop past the SRB: SRB reset to TOS
    sp_move_valid = 1; sp_move_sp = 32'h0FA0; #1;
    check(ev_srb_reset, "reset event");
    step();
    check(tos == 32'h0FA0 && srb_line == 27'h7D, "SRB follows TOS past it");
    // push again: SRB stays
    sp_move_valid = 1; sp_move_sp = 32'h0E00;
    step();
    check(srb_line == 27'h7D && tos_line == 27'h70, "SRB kept on push");

    // random phase
    r_tos = tos; r_srb = longint'(srb_line);
    for (int i = 0; i < 3000; i++) begin
      automatic int unsigned k = $urandom % 10;
      automatic vaddr_t sp = r_tos + vaddr_t'((int'($urandom % 512) - 256) * 4);
      automatic longint dl = longint'(r_tos >> 5) + longint'(int'($urandom % 24) - 4);
      automatic longint nl;
      sched_valid = (k == 0); sched_sp = sp;
      sp_move_valid = (k >= 1 && k <= 4) || k == 9; sp_move_sp = sp;
      disp_valid = (k >= 5); disp_line = vline_t'(dl);
      q_line = vline_t'(longint'(r_tos >> 5) + longint'(int'($urandom % 20) - 6));
      #1;
      check(q_dead == (longint'(q_line) < longint'(r_tos >> 5)), "q_dead");
      check(q_safe == (longint'(q_line) >= longint'(r_tos >> 5) && longint'(q_line) < r_srb), "q_safe");
      // reference update
      if (sched_valid) begin
        r_tos = sp; r_srb = longint'(sp >> 5);
      end else begin
        if (disp_valid && dl >= longint'(r_tos >> 5) && dl < r_srb) r_srb = dl;
        if (sp_move_valid) begin
          r_tos = sp;
          nl = longint'(sp >> 5);
          if (nl > r_srb) r_srb = nl;
        end
      end
      step();
      check(tos == r_tos && longint'(srb_line) == r_srb, $sformatf("registers at step %0d", i));
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
