// ssc_ptr_regs: the Top-Of-Stack (TOS) and Safe-Region-Bottom (SRB)
// registers of the specialized stack cache, with the two address checks
// the cache needs.
//
// The stack grows toward lower addresses, so "above the TOS" (the popped,
// dead side) means lower addresses. Both registers are kept as line
// addresses. A line L is
//   dead  when it lies wholly on the popped side:   L <  tos_line
//   safe  when it lies in the safe region:  tos_line <= L < srb_line
// A safe line has never been displaced from the stack cache since it was
// pushed, so a store that misses on it needs no line fetch.
//
// Register updates (all on the rising clock edge, active-low reset to 0):
//   sched_valid      TOS and SRB both set to the new stack pointer.
//   sp_move_valid    TOS follows the stack pointer; if the TOS line moves
//                    past the SRB (stack popped beyond it) the SRB is reset
//                    to the TOS; if it moves the other way the SRB stays.
//   disp_valid       a dirty line was displaced; if it was safe, the SRB is
//                    pulled in to that line, which leaves it and every line
//                    farther from the TOS outside the safe region.
// A displacement and a stack-pointer move in the same cycle are both
// applied, the move last. The query port is combinational.
// The update rules follow the document; the line granularity, the
// direction of stack growth and the reset value are this design's choices.
module ssc_ptr_regs
  import l1_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   sched_valid,
  input  vaddr_t sched_sp,
  input  logic   sp_move_valid,
  input  vaddr_t sp_move_sp,
  input  logic   disp_valid,      // a dirty line is being displaced
  input  vline_t disp_line,
  input  vline_t q_line,
  output logic   q_dead,
  output logic   q_safe,
  output vaddr_t tos,
  output vline_t tos_line,
  output vline_t srb_line,
  output logic   ev_srb_shrink,   // a displacement moved the SRB
  output logic   ev_srb_reset     // a stack-pointer move reset the SRB
);

  vaddr_t tos_q;
  vline_t srb_q;
  vline_t srb_after_disp, move_line;
  logic   disp_safe;

  assign tos      = tos_q;
  assign tos_line = tos_q[VA_W-1:OFF_W];
  assign srb_line = srb_q;

  assign q_dead = q_line < tos_line;
  assign q_safe = (q_line >= tos_line) && (q_line < srb_q);

  assign disp_safe = (disp_line >= tos_line) && (disp_line < srb_q);

  always_comb begin
    srb_after_disp = srb_q;
    ev_srb_shrink  = 1'b0;
    if (disp_valid && disp_safe) begin
      srb_after_disp = disp_line;
      ev_srb_shrink  = 1'b1;
    end
    move_line    = sp_move_sp[VA_W-1:OFF_W];
    ev_srb_reset = !sched_valid && sp_move_valid && (move_line > srb_after_disp);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tos_q <= '0;
      srb_q <= '0;
    end else if (sched_valid) begin
      tos_q <= sched_sp;
      srb_q <= sched_sp[VA_W-1:OFF_W];
    end else begin
      srb_q <= srb_after_disp;
      if (sp_move_valid) begin
        tos_q <= sp_move_sp;
        if (move_line > srb_after_disp) srb_q <= move_line;
      end
    end
  end

endmodule
