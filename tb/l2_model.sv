// l2_model: behavioural stand-in for the L2 cache and the memory behind it
// (not synthesizable). It holds whole lines in an associative array; a line
// never written reads as tb_pkg::init_line(address). One request at a time:
// after LAT cycles it answers with one rsp_valid pulse, carrying the line
// for a read. LAT defaults to 12, the L2 round trip of the evaluated
// machine counted in 1 GHz processor cycles. Counts reads and writes.
module l2_model
  import l1_pkg::*;
#(
  parameter int unsigned LAT = 12,
  parameter int unsigned AW  = PLINE_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req_valid,
  output logic          req_ready,
  input  logic          req_we,
  input  logic [AW-1:0] req_line,
  input  line_t         req_wdata,
  output logic          rsp_valid,
  output line_t         rsp_rdata,
  output int unsigned   n_reads,
  output int unsigned   n_writes
);
  line_t mem [logic [AW-1:0]];
  logic          busy;
  logic [AW-1:0] line_q;
  int unsigned   cnt;

  assign req_ready = !busy;

  function automatic line_t peek(logic [AW-1:0] line);
    return mem.exists(line) ? mem[line] : tb_pkg::init_line(64'(line));
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; rsp_valid <= 1'b0; rsp_rdata <= '0;
      n_reads <= 0; n_writes <= 0; cnt <= 0; line_q <= '0;
    end else begin
      rsp_valid <= 1'b0;
      if (!busy && req_valid) begin
        busy   <= 1'b1;
        line_q <= req_line;
        cnt    <= (LAT > 1) ? LAT - 1 : 0;
        if (req_we) begin
          mem[req_line] = req_wdata;
          n_writes <= n_writes + 1;
        end else begin
          n_reads <= n_reads + 1;
        end
      end else if (busy) begin
        if (cnt <= 1) begin
          busy      <= 1'b0;
          rsp_valid <= 1'b1;
          rsp_rdata <= peek(line_q);
        end else begin
          cnt <= cnt - 1;
        end
      end
    end
  end
endmodule
