// stack_router: steers each processor load/store to the stack cache or to
// the pseudo set-associative cache.
//
// References that decode marked as based on the stack pointer (req.sp) go
// straight to the stack cache. Every other reference is snooped: if its
// virtual address lies in the live stack, at or above the top of stack and
// below STACK_TOP, it is redirected to the stack cache one cycle later
// (held in a register for that cycle). Everything else goes to the pseudo
// set-associative cache. One reference is in flight at a time; the
// router waits for the answer of the cache it chose and passes it back.
// Following the document: decode marking, the snooping redirection and its
// one extra cycle. This design's choices: the snoop criterion (address
// range of the live stack, downward-growing stack, STACK_TOP as the top of
// the user stack segment) and the one-at-a-time ordering.
module stack_router
  import l1_pkg::*;
#(
  parameter vaddr_t STACK_TOP = 32'h8000_0000
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     cpu_req_valid,
  output logic     cpu_req_ready,
  input  cpu_req_t cpu_req,
  output logic     cpu_resp_valid,
  output word_t    cpu_resp_rdata,
  output logic     cpu_resp_tlb_miss,
  input  vaddr_t   tos,
  output logic     ssc_req_valid,
  input  logic     ssc_req_ready,
  output cpu_req_t ssc_req,
  input  logic     ssc_resp_valid,
  input  word_t    ssc_resp_rdata,
  output logic     psac_req_valid,
  input  logic     psac_req_ready,
  output cpu_req_t psac_req,
  input  logic     psac_resp_valid,
  input  word_t    psac_resp_rdata,
  input  logic     psac_resp_tlb_miss,
  output logic     ev_sp_route,
  output logic     ev_redirect
);

  typedef enum logic [1:0] {S_IDLE, S_REDIR, S_WAIT_SSC, S_WAIT_PSAC} state_t;
  state_t   state;
  cpu_req_t held;
  logic     snoop;

  assign snoop = !cpu_req.sp && (cpu_req.va >= tos) && (cpu_req.va < STACK_TOP);

  assign ssc_req  = (state == S_REDIR) ? held : cpu_req;
  assign psac_req = cpu_req;

  always_comb begin
    ssc_req_valid  = 1'b0;
    psac_req_valid = 1'b0;
    cpu_req_ready  = 1'b0;
    unique case (state)
      S_IDLE:
        if (cpu_req.sp) begin
          ssc_req_valid = cpu_req_valid;
          cpu_req_ready = ssc_req_ready;
        end else if (snoop) begin
          cpu_req_ready = 1'b1;
        end else begin
          psac_req_valid = cpu_req_valid;
          cpu_req_ready  = psac_req_ready;
        end
      S_REDIR: ssc_req_valid = 1'b1;
      default: ;
    endcase
  end

  assign ev_sp_route = (state == S_IDLE) && cpu_req_valid && cpu_req.sp && ssc_req_ready;
  assign ev_redirect = (state == S_IDLE) && cpu_req_valid && snoop;

  assign cpu_resp_valid    = ((state == S_WAIT_SSC) && ssc_resp_valid) ||
                             ((state == S_WAIT_PSAC) && psac_resp_valid);
  assign cpu_resp_rdata    = (state == S_WAIT_SSC) ? ssc_resp_rdata : psac_resp_rdata;
  assign cpu_resp_tlb_miss = (state == S_WAIT_PSAC) && psac_resp_tlb_miss;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      held  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (cpu_req_valid && cpu_req_ready) begin
          if (cpu_req.sp)  state <= S_WAIT_SSC;
          else if (snoop) begin
            held  <= cpu_req;
            state <= S_REDIR;
          end else         state <= S_WAIT_PSAC;
        end
        S_REDIR:     if (ssc_req_ready) state <= S_WAIT_SSC;
        S_WAIT_SSC:  if (ssc_resp_valid) state <= S_IDLE;
        S_WAIT_PSAC: if (psac_resp_valid) state <= S_IDLE;
        default:     state <= S_IDLE;
      endcase
    end
  end

endmodule
