// guard_ctrl: control logic of the return-address guard.
//
// The guard protects function return addresses without changing the processor.
// Software (a modified compiler) issues two memory-mapped commands to it:
//   push_guard      before every call: a write of the return address (RET_Addr)
//                   to the PUSH register. The guard pushes it onto its RA stack.
//                   A read of the same register returns pop_ret_addr, the
//                   non-cacheable address software puts in the return-address
//                   register in place of the real one.
//   guard_attention before every return: a write of the PC to ATTN_PC, then of
//                   the frame pointer to ATTN_FP. The guard pops the saved
//                   RET_Addr, arms itself and starts a timeout counter.
// While armed the guard inspects every request arriving from the cache:
//   * a fetch of pop_ret_addr is the expected return: the guard answers it with
//     the instruction "branch to RET_Addr", so the processor continues at the
//     return address held in the guard, whatever was in its stack frame;
//   * an instruction fetch judged invalid from (req, PC, FP), or any instruction
//     fetch after the time threshold, means the return was diverted: the guard
//     answers that fetch with the same branch instead of the attacker's code,
//     and raises its attack flags;
//   * any other access (data, or the function's epilogue) goes on to memory.
// When a push leaves the RA stack full, the whole stack is saved into a spill
// area of main memory that the processor itself may not access; when a return
// leaves it empty (or a guard_attention finds it empty) the last saved block is
// read back. This follows the flow charts for push_guard and guard_attention.
//
// Timing: the module runs on the guard clock. The bus runs on a slower clock
// synchronous to it; 'bus_en' is high in the last guard clock of each bus clock
// period, and bus handshakes (request taken, memory ready, memory response)
// happen only in those cycles. Tie 'bus_en' high when the bus runs on the guard
// clock. A command (stack access), a guard-register read and a verified
// return fetch are done one guard clock after the request is taken, and the
// response is held until the next bus_en cycle. An access passed to memory is
// offered to memory one guard clock after it is taken, and memory's response
// is passed back in the cycle it arrives. Saving or restoring the stack costs
// DEPTH memory transactions, during which requests wait.
//
// What follows the document: the two commands and where they are issued, the
// RA stack with save/restore on full/empty, pop_ret_addr as a non-cacheable
// address, the time threshold, the check of the request against PC and FP, the
// injected branch to RET_Addr, one guard clock each for a stack access and for
// the verification, a guard clock faster than the bus clock, and a spill area
// closed to direct access. This design's own choices: the bus protocol and the
// bus_en clock-enable scheme, the register map, the invalid-fetch rule (an
// instruction fetch inside FRAME_WIN bytes of FP, i.e. from the stack, or
// outside the EPI_WIN bytes of epilogue after PC), the timeout length, answering
// a late fetch with the branch, treating a pop_ret_addr fetch while not armed
// as a violation, the sizes of the window and spill area, and the status flags.
module guard_ctrl
  import guard_pkg::*;
#(
  parameter int unsigned DEPTH        = 16,
  parameter addr_t       GUARD_BASE   = 32'hFFFF_0000,
  parameter addr_t       SPILL_BASE   = 32'h0FFF_0000,
  parameter int unsigned SPILL_BLOCKS = 64,
  parameter int unsigned TIMEOUT      = 64,
  parameter addr_t       FRAME_WIN    = 32'h0000_0400,
  parameter addr_t       EPI_WIN      = 32'h0000_0040
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       bus_en,
  // cache side (the guard is the target)
  input  logic                       up_req_valid,
  output logic                       up_req_ready,
  input  bus_req_t                   up_req,
  output logic                       up_resp_valid,
  output bus_resp_t                  up_resp,
  // main-memory side (the guard is the initiator)
  output logic                       dn_req_valid,
  input  logic                       dn_req_ready,
  output bus_req_t                   dn_req,
  input  logic                       dn_resp_valid,
  input  bus_resp_t                  dn_resp,
  // RA stack
  output logic                       st_push,
  output addr_t                      st_push_data,
  output logic                       st_pop,
  output logic                       st_clear,
  output logic [$clog2(DEPTH)-1:0]   st_rd_idx,
  input  addr_t                      st_rd_data,
  input  addr_t                      st_top,
  input  logic [$clog2(DEPTH+1)-1:0] st_count,
  input  logic                       st_full,
  input  logic                       st_empty,
  // status
  output status_t                    status,
  output guard_events_t              events,
  output logic                       attack_irq
);

  localparam int unsigned IW        = $clog2(DEPTH);
  localparam int unsigned SW        = $clog2(SPILL_BLOCKS + 1);
  localparam int unsigned TW        = $clog2(TIMEOUT + 1);
  localparam addr_t       POP_RET   = GUARD_BASE | addr_t'(OFS_POP_RET);
  localparam addr_t       SPILL_LEN = addr_t'(SPILL_BLOCKS * DEPTH * 4);

  typedef enum logic [3:0] {
    S_IDLE, S_RESP, S_FWD_REQ, S_FWD_WAIT,
    S_SPILL_REQ, S_SPILL_WAIT, S_REST_REQ, S_REST_WAIT, S_ATTN_POP, S_PUSH
  } state_t;

  // What to look at once a locally answered request has been answered.
  typedef enum logic [1:0] { POST_NONE, POST_SPILL, POST_RESTORE } post_t;

  state_t           state_q, state_d;
  post_t            post_q, post_d;
  bus_req_t         req_q;
  bus_resp_t        resp_q, resp_d;
  addr_t            ret_q, pc_q, fp_q;
  logic             armed_q;
  logic [TW-1:0]    timer_q;
  logic [SW-1:0]    spill_cnt_q;
  logic [IW-1:0]    idx_q;
  logic             attn_pend_q, push_pend_q;
  logic             f_attack_q, f_timeout_q, f_viol_q, f_ovf_q, f_unf_q;

  // ---------------------------------------------------------------- decode
  logic  in_win, in_spill, timed_out, invalid_fetch, accept, dn_take, dn_done;
  logic [7:0] ofs;
  addr_t blk_addr;

  assign accept    = up_req_valid && up_req_ready && bus_en;
  assign dn_take   = dn_req_ready && bus_en;
  assign dn_done   = dn_resp_valid && bus_en;
  assign in_win    = (up_req.addr[AW-1:8] == GUARD_BASE[AW-1:8]);
  assign ofs       = up_req.addr[7:0];
  assign in_spill  = ((up_req.addr - SPILL_BASE) < SPILL_LEN);
  assign timed_out = (timer_q == TW'(TIMEOUT));

  // Invalid fetch during a return: code taken from the stack frame around FP,
  // or anything outside the epilogue that follows guard_attention's PC.
  always_comb begin
    logic in_frame, in_epi;
    in_frame      = ((up_req.addr - (fp_q - FRAME_WIN)) < (FRAME_WIN << 1));
    in_epi        = ((up_req.addr - pc_q) < EPI_WIN);
    invalid_fetch = up_req.ifetch && !up_req.write && (in_frame || !in_epi);
  end

  // Address of the word idx_q of the block being saved or restored.
  always_comb begin
    addr_t blk;
    if (state_q == S_REST_REQ || state_q == S_REST_WAIT)
      blk = addr_t'(spill_cnt_q) - addr_t'(1);
    else
      blk = addr_t'(spill_cnt_q);
    blk_addr = SPILL_BASE + ((blk * addr_t'(DEPTH) + addr_t'(idx_q)) << 2);
  end

  // ---------------------------------------------------------------- status
  always_comb begin
    status                = '0;
    status.armed          = armed_q;
    status.attack         = f_attack_q;
    status.timeout_attack = f_timeout_q;
    status.violation      = f_viol_q;
    status.ra_overflow    = f_ovf_q;
    status.underflow      = f_unf_q;
    status.depth          = 8'(st_count);
    status.spill_blocks   = 12'(spill_cnt_q);
  end
  assign attack_irq = f_attack_q;

  // ---------------------------------------------------------------- control
  assign up_req_ready = (state_q == S_IDLE);
  assign st_rd_idx    = idx_q;

  always_comb begin
    state_d       = state_q;
    post_d        = post_q;
    resp_d        = resp_q;
    up_resp_valid = 1'b0;
    up_resp       = resp_q;
    dn_req_valid  = 1'b0;
    dn_req        = req_q;
    st_push       = 1'b0;
    st_push_data  = up_req.wdata;
    st_pop        = 1'b0;
    st_clear      = 1'b0;
    events        = '0;

    unique case (state_q)
      S_IDLE: if (accept) begin
        state_d = S_RESP;
        post_d  = POST_NONE;
        resp_d  = '0;
        if (in_win) begin
          if (up_req.write) begin
            unique case (ofs)
              OFS_PUSH: begin
                if (!st_full) begin
                  st_push     = 1'b1;
                  events.push = 1'b1;
                  post_d      = POST_SPILL;
                end else if (spill_cnt_q != SW'(SPILL_BLOCKS)) begin
                  // full after a restore: save it first, then push
                  state_d = S_SPILL_REQ;
                end else begin
                  resp_d.err = 1'b1;
                end
              end
              OFS_ATTN_PC, OFS_STATUS: ;
              OFS_ATTN_FP: begin
                if (!st_empty) begin
                  st_pop     = 1'b1;
                  events.pop = 1'b1;
                end else if (spill_cnt_q != '0) begin
                  state_d = S_REST_REQ;
                end else begin
                  resp_d.err = 1'b1;
                end
              end
              default: resp_d.err = 1'b1;
            endcase
          end else begin
            unique case (ofs)
              OFS_PUSH:   resp_d.rdata = POP_RET;
              OFS_STATUS: resp_d.rdata = status;
              OFS_POP_RET: begin
                if (armed_q) begin
                  resp_d.rdata     = arm_branch(POP_RET, ret_q);
                  events.return_ok = 1'b1;
                  post_d           = POST_RESTORE;
                end else begin
                  resp_d.err       = 1'b1;
                  events.violation = 1'b1;
                end
              end
              default: resp_d.err = 1'b1;
            endcase
          end
        end else if (in_spill) begin
          resp_d.err       = 1'b1;
          events.violation = 1'b1;
        end else if (armed_q && up_req.ifetch && !up_req.write && (invalid_fetch || timed_out)) begin
          resp_d.rdata = arm_branch(up_req.addr, ret_q);
          if (invalid_fetch) events.attack_invalid = 1'b1;
          else               events.attack_timeout = 1'b1;
          post_d = POST_RESTORE;
        end else begin
          state_d        = S_FWD_REQ;
          events.forward = 1'b1;
        end
      end

      S_RESP: begin
        up_resp_valid = 1'b1;
        if (bus_en) begin
          state_d = S_IDLE;
          if (post_q == POST_SPILL && st_full && spill_cnt_q != SW'(SPILL_BLOCKS))
            state_d = S_SPILL_REQ;
          else if (post_q == POST_RESTORE && st_empty && spill_cnt_q != '0)
            state_d = S_REST_REQ;
        end
      end

      S_FWD_REQ: begin
        dn_req_valid = 1'b1;
        if (dn_take) state_d = S_FWD_WAIT;
      end

      S_FWD_WAIT: begin
        up_resp_valid = dn_resp_valid;
        up_resp       = dn_resp;
        if (dn_done) state_d = S_IDLE;
      end

      S_SPILL_REQ: begin
        dn_req_valid = 1'b1;
        dn_req       = '{write: 1'b1, ifetch: 1'b0, addr: blk_addr, wdata: st_rd_data};
        if (dn_take) state_d = S_SPILL_WAIT;
      end

      S_SPILL_WAIT: if (dn_done) begin
        if (idx_q == IW'(DEPTH - 1)) begin
          st_clear      = 1'b1;
          events.spill  = 1'b1;
          state_d       = push_pend_q ? S_PUSH : S_IDLE;
        end else begin
          state_d = S_SPILL_REQ;
        end
      end

      S_REST_REQ: begin
        dn_req_valid = 1'b1;
        dn_req       = '{write: 1'b0, ifetch: 1'b0, addr: blk_addr, wdata: '0};
        if (dn_take) state_d = S_REST_WAIT;
      end

      S_REST_WAIT: if (dn_done) begin
        st_push      = 1'b1;
        st_push_data = dn_resp.rdata;
        if (idx_q == IW'(DEPTH - 1)) begin
          events.restore = 1'b1;
          state_d        = attn_pend_q ? S_ATTN_POP : S_IDLE;
        end else begin
          state_d = S_REST_REQ;
        end
      end

      S_PUSH: begin
        st_push      = 1'b1;
        st_push_data = req_q.wdata;
        events.push  = 1'b1;
        resp_d       = '0;
        post_d       = POST_NONE;
        state_d      = S_RESP;
      end

      S_ATTN_POP: begin
        st_pop     = 1'b1;
        events.pop = 1'b1;
        resp_d     = '0;
        post_d     = POST_NONE;
        state_d    = S_RESP;
      end

      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      post_q      <= POST_NONE;
      req_q       <= '0;
      resp_q      <= '0;
      ret_q       <= '0;
      pc_q        <= '0;
      fp_q        <= '0;
      armed_q     <= 1'b0;
      timer_q     <= '0;
      spill_cnt_q <= '0;
      idx_q       <= '0;
      attn_pend_q <= 1'b0;
      push_pend_q <= 1'b0;
      f_attack_q  <= 1'b0;
      f_timeout_q <= 1'b0;
      f_viol_q    <= 1'b0;
      f_ovf_q     <= 1'b0;
      f_unf_q     <= 1'b0;
    end else begin
      state_q <= state_d;
      post_q  <= post_d;
      resp_q  <= resp_d;

      if (armed_q && !timed_out) timer_q <= timer_q + TW'(1);

      if (accept) begin
        req_q <= up_req;
        if (in_win && up_req.write) begin
          unique case (ofs)
            OFS_PUSH: if (st_full) begin
              if (spill_cnt_q != SW'(SPILL_BLOCKS)) push_pend_q <= 1'b1;
              else                                  f_ovf_q     <= 1'b1;
            end
            OFS_ATTN_PC: pc_q <= up_req.wdata;
            OFS_ATTN_FP: begin
              fp_q <= up_req.wdata;
              if (!st_empty) begin
                ret_q   <= st_top;
                armed_q <= 1'b1;
                timer_q <= '0;
              end else if (spill_cnt_q != '0) begin
                attn_pend_q <= 1'b1;
              end else begin
                f_unf_q <= 1'b1;
              end
            end
            OFS_STATUS: begin
              f_attack_q  <= 1'b0;
              f_timeout_q <= 1'b0;
              f_viol_q    <= 1'b0;
              f_ovf_q     <= 1'b0;
              f_unf_q     <= 1'b0;
            end
            default: ;
          endcase
        end
      end

      if (events.return_ok || events.attack_invalid || events.attack_timeout) armed_q <= 1'b0;
      if (events.attack_invalid || events.attack_timeout) f_attack_q <= 1'b1;
      if (events.attack_timeout) f_timeout_q <= 1'b1;
      if (events.violation) f_viol_q <= 1'b1;

      if (state_q == S_PUSH) push_pend_q <= 1'b0;

      if (state_q == S_ATTN_POP) begin
        ret_q       <= st_top;
        armed_q     <= 1'b1;
        timer_q     <= '0;
        attn_pend_q <= 1'b0;
      end

      // block word index for saving and restoring
      if (state_d == S_SPILL_REQ && (state_q == S_RESP || state_q == S_IDLE)) idx_q <= '0;
      if (state_d == S_REST_REQ && (state_q == S_RESP || state_q == S_IDLE)) idx_q <= '0;
      if ((state_q == S_SPILL_WAIT || state_q == S_REST_WAIT) && dn_done)
        idx_q <= idx_q + IW'(1);

      if (events.spill)   spill_cnt_q <= spill_cnt_q + SW'(1);
      if (events.restore) spill_cnt_q <= spill_cnt_q - SW'(1);
    end
  end

  // ---------------------------------------------------------------- protocol rules
  a_up_hold: assert property (@(posedge clk) disable iff (!rst_n)
    bus_en && up_req_valid && !up_req_ready |=> up_req_valid && $stable(up_req));
  a_dn_hold: assert property (@(posedge clk) disable iff (!rst_n)
    dn_req_valid && !dn_take |=> dn_req_valid && $stable(dn_req));
  a_dn_resp_expected: assert property (@(posedge clk) disable iff (!rst_n)
    dn_done |-> (state_q inside {S_FWD_WAIT, S_SPILL_WAIT, S_REST_WAIT}));

endmodule
