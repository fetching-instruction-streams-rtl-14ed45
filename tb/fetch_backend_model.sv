// fetch_backend_model: behavioural back end and memory for testing the
// stream fetch engine. Not synthesizable; used only by testbenches.
//
// Memory: every instruction word is its own address XOR 32'h5A5A0000; a
// refill request is answered after LAT cycles with the whole line.
//
// Program: the loop of the if-then-else example, laid out so that the
// frequent path falls through:
//   A  'h1000  6 instructions, conditional branch to C, taken every 4th pass
//   B  'h1018 40 instructions, falls through into D
//   D  'h10B8  7 instructions, ends with a call to F
//   E  'h10D4  3 instructions, jumps back to A
//   C  'h3000  4 instructions, ends with a call to F
//   C2 'h3010  2 instructions, jumps to D
//   F  'h8000 10 instructions, ends with a return
// F returns to two places, and A starts two overlapping streams (A-B-D, 53
// instructions, and A alone, 6). With NOISY set, the instruction at B+16
// ('h1028) is also a branch to D, taken on an irregular 1 in 8 passes; the
// predictor cannot learn it, so it brings mispredictions inside streams.
//
// Back end: after reset it redirects the engine to A. It takes bundles (it
// refuses 1 in 16 at random), follows the correct path and checks every
// accepted instruction word and the shape of every bundle (a prefix of
// slots, inside one line). A fetched address that is not the expected one
// means the last accepted branch was mispredicted: the model waits 3 cycles
// and until the older streams are committed, then redirects with that
// stream's return-stack checkpoint and the real branch type. Each completed
// stream is committed, one per cycle, flagged when it was mispredicted.
// When the misprediction was inside a stream (a branch predicted taken that
// was not), fetch restarts in the middle of it: at its end the model
// commits the whole stream off the fetch path (in_path clear) and then the
// partial stream from the redirect target, which fetch did follow.
// redirect_partial marks redirects to such a target.
// Counts are outputs; WARM_AT splits the run into a training half and a
// measured half.
module fetch_backend_model
  import fetch_pkg::*;
#(
  parameter int FW      = 8,
  parameter int LI      = 32,
  parameter int LAT     = 15,
  parameter int WARM_AT = 3000,
  parameter bit NOISY   = 0,
  localparam int LW     = LI * INST_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              out_valid,
  output logic              out_ready,
  input  addr_t             out_pc,
  input  logic [INST_W-1:0] out_inst [FW],
  input  logic [FW-1:0]     out_slot_valid,
  input  ras_ckpt_t         out_ckpt,
  output logic              upd_valid,
  output stream_upd_t       upd,
  output logic              redirect_valid,
  output redirect_t         redirect,
  output logic              redirect_partial,
  input  logic              mem_req,
  input  addr_t             mem_req_addr,
  output logic              mem_resp_valid,
  output logic [LW-1:0]     mem_resp_line,
  output int                checks,
  output int                failures,
  output int                cyc,
  output int                retired,
  output int                retired_warm,
  output int                redirects,
  output int                redirects_warm,
  output int                ret_ok,
  output int                stalls,
  output int                full_bundles,
  output int                partials
);

  localparam int LINE_SH = $clog2(LI * INST_BYTES);

  function automatic logic [INST_W-1:0] word_of(input addr_t a);
    return INST_W'(a) ^ 32'h5A5A0000;
  endfunction

  // ---------------- memory ----------------
  addr_t pend_addr;
  int    pend_cnt;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem_resp_valid <= 1'b0;
      mem_resp_line  <= '0;
      pend_cnt       <= -1;
      pend_addr      <= '0;
    end else begin
      mem_resp_valid <= 1'b0;
      if (mem_req) begin pend_addr <= mem_req_addr; pend_cnt <= LAT; end
      else if (pend_cnt > 1) pend_cnt <= pend_cnt - 1;
      else if (pend_cnt == 1) begin
        for (int i = 0; i < LI; i++)
          mem_resp_line[i*INST_W +: INST_W] <= word_of(pend_addr + addr_t'(4 * i));
        mem_resp_valid <= 1'b1;
        pend_cnt <= -1;
      end
    end
  end

  // ---------------- program ----------------
  localparam addr_t A = 'h1000, D = 'h10B8, E = 'h10D4, C = 'h3000, C2 = 'h3010, F = 'h8000;
  int    iter;
  addr_t call_stack [$];

  // Correct successor of the instruction at pc; bt/taken describe it.
  function automatic addr_t successor(input addr_t pc, output br_type_e bt, output bit taken);
    bt = BR_JUMP; taken = 0;
    case (pc)
      A + 20:  begin taken = (iter % 4 == 3); return taken ? C : pc + 4; end
      A + 40:  begin
                 taken = NOISY && (((iter * 40503) >> 7) % 8 == 0);
                 return taken ? D : pc + 4;
               end
      D + 24:  begin bt = BR_CALL; taken = 1; return F; end
      E + 8:   begin taken = 1; return A; end
      C + 12:  begin bt = BR_CALL; taken = 1; return F; end
      C2 + 4:  begin taken = 1; return D; end
      F + 36:  begin bt = BR_RETURN; taken = 1; return call_stack[$]; end
      default: return pc + 4;
    endcase
  endfunction

  // ---------------- back end ----------------
  addr_t       exp_pc, stream_start, last_pc;
  ras_ckpt_t   last_ckpt;
  br_type_e    last_bt;
  bit          stream_mp, discarding, last_was_ret, have_held, started, have_partial, sending;
  addr_t       partial_start;
  stream_upd_t held;
  int          redirect_wait;
  stream_upd_t commit_q [$];

  initial begin
    checks = 0; failures = 0; cyc = 0; retired = 0; retired_warm = 0; redirects = 0;
    redirects_warm = 0; ret_ok = 0; stalls = 0; full_bundles = 0; iter = 0; partials = 0;
    redirect_partial = 0; have_partial = 0; partial_start = '0; sending = 0;
    upd_valid = 0; upd = '0; redirect_valid = 0; redirect = '0; out_ready = 1;
    exp_pc = A; stream_start = A; stream_mp = 0; discarding = 0; redirect_wait = 0;
    last_pc = '0; last_ckpt = '0; last_bt = BR_JUMP; last_was_ret = 0;
    have_held = 0; held = '0; started = 0;
  end

  always @(negedge clk) out_ready <= ($urandom % 16) != 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (out_valid && !out_ready) stalls++;
    if (redirect_valid) begin
      redirects++;
      if (cyc > WARM_AT) redirects_warm++;
    end

    // commit one stream per cycle
    upd_valid <= 1'b0;
    if (commit_q.size() > 0) begin
      upd_valid <= 1'b1;
      upd       <= commit_q.pop_front();
    end

    redirect_valid   <= 1'b0;
    redirect_partial <= 1'b0;
    sending = 0;
    if (!started) begin
      // start the engine at A
      started = 1;
      redirect_valid  <= 1'b1;
      redirect        <= '0;
      redirect.target <= A;
    end else if (discarding) begin
      // send the redirect once the older streams are committed
      if (redirect_wait > 0) redirect_wait--;
      else if (commit_q.size() == 0 && !upd_valid && !have_held) begin
        redirect_valid    <= 1'b1;
        redirect.target   <= exp_pc;
        redirect.ckpt     <= last_ckpt;
        redirect.btype    <= last_bt;
        redirect.ret_addr <= last_pc + 4;
        redirect_partial  <= have_partial && partial_start == exp_pc;
        discarding         = 0;
        sending            = 1;   // this cycle's bundle is still wrong-path
      end
    end

    if (out_valid && out_ready && !discarding && !redirect_valid && !sending) begin
      int cnt;
      bit stop;
      cnt = 0;
      stop = 0;
      for (int i = 0; i < FW; i++) if (out_slot_valid[i]) cnt++;
      checks++;
      if (cnt == 0 || out_slot_valid != FW'((1 << cnt) - 1) ||
          ((out_pc >> LINE_SH) != ((out_pc + addr_t'(4 * (cnt - 1))) >> LINE_SH))) begin
        failures++; $display("FAIL bundle shape at %h: mask %b", out_pc, out_slot_valid);
      end
      if (cnt == FW) full_bundles++;
      for (int i = 0; i < FW && !stop; i++) if (out_slot_valid[i]) begin
        addr_t pc;
        pc = out_pc + addr_t'(4 * i);
        if (pc != exp_pc) begin
          // the last accepted branch went the wrong way
          stop          = 1;
          discarding    = 1;
          redirect_wait = 3;
          if (have_held) begin
            // the stream that just ended took the wrong successor
            held.mispred = 1'b1;
            commit_q.push_back(held);
            have_held = 0;
          end else begin
            // fetch will restart inside the current stream
            stream_mp     = 1;
            have_partial  = 1;
            partial_start = exp_pc;
          end
        end else begin
          br_type_e bt;
          bit       taken;
          addr_t    nx;
          checks++;
          if (out_inst[i] !== word_of(pc)) begin
            failures++; $display("FAIL instruction word at %h: %h", pc, out_inst[i]);
          end
          if (last_was_ret) ret_ok++;
          if (have_held) begin
            commit_q.push_back(held);
            have_held = 0;
          end
          nx = successor(pc, bt, taken);
          last_was_ret = (bt == BR_RETURN) && taken;
          if (bt == BR_CALL)   call_stack.push_back(pc + 4);
          if (bt == BR_RETURN) void'(call_stack.pop_back());
          if (pc == E + 8) iter++;
          retired++;
          if (cyc > WARM_AT) retired_warm++;
          last_pc = pc; last_ckpt = out_ckpt; last_bt = taken ? bt : BR_JUMP;
          if (taken) begin
            // held until the next instruction shows whether it was predicted
            if (have_partial) begin
              commit_q.push_back('{start: stream_start,
                                   len: len_t'((pc - stream_start) / 4 + 1),
                                   btype: bt, next: nx, mispred: 1'b1, in_path: 1'b0});
              held = '{start: partial_start, len: len_t'((pc - partial_start) / 4 + 1),
                       btype: bt, next: nx, mispred: 1'b0, in_path: 1'b1};
              partials++;
            end else begin
              held = '{start: stream_start, len: len_t'((pc - stream_start) / 4 + 1),
                       btype: bt, next: nx, mispred: stream_mp, in_path: 1'b1};
            end
            have_held    = 1;
            have_partial = 0;
            stream_start = nx;
            stream_mp    = 0;
          end
          exp_pc = nx;
        end
      end
    end
    if (discarding) last_was_ret = 0;
  end

endmodule
