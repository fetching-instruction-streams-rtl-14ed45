// ras: return address stack of the next stream predictor.
//
// A circular stack of DEPTH return addresses (8 by default). It is updated
// speculatively at prediction time, as the terminating branch type of the
// predicted stream says: a call pushes the address after the call, a return
// pops. Every prediction carries a checkpoint, the stack index and the top
// entry as they were before its own push or pop (ckpt, valid in the same
// cycle). When the back end finds a misprediction it returns the checkpoint
// of the stream concerned and the real type of the mispredicted branch; the
// stack puts back the index and the top entry and then does that branch's
// own push or pop. Pushing past DEPTH overwrites the oldest entry.
// Push/pop and the checkpoint contents follow the document; the circular
// overflow and re-applying the real branch after the restore are this
// design's choices. All state resets to zero.
module ras
  import fetch_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  // speculative update from the predictor
  input  logic      pred_valid,
  input  br_type_e  pred_btype,
  input  addr_t     pred_ret,     // return address pushed by a call
  output addr_t     top,          // predicted target of a return
  output ras_ckpt_t ckpt,         // state before this cycle's update
  // recovery
  input  logic      restore,
  input  ras_ckpt_t restore_ckpt,
  input  br_type_e  restore_btype,
  input  addr_t     restore_ret
);

  addr_t                stack [RAS_DEPTH];
  logic [RAS_IDX_W-1:0] tos;

  assign top  = stack[tos];
  assign ckpt = '{tos: tos, top: stack[tos]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tos <= '0;
      for (int i = 0; i < RAS_DEPTH; i++) stack[i] <= '0;
    end else if (restore) begin
      stack[restore_ckpt.tos] <= restore_ckpt.top;
      unique case (restore_btype)
        BR_CALL: begin
          tos <= restore_ckpt.tos + 1'b1;
          stack[restore_ckpt.tos + 1'b1] <= restore_ret;
        end
        BR_RETURN: tos <= restore_ckpt.tos - 1'b1;
        default:   tos <= restore_ckpt.tos;
      endcase
    end else if (pred_valid) begin
      unique case (pred_btype)
        BR_CALL: begin
          tos <= tos + 1'b1;
          stack[tos + 1'b1] <= pred_ret;
        end
        BR_RETURN: tos <= tos - 1'b1;
        default: ;
      endcase
    end
  end

endmodule
