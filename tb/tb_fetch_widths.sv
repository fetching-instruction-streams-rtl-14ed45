// tb_fetch_widths: the engine in the three machine widths it is meant for,
// 2, 4 and 8 instructions per cycle, each with lines four times the width
// (32-, 64- and 128-byte lines) and every other parameter at its default.
// Each engine runs the same program with its own fetch_backend_model for
// 6000 cycles. The bench checks that every engine delivers the correct path,
// that each is trained by the second half (at most 2 redirects there), and
// that the delivered rate in the second half is within the expected band for
// its width: above 70% of the width for the 2- and 4-wide engines, and above
// 3 instructions per cycle for the 8-wide one (the program's streams average
// 15 instructions, a quarter of them are 2 to 7 long, and one in 16 bundles
// is refused, so an 8-wide engine cannot stay full), and never above the width.
// A fourth engine is the 8-wide one with the cache line buffer stage
// (LINE_BUF = 1); it must meet the same checks as the single-stage one.
module tb_fetch_widths;
  import fetch_pkg::*;

  localparam int RUN = 6000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int NE = 4;
  int w_checks [NE], w_failures [NE], w_retired_warm [NE], w_redir_warm [NE];

  for (genvar g = 0; g < NE; g++) begin : g_w
    localparam int FW = (g == 3) ? 8 : 2 << g;   // 2, 4, 8, and 8 with the line buffer
    localparam bit LB = (g == 3);
    localparam int LI = 4 * FW;
    localparam int LW = LI * INST_W;

    logic               out_valid, out_ready, upd_valid, redirect_valid;
    addr_t              out_pc, mem_req_addr;
    logic [INST_W-1:0]  out_inst [FW];
    logic [FW-1:0]      out_slot_valid;
    ras_ckpt_t          out_ckpt;
    stream_upd_t        upd;
    redirect_t          redirect;
    logic               mem_req, mem_resp_valid;
    logic [LW-1:0]      mem_resp_line;
    logic               ev_hit_t1, ev_hit_t2, ev_seq_fetch, ev_ftq_full, ev_icache_miss,
                        ev_head_update, ev_redirect;
    logic               redirect_partial;
    int cyc, retired, redirects, ret_ok, stalls, full_bundles, partials;

    stream_fetch_engine #(.FETCH_W(FW), .LINE_BUF(LB)) dut (.*);

    fetch_backend_model #(.FW(FW), .LI(LI), .WARM_AT(RUN / 2)) be (
      .clk, .rst_n, .out_valid, .out_ready, .out_pc, .out_inst, .out_slot_valid, .out_ckpt,
      .upd_valid, .upd, .redirect_valid, .redirect, .redirect_partial, .mem_req, .mem_req_addr,
      .mem_resp_valid, .mem_resp_line,
      .checks (w_checks[g]), .failures (w_failures[g]), .cyc, .retired,
      .retired_warm (w_retired_warm[g]), .redirects, .redirects_warm (w_redir_warm[g]),
      .ret_ok, .stalls, .full_bundles, .partials
    );
  end

  initial begin
    repeat (RUN + 500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (RUN) @(posedge clk);
    for (int g = 0; g < NE; g++) begin
      int    fw, lo100;
      string tag;
      fw  = (g == 3) ? 8 : 2 << g;
      tag = "";
      if (g == 3) tag = " with line buffer";
      lo100 = (fw == 8) ? 300 : 70 * fw;    // lower bound, hundredths of an instr/cycle
      checks += w_checks[g] + 3;
      failures += w_failures[g];
      $display("%0d-wide%s: %0d instructions in the last %0d cycles (%0d.%02d per cycle), %0d redirects",
               fw, tag, w_retired_warm[g], RUN / 2, w_retired_warm[g] / (RUN / 2),
               (w_retired_warm[g] * 100 / (RUN / 2)) % 100, w_redir_warm[g]);
      if (w_redir_warm[g] > 2) begin failures++; $display("FAIL %0d-wide not trained", fw); end
      if (w_retired_warm[g] * 100 < lo100 * (RUN / 2)) begin
        failures++; $display("FAIL %0d-wide rate too low", fw);
      end
      if (w_retired_warm[g] > fw * (RUN / 2)) begin
        failures++; $display("FAIL %0d-wide above its width", fw);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
