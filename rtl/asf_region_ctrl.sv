// asf_region_ctrl: speculative-region state machine of the ASF core support.
//
// The region state changes only when asf.spec, asf.commit or ABORT reach the
// retire stage, never earlier; this, together with the ASF fences, serialises
// consecutive regions without flushing the pipeline. Nesting is flattened: a
// depth counter counts SPECULATEs, and only the outermost COMMIT ends the
// region and pulses commit_pulse so that the read/write-set tracker clears
// its bits. When the outermost asf.spec retires the controller records the
// rIP and rSP that follow it; an abort restarts execution there.
//
// Abort conditions (a conflict or capacity report from the tracker, a pending
// exception or interrupt, a retiring ABORT or disallowed instruction, nesting
// overflow) are checked every cycle while a region is active. In the cycle an
// abort is taken, abort_pulse is high for one cycle together with the restart
// rIP/rSP, the reason code for rAX and ZF = 0; the core flushes the pipeline
// and resets fetch, and the tracker rolls back. track_en, which keeps the
// write-set tracking on, drops only in the cycle after the abort, so a store
// that retires in the abort cycle itself is still caught by the tracker.
// Abort beats a COMMIT retiring in the same cycle (requester wins). The
// priority between abort reasons and the reason codes are this design's own.
//
// Timing: all outputs are registered except abort_pulse and its companion
// values, which are combinational in the detection cycle.
module asf_region_ctrl
  import asf_pkg::*;
#(
  parameter int unsigned DEPTH_W = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  // retire stage
  input  logic               retire_valid,
  input  uop_kind_e          retire_kind,
  input  logic [63:0]        retire_next_rip,
  input  logic [63:0]        retire_rsp,
  // asynchronous abort sources
  input  logic               conflict,
  input  logic               capacity,
  input  logic               exc_event,
  // state
  output logic               in_region,
  output logic [DEPTH_W-1:0] depth,
  output logic               track_en,
  output logic               commit_pulse,
  output logic               commit_error,   // COMMIT outside a region
  // abort
  output logic               abort_pulse,
  output abort_code_e        abort_code,
  output logic [63:0]        redirect_rip,
  output logic [63:0]        redirect_rsp,
  output logic [63:0]        abort_rax,
  output logic               abort_zf
);

  logic [63:0] saved_rip, saved_rsp;
  logic        track_q;

  wire ret_spec   = retire_valid && retire_kind == UOP_SPEC;
  wire ret_commit = retire_valid && retire_kind == UOP_COMMIT;
  wire ret_abort  = retire_valid && retire_kind == UOP_ABORT;
  wire ret_disal  = retire_valid && retire_kind == UOP_DISALLOWED;
  wire nest_ovf   = ret_spec && (depth == {DEPTH_W{1'b1}});

  assign in_region = (depth != '0);

  always_comb begin
    abort_code = ABORT_NONE;
    if (in_region) begin
      if (conflict)                    abort_code = ABORT_CONTENTION;
      else if (capacity)               abort_code = ABORT_CAPACITY;
      else if (exc_event)              abort_code = ABORT_FAR;
      else if (ret_abort)              abort_code = ABORT_SOFTWARE;
      else if (ret_disal || nest_ovf)  abort_code = ABORT_DISALLOWED;
    end
  end

  assign abort_pulse  = (abort_code != ABORT_NONE);
  assign redirect_rip = saved_rip;
  assign redirect_rsp = saved_rsp;
  assign abort_rax    = {61'd0, abort_code};
  assign abort_zf     = 1'b0;
  assign track_en     = track_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      depth        <= '0;
      saved_rip    <= '0;
      saved_rsp    <= '0;
      track_q      <= 1'b0;
      commit_pulse <= 1'b0;
      commit_error <= 1'b0;
    end else begin
      commit_pulse <= 1'b0;
      commit_error <= 1'b0;
      if (abort_pulse) begin
        depth   <= '0;
        track_q <= 1'b0;
      end else if (ret_spec) begin
        if (depth == '0) begin
          saved_rip <= retire_next_rip;
          saved_rsp <= retire_rsp;
        end
        depth   <= depth + 1'b1;
        track_q <= 1'b1;
      end else if (ret_commit) begin
        if (depth == '0) begin
          commit_error <= 1'b1;
        end else begin
          depth <= depth - 1'b1;
          if (depth == DEPTH_W'(1)) begin
            commit_pulse <= 1'b1;
            track_q      <= 1'b0;
          end
        end
      end
    end
  end

  // Tracking is never off while a region is active.
  assert property (@(posedge clk) disable iff (!rst_n) in_region |-> track_en);

endmodule
