// asf_unit: ASF (Advanced Synchronization Facility) support for an
// out-of-order AMD64 core, the top of this design.
//
// ASF lets software open a speculative region with SPECULATE, name protected
// lines with LOCK MOV loads and stores, and end it with COMMIT; a conflicting
// access by another core, running out of capacity, an exception or ABORT
// rolls the region back and restarts execution after SPECULATE with a reason
// code in rAX. This unit holds everything ASF adds to the core:
//
//   asf_region_ctrl  region state, nesting, abort detection and redirect;
//                    acts only on retiring asf.spec / asf.commit / ABORT
//   asf_fence_gate   holds ASF memory micro-ops until the asf.mfence decoded
//                    from SPECULATE has retired
//   asf_miss_buffer  L1 miss buffer counting in-flight ASF loads per entry
//   asf_l1_spec      L1 tags with speculative-read/-write bits
//   asf_llb          locked line buffer with backups, staged for the
//                    four-line guarantee
//
// Both ways of holding the read/write set are present. mode_llb selects one
// at run time (a configuration bit, to be changed only outside a region):
// with mode_llb = 1 ASF accesses go to the LLB and the L1 works as a plain
// cache; with mode_llb = 0 the L1 bits and the miss buffer's ASF counts hold
// the set. ASF marking is gated with track_en, which the region controller
// keeps high through the abort cycle so a store retiring in that cycle is
// still tracked. The region controller's commit pulse clears, and its abort
// pulse rolls back, both trackers.
//
// The rest of the core (ROB, rename, scheduler, load/store queues, data
// arrays) and the coherence fabric are outside; their signals are ports.
// All outputs follow the timing of the sub-block that drives them.
module asf_unit
  import asf_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        mode_llb,
  // retire stage
  input  logic        retire_valid,
  input  uop_kind_e   retire_kind,
  input  logic [63:0] retire_next_rip,
  input  logic [63:0] retire_rsp,
  input  logic        exc_event,
  // region state and abort redirect
  output logic        in_region,
  output logic [7:0]  depth,
  output logic        commit_pulse,
  output logic        commit_error,
  output logic        abort_pulse,
  output abort_code_e abort_code,
  output logic [63:0] redirect_rip,
  output logic [63:0] redirect_rsp,
  output logic [63:0] abort_rax,
  output logic        abort_zf,
  // dispatch into the memory issue slots
  input  logic        fence_dispatch,
  input  logic [5:0]  fence_annul,
  input  logic        mop_dispatch,
  input  logic [2:0]  mop_slot,
  input  logic        mop_is_asf,
  output logic [7:0]  issue_ok,
  // memory access at issue
  input  logic [6:0]  rob_head_seq,
  input  logic        acc_valid,
  input  line_addr_t  acc_line,
  input  logic        acc_write,
  input  logic        acc_asf,
  input  logic [6:0]  acc_seq,
  input  line_data_t  acc_old_data,
  output logic        acc_hit,
  output logic        acc_go,        // ASF access may proceed (LLB entry granted)
  output logic [2:0]  acc_llb_idx,
  output logic        replay_valid,
  output logic [6:0]  replay_seq,
  output logic        clean_wb_req,
  output line_addr_t  clean_wb_line,
  // retire / annul of ASF memory micro-ops holding an LLB entry
  input  logic        mem_ret_valid,
  input  logic [2:0]  mem_ret_idx,
  input  logic        mem_ann_valid,
  input  logic [2:0]  mem_ann_idx,
  // L1 misses and fills
  input  logic        miss_valid,
  input  line_addr_t  miss_line,
  input  logic        miss_asf,
  output logic [2:0]  miss_idx,
  output logic        miss_full,
  output logic        mem_req_valid,
  output line_addr_t  mem_req_line,
  output logic [2:0]  mem_req_idx,
  input  logic        ld_annul_valid,
  input  logic [2:0]  ld_annul_idx,
  input  logic        ld_annul_asf,
  input  logic        fill_valid,
  input  logic [2:0]  fill_idx,
  output logic        evict_valid,
  output line_addr_t  evict_line,
  output logic        evict_dirty,
  // store-to-load forwarded ASF loads
  input  logic        stlf_valid,
  input  line_addr_t  stlf_line,
  output logic        stlf_ready,
  // remote probes
  input  logic        probe_valid,
  input  line_addr_t  probe_line,
  input  logic        probe_write,
  output logic        probe_conflict,
  output logic        probe_data_valid,
  output line_data_t  probe_data,
  // LLB backup write-back to memory
  output logic        wb_valid,
  output line_addr_t  wb_line,
  output line_data_t  wb_data,
  output logic        llb_busy,
  output logic [3:0]  llb_s1_used,
  output logic [3:0]  llb_s2_used,
  // occupancy for the core's stall logic
  output logic        l1_probe_hit,
  output logic [7:0]  mb_busy,
  output logic [5:0]  fences_in_flight
);

  logic track_en;
  logic llb_conflict, llb_capacity, l1_conflict, l1_capacity;
  logic llb_probe_conflict, l1_probe_conflict;
  logic llb_grant;
  logic mb_fill_valid, mb_fill_spec_r;
  line_addr_t mb_fill_line;

  wire asf_on     = acc_asf && track_en;
  wire llb_acc    = acc_valid && asf_on && mode_llb;
  wire conflict_i = mode_llb ? llb_conflict : l1_conflict;
  wire capacity_i = mode_llb ? llb_capacity : l1_capacity;

  asf_region_ctrl u_region (
    .clk, .rst_n,
    .retire_valid, .retire_kind, .retire_next_rip, .retire_rsp,
    .conflict (conflict_i), .capacity (capacity_i), .exc_event,
    .in_region, .depth, .track_en, .commit_pulse, .commit_error,
    .abort_pulse, .abort_code, .redirect_rip, .redirect_rsp, .abort_rax, .abort_zf
  );

  asf_fence_gate u_fence (
    .clk, .rst_n,
    .fence_dispatch,
    .fence_retire (retire_valid && retire_kind == UOP_MFENCE),
    .fence_annul,
    .mop_dispatch, .mop_slot, .mop_is_asf,
    .issue_ok, .fences_in_flight
  );

  asf_miss_buffer u_mb (
    .clk, .rst_n,
    .miss_valid, .miss_line, .miss_asf (miss_asf && track_en && !mode_llb),
    .miss_idx, .miss_full,
    .mem_req_valid, .mem_req_line, .mem_req_idx,
    .annul_valid (ld_annul_valid), .annul_idx (ld_annul_idx), .annul_asf (ld_annul_asf && !mode_llb),
    .fill_valid, .fill_idx,
    .l1_fill_valid (mb_fill_valid), .l1_fill_line (mb_fill_line), .l1_fill_spec_r (mb_fill_spec_r),
    .busy (mb_busy)
  );

  asf_l1_spec u_l1 (
    .clk, .rst_n,
    .acc_valid, .acc_line, .acc_write, .acc_asf (asf_on && !mode_llb),
    .acc_hit, .wb_req (clean_wb_req), .wb_line (clean_wb_line),
    .stlf_valid (stlf_valid && track_en && !mode_llb), .stlf_line, .stlf_ready,
    .fill_valid (mb_fill_valid), .fill_line (mb_fill_line), .fill_spec_r (mb_fill_spec_r),
    .evict_valid, .evict_line, .evict_dirty,
    .probe_valid, .probe_line, .probe_write,
    .probe_hit (l1_probe_hit), .probe_conflict (l1_probe_conflict),
    .commit (commit_pulse), .rollback (abort_pulse),
    .conflict (l1_conflict), .capacity (l1_capacity)
  );

  asf_llb u_llb (
    .clk, .rst_n, .rob_head_seq,
    .acc_valid (llb_acc), .acc_line, .acc_write, .acc_seq, .acc_old_data,
    .acc_grant (llb_grant), .acc_idx (acc_llb_idx), .replay_valid, .replay_seq,
    .ret_valid (mem_ret_valid), .ret_idx (mem_ret_idx),
    .ann_valid (mem_ann_valid), .ann_idx (mem_ann_idx),
    .probe_valid, .probe_line, .probe_write,
    .probe_conflict (llb_probe_conflict), .probe_data_valid, .probe_data,
    .wb_valid, .wb_line, .wb_data,
    .commit (commit_pulse), .rollback (abort_pulse),
    .conflict (llb_conflict), .capacity (llb_capacity), .busy (llb_busy),
    .s1_used (llb_s1_used), .s2_used (llb_s2_used)
  );

  assign acc_go         = !llb_acc || llb_grant;
  assign probe_conflict = llb_probe_conflict || l1_probe_conflict;

endmodule
