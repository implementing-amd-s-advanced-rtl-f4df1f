// asf_llb: locked line buffer (LLB), the read/write-set store of the
// LLB-based ASF implementation.
//
// A fully associative array holds, for every protected line, its address,
// a speculative-read and a speculative-write bit, a backup copy of the line
// taken before its first speculative write, and a count of the in-flight
// micro-ops that reference it. The count gives precise tracking: when a
// misspeculated micro-op is annulled and the count of a line no retired
// micro-op has touched drops to zero, the line leaves the set again.
//
// The buffer is staged. A line referenced only by in-flight (OoO-speculative)
// micro-ops sits in the first stage, which holds at most S1_N lines; when one
// of its micro-ops retires the line moves to the second stage, which holds
// S2_N lines and thereby gives the architectural guarantee of four protected
// lines. Both stages share one physical array of S1_N+S2_N entries with a
// stage bit; moving a line between stages only flips the bit. A micro-op that
// needs a new line while the first stage is full waits (acc_grant low); if a
// first-stage line is referenced only by younger micro-ops, replay_valid asks
// the core to replay from the oldest of them (replay_seq) to make room, so
// younger micro-ops cannot deadlock older ones. A line that must move to a
// full second stage raises capacity.
//
// The LLB snoops remote probes itself. A write probe to any protected line,
// or a read probe to a speculatively written one, is a conflict: in the same
// cycle the LLB does a partial rollback of that line only, returning the
// backup with the probe answer and writing it back (wb_*), and sets the
// sticky conflict flag for the region controller. On rollback the buffer
// writes back every remaining backup, one line per cycle (busy high), then
// empties; on commit it empties at once.
//
// Interface: at most one access, one retire, one annul and one probe per
// cycle, each naming the entry index handed out with acc_grant. acc_grant,
// acc_idx, replay_* and probe_* answer in the same cycle. Entry sizes of the
// first stage, age comparison against the ROB head and the conflict rule are
// this design's own choices.
module asf_llb
  import asf_pkg::*;
#(
  parameter int unsigned S1_N   = 4,
  parameter int unsigned S2_N   = 4,
  parameter int unsigned SEQ_W  = 7,
  parameter int unsigned REF_W  = 6,
  localparam int unsigned N     = S1_N + S2_N,
  localparam int unsigned IDX_W = $clog2(N)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [SEQ_W-1:0] rob_head_seq,
  // access from an ASF-spec memory micro-op at issue
  input  logic             acc_valid,
  input  line_addr_t       acc_line,
  input  logic             acc_write,
  input  logic [SEQ_W-1:0] acc_seq,
  input  line_data_t       acc_old_data,
  output logic             acc_grant,
  output logic [IDX_W-1:0] acc_idx,
  output logic             replay_valid,
  output logic [SEQ_W-1:0] replay_seq,
  // retire / annul of a referencing micro-op
  input  logic             ret_valid,
  input  logic [IDX_W-1:0] ret_idx,
  input  logic             ann_valid,
  input  logic [IDX_W-1:0] ann_idx,
  // remote probe
  input  logic             probe_valid,
  input  line_addr_t       probe_line,
  input  logic             probe_write,
  output logic             probe_conflict,
  output logic             probe_data_valid,
  output line_data_t       probe_data,
  // backup write-back to memory
  output logic             wb_valid,
  output line_addr_t       wb_line,
  output line_data_t       wb_data,
  // region control
  input  logic             commit,
  input  logic             rollback,
  output logic             conflict,
  output logic             capacity,
  output logic             busy,
  output logic [IDX_W:0]   s1_used,
  output logic [IDX_W:0]   s2_used
);

  typedef struct packed {
    logic             valid;
    logic             stage2;
    logic             rd;
    logic             wr;
    logic [REF_W-1:0] refs;
    logic [SEQ_W-1:0] oldest;
    line_addr_t       line;
  } llb_ent_t;

  llb_ent_t   ent    [N];
  line_data_t backup [N];
  logic       rb_active;
  logic [IDX_W-1:0] rb_ptr;

  function automatic logic [SEQ_W-1:0] age(input logic [SEQ_W-1:0] s, input logic [SEQ_W-1:0] head);
    return s - head;
  endfunction

  // occupancy
  always_comb begin
    s1_used = '0; s2_used = '0;
    for (int i = 0; i < N; i++) begin
      if (ent[i].valid && !ent[i].stage2) s1_used = s1_used + 1'b1;
      if (ent[i].valid &&  ent[i].stage2) s2_used = s2_used + 1'b1;
    end
  end

  // access lookup, allocation and replay choice
  logic             a_hit, a_free;
  logic [IDX_W-1:0] a_hit_idx, a_free_idx;
  logic             rp_found;
  logic [IDX_W-1:0] rp_idx;
  always_comb begin
    a_hit = 1'b0; a_hit_idx = '0; a_free = 1'b0; a_free_idx = '0;
    rp_found = 1'b0; rp_idx = '0;
    for (int i = N-1; i >= 0; i--) begin
      if (ent[i].valid && ent[i].line == acc_line) begin a_hit = 1'b1; a_hit_idx = IDX_W'(i); end
      if (!ent[i].valid) begin a_free = 1'b1; a_free_idx = IDX_W'(i); end
    end
    for (int i = 0; i < N; i++) begin
      if (ent[i].valid && !ent[i].stage2 &&
          age(ent[i].oldest, rob_head_seq) > age(acc_seq, rob_head_seq) &&
          (!rp_found || age(ent[i].oldest, rob_head_seq) > age(ent[rp_idx].oldest, rob_head_seq))) begin
        rp_found = 1'b1; rp_idx = IDX_W'(i);
      end
    end
  end

  wire can_alloc = a_free && (s1_used < (IDX_W+1)'(S1_N));
  assign acc_grant    = acc_valid && !busy && (a_hit || can_alloc);
  assign acc_idx      = a_hit ? a_hit_idx : a_free_idx;
  assign replay_valid = acc_valid && !busy && !a_hit && !can_alloc && rp_found;
  assign replay_seq   = ent[rp_idx].oldest;

  // probe snoop
  logic             p_hit;
  logic [IDX_W-1:0] p_idx;
  always_comb begin
    p_hit = 1'b0; p_idx = '0;
    for (int i = 0; i < N; i++)
      if (ent[i].valid && ent[i].line == probe_line) begin p_hit = 1'b1; p_idx = IDX_W'(i); end
  end
  assign probe_conflict   = probe_valid && p_hit && (probe_write || ent[p_idx].wr);
  assign probe_data_valid = probe_valid && p_hit && ent[p_idx].wr;
  assign probe_data       = backup[p_idx];

  // write-back port: partial rollback of a probed line has priority over the
  // full-rollback walk
  wire rb_step = rb_active && !probe_data_valid;
  always_comb begin
    wb_valid = 1'b0; wb_line = '0; wb_data = '0;
    if (probe_data_valid) begin
      wb_valid = 1'b1; wb_line = ent[p_idx].line; wb_data = backup[p_idx];
    end else if (rb_active && ent[rb_ptr].valid && ent[rb_ptr].wr) begin
      wb_valid = 1'b1; wb_line = ent[rb_ptr].line; wb_data = backup[rb_ptr];
    end
  end

  assign busy = rb_active;

  // next state of every entry
  llb_ent_t ent_n  [N];
  logic     bk_we  [N];
  logic     cap_set;
  always_comb begin
    cap_set = 1'b0;
    for (int i = 0; i < N; i++) begin
      logic inc, dec_r, dec_a;
      ent_n[i] = ent[i];
      bk_we[i] = 1'b0;
      inc   = acc_grant && acc_idx == IDX_W'(i);
      dec_r = ret_valid && ret_idx == IDX_W'(i) && ent[i].valid;
      dec_a = ann_valid && ann_idx == IDX_W'(i) && ent[i].valid;
      if (inc) begin
        if (!ent[i].valid) begin
          ent_n[i]        = '0;
          ent_n[i].valid  = 1'b1;
          ent_n[i].line   = acc_line;
          ent_n[i].oldest = acc_seq;
        end else if (age(acc_seq, rob_head_seq) < age(ent[i].oldest, rob_head_seq)) begin
          ent_n[i].oldest = acc_seq;
        end
        bk_we[i]      = acc_write && !ent_n[i].wr;
        ent_n[i].rd   = ent_n[i].rd | !acc_write;
        ent_n[i].wr   = ent_n[i].wr | acc_write;
        ent_n[i].refs = ent_n[i].refs + 1'b1;
      end
      if (dec_r) begin
        ent_n[i].refs = ent_n[i].refs - 1'b1;
        if (!ent_n[i].stage2) begin
          if (s2_used < (IDX_W+1)'(S2_N)) ent_n[i].stage2 = 1'b1;
          else                            cap_set = 1'b1;
        end
      end
      if (dec_a) begin
        ent_n[i].refs = ent_n[i].refs - 1'b1;
        if (!ent_n[i].stage2 && ent_n[i].refs == '0) ent_n[i].valid = 1'b0;
      end
      // partial rollback: memory now holds the backup again
      if (probe_data_valid && p_idx == IDX_W'(i)) ent_n[i].wr = 1'b0;
      if (rb_step && rb_ptr == IDX_W'(i)) ent_n[i].valid = 1'b0;
      if (commit) ent_n[i] = '0;
    end
  end

  // backup copies: plain storage, no reset needed (wr guards them)
  always_ff @(posedge clk) begin
    for (int i = 0; i < N; i++)
      if (bk_we[i]) backup[i] <= acc_old_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) ent[i] <= '0;
      rb_active <= 1'b0;
      rb_ptr    <= '0;
      conflict  <= 1'b0;
      capacity  <= 1'b0;
    end else begin
      for (int i = 0; i < N; i++) ent[i] <= ent_n[i];
      if (cap_set)        capacity <= 1'b1;
      if (probe_conflict) conflict <= 1'b1;
      if (rollback && !rb_active) begin
        rb_active <= 1'b1;
        rb_ptr    <= '0;
        conflict  <= 1'b0;
        capacity  <= 1'b0;
      end else if (rb_step) begin
        rb_ptr <= rb_ptr + 1'b1;
        if (rb_ptr == IDX_W'(N-1)) rb_active <= 1'b0;
      end
      if (commit) begin
        conflict <= 1'b0;
        capacity <= 1'b0;
      end
    end
  end

  // A first-stage entry is always referenced by an in-flight micro-op (unless
  // it is stuck there by a capacity overflow, which aborts the region and
  // rolls the buffer back).
  for (genvar g = 0; g < N; g++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     ent[g].valid && !ent[g].stage2 && !capacity && !rb_active |-> ent[g].refs != '0);
  end

endmodule
