// asf_miss_buffer: L1 miss buffer that tracks the ASF-spec state of each
// outstanding line by counting the in-flight ASF-spec loads referencing it.
//
// A load that misses in L1 either merges into the entry already waiting for
// the same line or allocates a new one, which sends a request to the next
// level (mem_req_*). Each entry keeps the number of not-yet-retired ASF-spec
// loads attached to it: a merging or allocating ASF load adds one, an
// annulled ASF load (wrong branch, replay) subtracts one. A load can retire
// only after its miss is resolved, so no retired load ever counts. When the
// line returns (fill_valid with the entry index) the entry forwards the fill
// to L1 and sets its speculative-read bit only if the count is non-zero; a
// line whose ASF loads were all annulled arrives clean, which prevents orphan
// spec-read lines after the region has ended. The entry is then freed.
//
// Interface: one miss and one annul per cycle; miss_idx/miss_full are
// combinational answers to the miss in the same cycle. The entry count,
// counter width and the rule that annuls arriving after the fill are not
// sent are this design's own choices.
module asf_miss_buffer
  import asf_pkg::*;
#(
  parameter int unsigned ENTRIES = 8,
  parameter int unsigned CNT_W   = 6,
  localparam int unsigned IDX_W  = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  logic             rst_n,
  // miss from the load pipeline
  input  logic             miss_valid,
  input  line_addr_t       miss_line,
  input  logic             miss_asf,
  output logic [IDX_W-1:0] miss_idx,
  output logic             miss_full,
  // request to the next memory level
  output logic             mem_req_valid,
  output line_addr_t       mem_req_line,
  output logic [IDX_W-1:0] mem_req_idx,
  // annulled load that referenced an entry
  input  logic             annul_valid,
  input  logic [IDX_W-1:0] annul_idx,
  input  logic             annul_asf,
  // line returned from the next level
  input  logic             fill_valid,
  input  logic [IDX_W-1:0] fill_idx,
  // fill towards L1
  output logic             l1_fill_valid,
  output line_addr_t       l1_fill_line,
  output logic             l1_fill_spec_r,
  output logic [ENTRIES-1:0] busy
);

  logic [ENTRIES-1:0] valid;
  line_addr_t         line  [ENTRIES];
  logic [CNT_W-1:0]   asf_cnt [ENTRIES];

  logic             hit, have_free;
  logic [IDX_W-1:0] hit_idx, free_idx;

  always_comb begin
    hit = 1'b0; hit_idx = '0; have_free = 1'b0; free_idx = '0;
    for (int i = ENTRIES-1; i >= 0; i--) begin
      if (valid[i] && line[i] == miss_line && !(fill_valid && fill_idx == IDX_W'(i))) begin
        hit = 1'b1; hit_idx = IDX_W'(i);
      end
      if (!valid[i]) begin
        have_free = 1'b1; free_idx = IDX_W'(i);
      end
    end
  end

  assign miss_idx      = hit ? hit_idx : free_idx;
  assign miss_full     = miss_valid && !hit && !have_free;
  assign mem_req_valid = miss_valid && !hit && have_free;
  assign mem_req_line  = miss_line;
  assign mem_req_idx   = free_idx;

  assign l1_fill_valid  = fill_valid && valid[fill_idx];
  assign l1_fill_line   = line[fill_idx];
  assign l1_fill_spec_r = asf_cnt[fill_idx] != '0;
  assign busy           = valid;

  // next value of each entry's ASF-load count
  logic [CNT_W-1:0] cnt_n [ENTRIES];
  always_comb begin
    for (int i = 0; i < ENTRIES; i++) begin
      cnt_n[i] = asf_cnt[i];
      if (miss_valid && miss_asf && (hit || have_free) && miss_idx == IDX_W'(i))
        cnt_n[i] = cnt_n[i] + 1'b1;
      if (annul_valid && annul_asf && annul_idx == IDX_W'(i) && valid[i] && cnt_n[i] != '0)
        cnt_n[i] = cnt_n[i] - 1'b1;
      if (fill_valid && fill_idx == IDX_W'(i))
        cnt_n[i] = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
      for (int i = 0; i < ENTRIES; i++) begin
        line[i]    <= '0;
        asf_cnt[i] <= '0;
      end
    end else begin
      for (int i = 0; i < ENTRIES; i++) begin
        asf_cnt[i] <= cnt_n[i];
        if (fill_valid && fill_idx == IDX_W'(i)) valid[i] <= 1'b0;
        if (mem_req_valid && free_idx == IDX_W'(i)) begin
          valid[i] <= 1'b1;
          line[i]  <= miss_line;
        end
      end
    end
  end

endmodule
